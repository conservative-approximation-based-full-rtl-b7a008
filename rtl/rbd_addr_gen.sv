// rbd_addr_gen: address generator for the 8x8 current (reference) block.
//
// Produces one frame address per clock so that the frame memory delivers the
// 8x8 current (reference) block pixel by pixel in raster order, one block period (578 clocks) per block.
// Structure as in the design's schematic:
//   MOD-8 counter + comparator (=7)  -> adder1 accumulates the in-window offset:
//                                        +1 per clock, +169 after the last pixel of
//                                        a line (169 = 176 - 8 + 1 jumps to the
//                                        next frame line)
//   MOD-578 counter + comparator (=577) -> adder2 steps the block base by 8
//   adder3 = adder1 + adder2            -> addr
// At count 577 the offset and the MOD-8 counter restart (578 is not a
// multiple of 8, so the line counter must be re-aligned each block; the
// schematic does not show this). Blocks are visited in raster order over the
// 22 x 18 blocks of a QCIF frame: after the 22nd block of a block row the base
// moves 8 + 7*176 = 1240 ahead to the next block row, and after the last block
// of the frame it returns to BASE0. Those two rules are this design's own; the
// schematic only adds 8. BASE0 is the address of the window's top-left pixel
// for the first block.
// Address arithmetic is modulo 2^15, so windows of border blocks run outside
// the frame or wrap into neighbouring lines; the frame memory decides what it
// returns there.
module rbd_addr_gen
  import fsbma_pkg::*;
#(
  parameter int unsigned ROW_LEN  = 8,
  parameter int unsigned ROW_JUMP = 169,
  parameter int unsigned BLK_STEP = BLK,
  parameter int unsigned BLKS_X   = FRAME_W / BLK,
  parameter int unsigned BLKS_Y   = FRAME_H / BLK,
  parameter int unsigned BASE0    = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  output addr_t addr,
  output cnt_t  cnt,
  output logic  blk_last   // high in the last clock (count 577) of a block period
);
  localparam int unsigned ROWBLK_JUMP = BLK_STEP + (BLK - 1) * FRAME_W;

  logic          col_wrap, wrap578;   // line-end comparator, block-end comparator
  addr_t         off, base;
  logic [4:0]    bx, by;

  mod_counter #(.MOD(PERIOD), .W(CNT_W)) u_blkcnt (
    .clk(clk), .rst_n(rst_n), .clr(1'b0), .cnt(cnt), .wrap(wrap578)
  );
  mod_counter #(.MOD(ROW_LEN), .W(3)) u_colcnt (
    .clk(clk), .rst_n(rst_n), .clr(wrap578), .cnt(), .wrap(col_wrap)
  );

  // adder1: in-window offset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        off <= '0;
    else if (wrap578)  off <= '0;
    else if (col_wrap) off <= off + addr_t'(ROW_JUMP);
    else               off <= off + addr_t'(1);
  end

  // adder2: block base
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base <= addr_t'(BASE0);
      bx   <= '0;
      by   <= '0;
    end else if (wrap578) begin
      if (bx != 5'(BLKS_X - 1)) begin
        bx   <= bx + 5'd1;
        base <= base + addr_t'(BLK_STEP);
      end else if (by != 5'(BLKS_Y - 1)) begin
        bx   <= '0;
        by   <= by + 5'd1;
        base <= base + addr_t'(ROWBLK_JUMP);
      end else begin
        bx   <= '0;
        by   <= '0;
        base <= addr_t'(BASE0);
      end
    end
  end

  // adder3
  assign addr     = base + off;
  assign blk_last = wrap578;
endmodule
