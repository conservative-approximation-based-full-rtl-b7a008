// bmsu: best-match selection unit.
//
// Champion register, comparator and subtractor. For each valid distortion
// (crm `valid`, not skipped by the DAU) the comparator checks it against the
// champion register; a strictly smaller one (or the block's first candidate)
// replaces it, and the subtractor turns the current search-area address into
// the frame address of that candidate's top-left pixel, which is the motion
// vector in address form. After the block's last candidate the final vector
// and its distortion are presented with a one-clock `mv_valid` pulse and the
// champion is released for the next block.
// Address alignment: the search address is delayed ADDR_DELAY = 4 clocks, so
// for candidate (u,v) the subtractor sees the address of the candidate's
// bottom-right pixel, base + 176*(u+7) + v + 7; subtracting
// MV_OFFSET = 7*176 + 7 = 1239 gives base + 176*u + v. The document subtracts
// 1242 from its own, differently pipelined, address; the constant here is the
// one that fits this array's timing.
// min_mad/min_valid feed the DAU. Ties keep the earlier candidate.
module bmsu
  import fsbma_pkg::*;
#(
  parameter int unsigned ADDR_DELAY = 4,
  parameter int unsigned MV_OFFSET  = (BLK - 1) * FRAME_W + (BLK - 1)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  mad_t  mad,        // parallel adder output
  input  logic  skip,       // candidate skipped by the DAU
  input  logic  valid,      // from the CRM
  input  logic  first,
  input  logic  last,
  input  addr_t sa_addr,    // search-area address generator output
  output mad_t  min_mad,
  output logic  min_valid,
  output logic  upd,        // champion replaced in this clock
  output logic  mv_valid,
  output addr_t mv_addr,
  output mad_t  mv_mad
);
  addr_t a_d [ADDR_DELAY];
  addr_t cand_addr, best_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ADDR_DELAY; i++) a_d[i] <= '0;
    end else begin
      a_d[0] <= sa_addr;
      for (int i = 1; i < ADDR_DELAY; i++) a_d[i] <= a_d[i-1];
    end
  end

  // subtractor and comparator
  assign cand_addr = a_d[ADDR_DELAY-1] - addr_t'(MV_OFFSET);
  assign upd       = valid && !skip && (first || !min_valid || (mad < min_mad));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_mad   <= '0;
      min_valid <= 1'b0;
      best_addr <= '0;
      mv_valid  <= 1'b0;
      mv_addr   <= '0;
      mv_mad    <= '0;
    end else begin
      if (upd) begin
        min_mad   <= mad;
        best_addr <= cand_addr;
        min_valid <= 1'b1;
      end
      mv_valid <= valid && last;
      if (valid && last) begin
        mv_addr   <= upd ? cand_addr : best_addr;
        mv_mad    <= upd ? mad : min_mad;
        min_valid <= 1'b0;
      end
    end
  end

  // a skipped candidate can only be one that lost against a recorded minimum
  assert property (@(posedge clk) disable iff (!rst_n) (valid && skip) |-> min_valid);
endmodule
