// tb_fsbma_ca_sequence: six consecutive frame pairs of a synthetic moving
// sequence through the matcher at its default size, the counterpart of a
// skipped-cycle evaluation over several frames of a video.
//
// Frame pair f uses frame f as reference and frame f+1 as current frame; the
// memory model switches pairs at the block-period boundary where the block
// order wraps (every 396 x 578 clocks). Every vector and cost is compared with
// the exhaustive search. Per frame the testbench reports the average number of
// candidate clocks per block in which the DAU kept the upper PE rows idle, out
// of the 289 valid candidate clocks; each frame must show some skipping.
module tb_fsbma_ca_sequence;
  import fsbma_pkg::*;
  import fsbma_tb_pkg::*;

  localparam int NPAIR = NF - 1;
  localparam longint FRAME_CLKS = longint'(NBLK_FRAME) * PERIOD;

  logic clk = 1'b0, rst_n = 1'b0;
  addr_t rbd_addr, sad_addr, mv_addr;
  pix_t  rbd_pix, sad_pix;
  logic  mv_valid, cand_valid, cand_skip, best_upd;
  mad_t  mv_mad;
  longint cyc = 0;
  int pair;
  int checks = 0, failures = 0, n_mv = 0;
  int skip_f [NPAIR];

  fsbma_ca_top dut (
    .clk(clk), .rst_n(rst_n),
    .rbd_addr(rbd_addr), .rbd_pix(rbd_pix),
    .sad_addr(sad_addr), .sad_pix(sad_pix),
    .mv_valid(mv_valid), .mv_addr(mv_addr), .mv_mad(mv_mad),
    .cand_valid(cand_valid), .cand_skip(cand_skip), .best_upd(best_upd)
  );

  always #5 clk = ~clk;

  // clock index since reset release; frame pair by block period
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  assign pair    = int'(cyc / FRAME_CLKS) % NPAIR;
  assign rbd_pix = frames[pair + 1][rbd_addr];
  assign sad_pix = frames[pair][sad_addr];

  always @(posedge clk) begin
    if (rst_n) begin
      // a candidate belongs to the frame of the vector it will end in
      if (cand_skip) skip_f[(n_mv / NBLK_FRAME) % NPAIR]++;
      if (mv_valid) begin
        int f, ea, es;
        f = n_mv / NBLK_FRAME;
        exhaustive(f + 1, f, n_mv % NBLK_FRAME, ea, es);
        checks++;
        if (int'(mv_addr) != ea || int'(mv_mad) != es) begin
          failures++;
          if (failures < 10)
            $display("FAIL frame %0d block %0d: %0d/%0d expected %0d/%0d",
                     f, n_mv % NBLK_FRAME, mv_addr, mv_mad, ea, es);
        end
        n_mv++;
      end
    end
  end

  initial begin
    for (int f = 0; f < NPAIR; f++) skip_f[f] = 0;
    make_sequence();
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (n_mv == NPAIR * NBLK_FRAME);
    @(posedge clk);
    for (int f = 0; f < NPAIR; f++) begin
      $display("frame %0d: skipped candidate clocks %0d, per block %0d.%01d of %0d",
               f + 1, skip_f[f], skip_f[f] / NBLK_FRAME, (skip_f[f] * 10 / NBLK_FRAME) % 10,
               NCAND_1D * NCAND_1D);
      checks++;
      if (skip_f[f] == 0) begin failures++; $display("FAIL: no skipping in frame %0d", f + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPAIR * FRAME_CLKS + 3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d vectors", n_mv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
