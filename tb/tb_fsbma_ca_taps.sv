// tb_fsbma_ca_taps: the matcher with the DAU tapping PE row 3 (strongest
// bound, only row 0 skips) and PE row 7 (weakest bound, rows 4..0 skip), side
// by side on one frame pair of the synthetic sequence. Both must produce
// exactly the exhaustive-search vectors, and both must skip; the skip counts
// of the two settings are reported.
module tb_fsbma_ca_taps;
  import fsbma_pkg::*;
  import fsbma_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  addr_t rbd_addr [2], sad_addr [2], mv_addr [2];
  pix_t  rbd_pix [2], sad_pix [2];
  logic  mv_valid [2], cand_valid [2], cand_skip [2], best_upd [2];
  mad_t  mv_mad [2];
  int checks = 0, failures = 0;
  int n_mv [2], n_skip [2];

  fsbma_ca_top #(.DAU_TAP_ROW(3)) dut3 (
    .clk(clk), .rst_n(rst_n),
    .rbd_addr(rbd_addr[0]), .rbd_pix(rbd_pix[0]), .sad_addr(sad_addr[0]), .sad_pix(sad_pix[0]),
    .mv_valid(mv_valid[0]), .mv_addr(mv_addr[0]), .mv_mad(mv_mad[0]),
    .cand_valid(cand_valid[0]), .cand_skip(cand_skip[0]), .best_upd(best_upd[0])
  );
  fsbma_ca_top #(.DAU_TAP_ROW(7)) dut7 (
    .clk(clk), .rst_n(rst_n),
    .rbd_addr(rbd_addr[1]), .rbd_pix(rbd_pix[1]), .sad_addr(sad_addr[1]), .sad_pix(sad_pix[1]),
    .mv_valid(mv_valid[1]), .mv_addr(mv_addr[1]), .mv_mad(mv_mad[1]),
    .cand_valid(cand_valid[1]), .cand_skip(cand_skip[1]), .best_upd(best_upd[1])
  );

  always #5 clk = ~clk;

  for (genvar i = 0; i < 2; i++) begin : g_chk
    assign rbd_pix[i] = frames[4][rbd_addr[i]];
    assign sad_pix[i] = frames[3][sad_addr[i]];
    always @(posedge clk) begin
      if (rst_n) begin
        if (cand_skip[i]) n_skip[i]++;
        if (mv_valid[i] && n_mv[i] < NBLK_FRAME) begin
          int ea, es;
          exhaustive(4, 3, n_mv[i], ea, es);
          checks++;
          if (int'(mv_addr[i]) != ea || int'(mv_mad[i]) != es) begin
            failures++;
            if (failures < 10) $display("FAIL tap setting %0d block %0d", i, n_mv[i]);
          end
          n_mv[i]++;
        end
      end
    end
  end

  initial begin
    n_mv[0] = 0; n_mv[1] = 0; n_skip[0] = 0; n_skip[1] = 0;
    make_sequence();
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (n_mv[0] == NBLK_FRAME && n_mv[1] == NBLK_FRAME);
    @(posedge clk);
    $display("skipped candidates: tap row 3: %0d, tap row 7: %0d (of %0d)",
             n_skip[0], n_skip[1], NBLK_FRAME * NCAND_1D * NCAND_1D);
    checks++; if (n_skip[0] == 0) failures++;
    checks++; if (n_skip[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK_FRAME * PERIOD + 3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
