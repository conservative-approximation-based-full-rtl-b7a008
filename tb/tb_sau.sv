// tb_sau: the 8x8 array on its own. A random 8x8 block is shifted in during
// the first 64 clocks while a random 24x24 search window streams in, one pixel
// per clock, from clock 0. For every candidate (u,v) the testbench computes
// the column distortions directly,
//   col j = sum_a |R[a][7-j] - S[u+a][v+7-j]|,
// and checks col_sum in clock 178 + 24u + v and the tap (block rows 0..3,
// the default DAU tap) in clock 174 + 24u + v. The disable input is pulsed in
// the tap clock of every fifth candidate: skip_out must rise for exactly those
// candidates, and every other candidate's sums must stay exact.
module tb_sau;
  import fsbma_pkg::*;
  localparam int TAP_ROW = 4;   // the array's default tap row
  logic clk = 0, rst_n = 0;
  logic ref_shift, dis_in, skip_out;
  pix_t ref_in, srch_in;
  psum_t tap_sum [BLK];
  psum_t col_sum [BLK];
  pix_t R [BLK][BLK];
  pix_t S [SA_W][SA_W];
  int checks = 0, failures = 0, n_skip = 0;

  sau dut (
    .clk(clk), .rst_n(rst_n), .ref_shift(ref_shift), .ref_in(ref_in), .srch_in(srch_in),
    .dis_in(dis_in), .tap_sum(tap_sum), .col_sum(col_sum), .skip_out(skip_out)
  );

  always #5 clk = ~clk;

  function automatic bit cand_at(int t, int base, output int u, output int v);
    int k = t - base;
    if (k < 0) return 0;
    u = k / SA_W;
    v = k % SA_W;
    return u <= 2 * DISP && v <= 2 * DISP;
  endfunction

  function automatic int colsum(int u, int v, int j, int rows);
    int s = 0;
    for (int a = 0; a < rows; a++) begin
      int p = int'(R[a][BLK-1-j]), q = int'(S[u+a][v+BLK-1-j]);
      s += (p > q) ? p - q : q - p;
    end
    return s;
  endfunction

  function automatic bit killed(int u, int v);
    return ((u * NCAND_1D + v) % 5) == 3;
  endfunction

  initial begin
    for (int i = 0; i < BLK; i++) for (int j = 0; j < BLK; j++) R[i][j] = pix_t'($urandom);
    for (int i = 0; i < SA_W; i++) for (int j = 0; j < SA_W; j++) S[i][j] = pix_t'($urandom);
    ref_shift = 0; ref_in = 0; srch_in = 0; dis_in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < PERIOD + 10; t++) begin
      int u, v;
      // drive clock t
      ref_shift = (t < LOAD);
      ref_in    = (t < LOAD) ? R[t / BLK][t % BLK] : 8'h00;
      srch_in   = (t < SA_W * SA_W) ? S[t / SA_W][t % SA_W] : 8'h00;
      dis_in    = cand_at(t, 174, u, v) && killed(u, v);
      #1;
      if (cand_at(t, 174, u, v)) begin
        for (int j = 0; j < BLK; j++) begin
          checks++;
          if (int'(tap_sum[j]) != colsum(u, v, j, BLK - TAP_ROW)) begin
            failures++;
            if (failures < 5) $display("FAIL tap (%0d,%0d) col %0d", u, v, j);
          end
        end
      end
      if (cand_at(t, 178, u, v)) begin
        checks++;
        if (skip_out !== killed(u, v)) begin
          failures++;
          if (failures < 5) $display("FAIL skip (%0d,%0d) = %0b", u, v, skip_out);
        end
        if (skip_out) n_skip++;
        if (!killed(u, v))
          for (int j = 0; j < BLK; j++) begin
            checks++;
            if (int'(col_sum[j]) != colsum(u, v, j, BLK)) begin
              failures++;
              if (failures < 5) $display("FAIL col (%0d,%0d) col %0d: %0d vs %0d",
                                         u, v, j, col_sum[j], colsum(u, v, j, BLK));
            end
          end
      end
      @(negedge clk);
    end
    checks++;
    if (n_skip == 0) failures++;
    $display("skipped=%0d", n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
