// tb_pa: random column sums (full 15-bit range and the realistic 0..2040
// range); the 18-bit total and the skip flag must appear one clock later.
module tb_pa;
  import fsbma_pkg::*;
  logic clk = 0, rst_n = 0;
  psum_t cs [BLK];
  logic  sk, sko;
  mad_t  mad;
  longint exp_sum;
  logic   exp_sk;
  int checks = 0, failures = 0;

  pa dut (.clk(clk), .rst_n(rst_n), .col_sum(cs), .skip_in(sk), .mad(mad), .skip_out(sko));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < BLK; i++) cs[i] = '0;
    sk = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      exp_sum = 0;
      for (int i = 0; i < BLK; i++) begin
        cs[i] = psum_t'($urandom_range(0, (t % 2) ? 32767 : 2040));
        exp_sum += longint'(cs[i]);
      end
      sk = 1'($urandom);
      exp_sk = sk;
      @(negedge clk);
      checks++;
      if (longint'(mad) != exp_sum || sko !== exp_sk) begin
        failures++;
        if (failures < 5) $display("FAIL mad=%0d expected %0d", mad, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
