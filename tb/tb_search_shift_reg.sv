// tb_search_shift_reg: random pixels in, each must come out exactly 15 clocks
// later (checked against a history kept by the testbench).
module tb_search_shift_reg;
  import fsbma_pkg::*;
  logic clk = 0, rst_n = 0;
  pix_t d, q;
  pix_t hist [$];
  int checks = 0, failures = 0;

  search_shift_reg dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (hist.size() >= SR_LEN) begin
        checks++;
        if (q !== hist[hist.size() - SR_LEN]) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d q=%0d", t, q);
        end
      end else begin
        checks++;
        if (q !== '0) failures++;   // still reset contents
      end
      d = pix_t'($urandom);
      hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
