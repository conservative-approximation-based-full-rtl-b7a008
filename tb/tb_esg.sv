// tb_esg: three block periods; the count must run 0..577 and wrap, and the
// enable must be high for exactly the first 64 counts of each period.
module tb_esg;
  import fsbma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en;
  cnt_t cnt;
  int checks = 0, failures = 0, n_en = 0;

  esg dut (.clk(clk), .rst_n(rst_n), .en(en), .cnt(cnt));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3 * PERIOD; t++) begin
      checks++;
      if (int'(cnt) != t % PERIOD || en !== (t % PERIOD < LOAD)) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d cnt=%0d en=%0b", t, cnt, en);
      end
      if (en) n_en++;
      @(negedge clk);
    end
    checks++;
    if (n_en != 3 * LOAD) begin failures++; $display("FAIL enable clocks %0d", n_en); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
