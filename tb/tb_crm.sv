// tb_crm: three block periods. The valid flag must be high in exactly the
// clocks 179 + 24u + v (u, v = 0..16, counted from the start of a period,
// wrapping into the next period), i.e. 289 per period, with `first` at
// candidate (0,0) and `last` at candidate (16,16).
module tb_crm;
  import fsbma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid, first, last;
  int checks = 0, failures = 0, n_valid = 0;

  crm dut (.clk(clk), .rst_n(rst_n), .valid(valid), .first(first), .last(last));

  always #5 clk = ~clk;

  function automatic bit is_cand(int t, output int u, output int v);
    int k;
    k = t - 179;
    if (k < 0) return 0;
    u = k / SA_W;
    v = k % SA_W;
    return (u <= 2 * DISP) && (v <= 2 * DISP);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3 * PERIOD; t++) begin
      int u, v, tt;
      bit e, ef, el;
      // a period's last candidates arrive in the next period
      tt = t % PERIOD;
      e = 0;
      if (t >= PERIOD && is_cand(tt + PERIOD, u, v)) e = 1;
      else if (is_cand(tt, u, v)) e = 1;
      ef = e && u == 0 && v == 0;
      el = e && u == 2 * DISP && v == 2 * DISP;
      checks++;
      if (valid !== e || first !== ef || last !== el) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d valid=%0b first=%0b last=%0b", t, valid, first, last);
      end
      if (valid) n_valid++;
      @(negedge clk);
    end
    // first period has 289 valid, the third period's tail spills past the end
    checks++;
    if (n_valid < 2 * NCAND_1D * NCAND_1D) begin failures++; $display("FAIL n_valid=%0d", n_valid); end
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
