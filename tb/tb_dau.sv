// tb_dau: random partial sums and recorded minima, plus the boundary cases
// equal / one above; the disable must be high exactly when min_valid is set
// and the sum of the eight partial sums exceeds the minimum.
module tb_dau;
  import fsbma_pkg::*;
  psum_t ps [BLK];
  mad_t  mn;
  logic  mv, dis;
  int checks = 0, failures = 0;

  dau dut (.part_sum(ps), .min_mad(mn), .min_valid(mv), .dis(dis));

  task automatic check_one();
    longint s;
    logic e;
    #1;
    s = 0;
    for (int i = 0; i < BLK; i++) s += longint'(ps[i]);
    e = mv && (s > longint'(mn));
    checks++;
    if (dis !== e) begin
      failures++;
      if (failures < 5) $display("FAIL sum=%0d min=%0d valid=%0b dis=%0b", s, mn, mv, dis);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      longint s;
      s = 0;
      for (int i = 0; i < BLK; i++) begin
        ps[i] = psum_t'($urandom_range(0, (n % 3 == 0) ? 32767 : 2040));
        s += longint'(ps[i]);
      end
      mv = ($urandom_range(0, 7) != 0);
      case (n % 4)
        0: mn = mad_t'(s);
        1: mn = mad_t'(s - 1);
        default: mn = mad_t'($urandom_range(0, 20000));
      endcase
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
