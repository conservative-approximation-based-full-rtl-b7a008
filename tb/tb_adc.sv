// tb_adc: exhaustive check of the absolute difference calculator over all
// 65536 pairs of 8-bit reference and search pixels.
module tb_adc;
  import fsbma_pkg::*;
  pix_t r, s, ad;
  int checks = 0, failures = 0;

  adc dut (.ref_pix(r), .srch_pix(s), .ad(ad));

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int e;
        r = 8'(i);
        s = 8'(j);
        #1;
        e = (i > j) ? i - j : j - i;
        checks++;
        if (int'(ad) != e) begin
          failures++;
          if (failures < 5) $display("FAIL |%0d-%0d| = %0d", i, j, ad);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
