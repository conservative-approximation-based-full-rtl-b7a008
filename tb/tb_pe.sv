// tb_pe: one processing element driven with random reference/search pixels,
// partial sums, shift and disable pulses. The testbench keeps its own history
// of the inputs and predicts each output from the PE's documented timing:
//   ref_out(t)  = last ref_in shifted in            srch_out(t) = srch_in(t-1)
//   L(t)        = srch_in(t-1), or held if dis(t-1)
//   psum_out(t) = psum_in(t-1) + |RSR(t-2) - L(t-2)|
module tb_pe;
  import fsbma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ref_shift, dis;
  pix_t ref_in, ref_out, srch_in, srch_out;
  psum_t psum_in, psum_out;
  int checks = 0, failures = 0, n_dis = 0;

  pix_t  m_rsr, m_l, m_l2, m_l3;
  psum_t m_l1;

  pe dut (
    .clk(clk), .rst_n(rst_n), .ref_shift(ref_shift), .ref_in(ref_in), .ref_out(ref_out),
    .srch_in(srch_in), .srch_out(srch_out), .dis(dis), .psum_in(psum_in), .psum_out(psum_out)
  );

  always #5 clk = ~clk;

  function automatic pix_t absd(pix_t a, pix_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    ref_shift = 0; dis = 0; ref_in = 0; srch_in = 0; psum_in = 0;
    m_rsr = 0; m_l = 0; m_l2 = 0; m_l3 = 0; m_l1 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      ref_shift = ($urandom_range(0, 9) == 0);
      dis       = ($urandom_range(0, 3) == 0);
      ref_in    = pix_t'($urandom);
      srch_in   = pix_t'($urandom);
      psum_in   = psum_t'($urandom_range(0, 2040));
      if (dis) n_dis++;
      @(posedge clk);
      // model update with the values sampled at this edge
      m_l1  = psum_in + psum_t'(m_l3);
      m_l3  = absd(m_rsr, m_l);
      if (!dis) m_l = srch_in;
      m_l2  = srch_in;
      if (ref_shift) m_rsr = ref_in;
      @(negedge clk);
      checks++;
      if (ref_out !== m_rsr || srch_out !== m_l2 || psum_out !== m_l1) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d ref=%0d/%0d srch=%0d/%0d psum=%0d/%0d",
                                   t, ref_out, m_rsr, srch_out, m_l2, psum_out, m_l1);
      end
    end
    checks++;
    if (n_dis == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
