// pe: processing element of the systolic array.
//
// Holds one pixel of the current block in its reference shift register (RSR)
// and accumulates one term of a column's distortion:
//   RSR  8-bit, loads ref_in when ref_shift is high; the RSRs of the array form
//        one chain through which the block is shifted in.
//   L2   8-bit, passes the search pixel to the right-hand neighbour (1 clock).
//   L    8-bit enabled register in front of the ADC. It loads the same search
//        pixel as L2 unless `dis` (disable from the DAU) is high; then it holds,
//        the ADC inputs stay still and this candidate's term is not computed.
//   ADC  |RSR - L|, registered in L3 (pipeline between ADC and ADDER).
//   L1   15-bit partial sum: L3 + psum_in (from the PE below), to the PE above.
// Timing: a search pixel present at srch_in in clock t reaches L in t+1, its
// absolute difference is in L3 in t+2 and the sum including it leaves L1 in
// t+3. The document draws L as a latch; here it is an edge-triggered register
// with enable, which does the same gating and keeps the design free of latches.
module pe
  import fsbma_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ref_shift,
  input  pix_t  ref_in,
  output pix_t  ref_out,
  input  pix_t  srch_in,
  output pix_t  srch_out,
  input  logic  dis,
  input  psum_t psum_in,
  output psum_t psum_out
);
  pix_t  rsr, l_q, l2_q, l3_q, ad;
  psum_t l1_q;

  adc u_adc (.ref_pix(rsr), .srch_pix(l_q), .ad(ad));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsr  <= '0;
      l_q  <= '0;
      l2_q <= '0;
      l3_q <= '0;
      l1_q <= '0;
    end else begin
      if (ref_shift) rsr <= ref_in;
      if (!dis)      l_q <= srch_in;
      l2_q <= srch_in;
      l3_q <= ad;
      l1_q <= psum_in + psum_t'(l3_q);
    end
  end

  assign ref_out  = rsr;
  assign srch_out = l2_q;
  assign psum_out = l1_q;
endmodule
