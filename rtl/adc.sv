// adc: absolute difference calculator of one processing element.
//
// A magnitude comparator decides which of the reference pixel (from the RSR)
// and the search pixel is larger; a subtractor then takes the smaller from the
// larger, so the result |ref - srch| never goes negative and needs no sign
// bit. Purely combinational, 8-bit inputs and output, as in the design's ADC
// schematic.
module adc
  import fsbma_pkg::*;
(
  input  pix_t ref_pix,
  input  pix_t srch_pix,
  output pix_t ad
);
  logic ref_ge;   // comparator output

  always_comb begin
    ref_ge = (ref_pix >= srch_pix);
    ad     = ref_ge ? (ref_pix - srch_pix) : (srch_pix - ref_pix);
  end
endmodule
