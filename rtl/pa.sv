// pa: parallel adder at the top of the systolic array.
//
// Adds the eight 15-bit column sums leaving the top PE row into one 18-bit
// block distortion and registers it: one clock from inputs to mad. The skip
// flag that travels with a candidate through the array is registered
// alongside so it stays aligned with its distortion.
module pa
  import fsbma_pkg::*;
#(
  parameter int unsigned N = BLK
) (
  input  logic  clk,
  input  logic  rst_n,
  input  psum_t col_sum [N],
  input  logic  skip_in,
  output mad_t  mad,
  output logic  skip_out
);
  mad_t sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) sum = sum + mad_t'(col_sum[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mad      <= '0;
      skip_out <= 1'b0;
    end else begin
      mad      <= sum;
      skip_out <= skip_in;
    end
  end
endmodule
