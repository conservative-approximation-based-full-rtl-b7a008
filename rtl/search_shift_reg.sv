// search_shift_reg: row-to-row delay line of the systolic array.
//
// An 8-bit wide, DEPTH-stage shift register (15 stages by default) that carries
// search pixels from the last PE of one row to the first PE of the next. With
// the 8 PE stages of a row this makes 23 clocks between rows, one less than the
// 24-pixel search-window line, which skews consecutive rows by one clock to
// match the one-row-per-clock climb of the partial sums. Output = input
// delayed by DEPTH clocks.
module search_shift_reg
  import fsbma_pkg::*;
#(
  parameter int unsigned DEPTH = SR_LEN
) (
  input  logic clk,
  input  logic rst_n,
  input  pix_t d,
  output pix_t q
);
  pix_t stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];
endmodule
