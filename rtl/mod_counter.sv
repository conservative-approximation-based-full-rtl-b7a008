// mod_counter: free-running modulo-MOD counter with synchronous restart.
//
// Counts 0,1,..,MOD-1,0,... one step per clock. `clr` forces the next value to
// 0 (used to keep the short row counters of the address generators in step
// with the block period). `wrap` is high while the count equals MOD-1.
// Active-low asynchronous reset to 0. Every MOD-N counter of the matcher
// (MOD-578, MOD-24, MOD-8) is an instance of this module.
module mod_counter #(
  parameter int unsigned MOD = 578,
  parameter int unsigned W   = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  output logic [W-1:0] cnt,
  output logic         wrap
);
  initial assert (MOD >= 2 && MOD <= (1 << W)) else $error("mod_counter: MOD does not fit W");

  assign wrap = (cnt == W'(MOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (clr || wrap) cnt <= '0;
    else                 cnt <= cnt + W'(1);
  end
endmodule
