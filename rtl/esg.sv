// esg: enable signal generator.
//
// A MOD-578 counter (one count per clock, one period per block) feeds a
// comparator against 63: `en` is high for counts 0..63, the 64 clocks in which
// the 8x8 current block is shifted into the PE reference registers, and low
// for the remaining 514 clocks of the period. `cnt` is brought out as well.
module esg
  import fsbma_pkg::*;
#(
  parameter int unsigned MOD      = PERIOD,
  parameter int unsigned LOAD_MAX = LOAD - 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic en,
  output cnt_t cnt
);
  mod_counter #(.MOD(MOD), .W(CNT_W)) u_cnt (
    .clk(clk), .rst_n(rst_n), .clr(1'b0), .cnt(cnt), .wrap()
  );

  assign en = (cnt <= cnt_t'(LOAD_MAX));
endmodule
