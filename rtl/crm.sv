// crm: candidate region monitor.
//
// Of the 578 distortions the array produces per block period, only the 289 of
// the 17 x 17 candidate positions inside the search window are real; the
// others straddle two window lines. The CRM has its own MOD-578 counter and 17
// range comparators, [176,192], [200,216], ... , [560,576] (start 176, width
// 17, step 24 as in the design's schematic); their OR ("switch") goes through
// a flip-flop and marks the valid distortions. `first` and `last` mark
// candidates (0,0) (count 176) and (16,16) (count 576).
// Timing: the document uses one flip-flop of delay; this array's pipeline is
// two clocks deeper (the gating register L in every PE), so DELAY = 3 flops
// align the flags with the parallel adder output: the distortion of candidate
// (u,v) leaves the parallel adder at count 179 + 24u + v.
module crm
  import fsbma_pkg::*;
#(
  parameter int unsigned WIN_START = 176,
  parameter int unsigned WIN_LEN   = NCAND_1D,
  parameter int unsigned WIN_STEP  = SA_W,
  parameter int unsigned N_WIN     = NCAND_1D,
  parameter int unsigned DELAY     = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic valid,
  output logic first,
  output logic last
);
  localparam int unsigned LAST_CNT = WIN_START + (N_WIN - 1) * WIN_STEP + WIN_LEN - 1;

  cnt_t cnt;
  logic [N_WIN-1:0] in_win;
  logic [2:0] flags_d [DELAY];   // {last, first, valid}

  mod_counter #(.MOD(PERIOD), .W(CNT_W)) u_cnt (
    .clk(clk), .rst_n(rst_n), .clr(1'b0), .cnt(cnt), .wrap()
  );

  // range comparators
  always_comb begin
    for (int w = 0; w < N_WIN; w++)
      in_win[w] = (cnt >= cnt_t'(WIN_START + w * WIN_STEP)) &&
                  (cnt <= cnt_t'(WIN_START + w * WIN_STEP + WIN_LEN - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) flags_d[i] <= '0;
    end else begin
      flags_d[0] <= {cnt == cnt_t'(LAST_CNT), cnt == cnt_t'(WIN_START), |in_win};
      for (int i = 1; i < DELAY; i++) flags_d[i] <= flags_d[i-1];
    end
  end

  assign {last, first, valid} = flags_d[DELAY-1];
endmodule
