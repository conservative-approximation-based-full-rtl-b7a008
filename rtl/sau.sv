// sau: systolic array unit, N x N processing elements and N-1 row shift
// registers.
//
// Reference path: the RSRs of all PEs form one chain, row 0 left to right,
// then row 1, ... While ref_shift is high (64 clocks) the block is shifted in
// raster order, so afterwards PE(k,j) holds block pixel (N-1-k, N-1-j).
// Search path: one search-window pixel per clock enters PE(0,0), moves right
// one PE per clock, and from the end of each row passes through a 15-stage
// search_shift_reg into the next row: 23 clocks between rows.
// Sum path: partial sums climb from the bottom row (row N-1, fed with 0) to
// the top row (row 0), one row per clock; the top row's L1 outputs are the
// eight column sums for the parallel adder. With this skew, all PEs of a row
// work on the same candidate in the same clock, and candidate (u,v) of the
// 24-wide window is in row k at clock 175 - k + 24u + v after the first
// search pixel; its column sums leave row 0 three clocks after that.
// Conservative approximation: the L1 outputs of row DAU_TAP_ROW (distortion
// over block rows 0..N-1-DAU_TAP_ROW) go out as tap_sum to the DAU. The DAU's
// answer `dis_in` comes back in the same clock, while the candidate is at the
// input of row DAU_TAP_ROW-3 (each PE holds a pixel 3 clocks: L, L3, L1), and
// gates the L registers of that row; a chain of one flip-flop per row carries
// it up so rows DAU_TAP_ROW-3 .. 0 all skip the candidate. Rows in between
// finish it anyway. `skip_out` is the flag aligned with col_sum.
module sau
  import fsbma_pkg::*;
#(
  parameter int unsigned N           = BLK,
  parameter int unsigned SR_DEPTH    = SR_LEN,
  parameter int unsigned DAU_TAP_ROW = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ref_shift,
  input  pix_t  ref_in,
  input  pix_t  srch_in,
  input  logic  dis_in,
  output psum_t tap_sum [N],
  output psum_t col_sum [N],
  output logic  skip_out
);
  localparam int unsigned DIS_ROW = DAU_TAP_ROW - 3;   // first row the DAU reaches

  initial assert (DAU_TAP_ROW >= 3 && DAU_TAP_ROW < N)
    else $error("sau: DAU_TAP_ROW must lie in 3..N-1");

  pix_t  ref_chain [N*N+1];
  pix_t  srch_row_in [N];
  pix_t  srch_h [N][N+1];
  psum_t psum_v [N+1][N];   // psum_v[k][j]: output of row k; psum_v[N] = 0
  logic  dis_row [N];
  logic  dis_q [DIS_ROW+1];
  logic  skip_d [3];

  assign ref_chain[0]   = ref_in;
  assign srch_row_in[0] = srch_in;

  always_comb for (int j = 0; j < N; j++) psum_v[N][j] = '0;

  // disable chain: row DIS_ROW directly from the DAU, each row above one clock later
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= DIS_ROW; k++) dis_q[k] <= 1'b0;
    end else begin
      for (int k = 0; k < DIS_ROW; k++) dis_q[k] <= dis_row[k+1];
      dis_q[DIS_ROW] <= 1'b0;
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++) dis_row[k] = 1'b0;
    for (int k = 0; k < DIS_ROW; k++) dis_row[k] = dis_q[k];
    dis_row[DIS_ROW] = dis_in;
  end

  for (genvar k = 0; k < N; k++) begin : g_row
    assign srch_h[k][0] = srch_row_in[k];
    for (genvar j = 0; j < N; j++) begin : g_col
      pe u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .ref_shift(ref_shift),
        .ref_in   (ref_chain[k*N + j]),
        .ref_out  (ref_chain[k*N + j + 1]),
        .srch_in  (srch_h[k][j]),
        .srch_out (srch_h[k][j+1]),
        .dis      (dis_row[k]),
        .psum_in  (psum_v[k+1][j]),
        .psum_out (psum_v[k][j])
      );
    end
    if (k < N - 1) begin : g_sr
      search_shift_reg #(.DEPTH(SR_DEPTH)) u_sr (
        .clk(clk), .rst_n(rst_n), .d(srch_h[k][N]), .q(srch_row_in[k+1])
      );
    end
  end

  // skip flag: row 0 gates a candidate in clock t, its column sums appear in t+3
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) skip_d[i] <= 1'b0;
    end else begin
      skip_d[0] <= dis_row[0];
      skip_d[1] <= skip_d[0];
      skip_d[2] <= skip_d[1];
    end
  end

  assign skip_out = skip_d[2];
  assign tap_sum  = psum_v[DAU_TAP_ROW];
  assign col_sum  = psum_v[0];
endmodule
