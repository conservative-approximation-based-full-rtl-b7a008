// fsbma_ca_top: conservative-approximation full-search block matcher for QCIF
// (176 x 144) video, 8 x 8 blocks, displacements -8..+8 in both directions.
//
// Input/control unit: the ESG and the two address generators share one block
// period of 578 clocks (each keeps its own MOD-578 counter; all restart
// together at reset). In clocks 0..63 of a period the current block is read at
// rbd_addr and shifted into the PE reference registers; in clocks 0..575 the
// 24 x 24 search window is read at sad_addr, one pixel per clock. The frame
// memory is outside: it must return rbd_pix/sad_pix for the address in the
// same clock (asynchronous read).
// Systolic array unit: 8 x 8 PEs with 7 fifteen-stage row shift registers
// compute one candidate distortion per clock. Block matching unit: the
// parallel adder (PA) sums the 8 column sums; the candidate region monitor
// (CRM) marks the 289 valid candidates; the best-match selection unit (BMSU)
// keeps the smallest distortion and the address of its candidate.
// Distortion approximation unit (DAU): compares a partial distortion tapped
// half-way up the array (PE row DAU_TAP_ROW) with the BMSU's minimum and stops the upper rows of
// the array from computing candidates that can no longer win.
// Output: once per block, mv_valid pulses with mv_addr = frame address of the
// top-left pixel of the best candidate and mv_mad = its sum of absolute
// differences (the mean times 64). The first vector appears 580 clocks after
// reset, then one every 578 clocks. cand_valid / cand_skip mark, per clock,
// a valid candidate leaving the array and whether the DAU skipped it;
// best_upd marks a clock in which the BMSU took a new best candidate.
module fsbma_ca_top
  import fsbma_pkg::*;
#(
  parameter int unsigned DAU_TAP_ROW = 4   // PE row whose partial sums the DAU checks (3..7)
) (
  input  logic  clk,
  input  logic  rst_n,
  output addr_t rbd_addr,
  input  pix_t  rbd_pix,
  output addr_t sad_addr,
  input  pix_t  sad_pix,
  output logic  mv_valid,
  output addr_t mv_addr,
  output mad_t  mv_mad,
  output logic  cand_valid,
  output logic  cand_skip,
  output logic  best_upd
);
  logic  esg_en, blk_last_r, blk_last_s;
  cnt_t  esg_cnt, cnt_r, cnt_s;
  psum_t tap_sum [BLK];
  psum_t col_sum [BLK];
  logic  sau_skip, pa_skip, dis;
  mad_t  pa_mad, min_mad;
  logic  min_valid, crm_valid, crm_first, crm_last, upd;

  // ---- input/control unit ----
  esg u_esg (.clk(clk), .rst_n(rst_n), .en(esg_en), .cnt(esg_cnt));

  rbd_addr_gen u_rbd_ag (
    .clk(clk), .rst_n(rst_n), .addr(rbd_addr), .cnt(cnt_r), .blk_last(blk_last_r)
  );

  sad_addr_gen u_sad_ag (
    .clk(clk), .rst_n(rst_n), .addr(sad_addr), .cnt(cnt_s), .blk_last(blk_last_s)
  );

  // ---- systolic array unit ----
  sau #(.DAU_TAP_ROW(DAU_TAP_ROW)) u_sau (
    .clk(clk), .rst_n(rst_n),
    .ref_shift(esg_en), .ref_in(rbd_pix),
    .srch_in(sad_pix), .dis_in(dis),
    .tap_sum(tap_sum), .col_sum(col_sum), .skip_out(sau_skip)
  );

  // ---- distortion approximation unit ----
  dau u_dau (.part_sum(tap_sum), .min_mad(min_mad), .min_valid(min_valid), .dis(dis));

  // ---- block matching unit ----
  pa u_pa (
    .clk(clk), .rst_n(rst_n), .col_sum(col_sum), .skip_in(sau_skip),
    .mad(pa_mad), .skip_out(pa_skip)
  );

  crm u_crm (.clk(clk), .rst_n(rst_n), .valid(crm_valid), .first(crm_first), .last(crm_last));

  bmsu u_bmsu (
    .clk(clk), .rst_n(rst_n),
    .mad(pa_mad), .skip(pa_skip),
    .valid(crm_valid), .first(crm_first), .last(crm_last),
    .sa_addr(sad_addr),
    .min_mad(min_mad), .min_valid(min_valid), .upd(upd),
    .mv_valid(mv_valid), .mv_addr(mv_addr), .mv_mad(mv_mad)
  );

  assign cand_valid = crm_valid;
  assign cand_skip  = crm_valid && pa_skip;
  assign best_upd   = upd;

  // the separately counted block periods must stay in step
  assert property (@(posedge clk) disable iff (!rst_n)
    (esg_cnt == cnt_r) && (cnt_r == cnt_s) && (blk_last_r == blk_last_s));
endmodule
