// tb_fsbma_ca_top: end-to-end test of the matcher at its default (QCIF) size.
//
// A frame-memory model holds a textured reference frame and a current frame
// made of the reference moved by a different motion in each region plus small
// noise. The design runs one full frame (396 blocks) plus one more block, to
// see the block order wrap to the start of the next frame. For every block an
// exhaustive software search over the same 17 x 17 candidate addresses gives
// the expected best address and distortion (ties keep the earlier candidate);
// the design's vector must match it exactly, which also shows that the
// conservative skipping never drops the winner. Timing checks: first vector
// 580 clocks after reset, then one every 578 clocks, 289 valid candidates per
// block, in 17 runs of 17. Mechanisms counted and required: DAU skips,
// champion updates, CRM rejection of straddling positions, block-row changes
// and the frame wrap.
module tb_fsbma_ca_top;
  import fsbma_pkg::*;

  localparam int NBX = FRAME_W / BLK, NBY = FRAME_H / BLK;
  localparam int NBLK_FRAME = NBX * NBY;
  localparam int NBLK = NBLK_FRAME + 1;
  localparam int MEMSZ = 1 << ADDR_W;

  logic clk = 1'b0, rst_n = 1'b0;
  addr_t rbd_addr, sad_addr, mv_addr;
  pix_t  rbd_pix, sad_pix;
  logic  mv_valid, cand_valid, cand_skip, best_upd;
  mad_t  mv_mad;

  logic [7:0] cur [MEMSZ];
  logic [7:0] refm [MEMSZ];

  int checks = 0, failures = 0;
  int n_mv = 0, n_runs = 0, n_reject = 0, n_skip = 0, n_upd = 0, n_valid_blk = 0, n_rowchg = 0, n_wrap = 0;
  logic cv_q = 1'b0;
  longint cyc = 0, last_mv_cyc = 0;   // clock 0 = first clock after reset release

  fsbma_ca_top dut (
    .clk(clk), .rst_n(rst_n),
    .rbd_addr(rbd_addr), .rbd_pix(rbd_pix),
    .sad_addr(sad_addr), .sad_pix(sad_pix),
    .mv_valid(mv_valid), .mv_addr(mv_addr), .mv_mad(mv_mad),
    .cand_valid(cand_valid), .cand_skip(cand_skip), .best_upd(best_upd)
  );

  // frame memory, asynchronous read
  assign rbd_pix = cur[rbd_addr];
  assign sad_pix = refm[sad_addr];

  always #5 clk = ~clk;

  function automatic logic [7:0] hash8(int unsigned a, int unsigned salt);
    int unsigned h;
    h = (a ^ salt) * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    return h[23:16];
  endfunction

  task automatic make_frames();
    for (int a = 0; a < MEMSZ; a++) begin
      refm[a] = 8'h00;
      cur[a]  = 8'h00;
    end
    for (int y = 0; y < FRAME_H; y++)
      for (int x = 0; x < FRAME_W; x++)
        refm[y * FRAME_W + x] = hash8(y * FRAME_W + x, 32'h1234);
    for (int y = 0; y < FRAME_H; y++)
      for (int x = 0; x < FRAME_W; x++) begin
        int dx, dy, sx, sy, v;
        dx = ((x / 24) + (y / 40)) % 7 * 2 - 6;
        dy = ((x / 40) + 2 * (y / 24)) % 9 * 2 - 8;
        sx = x + dx;
        sy = y + dy;
        if (sx >= 0 && sx < FRAME_W && sy >= 0 && sy < FRAME_H) begin
          v = int'(refm[sy * FRAME_W + sx]) + int'(hash8(y * FRAME_W + x, 32'h77) % 5) - 2;
          if (v < 0) v = 0;
          if (v > 255) v = 255;
        end else v = int'(hash8(y * FRAME_W + x, 32'h99));
        cur[y * FRAME_W + x] = 8'(v);
      end
  endtask

  // exhaustive search, same candidate order and tie rule as the hardware
  task automatic ref_search(int blk, output int best_addr, output int best_sad);
    int b, bx, by, rb, sa, cand, s;
    b  = blk % NBLK_FRAME;
    bx = b % NBX;
    by = b / NBX;
    rb = by * BLK * FRAME_W + bx * BLK;
    sa = (rb - DISP * FRAME_W - DISP + MEMSZ) % MEMSZ;
    best_sad = -1;
    best_addr = 0;
    for (int u = 0; u <= 2 * DISP; u++)
      for (int v = 0; v <= 2 * DISP; v++) begin
        cand = (sa + u * FRAME_W + v) % MEMSZ;
        s = 0;
        for (int i = 0; i < BLK; i++)
          for (int j = 0; j < BLK; j++) begin
            int p, q;
            p = int'(cur[(rb + i * FRAME_W + j) % MEMSZ]);
            q = int'(refm[(cand + i * FRAME_W + j) % MEMSZ]);
            s += (p > q) ? p - q : q - p;
          end
        if (best_sad < 0 || s < best_sad) begin
          best_sad = s;
          best_addr = cand;
        end
      end
  endtask

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // scoreboard
  always @(posedge clk) begin
    if (rst_n) begin
      if (cand_valid) n_valid_blk++;
      // each window line gives one run of 17 valid candidates; the clocks
      // between runs are straddling positions the CRM rejects
      if (cand_valid && !cv_q) n_runs++;
      if (!cand_valid && cv_q && n_runs % NCAND_1D != 0) n_reject++;
      cv_q <= cand_valid;
      if (cand_skip)  n_skip++;
      if (best_upd)   n_upd++;
      if (mv_valid) begin
        int ea, es;
        ref_search(n_mv, ea, es);
        checks++;
        if (int'(mv_addr) != ea || int'(mv_mad) != es) begin
          failures++;
          if (failures < 10)
            $display("FAIL block %0d: mv_addr=%0d mad=%0d, expected %0d / %0d",
                     n_mv, mv_addr, mv_mad, ea, es);
        end
        // timing: 580 clocks to the first vector, 578 between vectors
        checks++;
        if (n_mv == 0 ? (cyc != 580) : (cyc - last_mv_cyc != PERIOD)) begin
          failures++;
          $display("FAIL block %0d: vector at clock %0d (previous %0d)", n_mv, cyc, last_mv_cyc);
        end
        checks++;
        if (n_valid_blk != NCAND_1D * NCAND_1D) begin
          failures++;
          $display("FAIL block %0d: %0d valid candidates", n_mv, n_valid_blk);
        end
        checks++;
        if (n_runs != NCAND_1D) begin
          failures++;
          $display("FAIL block %0d: %0d candidate runs", n_mv, n_runs);
        end
        n_runs = 0;
        n_valid_blk = 0;
        if (n_mv > 0 && n_mv % NBX == 0 && n_mv < NBLK_FRAME) n_rowchg++;
        if (n_mv == NBLK_FRAME) n_wrap++;
        last_mv_cyc = cyc;
        n_mv++;
      end
    end
  end

  initial begin
    make_frames();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_mv == NBLK);
    @(posedge clk);
    $display("blocks=%0d skipped_candidates=%0d champion_updates=%0d crm_rejected_gaps=%0d row_changes=%0d frame_wraps=%0d",
             n_mv, n_skip, n_upd, n_reject, n_rowchg, n_wrap);
    checks++; if (n_reject == 0) begin failures++; $display("FAIL: CRM never rejected"); end
    checks++; if (n_skip == 0)   begin failures++; $display("FAIL: DAU never skipped"); end
    checks++; if (n_upd <= n_mv) begin failures++; $display("FAIL: too few champion updates"); end
    checks++; if (n_rowchg != NBY - 1) begin failures++; $display("FAIL: block rows"); end
    checks++; if (n_wrap != 1)   begin failures++; $display("FAIL: no frame wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * PERIOD + 3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d vectors seen", n_mv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
