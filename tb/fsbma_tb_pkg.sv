// fsbma_tb_pkg: test-sequence generator and reference search shared by the
// sequence-level testbenches.
//
// frames[0..NF-1] hold a synthetic QCIF sequence: a smooth texture (random
// values on an 8-pixel grid, bilinearly interpolated, plus +/-1 noise) that
// pans by (+2, +1) pixels per frame, with a 48 x 40 object carrying its own
// texture that moves by (-3, +2) per frame. Pixels outside the 176 x 144 frame
// (addresses 25344..32767) read as 0. exhaustive() is the software full
// search: the same candidate addresses, order and tie rule as the hardware.
package fsbma_tb_pkg;
  import fsbma_pkg::*;

  localparam int MEMSZ = 1 << ADDR_W;
  localparam int NF    = 7;
  localparam int NBX   = FRAME_W / BLK;
  localparam int NBY   = FRAME_H / BLK;
  localparam int NBLK_FRAME = NBX * NBY;

  logic [7:0] frames [NF][MEMSZ];

  function automatic int hash8(int unsigned a, int unsigned salt);
    int unsigned h;
    h = (a ^ salt) * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    return int'(h[23:16]);
  endfunction

  // smooth texture, defined for any (x, y) >= -4096
  function automatic int tex(int x, int y, int unsigned salt);
    int gx, gy, fx, fy, v00, v01, v10, v11;
    x += 4096;
    y += 4096;
    gx = x / 8; gy = y / 8; fx = x % 8; fy = y % 8;
    v00 = hash8(gy * 4099 + gx, salt);
    v01 = hash8(gy * 4099 + gx + 1, salt);
    v10 = hash8((gy + 1) * 4099 + gx, salt);
    v11 = hash8((gy + 1) * 4099 + gx + 1, salt);
    return (v00 * (8 - fx) * (8 - fy) + v01 * fx * (8 - fy) +
            v10 * (8 - fx) * fy + v11 * fx * fy) / 64;
  endfunction

  task automatic make_sequence();
    for (int f = 0; f < NF; f++) begin
      int ox, oy;
      ox = 60 - 3 * f;
      oy = 40 + 2 * f;
      for (int a = 0; a < MEMSZ; a++) frames[f][a] = 8'h00;
      for (int y = 0; y < FRAME_H; y++)
        for (int x = 0; x < FRAME_W; x++) begin
          int v;
          if (x >= ox && x < ox + 48 && y >= oy && y < oy + 40)
            v = tex(x - ox, y - oy, 32'h51ED);
          else
            v = tex(x + 2 * f, y + f, 32'hB0B);
          v += hash8(f * MEMSZ + y * FRAME_W + x, 32'h77) % 3 - 1;
          if (v < 0) v = 0;
          if (v > 255) v = 255;
          frames[f][y * FRAME_W + x] = 8'(v);
        end
    end
  endtask

  // full search of block blk (0..395) of frame fc in frame fr
  task automatic exhaustive(int fc, int fr, int blk, output int best_addr, output int best_sad);
    int bx, by, rb, sa, cand, s;
    bx = blk % NBX;
    by = blk / NBX;
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
            p = int'(frames[fc][(rb + i * FRAME_W + j) % MEMSZ]);
            q = int'(frames[fr][(cand + i * FRAME_W + j) % MEMSZ]);
            s += (p > q) ? p - q : q - p;
          end
        if (best_sad < 0 || s < best_sad) begin
          best_sad = s;
          best_addr = cand;
        end
      end
  endtask
endpackage
