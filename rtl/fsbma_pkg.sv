// fsbma_pkg: sizes and constants shared by the conservative-approximation
// full-search block matcher (QCIF, 8x8 blocks, +/-8 pixel search).
//
// Frame, block, displacement and register widths are the design's nominal
// figures; the derived numbers below follow from them:
//   search window   SA_W   = BLK + 2*DISP           = 24 pixels square
//   candidates      NCAND  = (2*DISP+1)^2           = 289 per block
//   block period    PERIOD = SA_W*SA_W + 2          = 578 clocks
//   reference load  LOAD   = BLK*BLK                = 64 clocks
//   row line delay  SR_LEN = SA_W - 1 - BLK         = 15 stages
package fsbma_pkg;

  localparam int unsigned FRAME_W = 176;   // QCIF luma width
  localparam int unsigned FRAME_H = 144;   // QCIF luma height
  localparam int unsigned BLK     = 8;     // block is BLK x BLK pixels
  localparam int unsigned DISP    = 8;     // search displacement +/- DISP
  localparam int unsigned SA_W    = BLK + 2 * DISP;          // 24
  localparam int unsigned NCAND_1D = 2 * DISP + 1;           // 17
  localparam int unsigned PERIOD  = 578;   // clocks per block (MOD-578)
  localparam int unsigned LOAD    = BLK * BLK;               // 64
  localparam int unsigned SR_LEN  = SA_W - 1 - BLK;          // 15

  localparam int unsigned PIX_W   = 8;     // pixel width
  localparam int unsigned ADDR_W  = 15;    // frame address width
  localparam int unsigned PSUM_W  = 15;    // column partial-sum width (L1)
  localparam int unsigned MAD_W   = 18;    // block distortion width (PA out)
  localparam int unsigned CNT_W   = 10;    // MOD-578 counter width

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [PSUM_W-1:0] psum_t;
  typedef logic [MAD_W-1:0]  mad_t;
  typedef logic [CNT_W-1:0]  cnt_t;

endpackage
