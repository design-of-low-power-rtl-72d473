// vz_pkg: types and constants shared by the video-in path and the zoom-in core.
//
// The video-in path carries 10-bit CCIR 601/656 samples and produces 8-bit
// RGB; the zoom-in core works on 24-bit RGB pixels read back from frame
// memory. The colour-conversion coefficients of Eqs. R/G/B below are held
// here as fixed-point integers, COEF = round(c * 2**COEF_FRAC).
//
//   R = 1.164(Y-16) + 1.596(Cr-128)
//   G = 1.164(Y-16) - 0.813(Cr-128) - 0.391(Cb-128)
//   B = 1.164(Y-16) + 2.018(Cb-128)
//
// The offsets 16 and 128 are for 8-bit samples; for 10-bit samples they are
// scaled by 4 (64 and 512), as in the 10-bit form of ITU-R BT.601.
// A lint run of a single block reports the constants that block does not
// use; the package is shared, so they stay.
package vz_pkg;

  localparam int SAMPLE_W  = 10;   // video decoder sample width
  localparam int COLOR_W   = 8;    // width of one R, G or B component
  localparam int PIX_W     = 3 * COLOR_W;

  // PAL / ITU-R BT.601 geometry (625-line system)
  localparam int PAL_ACTIVE_PIX   = 720;   // active pixels per line
  localparam int PAL_FIELD_LINES  = 288;   // active lines per field
  localparam int PAL_FRAME_LINES  = 576;   // active lines per frame

  // Fixed-point colour conversion coefficients (COEF_FRAC fraction bits)
  localparam int COEF_FRAC = 10;
  localparam int C_Y   = 1192;  // 1.164 * 1024
  localparam int C_RV  = 1634;  // 1.596 * 1024
  localparam int C_GV  = 833;   // 0.813 * 1024
  localparam int C_GU  = 400;   // 0.391 * 1024
  localparam int C_BU  = 2066;  // 2.018 * 1024

  // One 4:4:4 YCrCb pixel at the decoder's sample width
  typedef struct packed {
    logic [SAMPLE_W-1:0] y;
    logic [SAMPLE_W-1:0] cr;
    logic [SAMPLE_W-1:0] cb;
  } ycc_t;

  // One RGB pixel
  typedef struct packed {
    logic [COLOR_W-1:0] r;
    logic [COLOR_W-1:0] g;
    logic [COLOR_W-1:0] b;
  } rgb_t;

  // Position of a sample in the 4:2:2 multiplex Cb Y Cr Y
  typedef enum logic [1:0] {
    PH_CB = 2'd0,
    PH_Y0 = 2'd1,
    PH_CR = 2'd2,
    PH_Y1 = 2'd3
  } phase422_t;

endpackage
