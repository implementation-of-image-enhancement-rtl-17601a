// img_pkg: types and constants shared by the retinal image enhancement IP and the
// Sobel edge detection IP.
//
// Pixels are 8-bit unsigned intensities (0..255). The enhancement IP works on RGB
// pixels and moves two horizontally adjacent pixels per clock; the edge detector
// works on 8-bit grayscale pixels and hands 3x3 windows of nine pixels from the
// line buffers to the convolution stage. The operation codes select one of the
// three enhancement operations; code 3 is not one of them and passes pixels
// through unchanged (a choice of this design).
package img_pkg;

  localparam int unsigned PIX_W   = 8;
  localparam int unsigned PIX_MAX = (1 << PIX_W) - 1;   // L - 1 = 255

  typedef logic [PIX_W-1:0] pixel_t;

  // One RGB pixel as stored in the image memory.
  typedef struct packed {
    pixel_t r;
    pixel_t g;
    pixel_t b;
  } rgb_t;

  // Two horizontally adjacent pixels: p0 is the even (left) column, p1 the odd one.
  typedef struct packed {
    rgb_t p1;
    rgb_t p0;
  } rgb_pair_t;

  typedef enum logic [1:0] {
    OP_BRIGHTNESS = 2'd0,   // add or subtract a constant, clamped to 0..255
    OP_NEGATIVE   = 2'd1,   // S = 255 - r on every colour channel
    OP_THRESHOLD  = 2'd2,   // 255 if intensity > threshold, else 0
    OP_BYPASS     = 2'd3    // pixel unchanged
  } enh_op_e;

  // Run-time settings of the enhancement IP.
  typedef struct packed {
    enh_op_e op;
    logic    sign;          // 1: brighten (add value), 0: darken (subtract value)
    pixel_t  value;         // brightness constant g
    pixel_t  threshold;     // threshold level
  } enh_cfg_t;

  // 3x3 window P0..P8 in raster order, P0 in bits [7:0], P8 in bits [71:64].
  // P0..P2 come from the oldest of the three lines, P6..P8 from the newest.
  typedef logic [9*PIX_W-1:0] window_t;

endpackage
