// vision_pkg: types and constants shared by the colour-histogram pipeline.
//
// The pipeline takes a raw Bayer stream (8 bits per pixel, one pixel at a
// time, line after line) from a CMOS camera and builds colour histograms of
// every frame. The frame size (640 x 480), the pixel width (8 bits), the
// 512-byte line Block RAMs and the 19-bit bin counters are the numbers the
// design is specified with; the enum and struct layouts are this design's own.
package vision_pkg;

  localparam int unsigned PIX_W          = 8;    // bits per raw pixel
  localparam int unsigned IMG_W          = 640;  // pixels per line
  localparam int unsigned IMG_H          = 480;  // lines per frame
  localparam int unsigned LINE_RAM_DEPTH = 512;  // bytes per line Block RAM
  localparam int unsigned COUNT_W        = 19;   // bits per histogram bin
  localparam int unsigned BIN_BITS       = 4;    // n: 2^n bins per colour

  // Histogram type: three separate N-bin histograms, or one N^3-bin 3-D one.
  typedef enum logic {
    HIST_RGB = 1'b0,
    HIST_3D  = 1'b1
  } hist_mode_e;

  // One interpolated pixel.
  typedef struct packed {
    logic [PIX_W-1:0] r;
    logic [PIX_W-1:0] g;
    logic [PIX_W-1:0] b;
  } rgb_t;

  // One 2x2 Bayer window, named after its position:
  //   G11 R12
  //   B21 G22
  typedef struct packed {
    logic [PIX_W-1:0] g11;
    logic [PIX_W-1:0] r12;
    logic [PIX_W-1:0] b21;
    logic [PIX_W-1:0] g22;
  } bayer_win_t;

endpackage
