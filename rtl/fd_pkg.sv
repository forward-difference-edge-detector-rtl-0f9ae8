// fd_pkg: types and constants shared by the forward-difference edge detector.
//
// The pixel stream is 8 bits per colour component (24 bits per pixel) with
// the usual video control signals de (data enable), hs and vs. The grey value
// is kept as a scaled integer: Grey = 0.299 R + 0.587 G + 0.114 B with the
// weights multiplied by 2^GRAY_FRAC and rounded, so no division is needed and
// the threshold is compared in the same scaled units. The weights come from
// the luminosity formula; the scale 2^16 is this design's choice (the rounded
// weights then sum to exactly 2^16 and the grey value fits 24 bits).
package fd_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // One sample of the video stream.
  typedef struct packed {
    logic vs;
    logic hs;
    logic de;
    rgb_t pix;
  } video_t;

  // Which gradient is compared with the threshold.
  typedef enum logic [1:0] {
    MODE_X  = 2'd0,   // |gx| only (horizontal forward difference)
    MODE_Y  = 2'd1,   // |gy| only (vertical forward difference)
    MODE_XY = 2'd2    // |gx| + |gy|
  } mode_t;

  localparam int unsigned GRAY_FRAC = 16;
  localparam int unsigned GRAY_W    = 8 + GRAY_FRAC;   // 24-bit scaled grey
  localparam int unsigned THR_W     = 9;               // 0..510 grey levels

  // Luminosity weights scaled by 2^16: 0.299, 0.587, 0.114.
  localparam int unsigned KR = 19595;
  localparam int unsigned KG = 38470;
  localparam int unsigned KB = 7471;

  localparam rgb_t BLACK = '{r: 8'h00, g: 8'h00, b: 8'h00};
  localparam rgb_t WHITE = '{r: 8'hFF, g: 8'hFF, b: 8'hFF};

endpackage
