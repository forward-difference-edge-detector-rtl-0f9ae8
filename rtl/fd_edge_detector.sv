// fd_edge_detector: streaming forward-difference edge detector.
//
// Takes one RGB pixel per clock, together with the video control signals
// (de = visible pixel, hs, vs), and returns the same stream with each visible
// pixel replaced by black where an edge is found and white elsewhere. The
// control signals are delayed by LATENCY clocks to stay aligned with the
// pixels. No frame is stored; only one row of grey values is.
//
// Pipeline (clock stage after the input in brackets):
//   [1] rgb2gray      grey = 0.299 R + 0.587 G + 0.114 B, scaled integer
//       scan_counter  column/row of that pixel, first column / first row
//       line_buffer   reads the grey of the pixel above (stored one row
//                     earlier) and overwrites it with the current grey
//   [2..3] fwd_gradient  |gx| = |cur - left|, |gy| = |cur - above|, zero
//                     padding outside the image
//   [4] edge_decision g = |gx|, |gy| or |gx|+|gy| (mode); black if
//                     g > threshold, white otherwise
//
// mode and threshold are static settings; change them between frames. The
// algorithm, the single-row buffer, the previous-pixel register, the counters
// and the zero padding follow the design description. The register stages,
// the run-time mode input (the three detectors were separate builds), the
// 2^16 scale of the grey value, vs active high, and the synchronous
// active-high reset are this design's choices.
module fd_edge_detector
  import fd_pkg::*;
#(
  parameter int unsigned COLS = 1280,
  parameter int unsigned ROWS = 720,
  localparam int unsigned LATENCY = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  mode_t            mode,
  input  logic [THR_W-1:0] threshold,
  input  video_t           vid_in,
  output video_t           vid_out
);

  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;

  // Control signals {vs, hs, de}, delayed stage by stage.
  typedef struct packed {
    logic vs;
    logic hs;
    logic de;
  } ctrl_t;

  ctrl_t ctrl_d [1:LATENCY];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i <= LATENCY; i++) ctrl_d[i] <= '0;
    end else begin
      ctrl_d[1] <= '{vs: vid_in.vs, hs: vid_in.hs, de: vid_in.de};
      for (int i = 2; i <= LATENCY; i++) ctrl_d[i] <= ctrl_d[i-1];
    end
  end

  // Stage 1: grey value, position, line buffer access.
  logic [GRAY_W-1:0] gray;
  logic [CW-1:0]     col;
  logic [RW-1:0]     row;
  logic              first_col, first_row;
  logic [GRAY_W-1:0] above;

  rgb2gray u_gray (
    .clk  (clk),
    .rst  (rst),
    .rgb  (vid_in.pix),
    .gray (gray)
  );

  scan_counter #(.COLS(COLS), .ROWS(ROWS)) u_cnt (
    .clk       (clk),
    .rst       (rst),
    .de        (ctrl_d[1].de),
    .vs        (ctrl_d[1].vs),
    .col       (col),
    .row       (row),
    .first_col (first_col),
    .first_row (first_row)
  );

  line_buffer #(.DEPTH(COLS), .WIDTH(GRAY_W)) u_line (
    .clk   (clk),
    .we    (ctrl_d[1].de),
    .addr  (col),
    .wdata (gray),
    .rdata (above)
  );

  // Stages 2-3: forward differences.
  logic [GRAY_W-1:0] abs_gx, abs_gy;

  fwd_gradient #(.W(GRAY_W)) u_grad (
    .clk       (clk),
    .rst       (rst),
    .de        (ctrl_d[1].de),
    .cur       (gray),
    .first_col (first_col),
    .first_row (first_row),
    .above     (above),
    .abs_gx    (abs_gx),
    .abs_gy    (abs_gy)
  );

  // Stage 4: threshold.
  rgb_t pix;
  logic is_edge;

  edge_decision u_dec (
    .clk       (clk),
    .rst       (rst),
    .mode      (mode),
    .threshold (threshold),
    .de        (ctrl_d[3].de),
    .abs_gx    (abs_gx),
    .abs_gy    (abs_gy),
    .pix       (pix),
    .is_edge   (is_edge)
  );

  assign vid_out.vs  = ctrl_d[LATENCY].vs;
  assign vid_out.hs  = ctrl_d[LATENCY].hs;
  assign vid_out.de  = ctrl_d[LATENCY].de;
  assign vid_out.pix = pix;

  // The row counter only feeds first_row; is_edge duplicates the pixel colour.
  logic unused;
  assign unused = ^{row, is_edge};

endmodule
