// video_source: behavioural video timing generator for the testbenches.
//
// Produces the control signals of a progressive video frame, one pixel
// position per clock, in the usual raster order: each line is H_ACT visible
// pixels (de = 1) followed by horizontal blanking (H_FP clocks, an H_SYNC
// clock hs pulse, H_BP clocks); each frame is V_ACT visible lines followed by
// vertical blanking (V_FP lines, V_SYNC lines with vs = 1, V_BP lines). Sync
// pulses are active high. x and y give the position of the visible pixel
// while de = 1; the testbench supplies the pixel value for that position.
// frame_start pulses on the first visible pixel of each frame. The default
// numbers are the common 1280x720 timing (1650 x 750 clocks per frame).
module video_source #(
  parameter int H_ACT = 1280, parameter int H_FP = 110, parameter int H_SYNC = 40,
  parameter int H_BP  = 220,
  parameter int V_ACT = 720,  parameter int V_FP = 5,   parameter int V_SYNC = 5,
  parameter int V_BP  = 20
) (
  input  logic clk,
  input  logic rst,
  output logic de,
  output logic hs,
  output logic vs,
  output int   x,
  output int   y,
  output logic frame_start
);

  localparam int H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = V_ACT + V_FP + V_SYNC + V_BP;

  int hc, vc;

  always_ff @(posedge clk) begin
    if (rst) begin
      hc <= 0;
      vc <= 0;
    end else if (hc == H_TOT - 1) begin
      hc <= 0;
      vc <= (vc == V_TOT - 1) ? 0 : vc + 1;
    end else begin
      hc <= hc + 1;
    end
  end

  always_comb begin
    de = !rst && hc < H_ACT && vc < V_ACT;
    hs = !rst && hc >= H_ACT + H_FP && hc < H_ACT + H_FP + H_SYNC;
    vs = !rst && vc >= V_ACT + V_FP && vc < V_ACT + V_FP + V_SYNC;
    x  = hc;
    y  = vc;
    frame_start = de && hc == 0 && vc == 0;
  end

endmodule
