// edge_decision: gradient magnitude, threshold and black/white output pixel.
//
// The gradient g is |gx| (MODE_X), |gy| (MODE_Y) or the approximation of the
// vector magnitude |gx| + |gy| (MODE_XY). The pixel is an edge when
// g > threshold, and is then output black; otherwise (g <= threshold) it is
// white. g is in units of 2^-FRAC grey levels, so the threshold, given in
// whole grey levels, is scaled by 2^FRAC (a shift) before the comparison.
// While de = 0 the output pixel is 0. Output registered: latency one clock,
// one pixel per clock. The magnitude, the strict comparison and the
// black/white colouring follow the design description; the mode input that
// selects among the three detectors at run time, the threshold format and
// the output register are this design's choices. rst clears the outputs
// (synchronous, active high).
module edge_decision
  import fd_pkg::*;
#(
  parameter int unsigned W    = GRAY_W,
  parameter int unsigned FRAC = GRAY_FRAC
) (
  input  logic             clk,
  input  logic             rst,
  input  mode_t            mode,
  input  logic [THR_W-1:0] threshold,
  input  logic             de,
  input  logic [W-1:0]     abs_gx,
  input  logic [W-1:0]     abs_gy,
  output rgb_t             pix,
  output logic             is_edge
);

  localparam int unsigned GW = ((THR_W + FRAC) > (W + 1)) ? (THR_W + FRAC) : (W + 1);

  logic [GW-1:0] g, thr_s;
  logic          edge_c;

  always_comb begin
    unique case (mode)
      MODE_X:  g = GW'(abs_gx);
      MODE_Y:  g = GW'(abs_gy);
      default: g = GW'(abs_gx) + GW'(abs_gy);
    endcase
    thr_s  = GW'(threshold) << FRAC;
    edge_c = g > thr_s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pix     <= '0;
      is_edge <= 1'b0;
    end else begin
      is_edge <= de && edge_c;
      pix     <= !de ? rgb_t'('0) : (edge_c ? BLACK : WHITE);
    end
  end

endmodule
