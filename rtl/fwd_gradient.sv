// fwd_gradient: horizontal and vertical forward differences of a pixel stream.
//
// For each visible pixel f(x,y) it forms
//   gx = f(x,y) - f(x-1,y)   (the left pixel subtracted from the current one)
//   gy = f(x,y) - f(x,y-1)   (the pixel above subtracted from the current one)
// and outputs |gx| and |gy|. The left pixel comes from a register that keeps
// the previous visible pixel; the pixel above arrives from the line buffer on
// the `above` input one clock after `cur` (the buffer's read latency). Outside
// the image the neighbours count as zero: the left pixel is 0 in the first
// column and the pixel above is 0 in the first row.
//
// Timing: cur, de, first_col and first_row in cycle t, above in t+1,
// abs_gx/abs_gy valid in t+2. One pixel per clock. The differences, the
// previous-pixel register and the zero padding follow the design
// description; the two register stages are this design's choice.
// rst clears all registers (synchronous, active high).
module fwd_gradient #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         de,
  input  logic [W-1:0] cur,
  input  logic         first_col,
  input  logic         first_row,
  input  logic [W-1:0] above,
  output logic [W-1:0] abs_gx,
  output logic [W-1:0] abs_gy
);

  // Stage 1: current pixel and masked left neighbour, aligned with `above`.
  logic [W-1:0] cur_q, left_q;
  logic         first_row_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_q       <= '0;
      left_q      <= '0;
      first_row_q <= 1'b1;
    end else if (de) begin
      cur_q       <= cur;
      left_q      <= first_col ? '0 : cur_q;   // cur_q still holds the previous pixel
      first_row_q <= first_row;
    end
  end

  // Stage 2: signed differences and their magnitudes.
  logic [W-1:0] above_m;
  logic signed [W:0] gx, gy;
  logic [W-1:0] mag_x, mag_y;

  always_comb begin
    above_m = first_row_q ? '0 : above;
    gx      = $signed({1'b0, cur_q}) - $signed({1'b0, left_q});
    gy      = $signed({1'b0, cur_q}) - $signed({1'b0, above_m});
    mag_x   = gx[W] ? W'(-gx) : gx[W-1:0];
    mag_y   = gy[W] ? W'(-gy) : gy[W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      abs_gx <= '0;
      abs_gy <= '0;
    end else begin
      abs_gx <= mag_x;
      abs_gy <= mag_y;
    end
  end

endmodule
