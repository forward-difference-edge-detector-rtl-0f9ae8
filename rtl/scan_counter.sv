// scan_counter: column and row position of each pixel in a video stream.
//
// The column counter counts visible pixels (de = 1) along a line and clears
// while de = 0. The row counter advances when de falls (the end of a visible
// line), clears while vs = 1 (vertical sync, in the vertical blanking after
// the last visible line) and holds at ROWS-1. The outputs describe the pixel
// presented on the input in the same cycle: they come straight from the
// counter registers, with no latency. first_col and first_row mark the
// image border where the edge detector pads with zeros.
// That the detector keeps a column and a row counter follows the design
// description; how they count (de edge, vs clear, saturation) is this
// design's choice. rst clears both counters (synchronous, active high).
module scan_counter #(
  parameter int unsigned COLS = 1280,
  parameter int unsigned ROWS = 720,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          de,
  input  logic          vs,
  output logic [CW-1:0] col,
  output logic [RW-1:0] row,
  output logic          first_col,
  output logic          first_row
);

  logic [CW-1:0] col_q;
  logic [RW-1:0] row_q;
  logic          de_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      col_q <= '0;
      row_q <= '0;
      de_q  <= 1'b0;
    end else begin
      de_q <= de;
      if (de && col_q != CW'(COLS - 1)) col_q <= col_q + 1'b1;
      else if (!de)                     col_q <= '0;
      if (vs)                                      row_q <= '0;
      else if (de_q && !de && row_q != RW'(ROWS - 1)) row_q <= row_q + 1'b1;
    end
  end

  assign col       = col_q;
  assign row       = row_q;
  assign first_col = (col_q == '0);
  assign first_row = (row_q == '0);

endmodule
