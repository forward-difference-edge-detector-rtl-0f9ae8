// rgb2gray: luminosity greyscale conversion of one RGB pixel per clock.
//
// gray = KR*R + KG*G + KB*B, the weights 0.299 / 0.587 / 0.114 scaled by
// 2^FRAC (default 2^16: 19595, 38470, 7471, summing to 65536). The result is
// an unsigned integer in units of 2^-FRAC grey levels, 0 .. 255*2^FRAC, and
// is registered: latency one clock, one pixel per clock. The weights follow
// the luminosity formula; their scaling and the output register are this
// design's choices. rst clears the output register (synchronous, active high).
module rgb2gray
  import fd_pkg::*;
#(
  parameter int unsigned FRAC = GRAY_FRAC,
  parameter int unsigned KR_S = KR,
  parameter int unsigned KG_S = KG,
  parameter int unsigned KB_S = KB,
  localparam int unsigned OW  = 8 + FRAC
) (
  input  logic          clk,
  input  logic          rst,
  input  rgb_t          rgb,
  output logic [OW-1:0] gray
);

  logic [OW-1:0] sum;

  always_comb begin
    sum = OW'(KR_S) * OW'(rgb.r) + OW'(KG_S) * OW'(rgb.g) + OW'(KB_S) * OW'(rgb.b);
  end

  always_ff @(posedge clk) begin
    if (rst) gray <= '0;
    else     gray <= sum;
  end

endmodule
