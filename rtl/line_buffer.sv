// line_buffer: one image row of storage for the vertical forward difference.
//
// A single-port RAM of DEPTH words, addressed by the column. On a cycle with
// we = 1 it reads the word at addr (the pixel of the row above, stored one
// line earlier) and overwrites it with wdata (the current pixel), so the
// buffer always holds the most recent value of each column. The read is
// registered: rdata shows the old word one clock after the access (read
// before write). With we = 0 rdata holds. The default of 1280 words of 24 bits
// (30,720 bits) holds one row of a 1280-pixel-wide image of scaled grey
// values. Storing one row and overwriting in place follows the design
// description; the registered read-before-write port is this design's choice,
// the form FPGA block RAM takes. The array is not reset.
module line_buffer #(
  parameter int unsigned DEPTH = 1280,
  parameter int unsigned WIDTH = 24,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      rdata     <= mem[addr];
      mem[addr] <= wdata;
    end
  end

endmodule
