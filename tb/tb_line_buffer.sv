// tb_line_buffer: checks the read-before-write row buffer against an array
// model. Every access with we = 1 must return, one clock later, the value
// last written to that address; with we = 0 the read data must hold. Runs
// whole "rows" in address order (as the detector uses it) and then random
// addresses.
module tb_line_buffer;
  localparam int DEPTH = 40;
  localparam int WIDTH = 24;

  logic clk = 1'b0;
  logic we;
  logic [$clog2(DEPTH)-1:0] addr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  line_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(bit w, int a, logic [WIDTH-1:0] d, bit check);
    logic [WIDTH-1:0] exp_v, held;
    held = rdata;
    we = w; addr = a[$clog2(DEPTH)-1:0]; wdata = d;
    exp_v = w ? model[a] : held;
    @(posedge clk); #1;
    if (w) model[a] = d;
    if (check) begin
      checks++;
      if (rdata !== exp_v) begin
        failures++;
        $display("FAIL we=%0b addr=%0d rdata=%h expected=%h", w, a, rdata, exp_v);
      end
    end
  endtask

  initial begin
    we = 0; addr = '0; wdata = '0;
    @(posedge clk); #1;
    // First row: fill, reads are of unwritten words and not checked.
    for (int a = 0; a < DEPTH; a++) access(1, a, WIDTH'($urandom), 0);
    // Following rows: each read must return the row above.
    for (int r = 0; r < 5; r++)
      for (int a = 0; a < DEPTH; a++) access(1, a, WIDTH'($urandom), 1);
    // Random mix of idle cycles and accesses.
    for (int i = 0; i < 2000; i++)
      access(($urandom % 3) != 0, $urandom % DEPTH, WIDTH'($urandom), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
