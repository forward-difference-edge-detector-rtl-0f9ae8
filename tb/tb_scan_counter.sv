// tb_scan_counter: drives small video frames (video_source model) into the
// column/row counters and checks, on every visible pixel, that col/row equal
// the pixel's true position and that first_col/first_row mark column 0 and
// row 0. Three frames, so the row clear by vs is exercised.
module tb_scan_counter;
  localparam int COLS = 12;
  localparam int ROWS = 5;

  logic clk = 1'b0, rst = 1'b1;
  logic de, hs, vs, fs;
  int   x, y;
  logic [$clog2(COLS)-1:0] col;
  logic [$clog2(ROWS)-1:0] row;
  logic first_col, first_row;
  int checks = 0, failures = 0, frames = 0;

  video_source #(.H_ACT(COLS), .H_FP(2), .H_SYNC(2), .H_BP(3),
                 .V_ACT(ROWS), .V_FP(1), .V_SYNC(1), .V_BP(1)) src (
    .clk(clk), .rst(rst), .de(de), .hs(hs), .vs(vs), .x(x), .y(y), .frame_start(fs));

  scan_counter #(.COLS(COLS), .ROWS(ROWS)) dut (
    .clk(clk), .rst(rst), .de(de), .vs(vs), .col(col), .row(row),
    .first_col(first_col), .first_row(first_row));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && de) begin
      checks++;
      if (int'(col) != x || int'(row) != y || first_col != (x == 0) || first_row != (y == 0)) begin
        failures++;
        $display("FAIL at (%0d,%0d): col=%0d row=%0d fc=%0b fr=%0b", x, y, col, row, first_col, first_row);
      end
    end
    if (!rst && fs) frames++;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (frames == 4);
    checks++;
    if (checks < 3 * COLS * ROWS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
