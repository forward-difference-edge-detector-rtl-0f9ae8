// tb_rgb2gray: checks the scaled luminosity conversion against the integer
// formula 19595 R + 38470 G + 7471 B, on corner values and random pixels,
// and checks the one-clock latency by comparing each output with the input
// of the previous clock.
module tb_rgb2gray;
  import fd_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  rgb_t rgb;
  logic [23:0] gray;
  int checks = 0, failures = 0;

  rgb2gray dut (.clk(clk), .rst(rst), .rgb(rgb), .gray(gray));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ref_gray(rgb_t p);
    return 19595 * int'(p.r) + 38470 * int'(p.g) + 7471 * int'(p.b);
  endfunction

  task automatic apply(rgb_t p);
    int unsigned exp_v;
    rgb = p;
    exp_v = ref_gray(p);
    @(posedge clk); #1;
    checks++;
    if (gray !== exp_v[23:0]) begin
      failures++;
      $display("FAIL rgb=%h gray=%0d expected=%0d", p, gray, exp_v);
    end
  endtask

  initial begin
    rgb = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    apply('{r: 8'd0,   g: 8'd0,   b: 8'd0});
    apply('{r: 8'd255, g: 8'd255, b: 8'd255});   // 255 * 65536
    apply('{r: 8'd255, g: 8'd0,   b: 8'd0});
    apply('{r: 8'd0,   g: 8'd255, b: 8'd0});
    apply('{r: 8'd0,   g: 8'd0,   b: 8'd255});
    checks++;
    if (ref_gray('{r: 8'd255, g: 8'd255, b: 8'd255}) != 255 * 65536) failures++;
    for (int i = 0; i < 5000; i++) apply(rgb_t'($urandom));
    // Latency: a value applied now must not be visible before the clock edge.
    rgb = '{r: 8'd10, g: 8'd20, b: 8'd30};
    #1;
    checks++;
    if (32'(gray) == ref_gray(rgb)) begin
      failures++;
      $display("FAIL output changed before the clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
