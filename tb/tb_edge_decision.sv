// tb_edge_decision: applies gradient magnitudes in all three modes with
// random thresholds, plus values exactly at, just above and just below the
// scaled threshold, and checks the registered output: black when the
// selected gradient exceeds threshold * 2^16, white otherwise, 0 when de = 0.
module tb_edge_decision;
  import fd_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  mode_t mode;
  logic [THR_W-1:0] threshold;
  logic de;
  logic [23:0] abs_gx, abs_gy;
  rgb_t pix;
  logic is_edge;
  int checks = 0, failures = 0;

  edge_decision dut (.clk(clk), .rst(rst), .mode(mode), .threshold(threshold),
    .de(de), .abs_gx(abs_gx), .abs_gy(abs_gy), .pix(pix), .is_edge(is_edge));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(mode_t m, int thr, int gx, int gy, bit d);
    longint g;
    bit e;
    rgb_t exp_p;
    mode = m; threshold = THR_W'(thr); abs_gx = 24'(gx); abs_gy = 24'(gy); de = d;
    case (m)
      MODE_X:  g = longint'(gx);
      MODE_Y:  g = longint'(gy);
      default: g = longint'(gx) + longint'(gy);
    endcase
    e = d && (g > longint'(thr) * 65536);
    exp_p = !d ? rgb_t'(24'h0) : (e ? rgb_t'(24'h000000) : rgb_t'(24'hFFFFFF));
    @(posedge clk); #1;
    checks++;
    if (pix !== exp_p || is_edge !== e) begin
      failures++;
      $display("FAIL mode=%s thr=%0d gx=%0d gy=%0d de=%0b pix=%h edge=%0b", m.name(), thr, gx, gy, d, pix, is_edge);
    end
  endtask

  initial begin
    mode = MODE_XY; threshold = '0; de = 0; abs_gx = '0; abs_gy = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 3; t++) begin
      mode_t m;
      m = mode_t'(t);
      // Boundary cases around threshold 40 (scaled 40 * 65536 = 2621440).
      apply(m, 40, 2621440, 2621440, 1);            // X, Y: equal -> white
      apply(m, 40, 2621441, 0, 1);
      apply(m, 40, 0, 2621441, 1);
      apply(m, 40, 2621439, 1, 1);                  // XY: sum = thr -> white
      apply(m, 40, 2621439, 2, 1);                  // XY: sum > thr -> black
      apply(m, 40, 16711680, 16711680, 1);          // maximum magnitudes
      apply(m, 510, 16711680, 16711680, 1);         // 510: XY sum equal -> white
      apply(m, 0, 1, 0, 1);
      apply(m, 0, 0, 0, 1);
      apply(m, 0, 16711680, 16711680, 0);           // blanking -> 0
      for (int i = 0; i < 3000; i++)
        apply(m, $urandom % 120, $urandom % (64 * 65536), $urandom % (64 * 65536), ($urandom % 8) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
