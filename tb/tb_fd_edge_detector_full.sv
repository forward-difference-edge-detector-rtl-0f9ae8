// tb_fd_edge_detector_full: the edge detector at its default size, 1280 x 720
// pixels, with the common 720p frame timing (1650 x 750 clocks per frame).
//
// Three complete frames are processed against a threshold of 20 grey
// levels, one in each mode: MODE_XY, then MODE_X, then MODE_Y, the mode
// changing in vertical blanking. The image is generated: soft diagonal shading, a grid of sharp
// rectangles and pseudo-random texture in one band. Every visible output
// pixel is compared with a reference computed from the image (grey value
// 19595 R + 38470 G + 7471 B, forward differences with zero padding, strict
// threshold) and must appear 4 clocks after its input pixel.
module tb_fd_edge_detector_full;
  import fd_pkg::*;

  localparam int COLS = 1280;
  localparam int ROWS = 720;
  localparam int LAT  = 4;

  logic clk = 1'b0, rst = 1'b1;
  mode_t mode;
  logic [THR_W-1:0] threshold;
  video_t vid_in, vid_out;
  logic de, hs, vs, fs;
  int x, y;
  longint cycle = 0;
  int checks = 0, failures = 0, shown = 0;
  int n_edge = 0, n_flat = 0, n_out = 0;

  int gry [ROWS][COLS];

  video_source src (
    .clk(clk), .rst(rst), .de(de), .hs(hs), .vs(vs), .x(x), .y(y), .frame_start(fs));

  fd_edge_detector dut (
    .clk(clk), .rst(rst), .mode(mode), .threshold(threshold),
    .vid_in(vid_in), .vid_out(vid_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (4 * 1650 * 750) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rgb_t pixel_at(int r, int c, int frame);
    rgb_t p;
    int shade;
    shade = (r + c + 7 * frame) / 8;
    p = '{r: 8'(shade), g: 8'(shade + 16), b: 8'(2 * shade)};
    if (((r / 48) + (c / 64) + frame) % 3 == 0) p = '{r: 8'd230, g: 8'(200 - r / 8), b: 8'd40};
    if (r >= 300 && r < 340) p.g = 8'((r * 37 + c * 91 + frame * 13) % 251);
    return p;
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  int frame_no = 0;

  always_comb begin
    vid_in.de  = de;
    vid_in.hs  = hs;
    vid_in.vs  = vs;
    vid_in.pix = de ? pixel_at(y, x, frame_no) : rgb_t'(24'h0);
  end

  typedef struct { rgb_t pix; longint t_in; } exp_t;
  exp_t q [$];

  always @(negedge clk) begin
    if (!rst && de) begin
      int cur, left, up, g;
      exp_t ex;
      rgb_t p;
      p = pixel_at(y, x, frame_no);
      cur = 19595 * int'(p.r) + 38470 * int'(p.g) + 7471 * int'(p.b);
      gry[y][x] = cur;
      left = (x == 0) ? 0 : gry[y][x-1];
      up   = (y == 0) ? 0 : gry[y-1][x];
      case (mode)
        MODE_X:  g = iabs(cur - left);
        MODE_Y:  g = iabs(cur - up);
        default: g = iabs(cur - left) + iabs(cur - up);
      endcase
      ex.pix  = (g > int'(threshold) * 65536) ? BLACK : WHITE;
      ex.t_in = cycle;
      if (ex.pix == BLACK) n_edge++; else n_flat++;
      q.push_back(ex);
    end
    if (!rst && vid_out.de) begin
      exp_t ex;
      n_out++;
      checks++;
      if (q.size() == 0) begin
        failures++;
      end else begin
        ex = q.pop_front();
        if (vid_out.pix !== ex.pix || cycle - ex.t_in != longint'(LAT)) begin
          failures++;
          if (shown++ < 10)
            $display("FAIL pix=%h expected=%h latency=%0d", vid_out.pix, ex.pix, cycle - ex.t_in);
        end
      end
    end
  end

  initial begin
    mode = MODE_XY; threshold = 9'd20;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(negedge clk iff fs);
    @(negedge clk iff vs);
    frame_no = 1;
    mode = MODE_X;
    @(negedge clk iff fs);
    @(negedge clk iff vs);
    frame_no = 2;
    mode = MODE_Y;
    @(negedge clk iff fs);
    @(negedge clk iff vs);
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (n_out != 3 * ROWS * COLS || q.size() != 0) begin
      failures++;
      $display("FAIL %0d output pixels, %0d left", n_out, q.size());
    end
    checks++;
    if (n_edge == 0 || n_flat == 0) failures++;
    $display("pixels=%0d edges=%0d non-edges=%0d", n_out, n_edge, n_flat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
