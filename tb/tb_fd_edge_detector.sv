// tb_fd_edge_detector: end-to-end test of the edge detector on small frames.
//
// A video_source model produces the frame timing; the testbench fills each
// frame with a generated image (flat patches with small noise, sharp steps
// and bright borders, so every case occurs) and drives its pixels. For each
// visible input pixel a reference model computes, from the image itself,
// the grey value 19595 R + 38470 G + 7471 B, the forward differences against
// the left pixel and the pixel above (zero outside the image), the gradient
// for the current mode and the black/white result; the expected pixel and
// its input cycle are queued. Each visible output pixel is compared with the
// queue head, and must leave exactly 4 clocks after it entered. hs and vs
// must also appear 4 clocks late.
//
// The mechanisms of the design are counted and each must occur: edges and
// non-edges in each of the three modes, a gradient exactly equal to the
// threshold, zero padding deciding a first-column and a first-row pixel,
// negative differences in x and y, a mode change between frames, and a first
// row read while the line buffer still holds the previous frame.
module tb_fd_edge_detector #(
  parameter int COLS = 24,
  parameter int ROWS = 10,
  parameter int FRAMES = 7,
  parameter int H_FP = 3, parameter int H_SYNC = 2, parameter int H_BP = 4,
  parameter int V_FP = 1, parameter int V_SYNC = 1, parameter int V_BP = 1,
  parameter int WATCHDOG = 100000
);
  import fd_pkg::*;

  localparam int LAT = 4;

  logic clk = 1'b0, rst = 1'b1;
  mode_t mode;
  logic [THR_W-1:0] threshold;
  video_t vid_in, vid_out;
  logic de, hs, vs, fs;
  int x, y;
  longint cycle = 0;
  int checks = 0, failures = 0;

  rgb_t img [ROWS][COLS];
  int   gry [ROWS][COLS];

  // Mechanism counters.
  int n_edge [3], n_flat [3], n_frames_mode [3];
  int n_equal = 0, n_pad_col = 0, n_pad_row = 0, n_neg_x = 0, n_neg_y = 0;
  int n_mode_change = 0, n_stale_row = 0;

  video_source #(.H_ACT(COLS), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
                 .V_ACT(ROWS), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)) src (
    .clk(clk), .rst(rst), .de(de), .hs(hs), .vs(vs), .x(x), .y(y), .frame_start(fs));

  fd_edge_detector #(.COLS(COLS), .ROWS(ROWS)) dut (
    .clk(clk), .rst(rst), .mode(mode), .threshold(threshold),
    .vid_in(vid_in), .vid_out(vid_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gray_of(rgb_t p);
    return 19595 * int'(p.r) + 38470 * int'(p.g) + 7471 * int'(p.b);
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // Generated image: 4x3-pixel patches of a random colour with +-2 noise,
  // one patch forced bright in the first column and first row.
  task automatic make_image(int seed);
    rgb_t patch [16][16];
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        patch[i][j] = rgb_t'($urandom);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        rgb_t p;
        p = patch[(r / 3) % 16][(c / 4) % 16];
        if ((seed + r + c) % 7 == 0) p.g = (p.g > 250) ? p.g - 2 : p.g + 2;
        if (r == 0 && c < 4) p = '{r: 8'd250, g: 8'd250, b: 8'd250};
        img[r][c] = p;
        gry[r][c] = gray_of(p);
      end
    // Force one pixel exactly at the threshold step (40 grey levels).
    img[ROWS-1][COLS-1] = img[ROWS-1][COLS-2];
    gry[ROWS-1][COLS-1] = gry[ROWS-1][COLS-2];
  endtask

  typedef struct {
    rgb_t   pix;
    longint t_in;
  } exp_t;
  exp_t q [$];
  bit first_frame_done = 0;

  // Drive the pixel for the position the source presents; model the result.
  always_comb begin
    vid_in.de  = de;
    vid_in.hs  = hs;
    vid_in.vs  = vs;
    vid_in.pix = de ? img[y][x] : rgb_t'(24'h0);
  end

  always @(negedge clk) begin
    if (!rst && de) begin
      int cur, left, up, gx, gy, g, t;
      bit e;
      exp_t ex;
      cur  = gry[y][x];
      left = (x == 0) ? 0 : gry[y][x-1];
      up   = (y == 0) ? 0 : gry[y-1][x];
      gx   = cur - left;
      gy   = cur - up;
      t    = int'(threshold) * 65536;
      case (mode)
        MODE_X:  g = iabs(gx);
        MODE_Y:  g = iabs(gy);
        default: g = iabs(gx) + iabs(gy);
      endcase
      e = g > t;
      ex.pix  = e ? BLACK : WHITE;
      ex.t_in = cycle;
      q.push_back(ex);
      if (e) n_edge[int'(mode)]++; else n_flat[int'(mode)]++;
      if (g == t) n_equal++;
      if (x == 0 && mode == MODE_X && e && cur > t) n_pad_col++;
      if (y == 0 && mode == MODE_Y && e && cur > t) n_pad_row++;
      if (y == 0 && first_frame_done) n_stale_row++;
      if (gx < 0) n_neg_x++;
      if (gy < 0) n_neg_y++;
    end
    if (!rst && vid_out.de) begin
      exp_t ex;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL output pixel with nothing expected");
      end else begin
        ex = q.pop_front();
        if (vid_out.pix !== ex.pix || cycle - ex.t_in != longint'(LAT)) begin
          failures++;
          $display("FAIL pix=%h expected=%h latency=%0d", vid_out.pix, ex.pix, cycle - ex.t_in);
        end
      end
    end
  end

  // hs/vs delay check.
  logic [LAT:1] hs_d, vs_d;
  always @(posedge clk) begin
    hs_d <= {hs_d[LAT-1:1], hs};
    vs_d <= {vs_d[LAT-1:1], vs};
  end
  always @(negedge clk) begin
    if (!rst && cycle > longint'(LAT) + 64'd4) begin
      checks++;
      if (vid_out.hs !== hs_d[LAT] || vid_out.vs !== vs_d[LAT]) begin
        failures++;
        $display("FAIL sync delay");
      end
    end
  end

  initial begin
    mode_t prev;
    for (int i = 0; i < 3; i++) begin n_edge[i] = 0; n_flat[i] = 0; n_frames_mode[i] = 0; end
    make_image(0);
    mode = MODE_XY; threshold = 9'd40;
    hs_d = '0; vs_d = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    prev = mode;
    for (int f = 0; f < FRAMES; f++) begin
      // Wait for the first visible pixel of this frame (settings already set).
      @(negedge clk iff fs);
      n_frames_mode[int'(mode)]++;
      // Wait until vertical sync, then pick the next frame's settings.
      @(negedge clk iff vs);
      first_frame_done = 1;
      make_image(f + 1);
      prev = mode;
      mode = mode_t'((f + 1) % 3);
      threshold = (f % 2 != 0) ? 9'd40 : 9'd10 + 9'(f);
      if (f == 2) threshold = 9'd0;
      if (mode != prev) n_mode_change++;
    end
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d pixels never came out", q.size()); end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_edge[i] == 0 || n_flat[i] == 0 || n_frames_mode[i] == 0) begin
        failures++;
        $display("FAIL mode %0d: edges=%0d non-edges=%0d frames=%0d", i, n_edge[i], n_flat[i], n_frames_mode[i]);
      end
    end
    checks++;
    if (n_equal == 0 || n_pad_col == 0 || n_pad_row == 0 || n_neg_x == 0 || n_neg_y == 0 ||
        n_mode_change == 0 || n_stale_row == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("mechanisms: edges X/Y/XY=%0d/%0d/%0d non-edges=%0d/%0d/%0d equal=%0d pad_col=%0d pad_row=%0d neg_x=%0d neg_y=%0d mode_changes=%0d stale_row_pixels=%0d",
             n_edge[0], n_edge[1], n_edge[2], n_flat[0], n_flat[1], n_flat[2], n_equal, n_pad_col,
             n_pad_row, n_neg_x, n_neg_y, n_mode_change, n_stale_row);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
