// tb_fwd_gradient: feeds a small grey image, pixel by pixel with idle cycles
// between lines, into the forward-difference stage. A row model supplies the
// pixel above one clock after each pixel (as the line buffer does). Each
// output pair is compared, two clocks after its pixel, with |cur - left| and
// |cur - above| computed from the image, with zeros outside the image.
module tb_fwd_gradient;
  localparam int W = 24;
  localparam int COLS = 9;
  localparam int ROWS = 6;

  logic clk = 1'b0, rst = 1'b1;
  logic de, first_col, first_row;
  logic [W-1:0] cur, above, abs_gx, abs_gy;
  int img [ROWS][COLS];
  int checks = 0, failures = 0;
  int neg_x = 0, neg_y = 0;

  fwd_gradient #(.W(W)) dut (
    .clk(clk), .rst(rst), .de(de), .cur(cur), .first_col(first_col),
    .first_row(first_row), .above(above), .abs_gx(abs_gx), .abs_gy(abs_gy));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results, checked two clocks after the pixel was applied.
  int exp_x [$], exp_y [$];
  logic v1 = 0, v2 = 0;
  int ax_q [$];
  int above_next;

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  always @(posedge clk) begin
    v2 <= v1;
    v1 <= de;
  end

  always @(negedge clk) begin
    if (v2) begin
      int ex, ey;
      ex = exp_x.pop_front();
      ey = exp_y.pop_front();
      checks++;
      if (int'(abs_gx) != ex || int'(abs_gy) != ey) begin
        failures++;
        $display("FAIL abs_gx=%0d (exp %0d) abs_gy=%0d (exp %0d)", abs_gx, ex, abs_gy, ey);
      end
    end
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        img[r][c] = int'($urandom % (256 * 65536));
    img[2][3] = 0;          // guaranteed negative differences
    img[2][4] = 100;
    img[2][5] = 16711680;
    img[3][5] = 5;
    de = 0; cur = '0; first_col = 0; first_row = 0; above = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int frame = 0; frame < 2; frame++) begin
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          int left, up;
          de = 1; cur = W'(img[r][c]); first_col = (c == 0); first_row = (r == 0);
          left = (c == 0) ? 0 : img[r][c-1];
          up   = (r == 0) ? 0 : img[r-1][c];
          exp_x.push_back(iabs(img[r][c] - left));
          exp_y.push_back(iabs(img[r][c] - up));
          if (img[r][c] < left) neg_x++;
          if (img[r][c] < up)   neg_y++;
          // In row 0 the buffer still holds the last row of the previous
          // frame (or junk): drive junk to show it is ignored.
          above_next = (r == 0) ? int'($urandom % 1000 + 1) : img[r-1][c];
          @(posedge clk); #1;
          above = W'(above_next);
        end
        de = 0; cur = W'($urandom); first_col = 0;
        repeat (3) @(posedge clk);
        #1;
      end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (neg_x == 0 || neg_y == 0 || exp_x.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
