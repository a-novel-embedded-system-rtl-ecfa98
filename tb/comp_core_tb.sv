// comp_core_tb: random integral images; box sums from the four corners
// A - B - C + D are checked against direct pixel sums.
module comp_core_tb;
  localparam int unsigned W = 27;
  logic [W-1:0] a, b, c, d, sum;
  int checks = 0, failures = 0;
  int img [16][16];
  int ii  [17][17];   // ii[y+1][x+1] = integral at (x, y), 0 outside

  comp_core #(.DATA_W(W)) dut (.a, .b, .c, .d, .sum);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) img[y][x] = $urandom_range(0, 255);
    for (int y = 0; y <= 16; y++) for (int x = 0; x <= 16; x++) begin
      ii[y][x] = 0;
      for (int yy = 0; yy < y; yy++) for (int xx = 0; xx < x; xx++) ii[y][x] += img[yy][xx];
    end
    for (int n = 0; n < 500; n++) begin
      int x0, y0, w, h, ref_sum;
      x0 = $urandom_range(0, 15); y0 = $urandom_range(0, 15);
      w  = $urandom_range(1, 16 - x0); h = $urandom_range(1, 16 - y0);
      ref_sum = 0;
      for (int yy = y0; yy < y0 + h; yy++) for (int xx = x0; xx < x0 + w; xx++) ref_sum += img[yy][xx];
      a = W'(ii[y0+h][x0+w]); b = W'(ii[y0+h][x0]);
      c = W'(ii[y0][x0+w]);   d = W'(ii[y0][x0]);
      #1;
      checks++;
      if (int'(sum) != ref_sum) begin
        failures++;
        $display("box (%0d,%0d,%0d,%0d): got %0d expected %0d", x0, y0, w, h, sum, ref_sum);
      end
    end
    // largest possible values: a full 640x480 frame of 255
    a = W'(640 * 480 * 255); b = '0; c = '0; d = '0;
    #1; checks++;
    if (int'(sum) != 640 * 480 * 255) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
