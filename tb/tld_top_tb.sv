// tld_top_tb: end-to-end test of the detector at its full default size
// (640x480 frame, 32 memory blocks, 16 queries per batch).
//
// Frame 1: a random grey image is streamed in; random coefficients, a
// three-scale scan and a random leaf posterior table are written; the
// detection runs with 10 trees. Frame 2 reuses the stored image after a
// between-frame update of 300 posterior entries and a new threshold.
// Frame 3 streams a second image and runs with 15 trees. Frame 4 is
// written by the host as integral words over the data bus and runs with
// 12 trees. The testbench computes the integral image, every feature box,
// leaf index, vote and detection itself and compares the result and vote
// total of each run.
//
// It also counts that each mechanism happened: collisions serialized
// (stall cycles), parallel reads from several blocks in one cycle, data
// returned out of query order, a scale change, a clamped scale, a
// data-bus load, windows both detected and rejected, and a changed
// result after the posterior update. It prints the memory accesses
// served per cycle.
module tld_top_tb;
  import tld_pkg::*;
  localparam int W = 640, H = 480, NF = 7, MAXT = 15, NS = 3;
  logic clk = 0, rst_n = 1;
  // reset falls before the first clock edge, so every flop starts cleared
  initial #1 rst_n = 1'b0;
  logic load_start = 0, pix_valid = 0, pix_ready, loaded;
  logic [7:0] pix = '0;
  logic bus_we = 0;
  logic [18:0] bus_addr = '0;
  logic [26:0] bus_data = '0;
  logic coef_we = 0;
  logic [1:0] coef_sel = '0;
  logic [6:0] coef_addr = '0;
  logic [7:0] coef_wdata = '0;
  logic scale_we = 0;
  logic [3:0] scale_addr = '0;
  scale_t scale_wdata = '0;
  logic post_we = 0, post_wdata = 0;
  logic [13:0] post_waddr = '0;
  logic [4:0] cfg_nscales = 5'(NS);
  logic [3:0] cfg_ntrees = 4'd10;
  logic [7:0] cfg_thresh = 8'd5;
  logic det_start = 0, det_busy, result_valid;
  logic [31:0] result, vote_total, det_cycles, det_batches, stall_cycles;
  int checks = 0, failures = 0;

  int img [W*H];
  int ii [W*H];
  int coef [4][MAXT*NF];
  bit post [16384];
  int sc_w [NS] = '{48, 120, 700};
  int sc_h [NS] = '{40, 100, 500};
  int sc_s [NS] = '{16, 40, 8};

  // mechanism counters
  int n_stall = 0, n_parallel = 0, n_ooo = 0, n_scale_change = 0, n_clamped = 0;
  int n_det_win = 0, n_rej_win = 0, n_post_change = 0, n_bus_load = 0;

  tld_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the memory ports: several blocks in one cycle, and a word
  // whose label is lower than one already returned for the same batch.
  int max_lbl = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      if ($countones(dut.d_valid) > 1) n_parallel++;
      for (int b = 0; b < $bits(dut.d_valid); b++)
        if (dut.d_valid[b]) begin
          if (int'(dut.d_label[b]) < max_lbl) n_ooo++;
          if (int'(dut.d_label[b]) > max_lbl) max_lbl = int'(dut.d_label[b]);
        end
      if (dut.tag_valid) max_lbl = -1;
    end
  end

  task automatic make_image();
    for (int y = 0; y < H; y++) begin
      int rs = 0;
      for (int x = 0; x < W; x++) begin
        img[y*W+x] = $urandom_range(0, 255);
        rs += img[y*W+x];
        ii[y*W+x] = rs + ((y > 0) ? ii[(y-1)*W+x] : 0);
      end
    end
  endtask

  // host-computed integral image written over the data bus
  task automatic bus_load();
    make_image();
    for (int i = 0; i < W*H; i++) begin
      bus_we = 1; bus_addr = 19'(i); bus_data = 27'(ii[i]);
      @(negedge clk);
    end
    bus_we = 0;
    n_bus_load++;
  endtask

  task automatic load_frame();
    make_image();
    @(negedge clk); load_start = 1;
    @(negedge clk); load_start = 0;
    for (int i = 0; i < W*H; ) begin
      pix_valid = 1; pix = 8'(img[i]);
      @(posedge clk);
      if (pix_ready) i++;
      @(negedge clk);
    end
    pix_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (!loaded) failures++;
  endtask

  function automatic int I(int x, int y); return ii[y*W+x]; endfunction
  function automatic int box(int x, int y, int w, int h);
    return I(x+w-1, y+h-1) - I(x-1, y+h-1) - I(x+w-1, y-1) + I(x-1, y-1);
  endfunction

  // reference detector: returns detections and vote total
  task automatic model(input int ntrees, input int thresh, output int det, output int tot);
    det = 0; tot = 0;
    for (int s = 0; s < NS; s++) begin
      int ww, wh;
      ww = (sc_w[s] > W - 2) ? W - 2 : sc_w[s];
      wh = (sc_h[s] > H - 2) ? H - 2 : sc_h[s];
      for (int wy = 1; wy + wh + 1 <= H; wy += sc_s[s])
        for (int wx = 1; wx + ww + 1 <= W; wx += sc_s[s]) begin
          int votes = 0;
          for (int t = 0; t < ntrees; t++) begin
            int code = 0;
            for (int f = 0; f < NF; f++) begin
              int k, x, y, hw, hh, l, r, tp, bt;
              k = t * NF + f;
              x  = wx + (coef[0][k] * ww) / 256;
              y  = wy + (coef[1][k] * wh) / 256;
              hw = ((coef[2][k] * ww) / 256) / 2; if (hw == 0) hw = 1;
              hh = ((coef[3][k] * wh) / 256) / 2; if (hh == 0) hh = 1;
              l  = box(x, y, hw, 2*hh);
              r  = box(x + hw, y, hw, 2*hh);
              tp = box(x, y, 2*hw, hh);
              bt = box(x, y + hh, 2*hw, hh);
              code = ((code << 2) | ((l > r) ? 2 : 0) | ((tp > bt) ? 1 : 0)) & 16'h3fff;
            end
            votes += int'(post[code]);
          end
          tot += votes;
          if (votes >= thresh) begin det++; n_det_win++; end
          else n_rej_win++;
        end
    end
  endtask

  task automatic detect(input int ntrees, input int thresh, output int res);
    int ed, et, cyc;
    cfg_ntrees = 4'(ntrees); cfg_thresh = 8'(thresh);
    model(ntrees, thresh, ed, et);
    @(negedge clk); det_start = 1;
    @(negedge clk); det_start = 0;
    cyc = 0;
    while (!result_valid && cyc < 2000000) begin @(negedge clk); cyc++; end
    checks++;
    if (!result_valid || int'(result) != ed || int'(vote_total) != et) begin
      failures++;
      $display("detect: result %0d votes %0d, expected %0d %0d", result, vote_total, ed, et);
    end
    @(negedge clk);
    n_stall += int'(stall_cycles);
    $display("run: %0d windows detected, %0d votes, %0d batches in %0d cycles, %0d stall cycles, %.2f accesses/cycle",
             result, vote_total, det_batches, det_cycles, stall_cycles,
             16.0 * real'(det_batches) / real'(det_cycles));
    checks++;
    if (det_busy) failures++;
    res = int'(result);
  endtask

  initial begin
    int r1, r2, r3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < MAXT * NF; k++) begin
      int cx, cy;
      cx = $urandom_range(0, 200); cy = $urandom_range(0, 200);
      coef[0][k] = cx; coef[1][k] = cy;
      coef[2][k] = $urandom_range(0, 256 - cx); if (coef[2][k] > 255) coef[2][k] = 255;
      coef[3][k] = $urandom_range(0, 256 - cy); if (coef[3][k] > 255) coef[3][k] = 255;
      for (int j = 0; j < 4; j++) begin
        coef_we = 1; coef_sel = 2'(j); coef_addr = 7'(k); coef_wdata = 8'(coef[j][k]);
        @(negedge clk);
      end
    end
    coef_we = 0;
    for (int s = 0; s < NS; s++) begin
      scale_we = 1; scale_addr = 4'(s);
      scale_wdata.ww = COORD_W'(sc_w[s]); scale_wdata.wh = COORD_W'(sc_h[s]);
      scale_wdata.sx = 8'(sc_s[s]);       scale_wdata.sy = 8'(sc_s[s]);
      if (sc_w[s] > W - 2) n_clamped++;
      @(negedge clk);
    end
    scale_we = 0;
    n_scale_change = NS - 1;
    for (int i = 0; i < 16384; i++) begin
      post_we = 1; post_waddr = 14'(i); post_wdata = ($urandom_range(0, 1) != 0);
      post[i] = post_wdata;
      @(negedge clk);
    end
    post_we = 0;

    load_frame();
    detect(10, 5, r1);
    // between-frame update of the posterior table
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom_range(0, 16383);
      post_we = 1; post_waddr = 14'(k); post_wdata = !post[k]; post[k] = post_wdata;
      @(negedge clk);
    end
    post_we = 0;
    detect(10, 6, r2);
    if (r2 != r1) n_post_change++;
    load_frame();
    detect(15, 8, r3);
    bus_load();
    detect(12, 6, r3);

    $display("mechanisms: stall %0d parallel %0d out-of-order %0d scale changes %0d clamped %0d detected %0d rejected %0d post change %0d bus loads %0d",
             n_stall, n_parallel, n_ooo, n_scale_change, n_clamped, n_det_win, n_rej_win, n_post_change, n_bus_load);
    checks++; if (n_stall == 0)        failures++;
    checks++; if (n_parallel == 0)     failures++;
    checks++; if (n_ooo == 0)          failures++;
    checks++; if (n_scale_change == 0) failures++;
    checks++; if (n_clamped == 0)      failures++;
    checks++; if (n_det_win == 0)      failures++;
    checks++; if (n_rej_win == 0)      failures++;
    checks++; if (n_post_change == 0)  failures++;
    checks++; if (n_bus_load == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
