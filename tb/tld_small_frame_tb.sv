// tld_small_frame_tb: the detector built for a 480x360 frame, the size
// the published embedded system (a smaller FPGA with a host processor)
// runs because a 640x480 integral image does not fit its block RAM.
// The top is instantiated with IMG_W = 480 and IMG_H = 360 and keeps its
// 32 dual-port blocks, now of 5400 words each. One random frame is
// streamed in and scanned at three scales with 10 trees; the result and
// vote total must equal the testbench's own model, and the detector must
// have stalled on collisions. The cycles of the load and of detection
// are printed.
module tld_small_frame_tb;
  import tld_pkg::*;
  localparam int W = 480, H = 360, NF = 7, MAXT = 15, NS = 3, NCFG = 1;
  logic clk = 0, rst_n = 1;
  // reset falls before the first clock edge, so every flop starts cleared
  initial #1 rst_n = 1'b0;
  logic load_start = 0, pix_valid = 0;
  logic [7:0] pix = '0;
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
  logic det_start = 0;
  logic [NCFG-1:0] pix_ready, loaded, det_busy, result_valid;
  logic [31:0] result [NCFG], vote_total [NCFG], det_cycles [NCFG], det_batches [NCFG], stall_cycles [NCFG];
  int checks = 0, failures = 0;

  int img [W*H];
  int ii [W*H];
  int coef [4][MAXT*NF];
  bit post [16384];
  int sc_w [NS] = '{48, 120, 240};
  int sc_h [NS] = '{40, 100, 200};
  int sc_s [NS] = '{16, 40, 30};

  tld_top #(.IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst_n, .load_start, .pix_valid, .pix_ready(pix_ready[0]), .pix, .loaded(loaded[0]),
    .bus_we(1'b0), .bus_addr('0), .bus_data('0),
    .coef_we, .coef_sel, .coef_addr, .coef_wdata, .scale_we, .scale_addr, .scale_wdata,
    .post_we, .post_waddr, .post_wdata, .cfg_nscales, .cfg_ntrees, .cfg_thresh,
    .det_start, .det_busy(det_busy[0]), .result_valid(result_valid[0]), .result(result[0]),
    .vote_total(vote_total[0]), .det_cycles(det_cycles[0]), .det_batches(det_batches[0]),
    .stall_cycles(stall_cycles[0]));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int I(int x, int y); return ii[y*W+x]; endfunction
  function automatic int box(int x, int y, int w, int h);
    return I(x+w-1, y+h-1) - I(x-1, y+h-1) - I(x+w-1, y-1) + I(x-1, y-1);
  endfunction

  task automatic model(input int ntrees, input int thresh, output int det, output int tot);
    det = 0; tot = 0;
    for (int s = 0; s < NS; s++) begin
      int ww, wh;
      ww = sc_w[s]; wh = sc_h[s];
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
          if (votes >= thresh) det++;
        end
    end
  endtask

  initial begin
    int ed, et, cyc;
    logic [NCFG-1:0] seen;
    int nb [NCFG] = '{32};
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
      @(negedge clk);
    end
    scale_we = 0;
    for (int i = 0; i < 16384; i++) begin
      post_we = 1; post_waddr = 14'(i); post_wdata = ($urandom_range(0, 1) != 0);
      post[i] = post_wdata;
      @(negedge clk);
    end
    post_we = 0;

    // frame
    for (int y = 0; y < H; y++) begin
      int rs = 0;
      for (int x = 0; x < W; x++) begin
        img[y*W+x] = $urandom_range(0, 255);
        rs += img[y*W+x];
        ii[y*W+x] = rs + ((y > 0) ? ii[(y-1)*W+x] : 0);
      end
    end
    @(negedge clk); load_start = 1;
    @(negedge clk); load_start = 0;
    for (int i = 0; i < W*H; i++) begin
      pix_valid = 1; pix = 8'(img[i]);
      @(negedge clk);
    end
    pix_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (loaded != '1) failures++;

    model(10, 5, ed, et);
    @(negedge clk); det_start = 1;
    @(negedge clk); det_start = 0;
    cyc = 0;
    seen = '0;
    while (seen != '1 && cyc < 2000000) begin
      @(negedge clk); cyc++;
      for (int c = 0; c < NCFG; c++)
        if (result_valid[c]) begin
          seen[c] = 1'b1;
          checks++;
          if (int'(result[c]) != ed || int'(vote_total[c]) != et) begin
            failures++;
            $display("%0d blocks: result %0d/%0d expected %0d/%0d", nb[c], result[c], vote_total[c], ed, et);
          end
        end
    end
    @(negedge clk);
    for (int c = 0; c < NCFG; c++) begin
      $display("%0d blocks: %0d batches in %0d cycles, %0d stall cycles, %.2f accesses/cycle",
               nb[c], det_batches[c], det_cycles[c], stall_cycles[c],
               16.0 * real'(det_batches[c]) / real'(det_cycles[c]));
      checks++;
      if (stall_cycles[c] == 0 || det_batches[c] != det_batches[0]) failures++;
    end
    checks++;
    if (seen != '1) failures++;
    $display("%0dx%0d frame: loaded in %0d cycles, detection %0d cycles", W, H, W * H, det_cycles[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
