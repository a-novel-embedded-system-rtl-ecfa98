// loop_decoder_tb: a 64x48 frame scanned at three scales (one of them
// larger than the frame, so it is clamped) with 3 trees of 7 features and
// random coefficients. The testbench walks the same loop in its own
// model (scales, rows, columns, trees, features), builds the 16 corner
// addresses of the left/right/top/bottom half-boxes of each feature box
// and compares every batch and tag in order. A first run offers q_ready
// at random, a second keeps it high and checks that one batch leaves per
// cycle, with two idle cycles at each change of scale.
module loop_decoder_tb;
  import tld_pkg::*;
  localparam int W = 64, H = 48, NF = 7, MAXT = 15;
  localparam int NQ = 16, AW = 12;
  logic clk = 0, rst_n = 1;
  // reset falls before the first clock edge, so every flop starts cleared
  initial #1 rst_n = 1'b0;
  logic coef_we = 0;
  logic [1:0] coef_sel = '0;
  logic [6:0] coef_addr = '0;
  logic [7:0] coef_wdata = '0;
  logic scale_we = 0;
  logic [3:0] scale_addr = '0;
  scale_t scale_wdata = '0;
  logic [4:0] cfg_nscales = 5'd3;
  logic [3:0] cfg_ntrees = 4'd3;
  logic start = 0, busy, done;
  logic q_valid, q_ready = 0;
  logic [NQ-1:0][AW-1:0] q_addr;
  batch_tag_t q_tag;
  int checks = 0, failures = 0;

  int coef [4][MAXT*NF];
  int sc_w [3] = '{20, 40, 100};
  int sc_h [3] = '{16, 30, 60};
  int sc_sx [3] = '{8, 10, 3};
  int sc_sy [3] = '{6, 9, 4};

  typedef struct { int a[NQ]; bit lf, lt, lw; } exp_t;
  exp_t expq[$];

  loop_decoder #(.IMG_W(W), .IMG_H(H), .MAX_TREES(MAXT), .NFEAT(NF), .MAX_SCALES(16), .MUL_STAGES(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int A(int x, int y); return y * W + x; endfunction

  task automatic build_model();
    for (int s = 0; s < 3; s++) begin
      int ww, wh;
      ww = (sc_w[s] > W - 2) ? W - 2 : sc_w[s];
      wh = (sc_h[s] > H - 2) ? H - 2 : sc_h[s];
      for (int wy = 1; wy + wh + 1 <= H; wy += sc_sy[s])
        for (int wx = 1; wx + ww + 1 <= W; wx += sc_sx[s])
          for (int t = 0; t < 3; t++)
            for (int f = 0; f < NF; f++) begin
              exp_t e;
              int k, x, y, hw, hh;
              int bx[4], by[4], bw[4], bh[4];
              k = t * NF + f;
              x  = wx + (coef[0][k] * ww) / 256;
              y  = wy + (coef[1][k] * wh) / 256;
              hw = ((coef[2][k] * ww) / 256) / 2; if (hw == 0) hw = 1;
              hh = ((coef[3][k] * wh) / 256) / 2; if (hh == 0) hh = 1;
              bx = '{x, x + hw, x, x};  by = '{y, y, y, y + hh};
              bw = '{hw, hw, 2*hw, 2*hw}; bh = '{2*hh, 2*hh, hh, hh};
              for (int r = 0; r < 4; r++) begin
                e.a[4*r+0] = A(bx[r] + bw[r] - 1, by[r] + bh[r] - 1);
                e.a[4*r+1] = A(bx[r] - 1,         by[r] + bh[r] - 1);
                e.a[4*r+2] = A(bx[r] + bw[r] - 1, by[r] - 1);
                e.a[4*r+3] = A(bx[r] - 1,         by[r] - 1);
              end
              e.lf = (f == NF - 1);
              e.lt = e.lf && (t == 2);
              e.lw = 0;
              expq.push_back(e);
            end
    end
    expq[expq.size()-1].lw = 1;
  endtask

  task automatic run(input bit random_ready, output int first_cyc, output int last_cyc, output bit saw_done);
    int cyc = 0, n = 0;
    saw_done = 0;
    first_cyc = -1; last_cyc = -1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!saw_done && cyc < 50000) begin
      q_ready = random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      if (q_valid && q_ready) begin
        checks++;
        if (n >= expq.size()) failures++;
        else begin
          bit bad = 0;
          for (int q = 0; q < NQ; q++) if (int'(q_addr[q]) != expq[n].a[q]) bad = 1;
          if (q_tag.last_feat != expq[n].lf || q_tag.last_tree != expq[n].lt ||
              q_tag.last_win != expq[n].lw) bad = 1;
          if (bad) begin
            failures++;
            if (failures < 5) $display("batch %0d differs: q0 %0d exp %0d", n, q_addr[0], expq[n].a[0]);
          end
        end
        if (first_cyc < 0) first_cyc = cyc;
        last_cyc = cyc;
        n++;
      end
      if (done) saw_done = 1;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (n != expq.size() || !saw_done) begin
      failures++;
      $display("run got %0d batches, expected %0d, done %0b", n, expq.size(), saw_done);
    end
    q_ready = 0;
  endtask

  initial begin
    int f0, f1;
    bit d;
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
    for (int s = 0; s < 3; s++) begin
      scale_we = 1; scale_addr = 4'(s);
      scale_wdata.ww = COORD_W'(sc_w[s]); scale_wdata.wh = COORD_W'(sc_h[s]);
      scale_wdata.sx = 8'(sc_sx[s]);      scale_wdata.sy = 8'(sc_sy[s]);
      @(negedge clk);
    end
    scale_we = 0;
    build_model();
    $display("expected batches: %0d", expq.size());
    run(1, f0, f1, d);
    run(0, f0, f1, d);
    checks++;
    if (f1 - f0 != expq.size() - 1 + 2 * 2) begin
      failures++;
      $display("full-rate run spanned %0d cycles for %0d batches", f1 - f0 + 1, expq.size());
    end
    checks++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
