// computation_module_tb: feeds the computation module as the memory
// would: each batch's 16 words arrive over one or more cycles in random
// order on random memory ports with their labels, the batch tag with the
// last word, and the next batch may start in the very next cycle. The
// testbench computes the four box sums, feature bits, 14-bit leaf
// indices, posterior votes, detections and the vote total itself and
// checks the result word of three frames, the number of computed
// batches, and that `start` clears the accumulators.
module computation_module_tb;
  import tld_pkg::*;
  localparam int NBLK = 8, NQ = 16, DW = 27, NF = 7;
  logic clk = 0, rst_n = 1, start = 0;
  // reset falls before the first clock edge, so every flop starts cleared
  initial #1 rst_n = 1'b0;
  logic [7:0] cfg_thresh = 8'd2;
  logic [NBLK-1:0] d_valid = '0;
  logic [NBLK-1:0][3:0] d_label = '0;
  logic [NBLK-1:0][DW-1:0] d_data = '0;
  logic tag_valid = 0;
  batch_tag_t tag_in = '0;
  logic post_we = 0, post_wdata = 0;
  logic [13:0] post_waddr = '0;
  logic result_valid, batch_done;
  logic [31:0] result, vote_total;
  int checks = 0, failures = 0;
  bit post [16384];
  int n_batch_done = 0, n_res = 0;
  logic [31:0] last_result, last_total;

  computation_module #(.NPORT(NBLK), .DATA_W(DW), .LEAF_W(14)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (batch_done) n_batch_done++;
    if (result_valid) begin
      n_res++;
      last_result = result;
      last_total  = vote_total;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // deliver one batch of words; returns its two feature bits
  task automatic send_batch(input batch_tag_t tg, output logic [1:0] bits);
    logic [DW-1:0] w [NQ];
    logic [DW-1:0] s [4];
    int order [NQ];
    int i;
    for (int q = 0; q < NQ; q++) begin
      w[q] = DW'($urandom);
      order[q] = q;
    end
    order.shuffle();
    for (int r = 0; r < 4; r++) s[r] = w[4*r] - w[4*r+1] - w[4*r+2] + w[4*r+3];
    bits = {s[0] > s[1], s[2] > s[3]};
    i = 0;
    while (i < NQ) begin
      int nthis;
      int ports [NBLK];
      foreach (ports[p]) ports[p] = p;
      ports.shuffle();
      nthis = $urandom_range(1, 6);
      d_valid = '0;
      for (int k = 0; k < nthis && i < NQ; k++, i++) begin
        d_valid[ports[k]] = 1'b1;
        d_label[ports[k]] = 4'(order[i]);
        d_data[ports[k]]  = w[order[i]];
      end
      tag_valid = (i == NQ);
      tag_in = tg;
      @(negedge clk);
    end
    d_valid = '0;
    tag_valid = 0;
    if ($urandom_range(0, 3) == 0) @(negedge clk);   // sometimes a gap
  endtask

  task automatic frame(input int nwin, input int ntrees, output int exp_det, output int exp_tot);
    exp_det = 0; exp_tot = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int wi = 0; wi < nwin; wi++) begin
      int votes = 0;
      for (int t = 0; t < ntrees; t++) begin
        int code = 0;
        for (int f = 0; f < NF; f++) begin
          batch_tag_t tg;
          logic [1:0] b;
          tg.last_feat = (f == NF - 1);
          tg.last_tree = tg.last_feat && (t == ntrees - 1);
          tg.last_win  = tg.last_tree && (wi == nwin - 1);
          send_batch(tg, b);
          code = ((code << 2) | int'(b)) & 16'h3fff;
        end
        votes += int'(post[code]);
      end
      exp_tot += votes;
      if (votes >= int'(cfg_thresh)) exp_det++;
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int ed, et, nb;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16384; i++) begin
      post_we = 1; post_waddr = 14'(i); post_wdata = ($urandom_range(0, 2) != 0);
      post[i] = post_wdata;
      @(negedge clk);
    end
    post_we = 0;
    for (int fr = 0; fr < 3; fr++) begin
      int nres0;
      nres0 = n_res;
      nb = n_batch_done;
      cfg_thresh = 8'(fr + 1);
      frame(40 + 10 * fr, 3 + fr, ed, et);
      checks++;
      if (n_res != nres0 + 1 || int'(last_result) != ed || int'(last_total) != et) begin
        failures++;
        $display("frame %0d: result %0d/%0d expected %0d/%0d", fr, last_result, last_total, ed, et);
      end
      checks++;
      if (n_batch_done - nb != (40 + 10 * fr) * (3 + fr) * NF) failures++;
      $display("frame %0d: detections %0d votes %0d", fr, ed, et);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
