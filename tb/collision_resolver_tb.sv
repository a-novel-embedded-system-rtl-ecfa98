// collision_resolver_tb: the resolver of block 2 out of 4 receives
// random batches of 16 queries. The testbench computes which queries
// collide on that block and checks that they are issued two per cycle
// on the two read ports, in query order, each exactly once with its own
// row and label, that a batch with k hits takes ceil(k/2) cycles, and
// that done_next allows the next batch to be loaded in the cycle of the
// last issue.
module collision_resolver_tb;
  localparam int unsigned NQ = 16, NBLK = 4, ID = 2, RW = 8, NP = 2;
  logic clk = 0, rst_n = 1, load = 0;
  // reset falls before the first clock edge, so every flop starts cleared
  initial #1 rst_n = 1'b0;
  logic [NQ-1:0][1:0]    in_blk = '0;
  logic [NQ-1:0][RW-1:0] row_lat = '0;
  logic [NP-1:0] rd_en;
  logic done_next;
  logic [NP-1:0][RW-1:0] rd_row;
  logic [NP-1:0][3:0] rd_label;
  logic [NQ-1:0] pending;
  int checks = 0, failures = 0;
  int multi_hit_batches = 0;

  collision_resolver #(.NQ(NQ), .NBLK(NBLK), .BLK_ID(ID), .ROW_W(RW), .RD_PORTS(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NQ-1:0][1:0]    nb;
    logic [NQ-1:0][RW-1:0] nr;
    logic [NQ-1:0] exp_mask, seen;
    int k, cyc, last_lbl;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (rd_en != '0 || !done_next) failures++;
    for (int n = 0; n < 2000; n++) begin
      for (int q = 0; q < int'(NQ); q++) begin
        nb[q] = 2'($urandom);
        nr[q] = RW'($urandom);
      end
      exp_mask = '0;
      for (int q = 0; q < int'(NQ); q++) if (nb[q] == 2'(ID)) exp_mask[q] = 1'b1;
      k = $countones(exp_mask);
      if (k > 1) multi_hit_batches++;
      // the batch is loaded now: done_next must already be high
      checks++;
      if (!done_next) failures++;
      load = 1; in_blk = nb;
      @(negedge clk);
      load = 0; row_lat = nr;
      seen = '0; cyc = 0; last_lbl = -1;
      while (1) begin
        #1;
        if (rd_en == '0) break;
        cyc++;
        // ports fill from 0: port 1 only busy with port 0
        checks++;
        if (rd_en == 2'b10) failures++;
        for (int p = 0; p < int'(NP); p++) begin
          if (rd_en[p]) begin
            checks++;
            if (!exp_mask[rd_label[p]] || seen[rd_label[p]] || int'(rd_label[p]) <= last_lbl ||
                rd_row[p] != nr[rd_label[p]]) begin
              failures++;
              if (failures < 10) $display("batch %0d: bad issue port %0d label %0d", n, p, rd_label[p]);
            end
            seen[rd_label[p]] = 1'b1;
            last_lbl = int'(rd_label[p]);
          end
        end
        if (done_next) break;          // last issue: next batch loads now
        @(negedge clk);
      end
      checks++;
      if (seen != exp_mask || cyc != (k + 1) / 2) begin
        failures++;
        if (failures < 10) $display("batch %0d: served %b expected %b in %0d cycles", n, seen, exp_mask, cyc);
      end
      if (k == 0) begin
        checks++;
        if (pending != '0) failures++;
      end
    end
    checks++;
    if (multi_hit_batches == 0) failures++;
    $display("collision batches: %0d", multi_hit_batches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
