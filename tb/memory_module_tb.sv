// memory_module_tb: a 64x48 frame over 8 blocks. The frame is loaded with
// random words through the load port; then random batches of 16 queries
// are offered with random gaps. Half the batches draw their addresses
// from a small window (many collisions), half from the whole frame. For
// every batch the testbench checks that each query's word comes back
// once, on one of the two read ports of the block given by the
// bit-reversed address, with the right data and label, that the batch
// tag follows the last word, and that the batch takes exactly
// ceil(k/2) cycles, k being the query count of its most loaded block.
module memory_module_tb;
  localparam int unsigned W = 64, H = 48, NPIX = W * H, NBLK = 8, NQ = 16, DW = 27;
  localparam int unsigned AW = 12, NP = 2, NPORT = NBLK * NP;
  localparam int NBATCH = 3000;
  logic clk = 0, rst_n = 1;
  // reset falls before the first clock edge, so every flop starts cleared
  initial #1 rst_n = 1'b0;
  logic wr_en = 0;
  logic [AW-1:0] wr_addr = '0;
  logic [DW-1:0] wr_data = '0;
  logic q_valid = 0, q_ready;
  logic [NQ-1:0][AW-1:0] q_addr = '0;
  logic [2:0] q_tag = '0;
  logic [NPORT-1:0] d_valid;
  logic [NBLK-1:0] blk_busy;
  logic [NPORT-1:0][3:0] d_label;
  logic [NPORT-1:0][DW-1:0] d_data;
  logic tag_valid;
  logic [2:0] tag_out;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [NPIX];

  typedef struct {
    logic [NQ-1:0][AW-1:0] addr;
    logic [2:0] tag;
    int accept_cycle;
    int maxload;
  } batch_t;
  batch_t inflight[$];
  int cycle = 0;
  int done_batches = 0, collision_batches = 0;
  logic [NQ-1:0] got;

  memory_module #(.IMG_W(W), .IMG_H(H), .NBLK(NBLK), .NQ(NQ), .DATA_W(DW), .TAG_W(3), .RD_PORTS(NP)) dut (.*);

  always #5 clk = ~clk;

  function automatic int blk_of(int a);
    // block = address bits 0..2 in reverse order
    return ((a & 1) << 2) | (a & 2) | ((a >> 2) & 1);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (q_valid && q_ready) begin
        batch_t b;
        int load [NBLK];
        b.addr = q_addr; b.tag = q_tag; b.accept_cycle = cycle;
        foreach (load[i]) load[i] = 0;
        for (int q = 0; q < int'(NQ); q++) load[blk_of(int'(q_addr[q]))]++;
        b.maxload = 0;
        foreach (load[i]) if (load[i] > b.maxload) b.maxload = load[i];
        if (b.maxload > int'(NP)) collision_batches++;
        inflight.push_back(b);
      end
      for (int p = 0; p < int'(NPORT); p++) begin
        if (d_valid[p]) begin
          int q;
          checks++;
          q = int'(d_label[p]);
          if (inflight.size() == 0 || got[q] ||
              blk_of(int'(inflight[0].addr[q])) != p / int'(NP) ||
              d_data[p] != model[inflight[0].addr[q]]) begin
            failures++;
            if (failures < 10) $display("cycle %0d port %0d label %0d bad", cycle, p, q);
          end
          got[q] = 1'b1;
        end
      end
      if (tag_valid) begin
        checks++;
        if (inflight.size() == 0 || got != '1 || tag_out != inflight[0].tag ||
            cycle - inflight[0].accept_cycle != (inflight[0].maxload + 1) / int'(NP) + 1) begin
          failures++;
          if (failures < 10 && inflight.size() > 0)
            $display("batch end: got %b took %0d expected %0d", got,
                     cycle - inflight[0].accept_cycle, (inflight[0].maxload + 1) / int'(NP) + 1);
        end
        got = '0;
        if (inflight.size() > 0) void'(inflight.pop_front());
        done_batches++;
      end
    end
  end

  initial begin
    got = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(NPIX); i++) begin
      wr_en = 1; wr_addr = AW'(i); wr_data = DW'($urandom); model[i] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int n = 0; n < NBATCH; ) begin
      if ($urandom_range(0, 4) != 0) begin
        int base;
        base = $urandom_range(0, NPIX - 1 - 5 * W - 8);
        for (int q = 0; q < int'(NQ); q++)
          q_addr[q] = (n % 2 == 0) ? AW'(base + $urandom_range(0, 4) * W + $urandom_range(0, 7))
                                   : AW'($urandom_range(0, NPIX - 1));
        q_tag = 3'($urandom);
        q_valid = 1;
        @(posedge clk);
        while (!q_ready) @(posedge clk);
        n++;
        @(negedge clk);
        q_valid = 0;
      end else @(negedge clk);
    end
    q_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (done_batches != NBATCH || inflight.size() != 0) failures++;
    checks++;
    if (collision_batches == 0) failures++;
    $display("batches %0d, with collisions %0d", done_batches, collision_batches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
