// mem_block_tb: fills a 9600 x 27 block through the write port with
// random words, then reads random rows with random labels through the
// read ports (both ports in the same cycle, or one of them) and checks
// data, label and the one-cycle latency against a copy kept by the
// testbench. Port 1 also reads while port 0 writes another row.
module mem_block_tb;
  localparam int unsigned DEPTH = 9600, W = 27, LW = 4;
  localparam int unsigned NP = 2;
  logic clk = 0, wr_en = 0;
  logic [NP-1:0] rd_en = '0, rd_valid;
  logic [13:0] wr_addr = '0;
  logic [NP-1:0][13:0] rd_addr = '0;
  logic [W-1:0] wr_data = '0;
  logic [NP-1:0][W-1:0] rd_data;
  logic [NP-1:0][LW-1:0] rd_label = '0, rd_label_q;
  int checks = 0, failures = 0;
  logic [W-1:0] model [DEPTH];

  mem_block #(.DEPTH(DEPTH), .DATA_W(W), .LABEL_W(LW), .RD_PORTS(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_row [NP], exp_lbl [NP];
    logic [NP-1:0] use_p;
    @(negedge clk);
    for (int i = 0; i < int'(DEPTH); i++) begin
      wr_en = 1; wr_addr = 14'(i); wr_data = W'($urandom); model[i] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    checks++;
    if (rd_valid != '0) failures++;   // nothing read yet
    for (int n = 0; n < 3000; n++) begin
      use_p = 2'($urandom_range(1, 3));
      if (n % 4 == 3) use_p = 2'b10;  // port 1 reads while port 0 writes
      for (int p = 0; p < int'(NP); p++) begin
        exp_row[p] = $urandom_range(0, DEPTH - 1);
        exp_lbl[p] = $urandom_range(0, 15);
        rd_en[p] = use_p[p]; rd_addr[p] = 14'(exp_row[p]); rd_label[p] = LW'(exp_lbl[p]);
      end
      if (!use_p[0]) begin
        wr_en = 1; wr_addr = 14'((exp_row[1] + 1) % DEPTH); wr_data = W'($urandom);
      end
      @(negedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      rd_en = '0; wr_en = 0;
      for (int p = 0; p < int'(NP); p++) begin
        checks++;
        if (rd_valid[p] != use_p[p] ||
            (use_p[p] && (rd_data[p] !== model[exp_row[p]] || int'(rd_label_q[p]) != exp_lbl[p]))) begin
          failures++;
          if (failures < 10) $display("port %0d row %0d: valid %0b data %0h exp %0h", p, exp_row[p],
                                      rd_valid[p], rd_data[p], model[exp_row[p]]);
        end
      end
    end
    @(negedge clk);
    checks++;
    if (rd_valid != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
