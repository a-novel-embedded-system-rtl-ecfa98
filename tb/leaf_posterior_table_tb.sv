// leaf_posterior_table_tb: writes all 2^14 posterior bits with a random
// pattern, rewrites a few hundred entries as a between-frame update
// would, and reads every entry back through the registered read port.
module leaf_posterior_table_tb;
  localparam int unsigned IDX_W = 14;
  logic clk = 0, we = 0, wdata = 0, rd_en = 0, rdata;
  logic [IDX_W-1:0] waddr = '0, raddr = '0;
  int checks = 0, failures = 0;
  logic model [2**IDX_W];

  leaf_posterior_table #(.IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 2**IDX_W; i++) begin
      we = 1; waddr = IDX_W'(i); wdata = 1'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom_range(0, 2**IDX_W - 1);
      waddr = IDX_W'(k); wdata = !model[k]; model[k] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 2**IDX_W; i++) begin
      rd_en = 1; raddr = IDX_W'(i);
      @(negedge clk);
      checks++;
      if (rdata != model[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
