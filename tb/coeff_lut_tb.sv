// coeff_lut_tb: writes random coefficients into all 105 entries, reads
// them back in random order and checks the registered read (one cycle)
// and that a read with `en` low keeps the previous output.
module coeff_lut_tb;
  localparam int unsigned DEPTH = 105;
  logic clk = 0, we = 0, en = 0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [DEPTH];

  coeff_lut #(.DEPTH(DEPTH), .W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < int'(DEPTH); i++) begin
      we = 1; waddr = 7'(i); wdata = 8'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 1000; n++) begin
      int r;
      logic [7:0] held;
      r = $urandom_range(0, DEPTH - 1);
      en = 1; raddr = 7'(r);
      @(negedge clk);
      checks++;
      if (rdata != model[r]) failures++;
      held = rdata;
      en = 0; raddr = 7'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      checks++;
      if (rdata != held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
