// fxp_mult_tb: random operands into a 3-stage multiplier; checks each
// product (a*b)>>8 appears exactly 3 enabled cycles later, and that the
// pipeline holds its contents while `en` is low.
module fxp_mult_tb;
  localparam int unsigned STAGES = 3;
  logic clk = 0, en = 0;
  logic [7:0] a = '0;
  logic [10:0] b = '0;
  logic [10:0] p;
  int checks = 0, failures = 0;
  int q[$];

  fxp_mult #(.A_W(8), .B_W(11), .FRAC(8), .STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    logic [10:0] last_p;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      en = ($urandom_range(0, 3) != 0);
      a = 8'($urandom); b = 11'($urandom);
      if (en) q.push_back((int'(a) * int'(b)) >> 8);
      last_p = p;
      @(negedge clk);
      if (!en) begin
        checks++;
        if (p != last_p) failures++;
      end
      // after STAGES enabled cycles the product of the first is at the output
      if (en && q.size() > int'(STAGES) - 1 && sent >= int'(STAGES) - 1) begin
        checks++;
        if (int'(p) != q[0]) begin
          failures++;
          if (failures < 10) $display("got %0d expected %0d", p, q[0]);
        end
        void'(q.pop_front());
      end
      if (en) sent++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
