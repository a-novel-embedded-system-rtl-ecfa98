// integral_unit_tb: streams two 640x480 frames into the integral unit
// and checks every written word against an integral image computed by
// the testbench from its own running row sums. Frame 1 has random pixels
// and random gaps in pix_valid; frame 2 is all 255 (the largest integral
// value, 78,336,000, needs all 27 bits) streamed without gaps, and must
// take one cycle per pixel.
module integral_unit_tb;
  localparam int unsigned W = 640, H = 480, DW = 27;
  logic clk = 0, rst_n = 1, start = 0, pix_valid = 0, pix_ready;
  // reset falls before the first clock edge, so every flop starts cleared
  initial #1 rst_n = 1'b0;
  logic [7:0] pix = '0;
  logic wr_en, loaded;
  logic [18:0] wr_addr;
  logic [DW-1:0] wr_data;
  int checks = 0, failures = 0;
  int ref_ii [W*H];
  int n_wr;

  integral_unit #(.IMG_W(W), .IMG_H(H), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard on the write port
  always @(posedge clk) begin
    if (rst_n && wr_en) begin
      checks++;
      if (int'(wr_addr) != n_wr || int'(wr_data) != ref_ii[n_wr]) begin
        failures++;
        if (failures < 10) $display("write %0d: addr %0d data %0d expected %0d", n_wr, wr_addr, wr_data, ref_ii[n_wr]);
      end
      n_wr++;
    end
  end

  task automatic frame(input bit all_max, input bit gaps, output int cycles);
    int img [W*H];
    int rowsum;
    for (int y = 0; y < int'(H); y++) begin
      rowsum = 0;
      for (int x = 0; x < int'(W); x++) begin
        img[y*W+x] = all_max ? 255 : $urandom_range(0, 255);
        rowsum += img[y*W+x];
        ref_ii[y*W+x] = rowsum + ((y > 0) ? ref_ii[(y-1)*W+x] : 0);
      end
    end
    n_wr = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    for (int i = 0; i < int'(W*H); ) begin
      pix_valid = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
      pix = 8'(img[i]);
      @(posedge clk);
      cycles++;
      if (pix_valid && pix_ready) i++;
      @(negedge clk);
    end
    pix_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_wr != int'(W*H) || !loaded || pix_ready) failures++;
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (pix_ready || loaded) failures++;
    frame(0, 1, cyc);
    frame(1, 0, cyc);
    checks++;
    if (cyc != int'(W*H)) begin
      failures++;
      $display("continuous frame took %0d cycles", cyc);
    end
    checks++;
    if (ref_ii[W*H-1] != 640*480*255) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
