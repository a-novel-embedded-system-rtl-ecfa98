// addr_scrambler_tb: exhaustive check of the bit-reversal scrambler for a
// 640x480 frame over 32 blocks. For every pixel address it recomputes the
// reversed address bit by bit, the block (address bits 0..4 read in
// reverse order) and the row (address / 32), and checks that every block
// receives exactly 9600 pixels and that neighbouring pixels of a row fall
// into different blocks.
module addr_scrambler_tb;
  localparam int unsigned ADDR_W = 19;
  localparam int unsigned NBLK   = 32;
  localparam int unsigned NPIX   = 640 * 480;

  logic [ADDR_W-1:0] addr, scr_addr;
  logic [4:0]        blk;
  logic [13:0]       row;
  int checks = 0, failures = 0;
  int cnt [NBLK];

  addr_scrambler #(.ADDR_W(ADDR_W), .NBLK(NBLK)) dut (.addr, .scr_addr, .blk, .row);

  function automatic int rev_bits(int v, int n);
    int r = 0;
    for (int i = 0; i < n; i++) if ((v >> i) & 1) r |= 1 << (n - 1 - i);
    return r;
  endfunction

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_blk;
    foreach (cnt[i]) cnt[i] = 0;
    prev_blk = -1;
    for (int a = 0; a < int'(NPIX); a++) begin
      addr = ADDR_W'(a);
      #1;
      checks++;
      if (int'(scr_addr) != rev_bits(a, ADDR_W) || int'(blk) != rev_bits(a % 32, 5) ||
          int'(row) != a / 32) begin
        failures++;
        if (failures < 10)
          $display("addr %0d: scr %0h blk %0d row %0d", a, scr_addr, blk, row);
      end
      cnt[blk]++;
      if (a % 640 != 0) begin
        checks++;
        if (int'(blk) == prev_blk) failures++;
      end
      prev_blk = int'(blk);
    end
    for (int b = 0; b < int'(NBLK); b++) begin
      checks++;
      if (cnt[b] != 9600) begin
        failures++;
        $display("block %0d holds %0d pixels", b, cnt[b]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
