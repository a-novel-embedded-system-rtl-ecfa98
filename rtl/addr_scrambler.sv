// addr_scrambler: the 1-1 address scrambler of the distributed memory.
//
// The random-forest detector reads the integral image at random points of
// a sliding window, and those points lie close together in the linear
// address space (y*IMG_W + x). A plain partition, one contiguous 1/NBLK of
// the frame per block, would send nearly all parallel queries to the same
// block. Reversing the order of the address bits makes the low address
// bits, which change between neighbouring pixels, select the block, so
// neighbouring pixels land in different blocks. The bit reversal is a
// permutation of address bits: pure wiring, no logic and zero latency.
//
// The block number is the top BLK_W bits of the bit-reversed address, that
// is addr[0], addr[1], ... addr[BLK_W-1] read MSB first. The word inside
// the block is the remaining address bits in their original order
// (addr >> BLK_W), so each block needs only ceil(IMG_W*IMG_H/NBLK) words
// (9600 for 640x480 and 32 blocks). The full reversed address is also
// given on `scr_addr`. Keeping the in-block word un-reversed is this
// design's choice; it keeps the block depth at 1/NBLK of the frame.
//
// Purely combinational. The same scrambler is used when the integral
// image is written and when it is queried, so both agree on the layout.
module addr_scrambler #(
  parameter int unsigned ADDR_W = 19,   // linear pixel address width
  parameter int unsigned NBLK   = 32,   // number of memory blocks (power of 2, >= 2)
  localparam int unsigned BLK_W = $clog2(NBLK),
  localparam int unsigned ROW_W = ADDR_W - BLK_W
) (
  input  logic [ADDR_W-1:0] addr,       // linear address y*IMG_W + x
  output logic [ADDR_W-1:0] scr_addr,   // bit-reversed address
  output logic [BLK_W-1:0]  blk,        // selected memory block
  output logic [ROW_W-1:0]  row         // word inside that block
);

  always_comb begin
    for (int i = 0; i < int'(ADDR_W); i++) scr_addr[i] = addr[ADDR_W-1-i];
  end

  assign blk = scr_addr[ADDR_W-1 -: BLK_W];
  assign row = addr[ADDR_W-1:BLK_W];

endmodule
