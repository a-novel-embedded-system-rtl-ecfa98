// mem_block: one block of the distributed integral-image memory.
//
// A dual-port on-chip RAM, as a block RAM of an FPGA. While a frame is
// loaded, port 0 writes one integral-image word per cycle. During
// detection both ports read: the block's collision resolver issues up to
// RD_PORTS reads per cycle, and each word comes out on the next cycle
// (registered output, one cycle of read latency) with the label of its
// query delayed alongside, so the data can be matched to its query
// further on. 32 such blocks of 9600 x 27 bits hold a whole 640x480
// integral image. Dual-port blocks are the published configuration; using
// port 0 for writing in the load phase and both ports for reading in the
// detection phase, and the one-cycle latency, are this design's choices.
// A write and a read on port 0 in the same cycle are not allowed.
module mem_block #(
  parameter int unsigned DEPTH    = 9600,  // words per block
  parameter int unsigned DATA_W   = 27,    // integral image word width
  parameter int unsigned LABEL_W  = 4,     // query label width
  parameter int unsigned RD_PORTS = 2,     // read ports (1 or 2)
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic                              clk,
  // write (load), shares port 0
  input  logic                              wr_en,
  input  logic [AW-1:0]                     wr_addr,
  input  logic [DATA_W-1:0]                 wr_data,
  // reads (query)
  input  logic [RD_PORTS-1:0]               rd_en,
  input  logic [RD_PORTS-1:0][AW-1:0]       rd_addr,
  input  logic [RD_PORTS-1:0][LABEL_W-1:0]  rd_label,
  output logic [RD_PORTS-1:0]               rd_valid,    // one cycle after rd_en
  output logic [RD_PORTS-1:0][LABEL_W-1:0]  rd_label_q,
  output logic [RD_PORTS-1:0][DATA_W-1:0]   rd_data
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  for (genvar p = 0; p < int'(RD_PORTS); p++) begin : g_port
    always_ff @(posedge clk) begin
      if (rd_en[p]) begin
        rd_data[p]    <= mem[rd_addr[p]];
        rd_label_q[p] <= rd_label[p];
      end
    end
  end

  // rd_valid needs no reset of its own: it follows rd_en, which the
  // collision resolver holds low in reset.
  always_ff @(posedge clk) rd_valid <= rd_en;

  assert property (@(posedge clk) !(wr_en && rd_en[0]))
    else $error("mem_block: write and read on port 0 in the same cycle");

endmodule
