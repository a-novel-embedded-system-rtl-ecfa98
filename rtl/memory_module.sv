// memory_module: the distributed integral-image memory with collision
// resolving.
//
// The integral image is spread over NBLK memory blocks by the 1-1 address
// scrambler (bit reversal). A batch of NQ query addresses is accepted in
// one cycle: each address goes through its own scrambler and its block
// row is kept in an address latch until the query is served. Every block
// has a collision resolver that picks out the queries aimed at it and
// issues them one per cycle. Blocks work independently, so a batch takes
// ceil(k/RD_PORTS) cycles, k being the largest number of its queries that
// share a block (RD_PORTS = 2: both ports of the dual-port blocks read).
// The read data leaves on NBLK*RD_PORTS output ports, port b*RD_PORTS+p
// being read port p of block b, each word with
// the label (query index) of the query it answers; data may leave out of
// order. When the last query of a batch is read, the batch tag comes out
// in the same cycle as that last word.
//
// The load port writes one integral-image word per cycle at a linear
// address; the same scrambler places it. Loading and querying are not
// meant to overlap in time.
//
// Handshake: q_valid/q_ready. q_ready is high when no query will be left
// pending after the current cycle, so back-to-back batches leave no idle
// cycle. Read data appears one cycle after issue.
module memory_module #(
  parameter int unsigned IMG_W  = 640,
  parameter int unsigned IMG_H  = 480,
  parameter int unsigned NBLK   = 32,
  parameter int unsigned NQ     = 16,
  parameter int unsigned DATA_W = 27,
  parameter int unsigned TAG_W  = 3,
  parameter int unsigned RD_PORTS = 2,
  localparam int unsigned NPIX   = IMG_W * IMG_H,
  localparam int unsigned ADDR_W = $clog2(NPIX),
  localparam int unsigned BLK_W  = $clog2(NBLK),
  localparam int unsigned ROW_W  = ADDR_W - BLK_W,
  localparam int unsigned DEPTH  = (NPIX + NBLK - 1) / NBLK,
  localparam int unsigned LBL_W  = $clog2(NQ),
  localparam int unsigned NPORT  = NBLK * RD_PORTS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // load port
  input  logic                       wr_en,
  input  logic [ADDR_W-1:0]          wr_addr,
  input  logic [DATA_W-1:0]          wr_data,
  // query batch
  input  logic                       q_valid,
  output logic                       q_ready,
  input  logic [NQ-1:0][ADDR_W-1:0]  q_addr,
  input  logic [TAG_W-1:0]           q_tag,
  // labelled data, RD_PORTS ports per block
  output logic [NPORT-1:0]            d_valid,
  output logic [NPORT-1:0][LBL_W-1:0] d_label,
  output logic [NPORT-1:0][DATA_W-1:0] d_data,
  // batch completion, aligned with the batch's last data word
  output logic                       tag_valid,
  output logic [TAG_W-1:0]           tag_out,
  // activity, for performance counting
  output logic [NBLK-1:0]            blk_busy
);

  logic [NQ-1:0][BLK_W-1:0] in_blk;
  logic [NQ-1:0][ROW_W-1:0] in_row;
  logic [NQ-1:0][ROW_W-1:0] row_lat;
  logic [NBLK-1:0]          done_next;
  logic [NBLK-1:0][RD_PORTS-1:0]            rd_en;
  logic [NBLK-1:0][RD_PORTS-1:0][ROW_W-1:0] rd_row;
  logic [NBLK-1:0][RD_PORTS-1:0][LBL_W-1:0] rd_label;
  logic [NBLK-1:0][RD_PORTS-1:0][$clog2(DEPTH)-1:0] rd_addr;
  logic [TAG_W-1:0]         tag_lat;
  logic                     batch_active;
  logic                     accept, last_issue;

  // One scrambler per query
  for (genvar q = 0; q < int'(NQ); q++) begin : g_qscr
    logic [ADDR_W-1:0] unused_scr;
    addr_scrambler #(.ADDR_W(ADDR_W), .NBLK(NBLK)) u_scr (
      .addr(q_addr[q]), .scr_addr(unused_scr), .blk(in_blk[q]), .row(in_row[q]));
  end

  // Scrambler on the load port
  logic [ADDR_W-1:0] wr_scr;
  logic [BLK_W-1:0]  wr_blk;
  logic [ROW_W-1:0]  wr_row;
  addr_scrambler #(.ADDR_W(ADDR_W), .NBLK(NBLK)) u_wscr (
    .addr(wr_addr), .scr_addr(wr_scr), .blk(wr_blk), .row(wr_row));

  assign q_ready    = &done_next;
  assign accept     = q_valid && q_ready;
  assign last_issue = batch_active && (&done_next);

  // Address latches and batch bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_lat      <= '0;
      tag_lat      <= '0;
      batch_active <= 1'b0;
      tag_valid    <= 1'b0;
      tag_out      <= '0;
    end else begin
      if (accept) begin
        row_lat <= in_row;
        tag_lat <= q_tag;
      end
      if (accept)          batch_active <= 1'b1;
      else if (last_issue) batch_active <= 1'b0;
      tag_valid <= last_issue;
      if (last_issue) tag_out <= tag_lat;
    end
  end

  for (genvar b = 0; b < int'(NBLK); b++) begin : g_blk
    collision_resolver #(
      .NQ(NQ), .NBLK(NBLK), .BLK_ID(b), .ROW_W(ROW_W), .RD_PORTS(RD_PORTS)
    ) u_res (
      .clk, .rst_n,
      .load(accept), .in_blk(in_blk), .row_lat(row_lat),
      .rd_en(rd_en[b]), .rd_row(rd_row[b]), .rd_label(rd_label[b]),
      .done_next(done_next[b]), .pending()
    );

    for (genvar p = 0; p < int'(RD_PORTS); p++) begin : g_addr
      assign rd_addr[b][p] = rd_row[b][p][$clog2(DEPTH)-1:0];
    end

    mem_block #(.DEPTH(DEPTH), .DATA_W(DATA_W), .LABEL_W(LBL_W), .RD_PORTS(RD_PORTS)) u_mem (
      .clk,
      .wr_en(wr_en && (wr_blk == BLK_W'(b))),
      .wr_addr(wr_row[$clog2(DEPTH)-1:0]),
      .wr_data(wr_data),
      .rd_en(rd_en[b]),
      .rd_addr(rd_addr[b]),
      .rd_label(rd_label[b]),
      .rd_valid(d_valid[b*RD_PORTS +: RD_PORTS]),
      .rd_label_q(d_label[b*RD_PORTS +: RD_PORTS]),
      .rd_data(d_data[b*RD_PORTS +: RD_PORTS])
    );

    assign blk_busy[b] = |rd_en[b];
  end

endmodule
