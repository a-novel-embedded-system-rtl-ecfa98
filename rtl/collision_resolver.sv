// collision_resolver: collision detection and serialization for one block.
//
// Every memory block has one resolver. When a batch of NQ query addresses
// is accepted, the resolver compares the block number of every query with
// its own (BLK_ID); the matching queries are the ones that collide on this
// block. It then serializes them onto the block's RD_PORTS read ports
// (two for a dual-port block RAM): each cycle it issues up to RD_PORTS
// pending queries, each with its label (query index 0..NQ-1), until none
// is left. The pending queries are picked by a ripple chain over the
// queries, one simple stage per query in cascade, query 0 first; each
// stage takes the next free port if its query is pending. The chain order
// is this design's choice. Collisions on one block never delay another
// block, so data leaves the memory out of order and the label tells which
// query it answers.
//
// Timing: `load` with `in_blk` sets the pending mask at the clock edge;
// the first reads are issued in the next cycle; a block hit by k queries
// is busy ceil(k/RD_PORTS) cycles. `done_next` is high when nothing will
// be pending after the current cycle, so the memory module can load the
// next batch in the same cycle as the last issue and no cycle is lost
// between batches.
module collision_resolver #(
  parameter int unsigned NQ       = 16,
  parameter int unsigned NBLK     = 32,
  parameter int unsigned BLK_ID   = 0,
  parameter int unsigned ROW_W    = 14,
  parameter int unsigned RD_PORTS = 2,
  localparam int unsigned BLK_W   = $clog2(NBLK),
  localparam int unsigned LBL_W   = $clog2(NQ)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            load,       // accept a new batch
  input  logic [NQ-1:0][BLK_W-1:0]        in_blk,     // block of each new query
  input  logic [NQ-1:0][ROW_W-1:0]        row_lat,    // latched rows of the batch
  output logic [RD_PORTS-1:0]             rd_en,
  output logic [RD_PORTS-1:0][ROW_W-1:0]  rd_row,
  output logic [RD_PORTS-1:0][LBL_W-1:0]  rd_label,
  output logic                            done_next,  // nothing pending after this cycle
  output logic [NQ-1:0]                   pending     // queries still waiting
);

  typedef enum logic {S_IDLE, S_SERIAL} state_e;
  state_e state;

  logic [NQ-1:0]       grant;
  logic [NQ-1:0]       match;
  logic [RD_PORTS-1:0] slot_used;

  // Collision detect: which queries of the incoming batch hit this block.
  always_comb begin
    for (int q = 0; q < int'(NQ); q++) match[q] = (in_blk[q] == BLK_W'(BLK_ID));
  end

  // Serializer: a cascade in which each stage takes the next free read
  // port if its query is pending.
  always_comb begin
    int unsigned used;
    used      = 0;
    grant     = '0;
    slot_used = '0;
    rd_row    = '0;
    rd_label  = '0;
    for (int q = 0; q < int'(NQ); q++) begin
      if (pending[q] && used < RD_PORTS) begin
        grant[q]        = 1'b1;
        slot_used[used] = 1'b1;
        rd_row[used]    = row_lat[q];
        rd_label[used]  = LBL_W'(q);
        used++;
      end
    end
  end

  assign rd_en     = (state == S_SERIAL) ? slot_used : '0;
  assign done_next = ((pending & ~grant) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      state   <= S_IDLE;
    end else if (load) begin
      pending <= match;
      state   <= (match != '0) ? S_SERIAL : S_IDLE;
    end else begin
      pending <= pending & ~grant;
      state   <= done_next ? S_IDLE : S_SERIAL;
    end
  end

  // A new batch may only be loaded once this block has no query left
  // after the current cycle.
  assert property (@(posedge clk) disable iff (!rst_n) load |-> done_next)
    else $error("collision_resolver %0d: batch loaded while queries pending", BLK_ID);

endmodule
