// tld_top: random-forest object detector with a distributed,
// scrambled integral-image memory (OpenTLD detection stage).
//
// Load phase: the host streams the 8-bit grey frame in raster order
// (pix_*). The integral unit turns it into integral-image words on the
// fly, and each word is written, through the bit-reversal address
// scrambler, into one of NBLK memory blocks. `loaded` rises when the
// whole frame is stored.
//
// Alternatively the host may write integral-image words itself over the
// data bus (bus_we/bus_addr/bus_data, one word per cycle at a linear
// address); they take the same scrambled path into the blocks. The
// integral unit has priority when both write in the same cycle.
//
// Detection phase: `det_start` runs the loop decoder over all configured
// scales, window positions, trees and features. Each feature becomes a
// batch of 16 integral-image queries. The memory module serves a batch in
// as many cycles as the largest number of its queries that fall in one
// block, divided by the RD_PORTS read ports of a dual-port block (the
// collision resolvers serialize those), and returns labelled data out of
// order. The computation module rebuilds each batch, forms
// the feature bits and leaf indices, looks up the leaf posterior table
// and counts the windows whose votes reach `cfg_thresh`. `result_valid`
// pulses with the 32-bit result (detections) and the total vote count.
//
// Host-side parts stay outside: the streaming link that carries pixels,
// table updates and the result, and the processor running the rest of
// the tracker. Their signals are the ports of this module. Coefficient,
// scale and posterior tables are written by the host before det_start.
//
// Performance counters: det_cycles counts cycles from det_start to the
// result, det_batches the batches issued and stall_cycles the cycles a
// ready batch waited because the memory was still resolving collisions.
module tld_top
  import tld_pkg::*;
#(
  parameter int unsigned IMG_W      = TLD_IMG_W,
  parameter int unsigned IMG_H      = TLD_IMG_H,
  parameter int unsigned NBLK       = TLD_NBLK,
  parameter int unsigned MAX_SCALES = TLD_MAX_SCALES,
  parameter int unsigned MUL_STAGES = 2,
  parameter int unsigned RD_PORTS   = 2,
  localparam int unsigned NQ     = TLD_NQ,
  localparam int unsigned ADDR_W = $clog2(IMG_W * IMG_H),
  localparam int unsigned CA_W   = $clog2(TLD_MAX_TREES * TLD_NFEAT),
  localparam int unsigned SA_W   = $clog2(MAX_SCALES),
  localparam int unsigned T_W    = $clog2(TLD_MAX_TREES + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // frame load
  input  logic                  load_start,
  input  logic                  pix_valid,
  output logic                  pix_ready,
  input  logic [7:0]            pix,
  output logic                  loaded,
  // direct integral-image load from the data bus
  input  logic                  bus_we,
  input  logic [ADDR_W-1:0]     bus_addr,
  input  logic [TLD_PIX_W-1:0]  bus_data,
  // table writes
  input  logic                  coef_we,
  input  logic [1:0]            coef_sel,
  input  logic [CA_W-1:0]       coef_addr,
  input  logic [COEF_W-1:0]     coef_wdata,
  input  logic                  scale_we,
  input  logic [SA_W-1:0]       scale_addr,
  input  scale_t                scale_wdata,
  input  logic                  post_we,
  input  logic [TLD_LEAF_W-1:0] post_waddr,
  input  logic                  post_wdata,
  // detection
  input  logic [SA_W:0]         cfg_nscales,
  input  logic [T_W-1:0]        cfg_ntrees,
  input  logic [7:0]            cfg_thresh,
  input  logic                  det_start,
  output logic                  det_busy,
  output logic                  result_valid,
  output logic [TLD_RES_W-1:0]  result,
  output logic [TLD_RES_W-1:0]  vote_total,
  // performance counters
  output logic [31:0]           det_cycles,
  output logic [31:0]           det_batches,
  output logic [31:0]           stall_cycles
);

  // ---------------- load path ----------------
  logic              iu_we, wr_en;
  logic [ADDR_W-1:0] iu_addr, wr_addr;
  logic [TLD_PIX_W-1:0] iu_data, wr_data;

  integral_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DATA_W(TLD_PIX_W)) u_integral (
    .clk, .rst_n, .start(load_start),
    .pix_valid, .pix_ready, .pix,
    .wr_en(iu_we), .wr_addr(iu_addr), .wr_data(iu_data), .loaded);

  assign wr_en   = iu_we || bus_we;
  assign wr_addr = iu_we ? iu_addr : bus_addr;
  assign wr_data = iu_we ? iu_data : bus_data;

  // ---------------- loop decoding ----------------
  logic                      q_valid, q_ready;
  logic [NQ-1:0][ADDR_W-1:0] q_addr;
  batch_tag_t                q_tag;
  logic                      ld_busy, ld_done;

  loop_decoder #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .MAX_TREES(TLD_MAX_TREES), .NFEAT(TLD_NFEAT),
    .MAX_SCALES(MAX_SCALES), .MUL_STAGES(MUL_STAGES)
  ) u_loop (
    .clk, .rst_n,
    .coef_we, .coef_sel, .coef_addr, .coef_wdata,
    .scale_we, .scale_addr, .scale_wdata,
    .cfg_nscales, .cfg_ntrees,
    .start(det_start), .busy(ld_busy), .done(ld_done),
    .q_valid, .q_ready, .q_addr, .q_tag);

  // ---------------- distributed memory ----------------
  localparam int unsigned LBL_W = $clog2(NQ);
  localparam int unsigned NPORT = NBLK * RD_PORTS;
  logic [NPORT-1:0]                d_valid;
  logic [NPORT-1:0][LBL_W-1:0]     d_label;
  logic [NPORT-1:0][TLD_PIX_W-1:0] d_data;
  logic                           tag_valid;
  logic [2:0]                     tag_bits;
  logic [NBLK-1:0]                blk_busy;

  memory_module #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .NBLK(NBLK), .NQ(NQ),
    .DATA_W(TLD_PIX_W), .TAG_W(3), .RD_PORTS(RD_PORTS)
  ) u_mem (
    .clk, .rst_n,
    .wr_en, .wr_addr, .wr_data,
    .q_valid, .q_ready, .q_addr, .q_tag(q_tag),
    .d_valid, .d_label, .d_data,
    .tag_valid, .tag_out(tag_bits), .blk_busy);

  // ---------------- computation ----------------
  logic batch_done;

  computation_module #(.NPORT(NPORT), .DATA_W(TLD_PIX_W), .LEAF_W(TLD_LEAF_W)) u_comp (
    .clk, .rst_n, .start(det_start), .cfg_thresh,
    .d_valid, .d_label, .d_data,
    .tag_valid, .tag_in(batch_tag_t'(tag_bits)),
    .post_we, .post_waddr, .post_wdata,
    .result_valid, .result, .vote_total, .batch_done);

  // ---------------- control and counters ----------------
  logic running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= 1'b0;
      det_cycles   <= '0;
      det_batches  <= '0;
      stall_cycles <= '0;
    end else begin
      if (det_start) begin
        running      <= 1'b1;
        det_cycles   <= '0;
        det_batches  <= '0;
        stall_cycles <= '0;
      end else begin
        if (result_valid) running <= 1'b0;
        if (running) det_cycles <= det_cycles + 1'b1;
        if (q_valid && q_ready) det_batches <= det_batches + 1'b1;
        if (q_valid && !q_ready) stall_cycles <= stall_cycles + 1'b1;
      end
    end
  end

  assign det_busy = running || ld_busy;

endmodule
