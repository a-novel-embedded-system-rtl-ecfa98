// computation_module: turns the memory's labelled read data into the
// detector's result.
//
// Data latches: the memory returns integral-image words on NPORT ports
// (two per dual-port block), in any order, each with the label
// (0..NQ-1) of the query it answers. Every query has a data latch that
// catches the word carrying its label. When all NQ latches are full (the
// batch tag arrives with the last word) the batch is computed in one
// cycle and the latches are freed for the next batch, whose first word
// can arrive in that same cycle.
//
// Computation cores: four cores form the box sums A - B - C + D of the
// left, right, top and bottom halves of the feature box. The feature
// yields two bits, (left > right) and (top > bottom), shifted into the
// tree's leaf index; after the tree's last feature the 14-bit index reads
// the leaf posterior table. The posterior bits of a window's trees are
// added up; a window whose vote count reaches `cfg_thresh` counts as a
// detection. At the last window of the frame `result` (detections) and
// `vote_total` (all positive leaves) are presented with a one-cycle
// `result_valid` pulse. `start` clears the accumulators for a new frame.
//
// Latency: batch computed the cycle after its last word; table read one
// more cycle; votes and result one more. The block never stalls, so it
// has no ready signal. The published design gives the A-B-C+D cores, the
// labelled latches, the 2^14 x 1 bit table and a summed result; the
// two-bit feature code, the vote threshold and the result format are this
// design's choices.
module computation_module
  import tld_pkg::*;
#(
  parameter int unsigned NPORT   = 2 * TLD_NBLK,   // memory output ports
  parameter int unsigned DATA_W  = TLD_PIX_W,
  parameter int unsigned LEAF_W  = TLD_LEAF_W,
  localparam int unsigned NQ     = TLD_NQ,
  localparam int unsigned LBL_W  = $clog2(NQ),
  localparam int unsigned V_W    = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,        // clear for a new frame
  input  logic [V_W-1:0]               cfg_thresh,   // votes for a detection
  // labelled data from the memory module
  input  logic [NPORT-1:0]              d_valid,
  input  logic [NPORT-1:0][LBL_W-1:0]   d_label,
  input  logic [NPORT-1:0][DATA_W-1:0]  d_data,
  input  logic                         tag_valid,
  input  batch_tag_t                   tag_in,
  // leaf posterior table update (host)
  input  logic                         post_we,
  input  logic [LEAF_W-1:0]            post_waddr,
  input  logic                         post_wdata,
  // result
  output logic                         result_valid,
  output logic [TLD_RES_W-1:0]         result,
  output logic [TLD_RES_W-1:0]         vote_total,
  output logic                         batch_done    // one pulse per computed batch
);

  // ---------------- labelled data latches ----------------
  logic [NQ-1:0][DATA_W-1:0] lat_d;
  logic [NQ-1:0]             lat_v;
  logic [NQ-1:0]             hit;
  logic [NQ-1:0][DATA_W-1:0] hit_d;
  batch_tag_t                tag_lat;
  logic                      tag_v;
  logic                      all_v;

  always_comb begin
    hit   = '0;
    hit_d = '0;
    for (int q = 0; q < int'(NQ); q++) begin
      for (int b = 0; b < int'(NPORT); b++) begin
        if (d_valid[b] && d_label[b] == LBL_W'(q)) begin
          hit[q]   = 1'b1;
          hit_d[q] = d_data[b];
        end
      end
    end
  end

  assign all_v = (&lat_v) && tag_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_v   <= '0;
      lat_d   <= '0;
      tag_v   <= 1'b0;
      tag_lat <= '0;
    end else begin
      if (all_v) begin
        lat_v <= '0;
        tag_v <= 1'b0;
      end
      for (int q = 0; q < int'(NQ); q++) begin
        if (hit[q]) begin
          lat_v[q] <= 1'b1;
          lat_d[q] <= hit_d[q];
        end
      end
      if (tag_valid) begin
        tag_v   <= 1'b1;
        tag_lat <= tag_in;
      end
    end
  end

  // ---------------- computation cores ----------------
  logic [DATA_W-1:0] rsum [4];
  for (genvar r = 0; r < 4; r++) begin : g_core
    comp_core #(.DATA_W(DATA_W)) u_core (
      .a(lat_d[4*r + CORNER_A]), .b(lat_d[4*r + CORNER_B]),
      .c(lat_d[4*r + CORNER_C]), .d(lat_d[4*r + CORNER_D]),
      .sum(rsum[r]));
  end

  logic [1:0]        fbits;
  logic [LEAF_W-1:0] code, code_n;
  assign fbits  = {rsum[R_LEFT] > rsum[R_RIGHT], rsum[R_TOP] > rsum[R_BOTTOM]};
  assign code_n = {code[LEAF_W-3:0], fbits};

  // ---------------- leaf posterior lookup ----------------
  logic       post_bit;
  logic       s2_v;
  batch_tag_t s2_tag;

  leaf_posterior_table #(.IDX_W(LEAF_W)) u_post (
    .clk, .we(post_we), .waddr(post_waddr), .wdata(post_wdata),
    .rd_en(all_v && tag_lat.last_feat), .raddr(code_n), .rdata(post_bit));

  // ---------------- votes and result ----------------
  logic [V_W-1:0]       votes, votes_n;
  logic [TLD_RES_W-1:0] det, det_n, tot_n;
  assign votes_n = votes + V_W'(post_bit);
  assign tot_n   = vote_total + TLD_RES_W'(post_bit);
  assign det_n   = det + TLD_RES_W'(votes_n >= cfg_thresh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code         <= '0;
      s2_v         <= 1'b0;
      s2_tag       <= '0;
      votes        <= '0;
      det          <= '0;
      vote_total   <= '0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      s2_v         <= all_v && tag_lat.last_feat;
      s2_tag       <= tag_lat;
      result_valid <= 1'b0;
      if (all_v) code <= tag_lat.last_feat ? '0 : code_n;
      if (start) begin
        code       <= '0;
        votes      <= '0;
        det        <= '0;
        vote_total <= '0;
      end else if (s2_v) begin
        vote_total <= tot_n;
        if (s2_tag.last_tree) begin
          votes <= '0;
          det   <= det_n;
        end else begin
          votes <= votes_n;
        end
        if (s2_tag.last_win) begin
          result       <= det_n;
          result_valid <= 1'b1;
        end
      end
    end
  end

  assign batch_done = all_v;

  // A latch may only be refilled once its batch has been computed.
  for (genvar q = 0; q < int'(NQ); q++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) hit[q] |-> (!lat_v[q] || all_v))
      else $error("computation_module: data latch %0d overwritten", q);
  end

endmodule
