// leaf_posterior_table: the leaf posterior likelihood table, 2^14 x 1 bit.
//
// Every tree of the random forest ends in a leaf index built from its
// feature bits. The table holds one bit per leaf: 1 when the leaf votes
// that the window contains the tracked object. The host rewrites a few
// hundred entries between frames as the object model learns, through the
// write port, while the read port serves the computation module. The read
// is registered: data comes one cycle after rd_en. The 2^14 x 1 bit size
// is the published one; the separate write and read ports and the
// one-cycle read are this design's choices.
module leaf_posterior_table #(
  parameter int unsigned IDX_W = 14
) (
  input  logic             clk,
  input  logic             we,
  input  logic [IDX_W-1:0] waddr,
  input  logic             wdata,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] raddr,
  output logic             rdata
);

  logic mem [2**IDX_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rdata <= mem[raddr];
  end

endmodule
