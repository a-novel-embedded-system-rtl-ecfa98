// coeff_lut: table of randomized forest coefficients.
//
// The detector's features are boxes placed at random inside the scanning
// window. Their positions and sizes are drawn once (by the host) and kept
// here as fractions of the window size, one entry per (tree, feature).
// The loop decoder has four such tables, one each for the x offset,
// y offset, width and height of a feature box, each feeding one
// multiplier. Writes come from the host between frames; reads are
// registered (one cycle) and advance only while `en` is high.
// Coefficients are unsigned Q0.8 fractions, this design's choice.
module coeff_lut #(
  parameter int unsigned DEPTH = 105,   // MAX_TREES * NFEAT
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          en,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (en) rdata <= mem[raddr];
  end

endmodule
