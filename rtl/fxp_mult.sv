// fxp_mult: pipelined unsigned fixed-point multiplier.
//
// Stands for one of the hard multiplier slices of the FPGA used by the
// loop decoder. It accepts one product per cycle and returns
// (a * b) >> FRAC after STAGES cycles. The pipeline advances only while
// `en` is high, so a stalled consumer freezes it without losing data.
// One pipeline register per stage; the depth is a parameter, as the
// document describes a pipeline tunable to the wanted clock rate. The
// operand widths and the default depth of 2 are this design's choices.
module fxp_mult #(
  parameter int unsigned A_W    = 8,
  parameter int unsigned B_W    = 11,
  parameter int unsigned FRAC   = 8,
  parameter int unsigned STAGES = 2,     // >= 1
  localparam int unsigned P_W   = A_W + B_W
) (
  input  logic            clk,
  input  logic            en,
  input  logic [A_W-1:0]  a,
  input  logic [B_W-1:0]  b,
  output logic [P_W-FRAC-1:0] p
);

  logic [P_W-1:0] pipe [STAGES];

  always_ff @(posedge clk) begin
    if (en) begin
      pipe[0] <= P_W'(a) * P_W'(b);
      for (int s = 1; s < int'(STAGES); s++) pipe[s] <= pipe[s-1];
    end
  end

  assign p = pipe[STAGES-1][P_W-1:FRAC];

endmodule
