// comp_core: one computation core, the box sum of an integral image.
//
// Given the integral image values at the four corners of a box,
// A = I(x+w-1, y+h-1), B = I(x-1, y+h-1), C = I(x+w-1, y-1),
// D = I(x-1, y-1), the sum of the pixels inside the box is A - B - C + D.
// The result is exact in DATA_W bits because a box sum never exceeds the
// largest integral value, and wrap-around in the intermediate terms
// cancels. Purely combinational.
module comp_core #(
  parameter int unsigned DATA_W = 27
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [DATA_W-1:0] c,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] sum
);

  assign sum = a - b - c + d;

endmodule
