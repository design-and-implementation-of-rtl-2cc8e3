// mult8x8: signed 8 x 8 -> 16-bit multiplier, one per tap and lane of the
// unfolded FIR datapath (sample times coefficient).
//
// Purely combinational. Both operands are two's complement; the full-width
// product never overflows 16 bits. The filter description names an 8x8
// multiplier without giving its structure, so this is written as a plain
// signed multiply for synthesis to map (DSP block or LUT array).
module mult8x8 #(
  parameter int A_W = 8,
  parameter int B_W = 8
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  always_comb p = a * b;

endmodule
