// adder16: 16-bit two's-complement adder of the FIR partial-sum chain.
//
// Combinational; the carry out is dropped, so the sum wraps modulo 2^W, which
// is what a plain 16-bit adder does. Wrap-around rather than saturation is
// this design's choice: overflow handling is not specified for the filter.
module adder16 #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] s
);

  always_comb s = a + b;

endmodule
