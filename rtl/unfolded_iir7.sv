// unfolded_iir7: 2-unfolded form of the first-order recursive loop
// y(n) = a * y(n-7) + x(n), the worked example of the unfolding technique
// that the FIR filters of this design are built with.
//
// Unfolding by two gives two iterations per block:
//   y(2k)   = a * y(2k-7) + x(2k)      y(2k-7) = y(2(k-4)+1): lane 1, 4 blocks back
//   y(2k+1) = a * y(2k-6) + x(2k+1)    y(2k-6) = y(2(k-3)):   lane 0, 3 blocks back
// so the single 7-delay loop becomes a cross-coupled pair of loops: lane 1's
// output reaches lane 0's multiplier through 4 block delays and lane 0's
// output reaches lane 1's multiplier through 3, still 7 delays around the
// loop, in agreement with the unfolding rule (an edge with w delays from U to
// V becomes U_i -> V_(i+w)%2 with floor((i+w)/2) delays).
//
// The loop structure is that of the example; the number formats are this
// design's choice, since the example gives none: 8-bit signed x and a, 16-bit
// signed y, and the product a*y taken modulo 2^16 (integer arithmetic, no
// scaling), so long runs wrap unless |a| is small. The delay registers
// advance when en is 1 (one block per strobe) and are cleared by the
// synchronous active-low reset, i.e. y(n) = 0 for n < 0. y2k and y2kp1 are
// combinational from the inputs and the delay registers.
module unfolded_iir7
  import fir_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  coef_t   a,
  input  sample_t x2k,
  input  sample_t x2kp1,
  output acc_t    y2k,
  output acc_t    y2kp1
);

  localparam int D_01 = 3;   // block delays on the lane 0 -> lane 1 edge
  localparam int D_10 = 4;   // block delays on the lane 1 -> lane 0 edge

  acc_t dl0 [D_01];          // delay line on lane 0's output
  acc_t dl1 [D_10];          // delay line on lane 1's output
  acc_t m0, m1;              // products, modulo 2^16

  always_comb begin
    m0    = acc_t'(a) * dl1[D_10-1];               // a * y(2k-7)
    m1    = acc_t'(a) * dl0[D_01-1];               // a * y(2k-6)
    y2k   = m0 + acc_t'(x2k);
    y2kp1 = m1 + acc_t'(x2kp1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dl0 <= '{default: '0};
      dl1 <= '{default: '0};
    end else if (en) begin
      dl0[0] <= y2k;
      dl1[0] <= y2kp1;
      for (int i = 1; i < D_01; i++) dl0[i] <= dl0[i-1];
      for (int i = 1; i < D_10; i++) dl1[i] <= dl1[i-1];
    end
  end

endmodule
