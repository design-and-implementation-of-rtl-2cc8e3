// unfolded_fir_datapath: 2-unfolded (2-parallel) broadcast FIR datapath with
// NTAPS taps. Each block period it takes x(2k), x(2k+1) and produces
// y(2k), y(2k+1) of the filter y(n) = sum_k COEF[NTAPS-1-k] * x(n-k).
//
// The serial filter it unfolds is the broadcast (transposed direct) form: the
// input is broadcast to every multiplier, and the products are summed along a
// chain with one delay between taps: s_0 = c_0 x, s_i = c_i x + D(s_{i-1}),
// y = s_{N-1}. Unfolding by two duplicates every multiplier and adder into
// lane 0 (even samples) and lane 1 (odd samples); each one-delay edge of the
// chain becomes
//   lane 0 -> lane 1 with no delay:  s1_i = c_i x(2k+1) + s0_{i-1}
//   lane 1 -> lane 0 with one delay: s0_i = c_i x(2k)   + D(s1_{i-1})
// so the datapath has 2*NTAPS multipliers, 2*(NTAPS-1) adders and NTAPS-1
// delay registers, all as in the filter drawings.
//
// Timing: the delay registers load when en is 1 (the block strobe), in the
// same cycle as the lane inputs change, so they capture the partial sums of
// the block that is ending. y2k and y2kp1 are combinational from the lane
// inputs and the delay registers (no output register, as drawn). Products,
// sums and registers are 16 bits; sums wrap. Reset clears the delays, i.e.
// all samples before the first block are taken as zero.
module unfolded_fir_datapath
  import fir_pkg::*;
#(
  parameter int                      NTAPS = 11,
  parameter logic [NTAPS-1:0][C_W-1:0] COEFS = COEF_11TAP
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x2k,
  input  sample_t x2kp1,
  output acc_t    y2k,
  output acc_t    y2kp1
);

  acc_t p0 [NTAPS];   // lane 0 products c_i * x(2k)
  acc_t p1 [NTAPS];   // lane 1 products c_i * x(2k+1)
  acc_t s0 [NTAPS];   // lane 0 partial sums
  acc_t s1 [NTAPS];   // lane 1 partial sums
  acc_t d0 [NTAPS];   // delayed lane 1 partial sums feeding lane 0 (index 1..)

  for (genvar i = 0; i < NTAPS; i++) begin : g_tap
    mult8x8 #(.A_W(X_W), .B_W(C_W)) u_mul0 (.a(x2k),   .b(coef_t'(COEFS[i])), .p(p0[i]));
    mult8x8 #(.A_W(X_W), .B_W(C_W)) u_mul1 (.a(x2kp1), .b(coef_t'(COEFS[i])), .p(p1[i]));

    if (i == 0) begin : g_first
      assign s0[0] = p0[0];
      assign s1[0] = p1[0];
      assign d0[0] = '0;
    end else begin : g_chain
      dff16 #(.W(ACC_W)) u_d (
        .clk(clk), .rst_n(rst_n), .en(en), .d(s1[i-1]), .q(d0[i])
      );
      adder16 #(.W(ACC_W)) u_add0 (.a(p0[i]), .b(d0[i]),   .s(s0[i]));
      adder16 #(.W(ACC_W)) u_add1 (.a(p1[i]), .b(s0[i-1]), .s(s1[i]));
    end
  end

  assign y2k   = s0[NTAPS-1];
  assign y2kp1 = s1[NTAPS-1];

  initial assert (NTAPS >= 2) else $error("unfolded_fir_datapath: NTAPS must be at least 2");

endmodule
