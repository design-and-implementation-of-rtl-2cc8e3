// fir_unfolding_top: the three 2-parallel broadcast FIR filters of this
// design, 11-tap, 2-tap and 4-tap, side by side on one system clock and reset.
//
// The filters are independent designs (each is a complete filter with its own
// rate generator, serial-to-parallel converter and unfolded datapath), so each
// keeps its own input and output ports. Bit 0 of the strobe vectors belongs to
// the 11-tap filter, bit 1 to the 2-tap and bit 2 to the 4-tap filter. The
// timing of each filter is described in fir2p_11tap.
//
// Beside them, with ports of its own (ex_*), stands unfolded_iir7: the
// 2-unfolded recursive loop y(n) = a*y(n-7) + x(n), the worked example of the
// unfolding technique. It takes a sample pair and its block strobe directly.
// Placing all four in one top is this design's choice.
module fir_unfolding_top
  import fir_pkg::*;
#(
  parameter int unsigned SYS_CLK_HZ = 100_000_000,
  parameter int unsigned SAMPLE_HZ  = 2_400_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  sample_t    xin_11,
  output acc_t       y2k_11,
  output acc_t       y2kplus1_11,
  input  sample_t    xin_2,
  output acc_t       y2k_2,
  output acc_t       y2kplus1_2,
  input  sample_t    xin_4,
  output acc_t       y2k_4,
  output acc_t       y2kplus1_4,
  output logic [2:0] sample_tick,
  output logic [2:0] frame_tick,
  output logic [2:0] y_valid,
  input  logic       ex_en,
  input  coef_t      ex_a,
  input  sample_t    ex_x2k,
  input  sample_t    ex_x2kp1,
  output acc_t       ex_y2k,
  output acc_t       ex_y2kp1
);

  fir2p_11tap #(.SYS_CLK_HZ(SYS_CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_fir11 (
    .clk(clk), .rst_n(rst_n), .xin(xin_11),
    .sample_tick(sample_tick[0]), .frame_tick(frame_tick[0]), .y_valid(y_valid[0]),
    .y2k(y2k_11), .y2kplus1(y2kplus1_11)
  );

  fir2p_2tap #(.SYS_CLK_HZ(SYS_CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_fir2 (
    .clk(clk), .rst_n(rst_n), .xin(xin_2),
    .sample_tick(sample_tick[1]), .frame_tick(frame_tick[1]), .y_valid(y_valid[1]),
    .y2k(y2k_2), .y2kplus1(y2kplus1_2)
  );

  fir2p_4tap #(.SYS_CLK_HZ(SYS_CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_fir4 (
    .clk(clk), .rst_n(rst_n), .xin(xin_4),
    .sample_tick(sample_tick[2]), .frame_tick(frame_tick[2]), .y_valid(y_valid[2]),
    .y2k(y2k_4), .y2kplus1(y2kplus1_4)
  );

  unfolded_iir7 u_example (
    .clk(clk), .rst_n(rst_n), .en(ex_en), .a(ex_a),
    .x2k(ex_x2k), .x2kp1(ex_x2kp1), .y2k(ex_y2k), .y2kp1(ex_y2kp1)
  );

endmodule
