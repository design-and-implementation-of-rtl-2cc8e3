// fir2p_11tap: complete 2-parallel (2-unfolded) broadcast 11-tap filter (eleven multipliers per lane, ten delay elements).
//
// One 8-bit signed sample enters per 2.4 MHz sample strobe; the
// serial-to-parallel converter pairs them into x(2k), x(2k+1), and the
// unfolded datapath turns each pair into y(2k), y(2k+1) once per 1.2 MHz
// block strobe, so the datapath runs at half the sample rate while the filter
// keeps the full throughput. Both rates are strobes derived from the 100 MHz
// system clock by clk_enable_gen. Coefficients come from fir_pkg::COEF_11TAP:
// the original low-pass values, recovered from its published simulation
// outputs. Their sum of magnitudes is 356, so full-scale inputs can make the
// 16-bit sums wrap.
//
// Interface and timing: xin is taken in every cycle where sample_tick is 1.
// frame_tick marks the strobe of each odd sample; in the next cycle y_valid is
// 1 and y2k / y2kplus1 hold the new pair, which stays until the next y_valid.
// So y(2k) and y(2k+1) appear one system cycle after the strobe that
// delivers x(2k+1). Reset is synchronous and active low.
// The structure follows the filter drawings; the clock-enable form, the reset
// and y_valid are this design's choices.
module fir2p_11tap
  import fir_pkg::*;
#(
  parameter int unsigned SYS_CLK_HZ = 100_000_000,
  parameter int unsigned SAMPLE_HZ  = 2_400_000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t xin,
  output logic    sample_tick,
  output logic    frame_tick,
  output logic    y_valid,
  output acc_t    y2k,
  output acc_t    y2kplus1
);

  sample_t x2k, x2kp1;

  clk_enable_gen #(.SYS_CLK_HZ(SYS_CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_clk_en (
    .clk(clk), .rst_n(rst_n),
    .sample_tick(sample_tick), .frame_tick(frame_tick)
  );

  serial_to_parallel #(.W(X_W)) u_s2p (
    .clk(clk), .rst_n(rst_n),
    .sample_tick(sample_tick), .frame_tick(frame_tick),
    .xin(xin), .x2k(x2k), .x2kp1(x2kp1)
  );

  unfolded_fir_datapath #(.NTAPS(11), .COEFS(COEF_11TAP)) u_fir (
    .clk(clk), .rst_n(rst_n), .en(frame_tick),
    .x2k(x2k), .x2kp1(x2kp1), .y2k(y2k), .y2kp1(y2kplus1)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= frame_tick;
  end

endmodule
