// serial_to_parallel: turns the serial input stream x(n), one sample per
// sample period T/2, into the pair x(2k), x(2k+1) that the 2-parallel filter
// consumes once per block period T.
//
// As in the filter's converter drawing, one delay register running at the
// sample rate holds the previous sample, and two switches that close once per
// block take the delayed sample as x(2k) and the current one as x(2k+1).
// Here the switches are two output registers loaded on frame_tick, so both
// outputs change in the same cycle and are held for the whole block.
//
// Interface: xin is taken in a cycle where sample_tick is 1; frame_tick must
// coincide with every second sample_tick (the odd sample). x2k and x2kp1
// change in the cycle after frame_tick. Reset (synchronous, active low)
// clears all three registers.
module serial_to_parallel #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample_tick,
  input  logic         frame_tick,
  input  logic [W-1:0] xin,
  output logic [W-1:0] x2k,
  output logic [W-1:0] x2kp1
);

  logic [W-1:0] x_dly;   // the T/2 delay: previous input sample

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_dly <= '0;
      x2k   <= '0;
      x2kp1 <= '0;
    end else begin
      if (sample_tick) x_dly <= xin;
      if (frame_tick) begin
        x2k   <= x_dly;
        x2kp1 <= xin;
      end
    end
  end

  // The block strobe is always one of the sample strobes.
  a_frame_on_sample: assert property (@(posedge clk) disable iff (!rst_n)
    frame_tick |-> sample_tick)
    else $error("serial_to_parallel: frame_tick without sample_tick");

endmodule
