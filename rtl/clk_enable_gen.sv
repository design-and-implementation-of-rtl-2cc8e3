// clk_enable_gen: derives the input-sample rate (2.4 MHz) and the block rate
// (1.2 MHz) of the 2-parallel filter from the system clock (100 MHz), as
// one-cycle enable strobes.
//
// A phase accumulator adds SAMPLE_HZ every system cycle; whenever it reaches
// SYS_CLK_HZ it wraps and sample_tick is 1 for that cycle. The average strobe
// rate is exactly SAMPLE_HZ even when the ratio is not an integer
// (100 MHz / 2.4 MHz = 41.67: the strobes are 41 or 42 cycles apart).
// frame_tick is 1 on every second sample_tick (the one that carries an odd
// sample x(2k+1)).
//
// The two frequencies are those of the filter; deriving them as strobes on a
// single clock, and the accumulator itself, are this design's choices.
// Reset: synchronous, active low; the first strobe after reset is an even
// sample.
module clk_enable_gen #(
  parameter int unsigned SYS_CLK_HZ = 100_000_000,
  parameter int unsigned SAMPLE_HZ  = 2_400_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic sample_tick,
  output logic frame_tick
);

  localparam int ACC_W = $clog2(SYS_CLK_HZ) + 1;
  localparam logic [ACC_W-1:0] STEP = ACC_W'(SAMPLE_HZ);
  localparam logic [ACC_W-1:0] WRAP = ACC_W'(SYS_CLK_HZ);

  logic [ACC_W-1:0] acc;
  logic [ACC_W-1:0] acc_sum;
  logic             odd;     // 1 while the next strobe is an odd sample
  logic             hit;

  always_comb begin
    acc_sum = acc + STEP;
    hit     = (acc_sum >= WRAP);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc         <= '0;
      odd         <= 1'b0;
      sample_tick <= 1'b0;
      frame_tick  <= 1'b0;
    end else begin
      acc         <= hit ? acc_sum - WRAP : acc_sum;
      sample_tick <= hit;
      frame_tick  <= hit && odd;
      if (hit) odd <= !odd;
    end
  end

  initial assert (SAMPLE_HZ > 0 && 2 * SAMPLE_HZ <= SYS_CLK_HZ)
    else $error("clk_enable_gen: SAMPLE_HZ must be at most half of SYS_CLK_HZ");

endmodule
