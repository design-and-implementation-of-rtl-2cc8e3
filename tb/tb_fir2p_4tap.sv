// tb_fir2p_4tap: end-to-end test of the complete 2-parallel 4-tap filter at
// its default 100 MHz system clock and 2.4 MHz sample rate.
//
// The testbench presents a new sample after every sample strobe and, on every
// y_valid, compares y(2k), y(2k+1) with a direct convolution computed here
// from the serial input (impulse response h = '{2, 64, 64, 2}, 16-bit wrap).
// It also checks the rates and timing: y_valid one cycle after each block
// strobe, 83 or 84 system cycles between pairs, 1200 pairs (2400 samples)
// per millisecond, the pair k made of samples 2k and 2k+1, and outputs that
// hold between pairs.
module tb_fir2p_4tap;
  import fir_pkg::*;

  localparam int NSAMP = 2400 + 40;
  int h [4] = '{2, 64, 64, 2};

  logic    clk = 0, rst_n = 0;
  sample_t xin;
  logic    sample_tick, frame_tick, y_valid;
  acc_t    y2k, y2kplus1;
  int      xs [NSAMP];
  int      idx = 0;             // samples consumed so far
  int checks = 0, failures = 0;

  fir2p_4tap dut (.clk(clk), .rst_n(rst_n), .xin(xin), .sample_tick(sample_tick),
    .frame_tick(frame_tick), .y_valid(y_valid), .y2k(y2k), .y2kplus1(y2kplus1));

  always #5 clk = ~clk;   // 100 MHz

  assign xin = sample_t'(xs[idx < NSAMP ? idx : NSAMP-1]);
  always @(posedge clk) if (rst_n && sample_tick) idx <= idx + 1;

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  function automatic int conv(input int n);
    int s = 0;
    for (int j = 0; j < 4; j++)
      if (n - j >= 0) s += h[j] * xs[n - j];
    return int'($signed(16'(s)));
  endfunction

  initial begin
    int k, cyc, last_valid, last_frame;
    acc_t hold0, hold1;
    // stimulus: random samples
    for (int i = 0; i < NSAMP; i++)
      xs[i] = int'($signed(8'($urandom)));
    k = 0; last_valid = -1; last_frame = -100;
    hold0 = '0; hold1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 100003; cyc++) begin  // 1 ms plus the two strobe register stages
      @(negedge clk);
      if (frame_tick) last_frame = cyc;
      if (y_valid) begin
        checks += 4;
        if (last_frame != cyc - 1) fail($sformatf("pair %0d: y_valid not one cycle after block strobe", k));
        if (idx != 2*k + 2) fail($sformatf("pair %0d: %0d samples consumed", k, idx));
        if (last_valid >= 0 && !(cyc - last_valid inside {83, 84}))
          fail($sformatf("pair %0d: %0d cycles since previous pair", k, cyc - last_valid));
        if (int'(y2k) != conv(2*k))
          fail($sformatf("y(%0d): got %0d expected %0d", 2*k, y2k, conv(2*k)));
        if (int'(y2kplus1) != conv(2*k+1))
          fail($sformatf("y(%0d): got %0d expected %0d", 2*k+1, y2kplus1, conv(2*k+1)));
        hold0 = y2k; hold1 = y2kplus1;
        last_valid = cyc;
        k++;
      end else if (k > 0) begin
        checks++;
        if (y2k != hold0 || y2kplus1 != hold1) fail($sformatf("outputs changed between pairs at cycle %0d", cyc));
      end
    end
    checks++;
    if (k != 1200) fail($sformatf("%0d output pairs in 1 ms, expected 1200", k));
    $display("pairs=%0d samples=%0d", k, idx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
