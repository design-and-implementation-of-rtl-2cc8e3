// tb_fir_unfolding_top: end-to-end test of the three 2-parallel filters
// (11-, 2- and 4-tap) in the top, with every parameter at its default
// (100 MHz system clock, 2.4 MHz samples, 1.2 MHz blocks).
//
// Each filter gets its own random input stream, one sample per sample strobe.
// On every y_valid the pair y(2k), y(2k+1) is compared with a direct
// convolution of that filter's input computed here. Halfway through, reset is
// pulsed in the middle of a block; afterwards every filter must start again
// from an all-zero history with sample 0 as an even sample.
// Mechanisms counted, each of which must occur: sample strobes, block
// strobes, strobe spacings of both 41 and 42 cycles (the fractional rate),
// checked output pairs per filter, outputs held between pairs, and the
// mid-stream reset. The unfolded recursive example is driven alongside with
// one sample pair per 2-tap block strobe (a = 1, then a = -1 after the
// reset) and checked against the serial recursion y(n) = a*y(n-7) + x(n).
module tb_fir_unfolding_top;
  import fir_pkg::*;

  localparam int NSAMP  = 4096;
  localparam int CYCLES = 60000;    // per half: 0.6 ms

  int h [3][11] = '{
    '{-15, -13, 7, 38, 66, 78, 66, 38, 7, -13, -15},
    '{102, 102, 0, 0, 0, 0, 0, 0, 0, 0, 0},
    '{2, 64, 64, 2, 0, 0, 0, 0, 0, 0, 0}
  };
  int ntaps [3] = '{11, 2, 4};

  logic       clk = 0, rst_n = 0;
  sample_t    xin [3];
  acc_t       y0 [3], y1 [3];
  logic [2:0] sample_tick, frame_tick, y_valid;
  int         xs [3][NSAMP];
  int         idx [3] = '{0, 0, 0};
  int checks = 0, failures = 0;
  int n_sample = 0, n_frame = 0, n_gap41 = 0, n_gap42 = 0, n_hold = 0, n_reset = 0;
  int n_pairs [3] = '{0, 0, 0};
  logic    ex_en;
  coef_t   ex_a = 8'sd1;
  sample_t ex_x0 = '0, ex_x1 = '0;
  acc_t    ex_y0, ex_y1;
  int      ex_ys [2*NSAMP];
  int      ex_k = 0, n_ex = 0;

  fir_unfolding_top dut (
    .clk(clk), .rst_n(rst_n),
    .xin_11(xin[0]), .y2k_11(y0[0]), .y2kplus1_11(y1[0]),
    .xin_2(xin[1]),  .y2k_2(y0[1]),  .y2kplus1_2(y1[1]),
    .xin_4(xin[2]),  .y2k_4(y0[2]),  .y2kplus1_4(y1[2]),
    .sample_tick(sample_tick), .frame_tick(frame_tick), .y_valid(y_valid),
    .ex_en(ex_en), .ex_a(ex_a), .ex_x2k(ex_x0), .ex_x2kp1(ex_x1), .ex_y2k(ex_y0), .ex_y2kp1(ex_y1)
  );

  // example loop: one block per 2-tap block strobe, next pair presented after it
  assign ex_en = frame_tick[1] && ex_k > 0;
  always @(posedge clk)
    if (!rst_n) ex_k <= 0;
    else if (frame_tick[1]) begin
      ex_x0 <= sample_t'($urandom);
      ex_x1 <= sample_t'($urandom);
      ex_k  <= ex_k + 1;
    end

  always #5 clk = ~clk;

  for (genvar f = 0; f < 3; f++) begin : g_src
    assign xin[f] = sample_t'(xs[f][idx[f] % NSAMP]);
  end

  always @(posedge clk)
    for (int f = 0; f < 3; f++)
      if (!rst_n) idx[f] <= 0;
      else if (sample_tick[f]) idx[f] <= idx[f] + 1;

  initial begin
    repeat (2 * CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  function automatic int conv(input int f, input int n);
    int s = 0;
    for (int j = 0; j < ntaps[f]; j++)
      if (n - j >= 0) s += h[f][j] * xs[f][(n - j) % NSAMP];
    return int'($signed(16'(s)));
  endfunction

  task automatic run(input int cycles);
    int   k [3] = '{0, 0, 0};
    int   gap = 0;
    acc_t h0 [3], h1 [3];
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      gap++;
      if (sample_tick[0]) begin
        n_sample++;
        if (gap == 41) n_gap41++;
        if (gap == 42) n_gap42++;
        gap = 0;
      end
      if (frame_tick[0]) n_frame++;
      if (y_valid[1] && ex_k > 0) begin
        int n = 2 * (ex_k - 1);
        int fb0 = (n - 7 >= 0) ? ex_ys[n-7] : 0;
        int fb1 = (n - 6 >= 0) ? ex_ys[n-6] : 0;
        ex_ys[n]   = int'($signed(16'(int'(ex_a) * fb0 + int'(ex_x0))));
        ex_ys[n+1] = int'($signed(16'(int'(ex_a) * fb1 + int'(ex_x1))));
        checks += 2;
        n_ex++;
        if (int'(ex_y0) != ex_ys[n] || int'(ex_y1) != ex_ys[n+1])
          fail($sformatf("example y(%0d), y(%0d): got %0d, %0d expected %0d, %0d",
                         n, n+1, ex_y0, ex_y1, ex_ys[n], ex_ys[n+1]));
      end
      for (int f = 0; f < 3; f++) begin
        if (y_valid[f]) begin
          checks += 3;
          if (idx[f] != 2*k[f] + 2) fail($sformatf("filter %0d pair %0d: %0d samples taken", f, k[f], idx[f]));
          if (int'(y0[f]) != conv(f, 2*k[f]))
            fail($sformatf("filter %0d y(%0d): got %0d expected %0d", f, 2*k[f], y0[f], conv(f, 2*k[f])));
          if (int'(y1[f]) != conv(f, 2*k[f]+1))
            fail($sformatf("filter %0d y(%0d): got %0d expected %0d", f, 2*k[f]+1, y1[f], conv(f, 2*k[f]+1)));
          h0[f] = y0[f]; h1[f] = y1[f];
          k[f]++;
          n_pairs[f]++;
        end else if (k[f] > 0) begin
          checks++;
          n_hold++;
          if (y0[f] != h0[f] || y1[f] != h1[f]) fail($sformatf("filter %0d outputs changed between pairs", f));
        end
      end
    end
  endtask

  initial begin
    for (int f = 0; f < 3; f++)
      for (int i = 0; i < NSAMP; i++) xs[f][i] = int'($signed(8'($urandom)));
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(CYCLES);
    // reset in the middle of a block: wait for the even sample strobe
    @(negedge clk);
    while (!(sample_tick[0] && !frame_tick[0])) @(negedge clk);
    repeat (5) @(negedge clk);
    rst_n = 0;
    n_reset++;
    ex_a = -8'sd1;
    for (int f = 0; f < 3; f++)
      for (int i = 0; i < NSAMP; i++) xs[f][i] = int'($signed(8'($urandom)));
    repeat (2) @(negedge clk);
    checks++;
    if (y0[0] != 0 || y1[0] != 0 || y0[1] != 0 || y1[1] != 0 || y0[2] != 0 || y1[2] != 0)
      fail("outputs not cleared by reset");
    rst_n = 1;
    run(CYCLES);

    $display("sample strobes=%0d block strobes=%0d gaps41=%0d gaps42=%0d holds=%0d resets=%0d",
             n_sample, n_frame, n_gap41, n_gap42, n_hold, n_reset);
    $display("pairs: 11-tap=%0d 2-tap=%0d 4-tap=%0d example=%0d", n_pairs[0], n_pairs[1], n_pairs[2], n_ex);
    checks += 9;
    if (n_ex < 1000) fail($sformatf("example loop checked only %0d pairs", n_ex));
    if (n_sample == 0) fail("no sample strobe");
    if (n_frame == 0)  fail("no block strobe");
    if (n_gap41 == 0 || n_gap42 == 0) fail("fractional strobe spacing not seen");
    if (n_hold == 0)   fail("no hold between pairs");
    if (n_reset == 0)  fail("no mid-stream reset");
    for (int f = 0; f < 3; f++)
      if (n_pairs[f] < 1000) fail($sformatf("filter %0d produced only %0d pairs", f, n_pairs[f]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
