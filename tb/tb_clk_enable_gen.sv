// tb_clk_enable_gen: runs the rate generator at its default 100 MHz / 2.4 MHz
// setting and checks
//   - sample strobes are 41 or 42 system cycles apart (100 / 2.4 = 41.67),
//   - exactly 2400 sample strobes and 1200 block strobes occur in 100000
//     system cycles (1 ms), i.e. the 2.4 MHz and 1.2 MHz rates are exact,
//   - every block strobe coincides with a sample strobe, and sample and
//     block strobes alternate: even sample, odd sample + block strobe.
module tb_clk_enable_gen;
  logic clk = 0, rst_n = 0;
  logic sample_tick, frame_tick;
  int checks = 0, failures = 0;
  int n_sample = 0, n_frame = 0, gap = 0, n41 = 0, n42 = 0;
  int n_since_frame = 0;

  clk_enable_gen dut (.clk(clk), .rst_n(rst_n), .sample_tick(sample_tick), .frame_tick(frame_tick));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 100000; c++) begin
      @(posedge clk); #1;
      gap++;
      if (frame_tick && !sample_tick) fail("frame strobe without sample strobe");
      if (sample_tick) begin
        n_sample++;
        if (n_sample > 1) begin
          checks++;
          if (gap == 41) n41++;
          else if (gap == 42) n42++;
          else fail($sformatf("sample gap %0d", gap));
        end
        gap = 0;
        n_since_frame++;
        if (frame_tick) begin
          n_frame++;
          checks++;
          if (n_since_frame != 2) fail($sformatf("%0d sample strobes in a block", n_since_frame));
          n_since_frame = 0;
        end else begin
          checks++;
          if (n_since_frame != 1) fail("block strobe missing on odd sample");
        end
      end
    end
    checks += 2;
    if (n_sample != 2400) fail($sformatf("sample strobes in 1 ms: %0d", n_sample));
    if (n_frame != 1200)  fail($sformatf("block strobes in 1 ms: %0d", n_frame));
    checks++;
    if (n41 == 0 || n42 == 0) fail("expected both 41- and 42-cycle gaps");
    $display("samples=%0d frames=%0d gaps41=%0d gaps42=%0d", n_sample, n_frame, n41, n42);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
