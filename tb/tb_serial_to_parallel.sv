// tb_serial_to_parallel: feeds a random serial stream x(n) with a sample
// strobe every 3 cycles and a block strobe on every odd sample, and checks
// that after each block strobe the outputs hold (x(2k), x(2k+1)) of that
// block, that they change only in the cycle after a block strobe, and that
// reset clears them.
module tb_serial_to_parallel;
  logic       clk = 0, rst_n = 0;
  logic       sample_tick = 0, frame_tick = 0;
  logic [7:0] xin = '0, x2k, x2kp1;
  logic [7:0] xs [0:4095];
  int checks = 0, failures = 0, blocks = 0;

  serial_to_parallel dut (.clk(clk), .rst_n(rst_n), .sample_tick(sample_tick),
    .frame_tick(frame_tick), .xin(xin), .x2k(x2k), .x2kp1(x2kp1));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    logic [7:0] h_even, h_odd;
    @(negedge clk); @(negedge clk);
    checks++;
    if (x2k !== 0 || x2kp1 !== 0) fail("outputs not cleared by reset");
    rst_n = 1;
    h_even = 0; h_odd = 0;
    for (int n = 0; n < 4096; n++) begin
      xs[n] = 8'($urandom);
      // two idle cycles: outputs must hold
      repeat (2) begin
        @(negedge clk);
        sample_tick = 0; frame_tick = 0; xin = 8'($urandom);
        checks++;
        if (x2k !== h_even || x2kp1 !== h_odd) fail($sformatf("outputs changed between blocks, n=%0d", n));
      end
      @(negedge clk);
      checks++;
      if (x2k !== h_even || x2kp1 !== h_odd) fail($sformatf("outputs changed on even sample, n=%0d", n));
      sample_tick = 1; frame_tick = n[0]; xin = xs[n];
      if (n[0]) begin
        h_even = xs[n-1];
        h_odd  = xs[n];
        @(negedge clk);
        sample_tick = 0; frame_tick = 0; xin = 8'($urandom);
        blocks++;
        checks++;
        if (x2k !== h_even || x2kp1 !== h_odd)
          fail($sformatf("block %0d: got (%0d,%0d) expected (%0d,%0d)", n/2, x2k, x2kp1, h_even, h_odd));
      end
    end
    @(negedge clk); sample_tick = 0; frame_tick = 0;
    rst_n = 0;
    @(negedge clk);
    checks++;
    if (x2k !== 0 || x2kp1 !== 0) fail("outputs not cleared by second reset");
    $display("blocks=%0d", blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
