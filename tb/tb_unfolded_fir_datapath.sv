// tb_unfolded_fir_datapath: drives the 2-unfolded FIR datapath with random
// sample pairs, one per block strobe, and compares y(2k), y(2k+1) with a
// direct convolution y(n) = sum_j h[j] x(n-j) (16-bit wrap) computed in the
// testbench from the serial sample history. Four instances are checked:
// the default 11-tap filter, the 2-tap and 4-tap filters, and a 5-tap
// filter with extreme coefficients whose sums wrap. The block strobe comes
// every 4th cycle, and the outputs are also checked between strobes.
module tb_unfolded_fir_datapath;
  import fir_pkg::*;

  localparam int NPAIRS = 3000;
  localparam logic [4:0][7:0] COEF_X = {-8'sd128, 8'sd127, -8'sd1, 8'sd55, -8'sd77};

  // Independent copies of the impulse responses h[0..N-1] (output tap first).
  int h11 [11] = '{-15, -13, 7, 38, 66, 78, 66, 38, 7, -13, -15};
  int h2  [2]  = '{102, 102};
  int h4  [4]  = '{2, 64, 64, 2};
  int hx  [5]  = '{-128, 127, -1, 55, -77};

  logic    clk = 0, rst_n = 0, en = 0;
  sample_t x0 = '0, x1 = '0;
  acc_t    y11_0, y11_1, y2_0, y2_1, y4_0, y4_1, yx_0, yx_1;
  int      xs [2*NPAIRS];
  int checks = 0, failures = 0, wraps = 0;

  unfolded_fir_datapath dut11 (.clk(clk), .rst_n(rst_n), .en(en), .x2k(x0), .x2kp1(x1), .y2k(y11_0), .y2kp1(y11_1));
  unfolded_fir_datapath #(.NTAPS(2), .COEFS(COEF_2TAP)) dut2 (.clk(clk), .rst_n(rst_n), .en(en), .x2k(x0), .x2kp1(x1), .y2k(y2_0), .y2kp1(y2_1));
  unfolded_fir_datapath #(.NTAPS(4), .COEFS(COEF_4TAP)) dut4 (.clk(clk), .rst_n(rst_n), .en(en), .x2k(x0), .x2kp1(x1), .y2k(y4_0), .y2kp1(y4_1));
  unfolded_fir_datapath #(.NTAPS(5), .COEFS(COEF_X)) dutx (.clk(clk), .rst_n(rst_n), .en(en), .x2k(x0), .x2kp1(x1), .y2k(yx_0), .y2kp1(yx_1));

  always #5 clk = ~clk;

  initial begin
    repeat (8 * NPAIRS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int conv(input int h[], input int n, output bit wrapped);
    int s = 0;
    for (int j = 0; j < h.size(); j++)
      if (n - j >= 0) s += h[j] * xs[n - j];
    wrapped = (s > 32767 || s < -32768);
    return int'($signed(16'(s)));
  endfunction

  task automatic cmp(input string name, input acc_t got, input int h[], input int n);
    bit w;
    int e = conv(h, n, w);
    if (w) wraps++;
    checks++;
    if (int'(got) != e) begin
      failures++;
      if (failures < 10) $display("FAIL %s y(%0d): got %0d expected %0d", name, n, got, e);
    end
  endtask

  task automatic check_all(input int k);
    cmp("11-tap", y11_0, h11, 2*k); cmp("11-tap", y11_1, h11, 2*k+1);
    cmp("2-tap",  y2_0,  h2,  2*k); cmp("2-tap",  y2_1,  h2,  2*k+1);
    cmp("4-tap",  y4_0,  h4,  2*k); cmp("4-tap",  y4_1,  h4,  2*k+1);
    cmp("5-tap",  yx_0,  hx,  2*k); cmp("5-tap",  yx_1,  hx,  2*k+1);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NPAIRS; k++) begin
      // extremes now and then, random otherwise
      xs[2*k]   = (k % 17 == 5) ? -128 : int'($signed(8'($urandom)));
      xs[2*k+1] = (k % 13 == 7) ?  127 : int'($signed(8'($urandom)));
      // the block strobe that ends pair k-1 loads the delays; the new pair
      // arrives on the same clock edge, as from the serial-to-parallel stage
      en = (k > 0);
      @(posedge clk);
      #1;
      en = 0;
      x0 = 8'(xs[2*k]); x1 = 8'(xs[2*k+1]);
      @(negedge clk);
      check_all(k);
      repeat (3) @(negedge clk);
      check_all(k);      // registers hold between strobes
    end
    $display("wrapping outputs seen: %0d", wraps);
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrapping sum exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
