// tb_unfolded_iir7: drives the 2-unfolded loop y(n) = a*y(n-7) + x(n) with
// random sample pairs, one per block strobe, for several values of a
// (including 0, 1, -1 and random ones), and compares y(2k), y(2k+1) with the
// serial recursion evaluated sample by sample in the testbench (16-bit wrap,
// y(n) = 0 for n < 0). Reset between runs must restart the recursion.
module tb_unfolded_iir7;
  import fir_pkg::*;

  localparam int NPAIRS = 400;

  logic    clk = 0, rst_n = 0, en = 0;
  coef_t   a = '0;
  sample_t x0 = '0, x1 = '0;
  acc_t    y0, y1;
  int      ys [2*NPAIRS];
  int checks = 0, failures = 0;

  unfolded_iir7 dut (.clk(clk), .rst_n(rst_n), .en(en), .a(a), .x2k(x0), .x2kp1(x1), .y2k(y0), .y2kp1(y1));

  always #5 clk = ~clk;

  initial begin
    repeat (20 * NPAIRS * 8) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap16(input longint v);
    return int'($signed(16'(v)));
  endfunction

  task automatic run(input int coef);
    int xa, xb;
    rst_n = 0; en = 0; a = 8'(coef);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NPAIRS; k++) begin
      en = (k > 0);
      @(posedge clk);
      #1;
      en = 0;
      xa = int'($signed(8'($urandom)));
      xb = int'($signed(8'($urandom)));
      x0 = 8'(xa); x1 = 8'(xb);
      // serial reference
      ys[2*k]   = wrap16(longint'(coef) * ((2*k   - 7 >= 0) ? ys[2*k-7] : 0) + xa);
      ys[2*k+1] = wrap16(longint'(coef) * ((2*k+1 - 7 >= 0) ? ys[2*k-6] : 0) + xb);
      @(negedge clk);
      checks += 2;
      if (int'(y0) != ys[2*k]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d y(%0d): got %0d expected %0d", coef, 2*k, y0, ys[2*k]);
      end
      if (int'(y1) != ys[2*k+1]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d y(%0d): got %0d expected %0d", coef, 2*k+1, y1, ys[2*k+1]);
      end
    end
  endtask

  initial begin
    run(0);
    run(1);
    run(-1);
    run(3);
    for (int i = 0; i < 6; i++) run(int'($signed(8'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
