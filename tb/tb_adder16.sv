// tb_adder16: checks the 16-bit wrapping adder on corner cases (overflow in
// both directions, zero, extremes) and on random operands against integer
// addition reduced modulo 2^16.
module tb_adder16;
  logic signed [15:0] a, b, s;
  int checks = 0, failures = 0;

  adder16 dut (.a(a), .b(b), .s(s));

  task automatic check(input int x, input int y);
    int expect_s;
    a = 16'(x);
    b = 16'(y);
    #1;
    expect_s = x + y;
    if (expect_s > 32767)  expect_s -= 65536;
    if (expect_s < -32768) expect_s += 65536;
    checks++;
    if (int'(s) != expect_s) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d: got %0d expected %0d", x, y, s, expect_s);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(32767, 1);        // positive overflow wraps
    check(-32768, -1);      // negative overflow wraps
    check(-32768, 32767);
    check(1234, -5678);
    check(32767, 32767);
    for (int i = 0; i < 20000; i++)
      check(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
