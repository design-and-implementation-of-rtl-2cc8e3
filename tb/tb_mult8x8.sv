// tb_mult8x8: exhaustive check of the signed 8x8 multiplier. Every one of the
// 65536 operand pairs is applied and the product compared with an integer
// multiplication done in the testbench.
module tb_mult8x8;
  logic signed [7:0]  a, b;
  logic signed [15:0] p;
  int checks = 0, failures = 0;

  mult8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
