// tb_dff16: drives random data and enables into the 16-bit delay register and
// compares q with a testbench model after every clock edge; also checks that
// reset clears it and that it holds while en is 0.
module tb_dff16;
  logic        clk = 0, rst_n = 0, en = 0;
  logic [15:0] d = '0, q;
  logic [15:0] model;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  dff16 dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); d = 16'hBEEF; en = 1;
    @(negedge clk);
    checks++;
    if (q !== 16'h0) begin failures++; $display("FAIL reset: q=%h", q); end
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 5000; i++) begin
      d  = 16'($urandom);
      en = ($urandom % 3) == 0;
      @(posedge clk);
      if (en) begin model = d; loads++; end else holds++;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: q=%h expected %h", i, q, model);
      end
    end
    rst_n = 0; en = 0;
    @(negedge clk);
    checks++;
    if (q !== 16'h0) begin failures++; $display("FAIL second reset: q=%h", q); end
    if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
