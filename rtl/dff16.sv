// dff16: one delay element "D" of the unfolded FIR datapath, a W-bit register.
//
// Loads d on the rising clock edge when en is 1 and holds otherwise; a
// synchronous active-low reset clears it. In the filter, en is the 1.2 MHz
// block strobe, so one D is one block period (two input samples), exactly as
// the unfolding rule requires. The clock-enable form (instead of a register
// on a divided clock) is this design's choice.
module dff16 #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
