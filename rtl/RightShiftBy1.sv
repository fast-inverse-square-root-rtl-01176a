// RightShiftBy1: registered logical right shift by one bit.
//
// Treats the operand as a plain bit pattern and moves it one place right,
// filling with zero. In the inverse square root this halves the integer view
// of the float before it is subtracted from the magic constant; on the
// exponent field it amounts to halving the power of two.
// Interface: data in, out = data >> 1 registered on the rising clock edge.
// Timing: one cycle of latency. rst (synchronous, active high) clears out.
// The module name, its clk/rst/data/out ports and the 32-bit width follow the
// design; the register on the output and the reset style are this
// implementation's choice. Bit 0 of data is shifted out and unused by design,
// which a lint tool reports as an unused input bit.
module RightShiftBy1 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] data,
  output logic [WIDTH-1:0] out
);

  always_ff @(posedge clk) begin
    if (rst) out <= '0;
    else     out <= {1'b0, data[WIDTH-1:1]};
  end

endmodule
