// IntSubtractor: registered integer subtractor with borrow input.
//
// result = a - b - Bin, modulo 2**WIDTH, registered on the rising clock edge.
// In the inverse square root it forms R - (xint >> 1), whose bit pattern,
// read back as a float, is the initial guess of 1/sqrt(x). The clk, rst, Bin,
// a, b and result ports follow the design's Subtractor; the subtraction is
// written as one adder (a + ~b + ~Bin), the register and synchronous
// active-high reset are this implementation's choice.
// Timing: one cycle of latency.
module IntSubtractor #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             Bin,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] result
);

  logic [WIDTH-1:0] diff;

  always_comb diff = a + ~b + {{(WIDTH-1){1'b0}}, ~Bin};

  always_ff @(posedge clk) begin
    if (rst) result <= '0;
    else     result <= diff;
  end

endmodule
