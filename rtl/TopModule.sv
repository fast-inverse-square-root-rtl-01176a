// TopModule: system-level top of the fast inverse square root unit.
//
// Instantiates one InverseSquareRoot pipeline and brings its operand, result
// and valid signals out. clk, rst, x_int[31:0] and inv_sqrt[31:0] follow the
// design's top-level ports; in_valid and out_valid are this implementation's
// addition so that a user can tell which output cycles carry results.
// Timing: one operand per cycle, result fisr_pkg::LATENCY (= 4) cycles later.
// Operands and results are IEEE-754 binary32 bit patterns.
module TopModule (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [31:0] x_int,
  output logic        out_valid,
  output logic [31:0] inv_sqrt
);

  InverseSquareRoot sqrt_inst (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .x_int     (x_int),
    .out_valid (out_valid),
    .inv_sqrt  (inv_sqrt)
  );

endmodule
