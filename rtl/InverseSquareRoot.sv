// InverseSquareRoot: pipelined fast inverse square root of a binary32 float.
//
// Algorithm (bit-level initial guess plus two Newton-Raphson steps):
//   xhalf = 0.500438180 * x
//   R     = 0x5F3E34BC if the power of two of x is even, else 0x5F3759DF
//   y0    = float(R - (int(x) >> 1))
//   y1    = y0 * (1.50131454 - (xhalf * y0) * y0)
//   y2    = y1 * (1.50000086 - ((0.999124984 * xhalf) * y1) * y1)
// Every multiplication and subtraction is rounded to binary32 (nearest, ties
// to even), in the order written. The algorithm, its constants, the magic
// constant choice and the split into RightShiftBy1, a subtractor for the
// integer step, floating-point Subtractors and Multiply units follow the
// design. The pipeline registers, the valid signal and the reuse of
// xhalf scaled once by 0.999124984 are this implementation's choice.
//
// Pipeline (one operand accepted per cycle, LATENCY = 4):
//   stage 0: xhalf = C_HALF * x            | rs1 register <= x >> 1
//   stage 1: R selected from exponent LSB; sub1 register <= R - (x >> 1)
//   stage 2: p = (xhalf * y0) * y0;         sub2 register <= 1.50131454 - p
//            xh2 = 0.999124984 * xhalf registered alongside
//   stage 3: y1 = y0 * t1; q = (xh2 * y1) * y1; sub3 register <= 1.50000086 - q
//   stage 4: inv_sqrt = y1 * t2 (combinational from the stage-4 registers)
// Interface: in_valid/x_int enter; out_valid/inv_sqrt appear LATENCY cycles
// later. There is no back-pressure. rst (synchronous, active high) clears
// every register. The input is meant to be a positive normal number; other
// inputs give what the same arithmetic gives (no special-case handling).
module InverseSquareRoot
  import fisr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [31:0] x_int,
  output logic        out_valid,
  output logic [31:0] inv_sqrt
);

  // Stage 0 -> 1
  logic [31:0] xhalf0, xhalf_s1, shifted_s1;
  logic        exp_lsb_s1;
  // Stage 1 -> 2
  logic [31:0] magic, y0_s2, xhalf_s2;
  // Stage 2 -> 3
  logic [31:0] xy0, xyy0, t1_s3, y0_s3, xh2, xh2_s3;
  // Stage 3 -> 4
  logic [31:0] y1, xy1, xyy1, t2_s4, y1_s4;
  logic [LATENCY-1:0] valid_sr;

  // ---- stage 0 ----
  Multiply mul1 (.multiplicand(C_HALF), .multiplier(x_int), .product(xhalf0));

  RightShiftBy1 #(.WIDTH(32)) rs1 (
    .clk(clk), .rst(rst), .data(x_int), .out(shifted_s1)
  );

  // ---- stage 1 ----
  MagicConstantSelect a0 (.exp_lsb(exp_lsb_s1), .magic(magic));

  IntSubtractor #(.WIDTH(32)) sub1 (
    .clk(clk), .rst(rst), .Bin(1'b0), .a(magic), .b(shifted_s1), .result(y0_s2)
  );

  // ---- stage 2: first Newton-Raphson step, subtraction ----
  Multiply mul2 (.multiplicand(xhalf_s2), .multiplier(y0_s2), .product(xy0));
  Multiply mul3 (.multiplicand(xy0),      .multiplier(y0_s2), .product(xyy0));

  FpSubtractor sub2 (
    .clk(clk), .rst(rst), .a(C_NR1), .b(xyy0), .result(t1_s3)
  );

  Multiply mul5 (.multiplicand(C_NR2_SCALE), .multiplier(xhalf_s2), .product(xh2));

  // ---- stage 3: first step product, second step subtraction ----
  Multiply mul4 (.multiplicand(y0_s3), .multiplier(t1_s3), .product(y1));
  Multiply mul7 (.multiplicand(xh2_s3), .multiplier(y1),   .product(xy1));
  Multiply mul8 (.multiplicand(xy1),    .multiplier(y1),   .product(xyy1));

  FpSubtractor sub3 (
    .clk(clk), .rst(rst), .a(C_NR2), .b(xyy1), .result(t2_s4)
  );

  // ---- stage 4: second step product ----
  Multiply mul6 (.multiplicand(y1_s4), .multiplier(t2_s4), .product(inv_sqrt));

  // Delay-matching registers and the valid pipeline.
  always_ff @(posedge clk) begin
    if (rst) begin
      xhalf_s1   <= '0;
      exp_lsb_s1 <= 1'b0;
      xhalf_s2   <= '0;
      y0_s3      <= '0;
      xh2_s3     <= '0;
      y1_s4      <= '0;
      valid_sr   <= '0;
    end else begin
      xhalf_s1   <= xhalf0;
      exp_lsb_s1 <= x_int[23];
      xhalf_s2   <= xhalf_s1;
      y0_s3      <= y0_s2;
      xh2_s3     <= xh2;
      y1_s4      <= y1;
      valid_sr   <= {valid_sr[LATENCY-2:0], in_valid};
    end
  end

  assign out_valid = valid_sr[LATENCY-1];

endmodule
