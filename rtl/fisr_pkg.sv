// fisr_pkg: shared types and constants of the fast inverse square root unit.
//
// Holds the single-precision (IEEE-754 binary32) field layout as a packed
// struct, the two magic constants of the initial guess and the four
// floating-point constants of the two Newton-Raphson steps. The magic
// constants and Newton-Raphson constants are those of the algorithm being
// implemented; their bit patterns are the binary32 encodings of the decimal
// values:
//   0.500438180 -> 32'h3F001CB7   (scaled "half" factor, xhalf = c * x)
//   1.50131454  -> 32'h3FC02B13   (first iteration)
//   1.50000086  -> 32'h3FC00007   (second iteration)
//   0.999124984 -> 32'h3F7FC6A8   (second iteration weight)
// The pipeline latency is this implementation's own choice (see
// InverseSquareRoot).
package fisr_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } f32_t;

  localparam logic [31:0] MAGIC_EVEN  = 32'h5F3E34BC; // power of two of x even
  localparam logic [31:0] MAGIC_ODD   = 32'h5F3759DF; // power of two of x odd

  localparam logic [31:0] C_HALF      = 32'h3F001CB7; // 0.500438180
  localparam logic [31:0] C_NR1       = 32'h3FC02B13; // 1.50131454
  localparam logic [31:0] C_NR2       = 32'h3FC00007; // 1.50000086
  localparam logic [31:0] C_NR2_SCALE = 32'h3F7FC6A8; // 0.999124984

  localparam logic [31:0] F32_QNAN    = 32'h7FC00000;

  // Cycles from an accepted operand to its result at the output.
  localparam int unsigned LATENCY = 4;

endpackage
