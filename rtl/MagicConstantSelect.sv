// MagicConstantSelect: picks the magic constant of the initial guess.
//
// The power of two of a binary32 number x is E - 127, where E is the biased
// exponent field. It is even exactly when E is odd, that is when bit 23 of x
// (the exponent's lowest bit) is 1. For an even power the constant
// 32'h5F3E34BC is used, for an odd power 32'h5F3759DF, as in the design's
// flow ("power is even" -> 0x5f3e34bc).
// Interface: exp_lsb is bit 23 of x; magic is the selected constant.
// Timing: purely combinational.
module MagicConstantSelect
  import fisr_pkg::*;
(
  input  logic        exp_lsb,
  output logic [31:0] magic
);

  always_comb magic = exp_lsb ? MAGIC_EVEN : MAGIC_ODD;

endmodule
