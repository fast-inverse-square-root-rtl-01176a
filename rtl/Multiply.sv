// Multiply: single-precision (IEEE-754 binary32) floating-point multiplier.
//
// The two 24-bit significands (hidden one restored) are multiplied exactly by
// the radix-4 ModifiedBooth multiplier. The 48-bit product is normalised by at
// most one place, rounded to 24 bits with round-to-nearest-even (guard bit and
// sticky bit), and the exponents are added and re-biased.
// Special values: a zero or subnormal operand counts as zero (flush to zero);
// a result below the normal range is flushed to a signed zero; overflow gives
// a signed infinity; infinity times zero and any NaN operand give a quiet NaN.
// The port names (multiplicand, multiplier, product) and the use of the
// modified Booth multiplier follow the design; rounding mode and the handling
// of special values are this implementation's choice.
// Timing: purely combinational.
module Multiply
  import fisr_pkg::*;
(
  input  logic [31:0] multiplicand,
  input  logic [31:0] multiplier,
  output logic [31:0] product
);

  f32_t        fa, fb;
  logic [47:0] mprod;

  assign fa = multiplicand;
  assign fb = multiplier;

  ModifiedBooth #(.WIDTH(24)) u_sig_mul (
    .multiplicand ({1'b1, fa.frac}),
    .multiplier   ({1'b1, fb.frac}),
    .product      (mprod)
  );

  always_comb begin
    logic        sign;
    logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
    logic signed [9:0] exp;
    logic [23:0] sig;
    logic        guard, sticky, round_up;
    logic [24:0] sig_r;

    sign   = fa.sign ^ fb.sign;
    a_zero = (fa.exp == 8'd0);
    b_zero = (fb.exp == 8'd0);
    a_inf  = (fa.exp == 8'hFF) && (fa.frac == '0);
    b_inf  = (fb.exp == 8'hFF) && (fb.frac == '0);
    a_nan  = (fa.exp == 8'hFF) && (fa.frac != '0);
    b_nan  = (fb.exp == 8'hFF) && (fb.frac != '0);

    // Normalise: the product of two values in [1,2) lies in [1,4).
    exp = $signed({2'b00, fa.exp}) + $signed({2'b00, fb.exp}) - 10'sd127;
    if (mprod[47]) begin
      sig    = mprod[47:24];
      guard  = mprod[23];
      sticky = |mprod[22:0];
      exp    = exp + 10'sd1;
    end else begin
      sig    = mprod[46:23];
      guard  = mprod[22];
      sticky = |mprod[21:0];
    end

    // Round to nearest, ties to even.
    round_up = guard & (sticky | sig[0]);
    sig_r    = {1'b0, sig} + {24'd0, round_up};
    if (sig_r[24]) begin
      sig_r = sig_r >> 1;
      exp   = exp + 10'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      product = F32_QNAN;
    else if (a_inf || b_inf)
      product = {sign, 8'hFF, 23'd0};
    else if (a_zero || b_zero)
      product = {sign, 31'd0};
    else if (exp >= 10'sd255)
      product = {sign, 8'hFF, 23'd0};
    else if (exp <= 10'sd0)
      product = {sign, 31'd0};
    else
      product = {sign, exp[7:0], sig_r[22:0]};
  end

endmodule
