// FpSubtractor: registered single-precision (IEEE-754 binary32) subtractor.
//
// Computes result = a - b. b's sign is flipped and the two operands are
// ordered by magnitude; the smaller significand is shifted right by the
// exponent difference into three extra bits (guard, round and a sticky bit
// that collects everything shifted further). The significands are then added
// or subtracted, the sum is normalised (one place right after a carry, or
// left by the leading-zero count after cancellation) and rounded to nearest,
// ties to even. An exact zero difference is +0.
// Special values: zero or subnormal operands count as zero (flush to zero),
// results below the normal range are flushed to a signed zero, overflow gives
// a signed infinity, inf - inf of the same sign and any NaN give a quiet NaN.
// The registered output with clk and rst follows the design's Subtractor;
// the floating-point algorithm, rounding mode and special-value handling are
// this implementation's choice. The design's borrow input is not used in a
// floating-point subtraction and is left out.
// Timing: one cycle of latency; rst (synchronous, active high) clears result.
module FpSubtractor
  import fisr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result
);

  logic [31:0] diff;

  always_comb begin
    f32_t        x, y, hi, lo;
    logic        x_zero, y_zero, x_inf, y_inf, x_nan, y_nan;
    logic [7:0]  ediff;
    logic [26:0] sig_hi, sig_lo, shifted, lost;
    logic [27:0] sum;
    logic        eff_sub;
    logic signed [9:0] exp;
    logic [26:0] norm;
    int unsigned lz;
    logic        guard, rest, round_up;
    logic [24:0] sig_r;

    x = a;
    y = b;
    y.sign = ~b[31];                   // a - b = a + (-b)
    x_zero = (x.exp == 8'd0);
    y_zero = (y.exp == 8'd0);
    x_inf  = (x.exp == 8'hFF) && (x.frac == '0);
    y_inf  = (y.exp == 8'hFF) && (y.frac == '0);
    x_nan  = (x.exp == 8'hFF) && (x.frac != '0);
    y_nan  = (y.exp == 8'hFF) && (y.frac != '0);

    // Order by magnitude.
    if ({x.exp, x.frac} >= {y.exp, y.frac}) begin
      hi = x; lo = y;
    end else begin
      hi = y; lo = x;
    end
    ediff     = hi.exp - lo.exp;
    lost      = '0;
    sig_hi   = {1'b1, hi.frac, 3'b000};
    sig_lo = {1'b1, lo.frac, 3'b000};

    // Align with guard, round and sticky bits.
    if (ediff >= 8'd27) begin
      shifted = 27'd1;                 // everything lands in the sticky bit
    end else begin
      shifted = sig_lo >> ediff;
      lost    = sig_lo & ~(27'h7FF_FFFF << ediff);
      shifted[0] = shifted[0] | (|lost);
    end

    eff_sub = hi.sign ^ lo.sign;
    sum = eff_sub ? ({1'b0, sig_hi} - {1'b0, shifted})
                  : ({1'b0, sig_hi} + {1'b0, shifted});
    exp = $signed({2'b00, hi.exp});

    // Normalise.
    lz = 0;
    if (sum[27]) begin
      norm = sum[27:1];
      norm[0] = norm[0] | sum[0];
      exp  = exp + 10'sd1;
    end else begin
      // Leading-zero count: the highest set bit is the last one found.
      lz = 27;
      for (int i = 0; i <= 26; i++)
        if (sum[i]) lz = 26 - i;
      norm = sum[26:0] << lz;
      exp  = exp - $signed(10'(lz));
    end

    // Round to nearest, ties to even.
    guard    = norm[2];
    rest     = |norm[1:0];
    round_up = guard & (rest | norm[3]);
    sig_r    = {1'b0, norm[26:3]} + {24'd0, round_up};
    if (sig_r[24]) begin
      sig_r = sig_r >> 1;
      exp   = exp + 10'sd1;
    end

    if (x_nan || y_nan || (x_inf && y_inf && (x.sign != y.sign)))
      diff = F32_QNAN;
    else if (x_inf)
      diff = {x.sign, 8'hFF, 23'd0};
    else if (y_inf)
      diff = {y.sign, 8'hFF, 23'd0};
    else if (x_zero && y_zero)
      diff = {x.sign & y.sign, 31'd0};
    else if (y_zero)
      diff = {x.sign, x.exp, x.frac};
    else if (x_zero)
      diff = {y.sign, y.exp, y.frac};
    else if (sum == '0)
      diff = 32'd0;
    else if (exp >= 10'sd255)
      diff = {hi.sign, 8'hFF, 23'd0};
    else if (exp <= 10'sd0)
      diff = {hi.sign, 31'd0};
    else
      diff = {hi.sign, exp[7:0], sig_r[22:0]};
  end

  always_ff @(posedge clk) begin
    if (rst) result <= '0;
    else     result <= diff;
  end

endmodule
