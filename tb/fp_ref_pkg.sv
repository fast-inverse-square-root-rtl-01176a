// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Models binary32 values through SystemVerilog `real` (binary64). A product
// of two binary32 numbers is exact in binary64, and so is a difference whose
// operands' exponents differ by at most 29; rounding that exact value once to
// binary32 gives the correctly rounded result. real_to_f32 does that rounding
// on the binary64 bit pattern (round to nearest, ties to even; results below
// the normal range flush to zero, as the hardware does). Nothing here shares
// code with the design under test.
package fp_ref_pkg;

  function automatic real f32_to_real(logic [31:0] b);
    logic [63:0] d;
    if (b[30:23] == 8'd0) return b[31] ? -0.0 : 0.0;
    d = {b[31], 11'(int'(b[30:23]) - 127 + 1023), b[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_f32(real v);
    logic [63:0] d;
    logic        s, g, st, up;
    logic [23:0] m;
    int          e;
    d  = $realtobits(v);
    s  = d[63];
    if (d[62:0] == '0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    up = g & (st | m[0]);
    m  = m + 24'(up);
    if (m[23]) e = e + 1;          // mantissa overflowed into the next binade
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return real_to_f32(f32_to_real(a) * f32_to_real(b));
  endfunction

  function automatic logic [31:0] fsub(logic [31:0] a, logic [31:0] b);
    return real_to_f32(f32_to_real(a) - f32_to_real(b));
  endfunction

  // The complete algorithm, one binary32 rounding per operation.
  function automatic logic [31:0] fisr(logic [31:0] x);
    logic [31:0] xh, r, y0, y1, y2, t1, t2, xh2;
    xh  = fmul(32'h3F001CB7, x);                 // 0.500438180 * x
    r   = x[23] ? 32'h5F3E34BC : 32'h5F3759DF;   // E odd <=> power of two even
    y0  = r - {1'b0, x[31:1]};
    t1  = fsub(32'h3FC02B13, fmul(fmul(xh, y0), y0));
    y1  = fmul(y0, t1);
    xh2 = fmul(32'h3F7FC6A8, xh);
    t2  = fsub(32'h3FC00007, fmul(fmul(xh2, y1), y1));
    y2  = fmul(y1, t2);
    return y2;
  endfunction

  // A random positive or negative normal number with exponent field in [lo, hi].
  function automatic logic [31:0] rand_f32(int lo, int hi, bit allow_neg = 1'b1);
    logic [31:0] v;
    v        = $urandom;
    v[30:23] = 8'(lo + int'($urandom_range(hi - lo)));
    if (!allow_neg) v[31] = 1'b0;
    return v;
  endfunction

endpackage
