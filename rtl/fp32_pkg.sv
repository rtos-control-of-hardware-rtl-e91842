// fp32_pkg: IEEE 754 single-precision arithmetic for the floating-point
// version of the attitude controller. It holds combinational functions that
// synthesize into plain logic: multiply, add, conversion from a signed fixed-
// point word, and conversion back to a saturated fixed-point word. A constant
// function turns a real into its single-precision bit pattern at elaboration
// time, so coefficients can be written as reals.
//
// How it works: every result is rounded to nearest, ties to even, using a
// guard bit and a sticky bit. Subnormal numbers are flushed to zero on input
// and output. An exponent overflow gives infinity. NaN is not produced by the
// controller's data and is not handled. These simplifications are this
// design's choice. The format itself (1 sign, 8 exponent, 23 fraction bits,
// bias 127) is the standard single-precision format.
//
// Timing: all functions are combinational; the caller registers the results.
package fp32_pkg;

  typedef logic [31:0] f32_t;

  localparam f32_t F32_ZERO = 32'h0000_0000;

  // Real -> single-precision bits, for constants.
  function automatic f32_t real_to_f32(real r);
    real a;
    int  e;
    longint mant;
    logic s;
    if (r == 0.0) return F32_ZERO;
    s = (r < 0.0);
    a = s ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    mant = longint'((a - 1.0) * 8388608.0);                  // truncate
    if ((a - 1.0) * 8388608.0 - real'(mant) >= 0.5) mant++;   // round
    if (mant == 64'd8388608) begin mant = 0; e++; end
    return {s, 8'(e + 127), 23'(mant)};
  endfunction

  function automatic f32_t f32_neg(f32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // Round a 24-bit significand (leading 1 at bit 23) with guard and sticky
  // bits, and pack it. e is the biased exponent before rounding.
  function automatic f32_t f32_pack(logic s, int e, logic [23:0] m, logic g, logic st);
    logic [24:0] mr;
    int          er;
    mr = {1'b0, m};
    er = e;
    if (g && (st || m[0])) mr = mr + 25'd1;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er <= 0)   return {s, 31'd0};
    if (er >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(er), mr[22:0]};
  endfunction

  function automatic f32_t f32_mul(f32_t a, f32_t b);
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return f32_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    else       return f32_pack(s, e,     p[46:23], p[22], |p[21:0]);
  endfunction

  function automatic f32_t f32_add(f32_t a, f32_t b);
    f32_t        bg, lit;   // operand of larger, smaller magnitude
    logic [26:0] mb, ms;     // 1.23 significand, guard, round, sticky
    logic [27:0] r;
    int          d, e, lz;
    logic        st;
    if (a[30:23] == 8'd0) return (b[30:23] == 8'd0) ? F32_ZERO : b;
    if (b[30:23] == 8'd0) return a;
    if (a[30:0] >= b[30:0]) begin bg = a; lit = b; end
    else                    begin bg = b; lit = a; end
    d  = int'(bg[30:23]) - int'(lit[30:23]);
    e  = int'(bg[30:23]);
    mb = {1'b1, bg[22:0], 3'b000};
    ms = {1'b1, lit[22:0], 3'b000};
    if (d >= 27) ms = 27'd1;                  // only the sticky bit is left
    else if (d > 0) begin
      st = 1'b0;
      for (int i = 0; i < 27; i++) if (i < d) st = st | ms[i];
      ms = (ms >> d) | {26'd0, st};
    end
    if (bg[31] == lit[31]) begin
      r = {1'b0, mb} + {1'b0, ms};
      if (r[27]) begin
        r = {1'b0, r[27:2], r[1] | r[0]};
        e = e + 1;
      end
    end else begin
      r = {1'b0, mb} - {1'b0, ms};
      if (r == 28'd0) return F32_ZERO;
      lz = 0;
      for (int i = 0; i <= 26; i++) if (r[i]) lz = 26 - i;
      r = r << lz;
      e = e - lz;
    end
    // r[26] is the leading 1, r[25:3] the fraction, r[2] guard, r[1:0] sticky
    return f32_pack(bg[31], e, r[26:3], r[2], |r[1:0]);
  endfunction

  // Signed 33-bit fixed-point word with F fraction bits -> single precision.
  function automatic f32_t fix_to_f32(logic signed [32:0] v, int unsigned F);
    logic        s;
    logic [32:0] mag;
    int          lz;
    if (v == 33'sd0) return F32_ZERO;
    s   = v[32];
    mag = s ? 33'(-v) : 33'(v);
    lz  = 0;
    for (int i = 0; i <= 32; i++) if (mag[i]) lz = 32 - i;
    mag = mag << lz;                           // leading 1 at bit 32
    return f32_pack(s, 127 + 32 - lz - int'(F), mag[32:9], mag[8], |mag[7:0]);
  endfunction

  // Single precision -> signed fixed point with F fraction bits, rounded to
  // nearest and saturated to 32 bits.
  function automatic logic signed [31:0] f32_to_fix(f32_t a, int unsigned F);
    logic [23:0] m;
    int          sh;
    logic [63:0] r;
    if (a[30:23] == 8'd0) return '0;
    m  = {1'b1, a[22:0]};
    sh = int'(a[30:23]) - 150 + int'(F);
    if (sh >= 8) r = 64'h7FFF_FFFF;            // beyond 31 magnitude bits
    else if (sh >= 0) r = 64'(m) << sh;
    else if (sh >= -25) r = (64'(m) + (64'd1 << (-sh - 1))) >> (-sh);
    else r = 64'd0;
    if (r > 64'h7FFF_FFFF) r = 64'h7FFF_FFFF;
    return a[31] ? -32'(r) : 32'(r);
  endfunction

endpackage
