// ifpa_ref_pkg: reference models for the testbenches.
//
// Integer-arithmetic models of the inexact adder, the truncating
// multiplier and the dot product, written independently of the RTL from
// the arithmetic rules alone (64-bit integers, loops instead of encoders),
// plus helpers that turn single-precision bit patterns into reals so the
// approximate results can also be compared with exact arithmetic.
package ifpa_ref_pkg;

  // Value of a single-precision bit pattern (zero exponent read as 0).
  function automatic real to_real(input logic [31:0] x);
    real m;
    int  e;
    if (x[30:23] == 8'd0) return 0.0;
    m = real'({1'b1, x[22:0]});
    e = int'(x[30:23]) - 150;
    for (int i = 0; i < e; i++) m = m * 2.0;
    for (int i = e; i < 0; i++) m = m / 2.0;
    return x[31] ? -m : m;
  endfunction

  function automatic logic [31:0] pack(input bit s, input longint e, input longint sig);
    // sig carries the hidden bit at position 23
    if (sig == 0 || e <= 0) return 32'd0;
    if (e >= 255) return {s, 8'hFE, 23'h7FFFFF};
    return {s, 8'(e), 23'(sig)};
  endfunction

  // Inexact addition: 15-bit alignment reach, 12-bit lower-part OR,
  // truncating normalization, saturation, flush to zero.
  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    longint ea, eb, sa, sb, big, sml, d, e, hi, lo, r;
    bit     sgn_big, sgn_sml;
    ea = longint'(a[30:23]); eb = longint'(b[30:23]);
    sa = (ea != 0) ? (longint'(1) << 23) + longint'(a[22:0]) : 0;
    sb = (eb != 0) ? (longint'(1) << 23) + longint'(b[22:0]) : 0;
    if (eb > ea) begin
      big = sb; sml = sa; sgn_big = b[31]; sgn_sml = a[31]; e = eb; d = eb - ea;
    end else begin
      big = sa; sml = sb; sgn_big = a[31]; sgn_sml = b[31]; e = ea; d = ea - eb;
    end
    sml = (d > 15) ? 0 : (sml >> d);
    if (sgn_big == sgn_sml) begin
      hi = (big >> 12) + (sml >> 12) + (((big >> 11) & (sml >> 11)) & 1);
      lo = (big | sml) & 'hFFF;
    end else begin
      hi = (big >> 12) - (sml >> 12) - ((((~big) >> 11) & (sml >> 11)) & 1);
      lo = big & ~sml & 'hFFF;
    end
    r = hi * 4096 + lo;
    if (r < 0) begin
      r = -r;
      sgn_big = !sgn_big;
    end
    if (r == 0) return 32'd0;
    if (r >= (longint'(1) << 24)) begin
      r = r >> 1;
      e = e + 1;
    end
    while (r < (longint'(1) << 23)) begin
      r = r << 1;
      e = e - 1;
    end
    return pack(sgn_big, e, r);
  endfunction

  // Truncating multiplication.
  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    longint e, p;
    if (a[30:23] == 0 || b[30:23] == 0) return 32'd0;
    p = ((longint'(1) << 23) + longint'(a[22:0])) * ((longint'(1) << 23) + longint'(b[22:0]));
    e = longint'(a[30:23]) + longint'(b[30:23]) - 127;
    if (p >= (longint'(1) << 47)) begin
      p = p >> 24;
      e = e + 1;
    end else begin
      p = p >> 23;
    end
    return pack(a[31] ^ b[31], e, p);
  endfunction

  function automatic logic [31:0] neg_if(input logic [31:0] x, input bit n);
    return {x[31] ^ n, x[30:0]};
  endfunction

  // Z = AB +/- CD +/- EF +/- GH through the same tree as the hardware.
  function automatic logic [31:0] ref_dot4(input logic [31:0] v [8], input bit [2:0] sub);
    logic [31:0] s0, s1;
    s0 = ref_add(ref_mul(v[0], v[1]), neg_if(ref_mul(v[2], v[3]), sub[0]));
    s1 = ref_add(neg_if(ref_mul(v[4], v[5]), sub[1]), neg_if(ref_mul(v[6], v[7]), sub[2]));
    return ref_add(s0, s1);
  endfunction

  // Random normalized number with exponent in [emin, emax].
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    logic [31:0] x;
    x[31]    = 1'($urandom);
    x[30:23] = 8'(emin + ($urandom % (emax - emin + 1)));
    x[22:0]  = 23'($urandom);
    return x;
  endfunction

endpackage
