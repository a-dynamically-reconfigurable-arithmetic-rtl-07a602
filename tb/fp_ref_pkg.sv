// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Exact IEEE754-style add, multiply and divide on formats with EW exponent bits
// and MW fraction bits (up to double), computed with wide integers rather than
// with the guard/round/sticky scheme of the hardware, so the two are independent.
// Add and multiply round towards zero, divide rounds to nearest even; subnormal
// inputs count as zero, overflow gives infinity, underflow a signed zero, and a
// NaN result is the quiet NaN with only the top fraction bit set. Also helpers to
// turn a real number into single or double bits and to pick random operands,
// and the expected outputs of each mode of the reconfigurable circuit.
package fp_ref_pkg;

  typedef logic [63:0] u64;
  typedef logic [255:0] u256;

  function automatic u64 pack(int ew, int mw, bit s, longint e, u64 f);
    u64 r;
    r = '0;
    r[ew+mw] = s;
    r = r | (u64'(e) << mw) | (f & ((u64'(1) << mw) - 1));
    return r;
  endfunction

  function automatic u64 qnan(int ew, int mw);
    return pack(ew, mw, 1'b0, (longint'(1) << ew) - 1, u64'(1) << (mw - 1));
  endfunction

  function automatic u64 inf(int ew, int mw, bit s);
    return pack(ew, mw, s, (longint'(1) << ew) - 1, 0);
  endfunction

  function automatic void unpack(int ew, int mw, u64 x, output bit s, output longint e,
                                 output u64 f, output bit zero, output bit isinf,
                                 output bit isnan);
    longint emax;
    emax = (longint'(1) << ew) - 1;
    s = x[ew+mw];
    e = longint'((x >> mw) & u64'(emax));
    f = x & ((u64'(1) << mw) - 1);
    zero  = (e == 0);
    isinf = (e == emax) && (f == 0);
    isnan = (e == emax) && (f != 0);
  endfunction

  // Significand with its hidden bit, as a wide integer.
  function automatic u256 sig(int mw, u64 f);
    return (u256'(1) << mw) | (u256'(f) & ((u256'(1) << mw) - 1));
  endfunction

  // Normalise magnitude r (msb found here) times 2^(ebase - bias - mw) with truncation.
  function automatic u64 norm_rtz(int ew, int mw, bit s, u256 r, longint elow);
    int p;
    longint be, emax;
    u256 fr;
    emax = (longint'(1) << ew) - 1;
    p = -1;
    for (int i = 0; i < 256; i++) if (r[i]) p = i;
    if (p < 0) return pack(ew, mw, 1'b0, 0, 0);
    be = longint'(p) + elow - longint'(mw);
    if (p >= mw) fr = r >> (p - mw); else fr = r << (mw - p);
    if (be >= emax) return inf(ew, mw, s);
    if (be <= 0) return pack(ew, mw, s, 0, 0);
    return pack(ew, mw, s, be, u64'(fr));
  endfunction

  function automatic u64 add(int ew, int mw, u64 a, u64 b, bit sub);
    bit sa, sb, za, zb, ia, ib, na, nb, sr;
    longint ea, eb, d, elow;
    u64 fa, fb;
    u256 x, y, r;
    bit ax;  // a has the larger magnitude
    unpack(ew, mw, a, sa, ea, fa, za, ia, na);
    unpack(ew, mw, b, sb, eb, fb, zb, ib, nb);
    sb = sb ^ sub;
    if (na || nb || (ia && ib && sa != sb)) return qnan(ew, mw);
    if (ia) return inf(ew, mw, sa);
    if (ib) return inf(ew, mw, sb);
    if (za && zb) return pack(ew, mw, sa & sb, 0, 0);
    if (za) return pack(ew, mw, sb, eb, fb);
    if (zb) return pack(ew, mw, sa, ea, fa);
    ax = (ea > eb) || (ea == eb && fa >= fb);
    x = sig(mw, ax ? fa : fb);
    y = sig(mw, ax ? fb : fa);
    d = ax ? ea - eb : eb - ea;
    if (d > 120) begin
      x = x << 120;
      y = 1;
      elow = (ax ? ea : eb) - 120;
    end else begin
      x = x << d;
      elow = ax ? eb : ea;
    end
    sr = ax ? sa : sb;
    if (sa == sb) r = x + y;
    else r = x - y;
    if (r == 0) return pack(ew, mw, 1'b0, 0, 0);
    return norm_rtz(ew, mw, sr, r, elow);
  endfunction

  function automatic u64 mul(int ew, int mw, u64 a, u64 b);
    bit sa, sb, za, zb, ia, ib, na, nb;
    longint ea, eb, bias;
    u64 fa, fb;
    u256 p;
    unpack(ew, mw, a, sa, ea, fa, za, ia, na);
    unpack(ew, mw, b, sb, eb, fb, zb, ib, nb);
    bias = (longint'(1) << (ew - 1)) - 1;
    if (na || nb || (ia && zb) || (ib && za)) return qnan(ew, mw);
    if (ia || ib) return inf(ew, mw, sa ^ sb);
    if (za || zb) return pack(ew, mw, sa ^ sb, 0, 0);
    p = sig(mw, fa) * sig(mw, fb);
    return norm_rtz(ew, mw, sa ^ sb, p, ea + eb - bias - longint'(mw));
  endfunction

  // Single precision divide, round to nearest even.
  function automatic logic [31:0] div_sp(logic [31:0] a, logic [31:0] b);
    bit sa, sb, za, zb, ia, ib, na, nb, s, g, st;
    longint ea, eb, be;
    u64 fa, fb;
    u256 n, q, rm, m;
    int p;
    unpack(8, 23, u64'(a), sa, ea, fa, za, ia, na);
    unpack(8, 23, u64'(b), sb, eb, fb, zb, ib, nb);
    s = sa ^ sb;
    if (na || nb || (za && zb) || (ia && ib)) return 32'h7FC0_0000;
    if (ia || zb) return {s, 8'hFF, 23'd0};
    if (za || ib) return {s, 31'd0};
    n  = sig(23, fa) << 60;
    m  = sig(23, fb);
    q  = n / m;
    rm = n % m;
    p = 0;
    for (int i = 0; i < 256; i++) if (q[i]) p = i;
    // keep 24 bits: q >> (p-23); guard bit below; sticky = rest or remainder
    g  = q[p-24];
    st = (rm != 0) || ((q & ((u256'(1) << (p - 24)) - 1)) != 0);
    q  = q >> (p - 23);
    be = longint'(p) - 60 + ea - eb + 127;
    if (g && (st || q[0])) q = q + 1;
    if (q[24]) begin q = q >> 1; be = be + 1; end
    if (be >= 255) return {s, 8'hFF, 23'd0};
    if (be <= 0) return {s, 31'd0};
    return {s, 8'(be), q[22:0]};
  endfunction

  function automatic logic [31:0] add_sp(logic [31:0] a, logic [31:0] b, bit sub);
    return 32'(add(8, 23, u64'(a), u64'(b), sub));
  endfunction

  function automatic logic [31:0] mul_sp(logic [31:0] a, logic [31:0] b);
    return 32'(mul(8, 23, u64'(a), u64'(b)));
  endfunction

  // Real to single, round to nearest even (as a host converting decimal input would).
  function automatic logic [31:0] real_to_sp(real r);
    u64 d;
    logic [31:0] x;
    d = $realtobits(r);
    x = {d[63], 8'(d[62:52] - 11'd896), d[51:29]};
    if (d[28] && ((d[27:0] != 0) || d[29])) x = x + 1;
    if (r == 0.0) x = 0;
    return x;
  endfunction

  // Single bits to real (for messages).
  function automatic real sp_to_real(logic [31:0] x);
    u64 d;
    if (x[30:23] == 0) return 0.0;
    d = {x[31], 11'(x[30:23]) + 11'd896, x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // Random normal operand with exponent within +/- span of the bias.
  function automatic u64 rand_fp(int ew, int mw, int span);
    longint bias, e;
    u64 f;
    bias = (longint'(1) << (ew - 1)) - 1;
    e = bias + longint'($urandom_range(2 * span)) - longint'(span);
    f = {$urandom, $urandom};
    return pack(ew, mw, 1'($urandom), e, f);
  endfunction

  // Difference in units of the last place between two finite words of one format.
  function automatic longint ulp_diff(int ew, int mw, u64 a, u64 b);
    longint ia, ib;
    ia = longint'(a & ~(u64'(1) << (ew + mw)));
    ib = longint'(b & ~(u64'(1) << (ew + mw)));
    if (a[ew+mw]) ia = -ia;
    if (b[ew+mw]) ib = -ib;
    return (ia > ib) ? ia - ib : ib - ia;
  endfunction

  // Expected calc_out1/calc_out2 of the circuit for mode m (sel), step s (sel2)
  // and operands v = a..l.
  function automatic void mode_result(int m, int s, logic [31:0] v [12],
                                      output logic [31:0] e1, output logic [31:0] e2);
    logic [31:0] a, b, c, d, e, f, g, h, i, j, k, l;
    logic [63:0] ab, cd;
    {a, b, c, d, e, f, g, h, i, j, k, l} = {v[0], v[1], v[2], v[3], v[4], v[5],
                                            v[6], v[7], v[8], v[9], v[10], v[11]};
    e1 = 0; e2 = 0;
    case (m)
      0: if (s == 0) begin
           e1 = add_sp(mul_sp(a, c), mul_sp(b, d), 1'b1);
           e2 = add_sp(mul_sp(b, c), mul_sp(a, d), 1'b0);
         end
      1: case (s)
           0: begin e1 = mul_sp(a, b); e2 = mul_sp(c, d); end
           1: begin e1 = mul_sp(e, f); e2 = mul_sp(g, h); end
           2: begin e1 = add_sp(i, j, 1'b0); e2 = add_sp(k, l, 1'b0); end
           default: ;
         endcase
      2: begin
           if (s == 0) begin e1 = add_sp(mul_sp(a, b), c, 1'b0); e2 = add_sp(mul_sp(e, f), g, 1'b0); end
           if (s == 1) e1 = mul_sp(mul_sp(a, b), c);
         end
      3: if (s == 0) begin
           e1 = add_sp(mul_sp(a, b), mul_sp(c, d), 1'b0);
           e2 = add_sp(mul_sp(e, f), mul_sp(g, h), 1'b0);
         end
      4: if (s == 0) e1 = div_sp(add_sp(mul_sp(a, c), mul_sp(b, d), 1'b0),
                                 add_sp(mul_sp(c, c), mul_sp(d, d), 1'b0));
      5: if (s == 0) e1 = div_sp(add_sp(mul_sp(b, c), mul_sp(a, d), 1'b1),
                                 add_sp(mul_sp(c, c), mul_sp(d, d), 1'b0));
      6: case (s)
           0: {e1, e2} = mul(11, 52, {a, b}, {c, d});
           1: {e1, e2} = mul(11, 52, {e, f}, {g, h});
           2: {e1, e2} = add(11, 52, {i, j}, {k, l}, 1'b0);
           default: ;
         endcase
      default: if (s == 0) begin
           ab = mul(11, 52, {a, b}, {c, d});
           cd = mul(11, 52, {e, f}, {g, h});
           {e1, e2} = add(11, 52, ab, cd, 1'b0);
         end
    endcase
  endfunction

endpackage
