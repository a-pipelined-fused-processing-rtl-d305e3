// fp_ref_pkg: reference arithmetic for the floating-point testbenches.
//
// Computes IEEE-754 single-precision results from the simulator's
// double-precision `real` arithmetic, independently of the RTL. Exact
// sums are formed with the TwoSum error-free transformation (hi + lo is
// the exact value), then rounded once to single precision with
// round-to-nearest-even. Products of two singles are exact in double.
// The conventions match the unit under test: subnormal inputs read as
// zero, subnormal results flush to signed zero, NaN results are the
// canonical quiet NaN 32'h7FC00000.
package fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic logic f_nan(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction
  function automatic logic f_inf(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] == 0;
  endfunction
  function automatic logic f_zero(logic [31:0] x);
    return x[30:23] == 8'h00;
  endfunction

  function automatic real to_real(logic [31:0] x);
    logic [10:0] e;
    if (x[30:23] == 8'h00) return $bitstoreal({x[31], 63'd0});
    e = 11'({3'd0, x[30:23]} + 11'd896);
    return $bitstoreal({x[31], e, x[22:0], 29'd0});
  endfunction

  // exact error-free sum: hi + lo == a + b
  function automatic void two_sum(input real a, input real b, output real hi, output real lo);
    real bb;
    hi = a + b;
    bb = hi - a;
    lo = (a - (hi - bb)) + (b - bb);
  endfunction

  // round the exact value hi + lo (|lo| <= ulp(hi)/2) to single precision
  function automatic logic [31:0] round_single(real hi, real lo);
    logic [63:0] d;
    logic        s, g, rest, up, lo_same, lo_opp;
    int          se;
    logic [24:0] m;
    d = $realtobits(hi);
    s = d[63];
    if (d[62:0] == 63'd0) return {s, 31'd0};
    se   = int'(d[62:52]) - 1023 + 127;
    m    = {2'b01, d[51:29]};
    g    = d[28];
    rest = d[27:0] != 28'd0;
    lo_same = (lo != 0.0) && ((lo < 0.0) == (s == 1'b1));
    lo_opp  = (lo != 0.0) && !lo_same;
    if (!g)        up = 1'b0;
    else if (rest) up = 1'b1;
    else if (lo_same) up = 1'b1;
    else if (lo_opp)  up = 1'b0;
    else           up = m[0];
    m = m + 25'(up);
    if (m[24]) begin
      m  = m >> 1;
      se = se + 1;
    end
    if (se >= 255) return {s, 8'hFF, 23'd0};
    if (se <= 0)   return {s, 31'd0};
    return {s, se[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] x, logic [31:0] y);
    real hi, lo;
    if (f_nan(x) || f_nan(y)) return QNAN;
    if (f_inf(x) && f_inf(y)) return (x[31] == y[31]) ? x : QNAN;
    if (f_inf(x)) return x;
    if (f_inf(y)) return y;
    two_sum(to_real(x), to_real(y), hi, lo);
    return round_single(hi, lo);
  endfunction

  function automatic logic [31:0] ref_sub(logic [31:0] x, logic [31:0] y);
    return ref_add(x, {~y[31], y[30:0]});
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] x, logic [31:0] y);
    logic s;
    s = x[31] ^ y[31];
    if (f_nan(x) || f_nan(y)) return QNAN;
    if ((f_inf(x) && f_zero(y)) || (f_zero(x) && f_inf(y))) return QNAN;
    if (f_inf(x) || f_inf(y)) return {s, 8'hFF, 23'd0};
    return round_single(to_real(x) * to_real(y), 0.0);
  endfunction

  // a*b + c*d (sub = 0) or a*b - c*d (sub = 1), rounded once
  function automatic logic [31:0] ref_dot(logic [31:0] a, logic [31:0] b,
                                          logic [31:0] c, logic [31:0] d, logic sub);
    real p1, p2, hi, lo;
    logic s1, s2, i1, i2;
    s1 = a[31] ^ b[31];
    s2 = c[31] ^ d[31] ^ sub;
    i1 = f_inf(a) || f_inf(b);
    i2 = f_inf(c) || f_inf(d);
    if (f_nan(a) || f_nan(b) || f_nan(c) || f_nan(d)) return QNAN;
    if (i1 && (f_zero(a) || f_zero(b))) return QNAN;
    if (i2 && (f_zero(c) || f_zero(d))) return QNAN;
    if (i1 && i2) return (s1 == s2) ? {s1, 8'hFF, 23'd0} : QNAN;
    if (i1) return {s1, 8'hFF, 23'd0};
    if (i2) return {s2, 8'hFF, 23'd0};
    p1 = to_real(a) * to_real(b);
    p2 = to_real(c) * to_real(d);
    if (sub) p2 = -p2;
    two_sum(p1, p2, hi, lo);
    return round_single(hi, lo);
  endfunction

  // random normal number with biased exponent in [emin, emax]
  function automatic logic [31:0] rand_fp(int emin, int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // a mixture of operands: ordinary, close to x (cancellation), equal
  // exponent, widely different exponent, zero, special
  function automatic logic [31:0] rand_mix(logic [31:0] x);
    int k;
    k = int'($urandom_range(0, 19));
    case (k)
      0, 1, 2: return {x[31:8], 8'($urandom)};
      3, 4:    return {~x[31], x[30:6], 6'($urandom)};
      5, 6:    return {1'($urandom), x[30:23], 23'($urandom)};
      7:       return rand_fp(60, 100);
      8:       return {1'($urandom), 31'd0};
      9:       return {1'($urandom), 8'hFF, 23'd0};
      10:      return QNAN;
      default: return rand_fp(110, 145);
    endcase
  endfunction

endpackage
