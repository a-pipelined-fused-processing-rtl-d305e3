// fused_add_sub: fused floating-point add-subtract unit (FAS).
//
// Computes both S = A + B and D = A - B of two IEEE-754 single-precision
// operands in one unit. As the fused add-subtract idea requires, the two
// results share the exponent comparison, the operand swap and the
// alignment shifter; only the significand adder, the normaliser and the
// rounder are duplicated.
//
// Pipeline (two register stages, one new operand pair per cycle):
//   stage 1: unpack, exponent compare, swap so X has the larger exponent,
//            align Y right by the exponent difference keeping guard,
//            round and sticky bits; special operands are resolved here.
//   stage 2: for the sum and the difference separately: add or subtract
//            the magnitudes according to the effective signs, normalise,
//            round to nearest-even and pack.
// in_valid/in_a/in_b are sampled on a rising clk edge; out_valid/sum/diff
// appear LAT_FAS (= 2) edges later. There is no back-pressure. The stage
// split, rounding mode and special-value handling are this design's
// choices; the source gives only the unit's function and its sharing.
module fused_add_sub
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_a,
  input  logic [31:0] in_b,
  output logic        out_valid,
  output logic [31:0] sum,
  output logic [31:0] diff
);
  // ---------------- stage 1: compare and align ----------------
  fp32_t a, b;
  logic        swap;
  logic [7:0]  ex, ey, dexp;
  logic [23:0] mx, my;
  logic [27:0] x_c, y_full, y_c;
  logic        sticky;
  logic        sp, sxs, sys, sxd, syd;
  logic [31:0] sp_sum, sp_diff;

  always_comb begin
    a = in_a;
    b = in_b;
    swap = b.exp > a.exp;
    ex   = swap ? b.exp : a.exp;
    ey   = swap ? a.exp : b.exp;
    mx   = swap ? signif(b) : signif(a);
    my   = swap ? signif(a) : signif(b);
    dexp = ex - ey;
    x_c    = {1'b0, mx, 3'b000};
    y_full = {1'b0, my, 3'b000};
    sticky = 1'b0;
    y_c    = y_full;
    if (dexp >= 8'd27) begin
      y_c    = '0;
      sticky = |my;
    end else begin
      for (int i = 0; i < 27; i++) begin
        if (i < int'(dexp) && y_full[i]) sticky = 1'b1;
      end
      y_c = y_full >> dexp;
    end
    y_c[0] = y_c[0] | sticky;
    // signs of X and Y in the sum and in the difference (A + (-B))
    sxs = swap ? b.sign  : a.sign;
    sys = swap ? a.sign  : b.sign;
    sxd = swap ? ~b.sign : a.sign;
    syd = swap ? a.sign  : ~b.sign;
    // special operands
    sp      = 1'b1;
    sp_sum  = FP_QNAN;
    sp_diff = FP_QNAN;
    if (is_nan(a) || is_nan(b)) begin
      sp_sum  = FP_QNAN;
      sp_diff = FP_QNAN;
    end else if (is_inf(a) && is_inf(b)) begin
      sp_sum  = (a.sign == b.sign) ? a : FP_QNAN;
      sp_diff = (a.sign != b.sign) ? a : FP_QNAN;
    end else if (is_inf(a)) begin
      sp_sum  = a;
      sp_diff = a;
    end else if (is_inf(b)) begin
      sp_sum  = b;
      sp_diff = {~b.sign, b.exp, b.frac};
    end else begin
      sp = 1'b0;
    end
  end

  logic        s1_valid, s1_sp, s1_sxs, s1_sys, s1_sxd, s1_syd;
  logic [7:0]  s1_ex;
  logic [27:0] s1_x, s1_y;
  logic [31:0] s1_sp_sum, s1_sp_diff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_sp      <= sp;
    s1_sp_sum  <= sp_sum;
    s1_sp_diff <= sp_diff;
    s1_sxs     <= sxs;
    s1_sys     <= sys;
    s1_sxd     <= sxd;
    s1_syd     <= syd;
    s1_ex      <= ex;
    s1_x       <= x_c;
    s1_y       <= y_c;
  end

  // ---------------- stage 2: two adders, normalise, round ----------------
  logic [27:0] mag_s, mag_d;
  logic        sgn_s, sgn_d;
  logic [4:0]  lz_s, lz_d;
  logic [26:0] nm_s, nm_d;
  logic [31:0] res_s, res_d;

  // add or subtract the shared aligned magnitudes for one output
  function automatic logic [28:0] addsub(logic sx, logic sy, logic [27:0] x, logic [27:0] y);
    // returns {sign, magnitude}
    if (sx == sy)  return {sx, x + y};
    else if (x >= y) return {(x == y) ? 1'b0 : sx, x - y};
    else           return {sy, y - x};
  endfunction

  always_comb begin
    {sgn_s, mag_s} = addsub(s1_sxs, s1_sys, s1_x, s1_y);
    {sgn_d, mag_d} = addsub(s1_sxd, s1_syd, s1_x, s1_y);
  end

  fp_normalize #(.W(28)) u_norm_s (.mag(mag_s), .lz(lz_s), .m(nm_s));
  fp_normalize #(.W(28)) u_norm_d (.mag(mag_d), .lz(lz_d), .m(nm_d));

  always_comb begin
    // bit 27 of the field carries the weight of exponent ex + 1
    res_s = round_pack(sgn_s, $signed({4'd0, s1_ex}) + 12'sd1 - $signed({7'd0, lz_s}), nm_s);
    res_d = round_pack(sgn_d, $signed({4'd0, s1_ex}) + 12'sd1 - $signed({7'd0, lz_d}), nm_d);
    if (s1_sp) begin
      res_s = s1_sp_sum;
      res_d = s1_sp_diff;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    sum  <= res_s;
    diff <= res_d;
  end
endmodule
