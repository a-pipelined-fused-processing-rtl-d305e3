// fused_dot_product: fused floating-point two-term dot-product unit (FDP).
//
// Computes X = A*B + C*D (op = 0) or X = A*B - C*D (op = 1) on IEEE-754
// single-precision operands with a single rounding at the end: the two
// 48-bit significand products are never rounded or normalised on their
// own. The structure follows the block diagram of the source: two
// multiplier trees and an exponent comparison, alignment of one product,
// a two's-complement stage controlled by the add/subtract select, a
// carry-save adder, a pipeline register, then the carry-propagate adder,
// a complement stage for a negative result, leading-zero anticipation and
// normalisation.
//
// Pipeline (three register stages, one new operand set per cycle):
//   stage 1: unpack, 24x24 significand products, product exponents and
//            signs, exponent comparison, special operands.
//   stage 2: align the product with the smaller exponent (the figure shows
//            only the C*D branch aligned; swapping which product is
//            shifted keeps the adder 53 bits wide), two's-complement it on
//            effective subtraction, 3:2 carry-save compression of the
//            larger product, the aligned smaller one and the +1.
//   stage 3: carry-propagate add and, beside it, a leading-zero
//            anticipator (lza53) working on the carry-save vectors;
//            complement if negative, normalise by the anticipated count
//            with a one-place correction, round to nearest-even, pack.
// Inputs are sampled on a rising clk edge; out_valid/result follow
// LAT_FDP (= 3) edges later. No back-pressure. Stage boundaries other
// than the register after the carry-save adder, the rounding mode and the
// special-value handling are this design's choices.
module fused_dot_product
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        op,        // 0: AB + CD, 1: AB - CD
  input  logic [31:0] in_a,
  input  logic [31:0] in_b,
  input  logic [31:0] in_c,
  input  logic [31:0] in_d,
  output logic        out_valid,
  output logic [31:0] result
);
  // ---------------- stage 1: multiplier trees, exponent compare ----------------
  fp32_t a, b, c, d;
  logic [47:0] p_ab, p_cd;
  logic signed [11:0] e_ab, e_cd;
  logic        s_ab, s_cd, z_ab, z_cd, swap;
  logic [11:0] dexp;
  logic        sp;
  logic [31:0] sp_res;
  logic        inf_ab, inf_cd, nan_any;

  always_comb begin
    a = in_a; b = in_b; c = in_c; d = in_d;
    p_ab = signif(a) * signif(b);
    p_cd = signif(c) * signif(d);
    // biased exponent belonging to product bit 46
    e_ab = $signed({4'd0, a.exp}) + $signed({4'd0, b.exp}) - 12'sd127;
    e_cd = $signed({4'd0, c.exp}) + $signed({4'd0, d.exp}) - 12'sd127;
    s_ab = a.sign ^ b.sign;
    s_cd = c.sign ^ d.sign ^ op;
    z_ab = is_zero(a) || is_zero(b);
    z_cd = is_zero(c) || is_zero(d);
    if (z_ab)      swap = 1'b1;
    else if (z_cd) swap = 1'b0;
    else           swap = e_cd > e_ab;
    dexp = swap ? 12'(e_cd - e_ab) : 12'(e_ab - e_cd);
    // special operands
    inf_ab  = is_inf(a) || is_inf(b);
    inf_cd  = is_inf(c) || is_inf(d);
    nan_any = is_nan(a) || is_nan(b) || is_nan(c) || is_nan(d)
              || (inf_ab && z_ab) || (inf_cd && z_cd)
              || (inf_ab && inf_cd && (s_ab != s_cd));
    sp     = 1'b1;
    sp_res = FP_QNAN;
    if (nan_any)     sp_res = FP_QNAN;
    else if (inf_ab) sp_res = {s_ab, 8'hFF, 23'd0};
    else if (inf_cd) sp_res = {s_cd, 8'hFF, 23'd0};
    else             sp = 1'b0;
  end

  logic        s1_valid, s1_sp, s1_swap, s1_s_ab, s1_s_cd;
  logic [31:0] s1_sp_res;
  logic [47:0] s1_p_ab, s1_p_cd;
  logic signed [11:0] s1_e_ab, s1_e_cd;
  logic [11:0] s1_dexp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_sp     <= sp;
    s1_sp_res <= sp_res;
    s1_swap   <= swap;
    s1_s_ab   <= s_ab;
    s1_s_cd   <= s_cd;
    s1_p_ab   <= p_ab;
    s1_p_cd   <= p_cd;
    s1_e_ab   <= e_ab;
    s1_e_cd   <= e_cd;
    s1_dexp   <= dexp;
  end

  // ---------------- stage 2: align, two's complement, carry-save ----------------
  // 53-bit field: [52] sign extension, [51] carry, [50:3] product, [2:0] guard bits
  logic [52:0] x_f, y_full, y_al, y_c, cin_v, csa_s, csa_c;
  logic        sticky, eff_sub, s_big;
  logic signed [11:0] e_big;

  always_comb begin
    x_f    = {2'b00, (s1_swap ? s1_p_cd : s1_p_ab), 3'b000};
    y_full = {2'b00, (s1_swap ? s1_p_ab : s1_p_cd), 3'b000};
    s_big  = s1_swap ? s1_s_cd : s1_s_ab;
    e_big  = s1_swap ? s1_e_cd : s1_e_ab;
    eff_sub = s1_s_ab != s1_s_cd;
    sticky = 1'b0;
    if (s1_dexp >= 12'd51) begin
      y_al   = '0;
      sticky = |y_full;
    end else begin
      for (int i = 0; i < 51; i++) begin
        if (i < int'(s1_dexp) && y_full[i]) sticky = 1'b1;
      end
      y_al = y_full >> s1_dexp;
    end
    y_al[0] = y_al[0] | sticky;
    y_c     = eff_sub ? ~y_al : y_al;
    cin_v   = {52'd0, eff_sub};
    csa_s   = x_f ^ y_c ^ cin_v;
    csa_c   = ((x_f & y_c) | (x_f & cin_v) | (y_c & cin_v)) << 1;
  end

  logic        s2_valid, s2_sp, s2_s_big, s2_eff_sub;
  logic [31:0] s2_sp_res;
  logic [52:0] s2_sum, s2_carry;
  logic signed [11:0] s2_e_big;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    s2_sp      <= s1_sp;
    s2_sp_res  <= s1_sp_res;
    s2_s_big   <= s_big;
    s2_eff_sub <= eff_sub;
    s2_sum     <= csa_s;
    s2_carry   <= csa_c;
    s2_e_big   <= e_big;
  end

  // ---------------- stage 3: adder, complement, LZA, normalise, round ----------------
  logic [52:0] r_sum;
  logic [51:0] mag;
  logic        neg, sgn;
  logic [5:0]  lz_pred;
  logic [52:0] sh;
  logic [26:0] nm;
  logic signed [11:0] e_res;
  logic [31:0] res;

  // leading-zero anticipation from the carry-save vectors, beside the adder
  lza53 u_lza (.a(s2_sum), .b(s2_carry), .lz(lz_pred));

  always_comb begin
    r_sum = s2_sum + s2_carry;
    neg   = r_sum[52];
    mag   = neg ? 52'(-r_sum) : r_sum[51:0];
    if (mag == 52'd0) sgn = s2_eff_sub ? 1'b0 : s2_s_big;
    else              sgn = neg ? ~s2_s_big : s2_s_big;
    // normalise by the anticipated count, then correct by one place:
    // the leading one lands on bit 52, 51 or 50 of the shifted value
    sh = {1'b0, mag} << lz_pred;
    // field bit 49 is product bit 46 (exponent e_big), so bit 51 is e_big + 2
    e_res = s2_e_big + 12'sd2 - $signed({6'd0, lz_pred});
    if (sh[52]) begin
      nm    = {sh[52:27], |sh[26:0]};
      e_res = e_res + 12'sd1;
    end else if (sh[51]) begin
      nm    = {sh[51:26], |sh[25:0]};
    end else begin
      nm    = {sh[50:25], |sh[24:0]};
      e_res = e_res - 12'sd1;
    end
    res = round_pack(sgn, e_res, nm);
    if (s2_sp) res = s2_sp_res;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s2_valid;
  end

  always_ff @(posedge clk) begin
    result <= res;
  end
endmodule
