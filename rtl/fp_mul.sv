// fp_mul: IEEE-754 single-precision multiplier.
//
// Supplies the "mult" value that the processing unit loads into its result
// register (opcode 10111). Stage 1 forms the 48-bit significand product,
// the product exponent and sign and resolves special operands; stage 2
// normalises (the product of two significands in [1,2) needs at most a
// one-bit shift), rounds to nearest-even and packs. Inputs are sampled on
// a rising clk edge, out_valid/result follow LAT_MUL (= 2) edges later,
// one operation per cycle, no back-pressure. The pipeline split, rounding
// and special-value handling are this design's choices; the source names
// the operation only.
module fp_mul
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_a,
  input  logic [31:0] in_b,
  output logic        out_valid,
  output logic [31:0] result
);
  fp32_t a, b;
  logic [47:0] p;
  logic signed [11:0] e;
  logic        s, sp;
  logic [31:0] sp_res;

  always_comb begin
    a = in_a;
    b = in_b;
    p = signif(a) * signif(b);
    e = $signed({4'd0, a.exp}) + $signed({4'd0, b.exp}) - 12'sd127;
    s = a.sign ^ b.sign;
    sp     = 1'b1;
    sp_res = FP_QNAN;
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b)))
      sp_res = FP_QNAN;
    else if (is_inf(a) || is_inf(b))
      sp_res = {s, 8'hFF, 23'd0};
    else
      sp = 1'b0;
  end

  logic        s1_valid, s1_s, s1_sp;
  logic [47:0] s1_p;
  logic signed [11:0] s1_e;
  logic [31:0] s1_sp_res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_p      <= p;
    s1_e      <= e;
    s1_s      <= s;
    s1_sp     <= sp;
    s1_sp_res <= sp_res;
  end

  logic [5:0]  lz;
  logic [26:0] nm;
  logic [31:0] res;

  fp_normalize #(.W(48)) u_norm (.mag(s1_p), .lz(lz), .m(nm));

  always_comb begin
    // product bit 46 has exponent e, so bit 47 has e + 1
    res = round_pack(s1_s, s1_e + 12'sd1 - $signed({6'd0, lz}), nm);
    if (s1_sp) res = s1_sp_res;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    result <= res;
  end
endmodule
