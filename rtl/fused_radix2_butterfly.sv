// fused_radix2_butterfly: radix-2 decimation-in-frequency FFT butterfly
// built from fused units.
//
//   Y1 = X1 + X2
//   Y2 = (X1 - X2) * W
// on complex operands whose real and imaginary parts are IEEE-754 single
// precision numbers. As in the fused butterfly of the source, one fused
// add-subtract unit per component produces X1+X2 and X1-X2 together, and
// the complex multiply uses two fused dot-product units:
//   Y2.re = D.re*W.re - D.im*W.im      (FDP, op = 1)
//   Y2.im = D.re*W.im + D.im*W.re      (FDP, op = 0)
// where D = X1 - X2 as rounded by the add-subtract units.
//
// Fully pipelined: a new butterfly every cycle. The twiddle factor is
// delayed LAT_FAS cycles to meet the differences, and Y1 is delayed
// LAT_FDP cycles so that Y1 and Y2 leave together LAT_BFLY (= 5) edges
// after the inputs were sampled. The delay-matching registers are this
// design's choice.
module fused_radix2_butterfly
  import fp32_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  cplx32_t x1,
  input  cplx32_t x2,
  input  cplx32_t w,
  output logic    out_valid,
  output cplx32_t y1,
  output cplx32_t y2
);
  cplx32_t s, dd;
  logic    fas_valid_r, fas_valid_i;
  cplx32_t w_dly [LAT_FAS];
  cplx32_t s_dly [LAT_FDP];
  logic    fdp_valid_r, fdp_valid_i;

  fused_add_sub u_fas_re (
    .clk, .rst_n, .in_valid(in_valid), .in_a(x1.re), .in_b(x2.re),
    .out_valid(fas_valid_r), .sum(s.re), .diff(dd.re)
  );
  fused_add_sub u_fas_im (
    .clk, .rst_n, .in_valid(in_valid), .in_a(x1.im), .in_b(x2.im),
    .out_valid(fas_valid_i), .sum(s.im), .diff(dd.im)
  );

  always_ff @(posedge clk) begin
    w_dly[0] <= w;
    for (int i = 1; i < LAT_FAS; i++) w_dly[i] <= w_dly[i-1];
    s_dly[0] <= s;
    for (int i = 1; i < LAT_FDP; i++) s_dly[i] <= s_dly[i-1];
  end

  fused_dot_product u_fdp_re (
    .clk, .rst_n, .in_valid(fas_valid_r), .op(1'b1),
    .in_a(dd.re), .in_b(w_dly[LAT_FAS-1].re), .in_c(dd.im), .in_d(w_dly[LAT_FAS-1].im),
    .out_valid(fdp_valid_r), .result(y2.re)
  );
  fused_dot_product u_fdp_im (
    .clk, .rst_n, .in_valid(fas_valid_i), .op(1'b0),
    .in_a(dd.re), .in_b(w_dly[LAT_FAS-1].im), .in_c(dd.im), .in_d(w_dly[LAT_FAS-1].re),
    .out_valid(fdp_valid_i), .result(y2.im)
  );

  assign y1        = s_dly[LAT_FDP-1];
  assign out_valid = fdp_valid_r & fdp_valid_i;
endmodule
