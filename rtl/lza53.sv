// lza53: leading-zero anticipator for the 53-bit adder of the fused
// dot-product unit.
//
// Works on the two carry-save vectors that feed the final adder, in
// parallel with it, instead of waiting for the sum. For every bit it forms
// transfer t = a^b, generate g = a&b and zero z = ~a&~b and the indicator
//   f[i] = t[i+1] & (g[i] & ~z[i-1] | z[i] & ~g[i-1])
//        | ~t[i+1] & (z[i] & ~z[i-1] | g[i] & ~g[i-1])
// whose leading one marks the first significant digit of the two's
// complement sum a + b (a leading 1 for a positive sum, a leading 0 for a
// negative one). The prediction can be one position off, so the
// normaliser that uses `lz` checks the top bits after shifting and
// corrects by one place. `lz` counts from bit 51 (the top magnitude bit).
// A zero sum needs no special case: its shifted magnitude is zero.
// Combinational.
module lza53 (
  input  logic [52:0] a,
  input  logic [52:0] b,
  output logic [5:0]  lz
);
  logic [54:0] t, g, z;   // index 0 is the bit below a[0], 54 the bit above a[52]
  logic [52:0] f;

  always_comb begin
    t = {a[52] ^ b[52], a ^ b, 1'b0};
    g = {1'b0, a & b, 1'b0};
    z = {1'b0, ~a & ~b, 1'b1};
    for (int i = 0; i < 53; i++) begin
      f[i] = ( t[i+2] & ((g[i+1] & ~z[i]) | (z[i+1] & ~g[i])))
           | (~t[i+2] & ((z[i+1] & ~z[i]) | (g[i+1] & ~g[i])));
    end
    lz = 6'd52;
    for (int i = 0; i < 52; i++) begin
      if (f[i]) lz = 6'(51 - i);
    end
    if (f[52]) lz = 6'd0;
  end
endmodule
