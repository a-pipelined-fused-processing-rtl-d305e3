// fp_normalize: leading-zero count and normalising left shift.
//
// Takes an unsigned magnitude of W bits, finds its leading one and shifts
// it to the top. The top 26 bits of the shifted value and a sticky bit (OR
// of everything below them) form the 27-bit significand that
// fp32_pkg::round_pack() rounds. The caller subtracts `lz` from the
// exponent that belongs to bit W-1. Purely combinational; used after the
// adders of the fused add-subtract unit, the fused dot-product unit and the
// multiplier. The count is exact (an exact priority encoder stands in for a
// leading-zero anticipator).
module fp_normalize #(
  parameter int unsigned W = 28
) (
  input  logic [W-1:0]           mag,
  output logic [$clog2(W+1)-1:0] lz,
  output logic [26:0]            m
);
  logic [W-1:0] sh;

  always_comb begin
    lz = $clog2(W+1)'(W);
    for (int i = 0; i < W; i++) begin
      if (mag[i]) lz = $clog2(W+1)'(W - 1 - i);
    end
    sh = mag << lz;
  end

  if (W >= 27) begin : g_wide
    assign m = {sh[W-1 -: 26], |sh[W-27:0]};
  end else begin : g_narrow
    assign m = {sh, {(27 - W){1'b0}}};
  end
endmodule
