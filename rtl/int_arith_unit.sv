// int_arith_unit: integer arithmetic block of the processing unit.
//
// Combinational. Gives a + b or a - b (sel = 0 / 1, opcodes 01100 and
// 01101, wrapping modulo 2^W) on `y`, and the full 2W-bit unsigned
// product a * b on `prod` for opcode 01110, which the processing unit
// stores in its separate product register `mlt`. The operations come from
// the instruction table of the source; two's-complement wrap-around and an
// unsigned full-width product are this design's choices.
module int_arith_unit #(
  parameter int unsigned W = 32
) (
  input  logic           sel,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y,
  output logic [2*W-1:0] prod
);
  assign y    = sel ? (a - b) : (a + b);
  assign prod = {{W{1'b0}}, a} * {{W{1'b0}}, b};
endmodule
