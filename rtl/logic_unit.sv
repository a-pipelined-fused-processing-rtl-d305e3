// logic_unit: bitwise logic block of the processing unit.
//
// Combinational. Selected by the low three bits of the opcode, it forms
// one of the eight logic instructions of the processing unit
// (opcodes 00000 to 00111): a AND b, a OR b, NOT a, NOT b, a NOR b,
// a NAND b, a XOR b, a XNOR b. The operation set and its encoding follow
// the instruction table of the source; the 32-bit width follows the
// processing unit's 32-bit operands.
module logic_unit #(
  parameter int unsigned W = 32
) (
  input  logic [2:0]   sel,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (sel)
      3'b000: y = a & b;
      3'b001: y = a | b;
      3'b010: y = ~a;
      3'b011: y = ~b;
      3'b100: y = ~(a | b);
      3'b101: y = ~(a & b);
      3'b110: y = a ^ b;
      3'b111: y = ~(a ^ b);
      default: y = '0;
    endcase
  end
endmodule
