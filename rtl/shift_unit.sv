// shift_unit: shifting block of the processing unit.
//
// Combinational. Selected by the low two bits of the opcode
// (01000 shift left, 01001 shift right, 01010 rotate right,
// 01011 rotate left), it shifts or rotates operand a by the amount on
// `amt`. The four operations come from the instruction table of the
// source, which also shows a separate shift-amount input; using operand a,
// logical (zero-filling) shifts and a 5-bit amount are this design's
// choices.
module shift_unit #(
  parameter int unsigned W = 32
) (
  input  logic [1:0]           sel,
  input  logic [W-1:0]         a,
  input  logic [$clog2(W)-1:0] amt,
  output logic [W-1:0]         y
);
  // a shift by W (amt = 0 in the rotations) gives zero, so amt = 0 rotates by nothing
  logic [$clog2(W):0] back;

  always_comb begin
    back = ($clog2(W)+1)'(W) - {1'b0, amt};
    unique case (sel)
      2'b00: y = a << amt;
      2'b01: y = a >> amt;
      2'b10: y = (a >> amt) | (a << back);
      2'b11: y = (a << amt) | (a >> back);
      default: y = a;
    endcase
  end
endmodule
