// tb_logic_unit: self-checking testbench of the bitwise logic block.
//
// Applies random operand pairs under all eight selects and compares each
// output bit with a per-bit truth-table reference.
module tb_logic_unit;
  logic [2:0]  sel;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  logic_unit #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // truth tables indexed by {a_bit, b_bit}: entry [3] is a=1,b=1
  function automatic logic [3:0] table_of(logic [2:0] s);
    case (s)
      3'd0: return 4'b1000; // and
      3'd1: return 4'b1110; // or
      3'd2: return 4'b0011; // not a
      3'd3: return 4'b0101; // not b
      3'd4: return 4'b0001; // nor
      3'd5: return 4'b0111; // nand
      3'd6: return 4'b0110; // xor
      default: return 4'b1001; // xnor
    endcase
  endfunction

  initial begin
    logic [31:0] e;
    logic [3:0]  t;
    for (int i = 0; i < 2000; i++) begin
      sel = 3'(i % 8);
      a = $urandom;
      b = (i % 5 == 0) ? a : $urandom;
      #1;
      t = table_of(sel);
      for (int k = 0; k < 32; k++) e[k] = t[{a[k], b[k]}];
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("sel %0d a %h b %h: got %h exp %h", sel, a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
