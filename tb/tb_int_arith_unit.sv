// tb_int_arith_unit: self-checking testbench of the integer arithmetic
// block.
//
// Random and corner operands (0, all ones, sign bit) for add, subtract
// and the full 64-bit product. The product reference is built by
// shift-and-add, independent of the multiplication operator.
module tb_int_arith_unit;
  logic        sel;
  logic [31:0] a, b, y;
  logic [63:0] prod;
  int checks = 0, failures = 0;

  int_arith_unit #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick();
    case ($urandom_range(0, 5))
      0: return 32'h0;
      1: return 32'hFFFF_FFFF;
      2: return 32'h8000_0000;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic [63:0] ep;
    logic [32:0] es;
    for (int i = 0; i < 3000; i++) begin
      sel = 1'(i % 2);
      a = pick();
      b = pick();
      #1;
      ep = '0;
      for (int k = 0; k < 32; k++) if (b[k]) ep = ep + ({32'd0, a} << k);
      es = sel ? ({1'b0, a} + {1'b0, ~b} + 33'd1) : ({1'b0, a} + {1'b0, b});
      checks += 2;
      if (y !== es[31:0]) begin
        failures++;
        if (failures < 10) $display("sel %0d %h %h: got %h exp %h", sel, a, b, y, es[31:0]);
      end
      if (prod !== ep) begin
        failures++;
        if (failures < 10) $display("%h * %h: got %h exp %h", a, b, prod, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
