// tb_shift_unit: self-checking testbench of the shift/rotate block.
//
// For random operands and every shift amount 0..31, checks shift left,
// shift right, rotate right and rotate left against a bit-by-bit
// reference.
module tb_shift_unit;
  logic [1:0]  sel;
  logic [31:0] a, y;
  logic [4:0]  amt;
  int checks = 0, failures = 0;

  shift_unit #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    int src;
    for (int i = 0; i < 40; i++) begin
      for (int s = 0; s < 32; s++) begin
        for (int m = 0; m < 4; m++) begin
          sel = 2'(m);
          a   = $urandom;
          amt = 5'(s);
          #1;
          for (int k = 0; k < 32; k++) begin
            case (m)
              0: begin src = k - s; e[k] = (src >= 0) ? a[src] : 1'b0; end
              1: begin src = k + s; e[k] = (src < 32) ? a[src] : 1'b0; end
              2: e[k] = a[(k + s) % 32];
              default: e[k] = a[(k - s + 32) % 32];
            endcase
          end
          checks++;
          if (y !== e) begin
            failures++;
            if (failures < 10) $display("sel %0d a %h amt %0d: got %h exp %h", m, a, s, y, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
