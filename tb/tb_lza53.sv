// tb_lza53: self-checking testbench of the leading-zero anticipator.
//
// Applies pairs of 53-bit vectors shaped like the dot-product adder's
// inputs: a non-negative value below 2^51 plus either another one or the
// bitwise inverse of one with a carry-in (a subtraction). Many pairs
// nearly cancel. For every pair whose sum is non-zero it shifts the
// magnitude of the sum left by the anticipated count and checks that the
// leading one lands on bit 52, 51 or 50. That is the one-place window the
// dot-product unit's normaliser corrects. It counts how often each of the
// three positions occurs and fails if the exact one (bit 51) never does.
module tb_lza53;
  logic [52:0] a, b;
  logic [5:0]  lz;
  int checks = 0, failures = 0;
  int pos_hist [3];

  lza53 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [52:0] rnd51();
    return {2'b00, 19'($urandom), $urandom};
  endfunction

  initial begin
    logic [52:0] x, y, s, mag, sh;
    int k;
    for (int i = 0; i < 40000; i++) begin
      x = rnd51();
      k = int'($urandom_range(0, 3));
      case (k)
        0: y = rnd51();
        1: y = x ^ (53'(1) << $urandom_range(0, 50));   // near cancellation
        2: y = x + 53'($urandom_range(0, 255)) - 53'(128);
        default: y = x >> $urandom_range(0, 50);
      endcase
      y[52:51] = 2'b00;
      if (k == 0 && $urandom_range(0, 1) == 0) begin
        a = x; b = y;                       // addition
      end else begin
        // x - y as the CSA would present it: x, ~y and the +1 compressed
        logic [52:0] yc, c1;
        yc = ~y;
        c1 = 53'd1;
        a  = x ^ yc ^ c1;
        b  = ((x & yc) | (x & c1) | (yc & c1)) << 1;
      end
      #1;
      s   = a + b;
      mag = s[52] ? -s : s;
      if (mag != 0) begin
        sh = mag << lz;
        checks++;
        if (sh[52])      pos_hist[0]++;
        else if (sh[51]) pos_hist[1]++;
        else if (sh[50]) pos_hist[2]++;
        else begin
          failures++;
          if (failures < 10) $display("a %h b %h sum %h lz %0d", a, b, s, lz);
        end
      end
    end
    checks++;
    if (pos_hist[1] == 0) failures++;
    $display("leading one on bit 52/51/50: %0d/%0d/%0d", pos_hist[0], pos_hist[1], pos_hist[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
