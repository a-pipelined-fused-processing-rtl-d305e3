// tb_fused_add_sub: self-checking testbench of the fused add-subtract unit.
//
// Streams one operand pair per cycle (bursts with gaps) through the unit
// and compares both the sum and the difference with fp_ref_pkg. Operands
// mix ordinary numbers, near-cancelling pairs, equal and widely different
// exponents, zeros, infinities and NaNs, plus directed corner cases. Also
// checks that each result appears exactly LAT_FAS cycles after its
// operands and that a full-rate burst gives one result per cycle.
module tb_fused_add_sub;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int NRAND = 20000;

  logic clk = 0, rst_n = 1;
  logic in_valid = 0;
  logic [31:0] in_a = 0, in_b = 0;
  logic out_valid;
  logic [31:0] sum, diff;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { logic [31:0] a, b, s, d; int t; } exp_t;
  exp_t q[$];

  fused_add_sub dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  int burst_run = 0, max_run = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      burst_run++;
      if (burst_run > max_run) max_run = burst_run;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = q.pop_front();
        checks += 3;
        if (sum !== e.s) begin
          failures++;
          if (failures < 20) $display("SUM  %h + %h: got %h exp %h", e.a, e.b, sum, e.s);
        end
        if (diff !== e.d) begin
          failures++;
          if (failures < 20) $display("DIFF %h - %h: got %h exp %h", e.a, e.b, diff, e.d);
        end
        if (cycle - e.t != LAT_FAS) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e.t, LAT_FAS);
        end
      end
    end else begin
      burst_run = 0;
    end
  end

  task automatic drive(logic [31:0] x, logic [31:0] y);
    exp_t e;
    in_valid <= 1;
    in_a <= x;
    in_b <= y;
    e.a = x; e.b = y; e.s = ref_add(x, y); e.d = ref_sub(x, y); e.t = cycle + 1;
    q.push_back(e);
    @(posedge clk);
  endtask

  task automatic idle(int n);
    in_valid <= 0;
    repeat (n) @(posedge clk);
  endtask

  logic [31:0] directed [][2] = '{
    '{32'h3F800000, 32'h3F800000}, '{32'h3F800000, 32'hBF800000},
    '{32'h00000000, 32'h80000000}, '{32'h80000000, 32'h80000000},
    '{32'h7F7FFFFF, 32'h7F7FFFFF}, '{32'h00800000, 32'h00800001},
    '{32'h3F800000, 32'h33800000}, '{32'h3F800000, 32'h33800001},
    '{32'h3F800001, 32'h33800000}, '{32'h4B000000, 32'h3F000000},
    '{32'h7F800000, 32'hFF800000}, '{32'h7F800000, 32'h7F800000},
    '{32'h7FC00000, 32'h3F800000}, '{32'h41C8A147, 32'h41C8A147},
    '{32'h00400000, 32'h3F800000}, '{32'h3F7FFFFF, 32'h3F800000}
  };

  initial begin
    logic [31:0] x;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (directed[i]) drive(directed[i][0], directed[i][1]);
    for (int i = 0; i < NRAND; i++) begin
      x = rand_fp(100, 150);
      drive(x, rand_mix(x));
      if ($urandom_range(0, 15) == 0) idle(int'($urandom_range(1, 3)));
    end
    // full-rate burst of 64
    for (int i = 0; i < 64; i++) begin
      x = rand_fp(120, 130);
      drive(x, rand_fp(120, 130));
    end
    idle(LAT_FAS + 4);
    checks++;
    if (q.size() != 0 || max_run < 64) begin
      failures++;
      $display("pending=%0d max_run=%0d", q.size(), max_run);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
