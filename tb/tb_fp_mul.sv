// tb_fp_mul: self-checking testbench of the single-precision multiplier.
//
// Streams operand pairs one per cycle with occasional gaps and compares
// each product with the reference of fp_ref_pkg (exact double product
// rounded once to single precision). Covers ordinary values, overflow,
// underflow to zero, zeros, infinities, 0*inf and NaN, and checks the
// LAT_MUL latency and full-rate operation.
module tb_fp_mul;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int NRAND = 20000;

  logic clk = 0, rst_n = 1;
  logic in_valid = 0;
  logic [31:0] in_a = 0, in_b = 0;
  logic out_valid;
  logic [31:0] result;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { logic [31:0] a, b, r; int t; } exp_t;
  exp_t q[$];

  fp_mul dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
        checks += 2;
        if (result !== e.r) begin
          failures++;
          if (failures < 20) $display("%h * %h: got %h exp %h", e.a, e.b, result, e.r);
        end
        // operand exponents 10000011 and 10000010 give product exponent 10000110
        if (e.a == 32'h41CA147B && e.b == 32'h410A147B) begin
          checks++;
          if (result[30:23] !== 8'b10000110) failures++;
        end
        if (cycle - e.t != LAT_MUL) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e.t, LAT_MUL);
        end
      end
    end else begin
      burst_run = 0;
    end
  end

  task automatic drive(logic [31:0] a, logic [31:0] b);
    exp_t e;
    in_valid <= 1;
    in_a <= a; in_b <= b;
    e.a = a; e.b = b; e.r = ref_mul(a, b); e.t = cycle + 1;
    q.push_back(e);
    @(posedge clk);
  endtask

  task automatic idle(int n);
    in_valid <= 0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    logic [31:0] a;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    drive(32'h3F800000, 32'h3F800000);
    drive(32'h41CA147B, 32'h410A147B);
    drive(32'h41C8A147, 32'h4108A147);
    drive(32'h7F000000, 32'h40000000);
    drive(32'h00800000, 32'h3F000000);
    drive(32'h7F800000, 32'h00000000);
    drive(32'hFF800000, 32'h3F800000);
    drive(32'h80000000, 32'h3F800000);
    drive(32'h3FFFFFFF, 32'h3FFFFFFF);
    for (int i = 0; i < NRAND; i++) begin
      a = rand_fp(90, 165);
      if ($urandom_range(0, 9) == 0) drive(a, rand_mix(a));
      else if ($urandom_range(0, 9) == 0) drive(rand_fp(1, 254), rand_fp(1, 254));
      else drive(a, rand_fp(90, 165));
      if ($urandom_range(0, 15) == 0) idle(int'($urandom_range(1, 3)));
    end
    for (int i = 0; i < 64; i++) drive(rand_fp(120, 130), rand_fp(120, 130));
    idle(LAT_MUL + 4);
    checks++;
    if (q.size() != 0 || max_run < 64) begin
      failures++;
      $display("pending=%0d max_run=%0d", q.size(), max_run);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
