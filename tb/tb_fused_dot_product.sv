// tb_fused_dot_product: self-checking testbench of the fused dot-product unit.
//
// Streams operand sets A, B, C, D and the add/subtract select, one per
// cycle with occasional gaps, and compares every result with the singly
// rounded reference a*b +/- c*d of fp_ref_pkg. Operands cover ordinary
// values, near-cancelling products, widely different product exponents,
// zeros, infinities and NaNs. Also checks the LAT_FDP latency and that a
// full-rate burst delivers one result per cycle.
module tb_fused_dot_product;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int NRAND = 20000;

  logic clk = 0, rst_n = 1;
  logic in_valid = 0, op = 0;
  logic [31:0] in_a = 0, in_b = 0, in_c = 0, in_d = 0;
  logic out_valid;
  logic [31:0] result;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_sub = 0, n_cancel = 0;

  typedef struct { logic [31:0] a, b, c, d, r; logic op; int t; } exp_t;
  exp_t q[$];

  fused_dot_product dut (.*);

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
          if (failures < 20)
            $display("%h*%h %s %h*%h: got %h exp %h", e.a, e.b, e.op ? "-" : "+", e.c, e.d, result, e.r);
        end
        if (cycle - e.t != LAT_FDP) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e.t, LAT_FDP);
        end
      end
    end else begin
      burst_run = 0;
    end
  end

  task automatic drive(logic [31:0] a, logic [31:0] b, logic [31:0] c, logic [31:0] d, logic sub);
    exp_t e;
    in_valid <= 1;
    in_a <= a; in_b <= b; in_c <= c; in_d <= d; op <= sub;
    e.a = a; e.b = b; e.c = c; e.d = d; e.op = sub; e.t = cycle + 1;
    e.r = ref_dot(a, b, c, d, sub);
    if (sub) n_sub++;
    q.push_back(e);
    @(posedge clk);
  endtask

  task automatic idle(int n);
    in_valid <= 0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    logic [31:0] a, b, c, d;
    int k;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // directed: exact cancellation, sign of zero, infinities, NaN
    drive(32'h3F800000, 32'h40000000, 32'h40000000, 32'h3F800000, 1'b1);
    drive(32'h3F800000, 32'h40000000, 32'h40000000, 32'h3F800000, 1'b0);
    drive(32'h80000000, 32'h3F800000, 32'h00000000, 32'h3F800000, 1'b1);
    drive(32'h7F800000, 32'h3F800000, 32'h7F800000, 32'h3F800000, 1'b1);
    drive(32'h7F800000, 32'h00000000, 32'h3F800000, 32'h3F800000, 1'b0);
    drive(32'h7F000000, 32'h7F000000, 32'h3F800000, 32'h3F800000, 1'b0);
    drive(32'h3F800001, 32'h3F800001, 32'h3F800000, 32'h3F800000, 1'b1);
    drive(32'h41C8A147, 32'h41C8A147, 32'h41C8A147, 32'h41C8A147, 1'b0);
    for (int i = 0; i < NRAND; i++) begin
      a = rand_fp(110, 140);
      b = rand_fp(110, 140);
      k = int'($urandom_range(0, 3));
      case (k)
        0: begin c = rand_mix(a); d = rand_mix(b); end
        1: begin c = {a[31:10], 10'($urandom)}; d = b; n_cancel++; end
        2: begin c = b; d = {a[31:7], 7'($urandom)}; n_cancel++; end
        default: begin c = rand_fp(90, 160); d = rand_fp(100, 150); end
      endcase
      drive(a, b, c, d, 1'($urandom));
      if ($urandom_range(0, 15) == 0) idle(int'($urandom_range(1, 3)));
    end
    for (int i = 0; i < 64; i++)
      drive(rand_fp(120, 130), rand_fp(120, 130), rand_fp(120, 130), rand_fp(120, 130), 1'($urandom));
    idle(LAT_FDP + 4);
    checks++;
    if (q.size() != 0 || max_run < 64 || n_sub == 0 || n_cancel == 0) begin
      failures++;
      $display("pending=%0d max_run=%0d", q.size(), max_run);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
