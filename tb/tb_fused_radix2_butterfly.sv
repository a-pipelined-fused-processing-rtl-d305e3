// tb_fused_radix2_butterfly: self-checking testbench of the fused radix-2
// DIF butterfly.
//
// Streams complex X1, X2 and twiddle W, one butterfly per cycle with
// occasional gaps. The reference follows the butterfly's arithmetic:
// Y1 = X1 + X2 per component (one rounding), D = X1 - X2 rounded per
// component, Y2.re = D.re*W.re - D.im*W.im and Y2.im = D.re*W.im +
// D.im*W.re each rounded once. Twiddles are unit-magnitude values
// cos/sin(2*pi*k/N) as an FFT uses, plus random ones. Checks the LAT_BFLY
// latency and full-rate operation.
module tb_fused_radix2_butterfly;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int NRAND = 10000;

  logic clk = 0, rst_n = 1;
  logic in_valid = 0;
  cplx32_t x1 = '0, x2 = '0, w = '0;
  logic out_valid;
  cplx32_t y1, y2;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { cplx32_t x1, x2, w, y1, y2; int t; } exp_t;
  exp_t q[$];

  fused_radix2_butterfly dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
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
        checks += 3;
        if (y1 !== e.y1) begin
          failures++;
          if (failures < 20) $display("Y1: got %h exp %h", y1, e.y1);
        end
        if (y2 !== e.y2) begin
          failures++;
          if (failures < 20) $display("Y2 (x1 %h x2 %h w %h): got %h exp %h", e.x1, e.x2, e.w, y2, e.y2);
        end
        if (cycle - e.t != LAT_BFLY) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e.t, LAT_BFLY);
        end
      end
    end else begin
      burst_run = 0;
    end
  end

  function automatic logic [31:0] to_sp(real r);
    return round_single(r, 0.0);
  endfunction

  task automatic drive(cplx32_t a, cplx32_t b, cplx32_t tw);
    exp_t e;
    cplx32_t d;
    in_valid <= 1;
    x1 <= a; x2 <= b; w <= tw;
    e.x1 = a; e.x2 = b; e.w = tw; e.t = cycle + 1;
    e.y1.re = ref_add(a.re, b.re);
    e.y1.im = ref_add(a.im, b.im);
    d.re = ref_sub(a.re, b.re);
    d.im = ref_sub(a.im, b.im);
    e.y2.re = ref_dot(d.re, tw.re, d.im, tw.im, 1'b1);
    e.y2.im = ref_dot(d.re, tw.im, d.im, tw.re, 1'b0);
    q.push_back(e);
    @(posedge clk);
  endtask

  task automatic idle(int n);
    in_valid <= 0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    cplx32_t a, b, tw;
    real ang;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // x1 = 1 + 2j, x2 = 3 - 1j, w = 1
    drive('{re: 32'h3F800000, im: 32'h40000000}, '{re: 32'h40400000, im: 32'hBF800000},
          '{re: 32'h3F800000, im: 32'h00000000});
    // w = -j
    drive('{re: 32'h3F800000, im: 32'h40000000}, '{re: 32'h40400000, im: 32'hBF800000},
          '{re: 32'h00000000, im: 32'hBF800000});
    for (int i = 0; i < NRAND; i++) begin
      a = '{re: rand_fp(110, 140), im: rand_fp(110, 140)};
      b = '{re: rand_mix(a.re), im: rand_mix(a.im)};
      if (i % 2 == 0) begin
        ang = 2.0 * 3.14159265358979 * real'($urandom_range(0, 1023)) / 1024.0;
        tw = '{re: to_sp($cos(ang)), im: to_sp(-$sin(ang))};
      end else begin
        tw = '{re: rand_fp(100, 130), im: rand_fp(100, 130)};
      end
      drive(a, b, tw);
      if ($urandom_range(0, 15) == 0) idle(int'($urandom_range(1, 3)));
    end
    for (int i = 0; i < 32; i++)
      drive('{re: rand_fp(120, 130), im: rand_fp(120, 130)}, '{re: rand_fp(120, 130), im: rand_fp(120, 130)},
            '{re: rand_fp(120, 127), im: rand_fp(120, 127)});
    idle(LAT_BFLY + 4);
    checks++;
    if (q.size() != 0 || max_run < 32) begin
      failures++;
      $display("pending=%0d max_run=%0d", q.size(), max_run);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
