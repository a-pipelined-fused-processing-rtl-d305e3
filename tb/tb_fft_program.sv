// tb_fft_program: complete FFTs computed on the processing unit.
//
// Runs radix-2 decimation-in-frequency FFTs of 8, 64 and 256 points as
// programs for the processing unit: for every butterfly it loads X2 with
// "load Reg,A" (01111) and "load Reg_T,B" (10010), issues the radix-2 FFT
// instruction (11001) with X1 on a/b and the twiddle on tw_re/tw_im, and
// reads Y1 from reg_q/temp_q and Y2 from y2_re/y2_im after write-back.
// Twiddles are W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N) rounded to single
// precision. Each butterfly result must match the fp_ref_pkg model bit for
// bit, and each complete transform (read out in bit-reversed order) must
// agree with a double-precision DFT of the same input to within
// 1e-5 of the largest output magnitude. Cycles per transform are reported;
// every butterfly must retire exactly LAT_BFLY + 1 edges after issue.
module tb_fft_program;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 0, rst_n = 1;
  logic        in_valid = 0, in_ready;
  logic [4:0]  opcode = 0, shamt = 0;
  logic [31:0] a = 0, b = 0, tw_re = 0, tw_im = 0;
  logic [31:0] reg_q, temp_q, y2_re, y2_im;
  logic [63:0] mlt_q;
  logic        wb_valid;

  processing_unit dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  localparam real PI = 3.14159265358979323846;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] sp(real r);
    return round_single(r, 0.0);
  endfunction

  // present an instruction in mid-cycle and hold it until it is accepted;
  // returns 1 ns after the accepting edge
  task automatic issue(logic [4:0] op, logic [31:0] x, logic [31:0] y);
    @(negedge clk);
    in_valid = 1;
    opcode = op;
    a = x;
    b = y;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1;
    in_valid = 0;
  endtask

  // one butterfly on the processing unit
  task automatic butterfly(inout cplx32_t p, inout cplx32_t q, input cplx32_t w);
    cplx32_t e1, e2, d;
    int t0;
    // reference
    e1.re = ref_add(p.re, q.re);
    e1.im = ref_add(p.im, q.im);
    d.re  = ref_sub(p.re, q.re);
    d.im  = ref_sub(p.im, q.im);
    e2.re = ref_dot(d.re, w.re, d.im, w.im, 1'b1);
    e2.im = ref_dot(d.re, w.im, d.im, w.re, 1'b0);
    issue(OP_LDA, q.re, 32'd0);
    issue(OP_LDTB, 32'd0, q.im);
    tw_re = w.re;
    tw_im = w.im;
    issue(OP_FFT, p.re, p.im);
    // the accepting edge counts as the first; write-back is at edge LAT_BFLY + 1
    t0 = 1;
    while (!wb_valid) begin
      @(posedge clk);
      #1;
      t0++;
    end
    checks += 2;
    if (t0 != int'(LAT_BFLY) + 1) begin
      failures++;
      $display("butterfly retired at edge %0d after issue", t0);
    end
    if (reg_q !== e1.re || temp_q !== e1.im || y2_re !== e2.re || y2_im !== e2.im) begin
      failures++;
      if (failures < 10) $display("butterfly: got %h %h %h %h exp %h %h %h %h",
                                  reg_q, temp_q, y2_re, y2_im, e1.re, e1.im, e2.re, e2.im);
    end
    p = '{re: reg_q, im: temp_q};
    q = '{re: y2_re, im: y2_im};
  endtask

  function automatic int bitrev(int k, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (k & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  task automatic run_fft(int n);
    cplx32_t x[];
    real     xr[], xi[];
    int      bits, t_start, h;
    real     maxmag, err, maxerr, sr, si, ang;
    x  = new[n];
    xr = new[n];
    xi = new[n];
    bits = $clog2(n);
    for (int i = 0; i < n; i++) begin
      x[i] = '{re: sp(real'($urandom_range(0, 2000)) / 1000.0 - 1.0),
               im: sp(real'($urandom_range(0, 2000)) / 1000.0 - 1.0)};
      xr[i] = to_real(x[i].re);
      xi[i] = to_real(x[i].im);
    end
    t_start = cycle;
    h = n / 2;
    while (h >= 1) begin
      for (int g = 0; g < n; g += 2 * h) begin
        for (int j = 0; j < h; j++) begin
          cplx32_t w, p, q;
          ang = 2.0 * PI * real'(j * (n / (2 * h))) / real'(n);
          w = '{re: sp($cos(ang)), im: sp(-$sin(ang))};
          p = x[g + j];
          q = x[g + j + h];
          butterfly(p, q, w);
          x[g + j] = p;
          x[g + j + h] = q;
        end
      end
      h = h / 2;
    end
    // compare with a double-precision DFT
    maxmag = 0.0;
    maxerr = 0.0;
    for (int k = 0; k < n; k++) begin
      sr = 0.0;
      si = 0.0;
      for (int i = 0; i < n; i++) begin
        ang = 2.0 * PI * real'((i * k) % n) / real'(n);
        sr += xr[i] * $cos(ang) + xi[i] * $sin(ang);
        si += xi[i] * $cos(ang) - xr[i] * $sin(ang);
      end
      if ($sqrt(sr * sr + si * si) > maxmag) maxmag = $sqrt(sr * sr + si * si);
      err = $sqrt((to_real(x[bitrev(k, bits)].re) - sr) ** 2 + (to_real(x[bitrev(k, bits)].im) - si) ** 2);
      if (err > maxerr) maxerr = err;
    end
    checks++;
    if (maxerr > 1.0e-5 * maxmag) begin
      failures++;
      $display("%0d-point FFT: error %g against peak %g", n, maxerr, maxmag);
    end
    $display("%0d-point FFT: %0d butterflies in %0d cycles, max error %g (peak %g)",
             n, n / 2 * bits, cycle - t_start, maxerr, maxmag);
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_fft(8);
    run_fft(64);
    run_fft(256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
