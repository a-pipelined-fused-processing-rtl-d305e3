// tb_processing_unit: end-to-end self-checking testbench of the processing
// unit, run with every parameter at its default.
//
// Issues a random program of instructions through the valid/ready
// handshake. Runs of back-to-back floating-point instructions are mixed
// in so that the pipelines are kept full and hazards occur. An
// architectural model executes the same program in order with the
// fp_ref_pkg arithmetic and records, for every accepted instruction, the
// register state it must leave and the cycle at which it must appear
// (issue edge + its write-back latency). The testbench compares reg_q,
// temp_q, mlt_q, y2_re/y2_im and wb_valid at each of those cycles.
//
// It counts every opcode executed, stall cycles, instructions accepted on
// consecutive cycles while a floating-point result is still in flight
// (pipelining), and fails if any of them never happened.
module tb_processing_unit;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int NINSTR = 6000;

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
  int op_count [32];
  int n_stall = 0, n_overlap = 0, n_wb = 0, n_issued = 0;

  typedef struct {
    int          t;
    logic        pipelined;
    logic [4:0]  op;
    logic [31:0] r, tr, y2r, y2i;
    logic [63:0] m;
  } snap_t;
  snap_t q[$];

  // architectural model state
  logic [31:0] m_reg = 0, m_temp = 0, m_y2r = 0, m_y2i = 0;
  logic [63:0] m_mlt = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20 * NINSTR) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lat_of(logic [4:0] op);
    case (op)
      OP_FADD, OP_FSUB: return LAT_FAS + 1;
      OP_FMUL:          return LAT_MUL + 1;
      OP_DOT:           return LAT_FDP + 1;
      OP_FFT:           return LAT_BFLY + 1;
      default:          return 1;
    endcase
  endfunction

  function automatic logic [31:0] rotr(logic [31:0] x, int s);
    logic [31:0] r;
    for (int k = 0; k < 32; k++) r[k] = x[(k + s) % 32];
    return r;
  endfunction

  // execute one instruction on the model
  function automatic void model(logic [4:0] op, logic [31:0] x, logic [31:0] y, int s,
                                logic [31:0] wr, logic [31:0] wi);
    logic [31:0] dr, di, r0, t0;
    r0 = m_reg;
    t0 = m_temp;
    case (op)
      OP_AND:   m_reg = x & y;
      OP_OR:    m_reg = x | y;
      OP_NOTA:  m_reg = ~x;
      OP_NOTB:  m_reg = ~y;
      OP_NOR:   m_reg = ~(x | y);
      OP_NAND:  m_reg = ~(x & y);
      OP_XOR:   m_reg = x ^ y;
      OP_XNOR:  m_reg = ~(x ^ y);
      OP_SHL:   m_reg = x << s;
      OP_SHR:   m_reg = x >> s;
      OP_ROR:   m_reg = rotr(x, s);
      OP_ROL:   m_reg = rotr(x, (32 - s) % 32);
      OP_ADD:   m_reg = x + y;
      OP_SUB:   m_reg = x - y;
      OP_MLT:   m_mlt = 64'(x) * 64'(y);
      OP_LDA:   m_reg = x;
      OP_LDB:   m_reg = y;
      OP_LDTA:  m_temp = x;
      OP_LDTB:  m_temp = y;
      OP_MOVTR: m_temp = r0;
      OP_MOVRT: m_reg = t0;
      OP_FADD:  m_reg = ref_add(x, y);
      OP_FSUB:  m_reg = ref_sub(x, y);
      OP_FMUL:  m_reg = ref_mul(x, y);
      OP_DOT:   m_reg = ref_dot(x, y, r0, t0, 1'b0);
      OP_FFT: begin
        m_reg  = ref_add(x, r0);
        m_temp = ref_add(y, t0);
        dr = ref_sub(x, r0);
        di = ref_sub(y, t0);
        m_y2r = ref_dot(dr, wr, di, wi, 1'b1);
        m_y2i = ref_dot(dr, wi, di, wr, 1'b0);
      end
      default: ;
    endcase
  endfunction

  // issue monitor and checker
  int last_issue = -10;
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        snap_t sn;
        int    l;
        logic  pend;
        pend = 1'b0;
        foreach (q[j]) if (q[j].pipelined && q[j].t > cycle) pend = 1'b1;
        model(opcode, a, b, int'(shamt), tw_re, tw_im);
        l = lat_of(opcode);
        sn.t = cycle + l;
        sn.pipelined = l > 1;
        sn.op = opcode;
        sn.r = m_reg; sn.tr = m_temp; sn.m = m_mlt; sn.y2r = m_y2r; sn.y2i = m_y2i;
        q.push_back(sn);
        op_count[opcode]++;
        n_issued++;
        if (last_issue == cycle - 1 && pend) n_overlap++;
        last_issue = cycle;
      end
      if (wb_valid) n_wb++;
      while (q.size() != 0 && q[0].t == cycle) begin
        snap_t e;
        e = q.pop_front();
        checks++;
        if (reg_q !== e.r || temp_q !== e.tr || mlt_q !== e.m || y2_re !== e.y2r || y2_im !== e.y2i
            || (e.pipelined && !wb_valid)) begin
          failures++;
          if (failures < 15)
            $display("cycle %0d op %b: reg %h/%h temp %h/%h mlt %h/%h y2 %h%h/%h%h wb %b",
                     cycle, e.op, reg_q, e.r, temp_q, e.tr, mlt_q, e.m, y2_re, y2_im, e.y2r, e.y2i, wb_valid);
        end
      end
      if (q.size() != 0 && q[0].t < cycle) begin
        failures++;
        void'(q.pop_front());
        $display("missed a retirement check");
      end
    end
    cycle <= cycle + 1;
  end

  // send one instruction and hold it until accepted
  task automatic send(logic [4:0] op, logic [31:0] x, logic [31:0] y);
    in_valid <= 1;
    opcode <= op;
    a <= x;
    b <= y;
    shamt <= 5'($urandom);
    tw_re <= rand_fp(118, 127);
    tw_im <= rand_fp(118, 127);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
  endtask

  task automatic idle(int n);
    in_valid <= 0;
    repeat (n) @(posedge clk);
  endtask

  function automatic logic [31:0] fp_operand();
    return ($urandom_range(0, 9) == 0) ? rand_mix(rand_fp(120, 130)) : rand_fp(115, 135);
  endfunction

  initial begin
    logic [4:0] op;
    int missing;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // a directed butterfly: X1 = 1 + 2j, X2 = 3 - 1j, W = 0.5 - 0.5j
    send(OP_LDA, 32'h40400000, 0);
    send(OP_LDTB, 0, 32'hBF800000);
    in_valid <= 1; opcode <= OP_FFT; a <= 32'h3F800000; b <= 32'h40000000;
    tw_re <= 32'h3F000000; tw_im <= 32'hBF000000;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    idle(8);
    checks++;
    // Y1 = 4 + 1j, Y2 = (-2 + 3j)(0.5 - 0.5j) = 0.5 + 2.5j
    if (reg_q !== 32'h40800000 || temp_q !== 32'h3F800000 || y2_re !== 32'h3F000000 || y2_im !== 32'h40200000) begin
      failures++;
      $display("directed butterfly: %h %h %h %h", reg_q, temp_q, y2_re, y2_im);
    end
    for (int i = 0; i < NINSTR; i++) begin
      case ($urandom_range(0, 5))
        0: begin  // burst of floating-point instructions
          repeat ($urandom_range(2, 6)) begin
            op = 5'(OP_FADD + $urandom_range(0, 2));
            send(op, fp_operand(), fp_operand());
          end
        end
        1: begin  // set up registers, then a wide instruction
          send(OP_LDA, fp_operand(), 0);
          send(OP_LDTB, 0, fp_operand());
          send(($urandom_range(0, 1) == 0) ? OP_DOT : OP_FFT, fp_operand(), fp_operand());
        end
        2: send(5'($urandom_range(0, 31)), $urandom, $urandom);
        default: begin
          op = 5'($urandom_range(0, 25));
          if (op >= OP_FADD) send(op, fp_operand(), fp_operand());
          else send(op, $urandom, $urandom);
        end
      endcase
      if ($urandom_range(0, 9) == 0) idle(int'($urandom_range(1, 8)));
    end
    idle(LAT_BFLY + 4);
    checks++;
    missing = 0;
    for (int k = 0; k < 26; k++) if (op_count[k] == 0) missing++;
    if (q.size() != 0 || missing != 0 || n_stall == 0 || n_overlap == 0 || n_wb == 0) begin
      failures++;
      $display("pending %0d, opcodes never run %0d, stalls %0d, overlaps %0d, write-backs %0d",
               q.size(), missing, n_stall, n_overlap, n_wb);
    end
    $display("issued %0d, stall cycles %0d, pipelined overlaps %0d, FP write-backs %0d, dot %0d, fft %0d",
             n_issued, n_stall, n_overlap, n_wb, op_count[OP_DOT], op_count[OP_FFT]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
