// processing_unit: pipelined fused processing unit for FFT / DSP work.
//
// Executes the 26 instructions of the unit's instruction table (see
// fp32_pkg::opcode_e) on two 32-bit operands a and b and writes the
// 32-bit result register `reg_q`, the temporary register `temp_q` or the
// 64-bit integer product register `mlt_q`. Four groups of hardware sit
// side by side, as in the unit's block diagram: logic (logic_unit),
// shifting (shift_unit), arithmetic (int_arith_unit and the floating-point
// multiplier fp_mul) and the FFT group (a fused add-subtract unit, a fused
// dot-product unit and a fused radix-2 butterfly).
//
// Timing. An instruction is accepted on a rising edge when in_valid and
// in_ready are both high. Logic, shift, integer, load and move
// instructions write their register on that same edge. The pipelined
// floating-point instructions write back later:
//   f_add / f_sub (10101/10110)  reg_q                LAT_FAS  + 1 edges
//   mult          (10111)        reg_q                LAT_MUL  + 1 edges
//   dot product   (11000)        reg_q                LAT_FDP  + 1 edges
//   radix-2 FFT   (11001)        reg_q, temp_q, y2    LAT_BFLY + 1 edges
// One instruction of a kind is accepted per cycle, so the floating-point
// units run at full throughput. in_ready drops (a stall) when accepting
// the instruction would make it write back on the same edge as, or
// before, one still in flight (results always retire in order, one per
// edge), or when it reads reg_q/temp_q while a write to them is pending.
// wb_valid is high for the cycle after each edge at which a pipelined
// result is written.
//
// Operands of the wide instructions (this design's choice; the source's
// block diagram shows only OP, A and B entering the unit):
//   dot product:  reg_q <= a*b + reg_q*temp_q   (one rounding)
//   radix-2 FFT:  X1 = a + j*b, X2 = reg_q + j*temp_q, W = tw_re + j*tw_im;
//                 {reg_q, temp_q} <= X1 + X2,  {y2_re, y2_im} <= (X1-X2)*W
// The shift instructions shift or rotate a by `shamt`. Opcodes 11010 to
// 11111 are not in the table and are accepted as no-operations. All
// registers clear to zero on reset (rst_n low, asynchronous).
module processing_unit
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [4:0]  opcode,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  input  logic [31:0] tw_re,
  input  logic [31:0] tw_im,
  output logic [31:0] reg_q,
  output logic [31:0] temp_q,
  output logic [63:0] mlt_q,
  output logic [31:0] y2_re,
  output logic [31:0] y2_im,
  output logic        wb_valid
);
  localparam int unsigned MAXE = LAT_BFLY + 1;

  opcode_e op;
  assign op = opcode_e'(opcode);

  // ---------------- issue control ----------------
  logic [MAXE:1] inflight;
  logic [3:0]    lat;       // edges until this instruction writes back
  logic          rd_regs;   // instruction reads reg_q or temp_q
  logic          stall, issue;

  always_comb begin
    unique case (op)
      OP_FADD, OP_FSUB: lat = 4'(LAT_FAS + 1);
      OP_FMUL:          lat = 4'(LAT_MUL + 1);
      OP_DOT:           lat = 4'(LAT_FDP + 1);
      OP_FFT:           lat = 4'(LAT_BFLY + 1);
      default:          lat = 4'd1;
    endcase
    rd_regs = (op == OP_MOVTR) || (op == OP_MOVRT) || (op == OP_DOT) || (op == OP_FFT);
    stall = 1'b0;
    for (int k = 1; k <= int'(MAXE); k++) begin
      if (inflight[k] && k >= int'(lat)) stall = 1'b1;
    end
    if (rd_regs && (inflight != '0)) stall = 1'b1;
  end

  assign in_ready = ~stall;
  assign issue    = in_valid & ~stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= '0;
    end else begin
      for (int k = 1; k < int'(MAXE); k++)
        inflight[k] <= inflight[k+1] | (issue && lat != 4'd1 && int'(lat) == k + 1);
      inflight[MAXE] <= 1'b0;
    end
  end

  // ---------------- combinational groups ----------------
  logic [31:0] logic_y, shift_y, arith_y;
  logic [63:0] arith_prod;

  logic_unit #(.W(32)) u_logic (.sel(opcode[2:0]), .a(a), .b(b), .y(logic_y));
  shift_unit #(.W(32)) u_shift (.sel(opcode[1:0]), .a(a), .amt(shamt), .y(shift_y));
  int_arith_unit #(.W(32)) u_arith (.sel(opcode[0]), .a(a), .b(b), .y(arith_y), .prod(arith_prod));

  // ---------------- pipelined floating-point group ----------------
  logic        fas_v, mul_v, dot_v, bf_v;
  logic [31:0] fas_sum, fas_diff, mul_res, dot_res;
  cplx32_t     bf_y1, bf_y2;
  logic [LAT_FAS-1:0] fas_sub_tag;

  fused_add_sub u_fas (
    .clk, .rst_n, .in_valid(issue && (op == OP_FADD || op == OP_FSUB)),
    .in_a(a), .in_b(b), .out_valid(fas_v), .sum(fas_sum), .diff(fas_diff)
  );

  always_ff @(posedge clk) begin
    fas_sub_tag <= {fas_sub_tag[LAT_FAS-2:0], (op == OP_FSUB)};
  end

  fp_mul u_fmul (
    .clk, .rst_n, .in_valid(issue && op == OP_FMUL),
    .in_a(a), .in_b(b), .out_valid(mul_v), .result(mul_res)
  );

  fused_dot_product u_fdp (
    .clk, .rst_n, .in_valid(issue && op == OP_DOT), .op(1'b0),
    .in_a(a), .in_b(b), .in_c(reg_q), .in_d(temp_q),
    .out_valid(dot_v), .result(dot_res)
  );

  fused_radix2_butterfly u_bfly (
    .clk, .rst_n, .in_valid(issue && op == OP_FFT),
    .x1('{re: a, im: b}), .x2('{re: reg_q, im: temp_q}), .w('{re: tw_re, im: tw_im}),
    .out_valid(bf_v), .y1(bf_y1), .y2(bf_y2)
  );

  // ---------------- register file write-back ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_q    <= '0;
      temp_q   <= '0;
      mlt_q    <= '0;
      y2_re    <= '0;
      y2_im    <= '0;
      wb_valid <= 1'b0;
    end else begin
      wb_valid <= fas_v | mul_v | dot_v | bf_v;
      if (fas_v) reg_q <= fas_sub_tag[LAT_FAS-1] ? fas_diff : fas_sum;
      if (mul_v) reg_q <= mul_res;
      if (dot_v) reg_q <= dot_res;
      if (bf_v) begin
        reg_q  <= bf_y1.re;
        temp_q <= bf_y1.im;
        y2_re  <= bf_y2.re;
        y2_im  <= bf_y2.im;
      end
      if (issue) begin
        unique case (op)
          OP_AND, OP_OR, OP_NOTA, OP_NOTB,
          OP_NOR, OP_NAND, OP_XOR, OP_XNOR: reg_q <= logic_y;
          OP_SHL, OP_SHR, OP_ROR, OP_ROL:   reg_q <= shift_y;
          OP_ADD, OP_SUB:                   reg_q <= arith_y;
          OP_MLT:                           mlt_q <= arith_prod;
          OP_LDA:                           reg_q <= a;
          OP_LDB:                           reg_q <= b;
          OP_LDTA:                          temp_q <= a;
          OP_LDTB:                          temp_q <= b;
          OP_MOVTR:                         temp_q <= reg_q;
          OP_MOVRT:                         reg_q <= temp_q;
          default: ;
        endcase
      end
    end
  end

  // At most one pipelined unit retires per edge, and never on the edge of
  // a single-cycle instruction.
  function automatic int unsigned n_set(logic [4:0] v);
    int unsigned n = 0;
    for (int i = 0; i < 5; i++) n += int'(v[i]);
    return n;
  endfunction

  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    n_set({fas_v, mul_v, dot_v, bf_v, issue && lat == 4'd1}) <= 1)
    else $error("processing_unit: two results retire on one edge");
endmodule
