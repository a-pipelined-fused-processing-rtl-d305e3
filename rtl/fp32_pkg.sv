// fp32_pkg: types, constants and shared rounding logic for the IEEE-754
// single-precision arithmetic of the processing unit.
//
// Every floating-point unit (fused add-subtract, fused dot product,
// multiplier) ends in the same step: a normalised 27-bit significand
// (hidden one at bit 26, 23 fraction bits, then guard, round and sticky)
// is rounded to nearest-even and packed. That step is round_pack() below.
//
// Number handling (this design's choice, the source only says "32-bit
// IEEE-754"): subnormal inputs are read as zero and results that would be
// subnormal are flushed to signed zero; overflow gives signed infinity;
// any NaN operand or an invalid operation (inf-inf, 0*inf) gives the
// canonical quiet NaN 32'h7FC00000.
//
// The package also holds the opcode encoding of Table 1 of the source and
// the pipeline latencies of the arithmetic units.
package fp32_pkg;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] frac;
  } fp32_t;

  typedef struct packed {
    logic [31:0] re;
    logic [31:0] im;
  } cplx32_t;

  localparam logic [31:0] FP_QNAN = 32'h7FC0_0000;

  // Pipeline depth (register stages from input to registered output).
  localparam int unsigned LAT_FAS = 2;
  localparam int unsigned LAT_FDP = 3;
  localparam int unsigned LAT_MUL = 2;
  localparam int unsigned LAT_BFLY = LAT_FAS + LAT_FDP;

  // Instruction set of the processing unit (Table 1 of the source).
  typedef enum logic [4:0] {
    OP_AND     = 5'b00000,
    OP_OR      = 5'b00001,
    OP_NOTA    = 5'b00010,
    OP_NOTB    = 5'b00011,
    OP_NOR     = 5'b00100,
    OP_NAND    = 5'b00101,
    OP_XOR     = 5'b00110,
    OP_XNOR    = 5'b00111,
    OP_SHL     = 5'b01000,
    OP_SHR     = 5'b01001,
    OP_ROR     = 5'b01010,
    OP_ROL     = 5'b01011,
    OP_ADD     = 5'b01100,
    OP_SUB     = 5'b01101,
    OP_MLT     = 5'b01110,
    OP_LDA     = 5'b01111,
    OP_LDB     = 5'b10000,
    OP_LDTA    = 5'b10001,
    OP_LDTB    = 5'b10010,
    OP_MOVTR   = 5'b10011,
    OP_MOVRT   = 5'b10100,
    OP_FADD    = 5'b10101,
    OP_FSUB    = 5'b10110,
    OP_FMUL    = 5'b10111,
    OP_DOT     = 5'b11000,
    OP_FFT     = 5'b11001
  } opcode_e;

  function automatic logic is_nan(fp32_t x);
    return (x.exp == 8'hFF) && (x.frac != 23'd0);
  endfunction

  function automatic logic is_inf(fp32_t x);
    return (x.exp == 8'hFF) && (x.frac == 23'd0);
  endfunction

  // Zero or subnormal (subnormals are treated as zero).
  function automatic logic is_zero(fp32_t x);
    return x.exp == 8'h00;
  endfunction

  // 24-bit significand with the hidden one (zero for zero/subnormal).
  function automatic logic [23:0] signif(fp32_t x);
    return (x.exp == 8'h00) ? 24'd0 : {1'b1, x.frac};
  endfunction

  // Round to nearest, ties to even, and pack.
  //   m   : m[26] is the leading one, m[25:3] the fraction, m[2] guard,
  //         m[1] round, m[0] sticky. m == 0 means an exact zero.
  //   exp : biased exponent that belongs to m[26]; may be out of range.
  function automatic logic [31:0] round_pack(logic sign, logic signed [11:0] exp,
                                             logic [26:0] m);
    logic        lsb, g, rs, up;
    logic [24:0] r;
    logic signed [11:0] e;
    if (m == 27'd0) return {sign, 31'd0};
    lsb = m[3];
    g   = m[2];
    rs  = m[1] | m[0];
    up  = g & (rs | lsb);
    r   = {1'b0, m[26:3]} + {24'd0, up};
    e   = exp;
    if (r[24]) begin
      r = r >> 1;
      e = e + 12'sd1;
    end
    if (e >= 12'sd255) return {sign, 8'hFF, 23'd0};
    if (e <= 12'sd0)   return {sign, 31'd0};
    return {sign, e[7:0], r[22:0]};
  endfunction

endpackage
