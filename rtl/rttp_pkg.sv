// rttp_pkg: types, constants and shared floating-point helpers of the
// hard real-time task processor.
//
// Instruction word (32 bits). Bit 31 selects the unit that executes it:
//   bit 31 = 1 : data-processing instruction, run by the task process unit
//                [30:27] operation, [26] real (floating-point) operands,
//                [25:24] conversion of a move, [23:16] source1,
//                [15:8] source2, [7:0] destination (local-memory addresses)
//   bit 31 = 0 : flow-control instruction, run by the task control unit
//                [30:27] operation, [23:0] target address or wait time
// The byte layout and the codes of add/sub/mul and of halt follow the
// example program of the design (mul a,c,temp = 9401_0304, sub temp,b,result
// = 8C04_0205, halt = 7FFF_FFFF); the other codes continue the same
// numbering in the order the instruction list gives the mnemonics and are
// this design's own choice.
//
// Floating-point numbers are IEEE-754 single precision. Results are rounded
// to nearest-even; subnormal operands count as zero and subnormal results are
// flushed to zero with the underflow flag set (this design's choice).
package rttp_pkg;

  localparam int unsigned DATA_W = 32;  // data busses d0, d1 and data
  localparam int unsigned LM_AW  = 8;   // local-memory address busses a0, a1
  localparam int unsigned PM_AW  = 24;  // program address

  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,  OP_SUB = 4'd1,  OP_MUL = 4'd2,  OP_DIV  = 4'd3,
    OP_AND  = 4'd4,  OP_NOR = 4'd5,  OP_XOR = 4'd6,  OP_ANDN = 4'd7,
    OP_MOVE = 4'd8,  OP_ROL = 4'd9,  OP_ROR = 4'd10, OP_SHL  = 4'd11,
    OP_SHR  = 4'd12
  } dp_op_e;

  typedef enum logic [3:0] {
    FL_JUMP  = 4'd0, FL_JUMPF  = 4'd1, FL_JUMPT = 4'd2, FL_CALL = 4'd3,
    FL_RET   = 4'd4, FL_WAIT   = 4'd5, FL_WAITD = 4'd6, FL_HALT = 4'd15
  } fl_op_e;

  // conversion performed by a move
  typedef enum logic [1:0] {
    CV_NONE = 2'd0, CV_I2F = 2'd1, CV_F2I = 2'd2
  } conv_e;

  typedef struct packed {
    logic                  dp;     // 1: data processing
    logic [3:0]            op;
    logic                  rl;     // real operands
    logic [1:0]            conv;
    logic [LM_AW-1:0]      src1;
    logic [LM_AW-1:0]      src2;
    logic [LM_AW-1:0]      dest;
  } instr_t;

  // exception flags of the task process unit
  typedef struct packed {
    logic invalid;   // NaN produced from non-NaN operands, bad conversion
    logic divzero;   // integer or real division by zero
    logic overflow;  // real overflow, integer add/sub overflow, fp2int range
    logic underflow; // real result flushed to zero
  } exc_t;

  typedef struct packed {
    logic [31:0] val;
    logic        ovf;
    logic        unf;
  } fp_res_t;

  localparam logic [31:0] FP_QNAN = 32'h7FC0_0000;

  // Normalise, round to nearest-even and pack. The value is
  // m * 2^-48 * 2^(e-127): bit 48 of m has the weight of the hidden bit when
  // e is a biased exponent. Bits shifted out earlier are to be ORed into m[0].
  function automatic fp_res_t fp_round_pack(input logic s,
                                            input logic signed [11:0] e,
                                            input logic [49:0] m);
    fp_res_t r;
    int unsigned p;
    logic [49:0] mn;
    logic signed [11:0] er;
    logic [24:0] mant;
    logic g, st;
    r = '0;
    if (m == '0) begin
      r.val = {s, 31'b0};
      return r;
    end
    p = 0;
    for (int i = 0; i < 50; i++) if (m[i]) p = i;
    mn   = m << (49 - p);
    er   = e + 12'(signed'(p) - 48);
    mant = {1'b0, mn[49:26]};
    g    = mn[25];
    st   = |mn[24:0];
    if (g && (st || mant[0])) mant = mant + 25'd1;
    if (mant[24]) begin
      mant = mant >> 1;
      er   = er + 12'sd1;
    end
    if (er >= 12'sd255) begin
      r.val = {s, 8'hFF, 23'b0};
      r.ovf = 1'b1;
    end else if (er <= 12'sd0) begin
      r.val = {s, 31'b0};
      r.unf = 1'b1;
    end else begin
      r.val = {s, er[7:0], mant[22:0]};
    end
    return r;
  endfunction

  function automatic logic fp_is_nan(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != '0);
  endfunction
  function automatic logic fp_is_inf(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == '0);
  endfunction
  function automatic logic fp_is_zero(input logic [31:0] x);
    return x[30:23] == 8'h00;   // zero or subnormal
  endfunction
  // significand with hidden bit, zero for zero/subnormal
  function automatic logic [23:0] fp_mant(input logic [31:0] x);
    return (x[30:23] == 8'h00) ? 24'd0 : {1'b1, x[22:0]};
  endfunction

endpackage
