// fpu: floating-point arithmetic unit of the task process unit.
// It holds the adder/subtractor, the multiplier and the divider datapaths
// and the checking unit that handles special operands and result range.
// Interface: start (one cycle) with op (OP_ADD/SUB/MUL/DIV), a, b. done is
// high for one cycle when result and flags are valid; they then hold until
// the next start. Latency: add, sub and mul 1 cycle; div 28 cycles (operand load plus 27
// quotient bits), always.
module fpu
  import rttp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  dp_op_e      op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result,
  output exc_t        flags,
  output logic        done
);
  fp_res_t r_add, r_mul, r_div, r_sel;
  logic    div_done;
  logic [31:0] chk_val;
  exc_t        chk_flags;
  dp_op_e      op_q;
  logic [31:0] a_q, b_q;

  fp_addsub u_add (.a(a), .b(b), .sub(op == OP_SUB), .res(r_add));
  fp_mul    u_mul (.a(a), .b(b), .res(r_mul));
  fp_div    u_div (.clk, .rst_n, .start(start && op == OP_DIV), .a, .b,
                   .res(r_div), .done(div_done));

  // operands are held for the checking unit while the divider runs
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      op_q <= OP_ADD; a_q <= '0; b_q <= '0;
    end else if (start) begin
      op_q <= op; a_q <= a; b_q <= b;
    end

  always_comb begin
    unique case (op)
      OP_MUL:  r_sel = r_mul;
      default: r_sel = r_add;
    endcase
  end

  fp_res_t     r_reg;
  logic        fast_done;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      r_reg <= '0; fast_done <= 1'b0;
    end else begin
      fast_done <= start && op != OP_DIV;
      if (start && op != OP_DIV) r_reg <= r_sel;
    end

  fp_check u_chk (.op(op_q), .a(a_q), .b(b_q),
                  .arith(op_q == OP_DIV ? r_div : r_reg),
                  .result(chk_val), .flags(chk_flags));

  assign result = chk_val;
  assign flags  = chk_flags;
  assign done   = fast_done | div_done;
endmodule
