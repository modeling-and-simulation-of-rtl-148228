// fp_check: operand and result checking unit of the FPU.
// It classifies both operands (NaN, infinity, zero; subnormals count as
// zero) and decides whether the result of the requested operation is fixed
// by a special case, and which exception flags it raises:
//   NaN operand -> quiet NaN; inf-inf, 0*inf, 0/0, inf/inf -> NaN, invalid;
//   x/0 -> infinity, divzero; other infinities and zeros as IEEE-754 gives.
// It also folds the overflow/underflow of the arithmetic result into the
// flags. Combinational.
module fp_check
  import rttp_pkg::*;
(
  input  dp_op_e      op,        // OP_ADD, OP_SUB, OP_MUL or OP_DIV
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  fp_res_t     arith,     // result of the arithmetic datapath
  output logic [31:0] result,
  output exc_t        flags
);
  always_comb begin
    logic na, nb, ia, ib, za, zb, sx, sb_eff;
    na = fp_is_nan(a);  nb = fp_is_nan(b);
    ia = fp_is_inf(a);  ib = fp_is_inf(b);
    za = fp_is_zero(a); zb = fp_is_zero(b);
    sx = a[31] ^ b[31];
    sb_eff = b[31] ^ (op == OP_SUB);
    result = arith.val;
    flags  = '0;
    flags.overflow  = arith.ovf;
    flags.underflow = arith.unf;
    if (na || nb) begin
      result = FP_QNAN; flags = '0;
    end else begin
      unique case (op)
        OP_ADD, OP_SUB: begin
          if (ia && ib && (a[31] != sb_eff)) begin
            result = FP_QNAN; flags = '0; flags.invalid = 1'b1;
          end else if (ia) begin
            result = {a[31], 8'hFF, 23'b0}; flags = '0;
          end else if (ib) begin
            result = {sb_eff, 8'hFF, 23'b0}; flags = '0;
          end
        end
        OP_MUL: begin
          if ((ia && zb) || (za && ib)) begin
            result = FP_QNAN; flags = '0; flags.invalid = 1'b1;
          end else if (ia || ib) begin
            result = {sx, 8'hFF, 23'b0}; flags = '0;
          end else if (za || zb) begin
            result = {sx, 31'b0}; flags = '0;
          end
        end
        default: begin // OP_DIV
          if ((za && zb) || (ia && ib)) begin
            result = FP_QNAN; flags = '0; flags.invalid = 1'b1;
          end else if (ia) begin
            result = {sx, 8'hFF, 23'b0}; flags = '0;
          end else if (zb) begin
            result = {sx, 8'hFF, 23'b0}; flags = '0; flags.divzero = 1'b1;
          end else if (za || ib) begin
            result = {sx, 31'b0}; flags = '0;
          end
        end
      endcase
    end
  end
endmodule
