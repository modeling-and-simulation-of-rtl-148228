// fp_mul: single-precision multiplier datapath of the FPU.
// The exponents are added (less the bias) and the 24-bit significands are
// multiplied by an integer multiplier; the 48-bit product is normalised and
// rounded to nearest-even. Zero, NaN and infinity are left to fp_check.
// Combinational.
module fp_mul
  import rttp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output fp_res_t     res
);
  always_comb begin
    logic [47:0] p;
    logic signed [11:0] e;
    p = fp_mant(a) * fp_mant(b);
    e = signed'({4'b0, a[30:23]}) + signed'({4'b0, b[30:23]}) - 12'sd127;
    res = fp_round_pack(a[31] ^ b[31], e, {p, 2'b00});
  end
endmodule
