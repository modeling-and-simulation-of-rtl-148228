// fp_addsub: single-precision adder/subtractor datapath of the FPU.
// The exponents are compared to find the larger operand; the smaller
// significand is aligned by a right shift (bits shifted out are kept as a
// sticky bit), then the significands are added or subtracted and the sum is
// normalised and rounded to nearest-even by rttp_pkg::fp_round_pack.
// NaN and infinity operands are left to fp_check. Combinational.
module fp_addsub
  import rttp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output fp_res_t     res
);
  always_comb begin
    logic        sb_eff, s_big, s_sml;
    logic [7:0]  e_big, e_sml, d;
    logic [23:0] m_big, m_sml;
    logic [99:0] al;
    logic [49:0] x_big, x_sml, sum;
    logic        s_res;

    sb_eff = b[31] ^ sub;
    if (a[30:0] >= b[30:0]) begin
      s_big = a[31];  e_big = a[30:23]; m_big = fp_mant(a);
      s_sml = sb_eff; e_sml = b[30:23]; m_sml = fp_mant(b);
    end else begin
      s_big = sb_eff; e_big = b[30:23]; m_big = fp_mant(b);
      s_sml = a[31];  e_sml = a[30:23]; m_sml = fp_mant(a);
    end
    d = e_big - e_sml;
    if (d > 8'd63) d = 8'd63;
    x_big = {1'b0, m_big, 25'b0};
    al    = {1'b0, m_sml, 25'b0, 50'b0} >> d;
    x_sml = al[99:50] | {49'b0, |al[49:0]};
    if (s_big == s_sml) sum = x_big + x_sml;
    else                sum = x_big - x_sml;
    s_res = (sum == '0 && s_big != s_sml) ? 1'b0 : s_big;
    res = fp_round_pack(s_res, {4'b0, e_big}, sum);
  end
endmodule
