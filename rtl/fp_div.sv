// fp_div: single-precision divider datapath of the FPU.
// The exponent is found by a subtractor; the significand quotient is built
// by a restoring divider, one bit per clock, always 27 iterations (24 result
// bits, a guard bit and two more for normalisation), so a division takes a
// fixed number of cycles whatever the operands. The remainder supplies the
// sticky bit for rounding to nearest-even. Special operands are left to
// fp_check. Interface: start for one cycle with a, b; done is high for one
// cycle, QBITS+1 cycles after start, with res valid from then until the next start.
module fp_div
  import rttp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output fp_res_t     res,
  output logic        done
);
  localparam int unsigned QBITS = 27;

  logic [25:0] r;
  logic [26:0] q;
  logic [23:0] mb;
  logic        busy, s;
  logic [4:0]  cnt;
  logic signed [11:0] e;

  logic [25:0] r_n;
  logic [26:0] q_n;
  always_comb begin
    if (r >= {2'b0, mb}) begin
      r_n = (r - {2'b0, mb}) << 1;
      q_n = {q[25:0], 1'b1};
    end else begin
      r_n = r << 1;
      q_n = {q[25:0], 1'b0};
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      r <= '0; q <= '0; mb <= '0; busy <= 1'b0; s <= 1'b0; cnt <= '0;
      e <= '0; res <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cnt  <= 5'(QBITS);
        r    <= {2'b0, fp_mant(a)};
        mb   <= fp_mant(b);
        q    <= '0;
        s    <= a[31] ^ b[31];
        e    <= signed'({4'b0, a[30:23]}) - signed'({4'b0, b[30:23]}) + 12'sd127;
      end else if (busy) begin
        r   <= r_n;
        q   <= q_n;
        cnt <= cnt - 5'd1;
        if (cnt == 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
          // q_n = floor(ma * 2^26 / mb): weight of bit 26 is 2^0
          res  <= fp_round_pack(s, e, {1'b0, q_n, 22'b0} | 50'(r_n != '0));
        end
      end
    end
endmodule
