// int_arith_unit: 32-bit two's-complement add, subtract, multiply, divide.
// add, sub and mul are computed combinationally and registered: done rises
// one cycle after start. mul keeps the low 32 bits of the product. div is a
// restoring divider on the magnitudes that retires STEPS quotient bits per
// clock, so it always takes 32/STEPS cycles whatever the operands are; the
// constant time is what makes execution times predictable. STEPS=1 is the
// design's serial 32-cycle divider, STEPS=32 its single-cycle one. The
// quotient is truncated toward zero; division by zero gives 0 and sets
// divzero (this design's choice). ovf flags signed overflow of add/sub.
// Interface: start (one cycle) with op, a, b; result/flags valid while done.
module int_arith_unit
  import rttp_pkg::*;
#(
  parameter int unsigned STEPS = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  dp_op_e      op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result,
  output logic        ovf,
  output logic        divzero,
  output logic        done
);
  localparam int unsigned ITER = 32 / STEPS;

  logic        div_busy;
  logic [5:0]  cnt;
  logic [31:0] q, r_mag_b, dividend;
  logic [32:0] rem;
  logic        qneg, dz;

  // one cycle of the restoring divider: STEPS quotient bits
  // (the first step runs in the start cycle itself, on the new operands)
  logic [31:0] q_n, dvd_n, mag_b;
  logic [32:0] rem_n;
  always_comb begin
    if (start) begin
      q_n = '0; rem_n = '0;
      dvd_n = a[31] ? -a : a;
      mag_b = b[31] ? -b : b;
    end else begin
      q_n = q; rem_n = rem; dvd_n = dividend;
      mag_b = r_mag_b;
    end
    for (int s = 0; s < int'(STEPS); s++) begin
      rem_n = {rem_n[31:0], dvd_n[31]};
      dvd_n = {dvd_n[30:0], 1'b0};
      if (rem_n >= {1'b0, mag_b}) begin
        rem_n = rem_n - {1'b0, mag_b};
        q_n   = {q_n[30:0], 1'b1};
      end else begin
        q_n   = {q_n[30:0], 1'b0};
      end
    end
  end

  logic [32:0] sum;
  always_comb begin
    sum = '0;
    if (op == OP_SUB) sum = {a[31], a} - {b[31], b};
    else              sum = {a[31], a} + {b[31], b};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      result <= '0; ovf <= 1'b0; divzero <= 1'b0; done <= 1'b0;
      div_busy <= 1'b0; cnt <= '0; q <= '0; rem <= '0; dividend <= '0;
      r_mag_b <= '0; qneg <= 1'b0; dz <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        ovf <= 1'b0; divzero <= 1'b0;
        unique case (op)
          OP_ADD, OP_SUB: begin
            result <= sum[31:0];
            ovf    <= sum[32] ^ sum[31];
            done   <= 1'b1;
          end
          OP_MUL: begin
            result <= a * b;
            done   <= 1'b1;
          end
          default: begin // OP_DIV
            div_busy <= (ITER > 1);
            cnt      <= 6'(ITER - 1);
            dividend <= dvd_n;
            r_mag_b  <= mag_b;
            qneg     <= a[31] ^ b[31];
            dz       <= (b == '0);
            q        <= q_n;
            rem      <= rem_n;
            if (ITER == 1) begin
              done    <= 1'b1;
              divzero <= (b == '0);
              result  <= (b == '0) ? '0 : ((a[31] ^ b[31]) ? -q_n : q_n);
            end
          end
        endcase
      end else if (div_busy) begin
        q <= q_n; rem <= rem_n; dividend <= dvd_n;
        cnt <= cnt - 6'd1;
        if (cnt == 6'd1) begin
          div_busy <= 1'b0;
          done     <= 1'b1;
          divzero  <= dz;
          result   <= dz ? '0 : (qneg ? -q_n : q_n);
        end
      end
    end
endmodule
