// tb_fpu: single-precision add, sub, mul and div against a reference
// built on the simulator's double-precision arithmetic: operands are
// widened to double exactly, the operation is done in double and the
// result is rounded to single (nearest-even, subnormals flushed to zero)
// bit by bit in d2s below. Operand exponents are kept where the double
// result is exact (add/sub) or not double-rounded in practice (div).
// Directed cases cover NaN, infinities, zeros, overflow, underflow,
// division by zero and inf-inf. Latency: 1 cycle for add/sub/mul,
// 28 cycles for div (load + 27 quotient bits), for every operand.
module tb_fpu;
  import rttp_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic start = 0;
  dp_op_e op = OP_ADD;
  logic [31:0] a = 0, b = 0, result;
  exc_t flags;
  logic done;
  int checks = 0, failures = 0;

  fpu dut (.*);

  function automatic real s2d(input logic [31:0] x);
    if (x[30:23] == 0) return x[31] ? -0.0 : 0.0;
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'b0});
  endfunction

  // double -> single, round to nearest-even, flush subnormals; ovf/unf out
  function automatic logic [31:0] d2s(input real r, output logic ovf, output logic unf);
    logic [63:0] d;
    int es;
    logic [52:0] m;
    logic [24:0] m24;
    logic [28:0] rem;
    d = $realtobits(r);
    ovf = 0; unf = 0;
    if (d[62:52] == 0) return {d[63], 31'b0};
    es = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    m24 = {1'b0, m[52:29]};
    rem = m[28:0];
    if (rem > 29'h1000_0000 || (rem == 29'h1000_0000 && m24[0])) m24++;
    if (m24[24]) begin m24 = m24 >> 1; es++; end
    if (es >= 255) begin ovf = 1; return {d[63], 8'hFF, 23'b0}; end
    if (es <= 0) begin unf = 1; return {d[63], 31'b0}; end
    return {d[63], 8'(es), m24[22:0]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  task automatic run(input dp_op_e o, input logic [31:0] x, input logic [31:0] y,
                     input logic [31:0] expv, input exc_t expf);
    int lat;
    @(negedge clk);
    op = o; a = x; b = y; start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check(result === expv, $sformatf("%s %h %h: %h vs %h", o.name(), x, y, result, expv));
    check(flags === expf, $sformatf("%s %h %h flags %b vs %b", o.name(), x, y, flags, expf));
    check(lat == ((o == OP_DIV) ? 28 : 1), $sformatf("%s latency %0d", o.name(), lat));
  endtask

  task automatic run_ref(input dp_op_e o, input logic [31:0] x, input logic [31:0] y);
    real r;
    logic ov, un;
    logic [31:0] e;
    exc_t f;
    case (o)
      OP_ADD: r = s2d(x) + s2d(y);
      OP_SUB: r = s2d(x) - s2d(y);
      OP_MUL: r = s2d(x) * s2d(y);
      default: r = s2d(x) / s2d(y);
    endcase
    e = d2s(r, ov, un);
    f = '0; f.overflow = ov; f.underflow = un;
    run(o, x, y, e, f);
  endtask

  function automatic logic [31:0] rnd(input int emin, input int emax);
    return {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] PINF = 32'h7F80_0000, NINF = 32'hFF80_0000, NAN = 32'h7FC0_0000;
  localparam exc_t F0 = '0;
  exc_t fi, fz, fo, fu;

  initial begin
    fi = '0; fi.invalid = 1; fz = '0; fz.divzero = 1;
    fo = '0; fo.overflow = 1; fu = '0; fu.underflow = 1;
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    // the example: 1.0 * 1e-6, then 1e-6 - (-0.1)
    run(OP_MUL, 32'h3F80_0000, 32'h3586_37BD, 32'h3586_37BD, F0);
    run(OP_SUB, 32'h3586_37BD, 32'hBDCC_CCCD, 32'h3DCC_CD53, F0);
    run(OP_DIV, 32'h4000_0000, 32'h3F00_0000, 32'h4080_0000, F0);
    // special operands
    run(OP_ADD, NAN, 32'h3F80_0000, NAN, F0);
    run(OP_ADD, PINF, NINF, NAN, fi);
    run(OP_SUB, PINF, PINF, NAN, fi);
    run(OP_ADD, PINF, 32'h3F80_0000, PINF, F0);
    run(OP_SUB, 32'h3F80_0000, PINF, NINF, F0);
    run(OP_MUL, PINF, 32'h0000_0000, NAN, fi);
    run(OP_MUL, NINF, 32'h4000_0000, NINF, F0);
    run(OP_MUL, 32'h8000_0000, 32'h4000_0000, 32'h8000_0000, F0);
    run(OP_DIV, 32'h0000_0000, 32'h0000_0000, NAN, fi);
    run(OP_DIV, PINF, NINF, NAN, fi);
    run(OP_DIV, 32'hBF80_0000, 32'h0000_0000, NINF, fz);
    run(OP_DIV, 32'h3F80_0000, PINF, 32'h0000_0000, F0);
    run(OP_ADD, 32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000, F0);
    run(OP_MUL, 32'h7F00_0000, 32'h7F00_0000, PINF, fo);
    run(OP_MUL, 32'h0100_0000, 32'h0100_0000, 32'h0000_0000, fu);
    run(OP_DIV, 32'h7F00_0000, 32'h0080_0000, PINF, fo);
    // random
    for (int i = 0; i < 500; i++) begin
      run_ref(OP_ADD, rnd(115, 140), rnd(115, 140));
      run_ref(OP_SUB, rnd(115, 140), rnd(115, 140));
      run_ref(OP_MUL, rnd(70, 185), rnd(70, 185));
      run_ref(OP_DIV, rnd(70, 185), rnd(70, 185));
    end
    // close operands: cancellation in subtraction
    for (int i = 0; i < 200; i++) begin
      logic [31:0] x;
      x = rnd(120, 130);
      run_ref(OP_SUB, x, x ^ 32'($urandom_range(0, 255)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
