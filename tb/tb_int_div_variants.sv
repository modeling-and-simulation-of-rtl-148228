// tb_int_div_variants: the integer divider at the other points of its
// speed/size trade-off. The design describes a single-cycle divider and a
// 32-cycle serial one and expects real designs to pick something in
// between; three integer units with STEPS = 32, 4 and 2 divide the same
// random operands side by side. Each quotient is compared with
// SystemVerilog's signed division (truncation toward zero, x/0 gives 0 with
// divzero), and each divide must take exactly 32/STEPS cycles from start
// to done (1, 8 and 16), whatever the operands.
module tb_int_div_variants;
  import rttp_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic start = 0;
  logic [31:0] a = 0, b = 0;
  logic [31:0] res [3];
  logic        ovf [3], dz [3], done [3];
  int checks = 0, failures = 0;
  localparam int unsigned STEPS [3] = '{32, 4, 2};

  int_arith_unit #(.STEPS(32)) u32 (.clk, .rst_n, .start, .op(OP_DIV), .a, .b,
    .result(res[0]), .ovf(ovf[0]), .divzero(dz[0]), .done(done[0]));
  int_arith_unit #(.STEPS(4))  u4  (.clk, .rst_n, .start, .op(OP_DIV), .a, .b,
    .result(res[1]), .ovf(ovf[1]), .divzero(dz[1]), .done(done[1]));
  int_arith_unit #(.STEPS(2))  u2  (.clk, .rst_n, .start, .op(OP_DIV), .a, .b,
    .result(res[2]), .ovf(ovf[2]), .divzero(dz[2]), .done(done[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] y);
    int lat [3];
    bit seen [3];
    logic signed [63:0] q;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    seen = '{0, 0, 0};
    // sample each unit's done at every clock edge that follows the start
    for (int t = 1; t <= 17; t++) begin
      for (int k = 0; k < 3; k++)
        if (done[k] && !seen[k]) begin seen[k] = 1; lat[k] = t; end
      if (t < 17) @(negedge clk);
    end
    q = (y == 0) ? 64'sd0 : 64'(signed'(x)) / 64'(signed'(y));
    for (int k = 0; k < 3; k++) begin
      check(seen[k] && lat[k] == int'(32 / STEPS[k]),
            $sformatf("STEPS=%0d latency %0d", STEPS[k], lat[k]));
      check(res[k] === q[31:0] && dz[k] == (y == 0) && !ovf[k],
            $sformatf("STEPS=%0d %0d / %0d = %0d", STEPS[k], signed'(x), signed'(y), signed'(res[k])));
    end
  endtask

  initial begin
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    run(100, 7);
    run(-100, 7);
    run(32'h8000_0000, 1);
    run(32'h8000_0000, 32'hFFFF_FFFF);
    run(5, 0);
    for (int i = 0; i < 400; i++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      if (i % 3 == 0) y = y >> $urandom_range(0, 31);
      if (i % 5 == 0) x = x >> $urandom_range(0, 31);
      run(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
