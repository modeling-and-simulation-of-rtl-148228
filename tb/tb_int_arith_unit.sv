// tb_int_arith_unit: random add, sub, mul and div operands compared with
// SystemVerilog's signed integer arithmetic (division truncates toward
// zero), plus signed overflow of add/sub and division by zero. Every
// operation's latency is measured: 1 cycle for add/sub/mul and exactly
// 32 cycles for div, whatever the operands.
module tb_int_arith_unit;
  import rttp_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic start = 0;
  dp_op_e op = OP_ADD;
  logic [31:0] a = 0, b = 0, result;
  logic ovf, divzero, done;
  int checks = 0, failures = 0;

  int_arith_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input dp_op_e o, input logic [31:0] x, input logic [31:0] y);
    int lat;
    logic signed [63:0] ex;
    logic eo, ez;
    @(negedge clk);
    op = o; a = x; b = y; start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    ez = 0; eo = 0;
    case (o)
      OP_ADD: begin ex = 64'(signed'(x)) + 64'(signed'(y)); eo = (ex > 64'sh7FFFFFFF) || (ex < -64'sh80000000); end
      OP_SUB: begin ex = 64'(signed'(x)) - 64'(signed'(y)); eo = (ex > 64'sh7FFFFFFF) || (ex < -64'sh80000000); end
      OP_MUL: ex = 64'(signed'(x)) * 64'(signed'(y));
      default: begin
        if (y == 0) begin ex = 0; ez = 1; end
        else ex = 64'(signed'(x)) / 64'(signed'(y));
      end
    endcase
    check(result === ex[31:0], $sformatf("%s %0d %0d: %0d vs %0d", o.name(), signed'(x), signed'(y), signed'(result), ex));
    check(ovf == eo && divzero == ez, $sformatf("flags %s", o.name()));
    check(lat == ((o == OP_DIV) ? 32 : 1), $sformatf("%s latency %0d", o.name(), lat));
  endtask

  initial begin
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    run(OP_DIV, 100, 7);
    run(OP_DIV, -100, 7);
    run(OP_DIV, 32'h8000_0000, 1);
    run(OP_DIV, 5, 0);
    run(OP_ADD, 32'h7FFF_FFFF, 1);
    run(OP_SUB, 32'h8000_0000, 1);
    for (int i = 0; i < 600; i++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      if (i % 3 == 0) y = y >> $urandom_range(0, 31);
      if (i % 5 == 0) x = x >> $urandom_range(0, 31);
      run(dp_op_e'(i % 4), x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
