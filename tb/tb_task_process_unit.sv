// tb_task_process_unit: the complete data-processing unit. Operands are
// written into the local memory through the kernel port, instructions are
// issued with start, and the results are read back through the kernel
// port. Random integer add/sub/mul/div, logical and shift operations are
// compared with SystemVerilog arithmetic; real operations, conversions and
// external moves (address taken from a cell) with hand-computed values. The B flag must equal the sign
// of the last result, the exception flags must collect, and the time from
// start to done must be 4 cycles for one-cycle units, 35 for an integer
// divide and 31 for a real divide.
module tb_task_process_unit;
  import rttp_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic start = 0;
  logic [31:0] instr = 0;
  logic done, busy, b_flag;
  exc_t exc;
  logic k_lm_en = 0, k_lm_we = 0;
  logic [7:0] k_lm_addr = 0;
  logic [31:0] k_lm_wdata = 0, k_lm_rdata;
  logic [31:0] address_mem, data_mem_out, data_mem_in;
  logic oe_mem, wr_mem, ack_mem;
  logic [31:0] last_addr, last_data;
  int n_reads, n_writes;
  int checks = 0, failures = 0;

  task_process_unit dut (.*);
  ext_device #(.MAXD(3)) dev (.clk, .en(rst_n), .address_mem, .data_mem_out, .data_mem_in,
    .oe_mem, .wr_mem, .ack_mem, .last_addr, .last_data, .n_reads, .n_writes);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic lm_wr(input logic [7:0] a, input logic [31:0] v);
    @(negedge clk); k_lm_en = 1; k_lm_we = 1; k_lm_addr = a; k_lm_wdata = v;
    @(negedge clk); k_lm_en = 0; k_lm_we = 0;
  endtask
  task automatic lm_rd(input logic [7:0] a, output logic [31:0] v);
    @(negedge clk); k_lm_en = 1; k_lm_addr = a; #1 v = k_lm_rdata;
    @(negedge clk); k_lm_en = 0;
  endtask

  function automatic logic [31:0] dpi(input dp_op_e op, input logic rl, input logic [1:0] cv,
                                      input logic [7:0] s1, input logic [7:0] s2, input logic [7:0] d);
    return {1'b1, op, rl, cv, s1, s2, d};
  endfunction

  task automatic exec(input logic [31:0] w, output int lat);
    @(negedge clk); instr = w; start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic [31:0] v, x, y, e;
    dp_op_e ops [10] = '{OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_AND, OP_NOR, OP_XOR, OP_ANDN, OP_SHL, OP_ROR};
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    // default constants present after reset
    lm_rd(8'd1, v); check(v === 32'h3F80_0000, "constant a");
    // the example program's two instructions
    exec(dpi(OP_MUL, 1, 0, 8'd1, 8'd3, 8'd4), lat);
    check(lat == 4, $sformatf("real mul time %0d", lat));
    exec(dpi(OP_SUB, 1, 0, 8'd4, 8'd2, 8'd5), lat);
    lm_rd(8'd5, v); check(v === 32'h3DCC_CD53, $sformatf("a*c-b = %h", v));
    check(b_flag == 1'b0, "B flag of a positive result");
    // random integer and logical instructions
    for (int i = 0; i < 200; i++) begin
      dp_op_e op;
      op = ops[i % 10];
      x = $urandom; y = $urandom;
      if (op == OP_DIV) y = y >> $urandom_range(8, 31);
      lm_wr(8'd10, x); lm_wr(8'd11, y);
      exec(dpi(op, 0, 0, 8'd10, 8'd11, 8'd12), lat);
      case (op)
        OP_ADD: e = x + y;
        OP_SUB: e = x - y;
        OP_MUL: e = x * y;
        OP_DIV: e = (y == 0) ? 0 : 32'(signed'(x) / signed'(y));
        OP_AND: e = x & y;
        OP_NOR: e = ~(x | y);
        OP_XOR: e = x ^ y;
        OP_ANDN: e = x & ~y;
        OP_SHL: e = x << y[4:0];
        default: e = (x >> y[4:0]) | (x << (32 - y[4:0]));
      endcase
      lm_rd(8'd12, v);
      check(v === e, $sformatf("%s %h %h: %h vs %h", op.name(), x, y, v, e));
      check(b_flag == e[31], "B flag = sign");
      check(lat == ((op == OP_DIV) ? 35 : 4), $sformatf("%s time %0d", op.name(), lat));
    end
    // real divide, conversions
    lm_wr(8'd20, 32'h4000_0000); lm_wr(8'd21, 32'hBF00_0000);
    exec(dpi(OP_DIV, 1, 0, 8'd20, 8'd21, 8'd22), lat);
    lm_rd(8'd22, v); check(v === 32'hC080_0000, "2.0 / -0.5");
    check(lat == 31, $sformatf("real div time %0d", lat));
    check(b_flag == 1'b1, "B flag of a negative result");
    lm_wr(8'd23, -32'd7);
    exec(dpi(OP_MOVE, 0, CV_I2F, 8'd23, 8'd0, 8'd24), lat);
    lm_rd(8'd24, v); check(v === 32'hC0E0_0000, "float(-7)");
    lm_wr(8'd25, 32'h4049_0FDB);  // 3.14159274
    exec(dpi(OP_MOVE, 0, CV_F2I, 8'd25, 8'd0, 8'd26), lat);
    lm_rd(8'd26, v); check(v === 32'd3, "int(pi)");
    exec(dpi(OP_MOVE, 0, CV_NONE, 8'd25, 8'd0, 8'd27), lat);
    lm_rd(8'd27, v); check(v === 32'h4049_0FDB, "plain move");
    // external read and write
    // (the cell at source2 holds the 32-bit external address)
    lm_wr(8'd40, 32'h1234_0044);
    lm_wr(8'd41, 32'h8765_0045);
    exec(dpi(OP_MOVE, 0, 0, 8'd0, 8'd40, 8'd28), lat);
    lm_rd(8'd28, v); check(v === (32'hCAFE_0000 | 32'h1234_0044), "external read");
    exec(dpi(OP_MOVE, 0, 0, 8'd25, 8'd41, 8'd0), lat);
    check(last_addr === 32'h8765_0045 && last_data === 32'h4049_0FDB, "external write");
    check(n_reads == 1 && n_writes == 1, "one access each");
    // a reset clears the flags, then exceptions collect again
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    check(exc === '0, "flags cleared by reset");
    // exceptions collect
    lm_wr(8'd30, 32'h7F00_0000);
    exec(dpi(OP_MUL, 1, 0, 8'd30, 8'd30, 8'd31), lat);
    lm_wr(8'd32, 0);
    exec(dpi(OP_DIV, 0, 0, 8'd30, 8'd32, 8'd33), lat);
    check(exc.overflow && exc.divzero && !exc.invalid, "sticky exception flags");
    @(negedge clk);
    check(!busy, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
