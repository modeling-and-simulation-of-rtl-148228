// tb_tcu_control_unit: the task control unit's controller with the program
// counter, program memory and stack played by the testbench, and a task
// process unit model that finishes each data instruction after a random
// 1..6 cycles with the B flag set. Program (tb/prog_tcu.hex):
//   0 add  1 div  2 mul  3 call 10  4 jumpt 7  5 halt  6 halt
//   7 jumpf 5  8 wait 4  9 wait 3,6  10 add  11 return
// Checks: the fetch order 0 1 2 3 10 11 4 7 8 9 6 and halt; call pushes
// address 4 and return pops it; data instructions are never issued while
// one is in flight (a stall must occur); wait 4 spends 4 cycles and
// wait 3,6 times out after 3; a pre-emption request stops the task with no
// instruction lost, and continuation resumes it.
module tb_tcu_control_unit;
  import rttp_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic [31:0] data, instr;
  logic read_rom, incr_pc, load_pc, push, pop, sync_out, sync_in, b_read, b_flag = 1;
  logic [23:0] pc_target, stack_top;
  logic stack_full, stack_empty;
  logic int_req = 0, continuation = 0, suspended, halted, err, stall;
  int checks = 0, failures = 0;

  tcu_control_unit dut (.*);

  // program counter, program memory and stack models
  logic [31:0] rom [16];
  logic [23:0] pc = 0;
  logic [23:0] stk[$];
  initial begin
    foreach (rom[i]) rom[i] = 0;
    $readmemh("tb/prog_tcu.hex", rom);
  end
  assign data = read_rom ? rom[pc[3:0]] : 32'h0;
  assign stack_top = stk.size() ? stk[$] : 24'h0;
  assign stack_full = stk.size() == 16;
  assign stack_empty = stk.size() == 0;
  always @(posedge clk) if (rst_n) begin
    if (load_pc) pc <= pc_target; else if (incr_pc) pc <= pc + 1;
    if (push) stk.push_back(pc);
    if (pop) void'(stk.pop_back());
  end

  // task process unit model: busy for 1..6 cycles after each issue,
  // sync_in high in the last one; a new issue may come in that cycle
  int rem = 0;
  logic busy_m = 0;
  assign sync_in = busy_m && rem == 0;
  always @(posedge clk) begin
    if (sync_out && busy_m && rem != 0) begin failures++; $display("FAIL: issue while busy"); end
    if (sync_out) begin
      busy_m <= 1'b1;
      rem    <= $urandom_range(0, 5);
    end else if (busy_m) begin
      if (rem == 0) busy_m <= 1'b0;
      else          rem <= rem - 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int trace[$];
  int tfetch[$];
  int cyc = 0, n_stall = 0, n_push = 0, n_pop = 0, pushed = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (read_rom) begin trace.push_back(int'(pc)); tfetch.push_back(cyc); end
    n_stall += stall;
    if (push) begin n_push++; pushed = int'(pc); end
    n_pop += pop;
  end

  initial begin
    int expv[$] = '{0, 1, 2, 3, 10, 11, 4, 7, 8, 9, 6};
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    // pre-empt after the call
    wait (push === 1'b1);
    @(negedge clk) int_req = 1;
    wait (suspended === 1'b1);
    repeat (5) @(negedge clk);
    check(suspended && !read_rom, "stays suspended");
    int_req = 0; continuation = 1;
    @(negedge clk) continuation = 0;
    wait (halted === 1'b1);
    @(negedge clk);
    check(trace.size() == expv.size(), $sformatf("%0d fetches", trace.size()));
    for (int i = 0; i < expv.size() && i < trace.size(); i++)
      check(trace[i] == expv[i], $sformatf("fetch %0d at %0d, expected %0d", i, trace[i], expv[i]));
    check(n_push == 1 && n_pop == 1 && pushed == 4, "call/return through the stack");
    check(n_stall > 0, "stall");
    if (trace.size() == expv.size()) begin
      check(tfetch[9] - tfetch[8] == 6, $sformatf("wait 4: %0d", tfetch[9] - tfetch[8]));
      check(tfetch[10] - tfetch[9] == 5, $sformatf("wait 3,6: %0d", tfetch[10] - tfetch[9]));
    end
    check(!err && pc == 24'd7, "halted at 6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
