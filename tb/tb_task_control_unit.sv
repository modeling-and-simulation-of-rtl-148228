// tb_task_control_unit: the task control unit with its own program counter,
// program memory (loaded with tb/prog_tcu.hex) and stack, and a model of
// the task process unit that finishes each data instruction after 1..6
// cycles with the B flag set. Program:
//   0 add  1 div  2 mul  3 call 10  4 jumpt 7  5 halt  6 halt
//   7 jumpf 5  8 wait 4  9 wait 3,6  10 add  11 return
// Checks the fetch order 0 1 2 3 10 11 4 7 8 9 6, the stack pointer during
// the subroutine, the issued instruction words, the halt, and the kernel's
// program-counter and stack-pointer loads: after the halt the kernel loads
// pc = 10 and sp = 0 and continues, so "return" on an empty stack must stop
// the task with err set.
module tb_task_control_unit;
  import rttp_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic sync_out, sync_in, b_read, b_flag = 1;
  logic [31:0] instr;
  logic int_req = 0, continuation = 0, k_load_pc = 0, k_load_sp = 0;
  logic [23:0] k_pc_in = 0, pc;
  logic [4:0] k_sp_in = 0, sp;
  logic suspended, halted, err, stall, push, pop, read_rom;
  int checks = 0, failures = 0;

  task_control_unit #(.PM_INIT("tb/prog_tcu.hex")) dut (.*);

  int rem = 0;
  logic busy_m = 0;
  assign sync_in = busy_m && rem == 0;
  always @(posedge clk) begin
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
  logic [31:0] issued[$];
  int max_sp = 0;
  always @(posedge clk) if (rst_n) begin
    if (read_rom) trace.push_back(int'(pc));
    if (sync_out) issued.push_back(instr);
    if (int'(sp) > max_sp) max_sp = int'(sp);
  end

  initial begin
    int expv[$] = '{0, 1, 2, 3, 10, 11, 4, 7, 8, 9, 6};
    logic [31:0] expi[$] = '{32'h8001_0203, 32'h9801_0204, 32'h9001_0205, 32'h8001_0101};
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    wait (halted === 1'b1);
    @(negedge clk);
    check(trace == expv, $sformatf("fetch order %p", trace));
    check(issued == expi, "issued instruction words");
    check(max_sp == 1 && sp == 0, "stack pointer");
    check(!err && pc == 24'd7, "halted after address 6");
    // kernel: reload pc and sp, continue into a return with an empty stack
    k_load_pc = 1; k_pc_in = 24'd11; k_load_sp = 1; k_sp_in = 5'd0;
    @(negedge clk); k_load_pc = 0; k_load_sp = 0;
    check(pc == 24'd11, "pc loaded");
    continuation = 1; @(negedge clk); continuation = 0;
    repeat (4) @(negedge clk);
    check(halted && err, "return on empty stack stops with err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
