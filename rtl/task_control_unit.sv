// task_control_unit: controls the global operation of the task processor.
// It holds the program counter, the program memory, the return-address
// stack and the control unit (instruction register, timer, FSM), connected
// over the processor's data, address and control busses (here plain
// point-to-point wires: data = instruction word, address = program counter).
// Data-processing instructions leave on instr/sync_out for the task process
// unit, which answers on sync_in and offers its B flag on b_flag.
// The kernel interface may load the program counter and stack pointer
// (k_load_pc/k_load_sp, used while the task is stopped) and reads them back
// on pc and sp. Timing: see tcu_control_unit (fetch one cycle, execute one
// or more).
module task_control_unit
  import rttp_pkg::*;
#(
  parameter int unsigned PM_DEPTH    = 256,
  parameter string       PM_INIT     = "rtl/pm_example.hex",
  parameter int unsigned STACK_DEPTH = 16,
  localparam int unsigned SPW        = $clog2(STACK_DEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // task process unit
  output logic             sync_out,
  output logic [31:0]      instr,
  input  logic             sync_in,
  output logic             b_read,
  input  logic             b_flag,
  // kernel interface
  input  logic             int_req,
  input  logic             continuation,
  input  logic             k_load_pc,
  input  logic [PM_AW-1:0] k_pc_in,
  input  logic             k_load_sp,
  input  logic [SPW-1:0]   k_sp_in,
  output logic [PM_AW-1:0] pc,
  output logic [SPW-1:0]   sp,
  output logic             suspended,
  output logic             halted,
  output logic             err,
  // observation
  output logic             stall,
  output logic             push,
  output logic             pop,
  output logic             read_rom
);
  logic [31:0]      data;
  logic             incr_pc, load_pc, cu_load_pc;
  logic [PM_AW-1:0] pc_target, stack_top;
  logic             stack_full, stack_empty, stack_err, cu_err;

  program_counter #(.W(PM_AW)) u_pc (
    .clk, .rst_n, .incr_pc,
    .load_pc(load_pc),
    .pc_in  (k_load_pc ? k_pc_in : pc_target),
    .pc
  );

  assign load_pc = cu_load_pc || k_load_pc;

  program_memory #(.DEPTH(PM_DEPTH), .INIT_FILE(PM_INIT)) u_pm (
    .read_rom, .address(pc), .data
  );

  stack #(.DEPTH(STACK_DEPTH), .W(PM_AW)) u_stack (
    .clk, .rst_n, .push, .pop,
    .din(pc), .top(stack_top),
    .load_sp(k_load_sp), .sp_in(k_sp_in), .sp,
    .full(stack_full), .empty(stack_empty), .err(stack_err)
  );

  tcu_control_unit u_cu (
    .clk, .rst_n, .data, .read_rom, .incr_pc,
    .load_pc(cu_load_pc), .pc_target,
    .push, .pop, .stack_top, .stack_full, .stack_empty,
    .sync_out, .instr, .sync_in, .b_read, .b_flag,
    .int_req, .continuation, .suspended, .halted, .err(cu_err), .stall
  );

  assign err = cu_err || stack_err;
endmodule
