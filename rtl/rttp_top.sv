// rttp_top: the hard real-time task processor.
// A task processor runs one application task at a time with fully
// predictable timing: every instruction takes a fixed number of cycles, and
// the task is never interrupted by operating-system work, which runs on a
// separate kernel processor connected through the kernel interface.
// The processor is three units:
//   task_control_unit  program counter, program memory, stack, controller:
//                      fetches instructions and executes flow control
//   task_process_unit  local memory and functional units: executes the
//                      data-processing instructions, in parallel with the
//                      flow control of the task control unit
//   kernel_interface   pre-emption, continuation, context save/restore
// The two halves synchronise with the sync_out/sync_in pulse pair, and the
// task process unit returns a B flag for the conditional jumps.
// External memory and peripherals are reached through an asynchronous
// handshake (oe_mem/wr_mem, ack_mem). The tri-state data_mem bus of the
// design is split into data_mem_in and data_mem_out. reset_n is active low.
// Parameters: PM_DEPTH words of program memory loaded from PM_INIT, local
// memory constants from LM_INIT, STACK_DEPTH return addresses, IDIV_STEPS
// quotient bits per cycle of the integer divider (1 = 32-cycle divide).
module rttp_top
  import rttp_pkg::*;
#(
  parameter int unsigned PM_DEPTH    = 256,
  parameter string       PM_INIT     = "rtl/pm_example.hex",
  parameter string       LM_INIT     = "rtl/lm_example.hex",
  parameter int unsigned STACK_DEPTH = 16,
  parameter int unsigned IDIV_STEPS  = 1,
  localparam int unsigned SPW        = $clog2(STACK_DEPTH) + 1
) (
  input  logic             clk,
  input  logic             reset_n,
  // kernel processor
  input  logic             int_req,
  input  logic             continuation,
  input  logic             load_sp,
  input  logic             save_sp,
  input  logic             load_pc,
  input  logic             save_pc,
  input  logic [31:0]      kp_data_in,
  output logic [31:0]      kp_data_out,
  input  logic             kp_lm_we,
  input  logic             kp_lm_re,
  input  logic [LM_AW-1:0] kp_lm_addr,
  input  logic [31:0]      kp_lm_wdata,
  output logic [31:0]      kp_lm_rdata,
  output logic             ack,
  // memory and peripheral devices
  output logic [31:0]      address_mem,
  output logic [31:0]      data_mem_out,
  input  logic [31:0]      data_mem_in,
  output logic             oe_mem,
  output logic             wr_mem,
  input  logic             ack_mem,
  // status
  output logic             halted,
  output logic             suspended,
  output logic             err,
  output exc_t             exc,
  // observation of internal events
  output logic             stall,
  output logic             sync_out,
  output logic             sync_in,
  output logic             push,
  output logic             pop,
  output logic             read_rom,
  output logic             b_read
);
  logic [31:0]      instr;
  logic             b_flag, tpu_busy;
  logic             tcu_int_req, tcu_continuation;
  logic             k_load_pc, k_load_sp;
  logic [PM_AW-1:0] k_pc_in, pc;
  logic [SPW-1:0]   k_sp_in, sp;
  logic             k_lm_en, k_lm_we;
  logic [LM_AW-1:0] k_lm_addr;
  logic [31:0]      k_lm_wdata, k_lm_rdata;

  task_control_unit #(
    .PM_DEPTH(PM_DEPTH), .PM_INIT(PM_INIT), .STACK_DEPTH(STACK_DEPTH)
  ) u_tcu (
    .clk, .rst_n(reset_n),
    .sync_out, .instr, .sync_in, .b_read, .b_flag,
    .int_req(tcu_int_req), .continuation(tcu_continuation),
    .k_load_pc, .k_pc_in, .k_load_sp, .k_sp_in, .pc, .sp,
    .suspended, .halted, .err, .stall, .push, .pop, .read_rom
  );

  task_process_unit #(.LM_INIT(LM_INIT), .IDIV_STEPS(IDIV_STEPS)) u_tpu (
    .clk, .rst_n(reset_n),
    .start(sync_out), .instr, .done(sync_in), .busy(tpu_busy),
    .b_flag, .exc,
    .k_lm_en, .k_lm_we, .k_lm_addr, .k_lm_wdata, .k_lm_rdata,
    .address_mem, .data_mem_out, .data_mem_in, .oe_mem, .wr_mem, .ack_mem
  );

  kernel_interface #(.SPW(SPW)) u_ki (
    .clk, .rst_n(reset_n),
    .int_req, .continuation, .load_pc, .save_pc, .load_sp, .save_sp,
    .kp_data_in, .kp_data_out, .kp_lm_we, .kp_lm_re, .kp_lm_addr,
    .kp_lm_wdata, .kp_lm_rdata, .ack,
    .tcu_int_req, .tcu_continuation, .k_load_pc, .k_pc_in, .k_load_sp,
    .k_sp_in, .pc, .sp, .suspended, .halted,
    .tpu_busy, .k_lm_en, .k_lm_we, .k_lm_addr, .k_lm_wdata, .k_lm_rdata
  );
endmodule
