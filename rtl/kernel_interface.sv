// kernel_interface: the task processor's side of the link to the kernel
// processor, which runs the operating system (clock, events, scheduling) so
// that the task processor is never interrupted by it. The kernel reaches the
// processor's internal state through this interface:
//   int_req      pre-empt: the task stops at the next instruction boundary
//   continuation resume a stopped task (also ends a wait T,dest early)
//   load_pc/save_pc, load_sp/save_sp  write/read the program counter and
//                stack pointer over kp_data_in/kp_data_out (context switch)
//   kp_lm_*      write/read the local memory (preload constants, save and
//                restore the register file on a context switch)
// Loads and local-memory accesses are accepted only while the task is
// stopped (suspended or halted) and the task process unit is idle. An
// accepted request is answered one cycle later by ack, together with the
// requested word on kp_data_out or kp_lm_rdata; an int_req is acknowledged
// once the task has stopped. The design names these signals but leaves the
// protocol to the kernel processor's specification; the protocol here is
// this design's own.
module kernel_interface
  import rttp_pkg::*;
#(
  parameter int unsigned SPW = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  // kernel processor side
  input  logic             int_req,
  input  logic             continuation,
  input  logic             load_pc,
  input  logic             save_pc,
  input  logic             load_sp,
  input  logic             save_sp,
  input  logic [31:0]      kp_data_in,
  output logic [31:0]      kp_data_out,
  input  logic             kp_lm_we,
  input  logic             kp_lm_re,
  input  logic [LM_AW-1:0] kp_lm_addr,
  input  logic [31:0]      kp_lm_wdata,
  output logic [31:0]      kp_lm_rdata,
  output logic             ack,
  // task control unit
  output logic             tcu_int_req,
  output logic             tcu_continuation,
  output logic             k_load_pc,
  output logic [PM_AW-1:0] k_pc_in,
  output logic             k_load_sp,
  output logic [SPW-1:0]   k_sp_in,
  input  logic [PM_AW-1:0] pc,
  input  logic [SPW-1:0]   sp,
  input  logic             suspended,
  input  logic             halted,
  // task process unit
  input  logic             tpu_busy,
  output logic             k_lm_en,
  output logic             k_lm_we,
  output logic [LM_AW-1:0] k_lm_addr,
  output logic [31:0]      k_lm_wdata,
  input  logic [31:0]      k_lm_rdata
);
  logic stopped, req;

  assign stopped = (suspended || halted) && !tpu_busy;
  assign req     = load_pc || save_pc || load_sp || save_sp || kp_lm_we || kp_lm_re;

  assign tcu_int_req      = int_req;
  assign tcu_continuation = continuation && !req;
  assign k_load_pc  = stopped && load_pc;
  assign k_pc_in    = kp_data_in[PM_AW-1:0];
  assign k_load_sp  = stopped && load_sp;
  assign k_sp_in    = kp_data_in[SPW-1:0];
  assign k_lm_en    = stopped && (kp_lm_we || kp_lm_re);
  assign k_lm_we    = stopped && kp_lm_we;
  assign k_lm_addr  = kp_lm_addr;
  assign k_lm_wdata = kp_lm_wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ack <= 1'b0; kp_data_out <= '0; kp_lm_rdata <= '0;
    end else begin
      ack <= stopped && (req || int_req);
      if (stopped && save_pc)  kp_data_out <= {{(32-PM_AW){1'b0}}, pc};
      if (stopped && save_sp)  kp_data_out <= {{(32-SPW){1'b0}}, sp};
      if (stopped && kp_lm_re) kp_lm_rdata <= k_lm_rdata;
    end
endmodule
