// tcu_control_unit: controller of the task control unit.
// As in the design it is split into three parts: an instruction register,
// a timer (a down-counter used by the wait instructions) and an FSM.
//
// Every instruction is fetched in one cycle (read_rom and incr_pc high
// together, the word from the program memory goes into the instruction
// register) and executed in the next:
//  * data-processing instruction (bit 31 set): handed to the task process
//    unit with a one-cycle sync_out pulse, after which fetching continues,
//    so flow control runs in parallel with data processing. The task process
//    unit answers with a sync_in pulse when its result is written. If it is
//    still busy with the previous instruction the FSM waits (a stall).
//  * jump, call (pushes the return address), return (pops it);
//  * jumpt/jumpf: wait until the task process unit is idle, read its B flag
//    (b_read) and jump if it is true/false;
//  * wait T: pause T cycles (at least one); wait T,dest: pause up to T
//    cycles for the kernel's continuation signal, jump to dest if it does
//    not come (T is 12 bits, dest 12 bits in this form);
//  * halt: wait until the task process unit is idle, then stop.
// A pre-emption request (int_req) is taken at an instruction boundary once
// the task process unit is idle: the FSM enters the suspended state and
// stays there until continuation. continuation also restarts a halted task.
// A stack overflow/underflow or an undefined flow opcode stops the task and
// sets err.
// The one-fetch/one-execute cycle rhythm, the opcode numbering beyond the
// design's example and the meaning of the two wait forms are this design's
// reading of a specification that names these instructions only.
module tcu_control_unit
  import rttp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // program memory / program counter
  input  logic [31:0]      data,          // instruction from program memory
  output logic             read_rom,
  output logic             incr_pc,
  output logic             load_pc,
  output logic [PM_AW-1:0] pc_target,
  // stack
  output logic             push,
  output logic             pop,
  input  logic [PM_AW-1:0] stack_top,
  input  logic             stack_full,
  input  logic             stack_empty,
  // task process unit
  output logic             sync_out,      // start data-processing instruction
  output logic [31:0]      instr,         // instruction register
  input  logic             sync_in,       // data-processing instruction done
  output logic             b_read,
  input  logic             b_flag,
  // kernel side
  input  logic             int_req,
  input  logic             continuation,
  output logic             suspended,
  output logic             halted,
  output logic             err,
  // event strobes (observation only)
  output logic             stall
);
  typedef enum logic [2:0] {
    S_FETCH, S_EXEC, S_WAIT, S_WAITC, S_HALT, S_SUSP
  } state_e;

  state_e      state, state_n;
  logic        pending, pending_n;   // data-processing instruction in flight
  logic [23:0] timer, timer_n;       // wait timer
  logic        timer_load;
  logic [23:0] timer_val;
  logic        err_n;
  logic        tpu_idle;

  instr_t ir;
  assign ir   = instr_t'(instr);
  assign tpu_idle = !pending || sync_in;

  // instruction register
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        instr <= '0;
    else if (read_rom) instr <= data;

  // timer
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          timer <= '0;
    else                 timer <= timer_n;
  always_comb begin
    timer_n = timer;
    if (timer_load)           timer_n = timer_val;
    else if (timer != '0)     timer_n = timer - 24'd1;
  end

  // FSM
  always_comb begin
    fl_op_e fop;
    fop       = fl_op_e'(instr[30:27]);
    state_n   = state;
    read_rom  = 1'b0;
    incr_pc   = 1'b0;
    load_pc   = 1'b0;
    pc_target = instr[23:0];
    push      = 1'b0;
    pop       = 1'b0;
    sync_out  = 1'b0;
    b_read    = 1'b0;
    timer_load = 1'b0;
    timer_val = '0;
    err_n     = err;
    stall     = 1'b0;
    unique case (state)
      S_FETCH: begin
        if (int_req) begin
          if (tpu_idle) state_n = S_SUSP;
        end else begin
          read_rom = 1'b1;
          incr_pc  = 1'b1;
          state_n  = S_EXEC;
        end
      end
      S_EXEC: begin
        if (ir.dp) begin
          if (tpu_idle) begin
            sync_out = 1'b1;
            state_n  = S_FETCH;
          end else begin
            stall = 1'b1;
          end
        end else begin
          unique case (fop)
            FL_JUMP: begin
              load_pc = 1'b1;
              state_n = S_FETCH;
            end
            FL_JUMPF, FL_JUMPT: begin
              if (tpu_idle) begin
                b_read  = 1'b1;
                load_pc = (b_flag == (fop == FL_JUMPT));
                state_n = S_FETCH;
              end else begin
                stall = 1'b1;
              end
            end
            FL_CALL: begin
              if (stack_full) begin
                err_n   = 1'b1;
                state_n = S_HALT;
              end else begin
                push    = 1'b1;
                load_pc = 1'b1;
                state_n = S_FETCH;
              end
            end
            FL_RET: begin
              if (stack_empty) begin
                err_n   = 1'b1;
                state_n = S_HALT;
              end else begin
                pop       = 1'b1;
                load_pc   = 1'b1;
                pc_target = stack_top;
                state_n   = S_FETCH;
              end
            end
            FL_WAIT: begin
              timer_load = 1'b1;
              timer_val  = instr[23:0];
              state_n    = S_WAIT;
            end
            FL_WAITD: begin
              timer_load = 1'b1;
              timer_val  = {12'b0, instr[23:12]};
              state_n    = S_WAITC;
            end
            FL_HALT: begin
              if (tpu_idle) state_n = S_HALT;
              else          stall   = 1'b1;
            end
            default: begin
              err_n   = 1'b1;
              state_n = S_HALT;
            end
          endcase
        end
      end
      S_WAIT: begin
        if (timer <= 24'd1) state_n = S_FETCH;
      end
      S_WAITC: begin
        if (continuation) begin
          state_n = S_FETCH;
        end else if (timer <= 24'd1) begin
          load_pc   = 1'b1;
          pc_target = {12'b0, instr[11:0]};
          state_n   = S_FETCH;
        end
      end
      S_HALT: begin
        if (int_req && tpu_idle) state_n = S_SUSP;
        else if (continuation && !err) state_n = S_FETCH;
      end
      default: begin // S_SUSP
        if (continuation && !int_req) state_n = S_FETCH;
      end
    endcase
  end

  assign pending_n = (pending && !sync_in) || sync_out;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state   <= S_FETCH;
      pending <= 1'b0;
      err     <= 1'b0;
    end else begin
      state   <= state_n;
      pending <= pending_n;
      err     <= err_n;
    end

  assign suspended = (state == S_SUSP);
  assign halted    = (state == S_HALT);

  // the task process unit only reports completion of an issued instruction
  assert property (@(posedge clk) disable iff (!rst_n) sync_in |-> pending)
    else $error("sync_in without an instruction in flight");
  // a new instruction is never issued while one is in flight
  assert property (@(posedge clk) disable iff (!rst_n) sync_out |-> (!pending || sync_in))
    else $error("issue while busy");
endmodule
