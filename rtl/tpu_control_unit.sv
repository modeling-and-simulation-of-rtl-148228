// tpu_control_unit: sequencer of the task process unit.
// For each data-processing instruction handed over by the task control unit
// (start = its sync_out) it steps through:
//   READ   : a0 <- source1, a1 <- source2; the local memory drives d0/d1 and
//            the operands are latched (ld_ops)
//   EXTRD  : (move from address 0 only) an external read through the
//            external data access unit, its word replaces operand a
//   EXEC   : one-cycle start of the selected functional unit
//   WAITEX : until that unit reports done; the result is latched (ld_res)
//   WRITE  : a0 <- destination, the result on d0 is written; done pulses
//   EXTWS/EXTWR : (move to address 0 only) the result goes out through the
//            external data access unit instead, then done pulses.
// A new start may arrive in the cycle done pulses; it is taken at once, so
// back-to-back instructions lose no cycle.
// Local-memory address 0 holds no cell; using it as the external port of a
// move, with the cell at source2 holding the 32-bit external address, is
// this design's choice.
// Units run until they say they are done ("conditional synchronisation");
// every unit takes a fixed number of cycles, so an instruction's time
// depends only on its opcode (except external accesses).
module tpu_control_unit
  import rttp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       instr,
  output logic              done,
  output logic              busy,
  output instr_t            ir,
  // local memory
  output logic [LM_AW-1:0]  a0,
  output logic [LM_AW-1:0]  a1,
  output logic              lm_write,
  // datapath
  output logic              ld_ops,
  output logic              ld_ext,
  output logic              ld_res,
  output logic              ex_start,
  input  logic              ex_done,
  // external data access unit
  output logic              eda_start,
  output logic              eda_we,
  input  logic              eda_done
);
  typedef enum logic [2:0] {
    T_IDLE, T_READ, T_EXTRD, T_EXEC, T_WAITEX, T_WRITE, T_EXTWS, T_EXTWR
  } tstate_e;
  tstate_e state, state_n;

  logic is_move, ext_src, ext_dst;
  assign is_move = (dp_op_e'(ir.op) == OP_MOVE);
  assign ext_src = is_move && ir.src1 == '0;
  assign ext_dst = is_move && ir.dest == '0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= T_IDLE;
      ir    <= '0;
    end else begin
      state <= state_n;
      if ((state == T_IDLE || done) && start) ir <= instr_t'(instr);
    end

  always_comb begin
    state_n   = state;
    a0        = '0;
    a1        = '0;
    lm_write  = 1'b0;
    ld_ops    = 1'b0;
    ld_ext    = 1'b0;
    ld_res    = 1'b0;
    ex_start  = 1'b0;
    eda_start = 1'b0;
    eda_we    = 1'b0;
    done      = 1'b0;
    unique case (state)
      T_IDLE:   if (start) state_n = T_READ;
      T_READ: begin
        a0     = ir.src1;
        a1     = ir.src2;
        ld_ops = 1'b1;
        if (ext_src) begin
          eda_start = 1'b1;
          state_n   = T_EXTRD;
        end else begin
          state_n   = T_EXEC;
        end
      end
      T_EXTRD: if (eda_done) begin
        ld_ext  = 1'b1;
        state_n = T_EXEC;
      end
      T_EXEC: begin
        ex_start = 1'b1;
        state_n  = T_WAITEX;
      end
      T_WAITEX: if (ex_done) begin
        ld_res  = 1'b1;
        state_n = ext_dst ? T_EXTWS : T_WRITE;
      end
      T_WRITE: begin
        a0       = ir.dest;
        lm_write = 1'b1;
        done     = 1'b1;
        state_n  = start ? T_READ : T_IDLE;
      end
      T_EXTWS: begin
        eda_start = 1'b1;
        eda_we    = 1'b1;
        state_n   = T_EXTWR;
      end
      default: if (eda_done) begin // T_EXTWR
        done    = 1'b1;
        state_n = start ? T_READ : T_IDLE;
      end
    endcase
  end

  assign busy = (state != T_IDLE);
endmodule
