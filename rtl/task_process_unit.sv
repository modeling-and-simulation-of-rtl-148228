// task_process_unit: the data-processing half of the task processor.
// Its functional blocks sit around the internal busses of the design: two
// 8-bit address busses a0/a1 that address the local memory and two 32-bit
// data busses d0/d1 that carry operands (d0 also carries the result back).
// Blocks: local memory (register file), logical unit, integer arithmetic
// unit, floating-point unit, the int->fp and fp->int conversion units, the
// external data access unit and the control unit that sequences them. The
// busses are modelled as multiplexers rather than tri-state lines.
// Operation selection (instr_t fields): add/sub/mul/div go to the FPU when
// the real bit is set, otherwise to the integer unit; and/nor/xor/and_not
// and the shifts/rotates to the logical unit; move copies source1, through a
// conversion unit if its conversion field asks for one.
// After each result is written, the B flag (read by jumpt/jumpf) holds its
// sign bit, and exc collects the sticky exception flags; both of these
// semantics are this design's choice.
// Kernel access: while k_lm_en is high (the task is stopped and this unit is
// idle) the kernel interface reads (k_lm_rdata) and writes the local memory.
// Timing from start to done: 4 cycles for one-cycle units, 35 for an integer
// divide with IDIV_STEPS=1 (3 + 32/IDIV_STEPS), 31 for a real divide, plus
// the handshake time of external accesses. An external access takes its
// 32-bit address from the cell named by source2 (operand b).
module task_process_unit
  import rttp_pkg::*;
#(
  parameter string       LM_INIT    = "rtl/lm_example.hex",
  parameter int unsigned IDIV_STEPS = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // task control unit
  input  logic              start,       // sync from the task control unit
  input  logic [31:0]       instr,
  output logic              done,        // sync back
  output logic              busy,
  output logic              b_flag,
  output exc_t              exc,
  // kernel interface
  input  logic              k_lm_en,
  input  logic              k_lm_we,
  input  logic [LM_AW-1:0]  k_lm_addr,
  input  logic [31:0]       k_lm_wdata,
  output logic [31:0]       k_lm_rdata,
  // memory and peripheral devices
  output logic [31:0]       address_mem,
  output logic [31:0]       data_mem_out,
  input  logic [31:0]       data_mem_in,
  output logic              oe_mem,
  output logic              wr_mem,
  input  logic              ack_mem
);
  instr_t           ir;
  logic [LM_AW-1:0] cu_a0, cu_a1, a0, a1;
  logic             cu_write, lm_write;
  logic             ld_ops, ld_ext, ld_res, ex_start, ex_done;
  logic             eda_start, eda_we, eda_done;
  logic [31:0]      d0_rd, d1, d0_wr, eda_rdata;
  logic [31:0]      opa, opb, res;
  logic             b_reg;

  tpu_control_unit u_cu (
    .clk, .rst_n, .start, .instr, .done, .busy, .ir,
    .a0(cu_a0), .a1(cu_a1), .lm_write(cu_write),
    .ld_ops, .ld_ext, .ld_res, .ex_start, .ex_done,
    .eda_start, .eda_we, .eda_done
  );

  // address and write-data selection (kernel access while stopped)
  assign a0       = k_lm_en ? k_lm_addr  : cu_a0;
  assign a1       = cu_a1;
  assign lm_write = k_lm_en ? k_lm_we    : cu_write;
  assign d0_wr    = k_lm_en ? k_lm_wdata : res;
  assign k_lm_rdata = d0_rd;

  local_memory #(.INIT_FILE(LM_INIT)) u_lm (
    .clk, .rst_n, .a0, .a1, .write(lm_write), .wdata(d0_wr),
    .rd0(d0_rd), .rd1(d1)
  );

  // operand registers
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      opa <= '0; opb <= '0;
    end else if (ld_ops) begin
      opa <= d0_rd; opb <= d1;
    end else if (ld_ext) begin
      opa <= eda_rdata;
    end

  // functional units
  dp_op_e op;
  assign op = dp_op_e'(ir.op);

  logic        use_fpu, use_int, use_comb;
  assign use_fpu  = (op inside {OP_ADD, OP_SUB, OP_MUL, OP_DIV}) && ir.rl;
  assign use_int  = (op inside {OP_ADD, OP_SUB, OP_MUL, OP_DIV}) && !ir.rl;
  assign use_comb = !use_fpu && !use_int;

  logic [31:0] fpu_res, int_res, lu_res, i2f_res, f2i_res;
  exc_t        fpu_flags, f2i_flags;
  logic        fpu_done, int_done, int_ovf, int_dz, comb_done;

  fpu u_fpu (.clk, .rst_n, .start(ex_start && use_fpu), .op, .a(opa), .b(opb),
             .result(fpu_res), .flags(fpu_flags), .done(fpu_done));

  int_arith_unit #(.STEPS(IDIV_STEPS)) u_int (
    .clk, .rst_n, .start(ex_start && use_int), .op, .a(opa), .b(opb),
    .result(int_res), .ovf(int_ovf), .divzero(int_dz), .done(int_done));

  logical_unit u_lu (.op, .a(opa), .b(opb), .result(lu_res));
  int2fp       u_i2f (.a(opa), .result(i2f_res));
  fp2int       u_f2i (.a(opa), .result(f2i_res), .flags(f2i_flags));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) comb_done <= 1'b0;
    else        comb_done <= ex_start && use_comb;

  assign ex_done = fpu_done || int_done || comb_done;

  // result selection
  logic [31:0] res_n;
  exc_t        exc_n;
  always_comb begin
    res_n = '0;
    exc_n = '0;
    if (use_fpu) begin
      res_n = fpu_res;
      exc_n = fpu_flags;
    end else if (use_int) begin
      res_n = int_res;
      exc_n.overflow = int_ovf;
      exc_n.divzero  = int_dz;
    end else if (op == OP_MOVE) begin
      unique case (conv_e'(ir.conv))
        CV_I2F:  res_n = i2f_res;
        CV_F2I: begin
          res_n = f2i_res;
          exc_n = f2i_flags;
        end
        CV_NONE: res_n = opa;
        default: exc_n.invalid = 1'b1;
      endcase
    end else if (op inside {OP_AND, OP_NOR, OP_XOR, OP_ANDN,
                            OP_ROL, OP_ROR, OP_SHL, OP_SHR}) begin
      res_n = lu_res;
    end else begin
      exc_n.invalid = 1'b1;   // undefined opcode
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      res <= '0; exc <= '0; b_reg <= 1'b0;
    end else if (ld_res) begin
      res   <= res_n;
      exc   <= exc | exc_n;
      b_reg <= res_n[31];
    end

  // the B flag line (sampled by the task control unit together with b_read)
  assign b_flag = b_reg;

  eda_unit u_eda (
    .clk, .rst_n, .start(eda_start), .we(eda_we),
    // external address: the cell at source2, straight off d1 when a read
    // starts together with the operand read, from operand b for a write
    .addr(ld_ops ? d1 : opb), .wdata(res), .rdata(eda_rdata), .done(eda_done),
    .address_mem, .data_mem_out, .data_mem_in, .oe_mem, .wr_mem, .ack_mem
  );
endmodule
