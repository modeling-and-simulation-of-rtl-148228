// tb_tpu_control_unit: drives the task-process sequencer with instructions
// and plays the functional units and the external data access unit, which
// answer after random delays. For each instruction it checks, cycle by
// cycle, the order of the steps: operand read with a0/a1 = source1/source2,
// (external read), unit start, result latch, write with a0 = destination
// (or external write), the done pulse, and the total time
// start->done = 3 + unit latency for a register-to-register instruction.
// Instructions are also issued back to back in the cycle of done.
module tb_tpu_control_unit;
  import rttp_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic start = 0;
  logic [31:0] instr = 0;
  logic done, busy;
  instr_t ir;
  logic [7:0] a0, a1;
  logic lm_write, ld_ops, ld_ext, ld_res, ex_start, ex_done = 0;
  logic eda_start, eda_we, eda_done = 0;
  int checks = 0, failures = 0;

  tpu_control_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // functional unit and EDA models
  int ex_lat = 1, eda_lat = 1;
  initial forever begin
    @(posedge clk);
    if (ex_start) begin
      repeat (ex_lat - 1) @(posedge clk);
      #1 ex_done = 1; @(posedge clk); #1 ex_done = 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (eda_start) begin
      repeat (eda_lat) @(posedge clk);
      #1 eda_done = 1; @(posedge clk); #1 eda_done = 0;
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one instruction, recording the step sequence
  task automatic run(input logic [31:0] w, input bit chain);
    instr_t iw;
    int t, t_ops, t_ex, t_res, t_wr, t_done, t_er, t_ew;
    iw = instr_t'(w);
    if (!chain) @(negedge clk);
    instr = w; start = 1;
    t = 0; t_ops = -1; t_ex = -1; t_res = -1; t_wr = -1; t_done = -1; t_er = -1; t_ew = -1;
    @(negedge clk); start = 0;
    while (t_done < 0) begin
      t++;
      if (ld_ops) begin t_ops = t; check(a0 == iw.src1 && a1 == iw.src2, "operand addresses"); end
      if (eda_start && !eda_we) t_er = t;
      if (eda_start && eda_we)  t_ew = t;
      if (ex_start) t_ex = t;
      if (ld_res) t_res = t;
      if (lm_write) begin t_wr = t; check(a0 == iw.dest, "destination address"); end
      if (done) t_done = t;
      if (t_done < 0 || !chain) @(negedge clk);
      if (t > 200) break;
    end
    check(t_ops == 1, $sformatf("read in cycle 1 (%0d)", t_ops));
    check(t_ex > t_ops && t_res == t_ex + ex_lat, "unit start then result");
    if (iw.op == OP_MOVE && iw.src1 == 0) check(t_er == 1 && t_ex == t_er + eda_lat + 2, "external read before unit");
    else check(t_er < 0, "no external read");
    if (iw.op == OP_MOVE && iw.dest == 0) begin
      check(t_ew == t_res + 1 && t_wr < 0 && t_done == t_ew + eda_lat + 1, "external write");
    end else begin
      check(t_ew < 0 && t_wr == t_res + 1 && t_done == t_wr, "register write and done");
      if (!(iw.op == OP_MOVE && iw.src1 == 0))
        check(t_done == 3 + ex_lat, $sformatf("time %0d for latency %0d", t_done, ex_lat));
    end
  endtask

  initial begin
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    check(!busy, "idle after reset");
    for (int i = 0; i < 300; i++) begin
      logic [31:0] w;
      ex_lat = $urandom_range(1, 30);
      eda_lat = $urandom_range(1, 6);
      w = {1'b1, 4'($urandom_range(0, 12)), 3'($urandom), 8'($urandom_range(1, 255)),
           8'($urandom), 8'($urandom_range(1, 255))};
      if (i % 5 == 1) begin w[30:27] = OP_MOVE; w[23:16] = 0; end
      if (i % 5 == 2) begin w[30:27] = OP_MOVE; w[7:0] = 0; end
      run(w, (i % 3 == 0) && i > 0);
    end
    @(negedge clk);
    check(!busy, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
