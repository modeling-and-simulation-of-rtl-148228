// tb_rttp_full: the task processor at its default configuration running its
// built-in example program, which evaluates a*c - b in real arithmetic:
//   0: mul a,c,temp   (9401_0304)   1: sub temp,b,result (8C04_0205)
//   2: halt           (7FFF_FFFF)
// with a = 1.0 (cell 1), b = -0.1 (cell 2), c = 1e-6 (cell 3).
// Expected single-precision results, worked out by rounding the exact
// products/differences to nearest-even: temp = 1e-6 = 3586_37BD,
// result = 1e-6 + 0.1 = 3DCC_CD53.
// Timing: fetch and issue take one cycle each; a real multiply or add takes
// 4 cycles in the task process unit and the next instruction is issued in
// the cycle the previous one completes, so the processor halts 10 cycles
// after reset is released (mul issued in cycle 1, sub in 5, halt taken in
// cycle 9, halted from cycle 10).
module tb_rttp_full;
  import rttp_pkg::*;
  logic clk = 0, reset_n = 1;
  always #5 clk = ~clk;

  logic int_req = 0, continuation = 0, load_sp = 0, save_sp = 0;
  logic load_pc = 0, save_pc = 0;
  logic [31:0] kp_data_in = 0, kp_data_out;
  logic kp_lm_we = 0, kp_lm_re = 0;
  logic [7:0] kp_lm_addr = 0;
  logic [31:0] kp_lm_wdata = 0, kp_lm_rdata;
  logic ack;
  logic [31:0] address_mem, data_mem_out, data_mem_in = 0;
  logic oe_mem, wr_mem, ack_mem = 0;
  logic halted, suspended, err, stall, sync_out, sync_in, push, pop, read_rom, b_read;
  exc_t exc;

  rttp_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic kp_read_lm(input logic [7:0] a, output logic [31:0] v);
    @(negedge clk); kp_lm_re = 1; kp_lm_addr = a;
    @(negedge clk); kp_lm_re = 0;
    v = kp_lm_rdata;
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycles = 0, n_fetch = 0, n_sync = 0;
  logic [31:0] v;
  initial begin
    #1 reset_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset_n = 1;
    #1;
    while (!halted) begin
      n_fetch += read_rom;
      n_sync  += sync_out;
      @(negedge clk);
      cycles++;
    end
    check(cycles == 10, $sformatf("halted after %0d cycles", cycles));
    check(n_fetch == 3 && n_sync == 2, "three fetches, two data instructions");
    check(!err && exc == '0, "no error, no exception");
    kp_read_lm(8'd4, v); check(v === 32'h3586_37BD, $sformatf("temp = %h", v));
    kp_read_lm(8'd5, v); check(v === 32'h3DCC_CD53, $sformatf("result = %h", v));
    kp_read_lm(8'd1, v); check(v === 32'h3F80_0000, "a kept");
    check(ack === 1'b1, "kernel access acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
