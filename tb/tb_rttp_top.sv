// tb_rttp_top: end-to-end test of the task processor.
// Runs tb/prog_mech.hex, a program that exercises every mechanism of the
// processor: a counting loop with conditional jumps on the B flag, a
// subroutine call and return through the stack, an integer divide followed
// by a real multiply (a stall of the task control unit), a real divide,
// external reads and writes through the asynchronous handshake, int->fp
// conversion, a shift, both wait forms (one timing out, one ended by the
// kernel's continuation), a division by zero, and halt. While the program
// runs the kernel pre-empts the task, saves and reloads its program counter
// and reads and writes the local memory, then lets it continue.
// Program (address: instruction), local memory 1=n(5) 2=one 3=acc 4=2.0
// 5=0.5 7=100 8=7 12=zero 32=120h 33=121h (external addresses):
//  0 add acc,n,acc  1 sub n,one,n  2 sub zero,n,tmp  3 jumpt 0  4 call 20
//  5 div 100,7->q   6 mul.r x,y->r1  7 div.r x,y->fq  8 move ext[cell 32]->13
//  9 move 13->ext[cell 33]  10 move.i2f acc->14  11 shl acc,one->15  12 wait 5
// 13 wait 3,15  14 halt  15 wait 200,14  16 div acc,zero->16  17 jumpf 19
// 18 halt  19 halt  20 xor acc,7->17  21 return
// Expected values are worked out by hand from the program.
module tb_rttp_top;
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
  logic [31:0] address_mem, data_mem_out, data_mem_in;
  logic oe_mem, wr_mem, ack_mem;
  logic halted, suspended, err, stall, sync_out, sync_in, push, pop, read_rom, b_read;
  exc_t exc;
  logic [31:0] last_addr, last_data;
  int n_reads, n_writes;

  rttp_top #(.PM_INIT("tb/prog_mech.hex"), .LM_INIT("tb/lm_mech.hex")) dut (.*);

  ext_device #(.MAXD(3)) dev (.clk, .en(reset_n), .address_mem, .data_mem_out, .data_mem_in,
    .oe_mem, .wr_mem, .ack_mem, .last_addr, .last_data, .n_reads, .n_writes);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // event counters
  int n_stall = 0, n_push = 0, n_pop = 0, n_bread = 0, n_sync = 0, n_fetch = 0;
  int n_jump_taken = 0, n_wait = 0, n_waitc = 0, n_susp = 0;
  always @(posedge clk) if (reset_n) begin
    n_stall += stall; n_push += push; n_pop += pop; n_bread += b_read;
    n_sync += sync_out; n_fetch += read_rom;
    n_jump_taken += (b_read && dut.u_tcu.load_pc);
    n_wait  += (dut.u_tcu.u_cu.state == 3'd2);
    n_waitc += (dut.u_tcu.u_cu.state == 3'd3);
    n_susp  += suspended;
  end

  task automatic kp_read_lm(input logic [7:0] a, output logic [31:0] v);
    @(negedge clk); kp_lm_re = 1; kp_lm_addr = a;
    @(negedge clk); kp_lm_re = 0;
    v = kp_lm_rdata;
  endtask

  logic [31:0] v;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 reset_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset_n = 1;
    // pre-empt right after the subroutine call
    wait (push === 1'b1);
    @(negedge clk) int_req = 1;
    wait (suspended === 1'b1);
    @(negedge clk); @(negedge clk);
    check(ack === 1'b1, "ack while suspended");
    save_pc = 1; @(negedge clk); save_pc = 0;
    check(ack === 1'b1 && kp_data_out === 32'd20, $sformatf("saved pc %0d", kp_data_out));
    save_sp = 1; @(negedge clk); save_sp = 0;
    check(kp_data_out === 32'd1, $sformatf("saved sp %0d", kp_data_out));
    // kernel scratch write/read of a free cell, and a peek at acc
    kp_lm_we = 1; kp_lm_addr = 8'd30; kp_lm_wdata = 32'h1234_5678;
    @(negedge clk); kp_lm_we = 0;
    kp_read_lm(8'd30, v); check(v === 32'h1234_5678, "kernel lm write/read");
    kp_read_lm(8'd3, v);  check(v === 32'd15, $sformatf("acc after loop %0d", v));
    // restore the same context
    load_pc = 1; kp_data_in = 32'd20; @(negedge clk); load_pc = 0;
    int_req = 0;
    continuation = 1; @(negedge clk); continuation = 0;
    check(!suspended, "resumed");
    // the second wait form is ended by the kernel
    wait (dut.u_tcu.u_cu.state == 3'd3 && dut.u_tcu.pc == 24'd16);
    repeat (10) @(negedge clk);
    continuation = 1; @(negedge clk); continuation = 0;
    wait (halted === 1'b1);
    repeat (2) @(negedge clk);
    check(!err, "no error");
    check(dut.u_tcu.pc == 24'd20, $sformatf("halted after address 19, pc=%0d", dut.u_tcu.pc));
    kp_read_lm(8'd1, v);  check(v === 32'd0, "n");
    kp_read_lm(8'd3, v);  check(v === 32'd15, "acc");
    kp_read_lm(8'd9, v);  check(v === 32'd14, $sformatf("100/7 = %0d", v));
    kp_read_lm(8'd6, v);  check(v === 32'h3F80_0000, $sformatf("2.0*0.5 = %h", v));
    kp_read_lm(8'd10, v); check(v === 32'h4080_0000, $sformatf("2.0/0.5 = %h", v));
    kp_read_lm(8'd13, v); check(v === 32'hCAFE_0120, $sformatf("ext read %h", v));
    check(last_addr === 32'h121 && last_data === 32'hCAFE_0120, "ext write");
    kp_read_lm(8'd14, v); check(v === 32'h4170_0000, $sformatf("float(15) = %h", v));
    kp_read_lm(8'd15, v); check(v === 32'd30, $sformatf("15<<1 = %0d", v));
    kp_read_lm(8'd17, v); check(v === 32'd8, $sformatf("15^7 = %0d", v));
    kp_read_lm(8'd16, v); check(v === 32'd0, "x/0");
    check(exc.divzero === 1'b1, "divzero flag");
    check(exc.overflow === 1'b0 && exc.invalid === 1'b0, "no other flags");
    kp_read_lm(8'd30, v); check(v === 32'h1234_5678, "kernel cell kept");
    // mechanisms
    check(n_stall > 0, "stall happened");
    check(n_push == 1 && n_pop == 1, $sformatf("push %0d pop %0d", n_push, n_pop));
    check(n_bread == 6, $sformatf("conditional jumps %0d", n_bread));
    check(n_jump_taken == 5, $sformatf("taken jumps %0d", n_jump_taken));
    check(n_reads == 1 && n_writes == 1, "external accesses");
    check(n_wait == 5, $sformatf("wait 5 lasted %0d", n_wait));
    check(n_waitc > 3, "wait with continuation");
    check(n_susp > 0, "suspension");
    check(n_sync == 24, $sformatf("issued data instructions %0d", n_sync));
    $display("events: stall=%0d push=%0d pop=%0d bread=%0d taken=%0d wait=%0d waitc=%0d susp=%0d ext r/w=%0d/%0d sync=%0d fetch=%0d",
             n_stall, n_push, n_pop, n_bread, n_jump_taken, n_wait, n_waitc, n_susp, n_reads, n_writes, n_sync, n_fetch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
