// tb_kernel_interface: random kernel requests while the task is running,
// suspended or halted and the task process unit busy or idle. Loads of the
// program counter / stack pointer and local-memory accesses must reach the
// processor only while it is stopped and idle; saved values and
// local-memory words must appear one cycle later together with ack; int_req
// is passed through and acknowledged once the task has stopped;
// continuation is passed on unless a request is pending.
module tb_kernel_interface;
  import rttp_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic int_req = 0, continuation = 0, load_pc = 0, save_pc = 0, load_sp = 0, save_sp = 0;
  logic [31:0] kp_data_in = 0, kp_data_out;
  logic kp_lm_we = 0, kp_lm_re = 0;
  logic [7:0] kp_lm_addr = 0;
  logic [31:0] kp_lm_wdata = 0, kp_lm_rdata;
  logic ack;
  logic tcu_int_req, tcu_continuation, k_load_pc, k_load_sp;
  logic [23:0] k_pc_in, pc = 0;
  logic [4:0] k_sp_in, sp = 0;
  logic suspended = 0, halted = 0, tpu_busy = 0;
  logic k_lm_en, k_lm_we;
  logic [7:0] k_lm_addr;
  logic [31:0] k_lm_wdata, k_lm_rdata = 0;
  int checks = 0, failures = 0;

  kernel_interface dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic stopped, req, exp_ack;
    logic [31:0] exp_out, exp_lm;
    int n_acc = 0, n_rej = 0;
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    exp_out = 0; exp_lm = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      suspended = $urandom_range(0, 2) == 0;
      halted = !suspended && $urandom_range(0, 3) == 0;
      tpu_busy = $urandom_range(0, 3) == 0;
      int_req = $urandom_range(0, 1);
      continuation = $urandom_range(0, 3) == 0;
      {load_pc, save_pc, load_sp, save_sp, kp_lm_we, kp_lm_re} = 6'b0;
      case ($urandom_range(0, 6))
        0: load_pc = 1; 1: save_pc = 1; 2: load_sp = 1; 3: save_sp = 1;
        4: kp_lm_we = 1; 5: kp_lm_re = 1; default: ;
      endcase
      kp_data_in = $urandom; kp_lm_addr = $urandom; kp_lm_wdata = $urandom;
      pc = $urandom; sp = $urandom; k_lm_rdata = $urandom;
      #1;
      stopped = (suspended || halted) && !tpu_busy;
      req = load_pc || save_pc || load_sp || save_sp || kp_lm_we || kp_lm_re;
      if (req) begin if (stopped) n_acc++; else n_rej++; end
      check(k_load_pc == (load_pc && stopped) && k_load_sp == (load_sp && stopped), "load gating");
      check(k_pc_in == kp_data_in[23:0] && k_sp_in == kp_data_in[4:0], "load value");
      check(k_lm_en == ((kp_lm_we || kp_lm_re) && stopped) && k_lm_we == (kp_lm_we && stopped), "lm gating");
      check(k_lm_addr == kp_lm_addr && k_lm_wdata == kp_lm_wdata, "lm address/data");
      check(tcu_int_req == int_req && tcu_continuation == (continuation && !req), "int/continuation");
      exp_ack = stopped && (req || int_req);
      if (stopped && save_pc) exp_out = {8'b0, pc};
      if (stopped && save_sp) exp_out = {27'b0, sp};
      if (stopped && kp_lm_re) exp_lm = k_lm_rdata;
      @(posedge clk); #1;
      check(ack == exp_ack, "ack");
      check(kp_data_out === exp_out && kp_lm_rdata === exp_lm, "returned words");
    end
    check(n_acc > 100 && n_rej > 100, "accepted and refused requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
