// tb_stack: random pushes and pops on the return-address stack compared
// with a queue model: top of stack, pointer, full/empty, and the error
// flag raised by a push when full or a pop when empty (both ignored).
// Also a pointer reload through load_sp.
module tb_stack;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, load_sp = 0;
  logic [23:0] din = 0, top;
  logic [4:0] sp_in = 0, sp;
  logic full, empty, err;
  int checks = 0, failures = 0;
  logic [23:0] q[$];
  logic exp_err;
  int n_over = 0, n_under = 0;

  stack #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    check(empty && sp == 0, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      // phases: mostly push, mostly pop, mixed
      int pp;
      pp = ((i / 200) % 3 == 0) ? 80 : ((i / 200) % 3 == 1) ? 20 : 50;
      push = $urandom_range(0, 99) < pp;
      pop  = !push && $urandom_range(0, 1);
      din  = 24'($urandom);
      exp_err = (push && q.size() == DEPTH) || (pop && q.size() == 0);
      n_over += (push && q.size() == DEPTH);
      n_under += (pop && q.size() == 0);
      @(negedge clk);
      if (push && q.size() < DEPTH) q.push_back(din);
      if (pop && q.size() > 0) void'(q.pop_back());
      check(err == exp_err, $sformatf("err at %0d", i));
      check(sp == 5'(q.size()), $sformatf("sp %0d vs %0d", sp, q.size()));
      check(full == (q.size() == DEPTH) && empty == (q.size() == 0), "full/empty");
      if (q.size() > 0) check(top === q[$], $sformatf("top %h vs %h", top, q[$]));
    end
    push = 0; pop = 0;
    check(n_over > 0 && n_under > 0, "overflow and underflow both exercised");
    // pointer reload: drop to 2 entries
    while (q.size() < 3) begin push = 1; din = 24'($urandom); @(negedge clk); q.push_back(din); push = 0; end
    load_sp = 1; sp_in = 5'd2; @(negedge clk); load_sp = 0;
    while (q.size() > 2) void'(q.pop_back());
    check(sp == 2 && top === q[$], "load_sp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
