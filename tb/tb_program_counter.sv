// tb_program_counter: random increments and loads of the 24-bit program
// counter, compared with an integer model (pc+1 modulo 2^24), including
// the wrap-around from FFFFFF to 0 and load priority over increment.
module tb_program_counter;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic incr_pc = 0, load_pc = 0;
  logic [23:0] pc_in = 0, pc;
  int checks = 0, failures = 0;
  logic [23:0] model;

  program_counter dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++; if (pc !== 24'd0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1;
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      incr_pc = $urandom_range(0, 3) != 0;
      load_pc = $urandom_range(0, 7) == 0;
      pc_in   = (i % 100 == 50) ? 24'hFFFFFE : 24'($urandom);
      @(negedge clk);
      if (load_pc) model = pc_in;
      else if (incr_pc) model = model + 24'd1;
      checks++;
      if (pc !== model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: pc=%h model=%h", i, pc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
