// tb_local_memory: after reset the cells hold the default constants
// (cell 1 = 1.0, cell 2 = -0.1, cell 3 = 1e-6, all others 0); then random
// writes through a0 and reads on both ports are compared with an array
// model. Address 0 has no cell: it reads zero and ignores writes. A second
// reset restores the constants.
module tb_local_memory;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic [7:0] a0 = 0, a1 = 0;
  logic write = 0;
  logic [31:0] wdata = 0, rd0, rd1;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  local_memory dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic init_model();
    foreach (model[i]) model[i] = 0;
    model[1] = 32'h3F80_0000; model[2] = 32'hBDCC_CCCD; model[3] = 32'h3586_37BD;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    init_model();
    for (int i = 0; i < 256; i++) begin
      a0 = 8'(i); a1 = 8'(255 - i); #1;
      check(rd0 === model[i] && rd1 === model[255 - i], $sformatf("reset value %0d", i));
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      a0 = 8'($urandom); a1 = 8'($urandom);
      if (i % 50 == 0) a0 = 0;
      write = $urandom_range(0, 1);
      wdata = $urandom;
      #1;
      check(rd0 === model[a0] && rd1 === model[a1], $sformatf("read %0d/%0d", a0, a1));
      @(posedge clk);
      if (write && a0 != 0) model[a0] = wdata;
    end
    @(negedge clk) write = 0;
    rst_n = 0; #1 rst_n = 1;
    init_model();
    for (int i = 0; i < 256; i++) begin
      a0 = 8'(i); #1;
      check(rd0 === model[i], "value after second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
