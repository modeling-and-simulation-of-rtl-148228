// tb_eda_unit: random reads and writes through the external data access
// unit against the behavioural device ext_device, which answers after
// random delays. Checks the word read (device returns CAFE0000|address),
// the address and data of each write, one done pulse per access, that
// oe_mem and wr_mem are never high together, and that a request is only
// withdrawn after ack_mem has been seen.
module tb_eda_unit;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic start = 0, we = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic done;
  logic [31:0] address_mem, data_mem_out, data_mem_in;
  logic oe_mem, wr_mem, ack_mem;
  logic [31:0] last_addr, last_data;
  int n_reads, n_writes;
  int checks = 0, failures = 0;

  eda_unit dut (.*);
  ext_device #(.MAXD(5)) dev (.clk, .en(rst_n), .address_mem, .data_mem_out, .data_mem_in,
    .oe_mem, .wr_mem, .ack_mem, .last_addr, .last_data, .n_reads, .n_writes);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // request lines only fall after the acknowledge
  logic req_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (oe_mem && wr_mem) begin failures++; $display("FAIL: oe and wr together"); end
    if (req_q && !(oe_mem || wr_mem) && !ack_mem) begin
      failures++; $display("FAIL: request withdrawn before ack");
    end
    req_q <= oe_mem || wr_mem;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nd, wr_cnt, rd_cnt;
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    wr_cnt = 0; rd_cnt = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); addr = {24'b0, 8'($urandom)}; wdata = $urandom;
      start = 1;
      @(negedge clk) start = 0;
      nd = 0;
      while (!done) begin @(negedge clk); end
      nd++;
      @(negedge clk); if (done) nd++;
      check(nd == 1, "one done pulse");
      if (we) begin
        wr_cnt++;
        check(last_addr === addr && last_data === wdata, "write address/data");
      end else begin
        rd_cnt++;
        check(rdata === (32'hCAFE_0000 | addr), $sformatf("read %h", rdata));
      end
    end
    check(n_reads == rd_cnt && n_writes == wr_cnt, "access counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
