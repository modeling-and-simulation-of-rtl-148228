// ext_device: behavioural model of a memory/peripheral on the task
// processor's asynchronous external-data handshake. A read (oe_mem high)
// is answered after a random delay of 1..MAXD cycles with the word
// READ_BASE | address and ack_mem high; a write (wr_mem high) is stored in
// last_addr/last_data and acknowledged the same way. ack_mem falls a random
// delay after the request has been withdrawn. Counts reads and writes.
module ext_device #(
  parameter int MAXD = 4,
  parameter logic [31:0] READ_BASE = 32'hCAFE_0000
) (
  input  logic        clk,
  input  logic        en,      // device active (outside reset)
  input  logic [31:0] address_mem,
  input  logic [31:0] data_mem_out,
  output logic [31:0] data_mem_in,
  input  logic        oe_mem,
  input  logic        wr_mem,
  output logic        ack_mem,
  output logic [31:0] last_addr,
  output logic [31:0] last_data,
  output int          n_reads,
  output int          n_writes
);
  initial begin
    ack_mem = 1'b0; data_mem_in = '0; last_addr = '0; last_data = '0;
    n_reads = 0; n_writes = 0;
    forever begin
      @(posedge clk);
      if (en && (oe_mem || wr_mem)) begin
        repeat (1 + $urandom_range(MAXD - 1)) @(posedge clk);
        if (oe_mem) begin
          data_mem_in = READ_BASE | address_mem;
          n_reads++;
        end else begin
          last_addr = address_mem;
          last_data = data_mem_out;
          n_writes++;
        end
        ack_mem = 1'b1;
        while (oe_mem || wr_mem) @(posedge clk);
        repeat (1 + $urandom_range(MAXD - 1)) @(posedge clk);
        ack_mem = 1'b0;
      end
    end
  end
endmodule
