// local_memory: the task process unit's register file ("local memory").
// 255 cells of 32 bits at addresses 1..255; address 0 holds no cell and reads
// as zero. Two combinational read ports follow the address busses a0 and a1
// (rd0 drives d0, rd1 drives d1); one write port stores wdata (from d0) at a0
// on the clock edge when write is high. Writes to address 0 are ignored.
// An active-low reset loads every cell with its initial constant: the
// variables an assembled program declares, from INIT_FILE (256 lines,
// line 0 unused), all other cells become zero. This replaces the kernel
// processor preloading the constants.
// The design's model writes and resets with level-sensitive guarded blocks;
// here the write is clocked and the reset asynchronous (this design's choice).
module local_memory #(
  parameter int unsigned CELLS     = 255,
  parameter string       INIT_FILE = "rtl/lm_example.hex",
  localparam int unsigned AW       = rttp_pkg::LM_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] a0,
  input  logic [AW-1:0] a1,
  input  logic          write,
  input  logic [31:0]   wdata,
  output logic [31:0]   rd0,
  output logic [31:0]   rd1
);
  logic [31:0] cells     [1:CELLS];
  logic [31:0] init_val [0:CELLS];

  initial begin
    for (int i = 0; i <= int'(CELLS); i++) init_val[i] = '0;
    $readmemh(INIT_FILE, init_val);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 1; i <= int'(CELLS); i++) cells[i] <= init_val[i];
    end else if (write && a0 != '0 && a0 <= AW'(CELLS)) begin
      cells[a0] <= wdata;
    end

  assign rd0 = (a0 != '0 && a0 <= AW'(CELLS)) ? cells[a0] : '0;
  assign rd1 = (a1 != '0 && a1 <= AW'(CELLS)) ? cells[a1] : '0;
endmodule
