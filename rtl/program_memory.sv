// program_memory: read-only program store of the task control unit.
// 32-bit instruction words addressed by a 24-bit program address. The word
// is driven on data only while read_rom is high (otherwise data is zero), and
// every address beyond the stored program reads as zero, as in the design's
// generated memory model. The read is combinational.
// The contents come from a hex file (one word per line, address 0 first),
// produced by an assembler from a task-processor assembly program. The
// default is the design's example program that evaluates a*c-b.
// DEPTH (words actually stored) is this design's choice; the design only
// fixes the 24-bit address.
module program_memory #(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = "rtl/pm_example.hex"
) (
  input  logic                       read_rom,
  input  logic [rttp_pkg::PM_AW-1:0] address,
  output logic [31:0]                data
);
  logic [31:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = '0;
    $readmemh(INIT_FILE, rom);
  end

  always_comb begin
    data = '0;
    if (read_rom && (address < rttp_pkg::PM_AW'(DEPTH)))
      data = rom[address[$clog2(DEPTH)-1:0]];
  end
endmodule
