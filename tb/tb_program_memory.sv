// tb_program_memory: the default contents are the example program
// (9401_0304, 8C04_0205, 7FFF_FFFF at addresses 0..2); every other address,
// including ones beyond the stored depth, reads zero, and the output is
// zero whenever read_rom is low.
module tb_program_memory;
  logic read_rom = 0;
  logic [23:0] address = 0;
  logic [31:0] data;
  int checks = 0, failures = 0;
  logic [31:0] expv;

  program_memory dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      // first the program words with read_rom toggling, then a sweep, then
      // random addresses
      address  = (i < 100) ? 24'(i % 4) : (i < 300) ? 24'(i) : 24'($urandom);
      read_rom = (i < 100) ? 1'((i / 4) % 2) : ((i % 7) != 3);
      #1;
      case (address)
        24'd0: expv = 32'h9401_0304;
        24'd1: expv = 32'h8C04_0205;
        24'd2: expv = 32'h7FFF_FFFF;
        default: expv = 32'h0;
      endcase
      if (!read_rom) expv = 0;
      checks++;
      if (data !== expv) begin
        failures++;
        $display("FAIL addr %h rd %b: %h vs %h", address, read_rom, data, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
