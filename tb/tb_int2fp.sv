// tb_int2fp: random 32-bit integers of every magnitude converted to single
// precision and compared with a reference that widens the integer to
// double (exact) and rounds it to single by nearest-even, bit by bit.
// Includes 0, +-1, the extreme integers and values needing rounding ties.
module tb_int2fp;
  logic [31:0] a, result, expv;
  int checks = 0, failures = 0;

  int2fp dut (.*);

  function automatic logic [31:0] ref_cv(input logic [31:0] x);
    logic [63:0] d;
    int es;
    logic [52:0] m;
    logic [24:0] m24;
    logic [28:0] rem;
    real r;
    r = real'(signed'(x));
    d = $realtobits(r);
    if (d[62:52] == 0) return 32'h0;
    es = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    m24 = {1'b0, m[52:29]};
    rem = m[28:0];
    if (rem > 29'h1000_0000 || (rem == 29'h1000_0000 && m24[0])) m24++;
    if (m24[24]) begin m24 = m24 >> 1; es++; end
    return {d[63], 8'(es), m24[22:0]};
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] dir [8] = '{0, 1, -1, 32'h7FFF_FFFF, 32'h8000_0000, 32'h0100_0001, 32'h0100_0003, 32'h00FF_FFFF};
    for (int i = 0; i < 3000; i++) begin
      a = (i < 8) ? dir[i] : ($urandom >> $urandom_range(0, 31));
      if (i % 2) a = -a;
      #1;
      expv = ref_cv(a);
      checks++;
      if (result !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: %h vs %h", signed'(a), result, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
