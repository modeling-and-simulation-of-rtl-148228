// tb_fp2int: random single-precision numbers converted to integers and
// compared with truncation toward zero of the exact value (computed in
// double precision with $rtoi); NaN must give 0 with invalid, infinities
// and out-of-range values must saturate with overflow, -2^31 must convert
// exactly, and nonzero magnitudes below one must give 0 with underflow.
module tb_fp2int;
  import rttp_pkg::*;
  logic [31:0] a, result, expv;
  exc_t flags, expf;
  int checks = 0, failures = 0;

  fp2int dut (.*);

  function automatic real s2d(input logic [31:0] x);
    if (x[30:23] == 0) return 0.0;
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'b0});
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] dir [8] = '{32'h7FC0_0000, 32'h7F80_0000, 32'hFF80_0000, 32'hCF00_0000,
                             32'h4F00_0000, 32'h3F00_0000, 32'hBF7F_FFFF, 32'h0000_0000};
    for (int i = 0; i < 3000; i++) begin
      real r;
      a = (i < 8) ? dir[i] : {1'($urandom), 8'($urandom_range(100, 165)), 23'($urandom)};
      #1;
      expf = '0;
      if (a[30:23] == 8'hFF && a[22:0] != 0) begin
        expv = 0; expf.invalid = 1;
      end else begin
        r = s2d(a);
        if (a[30:23] == 8'hFF || r >= 2147483648.0 || r < -2147483648.0) begin
          expv = a[31] ? 32'h8000_0000 : 32'h7FFF_FFFF; expf.overflow = 1;
        end else begin
          expv = 32'($rtoi(r));
          if (r != 0.0 && expv == 0) expf.underflow = 1;
        end
      end
      checks++;
      if (result !== expv || flags !== expf) begin
        failures++;
        if (failures < 10) $display("FAIL %h: %h/%b vs %h/%b", a, result, flags, expv, expf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
