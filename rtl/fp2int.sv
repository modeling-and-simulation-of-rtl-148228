// fp2int: conversion of a single-precision number to a 32-bit
// two's-complement integer, truncating toward zero. Only combinational
// logic. Special values are checked first: NaN gives 0 and raises invalid;
// infinities and values outside the integer range saturate to the largest
// positive or negative integer and raise overflow (the saturation is this
// design's choice). Nonzero magnitudes below one give 0 and raise
// underflow; the design asks for overflows and underflows to be signalled,
// and reading a lost fraction as underflow is this design's choice.
module fp2int
  import rttp_pkg::*;
(
  input  logic [31:0] a,
  output logic [31:0] result,
  output exc_t        flags
);
  always_comb begin
    logic [7:0]  ex;
    logic [62:0] mag;
    ex = a[30:23];
    flags = '0;
    result = '0;
    mag = '0;
    if (fp_is_nan(a)) begin
      flags.invalid = 1'b1;
    end else if (ex == 8'd0) begin
      result = '0;                      // zero (subnormals count as zero)
    end else if (ex < 8'd127) begin
      result = '0;                      // 0 < |a| < 1 truncates to zero
      flags.underflow = 1'b1;
    end else if (ex >= 8'd158) begin
      // |a| >= 2^31: only -2^31 itself fits
      if (a == 32'hCF00_0000) result = 32'h8000_0000;
      else begin
        flags.overflow = 1'b1;
        result = a[31] ? 32'h8000_0000 : 32'h7FFF_FFFF;
      end
    end else begin
      mag = {39'b0, 1'b1, a[22:0]} << (ex - 8'd127);
      result = a[31] ? -mag[54:23] : mag[54:23];
    end
  end
endmodule
