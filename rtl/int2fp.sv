// int2fp: conversion of a 32-bit two's-complement integer to single
// precision, rounded to nearest-even. Only combinational logic: the
// magnitude is normalised by a leading-one search and rounded by
// rttp_pkg::fp_round_pack. Every integer is in range, so no flag is needed.
module int2fp
  import rttp_pkg::*;
(
  input  logic [31:0] a,
  output logic [31:0] result
);
  always_comb begin
    logic [31:0] mag;
    fp_res_t r;
    mag = a[31] ? -a : a;
    // value = mag = mag * 2^-48 * 2^((127+48)-127)
    r = fp_round_pack(a[31], 12'sd175, {18'b0, mag});
    result = r.val;
  end
endmodule
