// logical_unit: bitwise and shift operations of the task process unit.
// It is a barrel shifter (rol, ror, shl, shr) beside a compound operator for
// AND, NOR, XOR and AND_NOT, as the design divides it. a is source1, b is
// source2; shifts move a by b[4:0] places (shr is a logical shift, and the
// use of the low five bits of source2 is this design's choice); and_not is
// a AND NOT b. Combinational: result follows a, b and op in the same cycle.
module logical_unit
  import rttp_pkg::*;
(
  input  dp_op_e      op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result
);
  logic [31:0] shifted;

  barrel_shifter u_bs (
    .din (a),
    .amt (b[4:0]),
    .dir (op == OP_ROR || op == OP_SHR),
    .rot (op == OP_ROL || op == OP_ROR),
    .dout(shifted)
  );

  always_comb begin
    unique case (op)
      OP_AND:  result = a & b;
      OP_NOR:  result = ~(a | b);
      OP_XOR:  result = a ^ b;
      OP_ANDN: result = a & ~b;
      OP_ROL, OP_ROR, OP_SHL, OP_SHR: result = shifted;
      default: result = '0;
    endcase
  end
endmodule
