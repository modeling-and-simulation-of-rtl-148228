// ripple_inc: increment by one, built bit by bit from the recurrence
//   new_n = x_n XOR (x_{n-1} AND NOT new_{n-1}),  new_0 = NOT x_0
// i.e. bit n toggles when the bit below went from 1 to 0. Combinational.
// Used by the program counter and the stack pointer.
module ripple_inc #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  assign y[0] = ~x[0];
  for (genvar n = 1; n < W; n++) begin : g_bit
    assign y[n] = x[n] ^ (x[n-1] & ~y[n-1]);
  end
endmodule
