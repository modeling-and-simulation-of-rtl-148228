// program_counter: the task control unit's program counter.
// The increment is the bit-serial recurrence of ripple_inc (carry into bit n
// exists when bit n-1 was 1 and became 0), as the design specifies. The
// counter clears to address 0 (the program origin) on reset.
// Interface: incr_pc adds one at the clock edge; load_pc (priority) loads
// pc_in, used by jumps, calls, returns and the kernel interface.
// Timing: one clock edge per operation; pc is a register output.
module program_counter #(
  parameter int unsigned W = rttp_pkg::PM_AW
) (
  input  logic         clk,
  input  logic         rst_n,    // active low
  input  logic         incr_pc,
  input  logic         load_pc,
  input  logic [W-1:0] pc_in,
  output logic [W-1:0] pc
);
  logic [W-1:0] pc_plus1;

  ripple_inc #(.W(W)) u_inc (.x(pc), .y(pc_plus1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       pc <= '0;
    else if (load_pc) pc <= pc_in;
    else if (incr_pc) pc <= pc_plus1;
endmodule
