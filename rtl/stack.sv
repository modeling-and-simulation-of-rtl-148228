// stack: return-address stack of the task control unit, split as in the
// design into stack memory (a register array) and stack control (the stack
// pointer with ripple increment and decrement).
// sp counts the stored entries: push writes din at mem[sp] and increments sp,
// pop decrements sp; top always shows mem[sp-1]. The depth is not fixed by
// the design; 16 entries is this design's choice. Push on a full stack and
// pop on an empty one are ignored and raise err for one cycle.
// load_sp/sp_in let the kernel interface restore the pointer on a context
// switch. Timing: every operation takes effect at the next clock edge.
module stack #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = rttp_pkg::PM_AW,
  localparam int unsigned SPW  = $clog2(DEPTH) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           push,
  input  logic           pop,
  input  logic [W-1:0]   din,
  output logic [W-1:0]   top,
  input  logic           load_sp,
  input  logic [SPW-1:0] sp_in,
  output logic [SPW-1:0] sp,
  output logic           full,
  output logic           empty,
  output logic           err
);
  logic [W-1:0]   mem [DEPTH];
  logic [SPW-1:0] sp_inc, sp_dec;

  ripple_inc #(.W(SPW)) u_inc (.x(sp), .y(sp_inc));
  ripple_dec #(.W(SPW)) u_dec (.x(sp), .y(sp_dec));

  assign full  = (sp == SPW'(DEPTH));
  assign empty = (sp == '0);
  assign top   = empty ? '0 : mem[sp_dec[$clog2(DEPTH)-1:0]];

  // stack control
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sp  <= '0;
      err <= 1'b0;
    end else begin
      err <= (push && full) || (pop && empty);
      if (load_sp)                    sp <= (sp_in > SPW'(DEPTH)) ? SPW'(DEPTH) : sp_in;
      else if (push && !pop && !full) sp <= sp_inc;
      else if (pop && !push && !empty) sp <= sp_dec;
    end

  // stack memory
  always_ff @(posedge clk)
    if (push && !pop && !full && !load_sp) mem[sp[$clog2(DEPTH)-1:0]] <= din;
endmodule
