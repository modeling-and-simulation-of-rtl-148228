// eda_unit: external data access unit, the task processor's port to memory
// and peripheral devices. Towards the outside it uses an asynchronous
// four-phase handshake, so it can be adapted to synchronous and asynchronous
// busses alike:
//   read : address_mem and oe_mem=1 are driven; the device raises ack_mem
//          with data_mem_in valid; the word is taken, oe_mem falls, and the
//          access ends when the device drops ack_mem.
//   write: address_mem, data_mem_out and wr_mem=1 are driven; the device
//          raises ack_mem once it has taken the data; wr_mem falls and the
//          access ends when ack_mem falls.
// ack_mem comes from another timing domain and passes a two-flop
// synchroniser. Inside, a one-cycle start (we selects a write) begins an
// access and done pulses for one cycle at its end (rdata valid from then).
// The handshake protocol is this design's choice: the design only states
// that the unit's interface is asynchronous.
module eda_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        done,
  // external side
  output logic [31:0] address_mem,
  output logic [31:0] data_mem_out,
  input  logic [31:0] data_mem_in,
  output logic        oe_mem,
  output logic        wr_mem,
  input  logic        ack_mem
);
  typedef enum logic [1:0] {E_IDLE, E_REQ, E_REL} estate_e;
  estate_e state;
  logic    ack_s1, ack_s2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
    end else begin
      ack_s1 <= ack_mem;
      ack_s2 <= ack_s1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= E_IDLE; rdata <= '0; done <= 1'b0;
      address_mem <= '0; data_mem_out <= '0; oe_mem <= 1'b0; wr_mem <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        E_IDLE: if (start) begin
          address_mem  <= addr;
          data_mem_out <= wdata;
          oe_mem       <= !we;
          wr_mem       <= we;
          state        <= E_REQ;
        end
        E_REQ: if (ack_s2) begin
          if (oe_mem) rdata <= data_mem_in;
          oe_mem <= 1'b0;
          wr_mem <= 1'b0;
          state  <= E_REL;
        end
        default: if (!ack_s2) begin
          done  <= 1'b1;
          state <= E_IDLE;
        end
      endcase
    end
endmodule
