// barrel_shifter: 32-bit logarithmic shifter of the logical unit.
// Five mux stages shift by 16, 8, 4, 2 and 1 places as the bits of amt
// select. dir=0 shifts/rotates left, dir=1 right; rot=1 rotates, rot=0
// shifts in zeros (logical shift). Combinational.
module barrel_shifter (
  input  logic [31:0] din,
  input  logic [4:0]  amt,
  input  logic        dir,
  input  logic        rot,
  output logic [31:0] dout
);
  logic [31:0] st [6];

  always_comb begin
    st[0] = din;
    for (int k = 0; k < 5; k++) begin
      automatic int sh = 1 << (4 - k);
      if (amt[4-k]) begin
        if (!dir) st[k+1] = (st[k] << sh) | (rot ? (st[k] >> (32 - sh)) : 32'd0);
        else      st[k+1] = (st[k] >> sh) | (rot ? (st[k] << (32 - sh)) : 32'd0);
      end else begin
        st[k+1] = st[k];
      end
    end
    dout = st[5];
  end
endmodule
