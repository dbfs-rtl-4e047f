// au_shifter -- Soft SIMD arithmetic right shifter of the Arithmetic Unit.
//
// Shifts every subword of a DW-bit word right by the same amount (0..7) in one
// combinational pass. Subword boundaries come from 'mask' (a 1 at the MSB of
// every subword). Inside a subword bits move down normally; a bit position
// whose source would lie in the next subword up receives the subword's sign
// instead, so sign extension happens at the guardbit end and no bit ever
// crosses a boundary. The shifter is logarithmic, as in the described design:
// three stages shift by 1, 2 and 4 and are enabled by the bits of 'shamt'.
// A shift of 7 on a 3-bit subword simply leaves the sign everywhere.
//
// Interface: purely combinational, x/mask/shamt in, y out. mask[DW-1] must be
// 1 (the top bit is always a subword MSB). The mask encoding and the stage
// order are this implementation's choices.
module au_shifter #(
  parameter int unsigned DW  = 48,
  parameter int unsigned SHW = 3
) (
  input  logic [DW-1:0]  x,
  input  logic [DW-1:0]  mask,
  input  logic [SHW-1:0] shamt,
  output logic [DW-1:0]  y
);

  // One stage: arithmetic right shift of every subword by s.
  function automatic logic [DW-1:0] stage(input logic [DW-1:0] v,
                                          input logic [DW-1:0] mk,
                                          input int unsigned   s);
    logic [DW-1:0] o;
    logic          crs;
    o = v;
    for (int i = DW - 1; i >= 0; i--) begin
      // does the source bit i+s lie above this subword's MSB?
      crs = 1'b0;
      for (int k = 0; k < s; k++)
        if (i + k >= DW) crs = 1'b1;
        else if (mk[i+k]) crs = 1'b1;
      if (mk[i])      o[i] = v[i];        // the sign stays in place
      else if (crs) o[i] = o[i+1];      // copy the sign downwards
      else            o[i] = v[i+s];
    end
    return o;
  endfunction

  logic [DW-1:0] st [SHW+1];

  always_comb begin
    st[0] = x;
    for (int unsigned b = 0; b < SHW; b++)
      st[b+1] = shamt[b] ? stage(st[b], mask, 1 << b) : st[b];
  end

  assign y = st[SHW];

endmodule
