// circ_shifter: cyclic rotation of the first z elements of a Z_MAX-wide word.
//
// out[i] = in[(i + r) mod z] for i < z, and 0 for i >= z, with 0 <= r < z.
// A z x z sub-matrix I_x connects check row i to variable (i + x) mod z, so a
// rotation by r routes each L message of a block column to the SISO lane of
// its check row. z is a run-time input, so every code size up to Z_MAX is
// served by the same network. Combinational; the caller registers the result.
// The source design names this unit but not its structure; a per-lane index
// multiplexer is used here.
module circ_shifter
  import ldpc_pkg::*;
#(
  parameter int unsigned ZM = Z_MAX,
  parameter int unsigned DW = W
) (
  input  logic [ZW-1:0]          z,
  input  logic [ZW-1:0]          r,
  input  logic [ZM-1:0][DW-1:0]  din,
  output logic [ZM-1:0][DW-1:0]  dout
);
  always_comb begin
    for (int i = 0; i < ZM; i++) begin
      logic [ZW:0] idx;
      idx = (ZW+1)'(i) + (ZW+1)'(r);
      if (idx >= (ZW+1)'(z)) idx = idx - (ZW+1)'(z);
      dout[i] = '0;
      if ((ZW+1)'(i) < (ZW+1)'(z) && idx < (ZW+1)'(ZM))
        dout[i] = din[idx[ZW-1:0]];
    end
  end
endmodule
