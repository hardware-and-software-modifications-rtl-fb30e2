// c_cell: complex (C) cell of the binary network.
//
// With binary S-cell outputs and the saturation constant alpha = 0, a C cell
// fires whenever at least one S cell of its receptive field fires, so the cell
// is an OR over its N_IN inputs (a 4x4 window of one plane by default), as the
// published C-cell figure shows. Purely combinational.
module c_cell #(
  parameter int N_IN = 16
) (
  input  logic [N_IN-1:0] field,
  output logic            out
);

  always_comb out = |field;

endmodule
