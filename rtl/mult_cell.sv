// mult_cell: one cell of the two's complement array multiplier.
//
// The cell is a full adder whose negative-weight inputs are inverted on the way
// in, and whose output of negative weight is inverted on the way out. For a
// bit b of weight -1, ~b = 1 - b, so the inversions turn the signed sum into an
// ordinary full-adder sum plus a constant that the output inversion absorbs.
// The three cell kinds and their equations are those of the multiplier's
// published cell definitions (see mult_pkg); realising them as an inverted full adder is this
// design's choice. Combinational.
module mult_cell
  import mult_pkg::*;
#(
  parameter cell_kind_t KIND = CELL_I
) (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic c,
  output logic s
);
  logic y_in, z_in, c_fa, s_fa;

  always_comb begin
    y_in = (KIND == CELL_IIP) ? ~y : y;
    z_in = (KIND == CELL_I)   ?  z : ~z;
    s_fa = x ^ y_in ^ z_in;
    c_fa = (x & y_in) | (z_in & (x ^ y_in));
    s    = (KIND == CELL_II)  ? ~s_fa : s_fa;
    c    = (KIND == CELL_IIP) ? ~c_fa : c_fa;
  end
endmodule
