// full_adder: one bit position of a bit-parallel adder, 2*c_out + s = x + y + c_in.
// Purely combinational; used as the cell of the ripple-carry adder. The
// original shows the cell only as a box; the sum and carry equations are the
// standard ones.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic c_in,
  output logic s,
  output logic c_out
);
  always_comb begin
    s     = x ^ y ^ c_in;
    c_out = (x & y) | (c_in & (x ^ y));
  end
endmodule
