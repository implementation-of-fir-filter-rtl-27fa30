// ripple_carry_adder: W-bit bit-parallel adder made of a chain of full adders.
//
// Each bit position adds x[k], y[k] and the carry from position k-1; the carry
// into the LSB is the c_in port and the carry out of the MSB is c_out. The
// result depends on every input bit of equal or lower significance, so the
// critical path runs from the LSB through all W full adders. Fully
// combinational. The structure follows the ripple-carry adder of the filter
// description; the width W is a parameter (default 8 is this design's choice).
// Bit 0 here is the LSB (the description numbers bits from the MSB).
module ripple_carry_adder #(
  parameter int W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         c_in,
  output logic [W-1:0] s,
  output logic         c_out
);
  logic [W:0] c;
  assign c[0] = c_in;

  for (genvar k = 0; k < W; k++) begin : g_bit
    full_adder u_fa (
      .x    (x[k]),
      .y    (y[k]),
      .c_in (c[k]),
      .s    (s[k]),
      .c_out(c[k+1])
    );
  end

  assign c_out = c[W];
endmodule
