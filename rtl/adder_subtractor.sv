// adder_subtractor: W-bit two's complement adder/subtractor on one ripple-carry adder.
//
// With sub = 0 the output is a + b; with sub = 1 it is a - b. Subtraction uses
// the two's complement identity -b = ~b + 1: every bit of b is inverted and the
// carry into the LSB is set, so one full-adder chain does both operations, as
// the original design describes. The result wraps modulo 2^W; overflow flags
// signed overflow (carries into and out of the sign position differ), an extra
// output of this design. Fully combinational. This is the "+/-" unit of the
// filter accumulator.
module adder_subtractor #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] result,
  output logic         overflow
);
  logic [W-1:0] b_eff;
  logic         c_out;

  always_comb b_eff = b ^ {W{sub}};

  ripple_carry_adder #(.W(W)) u_rca (
    .x    (a),
    .y    (b_eff),
    .c_in (sub),
    .s    (result),
    .c_out(c_out)
  );

  // Signed overflow: both operands share a sign that the result does not.
  always_comb overflow = (a[W-1] == b_eff[W-1]) && (result[W-1] != a[W-1]);
endmodule
