// fir_top: the LUT-based FIR filter and, beside it, the bit-parallel array
// multiplier.
//
// fir_da filters a stream of 4-bit samples with a 4-tap low-pass response
// without any multiplier. array_multiplier is the two's complement array
// multiplier that a direct-form filter would need for every tap; it is brought
// out on its own ports (mul_a, mul_x, mul_p) so that it can be used and
// compared on its own. The two share nothing but the chip; the original names
// multipliers among the parts it used without showing where they connect, so
// placing this one beside the filter is this design's choice. Filter timing is
// that of fir_da; the multiplier is combinational.
module fir_top #(
  parameter int N_TAPS = fir_pkg::N_TAPS,
  parameter int B      = fir_pkg::B_DATA,
  parameter int W_MUL  = fir_pkg::W_COEF,
  localparam int W_Y   = fir_pkg::W_COEF + $clog2(fir_pkg::LUT_IN)
                         + $clog2(N_TAPS / fir_pkg::LUT_IN) + B
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // filter
  input  logic                  in_valid,
  input  logic [B-1:0]          x_in,
  output logic                  in_ready,
  output logic signed [W_Y-1:0] y,
  output logic                  y_valid,
  // array multiplier
  input  logic [W_MUL-1:0]      mul_a,
  input  logic [W_MUL-1:0]      mul_x,
  output logic [2*W_MUL-1:0]    mul_p
);
  fir_da #(.N_TAPS(N_TAPS), .B(B)) u_fir (
    .clk, .rst_n, .in_valid, .x_in, .in_ready, .y, .y_valid
  );

  array_multiplier #(.W(W_MUL)) u_mul (
    .a(mul_a), .x(mul_x), .p(mul_p)
  );
endmodule
