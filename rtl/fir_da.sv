// fir_da: N-tap FIR filter, y(n) = sum_k h(k) x(n-k), computed with table
// look-ups instead of multipliers.
//
// Each input sample is a B-bit two's complement word. Writing every sample as
// its bits, y(n) = sum_l 2^l * T(bit l of x(n), ..., bit l of x(n-N+1)), with
// the sign-bit term subtracted, where T(address) is the sum of the
// coefficients selected by the address bits. T is precomputed (da_lut), so one
// output takes B cycles of: read one bit of every tap, look up T, halve the
// running sum and add T (da_accumulator). When N_TAPS is larger than one table
// can take, the taps are split into groups of LUT_IN, each with its own partial
// table, and the group outputs are summed before accumulation.
// The architecture (tap registers, table, optional pipeline register, +/-
// unit, register with 2^-1 feedback, partial tables for long filters) follows
// the original design; the handshake, widths, reset and coefficient values
// are this design's choices.
// Interface: present x_in with in_valid; it is taken when in_ready is high. y
// holds the result while y_valid pulses, B + 1 + PIPE cycles after the sample
// was taken. A new sample can be taken every B cycles.
module fir_da #(
  parameter int N_TAPS = fir_pkg::N_TAPS,
  parameter int LUT_IN = fir_pkg::LUT_IN,
  parameter int B      = fir_pkg::B_DATA,
  parameter int W_COEF = fir_pkg::W_COEF,
  parameter logic signed [W_COEF-1:0] COEF [N_TAPS] = fir_pkg::DEFAULT_COEF,
  parameter bit PIPE   = 1'b1,
  localparam int GROUPS = N_TAPS / LUT_IN,
  localparam int W_LUT  = W_COEF + $clog2(LUT_IN),
  localparam int W_IN   = W_LUT + $clog2(GROUPS),
  localparam int W_Y    = W_IN + B
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [B-1:0]          x_in,
  output logic                  in_ready,
  output logic signed [W_Y-1:0] y,
  output logic                  y_valid
);
  if (N_TAPS % LUT_IN != 0) begin : g_bad_taps
    $error("N_TAPS must be a multiple of LUT_IN");
  end

  logic              load, shift, bit_valid, bit_first, bit_last;
  logic [N_TAPS-1:0] bits;

  da_controller #(.B(B)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load, .shift,
    .bit_valid, .bit_first, .bit_last
  );

  tap_shift_registers #(.N_TAPS(N_TAPS), .B(B)) u_taps (
    .clk, .rst_n, .load, .shift, .x_in, .bits, .taps()
  );

  // One partial table per group of LUT_IN taps.
  logic signed [W_LUT-1:0] part [GROUPS];
  for (genvar g = 0; g < GROUPS; g++) begin : g_lut
    localparam logic signed [W_COEF-1:0] GCOEF [LUT_IN] = COEF[g*LUT_IN +: LUT_IN];
    da_lut #(.LUT_IN(LUT_IN), .W_COEF(W_COEF), .COEF(GCOEF)) u_lut (
      .addr(bits[g*LUT_IN +: LUT_IN]),
      .data(part[g])
    );
  end

  logic signed [W_IN-1:0] value;
  always_comb begin
    value = '0;
    for (int g = 0; g < GROUPS; g++)
      value = value + W_IN'(part[g]);
  end

  da_accumulator #(.W_IN(W_IN), .B(B), .PIPE(PIPE)) u_acc (
    .clk, .rst_n, .value, .valid(bit_valid), .first(bit_first), .last(bit_last),
    .y, .y_valid
  );
endmodule
