// da_lut: look-up table of all partial sums of LUT_IN filter coefficients.
//
// Address bit n selects coefficient h(n): entry addr holds the sum of h(n) over
// every n whose address bit is 1, so entry 0 is 0, entry 1 is h(0), entry 3 is
// h(1)+h(0) and entry 2^LUT_IN-1 is the sum of all of them. With LUT_IN = 4 the
// table has 16 entries, as in the original design. The contents are worked
// out from the COEF parameter when the design is elaborated; in hardware the
// table is a constant ROM read combinationally (no clock).
// Output width: W_COEF + clog2(LUT_IN) bits, enough for any sum of LUT_IN
// coefficients.
module da_lut #(
  parameter int LUT_IN = fir_pkg::LUT_IN,
  parameter int W_COEF = fir_pkg::W_COEF,
  parameter logic signed [W_COEF-1:0] COEF [LUT_IN] = fir_pkg::DEFAULT_COEF,
  localparam int W_LUT = W_COEF + $clog2(LUT_IN)
) (
  input  logic        [LUT_IN-1:0] addr,
  output logic signed [W_LUT-1:0]  data
);
  typedef logic signed [W_LUT-1:0] table_t [2**LUT_IN];

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < 2**LUT_IN; a++) begin
      t[a] = '0;
      for (int n = 0; n < LUT_IN; n++)
        if (a[n]) t[a] = t[a] + W_LUT'(COEF[n]);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign data = TABLE[addr];
endmodule
