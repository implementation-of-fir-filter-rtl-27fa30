// tap_shift_registers: input sample delay line with bit-serial read-out.
//
// The filter needs the N_TAPS most recent samples x(n), x(n-1), ... x(n-N+1).
// On load the delay line advances (the new sample x_in becomes tap 0, tap k
// takes the old tap k-1) and a working copy of every tap is put into a B-bit
// shift register. Each clock with shift high, those shift registers move one
// place towards the LSB, so bits[k] presents bit 0, 1, ... B-1 of tap k on
// successive cycles. load has priority over shift.
// Following the original block diagram, each tap is a row of B bit registers whose end
// bit feeds the look-up table; keeping the delay line apart from the shifting
// copies is this design's choice, so that the samples survive the read-out.
// Synchronous, active-low reset clears all taps to 0.
module tap_shift_registers #(
  parameter int N_TAPS = fir_pkg::N_TAPS,
  parameter int B      = fir_pkg::B_DATA
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              shift,
  input  logic [B-1:0]      x_in,
  output logic [N_TAPS-1:0] bits,          // current bit of each tap
  output logic [B-1:0]      taps [N_TAPS]  // delay line x(n-k)
);
  logic [B-1:0] sh [N_TAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N_TAPS; k++) begin
        taps[k] <= '0;
        sh[k]   <= '0;
      end
    end else if (load) begin
      taps[0] <= x_in;
      sh[0]   <= x_in;
      for (int k = 1; k < N_TAPS; k++) begin
        taps[k] <= taps[k-1];
        sh[k]   <= taps[k-1];
      end
    end else if (shift) begin
      for (int k = 0; k < N_TAPS; k++)
        sh[k] <= sh[k] >> 1;
    end
  end

  always_comb
    for (int k = 0; k < N_TAPS; k++)
      bits[k] = sh[k][0];
endmodule
