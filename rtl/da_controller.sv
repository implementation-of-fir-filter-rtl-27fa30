// da_controller: sequences the B table look-ups of one filter output.
//
// A sample is accepted (load) when in_valid and in_ready are both high. For the
// next B cycles bit_valid is high and cnt walks through bit positions 0 .. B-1,
// LSB first; bit_first marks position 0 (the accumulator restarts) and
// bit_last marks position B-1, the sign bit of two's complement samples, whose
// table value is subtracted. in_ready is high when idle and also during the
// last look-up, so a new sample can follow without a gap: one output every B
// cycles, B being the number of look-ups per output in the filter
// description. The handshake and the back-to-back timing are this design's
// choice. Synchronous, active-low reset.
module da_controller #(
  parameter int B = fir_pkg::B_DATA
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic load,        // accept the sample this cycle
  output logic shift,       // advance the bit-serial read-out
  output logic bit_valid,   // a look-up address is presented this cycle
  output logic bit_first,   // ... for bit position 0
  output logic bit_last     // ... for bit position B-1 (sign bit)
);
  logic                 busy;
  logic [$clog2(B)-1:0] cnt;
  logic                 at_last;

  always_comb begin
    at_last   = busy && (cnt == ($clog2(B))'(B-1));
    in_ready  = !busy || at_last;
    load      = in_valid && in_ready;
    shift     = busy;
    bit_valid = busy;
    bit_first = busy && (cnt == '0);
    bit_last  = at_last;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (at_last) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (busy) begin
      cnt  <= cnt + 1'b1;
    end
  end

  // After the sign-bit look-up the sequence either stops or starts over.
  assert property (@(posedge clk) disable iff (!rst_n) bit_last |=> (!bit_valid || bit_first));
  // A look-up sequence only ever starts from an accepted sample.
  assert property (@(posedge clk) disable iff (!rst_n) bit_first |-> $past(load));
endmodule
