// fir_da_harness: drives one fir_da instance with random samples and checks
// every output against a direct evaluation of y(n) = sum_k h(k) x(n-k).
//
// Samples are offered with a random in_valid (always on for the first part of
// the run, so back-to-back acceptance is exercised). For each accepted sample
// the expected output and the acceptance cycle are queued; each y_valid pulse
// must carry the front of the queue exactly B + 1 + PIPE cycles after its
// sample was accepted. done rises once NS outputs have been checked.
module fir_da_harness #(
  parameter int N_TAPS = 4,
  parameter int B      = 4,
  parameter int W_COEF = 4,
  parameter logic signed [W_COEF-1:0] COEF [N_TAPS] = '{4'sd1, 4'sd3, 4'sd3, 4'sd1},
  parameter bit PIPE   = 1'b1,
  parameter int NS     = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   back_to_back,   // samples accepted during the last look-up of the previous one
  output int   from_idle,      // samples accepted while the filter was idle
  output int   neg_samples,    // negative samples, whose sign bit is subtracted
  output logic done
);
  localparam int GROUPS = N_TAPS / 4;
  localparam int W_Y = W_COEF + 2 + $clog2(GROUPS) + B;

  logic                  in_valid = 0, in_ready, y_valid;
  logic [B-1:0]          x_in = '0;
  logic signed [W_Y-1:0] y;

  fir_da #(.N_TAPS(N_TAPS), .B(B), .W_COEF(W_COEF), .COEF(COEF), .PIPE(PIPE)) dut (
    .clk, .rst_n, .in_valid, .x_in, .in_ready, .y, .y_valid);

  int hist [N_TAPS];
  int exp_q [$];
  longint t_q [$];
  longint cycle = 0;
  int outputs = 0;
  logic prev_busy_last = 0;

  initial begin
    checks = 0; failures = 0; back_to_back = 0; from_idle = 0; neg_samples = 0; done = 0;
    for (int k = 0; k < N_TAPS; k++) hist[k] = 0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        int e;
        e = 0;
        for (int k = N_TAPS-1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'($signed(x_in));
        for (int k = 0; k < N_TAPS; k++) e += int'(COEF[k]) * hist[k];
        exp_q.push_back(e);
        t_q.push_back(cycle);
        if (hist[0] < 0) neg_samples++;
        if (dut.bit_last) back_to_back++;
        else from_idle++;
      end
      if (y_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL output with no sample pending");
        end else begin
          int e;
          longint t0;
          e = exp_q.pop_front();
          t0 = t_q.pop_front();
          if (int'(y) != e) begin
            failures++;
            if (failures < 10) $display("FAIL %m output %0d: y=%0d expected %0d", outputs, y, e);
          end
          checks++;
          if (cycle - t0 != B + 1 + PIPE) begin
            failures++;
            if (failures < 10) $display("FAIL %m latency %0d cycles, expected %0d", cycle - t0, B + 1 + PIPE);
          end
        end
        outputs++;
        if (outputs == NS) done <= 1;
      end
    end
  end

  // Stimulus: change inputs after the clock edge.
  always @(posedge clk) begin
    if (rst_n && !(in_valid && !in_ready)) begin
      // a new offer is made only when the last one was taken or none stood
      x_in     <= B'($urandom);
      in_valid <= (outputs < NS / 2) ? 1'b1 : 1'(($urandom % 3) == 0);
    end
  end
endmodule
