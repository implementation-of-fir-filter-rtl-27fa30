// tb_fir_top: end-to-end test of the whole design at its default parameters.
//
// The filter is fed a stream of random 4-bit samples, first back to back and
// then with random gaps, and every output is compared with a direct evaluation
// of y(n) = sum_k h(k) x(n-k) for the default coefficients {1, 3, 3, 1}; the
// latency (B + 2 cycles with the pipeline register) and the rate (one sample
// every B = 4 cycles when input is continuous) are checked. Alongside, the
// array multiplier is checked for all 256 operand pairs.
// Mechanisms counted, each of which must occur: subtraction of a non-zero
// sign-bit table value, a sample accepted during the last look-up of the
// previous one (no gap), a sample accepted from idle, every one of the 16
// table addresses, and a negative result.
module tb_fir_top;
  localparam int B = 4, N = 4, W_Y = 10;
  localparam int NS = 400;
  localparam int H [N] = '{1, 3, 3, 1};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, y_valid;
  logic [B-1:0] x_in = '0;
  logic signed [W_Y-1:0] y;
  logic [3:0] mul_a = '0, mul_x = '0;
  logic [7:0] mul_p;

  fir_top dut (.clk, .rst_n, .in_valid, .x_in, .in_ready, .y, .y_valid, .mul_a, .mul_x, .mul_p);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sign_sub = 0, n_back_to_back = 0, n_from_idle = 0, n_negative_y = 0;
  logic [15:0] addr_seen = '0;
  int hist [N];
  int exp_q [$];
  longint t_q [$];
  longint cycle = 0;
  int outputs = 0;
  longint first_accept = -1, last_accept_b2b = -1;

  initial begin : watchdog
    repeat (20 * NS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d outputs", outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard and mechanism counters, sampled at each rising edge.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (dut.u_fir.bit_valid) addr_seen[dut.u_fir.bits] = 1'b1;
      if (dut.u_fir.u_acc.valid_q && dut.u_fir.u_acc.last_q && dut.u_fir.u_acc.v_q != 0) n_sign_sub++;
      if (in_valid && in_ready) begin
        int e;
        e = 0;
        if (dut.u_fir.bit_last) n_back_to_back++;
        else n_from_idle++;
        for (int k = N-1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'($signed(x_in));
        for (int k = 0; k < N; k++) e += H[k] * hist[k];
        exp_q.push_back(e);
        t_q.push_back(cycle);
      end
      if (y_valid) begin
        int e;
        longint t0;
        checks += 2;
        e  = exp_q.pop_front();
        t0 = t_q.pop_front();
        if (int'(y) != e) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d: y=%0d expected %0d", outputs, y, e);
        end
        if (cycle - t0 != B + 2) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d latency %0d", outputs, cycle - t0);
        end
        if (y < 0) n_negative_y++;
        outputs++;
      end
    end
  end

  initial begin
    for (int k = 0; k < N; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // Multiplier: every operand pair.
    for (int i = -8; i < 8; i++)
      for (int j = -8; j < 8; j++) begin
        mul_a = 4'(i); mul_x = 4'(j);
        #1;
        checks++;
        if (int'($signed(mul_p)) != i * j) begin
          failures++;
          $display("FAIL multiplier %0d * %0d = %0d", i, j, $signed(mul_p));
        end
      end

    // Filter, part 1: continuous input; the rate must be one sample per B cycles.
    @(posedge clk);
    begin
      longint t_start;
      int n_acc;
      n_acc = 0;
      in_valid <= 1'b1;
      x_in <= B'($urandom);
      while (n_acc < NS / 2) begin
        @(posedge clk);
        if (in_valid && in_ready) begin
          if (n_acc == 0) t_start = cycle;
          n_acc++;
          x_in <= B'($urandom);
        end
      end
      checks++;
      if (cycle - t_start != longint'(B) * (NS / 2 - 1)) begin
        failures++;
        $display("FAIL %0d samples took %0d cycles", NS / 2, cycle - t_start);
      end
    end
    // Part 2: random gaps.
    begin
      int n_acc;
      n_acc = 0;
      while (n_acc < NS / 2) begin
        in_valid <= 1'(($urandom % 3) != 0);
        @(posedge clk);
        if (in_valid && in_ready) begin
          n_acc++;
          x_in <= B'($urandom);
        end
      end
      in_valid <= 1'b0;
    end
    repeat (2 * B + 4) @(posedge clk);

    checks++;
    if (outputs != NS) begin failures++; $display("FAIL %0d outputs for %0d samples", outputs, NS); end
    $display("sign-bit subtractions %0d, back-to-back samples %0d, samples from idle %0d, negative outputs %0d, table addresses seen %0d/16",
             n_sign_sub, n_back_to_back, n_from_idle, n_negative_y, $countones(addr_seen));
    checks += 5;
    if (n_sign_sub == 0)      begin failures++; $display("FAIL no sign-bit subtraction"); end
    if (n_back_to_back == 0)  begin failures++; $display("FAIL no back-to-back sample"); end
    if (n_from_idle == 0)     begin failures++; $display("FAIL no sample from idle"); end
    if (n_negative_y == 0)    begin failures++; $display("FAIL no negative output"); end
    if (addr_seen != '1)      begin failures++; $display("FAIL not every table address used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
