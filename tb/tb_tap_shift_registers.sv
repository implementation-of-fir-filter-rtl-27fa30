// tb_tap_shift_registers: loads a stream of random samples into the 4-tap
// delay line and, after each load, checks that the tap words hold the last
// four samples and that the bit outputs present bit 0, 1, 2, 3 of every tap
// on the following shift cycles.
module tb_tap_shift_registers;
  localparam int N = 4, B = 4;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [B-1:0] x_in = '0;
  logic [N-1:0] bits;
  logic [B-1:0] taps [N];
  int checks = 0, failures = 0;
  logic [B-1:0] hist [N];

  tap_shift_registers #(.N_TAPS(N), .B(B)) dut (.clk, .rst_n, .load, .shift, .x_in, .bits, .taps);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 40; s++) begin
      @(negedge clk);
      x_in = B'($urandom);
      load = 1; shift = 0;
      for (int k = N-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x_in;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (taps[k] !== hist[k]) begin failures++; $display("FAIL tap %0d", k); end
      end
      for (int l = 0; l < B; l++) begin
        for (int k = 0; k < N; k++) begin
          checks++;
          if (bits[k] !== hist[k][l]) begin
            failures++;
            $display("FAIL sample %0d tap %0d bit %0d", s, k, l);
          end
        end
        shift = 1;
        @(negedge clk);
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
