// tb_fir_lowpass: runs the default filter (h = {1, 3, 3, 1}) as the low-pass
// filter it is meant to be. Four inputs are applied, each long enough
// for the 4-tap window to fill:
//   * DC at +7 and at -8: gain sum(h) = 8, so y settles to 56 and -64;
//   * the Nyquist tone +7, -7, +7, ...: gain h0 - h1 + h2 - h3 = 0, so y
//     settles to 0 (the out-of-band tone is removed);
//   * the quarter-rate tone 7, 0, -7, 0, ...: amplitude gain
//     |(h0 - h2) + j(h3 - h1)| = 2*sqrt(2), attenuated from 8; the samples
//     of the output are exactly -14, 14, 14, -14.
// Every output after the window has filled is compared with the steady-state
// value; the counts of checked outputs per tone are printed.
module tb_fir_lowpass;
  localparam int B = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, y_valid;
  logic [B-1:0] x_in = '0;
  logic signed [9:0] y;
  logic [3:0] mul_a = '0, mul_x = '0;
  logic [7:0] mul_p;

  fir_top dut (.clk, .rst_n, .in_valid, .x_in, .in_ready, .y, .y_valid, .mul_a, .mul_x, .mul_p);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sends one sample and waits for its output.
  task automatic step(input int x, output int yo);
    @(negedge clk);
    x_in = B'(x); in_valid = 1;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 0;
    do @(posedge clk); while (!y_valid);
    yo = int'(y);
  endtask

  task automatic tone(string name, int period, int amp [4], int expect_y [4]);
    int yo, n_ok;
    n_ok = 0;
    for (int n = 0; n < 24; n++) begin
      step(amp[n % period], yo);
      if (n >= 4) begin
        checks++;
        if (yo != expect_y[n % period]) begin
          failures++;
          $display("FAIL %s: sample %0d gave %0d expected %0d", name, n, yo, expect_y[n % period]);
        end else n_ok++;
      end
    end
    $display("%s: %0d steady-state outputs correct", name, n_ok);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    tone("DC +7",   1, '{7, 0, 0, 0},   '{56, 0, 0, 0});
    tone("DC -8",   1, '{-8, 0, 0, 0},  '{-64, 0, 0, 0});
    tone("Nyquist", 2, '{7, -7, 0, 0},  '{0, 0, 0, 0});
    // x = 7, 0, -7, 0: y(n) = x(n) + 3x(n-1) + 3x(n-2) + x(n-3)
    //   n%4 = 0: 7 + 0 - 21 + 0 = -14;  1: 0 + 21 + 0 - 7 = 14
    //   n%4 = 2: -7 + 0 + 21 + 0 = 14;  3: 0 - 21 + 0 + 7 = -14
    tone("fs/4",    4, '{7, 0, -7, 0},  '{-14, 14, 14, -14});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
