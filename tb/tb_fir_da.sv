// tb_fir_da: end-to-end check of the LUT-based FIR filter in three
// configurations: the default (4 taps, pipeline register), without the
// pipeline register, and 8 taps split over two partial tables with
// coefficients of both signs. Outputs are compared with a direct FIR
// evaluation, and the latency of every output is checked.
module tb_fir_da;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic signed [3:0] C8 [8] = '{4'sd2, -4'sd3, 4'sd7, -4'sd8, 4'sd5, 4'sd1, -4'sd1, 4'sd4};

  int c0, f0, b0, i0, n0, c1, f1, b1, i1, n1, c2, f2, b2, i2, n2;
  logic d0, d1, d2;

  fir_da_harness                                  h_def  (.clk, .rst_n, .checks(c0), .failures(f0), .back_to_back(b0), .from_idle(i0), .neg_samples(n0), .done(d0));
  fir_da_harness #(.PIPE(1'b0))                   h_nop  (.clk, .rst_n, .checks(c1), .failures(f1), .back_to_back(b1), .from_idle(i1), .neg_samples(n1), .done(d1));
  fir_da_harness #(.N_TAPS(8), .COEF(C8))         h_8tap (.clk, .rst_n, .checks(c2), .failures(f2), .back_to_back(b2), .from_idle(i2), .neg_samples(n2), .done(d2));

  int extra_checks = 0, extra_failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2);
    // every configuration must have met negative samples and gapless input
    extra_checks += 9;
    if (i0 == 0) extra_failures++;
    if (i1 == 0) extra_failures++;
    if (i2 == 0) extra_failures++;
    if (b0 == 0) extra_failures++;
    if (b1 == 0) extra_failures++;
    if (b2 == 0) extra_failures++;
    if (n0 == 0) extra_failures++;
    if (n1 == 0) extra_failures++;
    if (n2 == 0) extra_failures++;
    $display("back-to-back samples %0d/%0d/%0d, from idle %0d/%0d/%0d, negative samples %0d/%0d/%0d", b0, b1, b2, i0, i1, i2, n0, n1, n2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + extra_checks, f0 + f1 + f2 + extra_failures);
    $finish;
  end
endmodule
