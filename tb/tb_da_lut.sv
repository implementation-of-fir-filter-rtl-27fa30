// tb_da_lut: checks every entry of the 16-entry coefficient table, for the
// default low-pass coefficients and for a set with negative and extreme
// values. The expected entry is the sum of the coefficients whose address
// bit is set, worked out in the testbench.
module tb_da_lut;
  int checks = 0, failures = 0;

  localparam logic signed [3:0] C2 [4] = '{-4'sd8, 4'sd7, -4'sd3, 4'sd5};

  logic [3:0]        addr;
  logic signed [5:0] d1, d2;

  da_lut                 dut1 (.addr, .data(d1));
  da_lut #(.COEF(C2))    dut2 (.addr, .data(d2));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h1 [4] = '{1, 3, 3, 1};
    int h2 [4] = '{-8, 7, -3, 5};
    for (int a = 0; a < 16; a++) begin
      int r1, r2;
      r1 = 0; r2 = 0;
      for (int n = 0; n < 4; n++)
        if (a[n]) begin r1 += h1[n]; r2 += h2[n]; end
      addr = 4'(a);
      #1;
      checks += 2;
      if (int'(d1) != r1) begin failures++; $display("FAIL default entry %0d: %0d vs %0d", a, d1, r1); end
      if (int'(d2) != r2) begin failures++; $display("FAIL second entry %0d: %0d vs %0d", a, d2, r2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
