// tb_da_controller: drives the look-up sequencer with back-to-back samples and
// with gaps, and checks cycle by cycle that each accepted sample is followed
// by exactly B look-up cycles, that the first and last (sign) positions are
// flagged, and that in_ready allows a new sample during the last look-up.
module tb_da_controller;
  localparam int B = 4;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, load, shift, bit_valid, bit_first, bit_last;
  int checks = 0, failures = 0;
  int pos = -1;         // expected bit position, -1 when idle
  int accepted = 0, lookups = 0;

  da_controller #(.B(B)) dut (.clk, .rst_n, .in_valid, .in_ready, .load, .shift,
                              .bit_valid, .bit_first, .bit_last);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %t %s: got %0b expected %0b (pos %0d)", $time, what, got, exp, pos);
    end
  endtask

  // Reference model of the sequencing, evaluated before each clock edge.
  always @(negedge clk) if (rst_n) begin
    logic exp_ready;
    exp_ready = (pos < 0) || (pos == B-1);
    expect_bit("in_ready", in_ready, exp_ready);
    expect_bit("load", load, in_valid && exp_ready);
    expect_bit("bit_valid", bit_valid, pos >= 0);
    expect_bit("shift", shift, pos >= 0);
    expect_bit("bit_first", bit_first, pos == 0);
    expect_bit("bit_last", bit_last, pos == B-1);
    if (pos >= 0) lookups++;
    if (in_valid && exp_ready) begin
      accepted++;
      pos = 0;
    end else if (pos == B-1) pos = -1;
    else if (pos >= 0) pos++;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(posedge clk);
      #1 in_valid = (t < 100) ? 1'b1 : 1'(($urandom % 3) == 0);
    end
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (lookups != accepted * B) begin
      failures++;
      $display("FAIL %0d look-ups for %0d samples", lookups, accepted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
