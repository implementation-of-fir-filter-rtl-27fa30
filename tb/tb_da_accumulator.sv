// tb_da_accumulator: feeds random sequences of B table values (LSB position
// first) into the accumulator, with and without the pipeline register, and
// checks that y equals sum_l 2^l * value_l with the last (sign) position
// subtracted, and that y_valid comes 1 + PIPE cycles after the last value.
module tb_da_accumulator;
  localparam int W_IN = 6, B = 4, W_ACC = W_IN + B;
  logic clk = 0, rst_n = 0;
  logic signed [W_IN-1:0]  value;
  logic                    valid = 0, first = 0, last = 0;
  logic signed [W_ACC-1:0] y1, y0;
  logic                    yv1, yv0;
  int checks = 0, failures = 0;

  da_accumulator #(.W_IN(W_IN), .B(B), .PIPE(1'b1)) dut_p (
    .clk, .rst_n, .value, .valid, .first, .last, .y(y1), .y_valid(yv1));
  da_accumulator #(.W_IN(W_IN), .B(B), .PIPE(1'b0)) dut_n (
    .clk, .rst_n, .value, .valid, .first, .last, .y(y0), .y_valid(yv0));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    value = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int s = 0; s < 500; s++) begin
      int expected;
      expected = 0;
      for (int l = 0; l < B; l++) begin
        int v;
        v = (s < 4) ? ((s % 2) ? 31 : -32) : int'($signed(W_IN'($urandom)));  // extremes first
        value = W_IN'(v); valid = 1; first = (l == 0); last = (l == B-1);
        expected += (l == B-1) ? -(v <<< l) : (v <<< l);
        @(negedge clk);
      end
      valid = 0; first = 0; last = 0;
      // without pipeline register: result is there now
      checks += 2;
      if (!yv0 || int'(y0) != expected) begin
        failures++; $display("FAIL no-pipe sample %0d: y=%0d v=%0b expected %0d", s, y0, yv0, expected);
      end
      if (yv1) begin failures++; $display("FAIL pipelined y_valid one cycle early"); end
      @(negedge clk);
      checks += 2;
      if (!yv1 || int'(y1) != expected) begin
        failures++; $display("FAIL pipe sample %0d: y=%0d v=%0b expected %0d", s, y1, yv1, expected);
      end
      if (yv0) begin failures++; $display("FAIL y_valid longer than one cycle"); end
      if ($urandom % 2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
