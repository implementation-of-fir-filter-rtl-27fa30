// tb_adder_subtractor: exhaustive check of the 8-bit adder/subtractor.
// For every operand pair, a + b (sub = 0) and a - b (sub = 1) are compared
// with signed integer arithmetic, including the signed-overflow flag.
module tb_adder_subtractor;
  localparam int W = 8;
  logic [W-1:0] a, b, result;
  logic         sub, overflow;
  int checks = 0, failures = 0;

  adder_subtractor #(.W(W)) dut (.a, .b, .sub, .result, .overflow);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 2; op++)
      for (int i = -(2**(W-1)); i < 2**(W-1); i++)
        for (int j = -(2**(W-1)); j < 2**(W-1); j++) begin
          int ref_full;
          logic ref_ovf;
          a = W'(i); b = W'(j); sub = 1'(op);
          #1;
          ref_full = op ? i - j : i + j;
          ref_ovf  = (ref_full < -(2**(W-1))) || (ref_full >= 2**(W-1));
          checks++;
          if (result !== W'(ref_full) || overflow !== ref_ovf) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d %s %0d: got %0d ovf %0b, expected %0d ovf %0b",
                       i, op ? "-" : "+", j, $signed(result), overflow, ref_full, ref_ovf);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
