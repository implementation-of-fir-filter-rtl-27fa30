// tb_ripple_carry_adder: exhaustive check of the 8-bit ripple-carry adder.
// Every pair of operands is applied with carry-in 0 and 1; sum and carry-out
// are compared with integer addition.
module tb_ripple_carry_adder;
  localparam int W = 8;
  logic [W-1:0] x, y, s;
  logic         c_in, c_out;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(W)) dut (.x, .y, .c_in, .s, .c_out);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int a = 0; a < 2**W; a++)
        for (int b = 0; b < 2**W; b++) begin
          int unsigned ref_sum;
          x = W'(a); y = W'(b); c_in = 1'(ci);
          #1;
          ref_sum = a + b + ci;
          checks++;
          if ({c_out, s} !== (W+1)'(ref_sum)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d: got %0d expected %0d", a, b, ci, {c_out, s}, ref_sum);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
