// tb_array_multiplier: exhaustive check of the two's complement array
// multiplier at the 4 x 4 default size and at 3, 5 and 8 bits. Every operand
// pair is multiplied and compared with the signed integer product.
module tb_array_multiplier;
  int checks = 0, failures = 0;

  logic [3:0] a4, x4;  logic [7:0]  p4;
  logic [2:0] a3, x3;  logic [5:0]  p3;
  logic [4:0] a5, x5;  logic [9:0]  p5;
  logic [7:0] a8, x8;  logic [15:0] p8;

  array_multiplier            dut4 (.a(a4), .x(x4), .p(p4));
  array_multiplier #(.W(3))   dut3 (.a(a3), .x(x3), .p(p3));
  array_multiplier #(.W(5))   dut5 (.a(a5), .x(x5), .p(p5));
  array_multiplier #(.W(8))   dut8 (.a(a8), .x(x8), .p(p8));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int w, int i, int j, int got);
    checks++;
    if (got != i * j) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d: %0d * %0d gave %0d", w, i, j, got);
    end
  endtask

  initial begin
    for (int i = -8; i < 8; i++)
      for (int j = -8; j < 8; j++) begin
        a4 = 4'(i); x4 = 4'(j); #1;
        check(4, i, j, int'($signed(p4)));
      end
    for (int i = -4; i < 4; i++)
      for (int j = -4; j < 4; j++) begin
        a3 = 3'(i); x3 = 3'(j); #1;
        check(3, i, j, int'($signed(p3)));
      end
    for (int i = -16; i < 16; i++)
      for (int j = -16; j < 16; j++) begin
        a5 = 5'(i); x5 = 5'(j); #1;
        check(5, i, j, int'($signed(p5)));
      end
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        a8 = 8'(i); x8 = 8'(j); #1;
        check(8, i, j, int'($signed(p8)));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
