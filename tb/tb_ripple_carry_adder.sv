// tb_ripple_carry_adder: checks 8-bit and 16-bit ripple carry adders against
// the + operator, exhaustively at 8 bits (both carry-in values) and with
// random operands at 16 bits.
// The expected sums come from the + operator; the operand sets are this testbench's choice.
module tb_ripple_carry_adder;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8, s8;   logic ci8, co8;
  logic [15:0] a16, b16, s16; logic ci16, co16;

  ripple_carry_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .ci(ci8),  .s(s8),  .co(co8));
  ripple_carry_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .ci(ci16), .s(s16), .co(co16));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(a); b8 = 8'(b); ci8 = c[0];
          #1;
          checks++;
          if ({co8, s8} != 9'(a + b + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8b %0d+%0d+%0d = %0d", a, b, c, {co8, s8});
          end
        end
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      #1;
      checks++;
      if ({co16, s16} != 17'(a16) + 17'(b16) + 17'(ci16)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
