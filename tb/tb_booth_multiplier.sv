// tb_booth_multiplier: exhaustive check of the signed radix-4 Booth
// multiplier at N = 8, 4 and 2 against integer multiplication.
// Signed operands as in the document's multiplier; the reference is the * operator.
module tb_booth_multiplier;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [7:0] a8, b8;  logic signed [15:0] p8;
  logic signed [3:0] a4, b4;  logic signed [7:0]  p4;
  logic signed [1:0] a2, b2;  logic signed [3:0]  p2;

  booth_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));
  booth_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));
  booth_multiplier #(.N(2)) dut2 (.a(a2), .b(b2), .p(p2));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        a8 = 8'(a); b8 = 8'(b);
        a4 = 4'(a); b4 = 4'(b);
        a2 = 2'(a); b2 = 2'(b);
        #1;
        checks++;
        if (int'(p8) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d*%0d = %0d", a, b, p8);
        end
        if (a >= -8 && a < 8 && b >= -8 && b < 8) begin
          checks++;
          if (int'(p4) != a * b) begin
            failures++;
            $display("FAIL 4x4 %0d*%0d = %0d", a, b, p4);
          end
        end
        if (a >= -2 && a < 2 && b >= -2 && b < 2) begin
          checks++;
          if (int'(p2) != a * b) begin
            failures++;
            $display("FAIL 2x2 %0d*%0d = %0d", a, b, p2);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
