// tb_flex_booth_multiplier: exhaustive check of the precision-flexible
// multiplier in all four select codes: each signed lane product is computed
// here from the operand lanes and compared with its output field.
// The lane layout and select codes checked are the ones the document's flexible
// multiplier uses; the reference model is written here.
module tb_flex_booth_multiplier;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a, b;
  logic [1:0]  sel;
  logic [15:0] p;

  flex_booth_multiplier dut (.a(a), .b(b), .sel(sel), .p(p));

  function automatic logic [15:0] ref_mul(logic [7:0] x, logic [7:0] y, logic [1:0] s);
    int w, lanes, xa, yb;
    logic [15:0] r;
    w = (s == 2'd0) ? 2 : (s == 2'd3) ? 4 : 8;
    lanes = 8 / w;
    r = '0;
    for (int k = 0; k < lanes; k++) begin
      xa = int'(x >> (w * k)) & ((1 << w) - 1);
      yb = int'(y >> (w * k)) & ((1 << w) - 1);
      if (xa >= (1 << (w - 1))) xa -= (1 << w);   // to signed
      if (yb >= (1 << (w - 1))) yb -= (1 << w);
      r |= 16'((xa * yb) & ((1 << (2 * w)) - 1)) << (2 * w * k);
    end
    return r;
  endfunction

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          a = 8'(x); b = 8'(y); sel = 2'(s);
          #1;
          checks++;
          if (p !== ref_mul(a, b, sel)) begin
            failures++;
            if (failures < 10) $display("FAIL sel=%0d a=%h b=%h p=%h exp=%h", s, a, b, p, ref_mul(a, b, sel));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
