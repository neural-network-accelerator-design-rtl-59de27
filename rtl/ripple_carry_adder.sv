// ripple_carry_adder: WIDTH-bit adder made of a chain of full adders, the
// carry rippling from bit 0 upwards. It sums the partial products of the
// Booth multiplier. The document builds its multipliers with ripple carry
// adders; the width parameter is this design's. Combinational: s = a + b + ci
// (WIDTH bits), co is the carry out of the top bit.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:0] c;
  assign c[0] = ci;
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign co = c[WIDTH];
endmodule : ripple_carry_adder
