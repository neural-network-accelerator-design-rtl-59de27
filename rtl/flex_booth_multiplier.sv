// flex_booth_multiplier: precision-flexible signed multiplier of two 8-bit
// operand words.
//
// The same 8-bit words carry one 8-bit, two 4-bit or four 2-bit signed values
// (lane k in bits [w*k+w-1 : w*k]). One 8x8, two 4x4 and four 2x2 Modified
// Booth multipliers work side by side and the select input picks whose
// results form the 16-bit output, lane k of width 2w in bits
// [2w*k+2w-1 : 2w*k]. The select encoding (0: four 2x2, 1 and 2: one 8x8,
// 3: two 4x4) and the parallel structure with an output multiplexer follow
// the document; all lanes are signed.
//
// Combinational.
module flex_booth_multiplier
  import dla_pkg::*;
(
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  logic [1:0]  sel,
  output logic [15:0] p
);
  logic [15:0] p8, p4, p2;

  booth_multiplier #(.N(8)) u_m8 (.a(a), .b(b), .p(p8));

  for (genvar k = 0; k < 2; k++) begin : g_m4
    booth_multiplier #(.N(4)) u_m4 (.a(a[4*k+:4]), .b(b[4*k+:4]), .p(p4[8*k+:8]));
  end

  for (genvar k = 0; k < 4; k++) begin : g_m2
    booth_multiplier #(.N(2)) u_m2 (.a(a[2*k+:2]), .b(b[2*k+:2]), .p(p2[4*k+:4]));
  end

  always_comb begin
    unique case (sel)
      PREC_2B: p = p2;
      PREC_4B: p = p4;
      default: p = p8;
    endcase
  end
endmodule : flex_booth_multiplier
