// booth_multiplier: signed N x N radix-4 Modified Booth multiplier.
//
// The multiplier operand b is padded with a zero below its LSB and cut into
// N/2 overlapping 3-bit groups. Each group is recoded into a digit in
// {-2,-1,0,+1,+2}, which selects 0, a or 2a (optionally inverted) as a partial
// product; a negative digit adds its "+1" of the two's complement as the carry
// into the adder that accumulates that partial product. The N/2 partial
// products are summed by a chain of ripple carry adders. The radix-4 recoding
// (half as many partial products as bits, signed operands natively) is the
// document's choice; using a linear chain of ripple carry adders instead of a
// hand-placed half/full-adder array is this design's simplification.
//
// Interface: a, b two's complement, p = a * b (2N bits). Combinational; N must
// be even and at least 2.
module booth_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);
  localparam int unsigned G = N / 2;        // number of partial products
  localparam int unsigned W = 2 * N;        // product width

  logic [W-1:0] pp  [G];                    // partial products, shifted, before +1
  logic         neg [G];                    // negative digit: add one at bit 2j
  logic [W-1:0] acc [G+1];

  always_comb begin
    logic [W-1:0] a_ext;
    logic [2:0]   grp;
    logic [W-1:0] mag;
    a_ext = W'(a);                          // sign extension of a
    for (int j = 0; j < G; j++) begin
      grp = (j == 0) ? {b[1], b[0], 1'b0} : {b[2*j+1], b[2*j], b[2*j-1]};
      unique case (grp)
        3'b001, 3'b010, 3'b101, 3'b110: mag = a_ext;        // |digit| = 1
        3'b011, 3'b100:                 mag = a_ext << 1;   // |digit| = 2
        default:                        mag = '0;           // digit 0
      endcase
      neg[j] = grp[2] & ~(grp[1] & grp[0]);                 // 100, 101, 110
      pp[j]  = (neg[j] ? ~mag : mag) << (2 * j);
      // The +1 of the inversion belongs at bit 2j; bits below 2j of the
      // inverted, shifted value are zero, so they are set to one here and the
      // carry-in of 1 then ripples up to bit 2j.
      if (neg[j] && j > 0) pp[j] = pp[j] | W'((1 << (2 * j)) - 1);
    end
  end

  assign acc[0] = '0;
  for (genvar j = 0; j < G; j++) begin : g_sum
    logic co_unused;
    ripple_carry_adder #(.WIDTH(W)) u_rca (
      .a(acc[j]), .b(pp[j]), .ci(neg[j]), .s(acc[j+1]), .co(co_unused)
    );
  end

  assign p = signed'(acc[G]);
endmodule : booth_multiplier
