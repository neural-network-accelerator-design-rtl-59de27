// full_adder: one-bit full adder, the cell the ripple carry adder is built
// from. sum = a ^ b ^ ci; carry = a & b, or ci when exactly one of a, b is 1.
// Ripple carry adders inside the multipliers are the document's; this cell's
// logic equations are the textbook ones. Ports a, b, ci in; s, co out.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule : full_adder
