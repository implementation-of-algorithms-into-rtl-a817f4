// comparator: equality comparator with enable, as used by the FOR and
// WHILE modules. Each bit pair goes through an XNOR (1 when the bits are
// equal) and the results are ANDed with the enable S, so C = S & (X == Y).
// ZERO is the companion test X == 0, a NOR of the bits of X gated by S.
// Combinational.
module comparator #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         s,
  output logic         c,
  output logic         zero
);
  logic [W-1:0] eq_bits;
  assign eq_bits = ~(x ^ y);
  assign c       = s & (&eq_bits);
  assign zero    = s & ~(|x);
endmodule
