// subtractor_bit: one bit slice of a ripple subtractor, R = X - Y - BI.
// R is the difference bit and BO the borrow to the next higher slice:
//   R  = X xor Y xor BI
//   BO = Y&BI | ~X&Y | ~X&BI
// The borrow equation is the document's. For R the document's state table
// and sum-of-products leave out the case X=0, Y=0, BI=1; this slice gives
// R=1 there, which is what 0-0-1 needs and what the decremental register
// built from it relies on.
module subtractor_bit (
  input  logic x,
  input  logic y,
  input  logic bi,
  output logic r,
  output logic bo
);
  assign r  = (~bi & ((~x & y) | (x & ~y))) | (bi & ~(x ^ y));
  assign bo = (y & bi) | (~x & y) | (~x & bi);
endmodule
