// full_subtractor: one-bit full subtractor, the cell of the ripple borrow
// subtractor. It forms d = x - y - bi: d = x ^ y ^ bi, and a borrow bo is
// passed on when x is 0 and y is 1, or when x equals y and a borrow came in.
// Purely combinational.
module full_subtractor (
  input  logic x,
  input  logic y,
  input  logic bi,
  output logic d,
  output logic bo
);
  assign d  = x ^ y ^ bi;
  assign bo = (~x & y) | (~(x ^ y) & bi);
endmodule
