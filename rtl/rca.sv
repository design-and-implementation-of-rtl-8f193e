// rca: W-bit ripple carry adder. Bit 0 is a half adder and every higher bit
// is a full adder taking the carry of the bit below, so the carry ripples
// from the least to the most significant bit (the chain drawn for the
// exponent adder). There is no carry input; the carry out of the top bit is
// brought out as cout, so {cout, s} = a + b exactly.
// Purely combinational; the delay grows linearly with W.
// It is used for the exponent addition (W = exponent width) and for the
// final carry-propagate row of the significand array multiplier.
module rca #(
  parameter int unsigned W = 11
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] c;  // c[i] is the carry out of bit i

  half_adder u_ha (.a(a[0]), .b(b[0]), .s(s[0]), .co(c[0]));

  for (genvar i = 1; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i-1]), .s(s[i]), .co(c[i]));
  end

  assign cout = c[W-1];
endmodule
