// exp_calc: exponent calculator. It adds the two biased exponents with an
// EXP_W-bit ripple carry adder and then removes one bias with a ripple
// borrow subtractor, giving the intermediate exponent EA + EB - bias.
// Both biased exponents already carry the bias, so their sum carries it
// twice; subtracting it once leaves the biased exponent of the product
// before normalization.
// The adder's carry out is kept as a 12th bit so an overflow of the
// addition can still be compensated by the subtraction. The subtractor
// works on these EXP_W+1 bits and its borrow out becomes the sign bit, so
// e_int is an exact EXP_W+2-bit two's complement number in the range -bias .. 2*(2^EXP_W - 1) - bias; a negative or zero e_int is an
// underflow that the normalizer or the exception unit deals with.
// The ripple carry adder and the ripple borrow subtraction of the bias
// follow the design; the 13-bit signed output is this implementation's
// choice. Purely combinational.
module exp_calc #(
  parameter int unsigned EXP_W = 11
) (
  input  logic [EXP_W-1:0]        exp_a,
  input  logic [EXP_W-1:0]        exp_b,
  output logic signed [EXP_W+1:0] e_int
);
  localparam int unsigned XW = EXP_W + 1;
  localparam logic [XW-1:0] BIAS = XW'((1 << (EXP_W - 1)) - 1);

  logic [EXP_W-1:0] sum;
  logic             carry;
  logic [XW-1:0]    diff;
  logic             borrow;

  rca #(.W(EXP_W)) u_add (.a(exp_a), .b(exp_b), .s(sum), .cout(carry));

  ripple_borrow_sub #(.W(XW)) u_sub (
    .x   ({carry, sum}),
    .y   (BIAS),
    .d   (diff),
    .bout(borrow)
  );

  // A borrow out of the top bit means the sum was below the bias: the
  // result is negative, and {borrow, diff} is its two's complement.
  assign e_int = signed'({borrow, diff});
endmodule
