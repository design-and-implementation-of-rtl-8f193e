// ripple_borrow_sub: W-bit ripple borrow subtractor, a chain of full
// subtractors in which the borrow out of each bit is the borrow into the
// next. It forms d = x - y modulo 2^W; bout is set when y > x (the
// difference is negative, so d read as two's complement is then x - y
// whenever the true difference fits in W signed bits).
// The exponent calculator uses it to subtract the bias. Purely combinational.
module ripple_borrow_sub #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] d,
  output logic         bout
);
  logic [W:0] b;  // b[i] is the borrow into bit i
  assign b[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_fs
    full_subtractor u_fs (.x(x[i]), .y(y[i]), .bi(b[i]), .d(d[i]), .bo(b[i+1]));
  end

  assign bout = b[W];
endmodule
