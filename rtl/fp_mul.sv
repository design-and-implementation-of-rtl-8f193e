// fp_mul: IEEE-754 double precision floating point multiplier (top level).
//
// Three independent units work on the fields of the two operands: the sign
// calculator (XOR of the signs), the exponent calculator (ripple carry
// addition of the biased exponents, then a ripple borrow subtraction of the
// bias) and the significand multiplier (an unsigned array multiplier of the
// two 53-bit significands, hidden one included, giving a 106-bit
// intermediate product). The normalization stage then aligns the product
// (normalizer), rounds it (rounder) and checks for overflow, underflow and
// special operands (exc_unit).
//
// Interface: fp_a, fp_b and fp_z are {sign, exponent, fraction} words,
// 64 bits by default (bit 63 sign, 62..52 exponent, 51..0 fraction).
// The datapath between the operand ports and the result register is
// combinational. On a rising clk edge with ce high, the result of the
// operands present at the inputs is stored in fp_z, together with the
// overflow and underflow flags, and done is 1 for the following cycle:
// one result per clock, one cycle of latency. With ce low the outputs hold
// and done is 0. rst_n is an asynchronous active-low reset that clears the
// outputs.
// The port names fp_a, fp_b, fp_z, ce, clk and done follow the design's
// schematic symbol; rst_n and the two flags are this design's additions
// (the flags carry the overflow and underflow signals the design names).
// Rounding is truncation by default (RND); round-to-nearest-even can be
// chosen with the RND parameter. EXP_W and FRAC_W set the format.
module fp_mul
  import fp_mul_pkg::*;
#(
  parameter int unsigned EXP_W  = DP_EXP_W,
  parameter int unsigned FRAC_W = DP_FRAC_W,
  parameter round_mode_e RND    = RND_TRUNC
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic [EXP_W+FRAC_W:0] fp_a,
  input  logic [EXP_W+FRAC_W:0] fp_b,
  output logic [EXP_W+FRAC_W:0] fp_z,
  output logic                  done,
  output logic                  overflow,
  output logic                  underflow
);
  localparam int unsigned MW = FRAC_W + 1;  // significand width with the hidden one

  // Operand fields.
  logic              sign_a, sign_b;
  logic [EXP_W-1:0]  exp_a, exp_b;
  logic [FRAC_W-1:0] frac_a, frac_b;
  assign {sign_a, exp_a, frac_a} = fp_a;
  assign {sign_b, exp_b, frac_b} = fp_b;

  // Sign calculator.
  logic sign_z;
  sign_calc u_sign (.sign_a(sign_a), .sign_b(sign_b), .sign_z(sign_z));

  // Exponent calculator.
  logic signed [EXP_W+1:0] e_int;
  exp_calc #(.EXP_W(EXP_W)) u_exp (.exp_a(exp_a), .exp_b(exp_b), .e_int(e_int));

  // Significand multiplier: hidden one restored in front of each fraction.
  logic [2*MW-1:0] ip;
  mant_mult #(.N(MW)) u_mult (.a({1'b1, frac_a}), .b({1'b1, frac_b}), .ip(ip));

  // Normalization.
  logic [FRAC_W-1:0]       frac_n;
  logic                    round_bit, sticky;
  logic signed [EXP_W+1:0] e_norm;
  normalizer #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_norm (
    .ip(ip), .e_int(e_int), .frac(frac_n), .round_bit(round_bit),
    .sticky(sticky), .e_norm(e_norm), .shifted()
  );

  // Rounding.
  logic [FRAC_W-1:0]       frac_r;
  logic signed [EXP_W+1:0] e_rnd;
  rounder #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .RND(RND)) u_rnd (
    .frac_in(frac_n), .round_bit(round_bit), .sticky(sticky), .e_in(e_norm),
    .frac_out(frac_r), .e_out(e_rnd), .renorm()
  );

  // Exceptions and result assembly.
  logic [EXP_W+FRAC_W:0] result;
  logic                  ovf, unf;
  exc_unit #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_exc (
    .sign_z(sign_z), .exp_a(exp_a), .frac_a(frac_a), .exp_b(exp_b), .frac_b(frac_b),
    .e_res(e_rnd), .frac_res(frac_r), .result(result), .overflow(ovf), .underflow(unf)
  );

  // Output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fp_z      <= '0;
      done      <= 1'b0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      done <= ce;
      if (ce) begin
        fp_z      <= result;
        overflow  <= ovf;
        underflow <= unf;
      end
    end
  end
endmodule
