// exc_unit: exception detection and result assembly.
// It classifies both operands and checks the exponent of the rounded,
// normalized result:
//   * a biased result exponent of 2^EXP_W - 1 or more is an overflow: the
//     overflow flag is raised and the result is infinity with the product's
//     sign;
//   * a biased result exponent of 0 or less is an underflow (the normalizer
//     has already added the one that can compensate an exponent of 0): the
//     underflow flag is raised and the result is zero with the product's
//     sign;
//   * a subnormal operand is treated as zero: the result is a signed zero
//     and the underflow flag is raised; a zero operand gives a signed zero
//     with no flag;
//   * infinity and NaN operands (exponent field all ones) are this design's
//     own addition to the overflow/underflow rules: a NaN operand, or an
//     infinity times a zero or subnormal, gives the quiet NaN
//     0 11..1 10..0; otherwise an infinite operand gives a signed infinity.
//     No flag is raised for them.
// Otherwise the result is {sign, exponent, fraction}.
// Purely combinational.
module exc_unit #(
  parameter int unsigned EXP_W  = 11,
  parameter int unsigned FRAC_W = 52
) (
  input  logic                    sign_z,
  input  logic [EXP_W-1:0]        exp_a,
  input  logic [FRAC_W-1:0]       frac_a,
  input  logic [EXP_W-1:0]        exp_b,
  input  logic [FRAC_W-1:0]       frac_b,
  input  logic signed [EXP_W+1:0] e_res,     // biased exponent after normalization and rounding
  input  logic [FRAC_W-1:0]       frac_res,
  output logic [EXP_W+FRAC_W:0]   result,
  output logic                    overflow,
  output logic                    underflow
);
  localparam logic [EXP_W-1:0]        EMAX   = '1;
  localparam logic signed [EXP_W+1:0] EMAX_S = (EXP_W+2)'((1 << EXP_W) - 1);

  logic a_zero, a_sub, a_inf, a_nan;
  logic b_zero, b_sub, b_inf, b_nan;

  always_comb begin
    a_zero = (exp_a == '0)  && (frac_a == '0);
    a_sub  = (exp_a == '0)  && (frac_a != '0);
    a_inf  = (exp_a == EMAX) && (frac_a == '0);
    a_nan  = (exp_a == EMAX) && (frac_a != '0);
    b_zero = (exp_b == '0)  && (frac_b == '0);
    b_sub  = (exp_b == '0)  && (frac_b != '0);
    b_inf  = (exp_b == EMAX) && (frac_b == '0);
    b_nan  = (exp_b == EMAX) && (frac_b != '0);

    overflow  = 1'b0;
    underflow = 1'b0;
    if (a_nan || b_nan || (a_inf && (b_zero || b_sub)) || (b_inf && (a_zero || a_sub))) begin
      result = {1'b0, EMAX, 1'b1, {(FRAC_W-1){1'b0}}};
    end else if (a_inf || b_inf) begin
      result = {sign_z, EMAX, {FRAC_W{1'b0}}};
    end else if (a_zero || a_sub || b_zero || b_sub) begin
      result    = {sign_z, {(EXP_W+FRAC_W){1'b0}}};
      underflow = a_sub || b_sub;
    end else if (e_res >= EMAX_S) begin
      result   = {sign_z, EMAX, {FRAC_W{1'b0}}};
      overflow = 1'b1;
    end else if (e_res <= 0) begin
      result    = {sign_z, {(EXP_W+FRAC_W){1'b0}}};
      underflow = 1'b1;
    end else begin
      result = {sign_z, e_res[EXP_W-1:0], frac_res};
    end
  end
endmodule
