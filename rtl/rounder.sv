// rounder: rounds the normalized significand to FRAC_W fraction bits.
// RND = RND_TRUNC drops the round and sticky bits (truncation, the mode used
// by the design's worked example), so the fraction and exponent pass
// unchanged. RND = RND_NEAREST_EVEN adds one unit in the last place when
// the discarded part is above one half, or exactly one half with an odd
// fraction. If that increment carries out of the fraction (1.11..1 + ulp =
// 10.00..0) the significand is no longer normalized: the fraction becomes
// zero and the exponent is incremented, which is the "still normalized?"
// loop of the multiplication flow done in one step, since a second rounding
// can never be needed.
// Purely combinational.
module rounder
  import fp_mul_pkg::*;
#(
  parameter int unsigned EXP_W  = 11,
  parameter int unsigned FRAC_W = 52,
  parameter round_mode_e RND    = RND_TRUNC
) (
  input  logic [FRAC_W-1:0]       frac_in,
  input  logic                    round_bit,
  input  logic                    sticky,
  input  logic signed [EXP_W+1:0] e_in,
  output logic [FRAC_W-1:0]       frac_out,
  output logic signed [EXP_W+1:0] e_out,
  output logic                    renorm    // rounding carried out of the fraction
);
  logic          round_up;
  logic [FRAC_W:0] sum;

  always_comb begin
    round_up = (RND == RND_NEAREST_EVEN) && round_bit && (sticky || frac_in[0]);
    sum      = {1'b0, frac_in} + (FRAC_W+1)'(round_up);
    renorm   = sum[FRAC_W];
    // On a carry out the fraction bits of sum are already all zero.
    frac_out = sum[FRAC_W-1:0];
    e_out    = e_in + (EXP_W+2)'(renorm);
  end
endmodule
