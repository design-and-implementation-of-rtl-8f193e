// normalizer: normalization unit. The intermediate product of two
// significands in [1, 2) lies in [1, 4), so its leading one is either the
// top bit ip[2N-1] or the bit below it. A row of 2:1 multiplexers selects
// either ip unchanged (top bit set: the point moves one place left and the
// exponent is incremented) or ip shifted left by one (top bit clear: the
// exponent stays). The hidden one is then dropped and the next FRAC_W bits
// form the fraction; the bit below them is the round bit and the OR of all
// lower bits the sticky bit, for the rounder.
// The increment is what lets an intermediate exponent of 0 become a
// normal exponent of 1.
// Inputs whose significand lacks the hidden one (zero, subnormal) give a
// meaningless output here; the exception unit overrides it.
// The multiplexer shifter and the exponent increment follow the design;
// the round and sticky outputs are this implementation's addition.
// Purely combinational.
module normalizer #(
  parameter int unsigned EXP_W  = 11,
  parameter int unsigned FRAC_W = 52
) (
  input  logic [2*FRAC_W+1:0]     ip,       // intermediate product, 2*(FRAC_W+1) bits
  input  logic signed [EXP_W+1:0] e_int,    // EA + EB - bias
  output logic [FRAC_W-1:0]       frac,     // fraction after the hidden one
  output logic                    round_bit,
  output logic                    sticky,
  output logic signed [EXP_W+1:0] e_norm,
  output logic                    shifted   // 1 when the product was >= 2
);
  localparam int unsigned PW = 2 * FRAC_W + 2;

  logic [PW-1:0] aligned;  // leading one at bit PW-1

  assign shifted = ip[PW-1];

  // A row of PW 2:1 multiplexers: bit k takes ip[k] or ip[k-1].
  assign aligned = shifted ? ip : {ip[PW-2:0], 1'b0};

  // aligned[PW-1] is the hidden one and is not stored.
  assign frac      = aligned[PW-2 -: FRAC_W];
  assign round_bit = aligned[PW-2-FRAC_W];
  assign sticky    = |aligned[PW-3-FRAC_W:0];
  assign e_norm    = e_int + (EXP_W+2)'(shifted);
endmodule
