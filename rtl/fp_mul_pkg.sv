// fp_mul_pkg: constants and types shared by the floating point multiplier.
// The default format is IEEE-754 binary64 (double precision): 1 sign bit,
// an 11-bit biased exponent (bias 1023) and a 52-bit fraction with a hidden
// leading one. All blocks take the exponent and fraction widths as
// parameters, so a smaller format (for example the 4-bit-fraction format of
// the worked example in the design notes) can be built from the same RTL.
// The rounding modes are this design's own naming: truncation is the mode
// the worked example applies; round-to-nearest-even is offered as an option.
package fp_mul_pkg;

  localparam int unsigned DP_EXP_W  = 11;
  localparam int unsigned DP_FRAC_W = 52;

  // Rounding applied to the normalized significand.
  typedef enum logic {
    RND_TRUNC        = 1'b0,  // drop the bits below the fraction (round toward zero)
    RND_NEAREST_EVEN = 1'b1   // IEEE round-to-nearest, ties to even
  } round_mode_e;

  // Field view of a binary64 word (bit 63 sign, 62..52 exponent, 51..0 fraction).
  typedef struct packed {
    logic        sign;
    logic [10:0] exp;
    logic [51:0] frac;
  } fp64_t;

  // Exponent bias of a format with an exp_w-bit exponent field.
  function automatic int unsigned bias_of(int unsigned exp_w);
    return (1 << (exp_w - 1)) - 1;
  endfunction

endpackage
