// fp_ref_pkg: behavioural reference for the binary64 multiplier, used by the
// testbenches only. It follows the same rules as the RTL (subnormal operands
// flush to zero with the underflow flag, overflow to infinity, underflow to
// zero, truncation or round-to-nearest-even) but computes them with plain
// integer arithmetic on the whole 106-bit significand product, with no
// reference to the adder and multiplier structure of the RTL. It also
// reports which mechanism a case exercised so testbenches can count them.
package fp_ref_pkg;

  typedef struct {
    logic [63:0] z;
    bit          ovf;
    bit          unf;
    bit          shifted;    // significand product was >= 2
    bit          comp;       // intermediate exponent 0 made normal by normalization
    bit          rounded_up; // round-to-nearest added one ulp
    bit          renorm;     // rounding carried out of the fraction
    bit          special;    // an operand was zero, subnormal, infinite or NaN
  } ref_t;

  function automatic ref_t ref_mul(logic [63:0] a, logic [63:0] b, bit rne);
    ref_t r;
    logic        s;
    int          ea, eb, e;
    logic [51:0] fa, fb, frac;
    logic [105:0] p;
    bit a_zero, a_sub, a_inf, a_nan, b_zero, b_sub, b_inf, b_nan;
    bit rb, st;
    logic [52:0] sum;

    r = '{default: 0};
    s  = a[63] ^ b[63];
    ea = int'(a[62:52]);
    eb = int'(b[62:52]);
    fa = a[51:0];
    fb = b[51:0];
    a_zero = (ea == 0) && (fa == 0);
    a_sub  = (ea == 0) && (fa != 0);
    a_inf  = (ea == 2047) && (fa == 0);
    a_nan  = (ea == 2047) && (fa != 0);
    b_zero = (eb == 0) && (fb == 0);
    b_sub  = (eb == 0) && (fb != 0);
    b_inf  = (eb == 2047) && (fb == 0);
    b_nan  = (eb == 2047) && (fb != 0);

    if (a_nan || b_nan || (a_inf && (b_zero || b_sub)) || (b_inf && (a_zero || a_sub))) begin
      r.z = 64'h7FF8_0000_0000_0000;
      r.special = 1;
      return r;
    end
    if (a_inf || b_inf) begin
      r.z = {s, 11'h7FF, 52'h0};
      r.special = 1;
      return r;
    end
    if (a_zero || a_sub || b_zero || b_sub) begin
      r.z = {s, 63'h0};
      r.unf = a_sub || b_sub;
      r.special = 1;
      return r;
    end

    p = {53'h0, 1'b1, fa} * {53'h0, 1'b1, fb};
    e = ea + eb - 1023;
    if (p[105]) begin
      r.shifted = 1;
      r.comp = (e == 0);
      e = e + 1;
      frac = p[104:53];
      rb = p[52];
      st = |p[51:0];
    end else begin
      frac = p[103:52];
      rb = p[51];
      st = |p[50:0];
    end
    if (rne && rb && (st || frac[0])) begin
      r.rounded_up = 1;
      sum = {1'b0, frac} + 53'd1;
      frac = sum[51:0];
      if (sum[52]) begin
        r.renorm = 1;
        if (e == 0) r.comp = 1;
        e = e + 1;
      end
    end
    if (e >= 2047) begin
      r.z = {s, 11'h7FF, 52'h0};
      r.ovf = 1;
      r.comp = 0;
    end else if (e <= 0) begin
      r.z = {s, 63'h0};
      r.unf = 1;
      r.comp = 0;
    end else begin
      r.z = {s, 11'(e), frac};
    end
    return r;
  endfunction

  // A random normal binary64 number with its biased exponent in [lo, hi].
  function automatic logic [63:0] rand_normal(int lo, int hi);
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(lo + int'($urandom % 32'(hi - lo + 1)));
    v[51:0]  = {20'($urandom), $urandom};
    return v;
  endfunction

endpackage
