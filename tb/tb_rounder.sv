// tb_rounder: rounding stage for 52-bit fractions, in both modes. The
// truncating instance must pass the fraction and exponent unchanged. The
// round-to-nearest-even instance is checked against the rule worked out
// here: add one when round && (sticky || lsb), and on a carry out of the
// fraction give a zero fraction and an exponent one higher (renormalize).
// Round-up, ties to even and the renormalizing carry must all occur.
module tb_rounder;
  import fp_mul_pkg::*;
  int checks = 0, failures = 0;
  int n_up = 0, n_tie_even = 0, n_renorm = 0;

  logic [51:0]        f, ft, fn;
  logic               rb, st, rt, rn;
  logic signed [12:0] e, et, en;

  rounder #(.EXP_W(11), .FRAC_W(52), .RND(RND_TRUNC)) dut_t (
    .frac_in(f), .round_bit(rb), .sticky(st), .e_in(e), .frac_out(ft), .e_out(et), .renorm(rt)
  );
  rounder #(.EXP_W(11), .FRAC_W(52), .RND(RND_NEAREST_EVEN)) dut_n (
    .frac_in(f), .round_bit(rb), .sticky(st), .e_in(e), .frac_out(fn), .e_out(en), .renorm(rn)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [51:0] fi, input bit r, input bit s, input int ei);
    logic [52:0] sum;
    bit up;
    f = fi; rb = r; st = s; e = 13'(ei);
    #1;
    checks++;
    if (ft !== fi || int'(et) != ei || rt !== 1'b0) begin
      failures++;
      $display("FAIL trunc f=%h", fi);
    end
    up = r && (s || fi[0]);
    sum = {1'b0, fi} + 53'(up);
    checks++;
    if (fn !== sum[51:0] || int'(en) != ei + int'(sum[52]) || rn !== sum[52]) begin
      failures++;
      $display("FAIL rne f=%h r=%b s=%b: %h %0d %b", fi, r, s, fn, en, rn);
    end
    if (up) n_up++;
    if (r && !s && !fi[0]) n_tie_even++;
    if (sum[52]) n_renorm++;
  endtask

  initial begin
    try('1, 1'b1, 1'b0, 2046);      // tie, odd: rounds up and carries out
    try('1, 1'b1, 1'b1, 5);
    try(52'h2, 1'b1, 1'b0, 5);      // tie, even: stays
    try(52'h3, 1'b1, 1'b0, 5);      // tie, odd: up
    try(52'h3, 1'b0, 1'b1, 5);      // below half: stays
    for (int i = 0; i < 3000; i++)
      try({20'($urandom), $urandom}, 1'($urandom), 1'($urandom), int'($urandom % 2048));
    $display("up=%0d tie_even=%0d renorm=%0d", n_up, n_tie_even, n_renorm);
    checks++;
    if (n_up == 0 || n_tie_even == 0 || n_renorm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
