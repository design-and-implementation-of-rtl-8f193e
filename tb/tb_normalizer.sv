// tb_normalizer: normalization unit for the double precision format.
// Random 106-bit intermediate products in [1, 4) (top or second bit set)
// are applied with random intermediate exponents. The expected fraction,
// round bit, sticky bit, exponent and shift indication are worked out from
// the value: a product >= 2 is read one place further left and its
// exponent is one higher. Both cases, and an intermediate exponent of 0
// turning into 1, must occur.
module tb_normalizer;
  int checks = 0, failures = 0;
  int n_shift = 0, n_plain = 0, n_zero_exp = 0;

  logic [105:0]       ip;
  logic signed [12:0] e_int, e_norm;
  logic [51:0]        frac;
  logic               rb, st, shifted;

  normalizer #(.EXP_W(11), .FRAC_W(52)) dut (
    .ip(ip), .e_int(e_int), .frac(frac), .round_bit(rb), .sticky(st),
    .e_norm(e_norm), .shifted(shifted)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [105:0] p, input int e);
    logic [51:0] f;
    bit r, s, sh;
    int en;
    ip = p;
    e_int = 13'(e);
    #1;
    sh = p[105];
    if (sh) begin
      f = p[104:53]; r = p[52]; s = |p[51:0]; en = e + 1;
    end else begin
      f = p[103:52]; r = p[51]; s = |p[50:0]; en = e;
    end
    checks++;
    if (frac !== f || rb !== r || st !== s || int'(e_norm) != en || shifted !== sh) begin
      failures++;
      $display("FAIL ip=%h e=%0d: frac=%h rb=%b st=%b e=%0d sh=%b", p, e, frac, rb, st, e_norm, shifted);
    end
    if (sh) n_shift++; else n_plain++;
    if (e == 0 && en == 1) n_zero_exp++;
  endtask

  logic [105:0] p;

  initial begin
    try({2'b10, 104'h0}, 0);
    try({2'b01, 104'h0}, 5);
    try({2'b01, 52'h0, 1'b1, 51'h0}, 7);   // round bit only
    try({2'b01, 53'h0, 51'h1}, 7);         // sticky only
    try({2'b11, 104'hFF}, -3);
    for (int i = 0; i < 3000; i++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      if (i % 2 == 0) p[105:104] = 2'b01;
      else            p[105] = 1'b1;
      try(p, int'($urandom % 4096) - 1023);
    end
    $display("shift=%0d plain=%0d exp0->1=%0d", n_shift, n_plain, n_zero_exp);
    checks++;
    if (n_shift == 0 || n_plain == 0 || n_zero_exp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
