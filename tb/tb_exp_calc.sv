// tb_exp_calc: exponent calculator for 11-bit exponents. e_int must be the
// signed value EA + EB - 1023, checked on a grid over the whole range, at
// the extremes and at random.
module tb_exp_calc;
  int checks = 0, failures = 0;

  logic [10:0]        ea, eb;
  logic signed [12:0] e_int;

  exp_calc #(.EXP_W(11)) dut (.exp_a(ea), .exp_b(eb), .e_int(e_int));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int i, input int j);
    ea = 11'(i);
    eb = 11'(j);
    #1;
    checks++;
    if (int'(e_int) != i + j - 1023) begin
      failures++;
      $display("FAIL %0d + %0d - 1023 = %0d", i, j, e_int);
    end
  endtask

  initial begin
    for (int i = 0; i < 2048; i += 31)
      for (int j = 0; j < 2048; j += 29)
        try(i, j);
    try(0, 0);
    try(2047, 2047);
    try(1023, 0);
    try(1, 1022);
    try(1024, 1027);
    for (int k = 0; k < 3000; k++) try(int'($urandom % 2048), int'($urandom % 2048));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
