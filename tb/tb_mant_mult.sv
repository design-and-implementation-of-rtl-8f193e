// tb_mant_mult: significand array multiplier. The 53 x 53 instance (double
// precision) is checked at random, with significands carrying the hidden
// one and with arbitrary bit patterns, and at the extremes; a 5 x 5
// instance is checked exhaustively. The 2N-bit product must equal a * b
// computed by the simulator's wide integer multiplication.
module tb_mant_mult;
  int checks = 0, failures = 0;

  logic [52:0]  a, b;
  logic [105:0] ip;
  logic [4:0]   a5, b5;
  logic [9:0]   ip5;

  mant_mult #(.N(53)) dut   (.a(a), .b(b), .ip(ip));
  mant_mult #(.N(5))  dut5  (.a(a5), .b(b5), .ip(ip5));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [52:0] x, input logic [52:0] y);
    logic [105:0] expect_p;
    a = x;
    b = y;
    #1;
    expect_p = {53'h0, x} * {53'h0, y};
    checks++;
    if (ip !== expect_p) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, ip, expect_p);
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      {a5, b5} = 10'(i);
      #1;
      checks++;
      if (ip5 !== 10'(a5) * 10'(b5)) begin
        failures++;
        $display("FAIL 5-bit %0d * %0d = %0d", a5, b5, ip5);
      end
    end
    try('1, '1);
    try({1'b1, 52'h0}, {1'b1, 52'h0});
    try({1'b1, 52'h0}, '1);
    try('0, '1);
    try(53'h1, '1);
    for (int i = 0; i < 3000; i++) begin
      if (i % 2 == 0) try({1'b1, 20'($urandom), $urandom}, {1'b1, 20'($urandom), $urandom});
      else            try({21'($urandom), $urandom}, {21'($urandom), $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
