// tb_rca: ripple carry adder. The 11-bit exponent adder is checked
// exhaustively on a grid and at random against integer addition, a 4-bit
// instance exhaustively, and a 53-bit instance (the multiplier's final row)
// at random. {cout, s} must equal a + b.
module tb_rca;
  int checks = 0, failures = 0;

  logic [10:0] a11, b11, s11;
  logic        c11;
  logic [3:0]  a4, b4, s4;
  logic        c4;
  logic [52:0] a53, b53, s53;
  logic        c53;

  rca #(.W(11)) dut11 (.a(a11), .b(b11), .s(s11), .cout(c11));
  rca #(.W(4))  dut4  (.a(a4),  .b(b4),  .s(s4),  .cout(c4));
  rca #(.W(53)) dut53 (.a(a53), .b(b53), .s(s53), .cout(c53));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      check({c4, s4} == 5'(a4) + 5'(b4), $sformatf("4-bit %0d + %0d", a4, b4));
    end
    for (int i = 0; i < 2048; i += 37) begin
      for (int j = 0; j < 2048; j += 41) begin
        a11 = 11'(i);
        b11 = 11'(j);
        #1;
        check({c11, s11} == 12'(i + j), $sformatf("11-bit %0d + %0d", i, j));
      end
    end
    a11 = '1; b11 = '1; #1;
    check({c11, s11} == 12'd4094, "11-bit max");
    for (int i = 0; i < 2000; i++) begin
      a53 = {21'($urandom), $urandom};
      b53 = {21'($urandom), $urandom};
      #1;
      check({c53, s53} == 54'(a53) + 54'(b53), "53-bit random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
