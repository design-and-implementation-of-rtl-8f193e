// tb_ripple_borrow_sub: the 12-bit ripple borrow subtractor used for the
// bias is checked on a grid and at random: d must equal x - y modulo 2^12
// and bout must be set exactly when y > x. A 3-bit instance is checked
// exhaustively.
module tb_ripple_borrow_sub;
  int checks = 0, failures = 0;

  logic [11:0] x, y, d;
  logic        bo;
  logic [2:0]  x3, y3, d3;
  logic        bo3;

  ripple_borrow_sub #(.W(12)) dut   (.x(x), .y(y), .d(d), .bout(bo));
  ripple_borrow_sub #(.W(3))  dut3  (.x(x3), .y(y3), .d(d3), .bout(bo3));

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
    for (int i = 0; i < 64; i++) begin
      {x3, y3} = 6'(i);
      #1;
      check(d3 == 3'(x3 - y3) && bo3 == (y3 > x3), $sformatf("3-bit %0d - %0d", x3, y3));
    end
    for (int i = 0; i < 4096; i += 53) begin
      for (int j = 0; j < 4096; j += 59) begin
        x = 12'(i);
        y = 12'(j);
        #1;
        check(d == 12'(i - j) && bo == (j > i), $sformatf("12-bit %0d - %0d", i, j));
      end
    end
    for (int i = 0; i < 2000; i++) begin
      x = 12'($urandom);
      y = (i % 2 == 0) ? 12'd1023 : 12'($urandom);
      #1;
      check(d == 12'(x - y) && bo == (y > x), $sformatf("12-bit %0d - %0d", x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
