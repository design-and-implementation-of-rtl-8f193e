// tb_sign_calc: exhaustive test of the sign calculator: the product is
// negative exactly when the operand signs differ.
module tb_sign_calc;
  logic sa, sb, sz;
  int checks = 0, failures = 0;

  sign_calc dut (.sign_a(sa), .sign_b(sb), .sign_z(sz));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {sa, sb} = 2'(i);
      #1;
      checks++;
      if (sz !== (sa != sb)) begin
        failures++;
        $display("FAIL %b %b -> %b", sa, sb, sz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
