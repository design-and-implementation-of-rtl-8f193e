// tb_fp_mul_small: the multiplier built for a reduced format with the
// double precision exponent (11 bits, bias 1023) and a 4-bit fraction, as in
// the design's worked example. Such a 16-bit word, padded with 48 zero
// fraction bits, is exactly a binary64 number, and the product of two of
// them is exact in double precision. The expected result is therefore the
// native double product with its fraction truncated to 4 bits; a native
// infinity means overflow and a native subnormal or zero means underflow.
// The worked example 3.25 x 23 (fields 0 10000000000 1010 and
// 0 10000000011 0111) must give 0 10000000101 0010, i.e. 72, which is
// 74.75 truncated. Random normal operands cover the rest.
module tb_fp_mul_small;
  import fp_mul_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, ce;
  logic [15:0] fp_a, fp_b, fp_z;
  logic        done, overflow, underflow;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_norm = 0;

  fp_mul #(.EXP_W(11), .FRAC_W(4), .RND(RND_TRUNC)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .fp_a(fp_a), .fp_b(fp_b),
    .fp_z(fp_z), .done(done), .overflow(overflow), .underflow(underflow)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  task automatic run_op(input logic [15:0] a, input logic [15:0] b);
    logic [63:0] nat;
    logic [15:0] expect_z;
    bit eo, eu;
    @(negedge clk);
    fp_a = a;
    fp_b = b;
    ce   = 1'b1;
    @(posedge clk);
    #1;
    nat = $realtobits($bitstoreal({a, 48'h0}) * $bitstoreal({b, 48'h0}));
    eo = (nat[62:52] == 11'h7FF);
    eu = (nat[62:52] == 11'h0);
    if (eo)      expect_z = {nat[63], 11'h7FF, 4'h0};
    else if (eu) expect_z = {nat[63], 15'h0};
    else         expect_z = nat[63:48];
    check(done === 1'b1, "done");
    check(fp_z === expect_z && overflow === eo && underflow === eu,
          $sformatf("%b * %b = %b, expected %b", a, b, fp_z, expect_z));
    if (eo) n_ovf++; else if (eu) n_unf++; else n_norm++;
  endtask

  logic [15:0] x, y;

  initial begin
    rst_n = 1'b0;
    ce = 1'b0;
    fp_a = '0;
    fp_b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run_op({1'b0, 11'b10000000000, 4'b1010}, {1'b0, 11'b10000000011, 4'b0111});
    check(fp_z === {1'b0, 11'b10000000101, 4'b0010}, "worked example gives 0 10000000101 0010");
    for (int i = 0; i < 4000; i++) begin
      x = {1'($urandom), 11'(1 + $urandom % 2046), 4'($urandom)};
      y = {1'($urandom), 11'(1 + $urandom % 2046), 4'($urandom)};
      run_op(x, y);
    end
    $display("normal=%0d overflow=%0d underflow=%0d", n_norm, n_ovf, n_unf);
    check(n_norm > 0 && n_ovf > 0 && n_unf > 0, "all outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
