// tb_exc_unit: exception unit for the double precision format. Each rule is
// driven directly: overflow at and above exponent 2047, underflow at and
// below 0, the normal range in between, subnormal and zero operands, and
// infinity and NaN operands. Expected words and flags are written out here.
module tb_exc_unit;
  int checks = 0, failures = 0;

  logic               s;
  logic [10:0]        ea, eb;
  logic [51:0]        fa, fb, fr;
  logic signed [12:0] er;
  logic [63:0]        z;
  logic               ovf, unf;

  exc_unit #(.EXP_W(11), .FRAC_W(52)) dut (
    .sign_z(s), .exp_a(ea), .frac_a(fa), .exp_b(eb), .frac_b(fb),
    .e_res(er), .frac_res(fr), .result(z), .overflow(ovf), .underflow(unf)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic sign, input logic [10:0] xa, input logic [51:0] ya,
                     input logic [10:0] xb, input logic [51:0] yb, input int e,
                     input logic [51:0] f, input logic [63:0] ez, input bit eo, input bit eu,
                     input string what);
    s = sign; ea = xa; fa = ya; eb = xb; fb = yb; er = 13'(e); fr = f;
    #1;
    checks++;
    if (z !== ez || ovf !== eo || unf !== eu) begin
      failures++;
      $display("FAIL %s: z=%h ovf=%b unf=%b, expected %h %b %b", what, z, ovf, unf, ez, eo, eu);
    end
  endtask

  localparam logic [51:0] F = 52'hA_BCDE_F012_3456;

  initial begin
    try(0, 11'd1000, F, 11'd1100, F, 1077, F, {1'b0, 11'd1077, F}, 0, 0, "normal");
    try(1, 11'd1, F, 11'd1, F, 1, F, {1'b1, 11'd1, F}, 0, 0, "smallest normal");
    try(1, 11'd2000, F, 11'd1100, F, 2046, F, {1'b1, 11'd2046, F}, 0, 0, "largest normal");
    try(0, 11'd2000, F, 11'd1100, F, 2047, F, {1'b0, 11'h7FF, 52'h0}, 1, 0, "overflow at 2047");
    try(1, 11'd2046, F, 11'd2046, F, 3070, F, {1'b1, 11'h7FF, 52'h0}, 1, 0, "overflow far");
    try(1, 11'd1, F, 11'd1, F, 0, F, {1'b1, 63'h0}, 0, 1, "underflow at 0");
    try(0, 11'd1, F, 11'd1, F, -1021, F, {1'b0, 63'h0}, 0, 1, "underflow far");
    try(1, 11'd0, F, 11'd1100, F, 77, F, {1'b1, 63'h0}, 0, 1, "subnormal a");
    try(0, 11'd1100, F, 11'd0, 52'h1, 77, F, {1'b0, 63'h0}, 0, 1, "subnormal b");
    try(1, 11'd0, 52'h0, 11'd1100, F, 77, F, {1'b1, 63'h0}, 0, 0, "zero a");
    try(0, 11'd1100, F, 11'd0, 52'h0, 77, F, {1'b0, 63'h0}, 0, 0, "zero b");
    try(1, 11'h7FF, 52'h0, 11'd1100, F, 2000, F, {1'b1, 11'h7FF, 52'h0}, 0, 0, "inf a");
    try(0, 11'd3, F, 11'h7FF, 52'h0, 5, F, {1'b0, 11'h7FF, 52'h0}, 0, 0, "inf b");
    try(0, 11'h7FF, 52'h0, 11'd0, 52'h0, 5, F, 64'h7FF8_0000_0000_0000, 0, 0, "inf * 0");
    try(1, 11'd0, 52'h5, 11'h7FF, 52'h0, 5, F, 64'h7FF8_0000_0000_0000, 0, 0, "subnormal * inf");
    try(1, 11'h7FF, 52'h1, 11'd1000, F, 5, F, 64'h7FF8_0000_0000_0000, 0, 0, "nan a");
    try(0, 11'd0, 52'h0, 11'h7FF, F, 5, F, 64'h7FF8_0000_0000_0000, 0, 0, "zero * nan");
    for (int i = 0; i < 2000; i++) begin : rnd
      int e;
      logic [51:0] f;
      e = int'($urandom % 4000) - 1100;
      f = {20'($urandom), $urandom};
      if (e >= 2047)
        try(1'(i), 11'd1500, F, 11'd1500, F, e, f, {1'(i), 11'h7FF, 52'h0}, 1, 0, "random");
      else if (e <= 0)
        try(1'(i), 11'd10, F, 11'd10, F, e, f, {1'(i), 63'h0}, 0, 1, "random");
      else
        try(1'(i), 11'd1000, F, 11'd1000, F, e, f, {1'(i), 11'(e), f}, 0, 0, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
