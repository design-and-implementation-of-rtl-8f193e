// tb_fp_mul: end-to-end test of the binary64 multiplier at its default
// parameters (11-bit exponent, 52-bit fraction, truncation).
// Operands are applied on the falling clock edge with ce high; after the
// next rising edge the testbench checks that done is 1 exactly one cycle
// after ce, and compares fp_z and the two flags with the integer reference
// model of fp_ref_pkg. Normal results are also checked against the
// simulator's own double multiplication: truncation must give either the
// correctly rounded value or the value one unit in the last place nearer
// zero. The run covers the 16.33 x 27.44 example, directed corner cases and
// random operands, and counts how often each mechanism occurred: product
// normalization shift, no shift, exponent overflow, exponent underflow, an
// intermediate exponent of 0 rescued by normalization, subnormal operands
// flushed to zero, zero, infinity and NaN operands, and ce held low (the
// outputs must hold and done must stay 0). A mechanism never seen counts as
// a failure.
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        ce;
  logic [63:0] fp_a, fp_b, fp_z;
  logic        done, overflow, underflow;

  int checks = 0;
  int failures = 0;
  int n_shift = 0, n_noshift = 0, n_ovf = 0, n_unf = 0, n_comp = 0;
  int n_sub = 0, n_zero = 0, n_inf = 0, n_nan = 0, n_hold = 0;

  fp_mul dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .fp_a(fp_a), .fp_b(fp_b),
    .fp_z(fp_z), .done(done), .overflow(overflow), .underflow(underflow)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One multiplication through the ports, checked against the reference.
  task automatic run_op(input logic [63:0] a, input logic [63:0] b);
    ref_t r;
    real  ra, rb, rp;
    logic [63:0] rz;
    @(negedge clk);
    fp_a = a;
    fp_b = b;
    ce   = 1'b1;
    @(posedge clk);
    #1;
    r = ref_mul(a, b, 1'b0);
    check(done === 1'b1, "done one cycle after ce");
    check(fp_z === r.z, $sformatf("%h * %h = %h, expected %h", a, b, fp_z, r.z));
    check(overflow === r.ovf && underflow === r.unf,
          $sformatf("%h * %h flags ovf=%0b unf=%0b, expected %0b %0b", a, b, overflow, underflow, r.ovf, r.unf));
    if (!r.special && !r.ovf && !r.unf) begin
      ra = $bitstoreal(a);
      rb = $bitstoreal(b);
      rp = ra * rb;
      rz = $realtobits(rp);
      check(fp_z == rz || fp_z + 64'd1 == rz,
            $sformatf("%h * %h = %h, native product %h", a, b, fp_z, rz));
      if (r.shifted) n_shift++; else n_noshift++;
    end
    if (r.ovf) n_ovf++;
    if (r.unf && !r.special) n_unf++;
    if (r.comp) n_comp++;
    if (r.special) begin
      if ((a[62:52] == 0 && a[51:0] != 0) || (b[62:52] == 0 && b[51:0] != 0)) n_sub++;
      else if (a[62:0] == 0 || b[62:0] == 0) n_zero++;
      if (fp_z[62:52] == 11'h7FF && fp_z[51:0] == 0) n_inf++;
      if (fp_z[62:52] == 11'h7FF && fp_z[51:0] != 0) n_nan++;
    end
    @(negedge clk);
    ce = 1'b0;
  endtask

  // ce low: new operands at the inputs must not reach the outputs.
  task automatic hold_check();
    logic [63:0] z0;
    z0 = fp_z;
    @(negedge clk);
    ce   = 1'b0;
    fp_a = 64'h4000_0000_0000_0000;
    fp_b = 64'h4008_0000_0000_0000;
    repeat (3) begin
      @(posedge clk);
      #1;
      check(done === 1'b0, "done low while ce low");
      check(fp_z === z0, "fp_z holds while ce low");
    end
    n_hold++;
  endtask

  logic [63:0] ra_v, rb_v;

  initial begin
    rst_n = 1'b0;
    ce    = 1'b0;
    fp_a  = '0;
    fp_b  = '0;
    repeat (2) @(posedge clk);
    #1;
    check(done === 1'b0 && fp_z === 64'h0, "reset clears outputs");
    @(negedge clk);
    rst_n = 1'b1;

    // The design's example: 16.33 x 27.44 = 448.0952.
    run_op($realtobits(16.33), $realtobits(27.44));
    check(($bitstoreal(fp_z) > 448.0951) && ($bitstoreal(fp_z) < 448.0953), "16.33 * 27.44 ~ 448.0952");
    hold_check();

    // Directed cases.
    run_op($realtobits(1.5), $realtobits(1.5));        // no shift
    run_op($realtobits(1.5), $realtobits(-1.5));       // 2.25: shift, negative
    run_op($realtobits(-2.0), $realtobits(-0.75));
    run_op(64'h7FEF_FFFF_FFFF_FFFF, $realtobits(2.0)); // overflow
    run_op(64'h7FE0_0000_0000_0000, 64'h7FE0_0000_0000_0000);
    run_op(64'h0010_0000_0000_0000, $realtobits(0.5)); // underflow
    run_op(64'h0010_0000_0000_0000, 64'h0010_0000_0000_0000);
    // EA + EB - bias = 0, product >= 2: exponent 0 compensated to 1.
    run_op({1'b0, 11'd1, 52'hC_0000_0000_0000}, {1'b0, 11'd1022, 52'h8_0000_0000_0000});
    // EA + EB - bias = 0, product < 2: stays an underflow.
    run_op({1'b0, 11'd1, 52'h0}, {1'b1, 11'd1022, 52'h0});
    run_op(64'h0000_0000_0000_0001, $realtobits(3.0)); // subnormal operand
    run_op($realtobits(-7.0), 64'h800F_FFFF_FFFF_FFFF);
    run_op(64'h0, $realtobits(-3.0));                  // zero
    run_op(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    run_op(64'h7FF0_0000_0000_0000, $realtobits(-3.0)); // infinity
    run_op(64'h7FF0_0000_0000_0000, 64'h0);             // inf * 0 -> NaN
    run_op(64'h7FF4_0000_0000_0001, $realtobits(1.0));  // NaN
    run_op(64'h3FFF_FFFF_FFFF_FFFF, 64'h3FFF_FFFF_FFFF_FFFF);
    hold_check();

    // Random operands over the whole exponent range and near the limits.
    for (int i = 0; i < 3000; i++) begin
      case (i % 4)
        0: begin ra_v = rand_normal(1, 2046); rb_v = rand_normal(1, 2046); end
        1: begin ra_v = rand_normal(900, 1150); rb_v = rand_normal(900, 1150); end
        2: begin ra_v = rand_normal(1, 600); rb_v = rand_normal(300, 1100); end
        default: begin ra_v = rand_normal(1500, 2046); rb_v = rand_normal(800, 1100); end
      endcase
      run_op(ra_v, rb_v);
    end

    $display("mechanisms: shift=%0d noshift=%0d overflow=%0d underflow=%0d exp0_compensated=%0d subnormal=%0d zero=%0d inf=%0d nan=%0d hold=%0d",
             n_shift, n_noshift, n_ovf, n_unf, n_comp, n_sub, n_zero, n_inf, n_nan, n_hold);
    check(n_shift > 0, "normalization shift seen");
    check(n_noshift > 0, "no-shift product seen");
    check(n_ovf > 0, "overflow seen");
    check(n_unf > 0, "underflow seen");
    check(n_comp > 0, "exponent 0 compensated seen");
    check(n_sub > 0, "subnormal operand seen");
    check(n_zero > 0, "zero operand seen");
    check(n_inf > 0, "infinity result seen");
    check(n_nan > 0, "NaN result seen");
    check(n_hold > 0, "ce hold seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
