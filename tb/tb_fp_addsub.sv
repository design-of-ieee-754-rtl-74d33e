// tb_fp_addsub: compares the double-precision adder with the simulator's own
// IEEE double addition (real arithmetic, round to nearest even). Random
// operands are drawn with close exponents so that alignment, cancellation,
// carries and rounding all occur; directed cases cover zeros, NaN, Inf,
// Inf - Inf, overflow and a result below the normal range (expected flushed
// to zero with the underflow flag).
module tb_fp_addsub;
  import fpu_pkg::*;

  fp64_t a, b, y;
  fpu_flags_t flags;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fp_addsub dut (.a(a), .b(b), .y(y), .flags(flags));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected result from real arithmetic, with subnormals flushed.
  task automatic check(input fp64_t xa, input fp64_t xb);
    real ra, rb;
    logic [63:0] want;
    fpu_flags_t  wflags;
    a = xa; b = xb;
    @(posedge clk);
    ra = $bitstoreal(xa);
    rb = $bitstoreal(xb);
    want   = $realtobits(ra + rb);
    wflags = '0;
    if (fp_class(xa) == CLS_NAN || fp_class(xb) == CLS_NAN) begin
      want = QNAN;
      wflags.invalid = is_snan(xa) || is_snan(xb);
    end else if (fp_class(xa) == CLS_INF && fp_class(xb) == CLS_INF && xa.sign != xb.sign) begin
      want = QNAN;
      wflags.invalid = 1'b1;
    end else if (fp_class(xa) != CLS_INF && fp_class(xb) != CLS_INF) begin
      if (want[62:52] == 11'h7FF) wflags.overflow = 1'b1;
      if (want[62:52] == 11'h000 && want[51:0] != '0) begin
        want = {want[63], 63'd0};
        wflags.underflow = 1'b1;
      end
    end
    checks++;
    if (y !== want || flags !== wflags) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h got=%h/%b want=%h/%b", xa, xb, y, flags, want, wflags);
    end
  endtask

  function automatic fp64_t rnd_near(fp64_t ref_op, int spread);
    fp64_t r;
    int e;
    r.sign = 1'($urandom);
    r.mant = {20'($urandom), $urandom};
    e = int'(ref_op.exp) + int'($urandom_range(2*spread)) - spread;
    if (e < 1) e = 1;
    if (e > 2046) e = 2046;
    r.exp = 11'(e);
    return r;
  endfunction

  initial begin
    fp64_t x, z;
    // directed
    check(64'h3FF0000000000000, 64'h3FF0000000000000);    // 1 + 1
    check(64'h3FF0000000000000, 64'hBFF0000000000000);    // 1 - 1 = +0
    check(64'h0000000000000000, 64'h8000000000000000);    // +0 + -0
    check(64'h8000000000000000, 64'h8000000000000000);    // -0 + -0
    check(64'h4008000000000000, 64'h0000000000000000);    // 3 + 0
    check(64'h7FF0000000000000, 64'hFFF0000000000000);    // Inf - Inf
    check(64'h7FF0000000000000, 64'h4000000000000000);    // Inf + 2
    check(64'h7FF8000000000000, 64'h4000000000000000);    // qNaN
    check(64'h7FF0000000000001, 64'h4000000000000000);    // sNaN
    check(64'h7FEFFFFFFFFFFFFF, 64'h7FEFFFFFFFFFFFFF);    // overflow
    check(64'h0018000000000000, 64'h8010000000000000);    // underflow
    check(64'h3FF0000000000000, 64'h3CA0000000000000);    // 1 + 2^-53: tie to even
    check(64'h3FF0000000000001, 64'h3CA0000000000000);    // tie, rounds up
    check(64'h3FFFFFFFFFFFFFFF, 64'h3CB0000000000000);    // rounding carry
    check(64'h4340000000000000, 64'h3FF0000000000000);    // far apart
    // random
    for (int i = 0; i < 20000; i++) begin
      x.sign = 1'($urandom);
      x.exp  = 11'($urandom_range(2046, 1));
      x.mant = {20'($urandom), $urandom};
      z = rnd_near(x, (i % 4 == 0) ? 70 : 3);
      check(x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
