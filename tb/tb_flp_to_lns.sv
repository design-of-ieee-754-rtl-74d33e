// tb_flp_to_lns: checks the FLP-to-LNS converter against log2 computed with
// real arithmetic. For a normal operand the fixed-point logarithm must be
// within the table's quantization error, 2^-(ABITS+1) / ln 2, plus 2^-50, of
// log2 |x|; sign, class and the signalling-NaN bit must be exact. Zeros,
// subnormals, Inf and NaN must give lg = 0 and their class.
module tb_flp_to_lns;
  import fpu_pkg::*;
  localparam int ABITS = 10;

  fp64_t x;
  lns_t  l;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  flp_to_lns #(.ABITS(ABITS)) dut (.x(x), .l(l));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input fp64_t v);
    real got, want, err, tol;
    fp_class_e wc;
    logic ok;
    x = v;
    @(posedge clk);
    wc = (v.exp == 0) ? CLS_ZERO : (v.exp == 11'h7FF) ? ((v.mant == 0) ? CLS_INF : CLS_NAN) : CLS_NORM;
    ok = (l.sign == v.sign) && (l.cls == wc) && (l.snan == (wc == CLS_NAN && !v.mant[51]));
    if (wc == CLS_NORM) begin
      got  = real'(l.lg) / (2.0 ** LOG_W);
      want = real'(int'(v.exp) - 1023) + $ln(1.0 + real'(v.mant) / (2.0 ** 52)) / $ln(2.0);
      err  = got - want;
      if (err < 0.0) err = -err;
      tol  = (2.0 ** -(ABITS+1)) / $ln(2.0) + 2.0 ** -50;
      ok   = ok && (err <= tol);
    end else begin
      ok = ok && (l.lg == 0);
    end
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h lg=%h cls=%s", v, l.lg, l.cls.name());
    end
  endtask

  initial begin
    fp64_t v;
    check(64'h3FF0000000000000);   // 1.0: log 0
    check(64'h4000000000000000);   // 2.0: log 1
    check(64'h3FE0000000000000);   // 0.5: log -1
    check(64'h3FFFFFFFFFFFFFFF);   // rounds up to the table's last word
    check(64'h0000000000000000);
    check(64'h800FFFFFFFFFFFFF);   // subnormal
    check(64'h7FF0000000000000);
    check(64'hFFF8000000000000);
    check(64'h7FF0000000000001);
    for (int i = 0; i < 5000; i++) begin
      v = {1'($urandom), 11'($urandom_range(2046, 1)), 20'($urandom), $urandom};
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
