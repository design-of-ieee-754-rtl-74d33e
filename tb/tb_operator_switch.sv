// tb_operator_switch: checks the operator decode and the "-1" unit for all
// four operators with random operands: path select and divide flag, the sign
// of b flipped only for subtract, the logarithm of b negated only for divide,
// and everything else passed unchanged.
module tb_operator_switch;
  import fpu_pkg::*;

  fpu_op_e op;
  fp64_t   a, b, fa, fb;
  lns_t    la, lb, lna, lnb;
  logic    use_lns, is_div;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  operator_switch dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    fp64_t wfb;
    lns_t  wlnb;
    for (int i = 0; i < 4000; i++) begin
      op = fpu_op_e'(i % 4);
      a  = {$urandom, $urandom};
      b  = {$urandom, $urandom};
      la = '{sign: 1'($urandom), cls: fp_class_e'($urandom_range(3)), snan: 1'($urandom),
             lg: {1'($urandom), $urandom, $urandom}};
      lb = '{sign: 1'($urandom), cls: fp_class_e'($urandom_range(3)), snan: 1'($urandom),
             lg: {1'($urandom), $urandom, $urandom}};
      @(posedge clk);
      wfb = b;
      wlnb = lb;
      if (op == OP_SUB) wfb = {~b[63], b[62:0]};
      if (op == OP_DIV) wlnb.lg = LOG_TOT_W'(0) - lb.lg;
      ok = (use_lns == (op == OP_MUL || op == OP_DIV)) && (is_div == (op == OP_DIV))
           && fa == a && fb == wfb && lna == la && lnb == wlnb;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s", op.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
