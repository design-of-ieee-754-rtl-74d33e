// tb_lns_alu: checks the log-domain ALU. Random logarithms are built from
// random exponents and fractions (the divisor negated as the operator switch
// does); the expected sum, its split into biased exponent and fraction, the
// sign XOR, overflow to Inf and flush to zero are worked out here with plain
// integer arithmetic on the exponent and fraction fields, separately from
// the block's single signed adder. The IEEE special-operand table for
// multiply and divide is checked case by case.
module tb_lns_alu;
  import fpu_pkg::*;

  lns_t       a, b;
  logic       is_div;
  lns_res_t   r;
  fpu_flags_t flags;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  lns_alu dut (.a(a), .b(b), .is_div(is_div), .r(r), .flags(flags));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lns_t mk(logic s, fp_class_e c, int e, logic [LOG_W-1:0] f, logic neg);
    lns_t l;
    logic signed [LOG_TOT_W-1:0] v;
    l.sign = s; l.cls = c; l.snan = 1'b0;
    v = (LOG_TOT_W'(e) <<< LOG_W) | LOG_TOT_W'(f);
    if (c != CLS_NORM) v = '0;
    l.lg = neg ? -v : v;
    return l;
  endfunction

  task automatic check(input lns_res_t wr, input fpu_flags_t wf);
    @(posedge clk);
    checks++;
    if (r !== wr || flags !== wf) begin
      failures++;
      if (failures < 10)
        $display("FAIL div=%b got %s e=%0d f=%h fl=%b want %s e=%0d f=%h fl=%b", is_div,
                 r.cls.name(), r.exp, r.frac, flags, wr.cls.name(), wr.exp, wr.frac, wf);
    end
  endtask

  initial begin
    int ea, eb, e;
    logic [LOG_W-1:0] fa, fb;
    logic [LOG_W:0]   fs;
    logic sa, sb;
    lns_res_t wr;
    fpu_flags_t wf;
    fp_class_e cl [4] = '{CLS_ZERO, CLS_NORM, CLS_INF, CLS_NAN};

    // random normal operands, multiply and divide
    for (int i = 0; i < 20000; i++) begin
      is_div = 1'($urandom);
      sa = 1'($urandom); sb = 1'($urandom);
      ea = int'($urandom_range(2046, 1)) - 1023;
      eb = int'($urandom_range(2046, 1)) - 1023;
      if (i % 2 == 0) eb = (is_div ? ea : -ea) + int'($urandom_range(40)) - 20;
      fa = {20'($urandom), $urandom};
      fb = {20'($urandom), $urandom};
      a = mk(sa, CLS_NORM, ea, fa, 1'b0);
      b = mk(sb, CLS_NORM, eb, fb, is_div);
      // expected, from the fields
      wr = '0; wf = '0;
      wr.sign = sa ^ sb;
      if (!is_div) begin
        fs = {1'b0, fa} + {1'b0, fb};
        e  = ea + eb + (fs[LOG_W] ? 1 : 0);
      end else begin
        fs = {1'b0, fa} - {1'b0, fb};
        e  = ea - eb - (fs[LOG_W] ? 1 : 0);
      end
      e = e + 1023;
      if (e >= 2047)   begin wr.cls = CLS_INF;  wf.overflow = 1'b1; end
      else if (e <= 0) begin wr.cls = CLS_ZERO; wf.underflow = 1'b1; end
      else begin wr.cls = CLS_NORM; wr.exp = 11'(e); wr.frac = fs[LOG_W-1:0]; end
      check(wr, wf);
    end

    // special operands: every class pair, both operators
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          is_div = 1'(d);
          a = mk(1'b1, cl[i], 3, 52'h123, 1'b0);
          b = mk(1'b0, cl[j], 5, 52'h456, is_div);
          wr = '0; wf = '0;
          wr.sign = 1'b1;
          if (cl[i] == CLS_NAN || cl[j] == CLS_NAN) begin
            wr.cls = CLS_NAN; wr.sign = 1'b0;
          end else if (!is_div) begin
            if ((cl[i] == CLS_INF && cl[j] == CLS_ZERO) || (cl[i] == CLS_ZERO && cl[j] == CLS_INF))
              begin wr.cls = CLS_NAN; wr.sign = 1'b0; wf.invalid = 1'b1; end
            else if (cl[i] == CLS_INF || cl[j] == CLS_INF) wr.cls = CLS_INF;
            else if (cl[i] == CLS_ZERO || cl[j] == CLS_ZERO) wr.cls = CLS_ZERO;
            else begin wr.cls = CLS_NORM; wr.exp = 11'(1023 + 8); wr.frac = 52'h579; end
          end else begin
            if (cl[i] == cl[j] && (cl[i] == CLS_INF || cl[i] == CLS_ZERO))
              begin wr.cls = CLS_NAN; wr.sign = 1'b0; wf.invalid = 1'b1; end
            else if (cl[i] == CLS_INF) wr.cls = CLS_INF;
            else if (cl[j] == CLS_ZERO) begin wr.cls = CLS_INF; wf.div_zero = (cl[i] == CLS_NORM); end
            else if (cl[i] == CLS_ZERO || cl[j] == CLS_INF) wr.cls = CLS_ZERO;
            else begin wr.cls = CLS_NORM; wr.exp = 11'(1023 - 3); wr.frac = 52'hFFFFFFFFFFCCD; end
          end
          check(wr, wf);
        end
    // signalling NaN raises invalid
    is_div = 1'b0;
    a = mk(1'b0, CLS_NAN, 0, '0, 1'b0); a.snan = 1'b1;
    b = mk(1'b0, CLS_NORM, 1, '0, 1'b0);
    wr = '0; wr.cls = CLS_NAN; wf = '0; wf.invalid = 1'b1;
    check(wr, wf);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
