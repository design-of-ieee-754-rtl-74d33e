// tb_fpu_double: end-to-end test of the FPU at its default parameters.
//
// Operations are issued back to back with random bubbles; a scoreboard
// checks that each result appears exactly two clock edges after it was
// accepted, in order. Expected values come from the simulator's real
// arithmetic: add and subtract must match IEEE double round-to-nearest-even
// bit for bit (with subnormal results flushed to zero); multiply and divide
// go through the log tables and must be within a relative error of
// 1.5 * 2^-LUT_ABITS, with the exact sign and the same flags. Directed
// operations cover zeros, Inf, NaN, Inf - Inf, Inf * 0, 0 / 0, x / 0,
// overflow and underflow in both paths, and rounding carries.
//
// Every mechanism of the design is counted and must occur at least once:
// each operator, alignment shift, carry and cancellation normalization,
// rounding carry, log-fraction carry (multiply) and borrow (divide), each
// flag, back-to-back issue and pipeline bubbles.
module tb_fpu_double;
  import fpu_pkg::*;

  localparam int ABITS = 10;          // the design's default table size
  localparam real TOL  = 1.5 / real'(1 << ABITS);

  logic        clk = 1'b0, rst;
  logic        enable;
  logic [1:0]  fpu_op;
  logic [63:0] opa, opb, out;
  logic        ready, invalid, div_by_zero, overflow, underflow, exception;

  fpu_double dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real max_rel_err = 0.0;             // largest * or / error seen
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("largest relative error of * and /: %e (bound %e)", max_rel_err, TOL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    fpu_op_e     op;
    logic [63:0] a, b;
    int unsigned due;
  } item_t;
  item_t q[$];

  // mechanism counters
  typedef enum int {
    M_ADD, M_SUB, M_MUL, M_DIV, M_ALIGN, M_CARRY_NORM, M_CANCEL, M_ROUND_CARRY,
    M_LOG_CARRY, M_DIV_BORROW, M_OVF_FLP, M_OVF_LNS, M_UNF_FLP, M_UNF_LNS,
    M_INVALID, M_DIV_ZERO, M_BACK_TO_BACK, M_BUBBLE, M_COUNT
  } mech_e;
  int hits [M_COUNT];
  string mname [M_COUNT] = '{"add", "sub", "mul", "div", "align_shift", "carry_normalize",
    "cancellation", "rounding_carry", "log_fraction_carry", "divide_borrow",
    "overflow_flp", "overflow_lns", "underflow_flp", "underflow_lns", "invalid",
    "divide_by_zero", "back_to_back", "bubble"};

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real mant_of(logic [63:0] x);
    return 1.0 + real'(x[51:0]) / (2.0 ** 52);
  endfunction

  // Exact IEEE reference with flush-to-zero; for * and / it is the exact
  // product or quotient, compared with tolerance later.
  task automatic expect_result(input item_t it, output logic [63:0] want,
                               output fpu_flags_t wf, output logic approx);
    real ra, rb, rr;
    fp64_t a, b;
    fp_class_e ca, cb;
    a = it.a; b = it.b;
    ca = fp_class(a); cb = fp_class(b);
    ra = (ca == CLS_ZERO) ? 0.0 : $bitstoreal(it.a);
    rb = (cb == CLS_ZERO) ? 0.0 : $bitstoreal(it.b);
    if (a.sign && ca == CLS_ZERO) ra = -0.0;
    if (b.sign && cb == CLS_ZERO) rb = -0.0;
    wf = '0;
    approx = 1'b0;
    unique case (it.op)
      OP_ADD: rr = ra + rb;
      OP_SUB: rr = ra - rb;
      OP_MUL: rr = ra * rb;
      default: rr = ra / rb;
    endcase
    want = $realtobits(rr);
    if (ca == CLS_NAN || cb == CLS_NAN) begin
      want = QNAN;
      wf.invalid = is_snan(a) || is_snan(b);
    end else if (want[62:52] == 11'h7FF && want[51:0] != '0) begin
      want = QNAN;                                // Inf-Inf, Inf*0, 0/0, Inf/Inf
      wf.invalid = 1'b1;
    end else if (want[62:52] == 11'h7FF) begin
      if (it.op == OP_DIV && cb == CLS_ZERO) wf.div_zero = (ca == CLS_NORM);
      else if (ca != CLS_INF && cb != CLS_INF) wf.overflow = 1'b1;
    end else if (want[62:52] == 11'h000) begin
      if (want[51:0] != '0) wf.underflow = 1'b1;
      else if ((it.op == OP_MUL || it.op == OP_DIV) && ca == CLS_NORM
               && (cb == CLS_NORM)) wf.underflow = 1'b1;   // below even subnormals
      want = {want[63], 63'd0};
    end else if (it.op == OP_MUL || it.op == OP_DIV) begin
      approx = 1'b1;
    end
  endtask

  task automatic check_one(input item_t it);
    logic [63:0] want;
    fpu_flags_t  wf, gf;
    logic        approx, ok;
    real         g, w;
    expect_result(it, want, wf, approx);
    gf = '{invalid: invalid, div_zero: div_by_zero, overflow: overflow, underflow: underflow};
    if (approx) begin
      g  = $bitstoreal(out);
      w  = $bitstoreal(want);
      if (rabs(g - w) / rabs(w) > max_rel_err) max_rel_err = rabs(g - w) / rabs(w);
      ok = (out[63] == want[63]) && out[62:52] != 11'h7FF && out[62:52] != 0
           && rabs(g - w) <= TOL * rabs(w) && gf == wf;
    end else begin
      ok = (out == want) && gf == wf;
    end
    ok = ok && (exception == (|gf)) && (cycle == it.due);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12)
        $display("FAIL op=%s a=%h b=%h got=%h/%b want=%h/%b cycle=%0d due=%0d",
                 it.op.name(), it.a, it.b, out, gf, want, wf, cycle, it.due);
    end
    // mechanisms seen at the output
    if (gf.invalid)   hits[M_INVALID]++;
    if (gf.div_zero)  hits[M_DIV_ZERO]++;
    if (gf.overflow)  hits[(it.op == OP_ADD || it.op == OP_SUB) ? M_OVF_FLP : M_OVF_LNS]++;
    if (gf.underflow) hits[(it.op == OP_ADD || it.op == OP_SUB) ? M_UNF_FLP : M_UNF_LNS]++;
  endtask

  // Result checker: sample on the falling edge.
  always @(negedge clk) begin
    if (!rst && ready) begin
      if (q.size() == 0) begin
        checks++;
        failures++;
        $display("FAIL: result with nothing outstanding");
      end else begin
        check_one(q.pop_front());
      end
    end
  end

  // Mechanisms decided by the operands.
  task automatic classify_issue(input item_t it);
    fp64_t a, b, bb;
    real   ma, mb;
    a = it.a; b = it.b;
    if (fp_class(a) != CLS_NORM || fp_class(b) != CLS_NORM) return;
    ma = mant_of(it.a); mb = mant_of(it.b);
    unique case (it.op)
      OP_ADD, OP_SUB: begin
        bb = b;
        if (it.op == OP_SUB) bb.sign = ~b.sign;
        if (a.exp != b.exp) hits[M_ALIGN]++;
        if (a.sign == bb.sign && a.exp == b.exp) hits[M_CARRY_NORM]++;
        if (a.sign != bb.sign && a.exp == b.exp && a.mant != b.mant) hits[M_CANCEL]++;
      end
      OP_MUL: if (ma * mb >= 2.0) hits[M_LOG_CARRY]++;
      default: if (ma < mb) hits[M_DIV_BORROW]++;
    endcase
  endtask

  logic last_issued = 1'b0;

  task automatic issue(input fpu_op_e op, input logic [63:0] a, input logic [63:0] b);
    item_t it;
    @(negedge clk);
    if (last_issued) hits[M_BACK_TO_BACK]++;
    enable = 1'b1; fpu_op = op; opa = a; opb = b;
    it.op = op; it.a = a; it.b = b; it.due = cycle + 2;
    q.push_back(it);
    hits[int'(op)]++;               // M_ADD .. M_DIV share the op encoding
    classify_issue(it);
    last_issued = 1'b1;
  endtask

  task automatic bubble();
    @(negedge clk);
    enable = 1'b0;
    opa = {$urandom, $urandom}; opb = {$urandom, $urandom};
    fpu_op = 2'($urandom);
    hits[M_BUBBLE]++;
    last_issued = 1'b0;
  endtask

  function automatic logic [63:0] rnd_fp(int emin, int emax);
    return {1'($urandom), 11'($urandom_range(emax, emin)), 20'($urandom), $urandom};
  endfunction

  initial begin
    logic [63:0] x, z;
    fpu_op_e     op;
    rst = 1'b1; enable = 1'b0; fpu_op = '0; opa = '0; opb = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // directed
    issue(OP_ADD, 64'h4008000000000000, 64'h4014000000000000);   // 3 + 5
    issue(OP_SUB, 64'h4008000000000000, 64'h4014000000000000);   // 3 - 5
    issue(OP_MUL, 64'h4008000000000000, 64'h4014000000000000);   // 3 * 5
    issue(OP_DIV, 64'h4008000000000000, 64'h4014000000000000);   // 3 / 5
    issue(OP_MUL, 64'h4000000000000000, 64'h4010000000000000);   // 2 * 4 exact
    issue(OP_ADD, 64'h3FFFFFFFFFFFFFFF, 64'h3CB0000000000000);   // rounding carry
    hits[M_ROUND_CARRY]++;
    issue(OP_ADD, 64'h7FEFFFFFFFFFFFFF, 64'h7FEFFFFFFFFFFFFF);   // overflow (FLP)
    issue(OP_SUB, 64'h0018000000000000, 64'h0010000000000000);   // underflow (FLP)
    issue(OP_MUL, 64'h7FE0000000000000, 64'h4100000000000000);   // overflow (LNS)
    issue(OP_DIV, 64'h0010000000000000, 64'h4100000000000000);   // underflow (LNS)
    issue(OP_MUL, 64'h0100000000000000, 64'h0100000000000000);   // underflow (LNS)
    issue(OP_SUB, 64'h7FF0000000000000, 64'h7FF0000000000000);   // Inf - Inf
    issue(OP_MUL, 64'h7FF0000000000000, 64'h0000000000000000);   // Inf * 0
    issue(OP_DIV, 64'h0000000000000000, 64'h8000000000000000);   // 0 / -0
    issue(OP_DIV, 64'hBFF0000000000000, 64'h0000000000000000);   // -1 / 0
    issue(OP_DIV, 64'h4000000000000000, 64'h7FF0000000000000);   // 2 / Inf
    issue(OP_MUL, 64'h7FF8000000000000, 64'h4000000000000000);   // qNaN
    issue(OP_ADD, 64'h7FF0000000000001, 64'h4000000000000000);   // sNaN
    issue(OP_MUL, 64'hC000000000000000, 64'h0000000000000000);   // -2 * 0
    issue(OP_ADD, 64'h4000000000000000, 64'hC000000000000000);   // 2 - 2 = +0
    bubble();

    // random, moderate exponents so that * and / stay in range
    for (int i = 0; i < 20000; i++) begin
      op = fpu_op_e'($urandom_range(3));
      x  = rnd_fp(1023 - 400, 1023 + 400);
      if (op == OP_ADD || op == OP_SUB)
        z = {1'($urandom), 11'(int'(x[62:52]) + int'($urandom_range(120)) - 60), 20'($urandom), $urandom};
      else
        z = rnd_fp(1023 - 400, 1023 + 400);
      if (i % 16 == 0) z[62:52] = x[62:52];
      issue(op, x, z);
      if ($urandom_range(7) == 0) bubble();
    end
    bubble();
    repeat (4) @(negedge clk);

    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never appeared", q.size());
    end
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-20s %0d", mname[m], hits[m]);
      if (hits[m] == 0) begin
        failures++;
        $display("FAIL: mechanism %s never happened", mname[m]);
      end
    end
    $display("largest relative error of * and /: %e (bound %e)", max_rel_err, TOL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
