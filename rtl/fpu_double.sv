// fpu_double: IEEE-754 double-precision floating-point unit with a hybrid
// FLP/LNS datapath.
//
// Addition and subtraction are done in the ordinary floating-point format.
// Multiplication and division are done in the logarithmic number system:
// each operand's mantissa is mapped through a log table, the logarithms are
// added (or subtracted), and an antilog table maps the result back to a
// mantissa. A multiplier or divider array is thus replaced by two tables and
// an adder, at the price of an approximate result whose relative error is
// bounded by the table size (about 1.35 * 2^-LUT_ABITS).
//
// Pipeline (one operation may enter every cycle):
//   stage 0  log tables for both operands, operator switch and "-1" unit
//   -------  register 1 (loaded when enable is high)
//   stage 1  ALU: FLP adder for +/-, log adder for * and /
//   -------  register 2
//   stage 2  antilog table, then the result MUX picks the FLP or LNS result
// Operands presented with enable high before rising edge n are in register
// 1 after edge n and in register 2 after edge n+1; out, ready and the flags
// are valid right after edge n+1 (a latency of two clock cycles). Reset
// (rst, synchronous, active high) clears both registers.
//
// Interface: fpu_op 00 add, 01 subtract, 10 multiply, 11 divide. Flags are
// valid with ready; exception is their OR. Subnormal operands are read as
// zero and subnormal results are flushed to zero with underflow. Two
// assertions at the end check that the flags of a result are consistent.
//
// The two-path structure, the log and antilog tables, the operator switch,
// the "-1" unit, the two registers and the final MUX follow the FPU's block
// diagrams. The op encoding, flags, handshake, rounding of table addresses
// and the table size are this design's choices.
module fpu_double
  import fpu_pkg::*;
#(
  parameter int LUT_ABITS = 10           // table address bits (2^LUT_ABITS + 1 words)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,            // an operation is presented this cycle
  input  logic [1:0]  fpu_op,
  input  logic [63:0] opa,
  input  logic [63:0] opb,
  output logic [63:0] out,
  output logic        ready,             // out and the flags are valid
  output logic        invalid,
  output logic        div_by_zero,
  output logic        overflow,
  output logic        underflow,
  output logic        exception
);

  typedef struct packed {
    logic    valid;
    logic    use_lns;
    logic    is_div;
    fp64_t   fa;
    fp64_t   fb;
    lns_t    la;
    lns_t    lb;
  } stage1_t;

  typedef struct packed {
    logic       valid;
    logic       use_lns;
    fp64_t      fy;
    fpu_flags_t fflags;
    lns_res_t   lr;
    fpu_flags_t lflags;
  } stage2_t;

  // ---------------- stage 0: log tables, operator switch, -1 ----------------
  lns_t    log_a, log_b;
  stage1_t s1_d, s1_q;

  flp_to_lns #(.ABITS(LUT_ABITS)) u_log_a (.x(fp64_t'(opa)), .l(log_a));
  flp_to_lns #(.ABITS(LUT_ABITS)) u_log_b (.x(fp64_t'(opb)), .l(log_b));

  operator_switch u_switch (
    .op      (fpu_op_e'(fpu_op)),
    .a       (fp64_t'(opa)),
    .b       (fp64_t'(opb)),
    .la      (log_a),
    .lb      (log_b),
    .use_lns (s1_d.use_lns),
    .is_div  (s1_d.is_div),
    .fa      (s1_d.fa),
    .fb      (s1_d.fb),
    .lna     (s1_d.la),
    .lnb     (s1_d.lb)
  );
  assign s1_d.valid = enable;

  always_ff @(posedge clk) begin
    if (rst) s1_q <= '0;
    else     s1_q <= s1_d;
  end

  // ---------------- stage 1: ALU ----------------
  stage2_t s2_d, s2_q;

  fp_addsub u_flp_alu (.a(s1_q.fa), .b(s1_q.fb), .y(s2_d.fy), .flags(s2_d.fflags));

  lns_alu u_lns_alu (
    .a      (s1_q.la),
    .b      (s1_q.lb),
    .is_div (s1_q.is_div),
    .r      (s2_d.lr),
    .flags  (s2_d.lflags)
  );
  assign s2_d.valid   = s1_q.valid;
  assign s2_d.use_lns = s1_q.use_lns;

  always_ff @(posedge clk) begin
    if (rst) s2_q <= '0;
    else     s2_q <= s2_d;
  end

  // ---------------- stage 2: antilog table and result MUX ----------------
  fp64_t      lns_y;
  logic       lns_ovf;
  fpu_flags_t fl;

  lns_to_flp #(.ABITS(LUT_ABITS)) u_antilog (.r(s2_q.lr), .y(lns_y), .overflow(lns_ovf));

  always_comb begin
    if (s2_q.use_lns) begin
      out = lns_y;
      fl  = s2_q.lflags;
      fl.overflow = s2_q.lflags.overflow | lns_ovf;
    end else begin
      out = s2_q.fy;
      fl  = s2_q.fflags;
    end
  end

  assign ready       = s2_q.valid;
  assign invalid     = fl.invalid;
  assign div_by_zero = fl.div_zero;
  assign overflow    = fl.overflow;
  assign underflow   = fl.underflow;
  assign exception   = |fl;

  // A result is never both too large and too small, and a NaN result never
  // carries overflow or underflow.
  a_range_flags: assert property (@(posedge clk) disable iff (rst)
    ready |-> !(overflow && underflow));
  a_nan_flags: assert property (@(posedge clk) disable iff (rst)
    (ready && out[62:52] == '1 && out[51:0] != '0) |-> !(overflow || underflow));

endmodule
