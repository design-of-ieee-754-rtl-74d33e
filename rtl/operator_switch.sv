// operator_switch: operator decode and the "-1" unit in front of the first
// pipeline register.
//
// The operator picks one of two paths. Add and subtract stay in the
// floating-point (FLP) format; multiply and divide go through the log
// tables into the logarithmic (LNS) format. The "-1" unit prepares the
// second operand so that the ALU only ever adds:
//   subtract: b is multiplied by -1, i.e. its sign bit is flipped;
//   divide:   the logarithm of b is negated (two's complement), so the
//             quotient becomes a sum of logarithms.
// use_lns tells the later stages which path's result to keep.
//
// Purely combinational. The operator switch, the "-1" block and the split
// into FLP and LNS paths are from the FPU's block diagram; what "-1" does
// for each operator is this design's reading of it.
module operator_switch
  import fpu_pkg::*;
(
  input  fpu_op_e op,
  input  fp64_t   a,
  input  fp64_t   b,
  input  lns_t    la,        // log of a, from the log table
  input  lns_t    lb,        // log of b, from the log table
  output logic    use_lns,   // multiply or divide
  output logic    is_div,
  output fp64_t   fa,        // FLP operands for the adder
  output fp64_t   fb,
  output lns_t    lna,       // LNS operands for the log adder
  output lns_t    lnb
);

  always_comb begin
    use_lns = (op == OP_MUL) || (op == OP_DIV);
    is_div  = (op == OP_DIV);
    fa      = a;
    fb      = b;
    lna     = la;
    lnb     = lb;
    if (op == OP_SUB) fb.sign = ~b.sign;
    if (op == OP_DIV) lnb.lg  = -lb.lg;
  end

endmodule
