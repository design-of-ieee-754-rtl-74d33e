// lns_alu: the log-domain half of the FPU's ALU, for multiply and divide.
//
// In the logarithmic number system a product is a sum of logarithms and a
// quotient a difference. The operator switch has already negated the
// divisor's logarithm, so this block always adds:
//   lg = lg_a + lg_b            (one signed fixed-point adder)
// The integer part of lg is the unbiased exponent of the result and the
// fraction is log2 of its mantissa. A fraction sum that reaches 1 carries
// into the integer part, which is the "shift right and increment" of a
// mantissa overflow; a negative difference borrows from it. Adding the
// bias gives the result exponent: at 2047 or above the result is Inf
// (overflow), at 0 or below it is flushed to zero (underflow). The sign is
// the XOR of the operand signs.
//
// Special operands follow IEEE rules: NaN in gives NaN; Inf * 0, 0 / 0 and
// Inf / Inf are invalid; a finite non-zero number divided by zero gives Inf
// with the divide-by-zero flag; zero and Inf otherwise propagate.
//
// Purely combinational. The add/subtract of logarithms, the exponent
// handling and the sign XOR are the FPU description's; the flag rules and the
// flush to zero are this design's choices.
module lns_alu
  import fpu_pkg::*;
(
  input  lns_t       a,
  input  lns_t       b,        // divisor already negated for a divide
  input  logic       is_div,
  output lns_res_t   r,
  output fpu_flags_t flags
);

  logic signed [LOG_TOT_W-1:0] sum;
  logic signed [LOG_INT_W-1:0] ipart;
  logic signed [LOG_INT_W-1:0] e;

  assign sum   = a.lg + b.lg;
  assign ipart = sum[LOG_TOT_W-1 -: LOG_INT_W];          // floor(sum / 2^LOG_W)
  assign e     = ipart + LOG_INT_W'(BIAS);

  always_comb begin
    r       = '0;
    r.sign  = a.sign ^ b.sign;
    r.frac  = sum[LOG_W-1:0];
    flags   = '0;
    if (a.cls == CLS_NAN || b.cls == CLS_NAN) begin
      r.cls = CLS_NAN;
      r.sign = 1'b0;
      flags.invalid = a.snan | b.snan;
    end else if (!is_div) begin
      if ((a.cls == CLS_INF && b.cls == CLS_ZERO) || (a.cls == CLS_ZERO && b.cls == CLS_INF)) begin
        r.cls = CLS_NAN;
        r.sign = 1'b0;
        flags.invalid = 1'b1;
      end else if (a.cls == CLS_INF || b.cls == CLS_INF) begin
        r.cls = CLS_INF;
      end else if (a.cls == CLS_ZERO || b.cls == CLS_ZERO) begin
        r.cls = CLS_ZERO;
      end else begin
        r.cls = CLS_NORM;
      end
    end else begin
      if ((a.cls == CLS_INF && b.cls == CLS_INF) || (a.cls == CLS_ZERO && b.cls == CLS_ZERO)) begin
        r.cls = CLS_NAN;
        r.sign = 1'b0;
        flags.invalid = 1'b1;
      end else if (a.cls == CLS_INF || b.cls == CLS_ZERO) begin
        r.cls = CLS_INF;
        flags.div_zero = (a.cls == CLS_NORM);
      end else if (a.cls == CLS_ZERO || b.cls == CLS_INF) begin
        r.cls = CLS_ZERO;
      end else begin
        r.cls = CLS_NORM;
      end
    end
    if (r.cls == CLS_NORM) begin
      if (e >= LOG_INT_W'(EXP_MAX)) begin
        r.cls = CLS_INF;
        flags.overflow = 1'b1;
      end else if (e <= 0) begin
        r.cls = CLS_ZERO;
        flags.underflow = 1'b1;
      end else begin
        r.exp = e[EXP_W-1:0];
      end
    end
    if (r.cls != CLS_NORM) r.frac = '0;
  end

endmodule
