// fp_addsub: IEEE-754 double-precision adder (the FLP path of the FPU).
//
// Subtraction reaches this block as an addition with the sign of b already
// flipped, so the block only adds. The steps are the classic ones:
//   1. order the operands so that |a| >= |b|; the larger exponent is the
//      tentative exponent of the result;
//   2. shift the smaller significand right by the exponent difference,
//      keeping guard, round and a sticky bit;
//   3. add the significands when the signs agree, subtract them otherwise;
//   4. normalize: shift right by one after a carry, or left by the leading
//      zero count after cancellation, adjusting the exponent;
//   5. round to nearest, ties to even; a carry out of rounding shifts the
//      significand right and increments the exponent;
//   6. the sign is the sign of the larger operand.
// Exceptions: NaN operands give a quiet NaN; Inf + (-Inf) is invalid; a
// result past the largest exponent becomes Inf with the overflow flag.
//
// Subnormal operands are read as zero and a result below the smallest
// normal is flushed to zero with the underflow flag; the description only
// deals with normalized numbers. Exact cancellation gives +0.
//
// Purely combinational; the FPU registers its inputs and outputs. The step
// list follows the FPU description; guard/round/sticky rounding to nearest
// even and the flush-to-zero treatment are this design's choices.
module fp_addsub
  import fpu_pkg::*;
(
  input  fp64_t      a,
  input  fp64_t      b,
  output fp64_t      y,
  output fpu_flags_t flags
);

  localparam int SIG_W = MANT_W + 1;     // 53: hidden one plus fraction
  localparam int EXT_W = SIG_W + 3;      // 56: plus guard, round, sticky

  function automatic int unsigned lzc(logic [EXT_W-1:0] v);
    for (int i = EXT_W-1; i >= 0; i--)
      if (v[i]) return int'(EXT_W-1-i);
    return EXT_W;
  endfunction

  fp_class_e ca, cb;
  fp64_t     op_l, op_s;
  logic      swap;

  always_comb begin
    logic [11:0]        d;          // exponent difference
    logic [EXT_W-1:0]   sb, ss;     // significands with guard bits
    logic [EXT_W+63:0]  t;
    logic [EXT_W:0]     sum;
    logic [EXT_W-1:0]   n;          // normalized
    logic signed [13:0] e;
    int unsigned        lz;
    logic               g, rs, inc;
    logic [SIG_W:0]     r;          // rounded significand with carry

    ca = fp_class(a);
    cb = fp_class(b);
    swap  = {b.exp, b.mant} > {a.exp, a.mant};
    op_l   = swap ? b : a;
    op_s = swap ? a : b;

    y     = '0;
    flags = '0;
    d = '0; sb = '0; ss = '0; t = '0; sum = '0; n = '0; e = '0;
    lz = 0; g = 1'b0; rs = 1'b0; inc = 1'b0; r = '0;

    if (ca == CLS_NAN || cb == CLS_NAN) begin
      y = QNAN;
      flags.invalid = is_snan(a) || is_snan(b);
    end else if (ca == CLS_INF || cb == CLS_INF) begin
      if (ca == CLS_INF && cb == CLS_INF && a.sign != b.sign) begin
        y = QNAN;
        flags.invalid = 1'b1;
      end else begin
        y = fp_inf(ca == CLS_INF ? a.sign : b.sign);
      end
    end else if (ca == CLS_ZERO && cb == CLS_ZERO) begin
      y = fp_zero(a.sign & b.sign);
    end else if (ca == CLS_ZERO) begin
      y = b;
    end else if (cb == CLS_ZERO) begin
      y = a;
    end else begin
      // 1-2: align
      d  = 12'(op_l.exp) - 12'(op_s.exp);
      sb = {1'b1, op_l.mant, 3'b000};
      t  = {1'b1, op_s.mant, 3'b000, 64'd0} >> (d > 12'd63 ? 12'd63 : d);
      if (d > 12'd63) t = {{EXT_W{1'b0}}, 64'd1};   // entirely sticky
      ss = t[EXT_W+63:64];
      ss[0] = ss[0] | (|t[63:0]);
      // 3: add or subtract
      if (op_l.sign == op_s.sign) sum = {1'b0, sb} + {1'b0, ss};
      else                        sum = {1'b0, sb} - {1'b0, ss};
      e = 14'(op_l.exp);
      if (sum == '0) begin
        y = fp_zero(1'b0);
      end else begin
        // 4: normalize
        if (sum[EXT_W]) begin
          n = sum[EXT_W:1];
          n[0] = n[0] | sum[0];
          e = e + 14'sd1;
        end else begin
          lz = lzc(sum[EXT_W-1:0]);
          n  = sum[EXT_W-1:0] << lz;
          e  = e - 14'(lz);
        end
        // 5: round to nearest even
        g   = n[2];
        rs  = n[1] | n[0];
        inc = g & (rs | n[3]);
        r   = {1'b0, n[EXT_W-1:3]} + (SIG_W+1)'(inc);
        if (r[SIG_W]) begin
          r = r >> 1;
          e = e + 14'sd1;
        end
        // exceptions
        if (e >= 14'(EXP_MAX)) begin
          y = fp_inf(op_l.sign);
          flags.overflow = 1'b1;
        end else if (e <= 14'sd0) begin
          y = fp_zero(op_l.sign);
          flags.underflow = 1'b1;
        end else begin
          y.sign = op_l.sign;               // 6: sign of the larger operand
          y.exp  = e[EXP_W-1:0];
          y.mant = r[MANT_W-1:0];
        end
      end
    end
  end

endmodule
