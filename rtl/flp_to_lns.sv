// flp_to_lns: converts an IEEE double into the logarithmic number system.
//
// A normal number (-1)^s * 2^(E-1023) * 1.M has the base-2 logarithm
// (E - 1023) + log2(1.M). The integer part comes straight from the exponent;
// the fraction log2(1.M) comes from the log table, addressed by the top
// ABITS bits of M rounded to nearest (a mantissa that rounds up to 2 reads
// the table's last word, log2(2) = 1, which carries into the integer part).
// The result is one signed fixed-point number with LOG_W fraction bits, plus
// the sign and the operand class (zero, normal, Inf, NaN). Subnormals are
// classed as zero; lg is 0 for every class but normal.
//
// Purely combinational. Mapping the mantissa through a look-up table is the
// FPU description's method; rounding the table address is this design's
// choice, and it bounds the conversion error to 2^-(ABITS+1) / ln 2.
module flp_to_lns
  import fpu_pkg::*;
#(
  parameter int ABITS = 10
) (
  input  fp64_t x,
  output lns_t  l
);

  logic [ABITS:0] idx;
  logic [LOG_W:0] log_frac;

  assign idx = {1'b0, x.mant[MANT_W-1 -: ABITS]} + (ABITS+1)'(x.mant[MANT_W-1-ABITS]);

  log_lut #(.ABITS(ABITS), .W(LOG_W)) u_log_lut (.idx(idx), .log_frac(log_frac));

  always_comb begin
    l.sign = x.sign;
    l.cls  = fp_class(x);
    l.snan = is_snan(x);
    l.lg   = '0;
    if (l.cls == CLS_NORM)
      l.lg = ((LOG_TOT_W'(signed'({1'b0, x.exp})) - LOG_TOT_W'(BIAS)) <<< LOG_W)
             + LOG_TOT_W'(log_frac);
  end

endmodule
