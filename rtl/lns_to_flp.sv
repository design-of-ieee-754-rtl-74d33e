// lns_to_flp: converts a log-domain result back to an IEEE double.
//
// The log-domain ALU delivers a sign, a class, a biased exponent (the integer
// part of the logarithm) and the fraction f of the logarithm. The mantissa
// is 2^f, read from the antilog table addressed by the top ABITS bits of f,
// rounded to nearest. The table's last word means 2^1: the mantissa is then
// 1.0 and the exponent grows by one, which can overflow to Inf (overflow
// flag). Zero, Inf and NaN classes give the matching IEEE encodings.
//
// Purely combinational. The antilog table is from the FPU description; the
// rounding of its address is this design's choice.
module lns_to_flp
  import fpu_pkg::*;
#(
  parameter int ABITS = 10
) (
  input  lns_res_t r,
  output fp64_t    y,
  output logic     overflow
);

  logic [ABITS:0] idx;
  logic [LOG_W:0] mant;

  assign idx = {1'b0, r.frac[LOG_W-1 -: ABITS]} + (ABITS+1)'(r.frac[LOG_W-1-ABITS]);

  antilog_lut #(.ABITS(ABITS), .W(LOG_W)) u_antilog_lut (.idx(idx), .mant(mant));

  always_comb begin
    overflow = 1'b0;
    unique case (r.cls)
      CLS_ZERO: y = fp_zero(r.sign);
      CLS_INF:  y = fp_inf(r.sign);
      CLS_NAN:  y = QNAN;
      default: begin
        if (mant[LOG_W]) begin
          if (r.exp == EXP_W'(EXP_MAX - 1)) begin
            y = fp_inf(r.sign);
            overflow = 1'b1;
          end else begin
            y = '{sign: r.sign, exp: r.exp + 1'b1, mant: '0};
          end
        end else begin
          y = '{sign: r.sign, exp: r.exp, mant: mant[MANT_W-1:0]};
        end
      end
    endcase
  end

endmodule
