// fpu_pkg: types and constants shared by the double-precision FPU.
//
// An IEEE-754 double is a sign bit, an 11-bit exponent biased by 1023 and a
// 52-bit fraction; a normal number has the value (-1)^s * 2^(E-1023) * 1.M.
// The four operators, the operand classes and the exception flags are typed
// here so that every stage of the pipeline speaks the same language.
//
// Logarithmic (LNS) operands are carried as a sign, a class and one signed
// fixed-point number: the unbiased exponent in the integer part and
// log2(1.M) in the LOG_W fraction bits. The integer part is 13 bits wide so
// that the sum or difference of two logs of doubles never wraps.
//
// The format follows the IEEE standard. The operator encoding, the flag set
// and the width of the log fraction are choices of this design.
package fpu_pkg;

  localparam int EXP_W     = 11;
  localparam int MANT_W    = 52;
  localparam int BIAS      = 1023;
  localparam int EXP_MAX   = 2047;          // all-ones exponent: Inf / NaN
  localparam int LOG_W     = MANT_W;        // fraction bits of a logarithm
  localparam int LOG_INT_W = 13;            // signed integer bits of a logarithm
  localparam int LOG_TOT_W = LOG_INT_W + LOG_W;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [MANT_W-1:0] mant;
  } fp64_t;

  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_SUB = 2'b01,
    OP_MUL = 2'b10,
    OP_DIV = 2'b11
  } fpu_op_e;

  typedef enum logic [1:0] {
    CLS_ZERO = 2'b00,   // zero, and subnormals (flushed)
    CLS_NORM = 2'b01,
    CLS_INF  = 2'b10,
    CLS_NAN  = 2'b11
  } fp_class_e;

  typedef struct packed {
    logic invalid;      // NaN produced from non-NaN operands, or signalling NaN in
    logic div_zero;     // finite non-zero divided by zero
    logic overflow;     // result too large, replaced by infinity
    logic underflow;    // non-zero result too small, flushed to zero
  } fpu_flags_t;

  // Operand in the logarithmic domain: value = (-1)^sign * 2^(lg / 2^LOG_W).
  typedef struct packed {
    logic                        sign;
    fp_class_e                   cls;
    logic                        snan;     // signalling NaN
    logic signed [LOG_TOT_W-1:0] lg;
  } lns_t;

  // Result of the log-domain ALU, before the antilog table.
  typedef struct packed {
    logic             sign;
    fp_class_e        cls;
    logic [EXP_W-1:0] exp;     // biased, 1..2046 when cls == CLS_NORM
    logic [LOG_W-1:0] frac;    // log2 of the result mantissa
  } lns_res_t;

  localparam fp64_t QNAN = '{sign: 1'b0, exp: 11'h7FF, mant: 52'h8_0000_0000_0000};

  function automatic fp_class_e fp_class(fp64_t x);
    if (x.exp == '0)           return CLS_ZERO;
    else if (x.exp == '1)      return (x.mant == '0) ? CLS_INF : CLS_NAN;
    else                       return CLS_NORM;
  endfunction

  function automatic logic is_snan(fp64_t x);
    return (x.exp == '1) && (x.mant != '0) && !x.mant[MANT_W-1];
  endfunction

  function automatic fp64_t fp_inf(logic s);
    return '{sign: s, exp: '1, mant: '0};
  endfunction

  function automatic fp64_t fp_zero(logic s);
    return '{sign: s, exp: '0, mant: '0};
  endfunction

endpackage
