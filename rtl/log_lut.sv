// log_lut: logarithm look-up table, log2(1 + i / 2^ABITS) for i = 0 .. 2^ABITS.
//
// The multiply/divide path works on logarithms; this table turns the
// mantissa 1.M of an operand into log2(1.M). The mantissa is reduced to
// ABITS fraction bits (rounded by the caller), so the table has 2^ABITS + 1
// words: the last one, log2(2) = 1, catches a mantissa that rounds up to 2.
// Each word is the logarithm truncated to W fraction bits, with one integer
// bit in front (set only in the last word).
//
// The words are computed while the design is elaborated, by the classic
// squaring method: with x in [1,2), square x; if the square reaches 2, the
// next bit of log2(x) is 1 and x is halved. Arithmetic is 62-bit fixed point
// held in 128 bits, far more than W needs. No table file is read.
//
// Purely combinational: idx in, log_frac out in the same cycle. Using a
// table for the logarithm is taken from the FPU description; the table size,
// addressing and word width are this design's choices.
module log_lut #(
  parameter int ABITS = 10,   // address bits of the mantissa
  parameter int W     = 52    // fraction bits of each word
) (
  input  logic [ABITS:0] idx,        // 0 .. 2^ABITS
  output logic [W:0]     log_frac    // log2(1 + idx/2^ABITS), W fraction bits
);

  localparam int P = 62;             // fixed-point fraction bits in the generator
  localparam int N = (1 << ABITS) + 1;

  function automatic logic [W:0] log_word(int unsigned i);
    logic [127:0] v;
    logic [W:0]   y;
    y = '0;
    if (i >= (1 << ABITS)) begin
      y[W] = 1'b1;                   // log2(2) = 1
    end else begin
      v = (128'(1 << ABITS) + 128'(i)) << (P - ABITS);
      for (int k = 1; k <= W; k++) begin
        v = (v * v) >> P;
        if (v >= (128'd2 << P)) begin
          v = v >> 1;
          y[W-k] = 1'b1;
        end
      end
    end
    return y;
  endfunction

  logic [W:0] rom [N];

  for (genvar i = 0; i < N; i++) begin : g_word
    localparam logic [W:0] WORD = log_word(i);
    assign rom[i] = WORD;
  end

  assign log_frac = rom[idx];

endmodule
