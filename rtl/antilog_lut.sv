// antilog_lut: antilogarithm look-up table, 2^(j / 2^ABITS) - 1 for j = 0 .. 2^ABITS.
//
// After the log-domain ALU has added or subtracted two logarithms, the
// fraction of the result is rounded to ABITS bits (by the caller) and this
// table returns the mantissa bits of 2^fraction. The word is W+1 bits: the
// top bit is set only for j = 2^ABITS, where 2^1 - 1 = 1 tells the caller that
// the mantissa overflowed to 2 and the exponent must grow by one.
//
// The words are computed at elaboration. The generator first finds the
// constants 2^(2^-k), k = 1 .. ABITS, by repeated integer square roots of 2;
// 2^(j/2^ABITS) is then the product of the constants picked by the set bits
// of j. Arithmetic is 62-bit fixed point in 128 bits; each word is rounded to
// W fraction bits.
//
// Purely combinational. The use of an antilog table is from the FPU
// description; size, addressing and word width are this design's choices.
module antilog_lut #(
  parameter int ABITS = 10,
  parameter int W     = 52
) (
  input  logic [ABITS:0] idx,      // 0 .. 2^ABITS
  output logic [W:0]     mant      // 2^(idx/2^ABITS) - 1, W fraction bits
);

  localparam int P = 62;
  localparam int N = (1 << ABITS) + 1;

  typedef logic [ABITS:1][63:0] roots_t;

  // Integer square root of a 128-bit number, bit by bit.
  function automatic logic [63:0] isqrt(logic [127:0] n);
    logic [63:0]  root;
    logic [63:0]  c;
    root = '0;
    for (int b = 63; b >= 0; b--) begin
      c = root | (64'd1 << b);
      if (128'(c) * 128'(c) <= n) root = c;
    end
    return root;
  endfunction

  // ROOTS[k] = 2^(2^-k) in P-bit fixed point.
  function automatic roots_t make_roots();
    roots_t       t;
    logic [127:0] x;
    x = 128'd2 << P;
    for (int k = 1; k <= ABITS; k++) begin
      x = 128'(isqrt(x << P));
      t[k] = x[63:0];
    end
    return t;
  endfunction

  localparam roots_t ROOTS = make_roots();

  function automatic logic [W:0] alog_word(int unsigned j);
    logic [127:0] acc;
    if (j >= (1 << ABITS)) return {1'b1, {W{1'b0}}};
    acc = 128'd1 << P;
    for (int k = 1; k <= ABITS; k++) begin
      if (j[ABITS-k]) acc = (acc * 128'(ROOTS[k]) + (128'd1 << (P-1))) >> P;
    end
    acc = acc - (128'd1 << P);
    acc = (acc + (128'd1 << (P-W-1))) >> (P-W);
    return acc[W:0];
  endfunction

  logic [W:0] rom [N];

  for (genvar j = 0; j < N; j++) begin : g_word
    localparam logic [W:0] WORD = alog_word(j);
    assign rom[j] = WORD;
  end

  assign mant = rom[idx];

endmodule
