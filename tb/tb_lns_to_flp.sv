// tb_lns_to_flp: checks the LNS-to-FLP converter. For a normal result with
// biased exponent e and log fraction f the output must be within a relative
// error of 2^(2^-(ABITS+1)) - 1 (plus 2^-50) of 2^(e-1023) * 2^f, computed with
// real arithmetic. A fraction that rounds to 1 must carry into the exponent,
// and at exponent 2046 give Inf with the overflow flag. Zero, Inf and NaN
// classes must give their IEEE encodings.
module tb_lns_to_flp;
  import fpu_pkg::*;
  localparam int ABITS = 10;

  lns_res_t r;
  fp64_t    y;
  logic     overflow;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  lns_to_flp #(.ABITS(ABITS)) dut (.r(r), .y(y), .overflow(overflow));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input lns_res_t v);
    real got, want, err, tol;
    logic ok;
    logic [63:0] w;
    r = v;
    @(posedge clk);
    ok = 1'b1;
    unique case (v.cls)
      CLS_ZERO: ok = (y == {v.sign, 63'd0}) && !overflow;
      CLS_INF:  ok = (y == {v.sign, 11'h7FF, 52'd0}) && !overflow;
      CLS_NAN:  ok = (y == QNAN) && !overflow;
      default: begin
        // reference in the unit interval, then compare field by field
        want = $pow(2.0, real'(v.frac) / (2.0 ** LOG_W));          // in [1,2)
        if (v.exp == 11'd2046 && want > 2.0 - 2.0 ** -(ABITS+1)) begin
          ok = (y == {v.sign, 11'h7FF, 52'd0}) && overflow;
        end else begin
          got = (y.exp == v.exp) ? 1.0 + real'(y.mant) / (2.0 ** 52)
              : (y.exp == v.exp + 1) ? 2.0 * (1.0 + real'(y.mant) / (2.0 ** 52)) : -1.0;
          err = got - want;
          if (err < 0.0) err = -err;
          tol = ($pow(2.0, 2.0 ** -(ABITS+1)) - 1.0) * want + 2.0 ** -50;
          ok  = (y.sign == v.sign) && (err <= tol) && !overflow;
        end
      end
    endcase
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL exp=%0d frac=%h cls=%s -> %h ovf=%b", v.exp, v.frac, v.cls.name(), y, overflow);
    end
  endtask

  initial begin
    lns_res_t v;
    v = '{sign: 1'b0, cls: CLS_NORM, exp: 11'd1023, frac: '0};          check(v);  // 1.0
    v = '{sign: 1'b1, cls: CLS_NORM, exp: 11'd1000, frac: '1};          check(v);  // carry
    v = '{sign: 1'b0, cls: CLS_NORM, exp: 11'd2046, frac: '1};          check(v);  // overflow
    v = '{sign: 1'b0, cls: CLS_NORM, exp: 11'd2046, frac: 52'h8_0000_0000_0000}; check(v);
    v = '{sign: 1'b1, cls: CLS_ZERO, exp: 11'd0, frac: '0};             check(v);
    v = '{sign: 1'b1, cls: CLS_INF,  exp: 11'd0, frac: '0};             check(v);
    v = '{sign: 1'b0, cls: CLS_NAN,  exp: 11'd0, frac: '0};             check(v);
    // fractions that round up to the table's last word (mantissa carry)
    for (int i = 0; i < 200; i++) begin
      v.sign = 1'($urandom);
      v.cls  = CLS_NORM;
      v.exp  = 11'($urandom_range(2045, 1));
      v.frac = {{(ABITS+1){1'b1}}, (LOG_W-ABITS-1)'({$urandom, $urandom})};
      check(v);
    end
    for (int i = 0; i < 5000; i++) begin
      v.sign = 1'($urandom);
      v.cls  = CLS_NORM;
      v.exp  = 11'($urandom_range(2045, 1));
      v.frac = {20'($urandom), $urandom};
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
