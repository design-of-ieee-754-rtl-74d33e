// tb_antilog_lut: checks every word of the antilog table against 2^x - 1 computed
// with the simulator's real arithmetic ($pow). A word may be at most 2^-50 off
// (it is rounded to 52 fraction bits). Runs at ABITS = 8 to stay short; the
// generator is the same at every size.
module tb_antilog_lut;
  localparam int ABITS = 8;
  localparam int W     = 52;

  logic [ABITS:0] idx;
  logic [W:0]     mant;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  antilog_lut #(.ABITS(ABITS), .W(W)) dut (.idx(idx), .mant(mant));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real got, want, err;
    for (int i = 0; i <= (1 << ABITS); i++) begin
      idx = (ABITS+1)'(i);
      @(posedge clk);
      got  = real'(mant) / (2.0 ** W);
      want = $pow(2.0, real'(i) / real'(1 << ABITS)) - 1.0;
      err  = got - want;
      if (err < 0.0) err = -err;
      checks++;
      if (err > 2.0 ** -50) begin
        failures++;
        if (failures < 10) $display("FAIL idx=%0d got=%.17f want=%.17f", i, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
