// tb_lesf_fp: exhaustive test of the binary16 LESF.
//
// All 65536 bit patterns are applied. For a normal operand with biased
// exponent e and mantissa m the expected result is worked out in real
// arithmetic: y = 2 m/1024 + 5/128, result exponent 2(e - 15) + floor(y),
// mantissa frac(y), with +0 (underflow) below the normal range and +inf
// (overflow) above it. Zero and subnormal operands must give +0, infinity
// +inf and NaN a NaN. For in-range results the relative error against the
// exact square must stay below 9% (the worst case, just below x = 0.5, is about 8.8%). One operand per clock cycle, with a
// watchdog.
module tb_lesf_fp;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a, sq;
  logic        ovf, unf;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_norm = 0;
  real worst = 0.0;

  lesf_fp dut (.a_i(a), .sq_o(sq), .ovf_o(ovf), .unf_o(unf));

  function automatic real fp16_value(logic [15:0] v);
    int  ex, mn;
    real scale;
    ex = int'(v[14:10]) - 15;
    mn = int'(v[9:0]);
    scale = 2.0 ** ex;
    return scale * (1.0 + real'(mn) / 1024.0);
  endfunction

  initial begin
    logic [15:0] expected;
    logic        exp_ovf, exp_unf;
    int          e, m, re, fl;
    real         y, exact, rel;
    for (int i = 0; i < 65536; i++) begin
      a = 16'(i);
      @(posedge clk);
      e = (i >> 10) & 31;
      m = i & 1023;
      exp_ovf = 1'b0;
      exp_unf = 1'b0;
      if (e == 31) begin
        expected = (m == 0) ? 16'h7C00 : 16'h7E00;
      end else if (e == 0) begin
        expected = 16'h0000;
        exp_unf  = (m != 0);
      end else begin
        y  = 2.0 * real'(m) / 1024.0 + 5.0 / 128.0;
        fl = int'($floor(y));
        re = 2 * (e - 15) + fl + 15;
        if (re <= 0) begin
          expected = 16'h0000;
          exp_unf  = 1'b1;
        end else if (re >= 31) begin
          expected = 16'h7C00;
          exp_ovf  = 1'b1;
        end else begin
          expected = {1'b0, 5'(re), 10'(int'((y - real'(fl)) * 1024.0))};
        end
      end
      checks++;
      if (sq != expected || ovf != exp_ovf || unf != exp_unf) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h sq=%h ovf=%0b unf=%0b expected=%h", a, sq, ovf, unf, expected);
      end
      if (exp_ovf) n_ovf++;
      if (exp_unf) n_unf++;
      if (e != 0 && e != 31 && !exp_ovf && !exp_unf) begin
        n_norm++;
        exact = fp16_value(a) * fp16_value(a);
        rel   = (fp16_value(sq) - exact) / exact;
        if (rel < 0.0) rel = -rel;
        if (rel > worst) worst = rel;
      end
    end
    $display("binary16 LESF: in-range=%0d overflow=%0d underflow=%0d worst relative error=%f", n_norm, n_ovf, n_unf, worst);
    checks++;
    if (worst > 0.09 || n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL accuracy or coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
