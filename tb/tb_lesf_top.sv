// tb_lesf_top: end-to-end test of both squarers at their default sizes
// (16-bit integer, binary16 floating point).
//
// Every 16-bit integer operand and every binary16 pattern is applied, one
// pair per clock cycle. Expected values are worked out in real arithmetic
// from the defining equations (I = 2^k (1 + x), y = 2x + 5/128, result
// (1 + frac(y)) 2^(2k + floor(y))). The testbench counts how often each
// mechanism of the design occurs and fails if one never does:
//   integer: zero operand, y < 1, 1 <= y < 2, 2 <= y < 3, low fraction bits
//            dropped, exact fit, zero fill, saturation;
//   binary16: in-range result, overflow to +inf, underflow to +0, zero or
//            subnormal operand, infinity, NaN.
// It also requires errors of both signs on the integer side. A watchdog
// ends the run if it does not finish in time.
module tb_lesf_top;
  import lesf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] int_in;
  logic [31:0] int_sq;
  logic        int_sat;
  fp16_t       fp_in, fp_sq;
  logic        fp_ovf, fp_unf;
  int checks = 0, failures = 0;

  lesf_top dut (
    .int_i(int_in), .int_sq_o(int_sq), .int_sat_o(int_sat),
    .fp_i(fp_in), .fp_sq_o(fp_sq), .fp_ovf_o(fp_ovf), .fp_unf_o(fp_unf)
  );

  typedef enum int {
    M_ZERO, M_Y0, M_Y1, M_Y2, M_DROP, M_FIT, M_FILL, M_SAT, M_OVER, M_UNDER,
    F_NORMAL, F_OVF, F_UNF, F_ZERO_SUB, F_INF, F_NAN, M_COUNT
  } mech_e;
  int    seen [M_COUNT];
  string label [M_COUNT] = '{"int zero", "int y<1", "int 1<=y<2", "int 2<=y<3",
                             "int bits dropped", "int exact fit", "int zero fill",
                             "int saturation", "int over-estimate", "int under-estimate",
                             "fp in range", "fp overflow", "fp underflow",
                             "fp zero/subnormal operand", "fp infinity", "fp NaN"};

  task automatic check_int(int v);
    int k, e, fl;
    real x, y;
    longint unsigned expected;
    logic exp_sat;
    exp_sat = 1'b0;
    if (v == 0) begin
      expected = 0;
      seen[M_ZERO]++;
    end else begin
      k = 0;
      for (int i = 0; i < 16; i++) if (((v >> i) & 1) == 1) k = i;
      x  = real'(v) / (2.0 ** k) - 1.0;
      y  = 2.0 * x + 5.0 / 128.0;
      fl = int'($floor(y));
      e  = 2 * k + fl;
      seen[M_Y0 + fl]++;
      if (e >= 32) begin
        exp_sat  = 1'b1;
        expected = 64'hFFFF_FFFF;
        seen[M_SAT]++;
      end else begin
        expected = longint'($floor((1.0 + y - real'(fl)) * (2.0 ** e)));
        if (e < 15) seen[M_DROP]++;
        else if (e == 15) seen[M_FIT]++;
        else seen[M_FILL]++;
      end
      if (longint'(int_sq) > longint'(v) * longint'(v)) seen[M_OVER]++;
      if (longint'(int_sq) < longint'(v) * longint'(v)) seen[M_UNDER]++;
    end
    checks++;
    if (longint'(int_sq) != expected || int_sat != exp_sat) begin
      failures++;
      if (failures < 10) $display("FAIL int in=%0d sq=%0d sat=%0b expected=%0d", v, int_sq, int_sat, expected);
    end
  endtask

  task automatic check_fp(int v);
    int e, m, fl, re;
    real y;
    logic [15:0] expected;
    logic exp_ovf, exp_unf;
    e = (v >> 10) & 31;
    m = v & 1023;
    exp_ovf = 1'b0;
    exp_unf = 1'b0;
    if (e == 31) begin
      expected = (m == 0) ? 16'h7C00 : 16'h7E00;
      if (m == 0) seen[F_INF]++; else seen[F_NAN]++;
    end else if (e == 0) begin
      expected = 16'h0000;
      exp_unf  = (m != 0);
      seen[F_ZERO_SUB]++;
    end else begin
      y  = 2.0 * real'(m) / 1024.0 + 5.0 / 128.0;
      fl = int'($floor(y));
      re = 2 * (e - 15) + fl + 15;
      if (re <= 0) begin
        expected = 16'h0000;
        exp_unf  = 1'b1;
        seen[F_UNF]++;
      end else if (re >= 31) begin
        expected = 16'h7C00;
        exp_ovf  = 1'b1;
        seen[F_OVF]++;
      end else begin
        expected = {1'b0, 5'(re), 10'(int'((y - real'(fl)) * 1024.0))};
        seen[F_NORMAL]++;
      end
    end
    checks++;
    if (fp_sq != expected || fp_ovf != exp_ovf || fp_unf != exp_unf) begin
      failures++;
      if (failures < 10) $display("FAIL fp in=%h sq=%h ovf=%0b unf=%0b expected=%h", v, fp_sq, fp_ovf, fp_unf, expected);
    end
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 65536; i++) begin
      int_in = 16'(i);
      fp_in  = fp16_t'(16'(65535 - i));
      @(posedge clk);
      check_int(i);
      check_fp(65535 - i);
    end
    foreach (seen[i]) begin
      $display("mechanism %-26s occurred %0d times", label[i], seen[i]);
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", label[i]);
      end
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
