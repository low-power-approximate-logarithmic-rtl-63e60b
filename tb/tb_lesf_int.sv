// tb_lesf_int: exhaustive test of the integer LESF at n = 16 and n = 8.
//
// Every operand is applied. The expected output is worked out in real
// arithmetic from the defining equations: I = 2^k (1 + x), y = 2x + 5/128,
// O = floor((1 + frac(y)) 2^(2k + floor(y))), saturated to 2^(2n) - 1 when
// 2k + floor(y) = 2n, and 0 for I = 0. The testbench also measures accuracy
// over the whole 16-bit range: the mean relative error distance must be
// close to 0.03, the average signed error close to -1.45e7, and errors of
// both signs must occur (the LESF's two-sided error). One operand per clock
// cycle, with a watchdog.
module tb_lesf_int;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] in16;
  logic [31:0] sq16;
  logic        sat16;
  logic [7:0]  in8;
  logic [15:0] sq8;
  logic        sat8;
  int checks = 0, failures = 0;

  lesf_int dut16 (.in_i(in16), .sq_o(sq16), .sat_o(sat16));
  lesf_int #(.N_W(8)) dut8 (.in_i(in8), .sq_o(sq8), .sat_o(sat8));

  // reference LESF for an n-bit operand
  function automatic longint unsigned ref_lesf(int n, longint unsigned v, output logic s);
    int k, e;
    real x, y, fy;
    s = 1'b0;
    if (v == 0) return 0;
    k = 0;
    for (int i = 0; i < n; i++) if (v[i]) k = i;
    x  = real'(v) / (2.0 ** k) - 1.0;
    y  = 2.0 * x + 5.0 / 128.0;
    fy = $floor(y);
    e  = 2 * k + int'(fy);
    if (e >= 2 * n) begin
      s = 1'b1;
      return (longint'(1) << (2 * n)) - 1;
    end
    return longint'($floor((1.0 + y - fy) * (2.0 ** e)));
  endfunction

  real mred, ae, rel;
  int  n_pos, n_neg;

  initial begin
    longint unsigned expected;
    logic exp_sat;
    mred = 0.0; ae = 0.0; n_pos = 0; n_neg = 0;
    for (int i = 0; i < 65536; i++) begin
      in16 = 16'(i);
      in8  = 8'(i);
      @(posedge clk);
      expected = ref_lesf(16, longint'(i), exp_sat);
      checks++;
      if (longint'(sq16) != expected || sat16 != exp_sat) begin
        failures++;
        if (failures < 10) $display("FAIL n=16 in=%0d sq=%0d sat=%0b expected=%0d", i, sq16, sat16, expected);
      end
      if (i > 0) begin
        rel  = (real'(sq16) - real'(i) * real'(i)) / (real'(i) * real'(i));
        mred = mred + ((rel < 0.0) ? -rel : rel);
        ae   = ae + real'(sq16) - real'(i) * real'(i);
        if (rel > 0.0) n_pos++;
        if (rel < 0.0) n_neg++;
      end
      if (i < 256) begin
        expected = ref_lesf(8, longint'(i), exp_sat);
        checks++;
        if (longint'(sq8) != expected || sat8 != exp_sat) begin
          failures++;
          if (failures < 10) $display("FAIL n=8 in=%0d sq=%0d sat=%0b expected=%0d", i, sq8, sat8, expected);
        end
      end
    end
    mred = mred / 65536.0;
    ae   = ae / 65536.0;
    $display("16-bit LESF: MRED=%f AE=%e over-estimates=%0d under-estimates=%0d", mred, ae, n_pos, n_neg);
    checks++;
    if (mred < 0.027 || mred > 0.031) begin
      failures++;
      $display("FAIL MRED %f outside [0.027, 0.031]", mred);
    end
    checks++;
    if (ae > -1.3e7 || ae < -1.6e7) begin
      failures++;
      $display("FAIL AE %e outside [-1.6e7, -1.3e7]", ae);
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL error is not two-sided");
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
