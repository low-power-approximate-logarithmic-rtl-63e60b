// tb_lesf_shifter: self-checking test of the exponent adder / left shift.
// For every k and random R_y (both integer-part values up to 2) the expected
// output is floor((1 + frac(y)) * 2^(2k + floor(y))) worked out in real
// arithmetic, saturated to all ones when the exponent reaches 2n, and zero
// when the zero flag is set. Counts the three placement cases (bits dropped,
// exact fit, zero fill) and saturation; each must occur. One vector per
// clock cycle, with a watchdog.
module tb_lesf_shifter;
  localparam int unsigned N_W = 16;
  localparam int unsigned K_W = $clog2(N_W);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             zero;
  logic [K_W-1:0]   k;
  logic [N_W:0]     ry;
  logic [2*N_W-1:0] sq;
  logic             sat;
  int checks = 0, failures = 0;
  int n_drop = 0, n_fit = 0, n_fill = 0, n_sat = 0;

  lesf_shifter #(.N_W(N_W)) dut (.zero_i(zero), .k_i(k), .ry_i(ry), .sq_o(sq), .sat_o(sat));

  task automatic apply(logic z, int kk, int yint, int yfrac);
    int e;
    real v;
    longint unsigned expected;
    logic exp_sat;
    zero = z;
    k    = K_W'(kk);
    ry   = {2'(yint), 15'(yfrac)};
    e    = 2 * kk + yint;
    v    = (1.0 + real'(yfrac) / 32768.0) * (2.0 ** e);
    exp_sat = !z && (e >= 2 * N_W);
    if (z)            expected = 0;
    else if (exp_sat) expected = 64'hFFFF_FFFF;
    else              expected = longint'($floor(v));
    if (!z && !exp_sat) begin
      if (e < N_W - 1) n_drop++;
      else if (e == N_W - 1) n_fit++;
      else n_fill++;
    end
    if (exp_sat) n_sat++;
    @(posedge clk);
    checks++;
    if (longint'(sq) != expected || sat != exp_sat) begin
      failures++;
      if (failures < 10)
        $display("FAIL z=%0b k=%0d y=%0d+%0d/2^15 sq=%h sat=%0b expected=%h", z, kk, yint, yfrac, sq, sat, expected);
    end
  endtask

  initial begin
    for (int kk = 0; kk < N_W; kk++)
      for (int yi = 0; yi < 3; yi++) begin
        apply(1'b0, kk, yi, 0);
        apply(1'b0, kk, yi, 32767);
        for (int r = 0; r < 200; r++) apply(1'b0, kk, yi, int'($urandom % 32768));
      end
    apply(1'b1, 0, 0, 0);
    apply(1'b1, 7, 1, 1234);
    checks++;
    if (n_drop == 0 || n_fit == 0 || n_fill == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL a placement case never occurred");
    end
    $display("placements: dropped=%0d fit=%0d filled=%0d saturated=%0d", n_drop, n_fit, n_fill, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
