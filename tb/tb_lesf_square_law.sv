// tb_lesf_square_law: square-law AM detector run through the integer LESF.
//
// A 50 Hz square-wave message m(t) modulates a 1 kHz carrier,
// s(t) = Ac (1 + ka m(t)) cos(2 pi fc t) with ka m(t) = +/-0.01, sampled at
// 10 kHz. Each sample's magnitude (16-bit, Ac = 30000) is squared by the
// LESF and, for comparison, exactly and by a Mitchell-style log squarer
// computed here in software. After removing the mean (the DC term) each
// squared stream goes through the same 49-tap (order 48) low-pass FIR with
// a 150 Hz cut-off, a Hamming-windowed sinc designed here, and is scaled by
// 1/Ac^2. The Euclidean distance of each demodulated signal from the exact
// one is reported. The checks: every LESF output matches the defining
// equations, the LESF distance is below the Mitchell distance, and the LESF
// demodulated signal follows the message (correlation with the exact one
// above 0.9). The filter, amplitude and run length are this testbench's
// choices. One sample per clock cycle, with a watchdog.
module tb_lesf_square_law;
  localparam int    NS   = 2000;       // samples: 0.2 s, ten message periods
  localparam int    TAPS = 49;
  localparam real   FS   = 10000.0;
  localparam real   FC   = 1000.0;
  localparam real   FM   = 50.0;
  localparam real   AC   = 30000.0;
  localparam real   PI   = 3.14159265358979;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] in;
  logic [31:0] sq;
  logic        sat;
  int checks = 0, failures = 0;

  lesf_int dut (.in_i(in), .sq_o(sq), .sat_o(sat));

  real sq_exact [NS];
  real sq_lesf  [NS];
  real sq_mitch [NS];
  real h [TAPS];

  function automatic longint unsigned ref_lesf(longint unsigned v);
    int k, e;
    real x, y, fy;
    if (v == 0) return 0;
    k = 0;
    for (int i = 0; i < 16; i++) if (v[i]) k = i;
    x  = real'(v) / (2.0 ** k) - 1.0;
    y  = 2.0 * x + 5.0 / 128.0;
    fy = $floor(y);
    e  = 2 * k + int'(fy);
    return longint'($floor((1.0 + y - fy) * (2.0 ** e)));
  endfunction

  // Mitchell: 2^(2k) (1 + 2x) for x < 0.5, 2^(2k+1) (2x) otherwise
  function automatic real mitchell(longint unsigned v);
    int k;
    real x;
    if (v == 0) return 0.0;
    k = 0;
    for (int i = 0; i < 16; i++) if (v[i]) k = i;
    x = real'(v) / (2.0 ** k) - 1.0;
    return (x < 0.5) ? (2.0 ** (2 * k)) * (1.0 + 2.0 * x) : (2.0 ** (2 * k + 1)) * (2.0 * x);
  endfunction

  task automatic demodulate(ref real src [NS], output real dst [NS]);
    real mean, acc;
    mean = 0.0;
    foreach (src[i]) mean = mean + src[i];
    mean = mean / NS;
    for (int i = 0; i < NS; i++) begin
      acc = 0.0;
      for (int t = 0; t < TAPS; t++)
        if (i - t >= 0) acc = acc + h[t] * (src[i-t] - mean);
      dst[i] = acc / (AC * AC);
    end
  endtask

  initial begin
    real s, m, wc, hsum, d_lesf, d_mitch, sxy, sxx, syy, corr;
    real dm_exact [NS];
    real dm_lesf  [NS];
    real dm_mitch [NS];
    longint unsigned v;

    // order-48 low-pass FIR, cut-off 150 Hz, Hamming window, unity DC gain
    wc = 2.0 * PI * 150.0 / FS;
    hsum = 0.0;
    for (int t = 0; t < TAPS; t++) begin
      real n;
      n = real'(t) - real'(TAPS - 1) / 2.0;
      h[t] = ((n == 0.0) ? wc / PI : $sin(wc * n) / (PI * n))
             * (0.54 - 0.46 * $cos(2.0 * PI * real'(t) / real'(TAPS - 1)));
      hsum = hsum + h[t];
    end
    for (int t = 0; t < TAPS; t++) h[t] = h[t] / hsum;

    for (int i = 0; i < NS; i++) begin
      m = ($sin(2.0 * PI * FM * real'(i) / FS) >= 0.0) ? 1.0 : -1.0;
      s = AC * (1.0 + 0.01 * m) * $cos(2.0 * PI * FC * real'(i) / FS);
      v = longint'((s < 0.0) ? -s : s);
      in = 16'(v);
      @(posedge clk);
      checks++;
      if (longint'(sq) != ref_lesf(v) || sat) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d in=%0d sq=%0d expected=%0d", i, v, sq, ref_lesf(v));
      end
      sq_exact[i] = real'(v) * real'(v);
      sq_lesf[i]  = real'(sq);
      sq_mitch[i] = mitchell(v);
    end

    demodulate(sq_exact, dm_exact);
    demodulate(sq_lesf,  dm_lesf);
    demodulate(sq_mitch, dm_mitch);

    d_lesf = 0.0; d_mitch = 0.0; sxy = 0.0; sxx = 0.0; syy = 0.0;
    for (int i = TAPS; i < NS; i++) begin
      d_lesf  = d_lesf  + (dm_lesf[i]  - dm_exact[i]) ** 2;
      d_mitch = d_mitch + (dm_mitch[i] - dm_exact[i]) ** 2;
      sxy = sxy + dm_lesf[i] * dm_exact[i];
      sxx = sxx + dm_lesf[i] * dm_lesf[i];
      syy = syy + dm_exact[i] * dm_exact[i];
    end
    d_lesf  = $sqrt(d_lesf);
    d_mitch = $sqrt(d_mitch);
    corr    = sxy / $sqrt(sxx * syy);
    $display("square-law detector: Euclidean distance LESF=%f Mitchell=%f, correlation LESF/exact=%f",
             d_lesf, d_mitch, corr);
    checks++;
    if (!(d_lesf < d_mitch)) begin
      failures++;
      $display("FAIL LESF is not closer to the exact demodulation than Mitchell");
    end
    checks++;
    if (corr < 0.9) begin
      failures++;
      $display("FAIL LESF demodulation does not follow the message");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
