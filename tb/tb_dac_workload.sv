// tb_dac_workload: the 8-bit DDPM DAC as evaluated on its prototype: a
// modulator clock of 2 MHz (one tick per clock), an RC filter of 100 kOhm and
// 1 nF on a 3.3 V pin, so a sample rate of 2 MHz / 256 = 7812.5 S/s.
//
// The pin driver is given a falling edge 4 % of a step late (EPS = 0.04), so
// every high pulse carries 4 % extra charge and the transfer curve has two
// slopes (1 + EPS below half scale, 1 - EPS above). Three parts:
//   1. sample rate: codes are taken once every 256 ticks (128 us);
//   2. static: every code 0..255 is held, the filtered output averaged over
//      whole patterns, and the INL (deviation from VDD m / 256 in 8-bit
//      LSBs) computed; once with alpha = 0, once with alpha calibrated from
//      the code-64 level. The calibrated curve must stay within one LSB and
//      be at least three times straighter;
//   3. dynamic: the 25 Hz sine of 90 % swing, x[m] = 128 + 0.9*128*sin(2 pi m
//      25 / f_s), for two full periods (625 samples); SNDR from a
//      three-parameter sine fit (everything but the 25 Hz tone and DC counts
//      as noise), ENOB = (SNDR - 1.76) / 6.02. It is computed twice: on the
//      filter output at every tick (residual pattern ripple counts as noise)
//      and on its average over each sample period. With pre-distortion the
//      DAC must reach at least 7 effective bits in band, and both figures
//      must improve by more than 3 dB over alpha = 0.
module tb_dac_workload;
  localparam int  M    = 8;
  localparam real VDD  = 3.3;
  localparam real LSB  = VDD / 256.0;
  localparam real FS   = 2.0e6 / 256.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #250 clk = ~clk;                // 500 ns period (2 MHz)

  logic [M-1:0] code = '0, code_pd, code_q;
  logic signed [15:0] alpha = '0;
  logic code_load, dac_out;
  real v;
  int checks = 0, failures = 0;

  ddpm_predistort #(.M_DDPM(M), .ALPHA_W(16)) pd (.m(code), .alpha(alpha), .m_out(code_pd));
  ddpm_dac #(.M_DDPM(M)) dac (
    .clk(clk), .rst_n(rst_n), .tick(1'b1), .code_in(code_pd),
    .code_load(code_load), .code_q(code_q), .dac_out(dac_out));
  ddpm_rc_model #(.EPS(0.04)) rc (.clk(clk), .rst_n(rst_n), .pin(dac_out), .v_out(v));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // wait for the next code load (end of a pattern)
  task automatic next_load();
    do @(posedge clk); while (!code_load);
  endtask

  // hold code m, let the filter settle, average v over whole patterns
  task automatic level(input int m, output real avg);
    real sum = 0.0;
    code = M'(m);
    next_load();                        // taken here
    repeat (8) next_load();             // about 10 time constants
    for (int i = 0; i < 4 * 256; i++) begin
      @(posedge clk);
      #1 sum += v;
    end
    avg = sum / (4.0 * 256.0);
  endtask

  task automatic inl_sweep(output real inl_max);
    real avg, inl;
    inl_max = 0.0;
    for (int m = 0; m < 256; m++) begin
      level(m, avg);
      inl = (avg - LSB * real'(m)) / LSB;
      if (inl < 0.0) inl = -inl;
      if (inl > inl_max) inl_max = inl;
    end
  endtask

  // SNDR of a record by a three-parameter fit of the 25 Hz tone (dt apart)
  function automatic real fit_sndr(ref real xs[$], input real dt);
    real a = 0.0, b = 0.0, dc = 0.0, p_tot = 0.0, p_sig, t;
    int n = xs.size();
    foreach (xs[i]) dc += xs[i];
    dc /= real'(n);
    foreach (xs[i]) begin
      t = 2.0 * 3.14159265358979 * 25.0 * real'(i) * dt;
      a += (xs[i] - dc) * $sin(t);
      b += (xs[i] - dc) * $cos(t);
      p_tot += (xs[i] - dc) * (xs[i] - dc);
    end
    a = 2.0 * a / real'(n);
    b = 2.0 * b / real'(n);
    p_tot /= real'(n);
    p_sig = (a * a + b * b) / 2.0;
    return 10.0 * $log10(p_sig / (p_tot - p_sig));
  endfunction

  // sndr_wide: filter output taken every tick (all ripple counts as noise);
  // sndr_band: filter output averaged over each sample period (ripple above
  // the sample rate removed)
  task automatic sine_run(output real sndr_wide, output real sndr_band);
    real vs[$], va[$];
    // the first samples let the filter settle to the waveform
    for (int k = -40; k < 625; k++) begin
      code = M'(int'($floor(128.0 + 0.9 * 128.0 * $sin(2.0 * 3.14159265358979 * real'(k) * 25.0 / FS) + 0.5)));
      next_load();
      if (k >= 0) begin
        real acc = 0.0;
        for (int i = 0; i < 256; i++) begin
          @(posedge clk);
          #1 vs.push_back(v);
          acc += v;
        end
        va.push_back(acc / 256.0);
      end else repeat (255) @(posedge clk);
    end
    sndr_wide = fit_sndr(vs, 500.0e-9);
    sndr_band = fit_sndr(va, 1.0 / FS);
  endtask

  initial begin
    real inl0, inl1, lvl64, sndr0, sndr1, band0, band1, t0, t1;
    int loads;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // 1. sample rate
    next_load();
    t0 = $realtime;
    loads = 0;
    repeat (10) begin
      next_load();
      loads++;
    end
    t1 = $realtime;
    $display("sample period %.1f us (%.1f S/s)", (t1 - t0) / 1000.0 / loads, 1.0e9 * loads / (t1 - t0));
    check((t1 - t0) == real'(loads) * 256.0 * 500.0, "one code every 256 ticks (7812.5 S/s)");

    // 2. static linearity
    alpha = '0;
    inl_sweep(inl0);
    level(64, lvl64);
    alpha = 16'(int'($floor((lvl64 / (64.0 * LSB) - 1.0) * 65536.0 + 0.5)));
    $display("calibrated alpha = %0d / 65536 (%.4f)", alpha, real'(alpha) / 65536.0);
    check(alpha > 16'sd2000 && alpha < 16'sd3300, "calibrated alpha near the modelled 0.04");
    inl_sweep(inl1);
    $display("max |INL|: %.2f LSB without pre-distortion, %.2f LSB with", inl0, inl1);
    check(inl1 <= 1.0, "pre-distorted DAC within 1 LSB");
    check(inl1 * 3.0 <= inl0, "pre-distortion straightens the curve at least threefold");

    // 3. 25 Hz sine
    alpha = '0;
    sine_run(sndr0, band0);
    alpha = 16'(int'($floor((lvl64 / (64.0 * LSB) - 1.0) * 65536.0 + 0.5)));
    sine_run(sndr1, band1);
    $display("25 Hz sine, without pre-distortion: SNDR %.2f dB (ENOB %.2f) wideband, %.2f dB (ENOB %.2f) per-sample average",
             sndr0, (sndr0 - 1.76) / 6.02, band0, (band0 - 1.76) / 6.02);
    $display("25 Hz sine, with pre-distortion:    SNDR %.2f dB (ENOB %.2f) wideband, %.2f dB (ENOB %.2f) per-sample average",
             sndr1, (sndr1 - 1.76) / 6.02, band1, (band1 - 1.76) / 6.02);
    check((band1 - 1.76) / 6.02 >= 7.0, "at least 7 effective bits in band with pre-distortion");
    check(band1 > band0 + 3.0 && sndr1 > sndr0 + 3.0, "pre-distortion improves SNDR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
