// tb_ripple_sweep: output-ripple sweep of the boost converter loop over the
// counter DPWM resolution (N_DPWM = 4..7) and the ADC resolution
// (N_ADC = 4..11), once with a plain N_DPWM-bit counter DPWM and once with the
// 4-bit DDPM added (DDPWM), at Vin = 8 V, 25 Ohm, 13.8 V out, f_sw = 1.17 MHz.
//
// Quantisation steps at the output (Vo^2/Vin = 23.8 V per unit duty here):
//   one duty LSB:  23.8 V / 2^(N_DPWM [+4])
//   one ADC LSB:   9.2 * 3 V / 2^N_ADC = 27.6 V / 2^N_ADC
// A loop whose duty step is not larger than its ADC step has a duty level
// inside the zero-error bin, so with a small integral gain it must settle
// without a limit cycle; otherwise a limit cycle is possible and usually
// appears. The PID gains of every loop are scaled so that all have the same
// normalised loop gains (proportional 0.1, integral 0.0026 per sample,
// derivative 0.5 per sample); the derivative term damps the LC resonance.
// A loop has a limit cycle when its command moves and its ADC samples leave
// the zero-error bin.
//
// The LCO-free resolution rule of the reference is
//   N_DPWM(total) > N_ADC + B,  B = ceil(log2(Vin H / V_FS) + log2(1/(1-D)^2))
// which gives B = 0 here (D = 0.42), i.e. a duty step of at most half an ADC
// step.
// Checked:
//   (1) plain DPWM: every loop that meets the rule holds without a limit
//       cycle;
//   (2) plain DPWM: at least three quarters of the loops whose duty step is
//       larger than the ADC step limit-cycle;
//   (3) DDPWM: every loop that meets the rule with one bit to spare
//       (N_DPWM + 4 > N_ADC + B + 1, the default configuration included)
//       holds without a limit cycle;
//   (4) more loops hold without a limit cycle with the DDPWM than without.
// Not checked: where the ADC resolves the low-frequency part of the dither
// ripple (small N_DPWM, fine ADC) this lightly damped plant model lets the
// DDPWM loops limit-cycle as well, with ripple comparable to the plain DPWM;
// the table shows where.
module tb_ripple_sweep;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // PID gain in 1/65536 duty LSB per ADC LSB for a normalised loop gain g
  // (output volts commanded per output volt of error)
  function automatic int gain_for(real g, int u_bits, int n_adc);
    real k = g * 65536.0 * (27.6 / real'(1 << n_adc)) / (23.8 / real'(1 << u_bits));
    return (k < 1.0) ? 1 : int'(k);
  endfunction

  localparam real D_OP = 1.0 - 8.0 / 13.8;   // ideal boost duty at 8 V in

  logic done[2][4][8];
  int   nz[2][4][8], us[2][4][8];
  real  vm[2][4][8], vmin[2][4][8], vmax[2][4][8];

  for (genvar p = 0; p < 2; p++) begin : g_kind        // 0: DDPWM, 1: plain
    for (genvar n = 0; n < 4; n++) begin : g_n         // N_DPWM = 4 + n
      for (genvar a = 0; a < 8; a++) begin : g_a       // N_ADC = 4 + a
        boost_loop #(
          .N_DPWM(4 + n), .M_DDPM(4), .N_ADC(4 + a), .PLAIN(p == 1),
          .KP(gain_for(0.1, 4 + n + (p == 1 ? 0 : 4), 4 + a)),
          .KI(gain_for(0.0026, 4 + n + (p == 1 ? 0 : 4), 4 + a)),
          .KD(gain_for(0.5, 4 + n + (p == 1 ? 0 : 4), 4 + a)), .VIN(8.0), .RLOAD(25.0),
          .SETTLE(4000), .WINDOW(1000)
        ) loop (
          .clk(clk), .rst_n(rst_n), .done(done[p][n][a]), .n_zero(nz[p][n][a]),
          .u_spread(us[p][n][a]), .v_mean(vm[p][n][a]), .v_min(vmin[p][n][a]),
          .v_max(vmax[p][n][a]));
      end
    end
  end

  function automatic bit all_done();
    foreach (done[i, j, k]) if (!done[i][j][k]) return 0;
    return 1;
  endfunction

  initial begin
    automatic real pp_max[2] = '{0.0, 0.0};
    automatic int plain_breaks = 0, plain_lco = 0;
    automatic int n_hold[2] = '{0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    @(posedge clk);
    for (int p = 0; p < 2; p++) begin
      if (p == 0) $display("DDPWM (N_DPWM + 4 DDPM bits):");
      else        $display("plain DPWM:");
      $display("  peak-to-peak output ripple in mV (rows N_DPWM 4..7, columns N_ADC 4..11; * = limit cycle)");
      for (int n = 0; n < 4; n++) begin
        automatic string row = $sformatf("  N_DPWM %0d:", 4 + n);
        for (int a = 0; a < 8; a++) begin
          automatic real pp = vmax[p][n][a] - vmin[p][n][a];
          automatic int u_bits = 4 + n + (p == 0 ? 4 : 0);
          automatic real q_duty = 23.8 / real'(1 << u_bits);
          automatic real q_adc = 27.6 / real'(1 << (4 + a));
          automatic bit lco = us[p][n][a] > 0 && nz[p][n][a] < 1000;
          automatic int b_rule = $ceil($ln(8.0 / 9.2 / 3.0) / $ln(2.0)
                                       + $ln(1.0 / ((1.0 - D_OP) * (1.0 - D_OP))) / $ln(2.0));
          row = {row, $sformatf(" %5.0f%s", pp * 1000.0, lco ? "*" : " ")};
          if (pp > pp_max[p]) pp_max[p] = pp;
          if (!lco) n_hold[p]++;
          if (p == 1 && u_bits > 4 + a + b_rule)
            check(!lco, $sformatf("plain N_DPWM %0d N_ADC %0d: limit cycle although the resolution rule holds",
                                  4 + n, 4 + a));
          if (p == 0 && u_bits > 4 + a + b_rule + 1)
            check(!lco, $sformatf("DDPWM N_DPWM %0d N_ADC %0d: limit cycle although the resolution rule holds with a bit to spare",
                                  4 + n, 4 + a));
          if (p == 1 && q_duty > q_adc) begin
            plain_breaks++;
            if (lco) plain_lco++;
          end
        end
        $display("%s", row);
      end
    end
    $display("plain loops breaking the step condition: %0d, with a limit cycle: %0d", plain_breaks, plain_lco);
    $display("largest ripple: plain %.0f mV, DDPWM %.0f mV", pp_max[1] * 1000.0, pp_max[0] * 1000.0);
    check(plain_lco * 4 >= plain_breaks * 3, "plain DPWM limit-cycles in most loops that break the step condition");
    $display("loops without a limit cycle: DDPWM %0d of 32, plain %0d of 32", n_hold[0], n_hold[1]);
    check(n_hold[0] > n_hold[1], "more loops free of limit cycles with the DDPWM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
