// tb_dpwm_top: end-to-end test of both designs at their default sizes.
//
// Power controller: the top drives a behavioural synchronous boost stage
// (L = 900 nH, Co = 3 uF, load 25-30 Ohm, Vin 7-10 V) through a divider of
// 1/9.2 and a 7-bit ADC with a 3 V range, regulating 13.8 V (set-point code
// 64) at f_sw = f_clk/32 with a 5-bit counter DPWM plus a 4-bit DDPM
// (9-bit DDPWM). With the integral gain used here the loop meets the
// no-limit-cycle conditions, so after each disturbance the ADC code must sit
// in the zero-error bin and the command u must stay constant (no limit
// cycle). Disturbances: start-up from Vin, a 25 -> 30 Ohm load step and an
// 8 -> 10 V input step. Then the ADC is overridden (open loop) to push the
// compensator into upper and lower saturation, which also makes the DDPWM
// adder carry into full-period pulses.
//
// DDPM DAC: in parallel it converts a sine (90 % of full swing) sampled once
// per 2^8 modulator ticks; every pattern must hold exactly "code" ones.
// For the second part of the run a calibration factor alpha = 0.05 is set;
// each loaded code must then equal the double-slope pre-distorted code.
//
// Every mechanism is counted and must occur at least once: DDPM-dithered
// periods, full-period (carry) pulses, upper/lower saturation, integrator
// clamp, steady zero-error regulation after each disturbance, DAC code loads,
// codes changed by the pre-distortion.
module tb_dpwm_top;
  localparam int N = dpwm_pkg::N_DPWM_DEF, M = dpwm_pkg::M_DDPM_DEF;
  localparam int NA = dpwm_pkg::N_ADC_DEF, GW = dpwm_pkg::GAIN_W_DEF;
  localparam int FR = dpwm_pkg::GAIN_FRAC_DEF, MD = dpwm_pkg::M_DAC_DEF;
  localparam int U = N + M;
  localparam int CYC_PER_MS = 37500;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_start, adc_valid_m, adc_valid;
  logic [NA-1:0] adc_code_m, adc_code, vref = NA'(64);
  logic signed [GW-1:0] kp = '0, ki = GW'(786), kd = '0;   // ki*Ts = 0.012
  logic pwm_d, pwm_d_n, u_valid, ddpm_bit, sat_hi, sat_lo, int_clamped;
  logic [U-1:0] u, u_h;
  logic [N:0] duty_cyc;
  logic signed [NA:0] err;
  logic dac_tick = 1'b0, dac_code_load, dac_out;
  logic [MD-1:0] dac_code_in = '0, dac_code_q;
  logic signed [15:0] dac_alpha = '0;

  real vin = 8.0, rload = 25.0, vo, il;
  logic load_init = 1'b1;
  bit   force_adc = 0;
  logic [NA-1:0] forced_code = '0;

  int checks = 0, failures = 0;
  int n_dither = 0, n_carry = 0, n_sat_hi = 0, n_sat_lo = 0, n_clamp = 0;
  int n_settled = 0, n_dac_loads = 0, n_predist = 0;

  dpwm_top dut (
    .clk(clk), .rst_n(rst_n),
    .pc_adc_start(adc_start), .pc_adc_valid(adc_valid), .pc_adc_code(adc_code),
    .pc_vref(vref), .pc_kp(kp), .pc_ki(ki), .pc_kd(kd),
    .pc_pwm_d(pwm_d), .pc_pwm_d_n(pwm_d_n), .pc_u(u), .pc_u_valid(u_valid),
    .pc_u_h(u_h), .pc_duty_cyc(duty_cyc), .pc_ddpm_bit(ddpm_bit),
    .pc_sat_hi(sat_hi), .pc_sat_lo(sat_lo), .pc_int_clamped(int_clamped), .pc_err(err),
    .dac_tick(dac_tick), .dac_code_in(dac_code_in), .dac_alpha(dac_alpha),
    .dac_code_load(dac_code_load),
    .dac_code_q(dac_code_q), .dac_out(dac_out));

  boost_model plant (
    .clk(clk), .gate(pwm_d), .vin(vin), .rload(rload), .v_init(vin),
    .load_init(load_init), .vo(vo), .il(il));

  adc_model #(.N_ADC(NA)) adc (
    .clk(clk), .rst_n(rst_n), .start(adc_start), .vo(vo),
    .valid(adc_valid_m), .code(adc_code_m));

  assign adc_valid = adc_valid_m;
  assign adc_code  = force_adc ? forced_code : adc_code_m;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Mechanism counters.
  always @(posedge clk) if (rst_n) begin
    if (adc_start) begin
      if (ddpm_bit) n_dither++;
      if (duty_cyc == (N + 1)'(1 << N)) n_carry++;
    end
    if (u_valid) begin
      n_sat_hi += int'(sat_hi);
      n_sat_lo += int'(sat_lo);
      n_clamp  += int'(int_clamped);
    end
  end

  // Statistics of the regulation over a window.
  int w_samples, w_zero, w_umin, w_umax;
  real w_vmin, w_vmax;
  bit  w_on = 0;
  always @(posedge clk) if (w_on) begin
    if (vo < w_vmin) w_vmin = vo;
    if (vo > w_vmax) w_vmax = vo;
    if (u_valid) begin
      w_samples++;
      if (err == 0) w_zero++;
      if (int'(u) < w_umin) w_umin = int'(u);
      if (int'(u) > w_umax) w_umax = int'(u);
    end
  end

  task automatic run_ms(input real ms);
    repeat (int'(ms * CYC_PER_MS)) @(posedge clk);
  endtask

  task automatic window(input real ms, input string tag);
    w_samples = 0; w_zero = 0; w_umin = 1 << 30; w_umax = -1;
    w_vmin = 1.0e9; w_vmax = -1.0e9;
    w_on = 1;
    run_ms(ms);
    w_on = 0;
    $display("%s: vo %.3f..%.3f V, ripple %.1f mV, u %0d..%0d, zero-error %0d/%0d samples",
             tag, w_vmin, w_vmax, (w_vmax - w_vmin) * 1000.0, w_umin, w_umax, w_zero, w_samples);
    check(w_samples > 0 && w_zero == w_samples, {tag, ": output held in the zero-error bin"});
    check(w_umax - w_umin <= 1, {tag, ": constant duty command (no limit cycle)"});
    check(w_vmin > 13.75 && w_vmax < 14.05, {tag, ": output near 13.8 V"});
    if (w_zero == w_samples && w_umax - w_umin <= 1) n_settled++;
  endtask

  // Reference pre-distortion: nearest integer of m/(1+a) below the knee
  // 2^(M-1)(1+a), of (m - 2^M a)/(1-a) above it; halves up, clamped.
  function automatic int predist(int mi, int ai);
    longint one = longint'(1) << 16, num, den, q;
    if ((longint'(mi) << 16) < (longint'(1) << (MD - 1)) * (one + longint'(ai))) begin
      num = longint'(mi) << 16;
      den = one + longint'(ai);
    end else begin
      num = (longint'(mi) << 16) - (longint'(ai) << MD);
      den = one - longint'(ai);
    end
    q = (2 * num + den) / (2 * den);
    return (q > (1 << MD) - 1) ? (1 << MD) - 1 : int'(q);
  endfunction

  // DDPM DAC stimulus: one tick every 4 clocks; sine codes per pattern.
  int dac_m = 0;
  always @(posedge clk) begin
    dac_tick <= ($urandom_range(0, 3) == 0);
  end
  always @(negedge clk) if (rst_n && dac_tick) begin
    // code presented for the next load
    dac_code_in = MD'(int'(128.0 + 0.9 * 128.0 * $sin(2.0 * 3.14159265 * real'(dac_m) / 20.0)));
  end
  always @(posedge clk) if (rst_n && dac_tick) begin
    if (dac_code_load) begin
      automatic int expected = predist(int'(dac_code_in), int'(dac_alpha));
      n_dac_loads++;
      if (expected != int'(dac_code_in)) n_predist++;
      #1 check(int'(dac_code_q) == expected, "DAC takes the (pre-distorted) presented code");
      dac_m++;
    end
  end
  // ones per pattern, counted on the output (one tick late)
  int pat_ones = 0, pat_ticks = 0, pat_code = -1;
  always @(posedge clk) if (rst_n && dac_tick) begin
    #2;
    pat_ones += int'(dac_out);
    pat_ticks++;
    if (pat_ticks == (1 << MD)) begin
      if (pat_code >= 0) check(pat_ones == pat_code, $sformatf("DAC pattern ones %0d for code %0d", pat_ones, pat_code));
      pat_code = int'(dac_code_q);
      pat_ones = 0;
      pat_ticks = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    load_init = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    run_ms(3.0);
    window(1.0, "start-up, Vin 8 V, 25 Ohm");
    rload = 30.0;
    dac_alpha = 16'sd3277;   // alpha = 0.05 from here on
    run_ms(3.0);
    window(1.0, "load step to 30 Ohm");
    vin = 10.0;
    run_ms(3.0);
    window(1.0, "input step to 10 V");
    // open loop: ADC overridden, compensator driven into saturation
    force_adc = 1;
    ki = GW'(40 <<< FR);
    kp = GW'(40 <<< FR);
    forced_code = NA'(0);
    run_ms(0.2);
    forced_code = NA'(127);
    run_ms(0.2);
    force_adc = 0;
    $display("dither periods %0d, carry periods %0d, sat_hi %0d, sat_lo %0d, clamp %0d, settled %0d, DAC loads %0d, pre-distorted %0d",
             n_dither, n_carry, n_sat_hi, n_sat_lo, n_clamp, n_settled, n_dac_loads, n_predist);
    check(n_dither > 0, "DDPM-dithered periods occurred");
    check(n_carry > 0, "full-period pulses (adder carry) occurred");
    check(n_sat_hi > 0, "upper saturation occurred");
    check(n_sat_lo > 0, "lower saturation occurred");
    check(n_clamp > 0, "integrator clamp occurred");
    check(n_settled == 3, "zero-error regulation after every disturbance");
    check(n_dac_loads > 10, "DAC codes loaded");
    check(n_predist > 0, "pre-distortion changed codes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * CYC_PER_MS) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
