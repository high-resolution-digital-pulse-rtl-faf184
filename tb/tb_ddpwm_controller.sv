// tb_ddpwm_controller: checks the controller's sample-compute-apply loop.
// A small ADC model answers every adc_start strobe after a random conversion
// time with a random code. An integer PID model (same equations as the
// compensator, written independently) predicts u for each sample. Checked:
// adc_start comes once per SD switching periods of 2^N_DPWM clocks (the
// controller is run with SAMPLE_DIV = SD = 2, one sample every second
// period, which exercises the divider; SAMPLE_DIV = 1 is exercised by the
// closed-loop tests); u_valid two clocks after
// adc_valid with the predicted u; the DDPWM register takes the newest u at
// the end of every period (a conversion that ends too late is used one
// period later); pwm_d_n is always the complement of pwm_d; the on-time of
// pwm_d in each period equals the reported duty. Both the in-time and the
// late-ADC case must occur.
module tb_ddpwm_controller;
  localparam int N = 5, M = 4, NA = 7, U = N + M, GW = 24, FR = 16, SD = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_start, adc_valid = 1'b0;
  logic [NA-1:0] adc_code = '0, vref = 7'd64;
  logic signed [GW-1:0] kp = 24'sd20 <<< (FR - 3), ki = 24'sd3000, kd = 24'sd79 <<< (FR - 5);
  logic pwm_d, pwm_d_n, u_valid, ddpm_bit, sat_hi, sat_lo, int_clamped;
  logic [U-1:0] u, u_h;
  logic [N:0] duty_cyc;
  logic signed [NA:0] err;
  int checks = 0, failures = 0;
  int n_late = 0, n_ontime = 0;

  ddpwm_controller #(.N_DPWM(N), .M_DDPM(M), .N_ADC(NA), .GAIN_W(GW), .GAIN_FRAC(FR),
                     .SAMPLE_DIV(SD)) dut (
    .clk(clk), .rst_n(rst_n), .adc_start(adc_start), .adc_valid(adc_valid), .adc_code(adc_code),
    .vref(vref), .kp(kp), .ki(ki), .kd(kd), .pwm_d(pwm_d), .pwm_d_n(pwm_d_n), .u(u),
    .u_valid(u_valid), .u_h(u_h), .duty_cyc(duty_cyc), .ddpm_bit(ddpm_bit), .sat_hi(sat_hi),
    .sat_lo(sat_lo), .int_clamped(int_clamped), .err(err));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // PID model
  longint integ = 0, e_prev = 0, umax = (longint'(1) << U) - 1;
  function automatic longint pid_step(input int code);
    longint ek, tot, q;
    ek = longint'(vref) - longint'(code);
    integ = integ + longint'(ki) * ek;
    if (integ < 0) integ = 0;
    if (integ > (umax << FR)) integ = umax << FR;
    tot = longint'(kp) * ek + integ + longint'(kd) * (ek - e_prev);
    e_prev = ek;
    q = (tot + (longint'(1) << (FR - 1))) >>> FR;
    if (q < 0) q = 0;
    if (q > umax) q = umax;
    return q;
  endfunction

  // ADC model
  int cyc = 0, last_start = -1, conv_left = -1, valid_at = -1;
  longint exp_u = 0, latest_u = 0;
  int next_code = 0, hi = 0, exp_on = 0;
  bit pending_u = 0;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    check(pwm_d_n == ~pwm_d, "complementary gate outputs");
    // adc_start period
    if (adc_start) begin
      if (last_start >= 0) check(cyc - last_start == SD * (1 << N), "one ADC start per SD switching periods");
      last_start = cyc;
      conv_left = ($urandom_range(0, 9) == 0) ? $urandom_range(31, 40) : $urandom_range(1, 20);
      if (conv_left > 30) n_late++; else n_ontime++;
      next_code = $urandom_range(40, 90);
    end
    // u_valid timing and value
    if (valid_at >= 0 && cyc == valid_at + 2) begin
      check(u_valid, "u_valid two clocks after adc_valid");
      check(longint'(u) == exp_u, $sformatf("u got %0d expected %0d", u, exp_u));
      latest_u = exp_u;
    end else check(!u_valid, "no spurious u_valid");
    // ADC response
    adc_valid = 1'b0;
    if (conv_left == 0) begin
      adc_valid = 1'b1;
      adc_code = NA'(next_code);
      exp_u = pid_step(next_code);
      valid_at = cyc;
      conv_left = -1;
    end else if (conv_left > 0) conv_left--;
    // on-time of each period: pwm_d is registered, one clock late
    if (dut.u_ddpwm.u_carrier.r == 0 && last_start >= 0) begin
      check(hi + int'(pwm_d) == exp_on, "on-time equals reported duty");
      hi = 0;
    end else hi += int'(pwm_d);
    if (dut.wrap) exp_on = int'(duty_cyc);
  end

  // The DDPWM register must hold the newest u after every period end.
  always @(posedge clk) if (rst_n && dut.wrap) begin
    automatic logic [U-1:0] u_before = u;   // value before this edge
    #1;
    check(u_h == u_before, "duty register takes the newest command");
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (600 * (1 << N)) @(posedge clk);
    check(n_late > 0 && n_ontime > 0, "both in-time and late conversions occurred");
    $display("late %0d in-time %0d", n_late, n_ontime);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
