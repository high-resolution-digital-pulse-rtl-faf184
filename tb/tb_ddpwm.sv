// tb_ddpwm: checks the dyadic digital PWM cycle by cycle.
// A tb model latches the command at every end of period and steps its own
// DDPM pattern counter. The pattern is built from the recursive DDPM
// definition, so the expected on-time of a period is
//   u_hM + Sigma_{u_hL}[(k-1) mod 2^M]   (0 dither when k = 0),
// with k the period index within the pattern. Checked: the registered PWM
// output in every clock (high for the first on-time cycles of each period,
// one clock late), the on-time of every period, the total on-time over every
// complete DDPM pattern (u_hM 2^M + u_hL, i.e. the average duty of N+M bits),
// the period length 2^N clocks, and the 100 % case where the dither bit
// carries u_hM = 2^N-1 to a full period.
module tb_ddpwm;
  localparam int N = 5;
  localparam int M = 4;
  localparam int U = N + M;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [U-1:0] u_in = '0;
  logic c, wrap, ddpm_bit;
  logic [U-1:0] u_h;
  logic [N:0] duty_cyc;
  int checks = 0, failures = 0;
  int carry_periods = 0, dither_periods = 0;

  ddpwm #(.N_DPWM(N), .M_DDPM(M)) dut (
    .clk(clk), .rst_n(rst_n), .u_in(u_in), .c(c), .wrap(wrap),
    .u_h(u_h), .duty_cyc(duty_cyc), .ddpm_bit(ddpm_bit));

  always #5 clk = ~clk;

  function automatic bit theta_bit(int i, int t, int m);
    int half = (1 << (i - 1)) - 1;
    if (t < half) return theta_bit(i - 1, t, m);
    if (t == half) return bit'((m >> (M - i)) & 1);
    return theta_bit(i - 1, t - half - 1, m);
  endfunction

  function automatic int on_time(int uh, int k);
    int dith = (k == 0) ? 0 : int'(theta_bit(M, k - 1, uh % (1 << M)));
    return (uh >> M) + dith;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Cycle model.
  int m_r = 0, m_uh = 0, m_k = 0;
  int exp_cur = 0, exp_prev = 0, hi = 0, periods = 0;
  int pat_sum = 0, pat_cnt = 0, pat_uh = -1;
  bit running = 0;

  always @(negedge clk) if (running) begin
    int expect_c;
    check(int'(dut.u_carrier.r) == m_r, "carrier phase");
    check(wrap == (m_r == (1 << N) - 1), "wrap strobe");
    exp_cur = on_time(m_uh, m_k);
    check(int'(duty_cyc) == exp_cur, "on-time register");
    expect_c = (m_r == 0) ? int'(exp_prev > (1 << N) - 1) : int'(exp_cur > m_r - 1);
    check(int'(c) == expect_c, $sformatf("pwm output r=%0d uh=%0d k=%0d", m_r, m_uh, m_k));
    hi += int'(c);
    if (m_r == 0 && periods > 0) begin
      check(hi == exp_prev, "on-time of period");
      if (exp_prev == (1 << N)) carry_periods++;
      if (exp_prev != (m_uh >> M) && exp_prev != 0) dither_periods++;
      hi = 0;
    end else if (m_r == 0) hi = 0;
    if (m_r == (1 << N) - 1) begin
      // period ends on the coming edge
      exp_prev = exp_cur;
      periods++;
      if (pat_uh == m_uh) begin
        pat_sum += exp_cur;
        pat_cnt++;
        if (pat_cnt == (1 << M)) begin
          check(pat_sum == ((m_uh >> M) << M) + (m_uh % (1 << M)), "average duty over a pattern");
          pat_sum = 0;
          pat_cnt = 0;
        end
      end
    end
  end

  always @(posedge clk) if (running) begin
    if (m_r == (1 << N) - 1) begin
      // the DUT latches u_in now and the DDPM steps
      if (int'(u_in) != m_uh) begin
        pat_uh = int'(u_in);
        pat_sum = 0;
        pat_cnt = 0;
      end
      m_uh <= int'(u_in);
      m_k  <= (m_k + 1) % (1 << M);
      // a pattern average is valid from a pattern start onward only
      if ((m_k + 1) % (1 << M) != 0 && int'(u_in) != m_uh) pat_uh = -1;
      if ((m_k + 1) % (1 << M) == 0 && pat_uh == -1) begin
        pat_uh = int'(u_in);
        pat_sum = 0;
        pat_cnt = 0;
      end
    end
    m_r <= (m_r + 1) % (1 << N);
  end

  initial begin
    automatic int vals[$] = '{0, 1, 15, 16, 108, 255, 256, 300, 496, 497, 511, 8, 264};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    running = 1;
    foreach (vals[i]) begin
      u_in = U'(vals[i]);
      repeat (3 * (1 << (N + M))) @(negedge clk);
    end
    for (int j = 0; j < 6; j++) begin
      u_in = U'($urandom_range(0, (1 << U) - 1));
      repeat (2 * (1 << (N + M)) + $urandom_range(0, 40)) @(negedge clk);
    end
    check(carry_periods > 0, "a 100 % period occurred (adder carry)");
    check(dither_periods > 0, "dithered periods occurred");
    $display("carry periods %0d, dithered periods %0d", carry_periods, dither_periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
