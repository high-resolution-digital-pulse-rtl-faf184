// tb_ddpm_predistort: checks the double-slope pre-distortion.
// For every input code and a spread of calibration factors (both ends of the
// range included) the output is compared with the formula evaluated in real
// arithmetic: within half a code of the ideal value, exact halves resolved
// upward, and clamped at full scale. The region boundary is checked exactly
// in integer arithmetic. alpha = 0 must give the identity, and the two
// branches must meet at the knee (no jump of more than one code between
// neighbouring input codes beyond the slope 1/(1 - alpha)).
module tb_ddpm_predistort;
  localparam int M  = 8;
  localparam int AW = 16;
  logic [M-1:0] m = '0, m_out;
  logic signed [AW-1:0] alpha = '0;
  int checks = 0, failures = 0;

  ddpm_predistort #(.M_DDPM(M), .ALPHA_W(AW)) dut (
    .m(m), .alpha(alpha), .m_out(m_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s m=%0d alpha=%0d got=%0d", what, m, alpha, m_out);
    end
  endtask

  task automatic check_one(input int mi, input int ai);
    real ideal, exp_r;
    longint num, den;
    int expv;
    bit region1;
    m = M'(mi);
    alpha = AW'(ai);
    #1;
    // exact region decision: m < 2^(M-1) (1 + alpha)
    region1 = (longint'(mi) << AW) < (longint'(1) << (M - 1)) * ((longint'(1) << AW) + longint'(ai));
    if (region1) begin
      num = longint'(mi) << AW;
      den = (longint'(1) << AW) + longint'(ai);
    end else begin
      num = (longint'(mi) << AW) - (longint'(ai) << M);
      den = (longint'(1) << AW) - longint'(ai);
    end
    ideal = real'(num) / real'(den);
    // nearest integer, exact halves upward (decided exactly on integers)
    expv = int'((2 * num + den) / (2 * den));
    if (expv > (1 << M) - 1) expv = (1 << M) - 1;
    exp_r = (ideal > real'((1 << M) - 1)) ? real'((1 << M) - 1) : ideal;
    check(int'(m_out) == expv, "exact rounding");
    check(real'(m_out) - exp_r <= 0.5 + 1e-9 && exp_r - real'(m_out) <= 0.5 + 1e-9,
          "within half a code of formula");
    if (ai == 0) check(int'(m_out) == mi, "identity at alpha = 0");
  endtask

  initial begin
    int alphas[$];
    alphas = '{0, 1, -1, 32767, -32768, 16384, -16384, 655, -655, 3277, -3277};
    for (int a = -32768; a < 32768; a += 211) alphas.push_back(a);
    foreach (alphas[k]) begin
      automatic int prev = 0;
      for (int mi = 0; mi < (1 << M); mi++) begin
        check_one(mi, alphas[k]);
        // monotone, and no step larger than the steepest slope (2) allows
        if (mi > 0) check(int'(m_out) >= prev && int'(m_out) - prev <= 3, "continuous at the knee");
        prev = int'(m_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
