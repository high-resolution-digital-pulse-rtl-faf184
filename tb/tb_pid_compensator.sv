// tb_pid_compensator: checks the PID against an integer reference model.
// The model computes, with 64-bit integers and gains scaled by 2^FRAC,
//   e = vref - code, I = clamp(I + ki e, 0, (2^U-1) 2^FRAC),
//   u = sat(round((kp e + I + kd (e - e_prev)) / 2^FRAC), 0, 2^U-1)
// and is compared with u, e and the three status flags for every sample.
// Also checked: u_valid arrives exactly two clocks after sample_valid, and
// each mechanism (upper and lower output saturation, integrator clamp,
// a pure-integral ramp to a steady value) is exercised.
module tb_pid_compensator;
  localparam int NA = 7;
  localparam int U = 9;
  localparam int GW = 24;
  localparam int FR = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_valid = 1'b0;
  logic [NA-1:0] adc = '0, vref = 7'd64;
  logic signed [GW-1:0] kp = '0, ki = '0, kd = '0;
  logic [U-1:0] u;
  logic u_valid, sat_hi, sat_lo, int_clamped;
  logic signed [NA:0] e;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_clamp = 0;

  pid_compensator #(.N_ADC(NA), .U_W(U), .GAIN_W(GW), .GAIN_FRAC(FR)) dut (
    .clk(clk), .rst_n(rst_n), .sample_valid(sample_valid), .adc_code(adc), .vref(vref),
    .kp(kp), .ki(ki), .kd(kd), .u(u), .u_valid(u_valid), .e(e),
    .sat_hi(sat_hi), .sat_lo(sat_lo), .int_clamped(int_clamped));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  longint integ = 0, e_prev = 0;
  longint umax = (longint'(1) << U) - 1;

  task automatic sample(input int code, input int gap);
    longint ek, tot, q, inew;
    bit clamp, hi, lo;
    ek = longint'(vref) - longint'(code);
    inew = integ + longint'(ki) * ek;
    clamp = 0;
    if (inew < 0) begin inew = 0; clamp = 1; end
    else if (inew > (umax << FR)) begin inew = umax << FR; clamp = 1; end
    tot = longint'(kp) * ek + inew + longint'(kd) * (ek - e_prev);
    q = (tot + (longint'(1) << (FR - 1))) >>> FR;
    hi = 0; lo = 0;
    if (q < 0) begin q = 0; lo = 1; end
    else if (q > umax) begin q = umax; hi = 1; end
    integ = inew;
    e_prev = ek;
    adc = NA'(code);
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    adc = NA'($urandom);        // code only needs to be valid with the strobe
    check(!u_valid, "no early u_valid");
    @(negedge clk);
    check(u_valid, "u_valid two clocks after the sample");
    check(longint'(u) == q, $sformatf("u: got %0d expected %0d (e=%0d)", u, q, ek));
    check(longint'(e) == ek, "error e[k]");
    check(sat_hi == hi && sat_lo == lo, "saturation flags");
    check(int_clamped == clamp, "integrator clamp flag");
    n_sat_hi += int'(hi); n_sat_lo += int'(lo); n_clamp += int'(clamp);
    @(negedge clk);
    check(!u_valid, "u_valid is a single strobe");
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // 1) proportional only
    kp = 24'sd20 <<< FR;
    for (int i = 0; i < 40; i++) sample($urandom_range(40, 90), $urandom_range(0, 3));
    // 2) integral only: ramp from a constant error, then hold
    kp = 0; ki = 24'sd9830;   // 0.15
    for (int i = 0; i < 30; i++) sample(60, 0);
    for (int i = 0; i < 10; i++) sample(64, 1);
    check(u > 0, "integrator holds its value at zero error");
    // 3) negative error drives the integrator to its lower clamp
    for (int i = 0; i < 40; i++) sample(127, 0);
    // 4) full PID with gain ratios like the published design values and random codes
    kp = 24'sd20 <<< (FR - 4); ki = 24'sd590; kd = 24'sd79 <<< (FR - 4);
    for (int i = 0; i < 300; i++) sample($urandom_range(0, 127), $urandom_range(0, 2));
    // 5) random signed gains
    for (int i = 0; i < 300; i++) begin
      kp = GW'($signed($urandom_range(0, 1 << 22)) - (1 << 21));
      ki = GW'($signed($urandom_range(0, 1 << 18)) - (1 << 17));
      kd = GW'($signed($urandom_range(0, 1 << 22)) - (1 << 21));
      sample($urandom_range(0, 127), 0);
    end
    // 6) drive to the upper limit
    kp = 0; kd = 0; ki = 24'sd30 <<< FR;
    for (int i = 0; i < 40; i++) sample(0, 0);
    check(n_sat_hi > 0, "upper saturation exercised");
    check(n_sat_lo > 0, "lower saturation exercised");
    check(n_clamp > 0, "integrator clamp exercised");
    $display("sat_hi %0d sat_lo %0d clamp %0d", n_sat_hi, n_sat_lo, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
