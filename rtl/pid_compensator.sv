// pid_compensator: discrete-time PID compensator with the regulation error.
//
// For every ADC sample it forms the digital error e[k] = Vref - vs[k] (in ADC
// LSBs) and the command
//   u_p[k] = Kp e[k]
//   u_i[k] = u_i[k-1] + (Ki Ts) e[k]
//   u_d[k] = (Kd/Ts) (e[k] - e[k-1])
//   u[k]   = u_p[k] + u_i[k] + u_d[k]
// which is the parallel PID of the reference block diagram. The command is an
// unsigned duty word of U_W bits (full scale 2^U_W = 100 % duty).
//
// Number format (own choice): the three gain inputs are signed fixed-point
// words of GAIN_W bits with GAIN_FRAC fractional bits, in duty LSBs per ADC
// LSB; kp is Kp, ki is the per-sample integral gain Ki*Ts and kd is the
// per-sample derivative gain Kd/Ts. The sum is rounded to the nearest duty LSB
// and saturated to 0 .. 2^U_W-1. The integrator state keeps the GAIN_FRAC
// fraction bits and is clamped to the same range (anti-windup), so it cannot
// wind up while the output is saturated. The gains are ports, as on the
// controller block of the co-simulation set-up, so they can be tuned without
// rebuilding.
//
// Timing: sample_valid is a one-cycle strobe with adc_code valid. e[k] is
// registered on that edge; u and u_valid follow one clock later (u_valid is a
// one-cycle strobe two edges after sample_valid). A new sample may arrive every
// second cycle or slower. Reset (synchronous, active low) clears the
// integrator, the error history and u.
module pid_compensator #(
  parameter int unsigned N_ADC     = dpwm_pkg::N_ADC_DEF,
  parameter int unsigned U_W       = dpwm_pkg::N_DPWM_DEF + dpwm_pkg::M_DDPM_DEF,
  parameter int unsigned GAIN_W    = dpwm_pkg::GAIN_W_DEF,
  parameter int unsigned GAIN_FRAC = dpwm_pkg::GAIN_FRAC_DEF,
  localparam int unsigned E_W      = N_ADC + 1,
  localparam int unsigned ACC_W    = GAIN_W + E_W + 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sample_valid,
  input  logic [N_ADC-1:0]         adc_code,
  input  logic [N_ADC-1:0]         vref,
  input  logic signed [GAIN_W-1:0] kp,
  input  logic signed [GAIN_W-1:0] ki,
  input  logic signed [GAIN_W-1:0] kd,
  output logic [U_W-1:0]           u,
  output logic                     u_valid,
  output logic signed [E_W-1:0]    e,          // e[k] of the last sample
  output logic                     sat_hi,     // last u clipped at full scale
  output logic                     sat_lo,     // last u clipped at zero
  output logic                     int_clamped // integrator hit a limit
);

  localparam logic signed [ACC_W-1:0] INT_MAX =
    ACC_W'((longint'(1) << U_W) - 1) <<< GAIN_FRAC;
  localparam logic signed [ACC_W-1:0] HALF = ACC_W'(longint'(1) << (GAIN_FRAC - 1));

  logic signed [E_W-1:0]   e_prev;
  logic                    stage2;
  logic signed [ACC_W-1:0] integ;

  logic signed [ACC_W-1:0] p_term, i_inc, d_term, integ_sum, integ_next;
  logic signed [ACC_W-1:0] total, rounded, q;
  logic                    clamp_now;

  // Stage 1: error.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e      <= '0;
      e_prev <= '0;
      stage2 <= 1'b0;
    end else begin
      stage2 <= sample_valid;
      if (sample_valid) begin
        e      <= $signed({1'b0, vref}) - $signed({1'b0, adc_code});
        e_prev <= e;
      end
    end
  end

  // Stage 2: PID arithmetic.
  always_comb begin
    p_term    = ACC_W'(kp) * ACC_W'(e);
    i_inc     = ACC_W'(ki) * ACC_W'(e);
    d_term    = ACC_W'(kd) * (ACC_W'(e) - ACC_W'(e_prev));
    integ_sum = integ + i_inc;
    clamp_now = 1'b0;
    if (integ_sum < 0) begin
      integ_next = '0;
      clamp_now  = 1'b1;
    end else if (integ_sum > INT_MAX) begin
      integ_next = INT_MAX;
      clamp_now  = 1'b1;
    end else begin
      integ_next = integ_sum;
    end
    total   = p_term + integ_next + d_term;
    rounded = total + HALF;
    q       = rounded >>> GAIN_FRAC;   // floor((total + 1/2)): round to nearest
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      integ       <= '0;
      u           <= '0;
      u_valid     <= 1'b0;
      sat_hi      <= 1'b0;
      sat_lo      <= 1'b0;
      int_clamped <= 1'b0;
    end else begin
      u_valid <= stage2;
      if (stage2) begin
        integ       <= integ_next;
        int_clamped <= clamp_now;
        sat_hi      <= 1'b0;
        sat_lo      <= 1'b0;
        if (q < 0) begin
          u      <= '0;
          sat_lo <= 1'b1;
        end else if (q > ACC_W'((longint'(1) << U_W) - 1)) begin
          u      <= '1;
          sat_hi <= 1'b1;
        end else begin
          u <= U_W'(q);
        end
      end
    end
  end

endmodule
