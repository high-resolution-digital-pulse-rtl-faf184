// ddpwm_controller: voltage-mode digital controller of a synchronous boost
// converter with a PID compensator and a dyadic digital PWM.
//
// Once per switching period the controller asks the external ADC for a new
// sample of the divided output voltage (adc_start, issued in the last clock of
// the period, when the carrier counter is at its maximum; with SAMPLE_DIV > 1
// only at the end of every SAMPLE_DIV-th period). When the ADC
// returns the code (adc_valid), the PID compensator computes the duty command
// u[k] of N_DPWM+M_DDPM bits two clocks later. The DDPWM latches u[k] at the
// end of the running period, splits it into N_DPWM MSBs for the counter DPWM
// and M_DDPM LSBs for the priority-mux DDPM modulator, and applies it during
// the next period. So a sample taken at the end of period k acts on period
// k+2, provided the ADC answers within one period (2^N_DPWM clocks) less two
// clocks; a later answer is used one period later.
//
// Outputs pwm_d and pwm_d_n are the complementary gate commands of the
// half-bridge (registered, no dead time is inserted: the gate drivers are
// expected to add it). The remaining outputs expose the command path for
// monitoring.
//
// Follows the reference: PID gains and the ADC code enter as ports, the
// DDPWM samples the command at f_clk/2^N_DPWM, sampling is synchronous to the
// switching period by default; SAMPLE_DIV = 2 gives the f_sw/2 sampling of
// the reference's microcontroller prototype. Own choices: the ADC handshake
// (start strobe, valid strobe), the gain number format of pid_compensator,
// and the absence of dead time.
module ddpwm_controller #(
  parameter int unsigned N_DPWM    = dpwm_pkg::N_DPWM_DEF,
  parameter int unsigned M_DDPM    = dpwm_pkg::M_DDPM_DEF,
  parameter int unsigned N_ADC     = dpwm_pkg::N_ADC_DEF,
  parameter int unsigned GAIN_W    = dpwm_pkg::GAIN_W_DEF,
  parameter int unsigned GAIN_FRAC = dpwm_pkg::GAIN_FRAC_DEF,
  parameter int unsigned SAMPLE_DIV = 1,
  localparam int unsigned U_W      = N_DPWM + M_DDPM,
  localparam int unsigned DIV_W    = (SAMPLE_DIV > 1) ? $clog2(SAMPLE_DIV) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ADC
  output logic                     adc_start,
  input  logic                     adc_valid,
  input  logic [N_ADC-1:0]         adc_code,
  // set-point and gains
  input  logic [N_ADC-1:0]         vref,
  input  logic signed [GAIN_W-1:0] kp,
  input  logic signed [GAIN_W-1:0] ki,
  input  logic signed [GAIN_W-1:0] kd,
  // gate commands
  output logic                     pwm_d,
  output logic                     pwm_d_n,
  // monitoring
  output logic [U_W-1:0]           u,
  output logic                     u_valid,
  output logic [U_W-1:0]           u_h,
  output logic [N_DPWM:0]          duty_cyc,
  output logic                     ddpm_bit,
  output logic                     sat_hi,
  output logic                     sat_lo,
  output logic                     int_clamped,
  output logic signed [N_ADC:0]    err          // e[k] = vref - adc_code
);

  logic                   wrap;
  logic                   c;

  pid_compensator #(
    .N_ADC(N_ADC), .U_W(U_W), .GAIN_W(GAIN_W), .GAIN_FRAC(GAIN_FRAC)
  ) u_pid (
    .clk         (clk),
    .rst_n       (rst_n),
    .sample_valid(adc_valid),
    .adc_code    (adc_code),
    .vref        (vref),
    .kp          (kp),
    .ki          (ki),
    .kd          (kd),
    .u           (u),
    .u_valid     (u_valid),
    .e           (err),
    .sat_hi      (sat_hi),
    .sat_lo      (sat_lo),
    .int_clamped (int_clamped)
  );

  ddpwm #(.N_DPWM(N_DPWM), .M_DDPM(M_DDPM)) u_ddpwm (
    .clk     (clk),
    .rst_n   (rst_n),
    .u_in    (u),
    .c       (c),
    .wrap    (wrap),
    .u_h     (u_h),
    .duty_cyc(duty_cyc),
    .ddpm_bit(ddpm_bit)
  );

  // ADC start on every SAMPLE_DIV-th period end
  logic [DIV_W-1:0] div_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) div_cnt <= '0;
    else if (wrap) div_cnt <= (32'(div_cnt) == SAMPLE_DIV - 1) ? '0 : div_cnt + 1'b1;
  end

  assign adc_start = wrap && (div_cnt == '0);
  assign pwm_d     = c;
  assign pwm_d_n   = ~c;

endmodule
