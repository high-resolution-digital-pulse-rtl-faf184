// dpwm_top: the two DDPM-based designs side by side.
//
// 1. A digitally controlled boost converter controller (ddpwm_controller):
//    PID compensator plus a dyadic digital PWM of N_DPWM+M_DDPM bits, driving
//    the complementary gate commands of the half-bridge from one ADC sample
//    per switching period. The ADC and the power stage are external; their
//    signals are ports.
// 2. A one-bit DDPM DAC (ddpm_dac) built on the xor-based optimized DDPM
//    modulator, whose output pin feeds an external RC filter. Its input code
//    first passes the double-slope pre-distortion (ddpm_predistort) with the
//    calibration factor dac_alpha; dac_alpha = 0 passes the code unchanged.
//
// The two share only the clock and reset; each has its own ports, prefixed
// pc_ (power controller) and dac_. All timing is that of the two sub-blocks.
module dpwm_top #(
  parameter int unsigned N_DPWM    = dpwm_pkg::N_DPWM_DEF,
  parameter int unsigned M_DDPM    = dpwm_pkg::M_DDPM_DEF,
  parameter int unsigned N_ADC     = dpwm_pkg::N_ADC_DEF,
  parameter int unsigned GAIN_W    = dpwm_pkg::GAIN_W_DEF,
  parameter int unsigned GAIN_FRAC = dpwm_pkg::GAIN_FRAC_DEF,
  parameter int unsigned SAMPLE_DIV = 1,
  parameter int unsigned M_DAC     = dpwm_pkg::M_DAC_DEF,
  parameter int unsigned ALPHA_W   = 16,
  localparam int unsigned U_W      = N_DPWM + M_DDPM
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // power controller
  output logic                     pc_adc_start,
  input  logic                     pc_adc_valid,
  input  logic [N_ADC-1:0]         pc_adc_code,
  input  logic [N_ADC-1:0]         pc_vref,
  input  logic signed [GAIN_W-1:0] pc_kp,
  input  logic signed [GAIN_W-1:0] pc_ki,
  input  logic signed [GAIN_W-1:0] pc_kd,
  output logic                     pc_pwm_d,
  output logic                     pc_pwm_d_n,
  output logic [U_W-1:0]           pc_u,
  output logic                     pc_u_valid,
  output logic [U_W-1:0]           pc_u_h,
  output logic [N_DPWM:0]          pc_duty_cyc,
  output logic                     pc_ddpm_bit,
  output logic                     pc_sat_hi,
  output logic                     pc_sat_lo,
  output logic                     pc_int_clamped,
  output logic signed [N_ADC:0]    pc_err,
  // DDPM DAC
  input  logic                     dac_tick,
  input  logic [M_DAC-1:0]         dac_code_in,
  input  logic signed [ALPHA_W-1:0] dac_alpha,
  output logic                     dac_code_load,
  output logic [M_DAC-1:0]         dac_code_q,
  output logic                     dac_out
);

  ddpwm_controller #(
    .N_DPWM(N_DPWM), .M_DDPM(M_DDPM), .N_ADC(N_ADC),
    .GAIN_W(GAIN_W), .GAIN_FRAC(GAIN_FRAC), .SAMPLE_DIV(SAMPLE_DIV)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .adc_start  (pc_adc_start),
    .adc_valid  (pc_adc_valid),
    .adc_code   (pc_adc_code),
    .vref       (pc_vref),
    .kp         (pc_kp),
    .ki         (pc_ki),
    .kd         (pc_kd),
    .pwm_d      (pc_pwm_d),
    .pwm_d_n    (pc_pwm_d_n),
    .u          (pc_u),
    .u_valid    (pc_u_valid),
    .u_h        (pc_u_h),
    .duty_cyc   (pc_duty_cyc),
    .ddpm_bit   (pc_ddpm_bit),
    .sat_hi     (pc_sat_hi),
    .sat_lo     (pc_sat_lo),
    .int_clamped(pc_int_clamped),
    .err        (pc_err)
  );

  logic [M_DAC-1:0] dac_code_pd;   // pre-distorted code

  ddpm_predistort #(.M_DDPM(M_DAC), .ALPHA_W(ALPHA_W)) u_pd (
    .m    (dac_code_in),
    .alpha(dac_alpha),
    .m_out(dac_code_pd)
  );

  ddpm_dac #(.M_DDPM(M_DAC)) u_dac (
    .clk      (clk),
    .rst_n    (rst_n),
    .tick     (dac_tick),
    .code_in  (dac_code_pd),
    .code_load(dac_code_load),
    .code_q   (dac_code_q),
    .dac_out  (dac_out)
  );

endmodule
