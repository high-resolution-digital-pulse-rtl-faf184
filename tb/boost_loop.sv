// boost_loop: closed-loop test harness (simulation only). One boost power
// stage model, one ADC model and either the DDPWM controller (PLAIN = 0) or
// a plain counter DPWM of N_DPWM bits driven by the same PID compensator
// with an N_DPWM-bit command (PLAIN = 1; the DDPWM is used with its dither
// bits tied to zero, which is exactly a counter DPWM).
//
// The gains KP, KI, KD are in 1/65536 duty LSB per ADC LSB (see
// pid_compensator). After SETTLE samples it collects, over WINDOW samples, the share of ADC
// samples in the zero-error bin, the spread of the duty command and the
// mean, minimum and maximum of the output voltage (sampled every clock).
// "done" rises when the window is complete. The physical clock period is
// 1/(f_sw 2^N_DPWM) with f_sw = 1.17 MHz, so every configuration switches at
// the same frequency.
module boost_loop #(
  parameter int  N_DPWM = 5,
  parameter int  M_DDPM = 4,
  parameter int  N_ADC  = 7,
  parameter bit  PLAIN  = 0,
  parameter int  KP     = 0,
  parameter int  KI     = 786,
  parameter int  KD     = 0,
  parameter real VIN    = 8.0,
  parameter real RLOAD  = 25.0,
  parameter int  SETTLE = 5000,
  parameter int  WINDOW = 1500
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   n_zero,
  output int   u_spread,
  output real  v_mean,
  output real  v_min,
  output real  v_max
);
  localparam int U = N_DPWM + M_DDPM;
  localparam int UC = PLAIN ? N_DPWM : U;
  // set-point code of 13.8 V through the 1/9.2 divider and a 3 V ADC
  localparam int VREF = int'($floor(13.8 / 9.2 / 3.0 * real'(1 << N_ADC) + 0.5));

  logic adc_start, adc_valid, u_valid;
  logic [N_ADC-1:0] adc_code;
  logic [UC-1:0] u_c;
  logic [U-1:0] u_full;
  logic gate;
  real vo, il;
  logic load_init;
  assign load_init = ~rst_n;

  if (PLAIN) begin : g_plain
    logic sh, sl, ic, c, db;
    logic signed [N_ADC:0] e;
    logic [U-1:0] uh;
    logic [N_DPWM:0] dc;
    pid_compensator #(.N_ADC(N_ADC), .U_W(UC)) pid (
      .clk(clk), .rst_n(rst_n), .sample_valid(adc_valid), .adc_code(adc_code),
      .vref(N_ADC'(VREF)), .kp(24'(KP)), .ki(24'(KI)), .kd(24'(KD)), .u(u_c), .u_valid(u_valid),
      .e(e), .sat_hi(sh), .sat_lo(sl), .int_clamped(ic));
    assign u_full = {u_c, {M_DDPM{1'b0}}};
    ddpwm #(.N_DPWM(N_DPWM), .M_DDPM(M_DDPM)) pwm (
      .clk(clk), .rst_n(rst_n), .u_in(u_full), .c(c), .wrap(adc_start),
      .u_h(uh), .duty_cyc(dc), .ddpm_bit(db));
    assign gate = c;
  end else begin : g_ddpwm
    logic gn, db, sh, sl, ic;
    logic [U-1:0] uh;
    logic [N_DPWM:0] dc;
    logic signed [N_ADC:0] e;
    ddpwm_controller #(.N_DPWM(N_DPWM), .M_DDPM(M_DDPM), .N_ADC(N_ADC)) ctrl (
      .clk(clk), .rst_n(rst_n), .adc_start(adc_start), .adc_valid(adc_valid),
      .adc_code(adc_code), .vref(N_ADC'(VREF)), .kp(24'(KP)), .ki(24'(KI)), .kd(24'(KD)),
      .pwm_d(gate), .pwm_d_n(gn), .u(u_c), .u_valid(u_valid), .u_h(uh),
      .duty_cyc(dc), .ddpm_bit(db), .sat_hi(sh), .sat_lo(sl), .int_clamped(ic), .err(e));
    assign u_full = u_c;
  end

  boost_model #(.TCLK(1.0 / (1.17e6 * real'(1 << N_DPWM)))) plant (
    .clk(clk), .gate(gate), .vin(VIN), .rload(RLOAD), .v_init(VIN),
    .load_init(load_init), .vo(vo), .il(il));

  adc_model #(.N_ADC(N_ADC)) adc (
    .clk(clk), .rst_n(rst_n), .start(adc_start), .vo(vo), .valid(adc_valid), .code(adc_code));

  int samples = 0, umin = 1 << 30, umax = -1;
  real vsum = 0.0;
  longint vcount = 0;
  bit in_window;
  assign in_window = samples >= SETTLE && samples < SETTLE + WINDOW;

  always @(posedge clk) if (rst_n) begin
    if (adc_valid) begin
      if (in_window) begin
        if (int'(adc_code) == VREF) n_zero++;
      end
      samples++;
    end
    if (u_valid && in_window) begin
      if (int'(u_c) < umin) umin = int'(u_c);
      if (int'(u_c) > umax) umax = int'(u_c);
    end
    if (in_window) begin
      vsum += vo;
      vcount++;
      if (vo < v_min) v_min = vo;
      if (vo > v_max) v_max = vo;
    end
    done     <= samples >= SETTLE + WINDOW;
    u_spread <= umax - umin;
    v_mean   <= (vcount > 0) ? vsum / real'(vcount) : 0.0;
  end

  initial begin
    n_zero = 0;
    v_min = 1.0e9;
    v_max = -1.0e9;
    done = 1'b0;
  end
endmodule
