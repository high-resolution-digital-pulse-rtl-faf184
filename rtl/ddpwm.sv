// ddpwm: dyadic digital pulse-width modulator (counter DPWM + DDPM dithering).
//
// The (N_DPWM+M_DDPM)-bit command u[k] is latched once per switching period
// into the duty register u_h. Its N_DPWM MSBs (u_hM) set the on-time of a
// plain counter-based DPWM in f_clk cycles; its M_DDPM LSBs (u_hL) drive a
// priority-mux DDPM modulator that is stepped once per switching period
// (f_clk/2^N_DPWM). The DDPM bit (0 or 1) is added to u_hM, so each period
// has an on-time of either u_hM or u_hM+1 clock cycles, and over 2^M_DDPM
// periods exactly u_hL of them are lengthened. The average duty cycle is
// (u_hM*2^M_DDPM + u_hL) / 2^(N_DPWM+M_DDPM): N_DPWM+M_DDPM bits of resolution
// from a clock of only 2^N_DPWM f_sw, with the dithering pushed to high
// sub-harmonics of f_sw by the dyadic ordering.
//
// Timing: "wrap" is high in the last cycle of a period; on that edge u_in is
// latched and the DDPM steps. The comparator output is registered, so c rises
// on the clock edge after r returns to 0 and is high for exactly
// u_hM + ddpm cycles of each period (one-cycle latency, glitch-free gate drive).
//
// Own choices: the adder is N_DPWM+1 bits wide so that u_hM = 2^N_DPWM-1 plus
// a DDPM bit gives a full-period (100 %) pulse instead of wrapping to 0 (the
// reference architecture shows an N_DPWM-bit sum and does not discuss the carry);
// the comparison is "sum > r" as in the standard counter DPWM, where the pulse
// stays high until the carrier reaches the command.
module ddpwm #(
  parameter int unsigned N_DPWM = dpwm_pkg::N_DPWM_DEF,
  parameter int unsigned M_DDPM = dpwm_pkg::M_DDPM_DEF,
  localparam int unsigned U_W   = N_DPWM + M_DDPM
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [U_W-1:0]    u_in,       // command u[k], sampled at wrap
  output logic              c,          // PWM output c(t)
  output logic              wrap,       // last cycle of the switching period
  output logic [U_W-1:0]    u_h,        // command held for the current period
  output logic [N_DPWM:0]   duty_cyc,   // on-time of the current period, in T_clk
  output logic              ddpm_bit    // DDPM dither bit of the current period
);

  logic [N_DPWM-1:0] r;

  dpwm_carrier #(.N_DPWM(N_DPWM)) u_carrier (
    .clk  (clk),
    .rst_n(rst_n),
    .r    (r),
    .wrap (wrap)
  );

  // Duty register, loaded once per switching period.
  always_ff @(posedge clk) begin
    if (!rst_n)    u_h <= '0;
    else if (wrap) u_h <= u_in;
  end

  ddpm_modulator #(.M_DDPM(M_DDPM)) u_ddpm (
    .clk    (clk),
    .rst_n  (rst_n),
    .step   (wrap),
    .in_code(u_h[M_DDPM-1:0]),
    .o      (ddpm_bit)
  );

  // u_hM + DDPM bit, one bit wider than the counter.
  assign duty_cyc = {1'b0, u_h[U_W-1:M_DDPM]} + {{N_DPWM{1'b0}}, ddpm_bit};

  always_ff @(posedge clk) begin
    if (!rst_n) c <= 1'b0;
    else        c <= (duty_cyc > {1'b0, r});
  end

endmodule
