// dpwm_pkg: default sizes shared by the DDPWM boost controller and the DDPM DAC.
//
// The resolutions follow the boost-converter experiment this RTL is built for:
// a 5-bit counter DPWM refined by a 4-bit dyadic modulator (9-bit effective
// duty resolution) behind a 7-bit ADC, and an 8-bit software-style DDPM
// modulator for the DAC. The PID gain format (signed, GAIN_FRAC fractional
// bits) is this design's own choice.
package dpwm_pkg;

  // Counter-based DPWM resolution (bits). f_clk = 2^N_DPWM * f_sw.
  localparam int unsigned N_DPWM_DEF   = 5;
  // Dyadic modulator resolution of the DDPWM (bits).
  localparam int unsigned M_DDPM_DEF   = 4;
  // ADC resolution (bits).
  localparam int unsigned N_ADC_DEF    = 7;
  // Resolution of the DDPM DAC modulator (bits).
  localparam int unsigned M_DAC_DEF    = 8;

  // PID gain words: signed fixed point, GAIN_W bits with GAIN_FRAC fractional bits.
  localparam int unsigned GAIN_W_DEF    = 24;
  localparam int unsigned GAIN_FRAC_DEF = 16;

endpackage
