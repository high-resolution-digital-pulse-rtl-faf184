// ddpm_modulator: dyadic digital pulse modulator with a priority multiplexer.
//
// An M_DDPM-bit binary counter advances by one on every "step" pulse. The
// priority multiplexer looks at the counter from its LSB (highest priority)
// upwards: if counter bit i is the lowest bit that is set, the output takes
// input bit b[M_DDPM-1-i]. So the input MSB appears on every other step, the
// next bit on every fourth step, and so on down to the LSB once per
// 2^M_DDPM steps; when the counter is zero the output is 0. Over one full
// counter period the output is high exactly m = in_code times, spread in the
// dyadic pattern, and its average is m / 2^M_DDPM.
//
// Interface: step advances the counter (the DDPWM drives it once per
// switching period, i.e. at f_clk/2^N_DPWM; a DAC drives it every modulator
// clock). in_code must be held stable by the owner. "o" is combinational from
// the counter and in_code, valid in the cycle after the step edge.
// Reset (synchronous, active low) clears the counter.
module ddpm_modulator #(
  parameter int unsigned M_DDPM = dpwm_pkg::M_DDPM_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step,
  input  logic [M_DDPM-1:0] in_code,
  output logic              o
);

  logic [M_DDPM-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)    cnt <= '0;
    else if (step) cnt <= cnt + 1'b1;
  end

  // Priority multiplexer: the lowest set counter bit wins.
  always_comb begin
    o = 1'b0;
    for (int i = int'(M_DDPM) - 1; i >= 0; i--) begin
      if (cnt[i]) o = in_code[M_DDPM-1-i];
    end
  end

endmodule
