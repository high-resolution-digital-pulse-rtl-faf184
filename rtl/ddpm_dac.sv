// ddpm_dac: one-bit digital-to-analog converter based on DDPM.
//
// A DDPM stream has its energy at high frequencies, so a simple first-order
// RC filter on the output pin recovers the code as a voltage,
// V = VDD * m / 2^M_DDPM. This block holds the input code for one full DDPM
// pattern of 2^M_DDPM modulator steps, drives the optimized (xor-based)
// DDPM modulator and registers the stream bit into an output register that
// feeds the pin.
//
// Timing: "tick" is the modulator clock enable, one pulse per unit time slot
// T_DDPM (f_DDPM = 1/T_DDPM). A new code is taken from code_in on the tick that
// ends a pattern (code_load strobes then), so the sample rate is
// f_DDPM / 2^M_DDPM. dac_out changes only on ticks, one tick after the
// modulator step it belongs to. The first pattern after reset outputs code 0.
//
// The sample-rate relation and the output register follow the reference;
// the load handshake (code_load strobe, code taken at pattern end) is this
// design's choice.
module ddpm_dac #(
  parameter int unsigned M_DDPM = dpwm_pkg::M_DAC_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic [M_DDPM-1:0] code_in,
  output logic              code_load,
  output logic [M_DDPM-1:0] code_q,
  output logic              dac_out
);

  logic o, last;

  ddpm_opt_modulator #(.M_DDPM(M_DDPM)) u_mod (
    .clk    (clk),
    .rst_n  (rst_n),
    .step   (tick),
    .in_code(code_q),
    .o      (o),
    .last   (last)
  );

  assign code_load = tick & last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      code_q  <= '0;
      dac_out <= 1'b0;
    end else if (tick) begin
      dac_out <= o;
      if (last) code_q <= code_in;
    end
  end

endmodule
