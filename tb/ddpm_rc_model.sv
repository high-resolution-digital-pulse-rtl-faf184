// ddpm_rc_model: behavioural model of a digital output pin driving an RC
// low-pass filter (simulation only, not synthesizable).
//
// Once per clock (time step TSTEP) the pin level is turned into the average
// drive voltage of that step and the filter state is advanced exactly:
//   v += (v_drive - v) * (1 - exp(-TSTEP / (R C)))
// Unequal rise and fall times of the pin driver are modelled as a falling
// edge that comes EPS * TSTEP late: the step after each high-to-low
// transition still drives VDD for that fraction of the step. Every high
// pulse thus carries (1 + EPS) steps of charge, which gives the two-slope
// transfer curve of a DDPM DAC. Defaults: VDD = 3.3 V, R = 100 kOhm,
// C = 1 nF, one step per 500 ns (2 MHz modulator clock).
module ddpm_rc_model #(
  parameter real VDD   = 3.3,
  parameter real R_OHM = 100.0e3,
  parameter real C_F   = 1.0e-9,
  parameter real TSTEP = 500.0e-9,
  parameter real EPS   = 0.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pin,
  output real  v_out
);
  localparam real K = 1.0 - $exp(-TSTEP / (R_OHM * C_F));
  logic pin_q = 1'b0;
  real v = 0.0;

  always @(posedge clk) begin
    real drive;
    if (!rst_n) begin
      v = 0.0;
      pin_q <= 1'b0;
    end else begin
      if (pin)        drive = VDD;
      else if (pin_q) drive = VDD * EPS;   // late falling edge
      else            drive = 0.0;
      v = v + (drive - v) * K;
      pin_q <= pin;
    end
    v_out <= v;
  end
endmodule
