// adc_model: behavioural model of the sensing divider and an N-bit ADC (not
// synthesizable; simulation only).
//
// On a start strobe it samples vo, scales it by the divider gain H0 and
// quantizes it with floor(vs / V_FS * 2^N) into 0 .. 2^N-1 (uniform bins of
// V_FS/2^N, no offset or nonlinearity). The code is returned with a one-clock
// valid strobe CONV_CYCLES clocks after the start. Defaults: H0 = 1/9.2,
// V_FS = 3 V.
module adc_model #(
  parameter int  N_ADC       = 7,
  parameter real H0          = 1.0 / 9.2,
  parameter real VFS         = 3.0,
  parameter int  CONV_CYCLES = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  real              vo,
  output logic             valid,
  output logic [N_ADC-1:0] code
);
  int left = -1;
  int held = 0;

  always @(posedge clk) begin
    valid <= 1'b0;
    if (!rst_n) begin
      left = -1;
      code <= '0;
    end else begin
      if (start) begin
        real x;
        x = $floor(vo * H0 / VFS * real'(1 << N_ADC));
        if (x < 0.0) x = 0.0;
        if (x > real'((1 << N_ADC) - 1)) x = real'((1 << N_ADC) - 1);
        held = int'(x);
        left = CONV_CYCLES;
      end else if (left > 0) begin
        left = left - 1;
        if (left == 0) begin
          valid <= 1'b1;
          code  <= N_ADC'(held);
          left  = -1;
        end
      end
    end
  end
endmodule
