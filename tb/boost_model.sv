// boost_model: behavioural model of a synchronous boost power stage (not
// synthesizable; simulation only).
//
// Two-state switched model integrated with forward Euler once per clock:
//   gate = 1: dI/dt = (Vin - rL I - Ron I) / L,            dV/dt = -V/(R C)
//   gate = 0: dI/dt = (Vin - rL I - Ron I - V) / L,        dV/dt = (I - V/R) / C
// where V is the output capacitor voltage (taken as the output voltage; the
// capacitor ESR is neglected). A synchronous rectifier lets the inductor
// current go negative, so the stage stays in continuous conduction. Values
// default to the prototype's: L = 900 nH, rL = 8 mOhm, Ron = 24 mOhm,
// Co = 3 uF. The time step is the controller clock period.
module boost_model #(
  parameter real L_H   = 900.0e-9,
  parameter real RL    = 8.0e-3,
  parameter real RON   = 24.0e-3,
  parameter real CO_F  = 3.0e-6,
  parameter real TCLK  = 1.0 / 37.5e6
) (
  input  logic clk,
  input  logic gate,
  input  real  vin,
  input  real  rload,
  input  real  v_init,
  input  logic load_init,
  output real  vo,
  output real  il
);
  real v = 0.0, i = 0.0;

  always @(posedge clk) begin
    real di, dv;
    if (load_init) begin
      v = v_init;
      i = 0.0;
    end else begin
      if (gate) begin
        di = (vin - (RL + RON) * i) / L_H;
        dv = -v / (rload * CO_F);
      end else begin
        di = (vin - (RL + RON) * i - v) / L_H;
        dv = (i - v / rload) / CO_F;
      end
      i = i + di * TCLK;
      v = v + dv * TCLK;
    end
    vo = v;
    il = i;
  end
endmodule
