// dpwm_carrier: carrier counter of a counter-based DPWM.
//
// A free-running N_DPWM-bit binary counter clocked at f_clk produces the
// sawtooth carrier r[nT_clk] that a comparator holds against the duty command.
// The counter counts 0 .. 2^N_DPWM-1, so the switching frequency is
// f_sw = f_clk / 2^N_DPWM and the duty-cycle step is 1/2^N_DPWM, as in the
// standard counter DPWM. The "wrap" strobe is high during the last count of a
// period (r = 2^N_DPWM-1): on the clock edge that ends it the counter returns
// to zero and the owner of the duty register loads a new command. This is the
// "= 0" detector of the reference architecture, moved one cycle early so the
// new command is already valid while r = 0.
//
// Interface: clk, rst_n (synchronous, active low: the counter restarts at 0),
// r (carrier), wrap (one cycle every 2^N_DPWM cycles).
// Own choice: the counter modulus is 2^N_DPWM (the reference architecture labels
// it "modulo N_r" with N_r = 2^N_DPWM - 1, while the clock relation
// f_clk = 2^N_DPWM f_sw and D = u_h / 2^N_DPWM need 2^N_DPWM counts).
module dpwm_carrier #(
  parameter int unsigned N_DPWM = dpwm_pkg::N_DPWM_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [N_DPWM-1:0] r,
  output logic              wrap
);

  always_ff @(posedge clk) begin
    if (!rst_n) r <= '0;
    else        r <= r + 1'b1;   // wraps modulo 2^N_DPWM
  end

  assign wrap = (r == {N_DPWM{1'b1}});

endmodule
