// ddpm_opt_modulator: DDPM modulator that finds the counter's first "one"
// arithmetically instead of with a priority multiplexer.
//
// A DDPM stream of an M_DDPM-bit code m is high in exactly m of every
// 2^M_DDPM steps: code bit b[M-1-i] is emitted whenever the lowest set bit of
// the step counter is bit i. This modulator finds that bit with three word
// operations that a processor ALU also has:
//   1. thermo = COUNT xor COUNT_prev   (COUNT_prev = COUNT - 1): ones from the
//      LSB up to and including the counter's first one, zeros above;
//   2. onehot = (thermo >> 1) + 1: a single one at the first-one position;
//   3. o = |(onehot & bitreverse(in_code)): the selected code bit.
// All bits of the counter are examined at once, so one output bit takes one
// step whatever M_DDPM is. The previous counter value is held in a register,
// as in the reference architecture.
//
// Own choice: with an M_DDPM-bit counter, COUNT = 0 (no bit set) would make
// the three steps select the code LSB a second time (0 xor 11..1 gives a
// one-hot at the MSB position), so the stream would be high m + b0 times per
// pattern. With a counter one bit wider, as in a software version, the
// one-hot lands just above the code there and the output is 0. The output is
// therefore forced to 0 at COUNT = 0, so every pattern is high exactly m
// times, as the DDPM definition requires and as the priority-mux modulator
// does.
//
// Interface: "step" advances the counter by one; "o" is combinational from the
// counter and in_code, which the owner must hold stable. "last" is high while
// the counter is at its maximum (the final step of a pattern). Reset
// (synchronous, active low) sets COUNT = 0 and COUNT_prev = 2^M_DDPM - 1.
module ddpm_opt_modulator #(
  parameter int unsigned M_DDPM = dpwm_pkg::M_DAC_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step,
  input  logic [M_DDPM-1:0] in_code,
  output logic              o,
  output logic              last
);

  logic [M_DDPM-1:0] count, count_prev;
  logic [M_DDPM-1:0] thermo, onehot, code_rev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count      <= '0;
      count_prev <= '1;
    end else if (step) begin
      count_prev <= count;
      count      <= count + 1'b1;
    end
  end

  always_comb begin
    thermo = count ^ count_prev;
    onehot = (thermo >> 1) + 1'b1;
    for (int i = 0; i < int'(M_DDPM); i++) code_rev[i] = in_code[M_DDPM-1-i];
    o = (|(onehot & code_rev)) & (count != '0);
  end

  assign last = (count == '1);

endmodule
