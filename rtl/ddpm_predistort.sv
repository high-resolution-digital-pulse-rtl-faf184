// ddpm_predistort: double-slope digital pre-distortion of a DDPM DAC code.
//
// Unequal rise and fall times of the output driver make each DDPM pulse
// deliver slightly more or less charge than its ideal share, so the DAC's
// transfer curve bends into two straight segments. The code m is
// therefore pre-distorted, with a calibration factor alpha found once. For a
// converter whose output rises with slope (1 + alpha) LSB per code up to the
// knee at code 2^(M-1) and with slope (1 - alpha) above it, the inverse is
//   m' = round( m / (1 + alpha) )                    for m <  2^(M-1)(1+alpha)
//   m' = round( (m - 2^M alpha) / (1 - alpha) )      otherwise
// rounded to the nearest integer (halves up) and limited to 2^M - 1. With
// alpha = 0 the block is the identity.
//
// Interface: purely combinational. alpha is a signed fraction of ALPHA_W
// bits, all of them fractional, so -0.5 <= alpha < 0.5 and neither divisor
// can reach zero (own choice of format and range). The two-branch form and
// the knee follow the reference. The offset of the second branch is 2^M alpha,
// which makes both branches meet at the knee; the reference prints
// 2^(M-1) alpha, which would jump by about 2^(M-1) alpha codes there. The
// number format, the rounding of halves and the upper clamp are also this
// design's choices. The two divisions are the
// expensive part; the code changes only once per DDPM pattern, so
// the paths may be constrained as multicycle paths.
module ddpm_predistort #(
  parameter int unsigned M_DDPM  = dpwm_pkg::M_DAC_DEF,
  parameter int unsigned ALPHA_W = 16
) (
  input  logic [M_DDPM-1:0]         m,
  input  logic signed [ALPHA_W-1:0] alpha,
  output logic [M_DDPM-1:0]         m_out
);
  localparam int unsigned W = M_DDPM + ALPHA_W + 3;   // working width

  logic signed [W-1:0] one, a, den1, den2, m_sc, thr, num;
  logic        [W-1:0] den, q;

  always_comb begin
    one  = W'(longint'(1) << ALPHA_W);
    a    = W'(alpha);                              // sign-extended
    den1 = one + a;                                // (1 + alpha) scaled
    den2 = one - a;                                // (1 - alpha) scaled
    m_sc = W'({1'b0, m}) <<< ALPHA_W;              // m scaled
    thr  = den1 <<< (M_DDPM - 1);                  // 2^(M-1)(1 + alpha) scaled
    if (m_sc < thr) begin
      num = m_sc;
      den = unsigned'(den1);
    end else begin
      num = m_sc - (a <<< M_DDPM);
      den = unsigned'(den2);
    end
    q = (unsigned'(num) + (den >> 1)) / den;
    if (q > W'((longint'(1) << M_DDPM) - 1)) m_out = '1;
    else                                      m_out = M_DDPM'(q);
  end
endmodule
