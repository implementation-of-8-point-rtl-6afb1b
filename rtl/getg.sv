// getg: line parameters of the Slantlet detail filter g_i(n) and of its
// shifted time reverse g_i(2m-1-n), m = 2^i, for scale i = 1 or 2.
//
// Each filter is two straight line pieces of m taps. The outputs are the
// start value and slope of each piece, scaled by 10^4:
//   g_i(n)        = a0  + a1 *n      (0 <= n < m)
//                 = b0  + b1 *(n-m)  (m <= n < 2m)
//   g_i(2m-1-n)   = a0r + a1r*n      (0 <= n < m)
//                 = b0r + b1r*(n-m)  (m <= n < 2m)
// The forward values come from the constants in ofdm_pkg; the reversed ones
// follow from them: a0r = b0 + b1*(m-1), a1r = -b1, b0r = a0 + a1*(m-1),
// b1r = -a1. The port names and the single input i follow the reference
// design, where this is a function shared by the ISLT and the SLT; here it is
// purely combinational and is constant-folded when i is tied off. An i other
// than 1 or 2 returns all zeros.
module getg
  import ofdm_pkg::*;
(
  input  logic [1:0] i,
  output coef_t      a0,
  output coef_t      a1,
  output coef_t      b0,
  output coef_t      b1,
  output coef_t      a0r,
  output coef_t      a1r,
  output coef_t      b0r,
  output coef_t      b1r
);

  gline_t     g;
  logic [2:0] m_minus_1;

  always_comb begin
    unique case (i)
      2'd1:    begin g = G1_LINE; m_minus_1 = 3'd1; end
      2'd2:    begin g = G2_LINE; m_minus_1 = 3'd3; end
      default: begin g = '0;      m_minus_1 = 3'd0; end
    endcase
    a0  = g.a0;
    a1  = g.a1;
    b0  = g.b0;
    b1  = g.b1;
    a0r = coef_t'(g.b0 + g.b1 * $signed({1'b0, m_minus_1}));
    a1r = coef_t'(-g.b1);
    b0r = coef_t'(g.a0 + g.a1 * $signed({1'b0, m_minus_1}));
    b1r = coef_t'(-g.a1);
  end

endmodule
