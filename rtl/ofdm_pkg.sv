// Shared sizes, constants and helper functions of the Slantlet PCC-OFDM
// transceiver.
//
// The link carries 4QAM symbols. Each OFDM symbol takes BITS = 6 input bits,
// which become K_SYM = 3 QAM symbols per rail (real and imaginary). PCC pairs
// them onto 6 subcarriers, two zero pads make that 8, and an 8-point inverse
// Slantlet transform (ISLT) produces the time samples. These sizes are the
// ones drawn on the transmitter and receiver block diagrams.
//
// Real-valued transform coefficients are stored as integers scaled by
// 10^4, as the reference design does. The transmitter output words are
// therefore scaled by 10^4 and the receiver SLT outputs by 10^8. TX_W = 18
// matches the 18-bit transmitter output bus of the reference design. The
// other widths (COEF_W, RX_W) are chosen here to hold the worst case without
// overflow.
package ofdm_pkg;

  // ---- sizes of the main (8-point) configuration ----
  localparam int unsigned N_PT   = 8;            // transform length
  localparam int unsigned K_SYM  = N_PT / 2 - 1; // QAM symbols per rail and OFDM symbol
  localparam int unsigned BITS   = 2 * K_SYM;    // input bits per OFDM symbol

  // ---- number formats ----
  localparam int unsigned SYM_W  = 2;   // signed value -1, 0 or +1 (QAM level, PCC output, zero pad)
  localparam int unsigned COEF_W = 16;  // signed coefficient scaled by 10^4
  localparam int unsigned TX_W   = 18;  // ISLT output word, scaled by 10^4
  localparam int unsigned RX_W   = TX_W + COEF_W + 3; // SLT accumulator (8 products)

  typedef logic signed [SYM_W-1:0]  sym_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [TX_W-1:0]   txw_t;
  typedef logic signed [RX_W-1:0]   rxw_t;

  // Line parameters of the Slantlet filter g_i(n), i = 1, 2, scaled by 10^4.
  // They follow Table 2 of Selesnick's construction with m = 2^i:
  //   s1 = 6*sqrt(m/((m^2-1)(4m^2-1))),   s0 = -s1*(m-1)/2
  //   t1 = 2*sqrt(3/(m(m^2-1))),          t0 = ((m+1)*s1/3 - m*t1)*(m-1)/(2m)
  //   a00 = (s0+t0)/2, a01 = (s1+t1)/2, a10 = (s0-t0)/2, a11 = (s1-t1)/2
  // g_i(n) = a00 + a01*n for n < m, and a10 + a11*(n-m) for m <= n < 2m.
  typedef struct packed {
    coef_t a0;   // g_i(0)
    coef_t a1;   // slope of the first half
    coef_t b0;   // g_i(m)
    coef_t b1;   // slope of the second half
  } gline_t;

  localparam gline_t G1_LINE = '{a0: -16'sd5117, a1: 16'sd13396, b0: -16'sd1208, b1: -16'sd747};
  localparam gline_t G2_LINE = '{a0: -16'sd5062, a1: 16'sd4188,  b0: -16'sd793,  b1: -16'sd284};

  // The two coarse rows of the transform span {1, n} over the block:
  // a constant row 1/sqrt(N) and a ramp (N-1-2n)/sqrt(N(N^2-1)/3), scaled by 10^4.
  function automatic coef_t dc_coef(int unsigned n_pt);
    return (n_pt == 4) ? coef_t'(5000) : coef_t'(3536);
  endfunction

  function automatic coef_t ramp_coef(int unsigned n_pt, int unsigned n);
    coef_t c4 [4] = '{16'sd6708, 16'sd2236, -16'sd2236, -16'sd6708};
    coef_t c8 [8] = '{16'sd5401, 16'sd3858, 16'sd2315, 16'sd772,
                      -16'sd772, -16'sd2315, -16'sd3858, -16'sd5401};
    return (n_pt == 4) ? c4[n % 4] : c8[n % 8];
  endfunction

endpackage
