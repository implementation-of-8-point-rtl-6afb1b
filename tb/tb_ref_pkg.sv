// tb_ref_pkg: reference model of the Slantlet PCC-OFDM link for the
// testbenches, written independently of the RTL.
//
// The Slantlet detail filters are computed here from Selesnick's closed-form
// parameters with real arithmetic and rounded to 10^4 units; the time-reversed
// filters are read from the forward taps (the RTL derives them from line
// parameters instead). The two coarse rows are the constant and ramp rows of
// an N-point block. Also provided: the 4QAM map, PCC coding, zero padding and
// the whole transmitter frame for a 2K-bit input word.
package tb_ref_pkg;

  // line parameters (a00, a01, a10, a11) of g_i, real
  function automatic void g_line(input int i, output real a00, output real a01,
                                 output real a10, output real a11);
    real m, s0, s1, t0, t1;
    m  = real'(1 << i);
    s1 = 6.0 * $sqrt(m / ((m*m - 1.0) * (4.0*m*m - 1.0)));
    s0 = -s1 * (m - 1.0) / 2.0;
    t1 = 2.0 * $sqrt(3.0 / (m * (m*m - 1.0)));
    t0 = ((m + 1.0) * s1 / 3.0 - m * t1) * (m - 1.0) / (2.0 * m);
    a00 = (s0 + t0) / 2.0;
    a01 = (s1 + t1) / 2.0;
    a10 = (s0 - t0) / 2.0;
    a11 = (s1 - t1) / 2.0;
  endfunction

  function automatic int rnd(real r);
    return (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  // rounded line parameter j (0: a00, 1: a01, 2: a10, 3: a11) of g_i, x10^4
  function automatic int g_line_int(int i, int j);
    real a00, a01, a10, a11;
    g_line(i, a00, a01, a10, a11);
    case (j)
      0: return rnd(a00 * 1.0e4);
      1: return rnd(a01 * 1.0e4);
      2: return rnd(a10 * 1.0e4);
      default: return rnd(a11 * 1.0e4);
    endcase
  endfunction

  // tap k (0 .. 2m-1) of g_i from the rounded line parameters
  function automatic int g_tap(int i, int k);
    int m = 1 << i;
    return (k < m) ? g_line_int(i, 0) + g_line_int(i, 1) * k
                   : g_line_int(i, 2) + g_line_int(i, 3) * (k - m);
  endfunction

  // integer Slantlet matrix entry S[row][col], x10^4, N = 4 or 8
  function automatic int s_coef(int n_pt, int row, int col);
    int l, r, m, nsh;
    if (row == 0) return rnd(1.0e4 / $sqrt(real'(n_pt)));
    if (row == 1) return rnd(1.0e4 * real'(n_pt - 1 - 2*col) /
                             $sqrt(real'(n_pt * (n_pt*n_pt - 1)) / 3.0));
    l = $clog2(n_pt);
    r = 2;
    for (int sc = l - 1; sc >= 1; sc--) begin
      m   = 1 << sc;
      nsh = n_pt / (2 * m);
      for (int rev = 0; rev < 2; rev++)
        for (int sh = 0; sh < nsh; sh++) begin
          if (r == row) begin
            if (col < sh*2*m || col >= (sh+1)*2*m) return 0;
            return rev ? g_tap(sc, 2*m - 1 - (col - sh*2*m)) : g_tap(sc, col - sh*2*m);
          end
          r++;
        end
    end
    return 0;
  endfunction

  // 4QAM: symbol -> levels (Table of the mapper)
  function automatic int qam_re(int s); return (s >= 2) ? 1 : -1; endfunction
  function automatic int qam_im(int s); return (s % 2 == 1) ? -1 : 1; endfunction

  // Transmitter reference: bits (2K of them, first bit in bits[2K-1]) ->
  // 2N words, real rail then imaginary rail.
  function automatic void tx_frame(input int n_pt, input logic [31:0] bits,
                                   output int words [16]);
    int k_sym = n_pt / 2 - 1;
    int pad_re [8], pad_im [8];
    int s;
    for (int n = 0; n < 8; n++) begin pad_re[n] = 0; pad_im[n] = 0; end
    for (int j = 0; j < k_sym; j++) begin
      s = int'(bits[2*(k_sym-1-j) +: 2]);
      // PCC pair (+u, -u), after one leading zero pad
      pad_re[1 + 2*j]     =  qam_re(s);
      pad_re[1 + 2*j + 1] = -qam_re(s);
      pad_im[1 + 2*j]     =  qam_im(s);
      pad_im[1 + 2*j + 1] = -qam_im(s);
    end
    for (int n = 0; n < 16; n++) words[n] = 0;
    for (int n = 0; n < n_pt; n++)
      for (int k = 0; k < n_pt; k++) begin
        words[n]        += s_coef(n_pt, k, n) * pad_re[k];
        words[n_pt + n] += s_coef(n_pt, k, n) * pad_im[k];
      end
  endfunction

endpackage
