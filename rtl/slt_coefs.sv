// slt_coefs: the N x N Slantlet analysis matrix S, scaled by 10^4, for
// N = 4 or 8. The SLT computes z = S*x and the ISLT x = S^T*y.
//
// Row order follows the filter bank drawing of the three-scale Slantlet:
// row 0 is the low-pass channel, row 1 the channel next to it, then for each
// detail scale i = L-1 down to 1 (L = log2 N) the down-sampled outputs of
// g_i(n) in time order, then those of its time reverse. For N = 8 that is
// dc, ramp, g2, g2r, g1@0, g1@4, g1r@0, g1r@4; for N = 4 it is dc, ramp,
// g1, g1r.
// Within one N-point block the two coarse rows must span {1, n}, because
// every detail row has two vanishing moments; a constant row and a linear
// ramp are used, as in the reference design's 4-point results. The detail
// rows are built from the line parameters returned by getg. Combinational;
// all outputs are constants once elaborated.
module slt_coefs
  import ofdm_pkg::*;
#(
  parameter int unsigned N = N_PT
) (
  output coef_t s [N][N]   // s[row][column]
);

  localparam int unsigned L = $clog2(N);

  // getg outputs for scales 1 .. L-1 (index 0 unused)
  coef_t a0 [L], a1 [L], b0 [L], b1 [L], a0r [L], a1r [L], b0r [L], b1r [L];

  for (genvar gi = 1; gi < L; gi++) begin : g_scale
    getg u_getg (
      .i  (2'(gi)),
      .a0 (a0[gi]),  .a1 (a1[gi]),  .b0 (b0[gi]),  .b1 (b1[gi]),
      .a0r(a0r[gi]), .a1r(a1r[gi]), .b0r(b0r[gi]), .b1r(b1r[gi])
    );
  end
  assign a0[0] = '0;  assign a1[0] = '0;  assign b0[0] = '0;  assign b1[0] = '0;
  assign a0r[0] = '0; assign a1r[0] = '0; assign b0r[0] = '0; assign b1r[0] = '0;

  always_comb begin
    int unsigned row;
    int unsigned m;
    int unsigned shifts;
    int          k;
    for (int r = 0; r < int'(N); r++)
      for (int c = 0; c < int'(N); c++)
        s[r][c] = '0;
    for (int c = 0; c < int'(N); c++) begin
      s[0][c] = dc_coef(N);
      s[1][c] = ramp_coef(N, c);
    end
    row = 2;
    for (int sc = int'(L) - 1; sc >= 1; sc--) begin
      m      = 1 << sc;
      shifts = N / (2 * m);
      // forward filter g_sc, one row per shift
      for (int sh = 0; sh < int'(shifts); sh++) begin
        for (k = 0; k < int'(2 * m); k++)
          s[row][sh*2*m + k] = (k < int'(m))
            ? coef_t'(a0[sc] + a1[sc] * coef_t'(k))
            : coef_t'(b0[sc] + b1[sc] * coef_t'(k - int'(m)));
        row++;
      end
      // shifted time reverse, one row per shift
      for (int sh = 0; sh < int'(shifts); sh++) begin
        for (k = 0; k < int'(2 * m); k++)
          s[row][sh*2*m + k] = (k < int'(m))
            ? coef_t'(a0r[sc] + a1r[sc] * coef_t'(k))
            : coef_t'(b0r[sc] + b1r[sc] * coef_t'(k - int'(m)));
        row++;
      end
    end
  end

endmodule
