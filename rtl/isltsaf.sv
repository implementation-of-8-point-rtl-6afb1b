// isltsaf: N-point inverse Slantlet transform of one rail (real or
// imaginary) of an OFDM symbol, with integer coefficients scaled by 10^4.
//
// x[n] = sum_k S[k][n] * y[k], where S is the orthonormal Slantlet matrix of
// slt_coefs (so S^-1 = S^T). Inputs are the zero-padded, PCC-coded QAM levels
// (-1, 0, +1); outputs are the time samples scaled by 10^4 and exact for the
// integer matrix (no rounding is done here). The result is registered:
// out_valid and x follow in_valid and y by one clock. Synchronous active-high
// reset clears the outputs. The transform and its 10^4 scaling follow the
// reference design; the one-cycle, fully parallel form is this design's
// choice.
module isltsaf
  import ofdm_pkg::*;
#(
  parameter int unsigned N     = N_PT,
  parameter int unsigned IN_W  = SYM_W,
  parameter int unsigned OUT_W = TX_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  y [N],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] x [N]
);

  coef_t s [N][N];
  slt_coefs #(.N(N)) u_coefs (.s(s));

  logic signed [OUT_W-1:0] x_next [N];

  always_comb begin
    for (int n = 0; n < int'(N); n++) begin
      x_next[n] = '0;
      for (int k = 0; k < int'(N); k++)
        x_next[n] += OUT_W'(s[k][n] * y[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int n = 0; n < int'(N); n++) x[n] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) x <= x_next;
    end
  end

endmodule
