// sltsaf: N-point forward Slantlet transform of one received rail, with
// integer coefficients scaled by 10^4.
//
// z[k] = sum_n S[k][n] * x[n], S from slt_coefs. The inputs are the
// transmitter's time samples (already scaled by 10^4), so the outputs carry a
// 10^8 scale: a transmitted level of +1 comes back as about +10^8. OUT_W is
// wide enough for the worst-case sum of N full-scale products. The result is
// registered: out_valid and z follow in_valid and x by one clock.
// Synchronous active-high reset clears the outputs. The transform and its
// scaling follow the reference design; the one-cycle, fully parallel form is
// this design's choice.
module sltsaf
  import ofdm_pkg::*;
#(
  parameter int unsigned N     = N_PT,
  parameter int unsigned IN_W  = TX_W,
  parameter int unsigned OUT_W = RX_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [N],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] z [N]
);

  coef_t s [N][N];
  slt_coefs #(.N(N)) u_coefs (.s(s));

  logic signed [OUT_W-1:0] z_next [N];

  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      z_next[k] = '0;
      for (int n = 0; n < int'(N); n++)
        z_next[k] += OUT_W'(s[k][n]) * OUT_W'(x[n]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int k = 0; k < int'(N); k++) z[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) z <= z_next;
    end
  end

endmodule
