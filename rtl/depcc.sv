// depcc: PCC demapping of one rail. Each pair of received subcarrier values
// gives one estimate v[i] = (r[2i] - r[2i+1]) / 2 (the division is an
// arithmetic shift, rounding toward minus infinity). Subtracting the
// opposite-weighted neighbour is what cancels inter-carrier interference in
// PCC. The equation follows the reference design. Registered: out_valid and
// v follow in_valid and r by one clock; synchronous active-high reset.
module depcc
  import ofdm_pkg::*;
#(
  parameter int unsigned K = K_SYM,
  parameter int unsigned W = RX_W
) (
  input  logic                clk1,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] r [2*K],
  output logic                out_valid,
  output logic signed [W-1:0] v [K]
);

  logic signed [W:0] diff [K];

  always_comb
    for (int j = 0; j < int'(K); j++)
      diff[j] = (W+1)'(r[2*j]) - (W+1)'(r[2*j+1]);

  always_ff @(posedge clk1) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int j = 0; j < int'(K); j++) v[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int j = 0; j < int'(K); j++) v[j] <= W'(diff[j] >>> 1);
    end
  end

endmodule
