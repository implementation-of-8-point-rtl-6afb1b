// dzepd: zero-pad removal of one received rail. Keeps the M middle values of
// the N transform outputs and drops the (N-M)/2 leading and the trailing
// positions, where the transmitter placed its zero pads: for N = 8, M = 6 it
// keeps z[1..6], as the reference design's zero-removal results show.
// Registered: out_valid and r follow in_valid and z by one
// clock; synchronous active-high reset.
module dzepd
  import ofdm_pkg::*;
#(
  parameter int unsigned N = N_PT,
  parameter int unsigned M = 2 * K_SYM,
  parameter int unsigned W = RX_W
) (
  input  logic                clk1,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] z [N],
  output logic                out_valid,
  output logic signed [W-1:0] r [M]
);

  localparam int unsigned LEAD = (N - M) / 2;

  always_ff @(posedge clk1) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int j = 0; j < int'(M); j++) r[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int j = 0; j < int'(M); j++) r[j] <= z[int'(LEAD) + j];
    end
  end

endmodule
