// dsm: 4QAM signal demapper, the DSM and DSM2 stages of the receiver.
//
// Stage DSM (one clock) decides each symbol from the signs of its real and
// imaginary estimates, inverting the transmitter's map
// (-1,+1) -> 0, (-1,-1) -> 1, (+1,+1) -> 2, (+1,-1) -> 3:
// Bit1 = (re > 0), Bit2 = (im < 0). A zero real part counts as negative and a
// zero imaginary part as positive (this design's choice). Stage DSM2 (one
// more clock) packs the K symbols into a 2K-bit word, symbol 0 in the top two
// bits, Bit1 above Bit2, the same order in which the transmitter took them.
// sym/sym_valid are the DSM outputs, dsm2_out/out_valid (two clocks after
// in_valid) the DSM2 outputs. Synchronous active-high reset.
module dsm
  import ofdm_pkg::*;
#(
  parameter int unsigned K = K_SYM,
  parameter int unsigned W = RX_W
) (
  input  logic                clk1,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] re_in [K],
  input  logic signed [W-1:0] im_in [K],
  output logic                sym_valid,
  output logic [1:0]          sym [K],
  output logic                out_valid,
  output logic [2*K-1:0]      dsm2_out
);

  always_ff @(posedge clk1) begin
    if (rst) begin
      sym_valid <= 1'b0;
      out_valid <= 1'b0;
      dsm2_out  <= '0;
      for (int j = 0; j < int'(K); j++) sym[j] <= '0;
    end else begin
      sym_valid <= in_valid;
      if (in_valid)
        for (int j = 0; j < int'(K); j++)
          sym[j] <= {re_in[j] > 0, im_in[j] < 0};
      out_valid <= sym_valid;
      if (sym_valid)
        for (int j = 0; j < int'(K); j++)
          dsm2_out[2*(int'(K)-1-j) +: 2] <= sym[j];
    end
  end

endmodule
