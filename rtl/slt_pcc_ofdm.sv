// slt_pcc_ofdm: baseband 8-point Slantlet-transform OFDM link with
// polynomial cancellation coding (PCC), transmitter and receiver side by
// side.
//
// Transmitter (clk0): 6 serial bits per OFDM symbol -> 3 4QAM symbols ->
// real and imaginary rails of 3 levels -> PCC pairs (6 subcarriers per rail)
// -> two zero pads (8) -> 8-point inverse Slantlet transform -> 16 signed
// 18-bit words on tx_word, one per clock, real rail first, tx_sof on the
// first word. tx_word is also shown on four decimal digits and a sign lamp.
// Receiver (clk1): 16 words on rx_word (rx_sof on the first) -> 8-point
// Slantlet transform per rail -> pad removal -> PCC demapping -> 4QAM
// decision -> 6 bits, in parallel on rx_bits and serially on dout.
//
// The channel between the two is not part of the hardware: connect tx_* to
// rx_* directly for a loopback, or through a channel model. With a noiseless
// loopback the received bits equal the transmitted ones.
// Latency (loopback, one clock): the first output bit of a symbol appears on
// dout 28 clocks after the edge that takes the symbol's sixth input bit.
// The input must average at most 6 valid bits per 16 clocks of clk0
// (tx_busy/tx_overrun report a symbol arriving too early).
// Parameters: N transform points (8) and K 4QAM symbols per rail, by default
// N/2 - 1 = 3, which fills all but one pad position at each end of the
// block. A smaller K (2K bits per symbol, for instance K = 2 for 4-bit
// symbols) pads with (N - 2K)/2 zeros at each end; N - 2K must be even.
// The stages, their order and the default sizes follow the reference
// design's block diagrams; the framing signals (valid, start of symbol,
// busy, overrun) and the K parameter are this design's additions.
module slt_pcc_ofdm
  import ofdm_pkg::*;
#(
  parameter int unsigned N = N_PT,
  parameter int unsigned K  = N / 2 - 1,  // 4QAM symbols per rail
  localparam int unsigned CW = $clog2(2 * K + 1)
) (
  // transmitter
  input  logic           clk0,
  input  logic           rst,
  input  logic           se_in,
  input  logic           se_valid,
  output logic [CW-1:0]  count,
  output txw_t           tx_word,
  output logic           tx_valid,
  output logic           tx_sof,
  output logic           tx_busy,
  output logic           tx_overrun,
  output logic [3:0]     y1,
  output logic [3:0]     y3,
  output logic [3:0]     y5,
  output logic [3:0]     y7,
  output logic           sign,
  // receiver
  input  logic           clk1,
  input  txw_t           rx_word,
  input  logic           rx_valid,
  input  logic           rx_sof,
  output logic [2*K-1:0] rx_bits,
  output logic           rx_bits_valid,
  output logic           dout,
  output logic           dout_valid
);

  if (2 * K > N || (N - 2 * K) % 2 != 0) begin : g_size_check
    $error("slt_pcc_ofdm: N - 2K must be even and not negative");
  end

  tx_top #(.N(N), .K(K)) u_tx (
    .clk0, .rst, .se_in, .se_valid, .count,
    .se_out(tx_word), .se_out_valid(tx_valid), .se_out_sof(tx_sof),
    .busy(tx_busy), .overrun(tx_overrun),
    .y1, .y3, .y5, .y7, .sign
  );

  rx_top #(.N(N), .K(K)) u_rx (
    .clk1, .rst, .rx_word, .rx_valid, .rx_sof,
    .dsm2_out(rx_bits), .bits_valid(rx_bits_valid), .dout, .dout_valid
  );

endmodule
