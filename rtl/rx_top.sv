// rx_top: the Slantlet PCC-OFDM receiver. Received words (rx_word with
// rx_valid, rx_sof on the first word of each OFDM symbol) are gathered into
// two N-word rails (s2pr), demodulated and demapped (safrec) and sent out as
// serial bits on dout (serial_converter), in the order the transmitter took
// them. dsm2_out/bits_valid give the same bits in parallel. The three parts
// follow the reference receiver's top-level schematic.
// Latency: the last word of a symbol is taken at clock t; bits_valid is high
// at t+5 and the first output bit appears on dout at t+6.
module rx_top
  import ofdm_pkg::*;
#(
  parameter int unsigned N = N_PT,
  parameter int unsigned K = N / 2 - 1
) (
  input  logic           clk1,
  input  logic           rst,
  input  txw_t           rx_word,
  input  logic           rx_valid,
  input  logic           rx_sof,
  output logic [2*K-1:0] dsm2_out,
  output logic           bits_valid,
  output logic           dout,
  output logic           dout_valid
);

  logic frame_valid;
  txw_t re [N], im [N];

  s2pr #(.N(N)) inst (.clk1, .rst, .rx_word, .rx_valid, .rx_sof, .frame_valid, .re, .im);

  safrec #(.N(N), .K(K)) inst2 (
    .clk1, .rst, .in_valid(frame_valid), .x_re(re), .x_im(im),
    .out_valid(bits_valid), .dsm2_out
  );

  serial_converter #(.BITS_P(2*K)) inst1 (
    .clk(clk1), .rst, .load(bits_valid), .d(dsm2_out), .dout, .dout_valid
  );

endmodule
