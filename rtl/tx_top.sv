// tx_top: the Slantlet PCC-OFDM transmitter. Serial input bits (se_in,
// taken where se_valid is high) are grouped BITS at a time (se2pa_t), mapped,
// coded, padded and transformed (transsaf), and leave as 2N signed 18-bit
// time samples per OFDM symbol on se_out, one per clock, real rail first.
// se_out is also shown in decimal on four display digits and a sign lamp
// (seven_segment). count shows the bits collected so far. The three parts
// follow the reference transmitter's top-level schematic.
// Rate: an OFDM symbol holds BITS input bits and takes 2N output clocks, so
// the input must average at most BITS valid bits per 2N clocks; a symbol that
// arrives while the serialiser is still busy (busy high) is dropped and
// overrun pulses.
module tx_top
  import ofdm_pkg::*;
#(
  parameter int unsigned N = N_PT,
  parameter int unsigned K = N / 2 - 1,
  localparam int unsigned CW = $clog2(2 * K + 1)
) (
  input  logic          clk0,
  input  logic          rst,
  input  logic          se_in,
  input  logic          se_valid,
  output logic [CW-1:0] count,
  output txw_t          se_out,
  output logic          se_out_valid,
  output logic          se_out_sof,
  output logic          busy,
  output logic          overrun,
  output logic [3:0]    y1,
  output logic [3:0]    y3,
  output logic [3:0]    y5,
  output logic [3:0]    y7,
  output logic          sign
);

  logic           data_valid;
  logic [2*K-1:0] sm_in;

  se2pa_t #(.BITS_P(2*K)) inst2 (.clk0, .rst, .se_in, .se_valid, .count, .data_valid, .sm_in);

  transsaf #(.N(N), .K(K)) inst (
    .clk0, .rst, .sm_in, .data_valid,
    .se_out, .se_valid(se_out_valid), .se_sof(se_out_sof), .busy, .overrun
  );

  seven_segment inst1 (.clk0, .rst, .x_in(se_out), .y1, .y3, .y5, .y7, .sign);

endmodule
