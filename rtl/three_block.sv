// three_block: the OFDM modulator and output stage of the transmitter.
// Both rails are zero padded (zepd, M -> N), inverse Slantlet transformed
// (isltsaf, one per rail) and sent as 2N serial words (pa2se_t). The split
// into these parts follows the reference design's transmitter hierarchy.
// Latency: one clock each for padding and transform; the first word leaves
// pa2se_t the clock after that, so se_sof comes three clocks after in_valid.
module three_block
  import ofdm_pkg::*;
#(
  parameter int unsigned N = N_PT,
  parameter int unsigned M = 2 * K_SYM
) (
  input  logic       clk0,
  input  logic       rst,
  input  logic       in_valid,
  input  sym_t       p_re [M],
  input  sym_t       p_im [M],
  output txw_t       se_out,
  output logic       se_valid,
  output logic       se_sof,
  output logic       busy,
  output logic       overrun
);

  sym_t z_re [N], z_im [N];
  logic z_valid, z_valid_im;
  txw_t x_re [N], x_im [N];
  logic x_valid, x_valid_im;

  zepd #(.M(M), .N(N)) u_zepd_re (.clk0, .rst, .in_valid, .p(p_re), .out_valid(z_valid),    .z(z_re));
  zepd #(.M(M), .N(N)) u_zepd_im (.clk0, .rst, .in_valid, .p(p_im), .out_valid(z_valid_im), .z(z_im));

  isltsaf #(.N(N)) u11 (.clk(clk0), .rst, .in_valid(z_valid),    .y(z_re), .out_valid(x_valid),    .x(x_re));
  isltsaf #(.N(N)) u12 (.clk(clk0), .rst, .in_valid(z_valid_im), .y(z_im), .out_valid(x_valid_im), .x(x_im));

  pa2se_t #(.N(N)) u_p2s (
    .clk0, .rst, .in_valid(x_valid), .x_re, .x_im,
    .busy, .overrun, .se_out, .se_valid, .se_sof
  );

  // The two rails run in lock step.
  a_rails_aligned: assert property (@(posedge clk0) disable iff (rst) x_valid == x_valid_im);

endmodule
