// safrec: the receiver datapath between the serial-to-parallel stage and the
// output serialiser. Each rail is Slantlet transformed (sltsaf), stripped of
// its zero pads (dzepd) and PCC demapped (depcc); the two rails are then
// decided and packed into bits (dsm). The grouping follows the reference
// receiver's hierarchy. Latency from in_valid to out_valid: five clocks
// (transform, pad removal, PCC demapping, DSM, DSM2).
module safrec
  import ofdm_pkg::*;
#(
  parameter int unsigned N = N_PT,
  parameter int unsigned K = K_SYM
) (
  input  logic           clk1,
  input  logic           rst,
  input  logic           in_valid,
  input  txw_t           x_re [N],
  input  txw_t           x_im [N],
  output logic           out_valid,
  output logic [2*K-1:0] dsm2_out
);

  rxw_t z_re [N],   z_im [N];
  rxw_t r_re [2*K], r_im [2*K];
  rxw_t v_re [K],   v_im [K];
  logic z_valid, z_valid_im, r_valid, r_valid_im, v_valid, v_valid_im;
  logic sym_valid;
  logic [1:0] sym [K];

  sltsaf #(.N(N)) u11 (.clk(clk1), .rst, .in_valid, .x(x_re), .out_valid(z_valid),    .z(z_re));
  sltsaf #(.N(N)) u12 (.clk(clk1), .rst, .in_valid, .x(x_im), .out_valid(z_valid_im), .z(z_im));

  dzepd #(.N(N), .M(2*K)) u3_re (.clk1, .rst, .in_valid(z_valid),    .z(z_re), .out_valid(r_valid),    .r(r_re));
  dzepd #(.N(N), .M(2*K)) u3_im (.clk1, .rst, .in_valid(z_valid_im), .z(z_im), .out_valid(r_valid_im), .r(r_im));

  depcc #(.K(K)) u_depcc_re (.clk1, .rst, .in_valid(r_valid),    .r(r_re), .out_valid(v_valid),    .v(v_re));
  depcc #(.K(K)) u_depcc_im (.clk1, .rst, .in_valid(r_valid_im), .r(r_im), .out_valid(v_valid_im), .v(v_im));

  dsm #(.K(K)) u4 (
    .clk1, .rst, .in_valid(v_valid), .re_in(v_re), .im_in(v_im),
    .sym_valid, .sym, .out_valid, .dsm2_out
  );

  a_rails_aligned: assert property (@(posedge clk1) disable iff (rst) v_valid == v_valid_im);

endmodule
