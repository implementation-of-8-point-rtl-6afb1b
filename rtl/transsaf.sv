// transsaf: the transmitter datapath after the serial-to-parallel stage.
// A 2K-bit word (sm_in, with data_valid) is 4QAM mapped (sm, two clocks),
// PCC coded on each rail (pcc, one clock) and handed to three_block for zero
// padding, inverse Slantlet transform and serialisation. The grouping follows
// the reference design's transmitter hierarchy. The first output word
// (se_valid and se_sof high) comes six clocks after data_valid, and each
// OFDM symbol then takes 2N clocks on se_out.
module transsaf
  import ofdm_pkg::*;
#(
  parameter int unsigned N = N_PT,
  parameter int unsigned K = K_SYM
) (
  input  logic           clk0,
  input  logic           rst,
  input  logic [2*K-1:0] sm_in,
  input  logic           data_valid,
  output txw_t           se_out,
  output logic           se_valid,
  output logic           se_sof,
  output logic           busy,
  output logic           overrun
);

  logic       sym_valid, lv_valid;
  logic [1:0] sym [K];
  sym_t       re [K], im [K];
  sym_t       p_re [2*K], p_im [2*K];
  logic       p_valid, p_valid_im;

  sm #(.K(K)) u0 (
    .clk0, .rst, .in_valid(data_valid), .bits(sm_in),
    .sym_valid, .sym, .out_valid(lv_valid), .re, .im
  );

  pcc #(.K(K)) u_pcc_re (.clk0, .rst, .in_valid(lv_valid), .u(re), .out_valid(p_valid),    .p(p_re));
  pcc #(.K(K)) u_pcc_im (.clk0, .rst, .in_valid(lv_valid), .u(im), .out_valid(p_valid_im), .p(p_im));

  three_block #(.N(N), .M(2*K)) u2 (
    .clk0, .rst, .in_valid(p_valid), .p_re, .p_im,
    .se_out, .se_valid, .se_sof, .busy, .overrun
  );

  a_rails_aligned: assert property (@(posedge clk0) disable iff (rst) p_valid == p_valid_im);

endmodule
