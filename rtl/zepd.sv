// zepd: zero padding of one rail, from M coded levels to the N inputs of the
// inverse transform. (N-M)/2 zeros go in front and the rest at the end, so
// for M = 6, N = 8 the frame is {0, p0..p5, 0}. Placing the zeros at both
// ends of the block matches the receiver's zero-removal results in the
// reference design, which keep the middle elements. Registered: out_valid and
// z follow in_valid and p by one clock; synchronous active-high reset.
module zepd
  import ofdm_pkg::*;
#(
  parameter int unsigned M = 2 * K_SYM,
  parameter int unsigned N = N_PT
) (
  input  logic clk0,
  input  logic rst,
  input  logic in_valid,
  input  sym_t p [M],
  output logic out_valid,
  output sym_t z [N]
);

  localparam int unsigned LEAD = (N - M) / 2;

  always_ff @(posedge clk0) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int n = 0; n < int'(N); n++) z[n] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int n = 0; n < int'(N); n++)
          z[n] <= (n >= int'(LEAD) && n < int'(LEAD + M)) ? p[n - int'(LEAD)] : sym_t'(0);
    end
  end

endmodule
