// pcc: polynomial cancellation coding of one rail. Each of the K input
// levels u[i] is placed on a pair of adjacent subcarriers with weights +1
// and -1: p[2i] = u[i], p[2i+1] = -u[i]. The sum of the weights is zero,
// which cancels the side lobes of the pair. Registered: out_valid and p
// follow in_valid and u by one clock; synchronous active-high reset.
// The pair weighting is that of the reference design's receiver equation
// v_i = (r_{2i-1} - r_{2i})/2, which this encoder inverts exactly.
module pcc
  import ofdm_pkg::*;
#(
  parameter int unsigned K = K_SYM
) (
  input  logic clk0,
  input  logic rst,
  input  logic in_valid,
  input  sym_t u [K],
  output logic out_valid,
  output sym_t p [2*K]
);

  always_ff @(posedge clk0) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int j = 0; j < int'(2*K); j++) p[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int j = 0; j < int'(K); j++) begin
          p[2*j]   <= u[j];
          p[2*j+1] <= -u[j];
        end
    end
  end

endmodule
