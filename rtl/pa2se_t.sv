// pa2se_t: transmitter parallel-to-serial converter. Sends the 2N time
// samples of one OFDM symbol, real rail x_re[0..N-1] then imaginary rail
// x_im[0..N-1], one word per clock.
//
// A frame is loaded on a clock where in_valid is high and the converter is
// free (busy low). The first word appears on se_out the next clock with
// se_valid and se_sof high; the other 2N-1 words follow on consecutive
// clocks with se_valid high. busy falls the clock after the last word has
// been put out, so a frame loaded then follows with no gap (2N clocks per
// frame). A frame offered while busy is high is
// dropped and overrun pulses for one clock. Synchronous active-high reset.
// The 18-bit output word follows the reference design; the word order, the
// framing signals and the overrun flag are this design's choices.
module pa2se_t
  import ofdm_pkg::*;
#(
  parameter int unsigned N = N_PT,
  parameter int unsigned W = TX_W
) (
  input  logic                clk0,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_re [N],
  input  logic signed [W-1:0] x_im [N],
  output logic                busy,
  output logic                overrun,
  output logic signed [W-1:0] se_out,
  output logic                se_valid,
  output logic                se_sof
);

  localparam int unsigned IW = $clog2(2 * N);

  logic signed [W-1:0] buf_q [2*N];
  logic [IW-1:0]       idx;
  logic                active;

  assign busy = active && (idx != '0);

  always_ff @(posedge clk0) begin
    if (rst) begin
      active   <= 1'b0;
      idx      <= '0;
      overrun  <= 1'b0;
      se_out   <= '0;
      se_valid <= 1'b0;
      se_sof   <= 1'b0;
      for (int j = 0; j < int'(2*N); j++) buf_q[j] <= '0;
    end else begin
      overrun  <= in_valid && busy;
      se_valid <= 1'b0;
      se_sof   <= 1'b0;
      if (in_valid && !busy) begin
        for (int j = 0; j < int'(N); j++) begin
          buf_q[j]             <= x_re[j];
          buf_q[int'(N) + j]   <= x_im[j];
        end
        se_out   <= x_re[0];
        se_valid <= 1'b1;
        se_sof   <= 1'b1;
        idx      <= IW'(1);
        active   <= 1'b1;
      end else if (active) begin
        if (idx == '0) begin
          active <= 1'b0;
        end else begin
          se_out   <= buf_q[idx];
          se_valid <= 1'b1;
          idx      <= (idx == IW'(2 * N - 1)) ? '0 : idx + 1'b1;
        end
      end
    end
  end

endmodule
