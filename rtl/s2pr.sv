// s2pr: receiver serial-to-parallel converter (the S2PR1/S2PR2/S2PR3 stage).
// Collects the 2N received words of one OFDM symbol, real rail first, and
// presents them as two N-word rails.
//
// Symbol synchronisation is assumed, as in the reference design: rx_sof
// marks the first word of each symbol. A word is taken on each clock where
// rx_valid is high; a word with rx_sof restarts the count at word 0, and
// words before the first rx_sof are ignored. When word 2N-1 is taken, re and
// im are updated and frame_valid pulses for one clock. A symbol that is cut
// short by a new rx_sof is discarded. Synchronous active-high reset.
module s2pr
  import ofdm_pkg::*;
#(
  parameter int unsigned N = N_PT,
  parameter int unsigned W = TX_W
) (
  input  logic                clk1,
  input  logic                rst,
  input  logic signed [W-1:0] rx_word,
  input  logic                rx_valid,
  input  logic                rx_sof,
  output logic                frame_valid,
  output logic signed [W-1:0] re [N],
  output logic signed [W-1:0] im [N]
);

  localparam int unsigned IW = $clog2(2 * N);

  logic signed [W-1:0] buf_q [2*N-1];   // words 0 .. 2N-2
  logic [IW-1:0]       idx;             // index of the next word
  logic                synced;

  always_ff @(posedge clk1) begin
    if (rst) begin
      idx         <= '0;
      synced      <= 1'b0;
      frame_valid <= 1'b0;
      for (int j = 0; j < int'(2*N-1); j++) buf_q[j] <= '0;
      for (int j = 0; j < int'(N); j++) begin
        re[j] <= '0;
        im[j] <= '0;
      end
    end else begin
      frame_valid <= 1'b0;
      if (rx_valid && rx_sof) begin
        buf_q[0] <= rx_word;
        idx      <= IW'(1);
        synced   <= 1'b1;
      end else if (rx_valid && synced) begin
        if (idx == IW'(2 * N - 1)) begin
          for (int j = 0; j < int'(N); j++) re[j] <= buf_q[j];
          for (int j = 0; j < int'(N) - 1; j++) im[j] <= buf_q[int'(N) + j];
          im[N-1]     <= rx_word;
          frame_valid <= 1'b1;
          synced      <= 1'b0;   // wait for the next start of symbol
          idx         <= '0;
        end else begin
          buf_q[idx] <= rx_word;
          idx        <= idx + 1'b1;
        end
      end
    end
  end

endmodule
