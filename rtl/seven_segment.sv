// seven_segment: decimal read-out of the transmitter output word on four
// display digits and a sign lamp.
//
// sign is high for a negative word. The magnitude is converted to decimal
// (double dabble) and its four leading digits are shown, y1 the most
// significant: 1592 shows 1592, while 10515 shows 1051 and 105150 shows
// 1051 too (the trailing digits are dropped, so the display reads
// ten-thousandths for words below 10^4). That read-out matches the
// fixed-point results the reference design lists for its ISLT; the port
// names follow its top-level schematic, the decoding rule is this design's
// reading of it. Outputs are registered every clock (one clock latency);
// synchronous active-high reset clears them.
module seven_segment
  import ofdm_pkg::*;
#(
  parameter int unsigned W = TX_W
) (
  input  logic                clk0,
  input  logic                rst,
  input  logic signed [W-1:0] x_in,
  output logic [3:0]          y1,
  output logic [3:0]          y3,
  output logic [3:0]          y5,
  output logic [3:0]          y7,
  output logic                sign
);

  // enough BCD digits for the largest magnitude, 2^(W-1)
  localparam int unsigned ND = (W * 3 + 9) / 10 + 1;

  logic [W-1:0]    mag;
  logic [4*ND-1:0] bcd;
  int unsigned     lead;   // index of the most significant non-zero digit (min 3)

  always_comb begin
    mag = x_in[W-1] ? W'(-x_in) : W'(x_in);
    // double dabble
    bcd = '0;
    for (int b = int'(W) - 1; b >= 0; b--) begin
      for (int d = 0; d < int'(ND); d++)
        if (bcd[4*d +: 4] >= 4'd5) bcd[4*d +: 4] = bcd[4*d +: 4] + 4'd3;
      bcd = {bcd[4*ND-2:0], mag[b]};
    end
    lead = 3;
    for (int d = 4; d < int'(ND); d++)
      if (bcd[4*d +: 4] != 4'd0) lead = d;
  end

  always_ff @(posedge clk0) begin
    if (rst) begin
      {y1, y3, y5, y7} <= '0;
      sign             <= 1'b0;
    end else begin
      y1   <= bcd[4*lead       +: 4];
      y3   <= bcd[4*(lead - 1) +: 4];
      y5   <= bcd[4*(lead - 2) +: 4];
      y7   <= bcd[4*(lead - 3) +: 4];
      sign <= x_in[W-1];
    end
  end

endmodule
