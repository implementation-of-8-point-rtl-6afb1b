// serial_converter: receiver parallel-to-serial converter. On a clock where
// load is high it takes the BITS-bit word d and then sends it on dout, most
// significant bit first, one bit per clock for the next BITS clocks, with
// dout_valid high. A load during a transfer restarts it with the new word.
// The port names follow the reference receiver's top-level schematic; the
// bit order (the order in which the transmitter took its input) and
// dout_valid are this design's choices. Synchronous active-high reset.
module serial_converter
  import ofdm_pkg::*;
#(
  parameter int unsigned BITS_P = BITS,
  localparam int unsigned CW    = $clog2(BITS_P + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [BITS_P-1:0] d,
  output logic              dout,
  output logic              dout_valid
);

  logic [BITS_P-1:0] shreg;
  logic [CW-1:0]     left;   // bits still to send after the current one

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg      <= '0;
      left       <= '0;
      dout       <= 1'b0;
      dout_valid <= 1'b0;
    end else if (load) begin
      dout       <= d[BITS_P-1];
      dout_valid <= 1'b1;
      shreg      <= {d[BITS_P-2:0], 1'b0};
      left       <= CW'(BITS_P - 1);
    end else if (left != '0) begin
      dout       <= shreg[BITS_P-1];
      dout_valid <= 1'b1;
      shreg      <= {shreg[BITS_P-2:0], 1'b0};
      left       <= left - 1'b1;
    end else begin
      dout_valid <= 1'b0;
    end
  end

endmodule
