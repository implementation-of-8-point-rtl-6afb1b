// se2pa_t: transmitter serial-to-parallel converter. Collects BITS serial
// input bits into one parallel word per OFDM symbol.
//
// A bit is taken on each rising clock edge where se_valid is high. The
// first bit of a group lands in the most significant position
// (sm_in[BITS-1]), so it becomes Bit1 of the first QAM symbol. When the
// BITS-th bit is taken, sm_in is updated and data_valid pulses high for one
// clock. count shows how many bits of the current group have been taken
// (0 .. BITS-1). Synchronous active-high reset clears the group. The port
// names follow the reference design's top-level schematic; se_valid and the
// bit order are this design's choices.
module se2pa_t
  import ofdm_pkg::*;
#(
  parameter int unsigned BITS_P = BITS,
  localparam int unsigned CW    = $clog2(BITS_P + 1)
) (
  input  logic              clk0,
  input  logic              rst,
  input  logic              se_in,
  input  logic              se_valid,
  output logic [CW-1:0]     count,
  output logic              data_valid,
  output logic [BITS_P-1:0] sm_in
);

  logic [BITS_P-2:0] shreg;  // bits taken so far, oldest at the top

  always_ff @(posedge clk0) begin
    if (rst) begin
      count      <= '0;
      shreg      <= '0;
      sm_in      <= '0;
      data_valid <= 1'b0;
    end else begin
      data_valid <= 1'b0;
      if (se_valid) begin
        if (count == CW'(BITS_P - 1)) begin
          sm_in      <= {shreg, se_in};
          data_valid <= 1'b1;
          count      <= '0;
          shreg      <= '0;
        end else begin
          shreg <= {shreg[BITS_P-3:0], se_in};
          count <= count + 1'b1;
        end
      end
    end
  end

endmodule
