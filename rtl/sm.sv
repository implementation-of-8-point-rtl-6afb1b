// sm: 4QAM signal mapper, the SM and SM2 stages of the transmitter.
//
// Stage SM (one clock) cuts the 2K-bit input word into K symbols, each from
// two adjacent bits, the earlier bit (Bit1) being the symbol's MSB:
// 00 -> 0, 01 -> 1, 10 -> 2, 11 -> 3. Symbol 0 comes from the top two bits.
// Stage SM2 (one more clock) maps each symbol to a real and an imaginary
// level: 0 -> (-1,+1), 1 -> (-1,-1), 2 -> (+1,+1), 3 -> (+1,-1).
// Both tables follow the reference design. sym/sym_valid are the SM outputs;
// re, im and out_valid, two clocks after in_valid, are the SM2 outputs.
// Synchronous active-high reset clears both stages.
module sm
  import ofdm_pkg::*;
#(
  parameter int unsigned K = K_SYM
) (
  input  logic             clk0,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [2*K-1:0]   bits,
  output logic             sym_valid,
  output logic [1:0]       sym [K],
  output logic             out_valid,
  output sym_t             re  [K],
  output sym_t             im  [K]
);

  always_ff @(posedge clk0) begin
    if (rst) begin
      sym_valid <= 1'b0;
      out_valid <= 1'b0;
      for (int j = 0; j < int'(K); j++) begin
        sym[j] <= '0;
        re[j]  <= '0;
        im[j]  <= '0;
      end
    end else begin
      // SM: bit pairs to symbols
      sym_valid <= in_valid;
      if (in_valid)
        for (int j = 0; j < int'(K); j++)
          sym[j] <= bits[2*(int'(K)-1-j) +: 2];
      // SM2: symbols to levels
      out_valid <= sym_valid;
      if (sym_valid)
        for (int j = 0; j < int'(K); j++) begin
          re[j] <= sym[j][1] ? sym_t'(1) : sym_t'(-1);
          im[j] <= sym[j][0] ? sym_t'(-1) : sym_t'(1);
        end
    end
  end

endmodule
