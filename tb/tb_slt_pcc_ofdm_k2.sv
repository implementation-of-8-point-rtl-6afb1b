// tb_slt_pcc_ofdm_k2: end-to-end test of the link built for 4-bit symbols:
// 8-point transforms with K = 2 4QAM symbols per rail, so each rail carries
// 4 PCC subcarriers between two zeros at each end of the block.
//
// The transmitter output is looped back to the receiver through a plain
// wire. The test sends every 4-bit pattern with the input paced at the full
// rate (4 bits per 16 clocks, so the transmitter output runs without gaps),
// then a symbol too early to be taken (dropped with tx_overrun), then random
// symbols with idle time between them. It checks every output bit, the
// parallel bits, and that each symbol's first output bit comes 28 clocks
// after the edge that takes its last input bit.
module tb_slt_pcc_ofdm_k2;
  import ofdm_pkg::*;

  localparam int KB = 4;   // bits per OFDM symbol

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic se_in, se_valid, tx_valid, tx_sof, tx_busy, tx_overrun, sign;
  logic [2:0] count;
  txw_t tx_word;
  logic [3:0] y1, y3, y5, y7;
  logic rx_bits_valid, dout, dout_valid;
  logic [KB-1:0] rx_bits;

  slt_pcc_ofdm #(.K(KB / 2)) dut (
    .clk0(clk), .rst, .se_in, .se_valid, .count, .tx_word, .tx_valid, .tx_sof,
    .tx_busy, .tx_overrun, .y1, .y3, .y5, .y7, .sign,
    .clk1(clk), .rx_word(tx_word), .rx_valid(tx_valid), .rx_sof(tx_sof),
    .rx_bits, .rx_bits_valid, .dout, .dout_valid
  );

  // scoreboard
  logic          exp_bits [$];
  logic [KB-1:0] exp_words [$];
  int            first_bit_due [$];
  int cyc = 0, bits_out = 0, bit_in_word = 0;
  int n_patterns = 0, n_overrun = 0, n_b2b = 0, tx_gapless_run = 0;
  bit seen_pattern [2**KB];
  always @(posedge clk) cyc++;

  always @(posedge clk) if (!rst) begin
    #1;
    if (tx_overrun) n_overrun++;
    if (tx_valid) begin
      if (tx_sof && tx_gapless_run == 16) n_b2b++;
      tx_gapless_run = tx_sof ? 1 : tx_gapless_run + 1;
    end else tx_gapless_run = 0;
    if (rx_bits_valid) begin
      logic [KB-1:0] e;
      checks++;
      if (exp_words.size() == 0) begin failures++; $display("FAIL unexpected symbol"); end
      else begin
        e = exp_words.pop_front();
        if (rx_bits !== e) begin failures++; $display("FAIL symbol: %b exp %b", rx_bits, e); end
      end
    end
    if (dout_valid) begin
      logic b;
      int due;
      checks++;
      if (exp_bits.size() == 0) begin failures++; $display("FAIL unexpected bit"); end
      else begin
        b = exp_bits.pop_front();
        if (dout !== b) begin failures++; $display("FAIL output bit %0d", bits_out); end
      end
      if (bit_in_word == 0) begin
        checks++;
        due = (first_bit_due.size() > 0) ? first_bit_due.pop_front() : -1;
        if (due != cyc) begin failures++; $display("FAIL first bit at clock %0d, due %0d", cyc, due); end
      end
      bit_in_word = (bit_in_word + 1) % KB;
      bits_out++;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one symbol: KB bits, each followed by `gap` idle clocks
  task automatic send(logic [KB-1:0] w, int gap, bit accept);
    for (int b = KB - 1; b >= 0; b--) begin
      #1;
      se_in = w[b]; se_valid = 1;
      @(posedge clk);
      #1;
      se_valid = 0;
      if (b == 0 && accept) begin
        exp_words.push_back(w);
        for (int k = KB - 1; k >= 0; k--) exp_bits.push_back(w[k]);
        first_bit_due.push_back(cyc + 28);
        if (!seen_pattern[w]) begin seen_pattern[w] = 1; n_patterns++; end
      end
      repeat (gap) @(posedge clk);
    end
  endtask

  initial begin
    se_in = 0; se_valid = 0;
    foreach (seen_pattern[i]) seen_pattern[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    // every pattern at the full rate: 4 bits in 16 clocks
    for (int w = 0; w < 2**KB; w++) send(KB'(w), 3, 1);
    repeat (10) @(posedge clk);
    send(4'b1001, 0, 1);
    send(4'b0110, 0, 0);     // arrives while the previous symbol is sent
    repeat (40) @(posedge clk);
    for (int t = 0; t < 20; t++) send(KB'($urandom), 4 + t % 3, 1);
    repeat (60) @(posedge clk);
    checks++;
    if (exp_bits.size() != 0 || exp_words.size() != 0) begin
      failures++; $display("FAIL %0d bits never came out", exp_bits.size());
    end
    $display("mechanisms: patterns=%0d back_to_back=%0d overrun=%0d",
             n_patterns, n_b2b, n_overrun);
    checks += 3;
    if (n_patterns != 2**KB) begin failures++; $display("FAIL not all patterns sent"); end
    if (n_b2b == 0)          begin failures++; $display("FAIL no back-to-back symbols"); end
    if (n_overrun != 1)      begin failures++; $display("FAIL overrun count %0d", n_overrun); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
