// tb_slt_pcc_ofdm: end-to-end test of the whole link at its default size
// (8-point transforms, 6 bits per OFDM symbol).
//
// The transmitter output is looped back to the receiver through a channel
// model in this testbench: a plain wire, or a wire adding random disturbance
// of up to +/-2000 (0.2 of a level at the 10^4 scale) to each word. The test
// sends serial bits and checks that the receiver's serial output repeats
// every accepted symbol's bits in order, that each symbol's first output bit
// comes 28 clocks after the edge that takes its sixth input bit, and that
// the parallel bits agree. It counts each mechanism of the design and fails
// if one never happened:
//   all 64 bit patterns sent, symbols back to back (output stream without
//   gaps), a symbol dropped with tx_overrun, symbols decoded through the
//   disturbed channel, and a non-zero value on the decimal display.
module tb_slt_pcc_ofdm;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic se_in, se_valid, tx_valid, tx_sof, tx_busy, tx_overrun, sign;
  logic [2:0] count;
  txw_t tx_word, rx_word;
  logic [3:0] y1, y3, y5, y7;
  logic rx_valid, rx_sof, rx_bits_valid, dout, dout_valid;
  logic [5:0] rx_bits;

  slt_pcc_ofdm dut (
    .clk0(clk), .rst, .se_in, .se_valid, .count, .tx_word, .tx_valid, .tx_sof,
    .tx_busy, .tx_overrun, .y1, .y3, .y5, .y7, .sign,
    .clk1(clk), .rx_word, .rx_valid, .rx_sof, .rx_bits, .rx_bits_valid, .dout, .dout_valid
  );

  // channel model
  int noise = 0;
  always_comb begin
    rx_valid = tx_valid;
    rx_sof   = tx_sof;
  end
  int noise_now;
  always @(tx_word or noise) begin
    noise_now = (noise > 0) ? int'($urandom_range(0, 2*noise)) - noise : 0;
    rx_word = txw_t'(int'(tx_word) + noise_now);
  end

  // scoreboard
  logic       exp_bits [$];
  logic [5:0] exp_words [$];
  int         first_bit_due [$];
  int cyc = 0, bits_out = 0, words_out = 0, bit_in_word = 0;
  int n_patterns = 0, n_overrun = 0, n_noisy_ok = 0, n_display = 0, n_b2b = 0;
  bit seen_pattern [64];
  int tx_gapless_run = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (!rst) begin
    #1;
    if (tx_overrun) n_overrun++;
    if ({y1, y3, y5, y7} != '0) n_display++;
    // back to back: a start of symbol right after the previous symbol's last word
    if (tx_valid) begin
      if (tx_sof && tx_gapless_run == 16) n_b2b++;
      tx_gapless_run = tx_sof ? 1 : tx_gapless_run + 1;
    end else tx_gapless_run = 0;
    if (rx_bits_valid) begin
      logic [5:0] e;
      checks++;
      if (exp_words.size() == 0) begin failures++; $display("FAIL unexpected symbol"); end
      else begin
        e = exp_words.pop_front();
        if (rx_bits !== e) begin failures++; $display("FAIL symbol %0d: %b exp %b", words_out, rx_bits, e); end
        else if (noise > 0) n_noisy_ok++;
      end
      words_out++;
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
      bit_in_word = (bit_in_word + 1) % 6;
      bits_out++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one symbol: 6 bits, `gap` idle clocks after each bit; gap = -1 paces the
  // bits so that the symbol takes exactly 16 clocks (2,2,2,2,1,1 idle clocks)
  task automatic send(logic [5:0] w, int gap, bit accept);
    for (int b = 5; b >= 0; b--) begin
      #1;
      se_in = w[b]; se_valid = 1;
      @(posedge clk);
      #1;
      se_valid = 0;
      if (b == 0 && accept) begin
        exp_words.push_back(w);
        for (int k = 5; k >= 0; k--) exp_bits.push_back(w[k]);
        first_bit_due.push_back(cyc + 28);
        if (!seen_pattern[w]) begin seen_pattern[w] = 1; n_patterns++; end
      end
      repeat ((gap >= 0) ? gap : ((b >= 2) ? 2 : 1)) @(posedge clk);
    end
  endtask

  initial begin
    se_in = 0; se_valid = 0;
    foreach (seen_pattern[i]) seen_pattern[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    // every pattern; bits paced so that one symbol takes exactly 16 clocks:
    // the output runs back to back
    for (int w = 0; w < 64; w++) send(6'(w), -1, 1);
    repeat (10) @(posedge clk);
    // a symbol arriving while the previous one is still being sent is dropped
    send(6'b100111, 0, 1);
    send(6'b011000, 0, 0);
    repeat (40) @(posedge clk);
    // disturbed channel
    noise = 2000;
    for (int t = 0; t < 30; t++) send(6'($urandom), 2 + t % 3, 1);
    repeat (60) @(posedge clk);
    noise = 0;
    checks++;
    if (exp_bits.size() != 0 || exp_words.size() != 0) begin
      failures++; $display("FAIL %0d bits never came out", exp_bits.size());
    end
    $display("mechanisms: patterns=%0d back_to_back=%0d overrun=%0d noisy_ok=%0d display=%0d",
             n_patterns, n_b2b, n_overrun, n_noisy_ok, n_display);
    checks += 5;
    if (n_patterns != 64) begin failures++; $display("FAIL not all patterns sent"); end
    if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back symbols"); end
    if (n_overrun != 1)   begin failures++; $display("FAIL overrun count %0d", n_overrun); end
    if (n_noisy_ok == 0)  begin failures++; $display("FAIL no symbol through the disturbed channel"); end
    if (n_display == 0)   begin failures++; $display("FAIL display never lit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
