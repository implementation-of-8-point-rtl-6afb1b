// tb_tx_top: sends serial bits into the transmitter and checks the output
// word stream against the reference transmitter, the sof latency (six
// clocks after the edge that takes the sixth bit of a symbol), the bit counter, and the decimal
// display (sign and four leading digits of the word on the previous clock).
// Bits arrive in bursts with gaps, and once too early so that a symbol is
// dropped with overrun.
module tb_tx_top;
  import ofdm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk0 = 0, rst = 1;
  always #5 clk0 = ~clk0;

  logic se_in, se_valid, se_out_valid, se_out_sof, busy, overrun, sign;
  logic [2:0] count;
  txw_t se_out;
  logic [3:0] y1, y3, y5, y7;

  tx_top dut (.*);

  int exp_q [$];
  int sof_time [$];
  int cyc = 0, nword = 0, overruns = 0, displayed = 0;
  txw_t last_word;
  always @(posedge clk0) cyc++;

  always @(posedge clk0) if (!rst) begin
    int mag, shown;
    #1;
    if (overrun) overruns++;
    // display shows the word of the previous clock
    mag = (last_word < 0) ? -int'(last_word) : int'(last_word);
    shown = mag;
    while (shown > 9999) shown /= 10;
    checks++;
    if (sign !== (last_word < 0) || int'(y1) != shown / 1000 || int'(y3) != (shown / 100) % 10 ||
        int'(y5) != (shown / 10) % 10 || int'(y7) != shown % 10) begin
      failures++; $display("FAIL display of %0d", last_word);
    end
    if (se_out_valid) displayed++;
    last_word = se_out;
    if (se_out_valid) begin
      int e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected word"); end
      else begin
        e = exp_q.pop_front();
        if (int'(se_out) != e) begin failures++; $display("FAIL word %0d = %0d exp %0d", nword, se_out, e); end
      end
      if (se_out_sof) begin
        checks++;
        if (sof_time.size() == 0 || sof_time.pop_front() != cyc) begin
          failures++; $display("FAIL sof at clock %0d", cyc);
        end
      end
      nword++;
    end
  end

  initial begin
    repeat (30000) @(posedge clk0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one symbol of 6 bits, with `gap` idle clocks between bits
  task automatic send(logic [5:0] w, int gap, bit accept);
    int words [16];
    for (int b = 5; b >= 0; b--) begin
      #1;
      se_in = w[b]; se_valid = 1;
      @(posedge clk0);
      #1;
      checks++;
      if (int'(count) != (5 - b + 1) % 6) begin failures++; $display("FAIL count=%0d", count); end
      se_valid = 0;
      if (b == 0 && accept) begin
        tx_frame(8, 32'(w), words);
        foreach (words[n]) exp_q.push_back(words[n]);
        sof_time.push_back(cyc + 6);   // cyc already counts the sixth bit's clock
      end
      repeat (gap) @(posedge clk0);
    end
  endtask

  initial begin
    last_word = '0;
    se_in = 0; se_valid = 0;
    repeat (3) @(posedge clk0);
    rst <= 0;
    @(posedge clk0);
    for (int t = 0; t < 40; t++) begin
      send(6'($urandom), (t % 3 == 0) ? 2 : 1, 1);
      repeat (6) @(posedge clk0);
    end
    repeat (30) @(posedge clk0);
    send(6'($urandom), 0, 1);   // symbol A
    send(6'($urandom), 0, 0);   // 6 clocks later: A still being sent -> dropped
    repeat (40) @(posedge clk0);
    checks++;
    if (exp_q.size() != 0 || nword != 41 * 16) begin failures++; $display("FAIL %0d words", nword); end
    checks++;
    if (overruns != 1) begin failures++; $display("FAIL %0d overruns", overruns); end
    checks++;
    if (displayed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
