// tb_s2pr: sends symbols of 16 words with rx_sof on the first word and
// random gaps in rx_valid, and checks that each complete symbol appears on the
// two rails (words 0-7 real, 8-15 imaginary) with a one-clock frame_valid
// pulse the clock after the last word. Also checks that words prev_frames the
// first rx_sof are ignored and that a symbol cut short by a new rx_sof is
// dropped.
module tb_s2pr;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk1 = 0, rst = 1;
  always #5 clk1 = ~clk1;

  txw_t rx_word;
  logic rx_valid, rx_sof, frame_valid;
  txw_t re [8], im [8];

  s2pr dut (.*);

  int frames_seen = 0;
  always @(posedge clk1) if (!rst) begin
    #1;
    if (frame_valid) frames_seen++;
  end

  initial begin
    repeat (20000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_word(txw_t w, bit sof);
    while ($urandom_range(0, 2) == 0) begin
      rx_valid <= 0; rx_sof <= 0;
      @(posedge clk1);
    end
    #1;
    rx_word = w; rx_valid = 1; rx_sof = sof;
    @(posedge clk1);
    rx_valid <= 0; rx_sof <= 0;
  endtask

  initial begin
    txw_t w [16];
    int prev_frames;
    rx_word = '0; rx_valid = 0; rx_sof = 0;
    repeat (3) @(posedge clk1);
    rst <= 0;
    @(posedge clk1);
    // stray words prev_frames synchronisation
    for (int j = 0; j < 20; j++) send_word(txw_t'($urandom), 0);
    @(posedge clk1);
    checks++;
    if (frames_seen != 0) begin failures++; $display("FAIL frame prev_frames rx_sof"); end
    for (int f = 0; f < 50; f++) begin
      foreach (w[j]) w[j] = txw_t'($urandom);
      if (f == 10) begin
        // cut short: 7 words, then a fresh symbol
        for (int j = 0; j < 7; j++) send_word(w[j], j == 0);
        foreach (w[j]) w[j] = txw_t'($urandom);
      end
      prev_frames = frames_seen;
      for (int j = 0; j < 16; j++) send_word(w[j], j == 0);
      #1;
      checks++;
      if (!frame_valid) begin
        failures++; $display("FAIL frame %0d: frame_valid=%b", f, frame_valid);
      end
      for (int j = 0; j < 8; j++) begin
        checks += 2;
        if (re[j] !== w[j])     begin failures++; $display("FAIL f%0d re[%0d]", f, j); end
        if (im[j] !== w[8 + j]) begin failures++; $display("FAIL f%0d im[%0d]", f, j); end
      end
    end
    repeat (2) @(posedge clk1);
    checks++;
    if (frames_seen != 50) begin failures++; $display("FAIL %0d frames", frames_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
