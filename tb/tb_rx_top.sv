// tb_rx_top: feeds the receiver the word streams of reference transmitter
// symbols (rx_sof on each first word), back to back and with gaps, preceded
// by stray unsynchronised words, and checks the parallel bits (bits_valid
// five clocks after the edge that takes the last word) and the serial
// output, most significant bit first, against the transmitted bits.
module tb_rx_top;
  import ofdm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk1 = 0, rst = 1;
  always #5 clk1 = ~clk1;

  txw_t rx_word;
  logic rx_valid, rx_sof, bits_valid, dout, dout_valid;
  logic [5:0] dsm2_out;

  rx_top dut (.*);

  logic [5:0] exp_q [$];
  int due_q [$];
  logic exp_bits [$];
  int cyc = 0, decoded = 0, serial_bits = 0;
  always @(posedge clk1) cyc++;

  always @(posedge clk1) if (!rst) begin
    #1;
    if (bits_valid) begin
      logic [5:0] e;
      int due;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = exp_q.pop_front();
        due = due_q.pop_front();
        if (dsm2_out !== e || due != cyc) begin
          failures++; $display("FAIL bits %b exp %b at clock %0d (due %0d)", dsm2_out, e, cyc, due);
        end
        decoded++;
      end
    end
    if (dout_valid) begin
      logic b;
      checks++;
      if (exp_bits.size() == 0) begin failures++; $display("FAIL unexpected serial bit"); end
      else begin
        b = exp_bits.pop_front();
        if (dout !== b) begin failures++; $display("FAIL serial bit %0d", serial_bits); end
      end
      serial_bits++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [5:0] w, int gap);
    int words [16];
    tx_frame(8, 32'(w), words);
    for (int n = 0; n < 16; n++) begin
      #1;
      rx_word = txw_t'(words[n]); rx_valid = 1; rx_sof = (n == 0);
      @(posedge clk1);
      #1;
      rx_valid = 0; rx_sof = 0;
      if (n == 15) begin
        exp_q.push_back(w);
        due_q.push_back(cyc + 5);
        for (int b = 5; b >= 0; b--) exp_bits.push_back(w[b]);
      end
      repeat (gap) @(posedge clk1);
    end
  endtask

  initial begin
    rx_word = '0; rx_valid = 0; rx_sof = 0;
    repeat (3) @(posedge clk1);
    rst <= 0;
    @(posedge clk1);
    for (int j = 0; j < 9; j++) begin   // stray words, no rx_sof
      #1; rx_word = txw_t'($urandom); rx_valid = 1;
      @(posedge clk1);
    end
    #1; rx_valid = 0;
    for (int w = 0; w < 64; w++) send(6'(w), 0);
    for (int t = 0; t < 10; t++) send(6'($urandom), t % 2);
    repeat (20) @(posedge clk1);
    checks++;
    if (decoded != 74 || serial_bits != 74 * 6) begin
      failures++; $display("FAIL %0d decoded, %0d serial bits", decoded, serial_bits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
