// tb_safrec: feeds the receiver datapath the two rails of reference
// transmitter symbols for all 64 input words, clean and with random additive
// disturbance of up to 2000 (0.2 of a level) on every sample, and checks
// that the decided bits equal the transmitted ones five clocks after
// in_valid, also with symbols on consecutive clocks.
module tb_safrec;
  import ofdm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk1 = 0, rst = 1;
  always #5 clk1 = ~clk1;

  logic in_valid, out_valid;
  txw_t x_re [8], x_im [8];
  logic [5:0] dsm2_out;

  safrec dut (.*);

  logic [5:0] exp_q [$];
  int due_q [$];
  int cyc = 0, decoded = 0;
  always @(posedge clk1) cyc++;

  always @(posedge clk1) if (!rst) begin
    #1;
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        logic [5:0] e;
        int due;
        e = exp_q.pop_front();
        due = due_q.pop_front();
        if (dsm2_out !== e || due != cyc) begin
          failures++; $display("FAIL bits %b exp %b at clock %0d (due %0d)", dsm2_out, e, cyc, due);
        end
        decoded++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [5:0] w, int noise);
    int words [16];
    tx_frame(8, 32'(w), words);
    #1;
    for (int n = 0; n < 8; n++) begin
      x_re[n] = txw_t'(words[n]     + int'($urandom_range(0, 2*noise)) - noise);
      x_im[n] = txw_t'(words[8 + n] + int'($urandom_range(0, 2*noise)) - noise);
    end
    in_valid = 1;
    exp_q.push_back(w);
    due_q.push_back(cyc + 5);
    @(posedge clk1);
    #1;
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0;
    foreach (x_re[n]) begin x_re[n] = '0; x_im[n] = '0; end
    repeat (3) @(posedge clk1);
    rst <= 0;
    @(posedge clk1);
    for (int w = 0; w < 64; w++) begin send(6'(w), 0); repeat (2) @(posedge clk1); end
    for (int w = 0; w < 64; w++) send(6'(w), 2000);          // consecutive clocks
    repeat (10) @(posedge clk1);
    checks++;
    if (decoded != 128) begin failures++; $display("FAIL %0d decoded", decoded); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
