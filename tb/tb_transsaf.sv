// tb_transsaf: drives 6-bit words (sm_in with data_valid) and checks the 16
// serial words of each symbol against the reference transmitter (4QAM map,
// PCC pairs, zero pads, inverse Slantlet matrix), se_sof six clocks after
// data_valid, and all 64 input words including back-to-back symbols.
module tb_transsaf;
  import ofdm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk0 = 0, rst = 1;
  always #5 clk0 = ~clk0;

  logic [5:0] sm_in;
  logic data_valid, se_valid, se_sof, busy, overrun;
  txw_t se_out;

  transsaf dut (.*);

  int exp_q [$];
  int sof_time [$];
  int cyc = 0, nword = 0;
  always @(posedge clk0) cyc++;

  always @(posedge clk0) if (!rst) begin
    #1;
    checks++;
    if (overrun) begin failures++; $display("FAIL unexpected overrun"); end
    if (se_valid) begin
      int e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected word"); end
      else begin
        e = exp_q.pop_front();
        if (int'(se_out) != e) begin failures++; $display("FAIL word %0d = %0d exp %0d", nword, se_out, e); end
      end
      if (se_sof) begin
        checks++;
        if (sof_time.size() == 0 || sof_time.pop_front() != cyc) begin
          failures++; $display("FAIL se_sof at clock %0d", cyc);
        end
      end
      nword++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [5:0] w);
    int words [16];
    #1;
    sm_in = w; data_valid = 1;
    tx_frame(8, 32'(w), words);
    foreach (words[n]) exp_q.push_back(words[n]);
    sof_time.push_back(cyc + 6);
    @(posedge clk0);
    #1;
    data_valid = 0;
  endtask

  initial begin
    sm_in = '0; data_valid = 0;
    repeat (3) @(posedge clk0);
    rst <= 0;
    @(posedge clk0);
    for (int w = 0; w < 64; w++) begin
      send(6'(w));
      repeat ((w < 32) ? 15 : 20) @(posedge clk0);
    end
    repeat (40) @(posedge clk0);
    checks++;
    if (exp_q.size() != 0 || nword != 64 * 16) begin failures++; $display("FAIL %0d words sent", nword); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
