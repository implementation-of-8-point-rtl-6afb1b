// tb_pa2se_t: offers frames of 16 random words and checks the serial order
// (real rail, then imaginary rail), se_sof on the first word, the one-clock
// start latency, frames back to back without a gap, and that a frame offered
// while busy is dropped with an overrun pulse and does not disturb the frame
// being sent.
module tb_pa2se_t;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk0 = 0, rst = 1;
  always #5 clk0 = ~clk0;

  logic in_valid, busy, overrun, se_valid, se_sof;
  txw_t x_re [8], x_im [8], se_out;

  pa2se_t dut (.*);

  initial begin
    repeat (20000) @(posedge clk0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected word stream, filled when a frame is accepted
  txw_t exp_q [$];
  int   sof_at [$];     // index in the stream where a frame starts
  int   nword = 0;
  int   overruns = 0, backtoback = 0;

  always @(posedge clk0) if (!rst) begin
    #1;
    if (se_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected word");
      end else begin
        txw_t e;
        e = exp_q.pop_front();
        if (se_out !== e) begin failures++; $display("FAIL word %0d = %0d exp %0d", nword, se_out, e); end
      end
      checks++;
      if (se_sof !== (sof_at.size() > 0 && sof_at[0] == nword)) begin
        failures++; $display("FAIL sof at word %0d", nword);
      end
      if (sof_at.size() > 0 && sof_at[0] == nword) void'(sof_at.pop_front());
      nword++;
    end
    if (overrun) overruns++;
  end

  task automatic offer(input bit expect_accept);
    txw_t r [8], i [8];
    foreach (r[n]) begin r[n] = txw_t'($urandom); i[n] = txw_t'($urandom); end
    #1;  // move off the clock edge
    foreach (r[n]) begin x_re[n] = r[n]; x_im[n] = i[n]; end
    in_valid = 1;
    #1;
    checks++;
    if (busy === expect_accept) begin failures++; $display("FAIL busy=%b when offering", busy); end
    if (!busy) begin
      sof_at.push_back(nword + exp_q.size());
      foreach (r[n]) exp_q.push_back(r[n]);
      foreach (i[n]) exp_q.push_back(i[n]);
    end
    @(posedge clk0);
    in_valid <= 0;
    #1;
  endtask

  initial begin
    in_valid = 0;
    foreach (x_re[n]) begin x_re[n] = '0; x_im[n] = '0; end
    repeat (3) @(posedge clk0);
    rst <= 0;
    @(posedge clk0);
    // single frame, then idle
    offer(1);
    repeat (20) @(posedge clk0);
    // back-to-back frames: offer again as soon as busy falls
    for (int f = 0; f < 5; f++) begin
      offer(1);
      while (busy) begin @(posedge clk0); #1; end
      backtoback++;
    end
    // a frame offered in the middle of a transfer is dropped
    repeat (10) @(posedge clk0);
    offer(1);
    repeat (4) @(posedge clk0);
    offer(0);
    repeat (40) @(posedge clk0);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words not sent", exp_q.size()); end
    checks++;
    if (overruns != 1) begin failures++; $display("FAIL overrun pulses %0d", overruns); end
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL %0d idle clocks inside a burst", gaps); end
    checks++;
    if (nword != 7 * 16) begin failures++; $display("FAIL %0d words sent", nword); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // words of back-to-back frames must be contiguous: count clocks without a
  // word while more words are queued
  int gaps = 0;
  always @(posedge clk0) if (!rst) begin
    #2;
    if (!se_valid && exp_q.size() != 0 && !in_valid) gaps++;
  end
endmodule
