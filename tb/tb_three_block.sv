// tb_three_block: drives PCC-coded rails into the modulator and checks the
// 16 serial words of each symbol against the reference (zero pads at both
// ends, then the inverse Slantlet matrix), se_sof three clocks after
// in_valid, symbols back to back every 16 clocks, and a symbol offered too
// early being dropped with overrun.
module tb_three_block;
  import ofdm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk0 = 0, rst = 1;
  always #5 clk0 = ~clk0;

  logic in_valid, se_valid, se_sof, busy, overrun;
  sym_t p_re [6], p_im [6];
  txw_t se_out;

  three_block dut (.*);

  int exp_q [$];
  int sof_time [$];
  int cyc = 0, nword = 0, overruns = 0;
  always @(posedge clk0) cyc++;

  always @(posedge clk0) if (!rst) begin
    #1;
    if (overrun) overruns++;
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

  task automatic offer(bit accept);
    int re [6], im [6], pr [8], pi [8];
    #1;
    for (int j = 0; j < 3; j++) begin
      re[2*j] = int'($urandom_range(0, 1)) * 2 - 1; re[2*j+1] = -re[2*j];
      im[2*j] = int'($urandom_range(0, 1)) * 2 - 1; im[2*j+1] = -im[2*j];
    end
    foreach (p_re[j]) begin p_re[j] = sym_t'(re[j]); p_im[j] = sym_t'(im[j]); end
    in_valid = 1;
    if (accept) begin
      foreach (pr[n]) begin pr[n] = (n == 0 || n == 7) ? 0 : re[n-1]; pi[n] = (n == 0 || n == 7) ? 0 : im[n-1]; end
      for (int half = 0; half < 2; half++)
        for (int n = 0; n < 8; n++) begin
          int acc;
          acc = 0;
          for (int k = 0; k < 8; k++) acc += s_coef(8, k, n) * (half ? pi[k] : pr[k]);
          exp_q.push_back(acc);
        end
      sof_time.push_back(cyc + 3);
    end
    @(posedge clk0);
    #1;
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0;
    foreach (p_re[j]) begin p_re[j] = '0; p_im[j] = '0; end
    repeat (3) @(posedge clk0);
    rst <= 0;
    @(posedge clk0);
    offer(1);
    repeat (30) @(posedge clk0);
    for (int f = 0; f < 20; f++) begin        // back to back, one every 16 clocks
      offer(1);
      repeat (15) @(posedge clk0);
    end
    repeat (30) @(posedge clk0);
    offer(1);
    repeat (5) @(posedge clk0);
    offer(0);                                 // too early: dropped
    repeat (40) @(posedge clk0);
    checks++;
    if (exp_q.size() != 0 || nword != 22 * 16) begin failures++; $display("FAIL %0d words sent", nword); end
    checks++;
    if (overruns != 1) begin failures++; $display("FAIL %0d overruns", overruns); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
