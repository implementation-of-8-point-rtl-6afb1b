// tb_isltsaf: checks the 8-point inverse Slantlet transform exactly against
// the reference integer matrix for random blocks of levels -1/0/+1, checks the
// one-clock latency, and checks a 4-point instance against the published
// fixed-point example (input {0,1,1,0} -> 0.1592, 1.0515, -0.3444, -0.8663)
// within 2 units of 10^-4.
module tb_isltsaf;
  import ofdm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, out_valid, in_valid4, out_valid4;
  sym_t y [8];
  sym_t y4 [4];
  txw_t x [8];
  txw_t x4 [4];

  isltsaf #(.N(8)) dut  (.clk, .rst, .in_valid, .y, .out_valid, .x);
  isltsaf #(.N(4)) dut4 (.clk, .rst, .in_valid(in_valid4), .y(y4), .out_valid(out_valid4), .x(x4));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    in_valid = 0; in_valid4 = 0;
    foreach (y[n]) y[n] = '0;
    foreach (y4[n]) y4[n] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      int vals [8];
      foreach (vals[n]) vals[n] = int'($urandom_range(0, 2)) - 1;
      if (t == 0) foreach (vals[n]) vals[n] = (n == 2) ? 1 : 0;  // one unit impulse
      foreach (y[n]) y[n] <= sym_t'(vals[n]);
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: out_valid not high one clock after in_valid"); end
      for (int n = 0; n < 8; n++) begin
        exp = 0;
        for (int k = 0; k < 8; k++) exp += s_coef(8, k, n) * vals[k];
        checks++;
        if (int'(x[n]) != exp) begin
          failures++;
          $display("FAIL t=%0d x[%0d]=%0d expected %0d", t, n, x[n], exp);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid stuck"); end
    end
    // 4-point published example
    y4[0] <= sym_t'(0); y4[1] <= sym_t'(1); y4[2] <= sym_t'(1); y4[3] <= sym_t'(0);
    in_valid4 <= 1;
    @(posedge clk);
    in_valid4 <= 0;
    #1;
    begin
      int pub [4] = '{1592, 10515, -3444, -8663};
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (int'(x4[n]) - pub[n] > 2 || pub[n] - int'(x4[n]) > 2) begin
          failures++;
          $display("FAIL 4-point x[%0d]=%0d, published %0d", n, x4[n], pub[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
