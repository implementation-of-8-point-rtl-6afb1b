// tb_sltsaf: checks the 8-point forward Slantlet transform exactly against
// the reference matrix for random 18-bit blocks, checks the one-clock
// latency, checks that the transform of an inverse-transformed block returns
// the levels at the 10^8 scale (within 0.1 %), and checks a 4-point instance
// against the published example ({1,-7,1,-1} -> -30000, -4472, -62324,
// 19898, within 2 units).
module tb_sltsaf;
  import ofdm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, out_valid, in_valid4, out_valid4;
  txw_t x [8];
  txw_t x4 [4];
  rxw_t z [8];
  rxw_t z4 [4];

  sltsaf #(.N(8)) dut  (.clk, .rst, .in_valid, .x, .out_valid, .z);
  sltsaf #(.N(4)) dut4 (.clk, .rst, .in_valid(in_valid4), .x(x4), .out_valid(out_valid4), .z(z4));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input longint vals [8], input bit roundtrip, input int lev [8]);
    longint exp;
    foreach (x[n]) x[n] <= txw_t'(vals[n]);
    in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
    #1;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL: out_valid not high one clock after in_valid"); end
    for (int k = 0; k < 8; k++) begin
      exp = 0;
      for (int n = 0; n < 8; n++) exp += longint'(s_coef(8, k, n)) * vals[n];
      checks++;
      if (longint'(z[k]) != exp) begin
        failures++;
        $display("FAIL z[%0d]=%0d expected %0d", k, z[k], exp);
      end
      if (roundtrip) begin
        longint target, err;
        target = longint'(lev[k]) * 100000000;
        err    = longint'(z[k]) - target;
        checks++;
        if (err > 100000 || err < -100000) begin
          failures++;
          $display("FAIL round trip z[%0d]=%0d, level %0d", k, z[k], lev[k]);
        end
      end
    end
    @(posedge clk);
  endtask

  initial begin
    longint vals [8];
    int     lev [8];
    in_valid = 0; in_valid4 = 0;
    foreach (x[n]) x[n] = '0;
    foreach (x4[n]) x4[n] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // random full-range blocks
    for (int t = 0; t < 100; t++) begin
      foreach (vals[n]) vals[n] = longint'($signed(18'($urandom)));
      if (t == 0) foreach (vals[n]) vals[n] = -131072;
      if (t == 1) foreach (vals[n]) vals[n] = (n % 2) ? 131071 : -131072;
      run_block(vals, 0, lev);
    end
    // round trip through the reference inverse transform
    for (int t = 0; t < 100; t++) begin
      foreach (lev[k]) lev[k] = int'($urandom_range(0, 2)) - 1;
      foreach (vals[n]) begin
        vals[n] = 0;
        for (int k = 0; k < 8; k++) vals[n] += s_coef(8, k, n) * lev[k];
      end
      run_block(vals, 1, lev);
    end
    // 4-point published example
    x4[0] <= 18'sd1; x4[1] <= -18'sd7; x4[2] <= 18'sd1; x4[3] <= -18'sd1;
    in_valid4 <= 1;
    @(posedge clk);
    in_valid4 <= 0;
    #1;
    begin
      int pub [4] = '{-30000, -4472, -62324, 19898};
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(z4[k]) - pub[k] > 2 || pub[k] - int'(z4[k]) > 2) begin
          failures++;
          $display("FAIL 4-point z[%0d]=%0d, published %0d", k, z4[k], pub[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
