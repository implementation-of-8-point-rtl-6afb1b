// tb_depcc: checks v[i] = floor((r[2i] - r[2i+1]) / 2) for random and
// extreme inputs, one clock after in_valid, and the published 4-input
// examples ({1,-1,1,-1} -> {1,1}, {1,1,1,-1} -> {0,1}, {-1,1,1,1} -> {-1,0})
// on a two-output instance.
module tb_depcc;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk1 = 0, rst = 1;
  always #5 clk1 = ~clk1;

  logic in_valid, out_valid, out_valid2;
  rxw_t r [6];
  rxw_t v [3];
  rxw_t r2 [4];
  rxw_t v2 [2];

  depcc dut (.*);
  depcc #(.K(2)) dut2 (.clk1, .rst, .in_valid, .r(r2), .out_valid(out_valid2), .v(v2));

  initial begin
    repeat (5000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a [6];
    int ex [3][4] = '{'{1, -1, 1, -1}, '{1, 1, 1, -1}, '{-1, 1, 1, 1}};
    int ev [3][2] = '{'{1, 1}, '{0, 1}, '{-1, 0}};
    in_valid = 0;
    foreach (r[n]) r[n] = '0;
    foreach (r2[n]) r2[n] = '0;
    repeat (3) @(posedge clk1);
    rst <= 0;
    @(posedge clk1);
    for (int t = 0; t < 200; t++) begin
      foreach (a[n]) a[n] = longint'($signed(36'({$urandom, $urandom})));
      if (t == 0) begin a[0] = 34359738367; a[1] = -34359738368; end
      foreach (r[n]) r[n] <= rxw_t'(a[n]);
      in_valid <= 1;
      @(posedge clk1);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
      for (int j = 0; j < 3; j++) begin
        longint d, e;
        d = a[2*j] - a[2*j+1];
        e = (d >= 0) ? d / 2 : -((-d + 1) / 2);
        checks++;
        if (longint'(v[j]) != e) begin failures++; $display("FAIL v[%0d]=%0d exp %0d", j, v[j], e); end
      end
    end
    for (int t = 0; t < 3; t++) begin
      foreach (r2[n]) r2[n] <= rxw_t'(ex[t][n]);
      in_valid <= 1;
      @(posedge clk1);
      in_valid <= 0;
      #1;
      for (int j = 0; j < 2; j++) begin
        checks++;
        if (int'(v2[j]) != ev[t][j]) begin failures++; $display("FAIL example %0d v[%0d]=%0d", t, j, v2[j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
