// tb_zepd: checks that the zero padder places the six coded values in
// positions 1..6 of the 8-wide block, with zeros in positions 0 and 7, one
// clock after in_valid.
module tb_zepd;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk0 = 0, rst = 1;
  always #5 clk0 = ~clk0;

  logic in_valid, out_valid;
  sym_t p [6];
  sym_t z [8];

  zepd dut (.*);

  initial begin
    repeat (5000) @(posedge clk0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    foreach (p[j]) p[j] = '0;
    repeat (3) @(posedge clk0);
    rst <= 0;
    @(posedge clk0);
    for (int t = 0; t < 100; t++) begin
      int v [6];
      foreach (v[j]) v[j] = int'($urandom_range(0, 1)) * 2 - 1;
      foreach (p[j]) p[j] <= sym_t'(v[j]);
      in_valid <= 1;
      @(posedge clk0);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
      for (int n = 0; n < 8; n++) begin
        int e;
        e = (n == 0 || n == 7) ? 0 : v[n-1];
        checks++;
        if (int'(z[n]) != e) begin failures++; $display("FAIL z[%0d]=%0d exp %0d", n, z[n], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
