// tb_pcc: checks the PCC pair mapping p[2i] = u[i], p[2i+1] = -u[i] for all
// 27 combinations of three levels -1/0/+1, the one-clock latency, and that
// every coded pair sums to zero.
module tb_pcc;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk0 = 0, rst = 1;
  always #5 clk0 = ~clk0;

  logic in_valid, out_valid;
  sym_t u [3];
  sym_t p [6];

  pcc dut (.*);

  initial begin
    repeat (5000) @(posedge clk0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    foreach (u[j]) u[j] = '0;
    repeat (3) @(posedge clk0);
    rst <= 0;
    @(posedge clk0);
    for (int c = 0; c < 27; c++) begin
      int lv [3];
      lv[0] = c % 3 - 1; lv[1] = (c / 3) % 3 - 1; lv[2] = c / 9 - 1;
      foreach (u[j]) u[j] <= sym_t'(lv[j]);
      in_valid <= 1;
      @(posedge clk0);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
      for (int j = 0; j < 3; j++) begin
        checks += 2;
        if (int'(p[2*j]) != lv[j] || int'(p[2*j+1]) != -lv[j]) begin
          failures++;
          $display("FAIL c=%0d pair %0d = (%0d,%0d) for u=%0d", c, j, p[2*j], p[2*j+1], lv[j]);
        end
        if (int'(p[2*j]) + int'(p[2*j+1]) != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
