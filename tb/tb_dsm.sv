// tb_dsm: checks the 4QAM decisions from the signs of random real and
// imaginary estimates (re > 0 gives Bit1, im < 0 gives Bit2, zero handled as
// documented), the DSM stage one clock and the packed DSM2 word two clocks
// after in_valid.
module tb_dsm;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk1 = 0, rst = 1;
  always #5 clk1 = ~clk1;

  logic in_valid, sym_valid, out_valid;
  rxw_t re_in [3], im_in [3];
  logic [1:0] sym [3];
  logic [5:0] dsm2_out;

  dsm dut (.*);

  // symbol from levels, the inverse of the transmitter's table
  function automatic int decide(longint re, longint im);
    if (re > 0) return (im < 0) ? 3 : 2;
    else        return (im < 0) ? 1 : 0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a [3], b [3];
    int s [3];
    in_valid = 0;
    foreach (re_in[j]) begin re_in[j] = '0; im_in[j] = '0; end
    repeat (3) @(posedge clk1);
    rst <= 0;
    @(posedge clk1);
    for (int t = 0; t < 300; t++) begin
      foreach (a[j]) begin
        a[j] = longint'($signed(32'($urandom)));
        b[j] = longint'($signed(32'($urandom)));
        if ($urandom_range(0, 9) == 0) a[j] = 0;
        if ($urandom_range(0, 9) == 0) b[j] = 0;
        s[j] = decide(a[j], b[j]);
      end
      foreach (a[j]) begin re_in[j] <= rxw_t'(a[j]); im_in[j] <= rxw_t'(b[j]); end
      in_valid <= 1;
      @(posedge clk1);
      in_valid <= 0;
      #1;
      checks++;
      if (!sym_valid) begin failures++; $display("FAIL DSM latency"); end
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (int'(sym[j]) != s[j]) begin failures++; $display("FAIL sym[%0d]=%0d exp %0d", j, sym[j], s[j]); end
      end
      @(posedge clk1);
      #1;
      checks++;
      if (!out_valid || dsm2_out !== {2'(s[0]), 2'(s[1]), 2'(s[2])}) begin
        failures++; $display("FAIL dsm2_out=%b", dsm2_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
