// tb_se2pa_t: sends random bits with random gaps in se_valid and checks that
// every group of 6 taken bits appears on sm_in, first bit at the top, with a
// one-clock data_valid pulse on the clock after the 6th bit, and that count
// follows the number of bits taken.
module tb_se2pa_t;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk0 = 0, rst = 1;
  always #5 clk0 = ~clk0;

  logic se_in, se_valid, data_valid;
  logic [2:0] count;
  logic [5:0] sm_in;

  se2pa_t dut (.*);

  initial begin
    repeat (20000) @(posedge clk0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] exp;
    int taken, words;
    se_in = 0; se_valid = 0;
    repeat (3) @(posedge clk0);
    rst <= 0;
    @(posedge clk0);
    taken = 0; words = 0;
    while (words < 300) begin
      logic v, b;
      v = ($urandom_range(0, 3) != 0);
      b = 1'($urandom);
      se_in <= b; se_valid <= v;
      @(posedge clk0);
      #1;
      if (v) begin
        exp   = {exp[4:0], b};
        taken++;
      end
      checks++;
      if (v && taken == 6) begin
        if (!data_valid || sm_in !== exp) begin
          failures++;
          $display("FAIL word %0d: data_valid=%b sm_in=%b expected %b", words, data_valid, sm_in, exp);
        end
        taken = 0;
        words++;
      end else if (data_valid) begin
        failures++;
        $display("FAIL: data_valid without a complete group");
      end
      checks++;
      if (int'(count) != taken) begin
        failures++;
        $display("FAIL count=%0d expected %0d", count, taken);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
