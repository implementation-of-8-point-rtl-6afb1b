// tb_seven_segment: checks the decimal read-out: sign, and the four leading
// decimal digits of the magnitude (y1 most significant), for the published
// examples 1592, 10515 (shown 1051), -3444, -8663 and for random words,
// against digits worked out here with integer division.
module tb_seven_segment;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk0 = 0, rst = 1;
  always #5 clk0 = ~clk0;

  txw_t x_in;
  logic [3:0] y1, y3, y5, y7;
  logic sign;

  seven_segment dut (.*);

  initial begin
    repeat (20000) @(posedge clk0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic show(int v);
    int mag, shown;
    x_in <= txw_t'(v);
    @(posedge clk0);
    #1;
    mag = (v < 0) ? -v : v;
    shown = mag;
    while (shown > 9999) shown /= 10;
    checks++;
    if (sign !== (v < 0) || int'(y1) != shown / 1000 || int'(y3) != (shown / 100) % 10 ||
        int'(y5) != (shown / 10) % 10 || int'(y7) != shown % 10) begin
      failures++;
      $display("FAIL %0d shown as %s%0d%0d%0d%0d", v, sign ? "-" : "+", y1, y3, y5, y7);
    end
  endtask

  initial begin
    x_in = '0;
    repeat (3) @(posedge clk0);
    rst <= 0;
    @(posedge clk0);
    show(1592); show(10515); show(-3444); show(-8663);
    show(0); show(131071); show(-131072); show(99999); show(100000); show(9999); show(10000);
    for (int t = 0; t < 2000; t++) show(int'($signed(18'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
