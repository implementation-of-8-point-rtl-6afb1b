// tb_sm: checks the 4QAM mapper for all 64 input words: the SM stage must
// give the symbols of the bit pairs (00->0, 01->1, 10->2, 11->3) one clock
// after in_valid, and the SM2 stage the levels 0->(-1,+1), 1->(-1,-1),
// 2->(+1,+1), 3->(+1,-1) one clock later.
module tb_sm;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk0 = 0, rst = 1;
  always #5 clk0 = ~clk0;

  logic in_valid, sym_valid, out_valid;
  logic [5:0] bits;
  logic [1:0] sym [3];
  sym_t re [3], im [3];

  sm dut (.*);

  // mapping table written out independently
  int tre [4] = '{-1, -1, 1, 1};
  int tim [4] = '{1, -1, 1, -1};

  initial begin
    repeat (5000) @(posedge clk0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; bits = '0;
    repeat (3) @(posedge clk0);
    rst <= 0;
    @(posedge clk0);
    for (int w = 0; w < 64; w++) begin
      int s [3];
      s[0] = w / 16; s[1] = (w / 4) % 4; s[2] = w % 4;
      bits <= 6'(w); in_valid <= 1;
      @(posedge clk0);
      in_valid <= 0;
      #1;
      checks++;
      if (!sym_valid || out_valid) begin failures++; $display("FAIL SM timing"); end
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (int'(sym[j]) != s[j]) begin failures++; $display("FAIL w=%0d sym[%0d]=%0d exp %0d", w, j, sym[j], s[j]); end
      end
      @(posedge clk0);
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL SM2 timing"); end
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (int'(re[j]) != tre[s[j]] || int'(im[j]) != tim[s[j]]) begin
          failures++;
          $display("FAIL w=%0d level %0d = (%0d,%0d) exp (%0d,%0d)", w, j, re[j], im[j], tre[s[j]], tim[s[j]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
