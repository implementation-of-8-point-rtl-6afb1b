// tb_dzepd: checks that pad removal keeps inputs 1..6 of the 8-wide block
// and drops positions 0 and 7, one clock after in_valid, with random data.
// A second, 4-wide instance (two values kept) checks the original design's
// zero-removal examples: {0,3,2,-1} -> {3,2} and {-1,1,-1,1} -> {1,-1}.
module tb_dzepd;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk1 = 0, rst = 1;
  always #5 clk1 = ~clk1;

  logic in_valid, out_valid;
  rxw_t z [8];
  rxw_t r [6];

  dzepd dut (.*);

  logic in_valid4, out_valid4;
  rxw_t z4 [4];
  rxw_t r4 [2];
  dzepd #(.N(4), .M(2)) dut4 (
    .clk1, .rst, .in_valid(in_valid4), .z(z4), .out_valid(out_valid4), .r(r4)
  );

  task automatic ex4(int a, int b, int c, int d, int e0, int e1);
    #1;
    z4[0] = rxw_t'(a); z4[1] = rxw_t'(b); z4[2] = rxw_t'(c); z4[3] = rxw_t'(d);
    in_valid4 = 1;
    @(posedge clk1);
    #1;
    in_valid4 = 0;
    checks += 2;
    if (!out_valid4) begin failures++; $display("FAIL 4-wide latency"); end
    if (r4[0] !== rxw_t'(e0) || r4[1] !== rxw_t'(e1)) begin
      failures++; $display("FAIL 4-wide {%0d,%0d,%0d,%0d} -> {%0d,%0d}", a, b, c, d, r4[0], r4[1]);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rxw_t v [8];
    in_valid = 0;
    in_valid4 = 0;
    foreach (z[n]) z[n] = '0;
    foreach (z4[n]) z4[n] = '0;
    repeat (3) @(posedge clk1);
    rst <= 0;
    @(posedge clk1);
    for (int t = 0; t < 100; t++) begin
      foreach (v[n]) v[n] = rxw_t'({$urandom, $urandom});
      foreach (z[n]) z[n] <= v[n];
      in_valid <= 1;
      @(posedge clk1);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
      for (int j = 0; j < 6; j++) begin
        checks++;
        if (r[j] !== v[j+1]) begin failures++; $display("FAIL r[%0d]", j); end
      end
    end
    ex4(0, 3, 2, -1, 3, 2);
    ex4(-1, 1, -1, 1, 1, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
