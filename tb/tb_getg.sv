// tb_getg: checks the Slantlet line parameters returned by getg for scales 1
// and 2 against values computed here from the closed-form construction, and
// checks that the reversed parameters describe the time-reversed filter tap
// by tap. Scales 0 and 3 must return zeros.
module tb_getg;
  import ofdm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [1:0] i;
  coef_t a0, a1, b0, b1, a0r, a1r, b0r, b1r;

  getg dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, fwd, rev;
    for (int s = 1; s <= 2; s++) begin
      i = 2'(s);
      #1;
      m = 1 << s;
      check($sformatf("i=%0d a0", s), int'(a0), g_line_int(s, 0));
      check($sformatf("i=%0d a1", s), int'(a1), g_line_int(s, 1));
      check($sformatf("i=%0d b0", s), int'(b0), g_line_int(s, 2));
      check($sformatf("i=%0d b1", s), int'(b1), g_line_int(s, 3));
      for (int n = 0; n < 2*m; n++) begin
        fwd = (n < m) ? int'(a0) + int'(a1) * n : int'(b0) + int'(b1) * (n - m);
        rev = (n < m) ? int'(a0r) + int'(a1r) * n : int'(b0r) + int'(b1r) * (n - m);
        check($sformatf("i=%0d g(%0d)", s, n), fwd, g_tap(s, n));
        check($sformatf("i=%0d g reversed(%0d)", s, n), rev, g_tap(s, 2*m - 1 - n));
      end
    end
    // g2 taps printed for the original design, within 3 units of 10^-4
    i = 2'd2;
    #1;
    begin
      int pub [8] = '{-5062, -874, 3314, 7502, -793, -1078, -1360, -1646};
      for (int n = 0; n < 8; n++) begin
        fwd = (n < 4) ? int'(a0) + int'(a1) * n : int'(b0) + int'(b1) * (n - 4);
        checks++;
        if (fwd - pub[n] > 3 || pub[n] - fwd > 3) begin
          failures++;
          $display("FAIL g2(%0d)=%0d, published %0d", n, fwd, pub[n]);
        end
      end
    end
    for (int s = 0; s <= 3; s += 3) begin
      i = 2'(s);
      #1;
      check($sformatf("i=%0d zero", s), int'(a0) | int'(a1) | int'(b0) | int'(b1) |
            int'(a0r) | int'(a1r) | int'(b0r) | int'(b1r), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
