// tb_serial_converter: loads random 6-bit words and checks that dout gives
// them most significant bit first on the next six clocks with dout_valid
// high, then goes idle; also checks back-to-back loads and a load that
// interrupts a transfer.
module tb_serial_converter;
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic load, dout, dout_valid;
  logic [5:0] d;

  serial_converter dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // load w and check `nbits` of its bits (fewer when interrupted)
  task automatic send(logic [5:0] w, int nbits, int idle_after);
    load <= 1; d <= w;
    @(posedge clk);
    load <= 0;
    for (int b = 5; b > 5 - nbits; b--) begin
      #1;
      checks++;
      if (!dout_valid || dout !== w[b]) begin
        failures++; $display("FAIL word %b bit %0d: dout=%b valid=%b", w, b, dout, dout_valid);
      end
      if (b > 6 - nbits) @(posedge clk);
    end
    if (idle_after > 0) begin
      @(posedge clk);
      #1;
      checks++;
      if (dout_valid) begin failures++; $display("FAIL dout_valid after the word"); end
      repeat (idle_after - 1) @(posedge clk);
    end
  endtask

  initial begin
    load = 0; d = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int t = 0; t < 100; t++) send(6'($urandom), 6, 1 + (t % 3));
    for (int t = 0; t < 20; t++) send(6'($urandom), 6, 0);  // back to back
    send(6'($urandom), 6, 1);
    send(6'b101101, 3, 0);                                  // interrupted
    send(6'b010011, 6, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
