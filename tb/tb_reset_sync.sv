// tb_reset_sync: self-checking test of the reset synchroniser.
//
// Checks that the reset output rises as soon as the raw reset falls (with no
// clock edge), stays high for exactly two clock edges after the raw reset is
// released, and stays low afterwards.
module tb_reset_sync;
  logic clk = 0, rn = 1, rst;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  reset_sync dut (.clk, .reset_n_in(rn), .rst);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 3; t++) begin
      @(negedge clk); #2;
      rn = 0; #1;
      check(rst == 1, "asynchronous assertion");
      repeat (3) @(negedge clk);
      check(rst == 1, "held in reset");
      #2 rn = 1;
      @(negedge clk); check(rst == 1, "high after first edge");
      @(negedge clk); check(rst == 0, "released after second edge");
      repeat (4) begin @(negedge clk); check(rst == 0, "stays released"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
