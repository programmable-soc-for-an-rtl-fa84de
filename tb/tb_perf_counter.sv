// tb_perf_counter: self-checking test of the performance counter unit.
//
// Starts the global counter, opens and closes sections around known numbers
// of idle cycles and checks the global count, each section's cycle count and
// its entry count against cycle counts kept here, that a section counts
// nothing while the global counter is stopped, and that clear resets all.
module tb_perf_counter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  avalon_mm_if #(.ADDR_W(4)) bus (clk);
  perf_counter dut (.clk, .rst, .av(bus));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each bus operation takes exactly one cycle (2 for reads)
  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    bus.address = a; bus.writedata = d; bus.byteenable = 4'hF; bus.chipselect = 1; bus.write = 1;
    @(negedge clk);
    bus.chipselect = 0; bus.write = 0;
  endtask
  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    bus.address = a; bus.chipselect = 1; bus.read = 1;
    @(negedge clk);
    bus.chipselect = 0; bus.read = 0;
    check(bus.readdatavalid, "readdatavalid");
    d = bus.readdata;
  endtask
  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  logic [31:0] d, g0;
  initial begin
    bus.chipselect = 0; bus.read = 0; bus.write = 0; bus.address = 0; bus.writedata = 0; bus.byteenable = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    rd(4'd0, d); check(d == 0, "global zero after reset");
    // a write call spans two negedges and accepts at the edge between them;
    // a counter counts every edge after its starting write up to and
    // including the edge of its stopping write
    wr(4'd0, 32'h1);           // start global: accepted at edge 0
    idle(10);
    wr(4'd2, 32'd1);           // begin section 1: edge 12
    idle(20);
    wr(4'd3, 32'd1);           // end section 1: edge 34, counted 13..34 = 22
    wr(4'd0, 32'h2);           // stop global: edge 36, counted 1..36 = 36
    rd(4'd0, d); check(d == 36, $sformatf("global count %0d", d));
    rd(4'd1, d); check(d == 0, "global high word");
    rd(4'd8, d); check(d == 22, $sformatf("section 1 time %0d", d));
    rd(4'd10, d); check(d == 1, $sformatf("section 1 entries %0d", d));
    rd(4'd4, d); check(d == 0, "section 0 untouched");
    // global stopped: a section counts nothing, but counts its entry
    wr(4'd2, 32'd2); idle(5); wr(4'd3, 32'd2);
    rd(4'd12, d); check(d == 0, "section 2 idle while global stopped");
    rd(4'd14, d); check(d == 1, "section 2 entry counted");
    // three entries of section 0 around 4 idle cycles: 6 counted edges each
    wr(4'd0, 32'h1);
    for (int i = 0; i < 3; i++) begin wr(4'd2, 32'd0); idle(4); wr(4'd3, 32'd0); end
    rd(4'd4, d); check(d == 18, $sformatf("section 0 time %0d", d));
    rd(4'd6, d); check(d == 3, $sformatf("section 0 entries %0d", d));
    rd(4'd0, g0); idle(3); rd(4'd0, d);
    check(d - g0 == 5, $sformatf("global keeps counting (%0d)", d - g0));
    wr(4'd0, 32'h4);           // clear
    rd(4'd0, d); check(d == 0, "cleared global");
    rd(4'd4, d); check(d == 0, "cleared section");
    rd(4'd6, d); check(d == 0, "cleared entries");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
