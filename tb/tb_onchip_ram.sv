// tb_onchip_ram: self-checking test of the 8 KB on-chip RAM.
//
// Writes random words to random addresses across the whole 2048-word array,
// with partial byte-enable writes, and reads them back against a shadow
// array kept here. Also checks the one-cycle read latency, that the
// contents start at zero and that a write without chipselect is ignored.
module tb_onchip_ram;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  avalon_mm_if #(.ADDR_W(11)) bus (clk);
  onchip_ram dut (.clk, .rst, .av(bus));

  int checks = 0, failures = 0;
  logic [31:0] shadow [2048];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [10:0] a, input logic [31:0] d, input logic [3:0] be, input bit cs = 1);
    @(negedge clk);
    bus.address = a; bus.writedata = d; bus.byteenable = be; bus.chipselect = cs; bus.write = 1; bus.read = 0;
    @(negedge clk);
    bus.chipselect = 0; bus.write = 0;
    if (cs) for (int b = 0; b < 4; b++) if (be[b]) shadow[a][8*b +: 8] = d[8*b +: 8];
  endtask

  task automatic rd_check(input logic [10:0] a);
    @(negedge clk);
    bus.address = a; bus.chipselect = 1; bus.read = 1; bus.write = 0;
    @(negedge clk);
    bus.chipselect = 0; bus.read = 0;
    check(bus.readdatavalid, "readdatavalid after one cycle");
    check(bus.readdata == shadow[a], $sformatf("addr %0d: got %h exp %h", a, bus.readdata, shadow[a]));
  endtask

  initial begin
    logic [10:0] a;
    bus.chipselect = 0; bus.read = 0; bus.write = 0; bus.address = 0; bus.writedata = 0; bus.byteenable = 0;
    for (int i = 0; i < 2048; i++) shadow[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    rd_check(11'd0); rd_check(11'd2047);
    wr(11'd0, 32'h1122_3344, 4'hF);
    wr(11'd2047, 32'hAABB_CCDD, 4'hF);
    wr(11'd0, 32'hFFFF_FFFF, 4'b0101);
    wr(11'd5, 32'h5555_5555, 4'hF, 0);       // no chipselect: ignored
    rd_check(11'd0); rd_check(11'd2047); rd_check(11'd5);
    for (int i = 0; i < 600; i++) begin
      a = 11'($urandom);
      wr(a, $urandom, 4'($urandom));
      a = 11'($urandom);
      rd_check(a);
    end
    for (int i = 0; i < 2048; i += 7) rd_check(11'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
