// tb_avalon_interconnect: self-checking test of the system interconnect.
//
// Four behavioural slaves tag their read data, so each read through the
// interconnect shows which slave answered and with which word address.
// Checks reads and writes at the first and last word of every window
// (RAM 0x2000, performance counter 0x4000, XTEA 0x4400, JTAG UART 0x4800),
// random addresses against the decode written out here, that a write goes to
// exactly one slave with its data and byte enables, and that reads and
// writes to unmapped addresses return 0 and reach no slave.
module tb_avalon_interconnect;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  avalon_mm_if #(.ADDR_W(32)) m (clk);
  avalon_mm_if #(.ADDR_W(11)) s_ram (clk);
  avalon_mm_if #(.ADDR_W(4))  s_perf (clk);
  avalon_mm_if #(.ADDR_W(8))  s_xtea (clk);
  avalon_mm_if #(.ADDR_W(1))  s_jtag (clk);

  avalon_interconnect #(.RAM_AW(11), .PERF_AW(4), .XTEA_AW(8), .JTAG_AW(1)) dut (
    .clk, .rst, .m(m), .s_ram(s_ram), .s_perf(s_perf), .s_xtea(s_xtea), .s_jtag(s_jtag));

  logic [31:0] la[4], ld[4];
  logic [3:0]  lb[4];
  int          nw[4];
  avalon_slave_model #(.TAG(8'hA1)) u_s0 (.clk, .av(s_ram),  .last_addr(la[0]), .last_data(ld[0]), .last_be(lb[0]), .writes(nw[0]));
  avalon_slave_model #(.TAG(8'hA2)) u_s1 (.clk, .av(s_perf), .last_addr(la[1]), .last_data(ld[1]), .last_be(lb[1]), .writes(nw[1]));
  avalon_slave_model #(.TAG(8'hA3)) u_s2 (.clk, .av(s_xtea), .last_addr(la[2]), .last_data(ld[2]), .last_be(lb[2]), .writes(nw[2]));
  avalon_slave_model #(.TAG(8'hA4)) u_s3 (.clk, .av(s_jtag), .last_addr(la[3]), .last_data(ld[3]), .last_be(lb[3]), .writes(nw[3]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected slave index (-1 none) and word address, written independently
  function automatic int exp_slave(input logic [31:0] a, output logic [31:0] w);
    if (a >= 32'h2000 && a <= 32'h3FFF) begin w = (a - 32'h2000) / 4; return 0; end
    if (a >= 32'h4000 && a <= 32'h403F) begin w = (a - 32'h4000) / 4; return 1; end
    if (a >= 32'h4400 && a <= 32'h47FF) begin w = (a - 32'h4400) / 4; return 2; end
    if (a >= 32'h4800 && a <= 32'h4807) begin w = (a - 32'h4800) / 4; return 3; end
    w = 0; return -1;
  endfunction

  task automatic try(input logic [31:0] a);
    logic [31:0] w, d;
    int s, nb[4];
    logic [7:0] tags[4] = '{8'hA1, 8'hA2, 8'hA3, 8'hA4};
    s = exp_slave(a, w);
    // read
    @(negedge clk);
    m.address = a; m.chipselect = 1; m.read = 1; m.write = 0;
    @(negedge clk);
    m.chipselect = 0; m.read = 0;
    check(m.readdatavalid, $sformatf("readdatavalid for %h", a));
    if (s < 0) check(m.readdata == 0, $sformatf("unmapped read %h returns 0", a));
    else check(m.readdata == {tags[s], 24'(w)}, $sformatf("read %h: got %h", a, m.readdata));
    // write
    for (int i = 0; i < 4; i++) nb[i] = nw[i];
    d = $urandom;
    @(negedge clk);
    m.address = a; m.chipselect = 1; m.write = 1; m.writedata = d; m.byteenable = 4'b1010;
    @(negedge clk);
    m.chipselect = 0; m.write = 0;
    @(negedge clk);
    for (int i = 0; i < 4; i++)
      check(nw[i] == nb[i] + ((i == s) ? 1 : 0), $sformatf("write %h reaches slave %0d only", a, s));
    if (s >= 0) check(la[s] == w && ld[s] == d && lb[s] == 4'b1010, $sformatf("write %h contents", a));
  endtask

  initial begin
    m.address = 0; m.chipselect = 0; m.read = 0; m.write = 0; m.writedata = 0; m.byteenable = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    try(32'h2000); try(32'h3FFC); try(32'h4000); try(32'h403C);
    try(32'h4400); try(32'h47FC); try(32'h4800); try(32'h4804);
    try(32'h1FFC); try(32'h4040); try(32'h4808); try(32'h0000); try(32'hFFFF_FFFC);
    for (int i = 0; i < 300; i++) try((32'h1F00 + ($urandom % 32'h2A00)) & ~32'h3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
