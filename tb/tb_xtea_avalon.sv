// tb_xtea_avalon: self-checking test of the XTEA Avalon-MM accelerator.
//
// Acts as the processor's data master: writes the key and one block per
// engine (engine 0 also through its short addresses 0/1), starts all engines
// with one START write, polls STATUS and reads every engine's result, then
// decrypts the results back. Checks results against the reference model,
// the register read-back, unmapped reads, busy while running, the one-cycle
// read latency and the 128-cycle run time seen from the bus.
module tb_xtea_avalon;
  import xtea_ref_pkg::*;

  localparam int NREP = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  avalon_mm_if #(.ADDR_W(8)) bus (clk);
  xtea_avalon #(.NREP(NREP), .ADDR_W(8)) dut (.clk, .rst, .av(bus));

  int checks = 0, failures = 0;
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

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    bus.address = a; bus.writedata = d; bus.chipselect = 1; bus.write = 1; bus.read = 0;
    bus.byteenable = 4'hF;
    @(negedge clk);
    bus.chipselect = 0; bus.write = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    bus.address = a; bus.chipselect = 1; bus.read = 1; bus.write = 0;
    @(negedge clk);
    bus.chipselect = 0; bus.read = 0;
    check(bus.readdatavalid == 1'b1, "readdatavalid one cycle after read");
    d = bus.readdata;
    @(negedge clk);
    check(bus.readdatavalid == 1'b0, "readdatavalid lasts one cycle");
  endtask

  logic [127:0] key;
  logic [63:0] pt[NREP], ct[NREP];
  logic [31:0] d, d2;
  int t0, polls;

  task automatic run(input bit dec, output int cycles);
    int t;
    wr(8'h12, {30'd0, dec, 1'b1});
    t = 0;
    rd(8'h12, d);
    check(d[1] == 1'b1 && d[0] == 1'b0, "busy, not done right after start");
    do begin
      rd(8'h12, d); t += 3;
    end while (!d[0] && t < 1000);
    cycles = t;
  endtask

  initial begin
    bus.address = 0; bus.chipselect = 0; bus.read = 0; bus.write = 0;
    bus.writedata = 0; bus.byteenable = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    key = {$urandom, $urandom, $urandom, $urandom};
    for (int k = 0; k < 4; k++) wr(8'(2 + k), key[32*k +: 32]);
    for (int k = 0; k < 4; k++) begin
      rd(8'(2 + k), d); check(d == key[32*k +: 32], "key read-back");
    end
    for (int i = 0; i < NREP; i++) begin
      pt[i] = {$urandom, $urandom};
      if (i == 0) begin
        wr(8'h00, pt[i][63:32]); wr(8'h01, pt[i][31:0]);
      end else begin
        wr(8'(8'h80 + 4*i), pt[i][63:32]); wr(8'(8'h81 + 4*i), pt[i][31:0]);
      end
    end
    rd(8'h80, d); check(d == pt[0][63:32], "engine 0 A aliased at 0x80");
    rd(8'(8'h81 + 4*5), d); check(d == pt[5][31:0], "engine 5 B read-back");
    rd(8'h40, d); check(d == 0, "unmapped read is 0");
    // a write with no byte enabled is ignored
    @(negedge clk);
    bus.address = 8'h00; bus.writedata = 32'hDEAD_BEEF; bus.chipselect = 1; bus.write = 1; bus.byteenable = 0;
    @(negedge clk); bus.chipselect = 0; bus.write = 0;
    rd(8'h00, d); check(d == pt[0][63:32], "write without byte enables ignored");

    run(0, polls);
    check(polls >= 120 && polls <= 135, $sformatf("run took about 128 cycles (%0d)", polls));
    rd(8'h13, d); rd(8'h14, d2);
    check({d, d2} == ref_encrypt(pt[0], key), "engine 0 result at R_1/R_2");
    for (int i = 0; i < NREP; i++) begin
      rd(8'(8'h82 + 4*i), d); rd(8'(8'h83 + 4*i), d2);
      ct[i] = {d, d2};
      check(ct[i] == ref_encrypt(pt[i], key), $sformatf("engine %0d ciphertext", i));
    end
    // decrypt back
    for (int i = 0; i < NREP; i++) begin
      wr(8'(8'h80 + 4*i), ct[i][63:32]); wr(8'(8'h81 + 4*i), ct[i][31:0]);
    end
    run(1, polls);
    for (int i = 0; i < NREP; i++) begin
      rd(8'(8'h82 + 4*i), d); rd(8'(8'h83 + 4*i), d2);
      check({d, d2} == pt[i], $sformatf("engine %0d decrypts back", i));
    end
    // exact run time: count cycles from the START write to STATUS.done
    wr(8'h12, 32'h1);
    t0 = 0;
    bus.address = 8'h12; bus.chipselect = 1; bus.read = 1;
    do begin @(negedge clk); t0++; end while (!(bus.readdatavalid && bus.readdata[0]) && t0 < 500);
    bus.chipselect = 0; bus.read = 0;
    check(t0 == 131, $sformatf("done visible %0d cycles after start", t0));
    // software reset through START bit 2 aborts a run
    wr(8'h12, 32'h1);
    repeat (20) @(negedge clk);
    rd(8'h12, d); check(d[1] == 1'b1, "busy before the reset");
    wr(8'h12, 32'h4);
    rd(8'h12, d); check(d == 32'h0, $sformatf("idle and not done after reset (%h)", d));
    rd(8'h82, d); rd(8'h83, d2); check({d, d2} == 64'h0, "results cleared by reset");
    repeat (200) @(negedge clk);
    rd(8'h12, d); check(d[0] == 1'b0, "aborted run never reports done");
    rd(8'h02, d); check(d == key[31:0], "key kept across the engine reset");
    // and the engines work again afterwards
    wr(8'h12, 32'h1);
    do rd(8'h12, d); while (!d[0]);
    rd(8'h82, d); rd(8'h83, d2); check({d, d2} == ref_encrypt(ct[0], key), "run after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
