// tb_xtea_driver: self-checking test of the Full-Hardware replicated driver.
//
// Feeds NREP = 16 random blocks in parallel, checks every engine's result
// against the reference model in both directions, that the master done comes
// 129 cycles after start (one buffer cycle plus 128 engine cycles), that the
// inputs may change after start without affecting the run, and that a start
// during a run is ignored. Runs back to back and reports the throughput in
// bits per cycle.
module tb_xtea_driver;
  import xtea_pkg::*;
  import xtea_ref_pkg::*;

  localparam int NREP = 16;
  logic clk = 0, rst = 1, start = 0, decrypt = 0, done, busy;
  xtea_key_t key;
  logic [NREP-1:0][63:0] din, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xtea_driver #(.NREP(NREP)) dut (.clk, .rst, .start, .decrypt, .key, .data_in(din),
                                  .data_out(dout), .done, .busy);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [NREP-1:0][63:0] blocks, input logic [127:0] k, input bit dec,
                     output logic [NREP-1:0][63:0] res, output int lat);
    @(negedge clk);
    din = blocks; key = k; decrypt = dec; start = 1;
    @(negedge clk);
    start = 0; lat = 0;
    din = ~blocks; decrypt = ~dec;           // buffered: must not matter
    @(negedge clk); lat++;
    start = 1; @(negedge clk); start = 0; lat++;   // ignored while busy
    while (!done) begin @(negedge clk); lat++; end
    res = dout;
  endtask

  logic [NREP-1:0][63:0] pt, ct, back;
  logic [127:0] k;
  int lat;

  initial begin
    din = '0; key = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < NREP; i++) pt[i] = {$urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      run(pt, k, 0, ct, lat);
      check(lat == 129, $sformatf("encrypt latency %0d", lat));
      for (int i = 0; i < NREP; i++)
        check(ct[i] == ref_encrypt(pt[i], k), $sformatf("engine %0d encrypt", i));
      run(ct, k, 1, back, lat);
      check(lat == 129, $sformatf("decrypt latency %0d", lat));
      for (int i = 0; i < NREP; i++)
        check(back[i] == pt[i], $sformatf("engine %0d decrypt", i));
    end
    $display("throughput: %0d bits per %0d cycles", 64 * NREP, 129);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
