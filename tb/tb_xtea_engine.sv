// tb_xtea_engine: self-checking test of the iterative XTEA engine.
//
// Checks a published known-answer vector (key 000102..0f, plaintext
// 4142434445464748, ciphertext 497df3d072612cb5), then random blocks and keys
// against the reference model in both directions, a decrypt of each
// ciphertext back to the plaintext, the 128-cycle start-to-done latency, the
// one-cycle done pulse and that start is ignored while the engine is busy.
module tb_xtea_engine;
  import xtea_pkg::*;
  import xtea_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, decrypt = 0;
  xtea_key_t key;
  logic [31:0] b0, b1, o0, o1;
  logic done, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xtea_engine dut (.clk, .rst, .start, .decrypt, .key, .block_in_0(b0), .block_in_1(b1),
                   .v_0_out(o0), .v_1_out(o1), .done, .busy);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // run one block, return result and start-to-done latency in cycles
  task automatic run(input logic [63:0] blk, input logic [127:0] k, input bit dec,
                     output logic [63:0] res, output int lat);
    @(negedge clk);
    key = k; b0 = blk[63:32]; b1 = blk[31:0]; decrypt = dec; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;  // edges counted after the one that sampled start
    // change the inputs and pulse start while busy: must be ignored
    b0 = ~b0; b1 = ~b1; decrypt = ~dec;
    @(negedge clk); start = 1; @(negedge clk); start = 0; lat += 2;
    while (!done) begin @(negedge clk); lat++; end
    res = {o0, o1};
    @(negedge clk);
    check(!done, "done lasts one cycle");
  endtask

  logic [63:0] pt, ct, res;
  logic [127:0] k;
  int lat;

  initial begin
    key = '0; b0 = 0; b1 = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(!busy && !done, "idle after reset");
    k = {32'h0c0d0e0f, 32'h08090a0b, 32'h04050607, 32'h00010203};
    run(64'h41424344_45464748, k, 0, res, lat);
    check(res == 64'h497df3d0_72612cb5, $sformatf("known answer encrypt %h", res));
    check(lat == 128, $sformatf("latency %0d", lat));
    run(64'h497df3d0_72612cb5, k, 1, res, lat);
    check(res == 64'h41424344_45464748, $sformatf("known answer decrypt %h", res));
    check(lat == 128, $sformatf("decrypt latency %0d", lat));
    for (int i = 0; i < 40; i++) begin
      pt = {$urandom, $urandom};
      k  = {$urandom, $urandom, $urandom, $urandom};
      run(pt, k, 0, ct, lat);
      check(ct == ref_encrypt(pt, k), $sformatf("enc %h -> %h", pt, ct));
      check(lat == 128, "latency");
      run(ct, k, 1, res, lat);
      check(res == pt, $sformatf("dec %h -> %h", ct, res));
      check(res == ref_decrypt(ct, k), "dec vs reference");
    end
    // output holds after done
    repeat (5) @(negedge clk);
    check({o0, o1} == pt, "result held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
