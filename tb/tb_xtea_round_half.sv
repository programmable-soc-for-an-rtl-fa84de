// tb_xtea_round_half: self-checking test of the combinational half round.
//
// Drives random words and sub-key sums in both directions and compares
// v_new with v +/- ((((z << 4) ^ (z >> 5)) + z) ^ sum_key) computed here,
// plus a few hand-worked corner values.
module tb_xtea_round_half;
  logic [31:0] v, z, sk, vn;
  logic dec;
  int checks = 0, failures = 0;

  xtea_round_half dut (.v, .z, .sum_key(sk), .decrypt(dec), .v_new(vn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp, input string what);
    #1;
    checks++;
    if (vn !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, vn, exp); end
  endtask

  initial begin
    logic [31:0] m;
    // z = 1: f = (16 ^ 0) + 1 = 17; 17 ^ 0 = 17
    v = 32'd100; z = 32'd1; sk = 32'd0; dec = 0; check(32'd117, "z=1 add");
    dec = 1;                                     check(32'd83,  "z=1 sub");
    // z = 32: f = (512 ^ 1) + 32 = 545; 545 ^ 1 = 544
    v = 32'd0; z = 32'd32; sk = 32'd1; dec = 0;  check(32'd544, "z=32 add");
    // wrap-around modulo 2^32
    v = 32'hFFFF_FFFF; z = 32'd0; sk = 32'd2; dec = 0; check(32'd1, "wrap add");
    v = 32'd0; dec = 1;                          check(32'hFFFF_FFFE, "wrap sub");
    for (int i = 0; i < 2000; i++) begin
      v = $urandom; z = $urandom; sk = $urandom; dec = 1'($urandom);
      m = (((z << 4) ^ (z >> 5)) + z) ^ sk;
      check(dec ? v - m : v + m, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
