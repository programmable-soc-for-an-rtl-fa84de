// xtea_ref_pkg: behavioural XTEA reference for the testbenches.
//
// Straight loop form of the published algorithm (32 rounds, delta
// 0x9E3779B9, key word selected by sum[1:0] and sum[12:11]), written
// independently of the RTL so that the testbenches can compare against it.
package xtea_ref_pkg;

  function automatic logic [63:0] ref_encrypt(input logic [63:0] blk, input logic [127:0] key);
    logic [31:0] v0, v1, sum, k[4];
    v0 = blk[63:32]; v1 = blk[31:0]; sum = 0;
    for (int i = 0; i < 4; i++) k[i] = key[32*i +: 32];
    for (int r = 0; r < 32; r++) begin
      v0  = v0 + ((((v1 << 4) ^ (v1 >> 5)) + v1) ^ (sum + k[sum & 3]));
      sum = sum + 32'h9E3779B9;
      v1  = v1 + ((((v0 << 4) ^ (v0 >> 5)) + v0) ^ (sum + k[(sum >> 11) & 3]));
    end
    return {v0, v1};
  endfunction

  function automatic logic [63:0] ref_decrypt(input logic [63:0] blk, input logic [127:0] key);
    logic [31:0] v0, v1, sum, k[4];
    v0 = blk[63:32]; v1 = blk[31:0]; sum = 32'hC6EF3720;
    for (int i = 0; i < 4; i++) k[i] = key[32*i +: 32];
    for (int r = 0; r < 32; r++) begin
      v1  = v1 - ((((v0 << 4) ^ (v0 >> 5)) + v0) ^ (sum + k[(sum >> 11) & 3]));
      sum = sum - 32'h9E3779B9;
      v0  = v0 - ((((v1 << 4) ^ (v1 >> 5)) + v1) ^ (sum + k[sum & 3]));
    end
    return {v0, v1};
  endfunction

endpackage
