// xtea_pkg: constants and the mixing function shared by the XTEA blocks.
//
// XTEA works on a 64-bit block held as two 32-bit words v0 and v1 and a
// 128-bit key held as four 32-bit words k0..k3. Each of the 32 rounds adds
// (or, when decrypting, subtracts) f(other word) xor (sum + k[sel]) to one
// word and then the other, where f(x) = ((x << 4) xor (x >> 5)) + x, all
// modulo 2^32. sum starts at 0 and grows by DELTA once per round; the first
// half of a round selects the key with sum[1:0], the second with sum[12:11].
// Decryption runs the rounds backwards from sum = 32 * DELTA.
// The constants follow the standard algorithm; the key type is this design's.
package xtea_pkg;

  localparam logic [31:0] DELTA      = 32'h9E37_79B9;
  localparam int unsigned NUM_ROUNDS = 32;

  typedef logic [3:0][31:0] xtea_key_t;   // key[0] is k0

  // f(x) = ((x << 4) xor (x >> 5)) + x
  function automatic logic [31:0] xtea_mix(input logic [31:0] x);
    return ((x << 4) ^ (x >> 5)) + x;
  endfunction

endpackage
