// xtea_round_half: one half of an XTEA round, purely combinational.
//
// v_new = v + (f(z) xor sum_key) when encrypting and
// v_new = v - (f(z) xor sum_key) when decrypting, where
// f(z) = ((z << 4) xor (z >> 5)) + z and sum_key = sum + k[sel] is formed by
// the caller. This is one of the two mirrored halves of the XTEA block
// diagram: the shift pair, the XOR, the f adder, the XOR with the sub-key sum
// and the add/subtract unit steered by the encrypt/decrypt input. The engine
// uses one instance for both halves of a round, one after the other.
// No clock; the output settles one adder chain after the inputs.
module xtea_round_half
  import xtea_pkg::*;
(
  input  logic [31:0] v,        // word being updated
  input  logic [31:0] z,        // the other word, fed to f
  input  logic [31:0] sum_key,  // sum + key[sel]
  input  logic        decrypt,  // 0: add, 1: subtract
  output logic [31:0] v_new
);

  logic [31:0] mixed;

  always_comb begin
    mixed = xtea_mix(z) ^ sum_key;
    v_new = decrypt ? (v - mixed) : (v + mixed);
  end

endmodule
