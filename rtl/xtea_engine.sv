// xtea_engine: iterative XTEA encryption/decryption engine.
//
// A start pulse captures block_in_0/block_in_1 (v0/v1) and the decrypt flag
// and sets the sum to 0 (encrypt) or 32*DELTA (decrypt). The engine then runs
// NUM_ROUNDS rounds of CYCLES_PER_ROUND = 4 cycles, counted by a 2-bit phase
// counter, sharing one half-round datapath (xtea_round_half):
//   phase 0  subkey <= sum + key[sel_a]
//   phase 1  first word  <= word +/- (f(other) ^ subkey); sum <= sum +/- DELTA
//   phase 2  subkey <= sum + key[sel_b]
//   phase 3  second word <= word +/- (f(other) ^ subkey); next round
// Encrypting, the first word is v0 with sel_a = sum[1:0] and the second is v1
// with sel_b = sum[12:11]; decrypting runs the same steps mirrored (v1 first,
// sum[12:11] first, subtraction, sum decreasing).
//
// Timing: if start is sampled high at clock edge 0, the result is in
// v_0_out/v_1_out and done is high for one cycle after edge 128, i.e. a
// fixed latency of 32 x 4 = 128 cycles per 64-bit block. v_0_out/v_1_out hold
// their value until the next result. start is ignored while busy. key must be
// held stable from start to done (it is not copied inside).
//
// From the document: the port names block_in_0/1, v_0_out/v_1_out, start,
// done; the start/done protocol; the registers of its RTL view (2-bit cycle
// counter, 5-bit round counter, sum, subkey, v0, v1); the 128-cycle latency.
// This design's own choices: the exact phase schedule above, the synchronous
// active-high reset, the key and decrypt ports and the busy output.
module xtea_engine
  import xtea_pkg::*;
#(
  parameter int unsigned NUM_ROUNDS_P = NUM_ROUNDS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        decrypt,
  input  xtea_key_t   key,
  input  logic [31:0] block_in_0,
  input  logic [31:0] block_in_1,
  output logic [31:0] v_0_out,
  output logic [31:0] v_1_out,
  output logic        done,
  output logic        busy
);

  localparam int RW = (NUM_ROUNDS_P > 1) ? $clog2(NUM_ROUNDS_P) : 1;

  logic          go;
  logic          dec_s;
  logic [1:0]    cnt_s;
  logic [RW-1:0] rounds;
  logic [31:0]   sum_s, subkey, v_0_s, v_1_s;

  // datapath operand selection
  logic        target_v0;     // this phase updates v0
  logic        sel_low;       // this phase selects the key with sum[1:0]
  logic [1:0]  key_sel;
  logic [31:0] half_v, half_z, half_out;

  always_comb begin
    target_v0 = (cnt_s == 2'd1) ^ dec_s;
    sel_low   = (cnt_s == 2'd0) ^ dec_s;
    key_sel   = sel_low ? sum_s[1:0] : sum_s[12:11];
    half_v    = target_v0 ? v_0_s : v_1_s;
    half_z    = target_v0 ? v_1_s : v_0_s;
  end

  xtea_round_half u_half (
    .v       (half_v),
    .z       (half_z),
    .sum_key (subkey),
    .decrypt (dec_s),
    .v_new   (half_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      go      <= 1'b0;
      done    <= 1'b0;
      dec_s   <= 1'b0;
      cnt_s   <= '0;
      rounds  <= '0;
      sum_s   <= '0;
      subkey  <= '0;
      v_0_s   <= '0;
      v_1_s   <= '0;
      v_0_out <= '0;
      v_1_out <= '0;
    end else begin
      done <= 1'b0;
      if (!go) begin
        if (start) begin
          go     <= 1'b1;
          dec_s  <= decrypt;
          cnt_s  <= '0;
          rounds <= '0;
          sum_s  <= decrypt ? 32'(DELTA * NUM_ROUNDS_P) : 32'd0;
          v_0_s  <= block_in_0;
          v_1_s  <= block_in_1;
        end
      end else begin
        cnt_s <= cnt_s + 2'd1;
        unique case (cnt_s)
          2'd0, 2'd2: subkey <= sum_s + key[key_sel];
          2'd1, 2'd3: begin
            if (target_v0) v_0_s <= half_out;
            else           v_1_s <= half_out;
          end
        endcase
        if (cnt_s == 2'd1)
          sum_s <= dec_s ? (sum_s - DELTA) : (sum_s + DELTA);
        if (cnt_s == 2'd3) begin
          rounds <= rounds + 1'b1;
          if (rounds == RW'(NUM_ROUNDS_P - 1)) begin
            go      <= 1'b0;
            done    <= 1'b1;
            v_0_out <= target_v0 ? half_out : v_0_s;
            v_1_out <= target_v0 ? v_1_s : half_out;
          end
        end
      end
    end
  end

  assign busy = go;


endmodule
