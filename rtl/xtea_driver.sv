// xtea_driver: Full-Hardware XTEA block with NREP replicated engines.
//
// The driver replicates the XTEA engine NREP times and runs all copies side
// by side on different 64-bit blocks, which is how this design scales
// throughput instead of pipelining the round function. All engines share a
// master clock, master reset, master start, the key and the direction.
// data_in carries NREP blocks in parallel (64*NREP bits, 256 bits for four
// engines); block i is data_in[i] = {v0, v1}. When start is high the driver
// copies data_in, key and decrypt into its input buffer registers and starts
// all engines on the next cycle. The engines' output registers form data_out,
// with the same layout, and hold until the next result. done, the master
// done, is the AND of the engines' done pulses: all copies finish together,
// so it equals the first engine's done, from which it is drawn.
//
// Timing: start sampled at edge 0, engines start at edge 1, data_out valid
// and done high for one cycle after edge 129: one block per engine every
// 129 cycles when starts are issued back to back (start is ignored while
// busy). At 200 MHz and NREP = 16 that is 1.59 Gb/s.
//
// From the document: the replication of 1 to 16 engines, the master
// clock/start/reset/done wiring and the parallel 64*NREP-bit data source.
// This design's own choices: the one-cycle input buffer, the shared key and
// direction inputs and the bit layout of data_in/data_out.
module xtea_driver
  import xtea_pkg::*;
#(
  parameter int unsigned NREP = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       start,
  input  logic                       decrypt,
  input  xtea_key_t                  key,
  input  logic [NREP-1:0][63:0]      data_in,
  output logic [NREP-1:0][63:0]      data_out,
  output logic                       done,
  output logic                       busy
);

  logic [NREP-1:0][63:0] in_buf;
  xtea_key_t             key_buf;
  logic                  dec_buf;
  logic                  go;          // start the engines this cycle
  logic [NREP-1:0]       eng_done, eng_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      go      <= 1'b0;
      in_buf  <= '0;
      key_buf <= '0;
      dec_buf <= 1'b0;
    end else begin
      go <= start && !busy;
      if (start && !busy) begin
        in_buf  <= data_in;
        key_buf <= key;
        dec_buf <= decrypt;
      end
    end
  end

  for (genvar i = 0; i < NREP; i++) begin : g_eng
    xtea_engine u_eng (
      .clk        (clk),
      .rst        (rst),
      .start      (go),
      .decrypt    (dec_buf),
      .key        (key_buf),
      .block_in_0 (in_buf[i][63:32]),
      .block_in_1 (in_buf[i][31:0]),
      .v_0_out    (data_out[i][63:32]),
      .v_1_out    (data_out[i][31:0]),
      .done       (eng_done[i]),
      .busy       (eng_busy[i])
    );
  end

  // all copies start together and take the same number of cycles, so the
  // AND of their done pulses equals the first engine's done
  assign done = &eng_done;
  assign busy = go || (|eng_busy);

endmodule
