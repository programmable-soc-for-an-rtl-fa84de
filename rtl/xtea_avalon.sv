// xtea_avalon: the XTEA accelerator as an Avalon-MM slave (Co-Design).
//
// The processor writes each engine's two input words through a write
// demultiplexer into per-engine buffer registers, writes the key, and then
// starts all NREP engines at once with one write to START; the engines run
// in parallel for 128 cycles. Software polls STATUS (same address as START)
// until DONE is set and reads the results through the read multiplexer.
//
// Word address map (address is in 32-bit words):
//   0x00        A   input word v0 of engine 0
//   0x01        B   input word v1 of engine 0
//   0x02-0x05   KEY k0..k3, shared by all engines
//   0x12  write START: bit 0 = 1 starts all engines, bit 1 = decrypt,
//               bit 2 = 1 resets all engines (aborts a run, clears results
//               and done; takes priority over bit 0)
//         read  STATUS: bit 0 = done (set at the end of a run, cleared by
//               START), bit 1 = busy
//   0x13        R_1 result word v0 of engine 0 (read only)
//   0x14        R_2 result word v1 of engine 0 (read only)
//   0x80+4i+0/1/2/3   A, B, R_1, R_2 of engine i (0 <= i < NREP)
// Unmapped reads return 0. Writes ignore byteenable except that a write with
// no byte enabled does nothing.
//
// Timing: writes take effect at the clock edge that accepts them; read data
// is returned one cycle after the read. A START write accepted at edge 0
// clears done and starts the engines at edge 1; they finish at edge 129,
// done is set at edge 130 and a STATUS read accepted at edge 131 or later
// returns done = 1. A START write while the engines run is ignored. A reset
// written at edge 0 holds the engines in reset at edge 1.
//
// From the document: the write demultiplexer / read multiplexer structure,
// the Avalon address, writedata, chipselect, write and readdata signals,
// one start for all replications, a reset reaching the engines through the
// write demultiplexer, and the offsets 0 (A), 1 (B), 18 (START)
// and 19 (R_1) of the engine-0 registers. This design's own choices: the key
// and per-engine register placement, the STATUS register and its bits, R_2
// at 20, and the bit that selects decryption.
module xtea_avalon
  import xtea_pkg::*;
#(
  parameter int unsigned NREP   = 16,
  parameter int unsigned ADDR_W = 8
) (
  input  logic          clk,
  input  logic          rst,
  avalon_mm_if.slave    av
);

  localparam logic [ADDR_W-1:0] A_REG     = ADDR_W'(8'h00);
  localparam logic [ADDR_W-1:0] B_REG     = ADDR_W'(8'h01);
  localparam logic [ADDR_W-1:0] KEY_REG   = ADDR_W'(8'h02);
  localparam logic [ADDR_W-1:0] START_REG = ADDR_W'(8'h12);
  localparam logic [ADDR_W-1:0] R_1_REG   = ADDR_W'(8'h13);
  localparam logic [ADDR_W-1:0] R_2_REG   = ADDR_W'(8'h14);
  localparam logic [ADDR_W-1:0] ENG_BASE  = ADDR_W'(8'h80);

  logic [NREP-1:0][31:0] a_reg, b_reg, r1, r2;
  logic [NREP-1:0]       eng_done, eng_busy;
  xtea_key_t             key_reg;
  logic                  start_p, dec_reg, done_flag;
  logic                  eng_rst_p;     // software reset pulse to the engines
  logic                  eng_rst;

  logic [ADDR_W-1:0] addr;
  logic wr, rd, start_acc;
  assign addr = ADDR_W'(av.address);
  assign wr = av.chipselect && av.write && (av.byteenable != 4'b0000);
  assign rd = av.chipselect && av.read;
  // a START write that is accepted (ignored while the engines run)
  assign start_acc = wr && (addr == START_REG) && av.writedata[0] && !av.writedata[2]
                     && !(|eng_busy);
  assign eng_rst   = rst || eng_rst_p;

  // engine i's register window, if the address falls in one
  function automatic logic in_eng(input logic [ADDR_W-1:0] adr, output int unsigned idx,
                                  output logic [1:0] off);
    logic [ADDR_W-1:0] rel;
    rel = adr - ENG_BASE;
    idx = 32'(rel[ADDR_W-1:2]);
    off = rel[1:0];
    return (adr >= ENG_BASE) && (idx < NREP);
  endfunction

  // write demultiplexer
  always_ff @(posedge clk) begin
    int unsigned idx;
    logic [1:0]  off;
    if (rst) begin
      a_reg   <= '0;
      b_reg   <= '0;
      key_reg <= '0;
      start_p <= 1'b0;
      dec_reg <= 1'b0;
      eng_rst_p <= 1'b0;
    end else begin
      start_p <= 1'b0;
      eng_rst_p <= wr && (addr == START_REG) && av.writedata[2];
      if (wr) begin
        if (addr == A_REG) a_reg[0] <= av.writedata;
        if (addr == B_REG) b_reg[0] <= av.writedata;
        for (int k = 0; k < 4; k++)
          if (addr == KEY_REG + ADDR_W'(k)) key_reg[k] <= av.writedata;
        if (start_acc) begin
          start_p <= 1'b1;
          dec_reg <= av.writedata[1];
        end
        if (in_eng(addr, idx, off)) begin
          if (off == 2'd0) a_reg[idx] <= av.writedata;
          if (off == 2'd1) b_reg[idx] <= av.writedata;
        end
      end
    end
  end

  // done flag: set by the master done, cleared by an accepted START write
  always_ff @(posedge clk) begin
    if (rst)             done_flag <= 1'b0;
    else if (start_acc || eng_rst_p) done_flag <= 1'b0;
    else if (&eng_done)  done_flag <= 1'b1;
  end

  for (genvar i = 0; i < NREP; i++) begin : g_eng
    xtea_engine u_eng (
      .clk        (clk),
      .rst        (eng_rst),
      .start      (start_p),
      .decrypt    (dec_reg),
      .key        (key_reg),
      .block_in_0 (a_reg[i]),
      .block_in_1 (b_reg[i]),
      .v_0_out    (r1[i]),
      .v_1_out    (r2[i]),
      .done       (eng_done[i]),
      .busy       (eng_busy[i])
    );
  end

  // read multiplexer, registered: data returned one cycle after the read
  logic [31:0] rdata;
  always_comb begin
    int unsigned idx;
    logic [1:0]  off;
    rdata = '0;
    unique case (addr)
      A_REG:     rdata = a_reg[0];
      B_REG:     rdata = b_reg[0];
      START_REG: rdata = {30'd0, start_p || (|eng_busy), done_flag};
      R_1_REG:   rdata = r1[0];
      R_2_REG:   rdata = r2[0];
      default:   rdata = '0;
    endcase
    for (int k = 0; k < 4; k++)
      if (addr == KEY_REG + ADDR_W'(k)) rdata = key_reg[k];
    if (in_eng(addr, idx, off)) begin
      unique case (off)
        2'd0: rdata = a_reg[idx];
        2'd1: rdata = b_reg[idx];
        2'd2: rdata = r1[idx];
        2'd3: rdata = r2[idx];
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      av.readdata      <= '0;
      av.readdatavalid <= 1'b0;
    end else begin
      av.readdatavalid <= rd;
      if (rd) av.readdata <= rdata;
    end
  end

endmodule
