// onchip_ram: on-chip RAM with an Avalon-MM slave port.
//
// BYTES bytes of single-port RAM organised as 32-bit words, written with
// per-byte enables and read with a fixed latency of one cycle (readdata and
// readdatavalid are registered). It holds the program, its data and the
// blocks that the software sends to the accelerator. The word address
// (ADDR_W bits) indexes the array directly. The contents start at zero.
// From the document: the 8 KB size, the 32-bit read and write data and the
// 4-bit byte enable with chip select and write controls. The document gives
// a 12-bit address bus; 8 KB of 32-bit words needs only 11 bits, which is
// what this design uses. Timing and the zero initial contents are this
// design's own choice.
module onchip_ram #(
  parameter int unsigned BYTES  = 8192,
  parameter int unsigned ADDR_W = $clog2(BYTES / 4)
) (
  input  logic        clk,
  input  logic        rst,
  avalon_mm_if.slave  av
);

  localparam int unsigned WORDS = BYTES / 4;

  logic [3:0][7:0] mem [WORDS];
  logic [ADDR_W-1:0] addr;
  assign addr = ADDR_W'(av.address);

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (av.chipselect && av.write)
      for (int b = 0; b < 4; b++)
        if (av.byteenable[b]) mem[addr][b] <= av.writedata[8*b +: 8];
  end

  always_ff @(posedge clk) begin
    if (av.chipselect && av.read) av.readdata <= mem[addr];
  end

  always_ff @(posedge clk) begin
    if (rst) av.readdatavalid <= 1'b0;
    else     av.readdatavalid <= av.chipselect && av.read;
  end

endmodule
