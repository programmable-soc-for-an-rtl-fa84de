// avalon_mm_if: the Avalon memory-mapped signal bundle used inside the SoC.
//
// One master drives address, chipselect, read, write, writedata and
// byteenable; the slave answers with readdata and readdatavalid. Every slave
// here accepts a transfer in the cycle it is presented (no wait states) and
// returns read data exactly one cycle later with readdatavalid high (fixed
// read latency 1). Writes complete in the cycle they are presented.
// address is a word address on the slave side and a byte address on the
// master side of the interconnect; ADDR_W sets its width.
// The names follow the Avalon-MM signal set (address, writedata, chipselect,
// write, readdata); byteenable, read, readdatavalid and the fixed latency are
// this design's choice. The assertions check the handshake rules.
interface avalon_mm_if #(
  parameter int unsigned ADDR_W = 32
) (
  input logic clk
);

  logic [ADDR_W-1:0] address;
  logic              chipselect;
  logic              read;
  logic              write;
  logic [31:0]       writedata;
  logic [3:0]        byteenable;
  logic [31:0]       readdata;
  logic              readdatavalid;

  modport master (output address, chipselect, read, write, writedata, byteenable,
                  input  readdata, readdatavalid);
  modport slave  (input  address, chipselect, read, write, writedata, byteenable,
                  output readdata, readdatavalid);

  // a transfer is either a read or a write
  a_rw_exclusive: assert property (@(posedge clk) chipselect |-> !(read && write))
    else $error("avalon: read and write in the same cycle");
  // read data comes back exactly one cycle after the read
  a_read_latency: assert property (@(posedge clk) (chipselect && read) |=> readdatavalid)
    else $error("avalon: read data not returned after one cycle");

endinterface
