// xtea_soc_top: XTEA encryption system with replicated engines.
//
// Two configurations of the same XTEA engine stand side by side:
//  * Co-Design system: a clean-reset block, a processor bus interconnect,
//    8 KB of on-chip RAM at 0x2000, a performance counter at 0x4000 and the
//    XTEA accelerator with NREP engines at 0x4400. The processor itself is
//    not part of this RTL: its Avalon data master enters through the cpu_*
//    ports (byte addresses, read data one cycle after a read). The JTAG
//    UART is not part of it either: its slave port (window 0x4800-0x4807)
//    leaves through the jtag_* ports and must return read data one cycle
//    after a read.
//  * Full-Hardware block: the driver with NREP engines fed NREP 64-bit
//    blocks in parallel through the fh_* ports.
// Both use the same clock and the synchronised reset.
// From the document: the components of the processor system, the
// replication of the engine in both configurations and the RAM window.
// The other addresses and the port bundles are this design's own choices.
module xtea_soc_top
  import xtea_pkg::*;
#(
  parameter int unsigned NREP = 16
) (
  input  logic                  clk,
  input  logic                  reset_n,
  // processor data master
  input  logic [31:0]           cpu_address,
  input  logic                  cpu_read,
  input  logic                  cpu_write,
  input  logic [31:0]           cpu_writedata,
  input  logic [3:0]            cpu_byteenable,
  output logic [31:0]           cpu_readdata,
  output logic                  cpu_readdatavalid,
  // JTAG UART slave port
  output logic                  jtag_address,
  output logic                  jtag_chipselect,
  output logic                  jtag_read,
  output logic                  jtag_write,
  output logic [31:0]           jtag_writedata,
  output logic [3:0]            jtag_byteenable,
  input  logic [31:0]           jtag_readdata,
  input  logic                  jtag_readdatavalid,
  // Full-Hardware driver
  input  logic                  fh_start,
  input  logic                  fh_decrypt,
  input  xtea_key_t             fh_key,
  input  logic [NREP-1:0][63:0] fh_data_in,
  output logic [NREP-1:0][63:0] fh_data_out,
  output logic                  fh_done,
  output logic                  fh_busy
);

  logic rst;

  reset_sync u_rst (.clk(clk), .reset_n_in(reset_n), .rst(rst));

  avalon_mm_if #(.ADDR_W(32)) bus_cpu  (clk);
  avalon_mm_if #(.ADDR_W(11)) bus_ram  (clk);
  avalon_mm_if #(.ADDR_W(4))  bus_perf (clk);
  avalon_mm_if #(.ADDR_W(8))  bus_xtea (clk);
  avalon_mm_if #(.ADDR_W(1))  bus_jtag (clk);

  assign bus_cpu.address    = cpu_address;
  assign bus_cpu.chipselect = cpu_read || cpu_write;
  assign bus_cpu.read       = cpu_read;
  assign bus_cpu.write      = cpu_write;
  assign bus_cpu.writedata  = cpu_writedata;
  assign bus_cpu.byteenable = cpu_byteenable;
  assign cpu_readdata       = bus_cpu.readdata;
  assign cpu_readdatavalid  = bus_cpu.readdatavalid;

  assign jtag_address          = bus_jtag.address;
  assign jtag_chipselect       = bus_jtag.chipselect;
  assign jtag_read             = bus_jtag.read;
  assign jtag_write            = bus_jtag.write;
  assign jtag_writedata        = bus_jtag.writedata;
  assign jtag_byteenable       = bus_jtag.byteenable;
  assign bus_jtag.readdata      = jtag_readdata;
  assign bus_jtag.readdatavalid = jtag_readdatavalid;

  avalon_interconnect #(.RAM_AW(11), .PERF_AW(4), .XTEA_AW(8), .JTAG_AW(1)) u_ic (
    .clk, .rst, .m(bus_cpu), .s_ram(bus_ram), .s_perf(bus_perf), .s_xtea(bus_xtea), .s_jtag(bus_jtag)
  );

  onchip_ram #(.BYTES(8192), .ADDR_W(11)) u_ram (.clk, .rst, .av(bus_ram));

  perf_counter #(.NSECT(3), .ADDR_W(4)) u_perf (.clk, .rst, .av(bus_perf));

  xtea_avalon #(.NREP(NREP), .ADDR_W(8)) u_xtea (.clk, .rst, .av(bus_xtea));

  xtea_driver #(.NREP(NREP)) u_fh (
    .clk, .rst, .start(fh_start), .decrypt(fh_decrypt), .key(fh_key),
    .data_in(fh_data_in), .data_out(fh_data_out), .done(fh_done), .busy(fh_busy)
  );

endmodule
