// soc_map_pkg: byte address map of the XTEA system-on-chip.
//
// The on-chip RAM window 0x2000-0x3FFF (8 KB) is the one the document's
// system uses; the other base addresses are this design's choice.
package soc_map_pkg;

  localparam logic [31:0] RAM_BASE  = 32'h0000_2000;  // 8 KB
  localparam logic [31:0] RAM_SIZE  = 32'h0000_2000;
  localparam logic [31:0] PERF_BASE = 32'h0000_4000;  // performance counter
  localparam logic [31:0] PERF_SIZE = 32'h0000_0040;
  localparam logic [31:0] XTEA_BASE = 32'h0000_4400;  // XTEA accelerator
  localparam logic [31:0] XTEA_SIZE = 32'h0000_0400;
  localparam logic [31:0] JTAG_BASE = 32'h0000_4800;  // JTAG UART
  localparam logic [31:0] JTAG_SIZE = 32'h0000_0008;

  typedef enum logic [2:0] {SEL_NONE, SEL_RAM, SEL_PERF, SEL_XTEA, SEL_JTAG} slave_sel_e;

  function automatic slave_sel_e decode(input logic [31:0] a);
    if (a >= RAM_BASE  && a < RAM_BASE  + RAM_SIZE)  return SEL_RAM;
    if (a >= PERF_BASE && a < PERF_BASE + PERF_SIZE) return SEL_PERF;
    if (a >= XTEA_BASE && a < XTEA_BASE + XTEA_SIZE) return SEL_XTEA;
    if (a >= JTAG_BASE && a < JTAG_BASE + JTAG_SIZE) return SEL_JTAG;
    return SEL_NONE;
  endfunction

endpackage
