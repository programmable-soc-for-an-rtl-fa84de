// avalon_interconnect: system interconnect between one Avalon-MM master
// (the processor's data master) and the four slaves of the SoC.
//
// The master's byte address is decoded with soc_map_pkg::decode; the
// selected slave gets chipselect and the word address relative to its base
// (byte address minus base, divided by four); the other slaves see no
// chipselect. writedata, byteenable, read and write go to all slaves. All
// slaves return read data one cycle after the read; the interconnect
// registers which slave a read went to and passes that slave's readdata and
// readdatavalid back. A read of an unmapped address returns 0 one cycle later
// so that the master never hangs; a write there is dropped.
// From the document: an interconnect generated for the components of the
// system. The decoding, the zero-wait protocol and the unmapped-address
// response are this design's own choices.
module avalon_interconnect
  import soc_map_pkg::*;
#(
  parameter int unsigned RAM_AW  = 11,  // word address widths of the slaves
  parameter int unsigned PERF_AW = 4,
  parameter int unsigned XTEA_AW = 8,
  parameter int unsigned JTAG_AW = 1
) (
  input  logic        clk,
  input  logic        rst,
  avalon_mm_if.slave  m,       // from the master
  avalon_mm_if.master s_ram,
  avalon_mm_if.master s_perf,
  avalon_mm_if.master s_xtea,
  avalon_mm_if.master s_jtag
);

  slave_sel_e sel, rsel;
  logic [31:0] maddr;

  assign maddr = 32'(m.address);

  always_comb sel = m.chipselect ? decode(maddr) : SEL_NONE;

  // request side: fan out with per-slave chipselect and relative address
  always_comb begin
    s_ram.chipselect  = (sel == SEL_RAM);
    s_perf.chipselect = (sel == SEL_PERF);
    s_xtea.chipselect = (sel == SEL_XTEA);
    s_jtag.chipselect = (sel == SEL_JTAG);
    s_ram.address  = RAM_AW'((maddr - RAM_BASE) >> 2);
    s_perf.address = PERF_AW'((maddr - PERF_BASE) >> 2);
    s_xtea.address = XTEA_AW'((maddr - XTEA_BASE) >> 2);
    s_jtag.address = JTAG_AW'((maddr - JTAG_BASE) >> 2);
    s_ram.read  = m.read;  s_ram.write  = m.write;
    s_perf.read = m.read;  s_perf.write = m.write;
    s_xtea.read = m.read;  s_xtea.write = m.write;
    s_jtag.read = m.read;  s_jtag.write = m.write;
    s_ram.writedata  = m.writedata;  s_ram.byteenable  = m.byteenable;
    s_perf.writedata = m.writedata;  s_perf.byteenable = m.byteenable;
    s_xtea.writedata = m.writedata;  s_xtea.byteenable = m.byteenable;
    s_jtag.writedata = m.writedata;  s_jtag.byteenable = m.byteenable;
  end

  // response side: remember where the read went
  logic rd_none;
  always_ff @(posedge clk) begin
    if (rst) begin
      rsel    <= SEL_NONE;
      rd_none <= 1'b0;
    end else begin
      rsel    <= (m.chipselect && m.read) ? sel : SEL_NONE;
      rd_none <= m.chipselect && m.read && (sel == SEL_NONE);
    end
  end

  always_comb begin
    unique case (rsel)
      SEL_RAM:  begin m.readdata = s_ram.readdata;  m.readdatavalid = s_ram.readdatavalid;  end
      SEL_PERF: begin m.readdata = s_perf.readdata; m.readdatavalid = s_perf.readdatavalid; end
      SEL_XTEA: begin m.readdata = s_xtea.readdata; m.readdatavalid = s_xtea.readdatavalid; end
      SEL_JTAG: begin m.readdata = s_jtag.readdata; m.readdatavalid = s_jtag.readdatavalid; end
      default:  begin m.readdata = '0;              m.readdatavalid = rd_none;              end
    endcase
  end

endmodule
