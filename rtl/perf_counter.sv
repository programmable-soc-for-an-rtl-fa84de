// perf_counter: performance counter unit with an Avalon-MM slave port.
//
// Measures how many clock cycles a piece of software takes. A 64-bit global
// counter runs while enabled; NSECT section counters each accumulate the
// cycles spent between a BEGIN and an END write for their section (while
// the global counter runs) and count how often the section was entered.
//
// Word address map:
//   0  write: bit 0 start global counting, bit 1 stop, bit 2 clear all
//      read:  global cycle count [31:0]
//   1  read:  global cycle count [63:32]
//   2  write: BEGIN section number writedata
//   3  write: END section number writedata
//   4+4s, 5+4s  read: section s cycle count [31:0], [63:32]
//   6+4s        read: number of times section s was entered
// Reads return data one cycle later. A counter counts every clock edge after
// the edge that accepts its starting write, up to and including the edge
// that accepts its stopping write.
// From the document: a block of counters measuring the execution time and
// the occurrences of selected code sections. The register map, the counter
// widths and the number of sections are this design's own choices.
module perf_counter #(
  parameter int unsigned NSECT  = 3,
  parameter int unsigned ADDR_W = $clog2(4 + 4 * NSECT)
) (
  input  logic        clk,
  input  logic        rst,
  avalon_mm_if.slave  av
);

  logic [63:0]             gtime;
  logic                    gen;
  logic [NSECT-1:0][63:0]  stime;
  logic [NSECT-1:0][31:0]  socc;
  logic [NSECT-1:0]        sact;
  logic [ADDR_W-1:0]       addr;
  logic                    wr;

  assign addr = ADDR_W'(av.address);
  assign wr   = av.chipselect && av.write && (av.byteenable != 4'b0000);

  always_ff @(posedge clk) begin
    if (rst || (wr && addr == ADDR_W'(0) && av.writedata[2])) begin
      gtime <= '0;
      gen   <= 1'b0;
      stime <= '0;
      socc  <= '0;
      sact  <= '0;
    end else begin
      if (gen) gtime <= gtime + 64'd1;
      for (int s = 0; s < NSECT; s++)
        if (gen && sact[s]) stime[s] <= stime[s] + 64'd1;
      if (wr && addr == ADDR_W'(0)) begin
        if (av.writedata[0]) gen <= 1'b1;
        if (av.writedata[1]) gen <= 1'b0;
      end
      for (int s = 0; s < NSECT; s++) begin
        if (wr && addr == ADDR_W'(2) && av.writedata == 32'(s)) begin
          sact[s] <= 1'b1;
          socc[s] <= socc[s] + 32'd1;
        end
        if (wr && addr == ADDR_W'(3) && av.writedata == 32'(s)) sact[s] <= 1'b0;
      end
    end
  end

  logic [31:0] rdata;
  always_comb begin
    rdata = '0;
    if (addr == ADDR_W'(0)) rdata = gtime[31:0];
    if (addr == ADDR_W'(1)) rdata = gtime[63:32];
    for (int s = 0; s < NSECT; s++) begin
      if (addr == ADDR_W'(4 + 4 * s)) rdata = stime[s][31:0];
      if (addr == ADDR_W'(5 + 4 * s)) rdata = stime[s][63:32];
      if (addr == ADDR_W'(6 + 4 * s)) rdata = socc[s];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      av.readdata      <= '0;
      av.readdatavalid <= 1'b0;
    end else begin
      av.readdatavalid <= av.chipselect && av.read;
      if (av.chipselect && av.read) av.readdata <= rdata;
    end
  end

endmodule
