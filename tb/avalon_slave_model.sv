// avalon_slave_model: behavioural Avalon-MM slave for the testbenches.
//
// Answers every read one cycle later with {TAG, word address} in readdata
// and readdatavalid high, and records the last write (address, data, byte
// enables) and the number of writes it saw. Used to stand in for a slave
// so that the interconnect's decoding can be observed.
module avalon_slave_model #(
  parameter logic [7:0] TAG = 8'h00
) (
  input  logic        clk,
  avalon_mm_if.slave  av,
  output logic [31:0] last_addr,
  output logic [31:0] last_data,
  output logic [3:0]  last_be,
  output int          writes
);
  initial begin
    writes = 0; last_addr = 0; last_data = 0; last_be = 0;
    av.readdatavalid = 0; av.readdata = 0;
  end
  always @(posedge clk) begin
    av.readdatavalid <= av.chipselect && av.read;
    if (av.chipselect && av.read) av.readdata <= {TAG, 24'(av.address)};
    if (av.chipselect && av.write) begin
      last_addr <= 32'(av.address);
      last_data <= av.writedata;
      last_be   <= av.byteenable;
      writes    <= writes + 1;
    end
  end
endmodule
