// tb_xtea_soc_top: end-to-end test of the XTEA system-on-chip at its
// default size (NREP = 16 engines in both configurations).
//
// The initial block below plays the processor's software over the data
// master ports: it stores NBLK plaintext blocks in the on-chip RAM, loads the
// key into the accelerator, and encrypts the array in batches of NREP blocks
// (copy each block from RAM into an engine's input registers, one START for
// all engines, poll STATUS, copy the results back to RAM), timing the loop
// with the performance counter. It then switches to decryption and recovers
// the plaintext, and prints a message through the JTAG UART port. At the
// same time the Full-Hardware driver encrypts and decrypts NREP blocks fed in
// parallel. Everything is checked against the reference model.
// Mechanisms counted (each must happen at least once): encrypt runs,
// decrypt runs, status polls that found the engines busy, START writes
// ignored while busy, runs aborted by the engine reset, unmapped reads,
// JTAG UART writes, timed sections and Full-Hardware runs.
module tb_xtea_soc_top;
  import xtea_pkg::*;
  import xtea_ref_pkg::*;

  localparam int NREP = 16;
  localparam int NBLK = 64;              // blocks in the array
  localparam logic [31:0] PT_ADDR = 32'h2000, CT_ADDR = 32'h2400, RT_ADDR = 32'h2800;
  localparam logic [31:0] XTEA = 32'h4400, PERF = 32'h4000, JTAG = 32'h4800;

  logic clk = 0, reset_n = 0;
  always #5 clk = ~clk;

  logic [31:0] cpu_address = 0, cpu_writedata = 0, cpu_readdata;
  logic        cpu_read = 0, cpu_write = 0, cpu_readdatavalid;
  logic [3:0]  cpu_byteenable = 0;
  logic        jtag_address, jtag_chipselect, jtag_read, jtag_write;
  logic [31:0] jtag_writedata, jtag_readdata;
  logic [3:0]  jtag_byteenable;
  logic        jtag_readdatavalid;
  logic        fh_start = 0, fh_decrypt = 0, fh_done, fh_busy;
  xtea_key_t   fh_key = '0;
  logic [NREP-1:0][63:0] fh_data_in = '0, fh_data_out;

  xtea_soc_top dut (.*);

  // JTAG UART stand-in: data register at word 0, control at word 1;
  // collects the characters written and reports free space on reads
  string jtag_text = "";
  int    n_jtag = 0;
  initial begin jtag_readdatavalid = 0; jtag_readdata = 0; end
  always @(posedge clk) begin
    jtag_readdatavalid <= jtag_chipselect && jtag_read;
    if (jtag_chipselect && jtag_read) jtag_readdata <= {16'd64, 16'd0};
    if (jtag_chipselect && jtag_write && !jtag_address) begin
      jtag_text = {jtag_text, string'(jtag_writedata[7:0])};
      n_jtag++;
    end
  end

  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_busy_poll = 0, n_ignored = 0, n_unmapped = 0, n_sections = 0, n_fh = 0, n_abort = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // processor data master
  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    cpu_address = a; cpu_writedata = d; cpu_byteenable = 4'hF; cpu_write = 1;
    @(negedge clk);
    cpu_write = 0;
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    cpu_address = a; cpu_read = 1;
    @(negedge clk);
    cpu_read = 0;
    check(cpu_readdatavalid, $sformatf("read data returned for %h", a));
    d = cpu_readdata;
  endtask

  // engine i register window in the accelerator (byte addresses)
  function automatic logic [31:0] eng(input int i, input int off);
    return XTEA + 4 * (32'h80 + 4 * i + off);
  endfunction

  // process NBLK blocks from src to dst in RAM, NREP at a time
  task automatic crypt_array(input logic [31:0] src, input logic [31:0] dst, input bit dec);
    logic [31:0] d, st;
    for (int b = 0; b < NBLK; b += NREP) begin
      for (int i = 0; i < NREP; i++) begin
        rd(src + 8 * (b + i), d);     wr(eng(i, 0), d);
        rd(src + 8 * (b + i) + 4, d); wr(eng(i, 1), d);
      end
      wr(XTEA + 4 * 32'h12, {30'd0, dec, 1'b1});          // START all engines
      if (dec) n_dec++; else n_enc++;
      // a second START while busy must be ignored (wrong direction on purpose)
      wr(XTEA + 4 * 32'h12, {30'd0, !dec, 1'b1});
      do begin
        rd(XTEA + 4 * 32'h12, st);
        if (st[1]) n_busy_poll++;
      end while (!st[0]);
      for (int i = 0; i < NREP; i++) begin
        rd(eng(i, 2), d); wr(dst + 8 * (b + i), d);
        rd(eng(i, 3), d); wr(dst + 8 * (b + i) + 4, d);
      end
    end
  endtask

  logic [127:0] key;
  logic [63:0]  pt[NBLK];
  logic [31:0]  d0, d1, tlo;
  longint       c0, c1;
  string        msg = "XTEA OK\n";

  // Full-Hardware driver, running at the same time as the software
  initial begin
    logic [NREP-1:0][63:0] p, c;
    logic [127:0] k;
    longint t0;
    wait (reset_n);
    repeat (10) @(negedge clk);
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < NREP; i++) p[i] = {$urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      fh_data_in = p; fh_key = k; fh_decrypt = 0; fh_start = 1;
      @(negedge clk); fh_start = 0;
      t0 = cyc;
      while (!fh_done) @(negedge clk);
      check(cyc - t0 == 129, $sformatf("full-hardware latency %0d", cyc - t0));
      c = fh_data_out;
      for (int i = 0; i < NREP; i++) check(c[i] == ref_encrypt(p[i], k), "full-hardware encrypt");
      n_fh++;
      fh_data_in = c; fh_decrypt = 1; fh_start = 1;
      @(negedge clk); fh_start = 0;
      while (!fh_done) @(negedge clk);
      for (int i = 0; i < NREP; i++) check(fh_data_out[i] == p[i], "full-hardware decrypt");
      n_fh++;
    end
  end

  initial begin
    repeat (4) @(negedge clk);
    reset_n = 1;
    repeat (4) @(negedge clk);
    // software creates the data array in RAM
    for (int i = 0; i < NBLK; i++) begin
      pt[i] = {$urandom, $urandom};
      wr(PT_ADDR + 8 * i, pt[i][63:32]);
      wr(PT_ADDR + 8 * i + 4, pt[i][31:0]);
    end
    key = {$urandom, $urandom, $urandom, $urandom};
    for (int k = 0; k < 4; k++) wr(XTEA + 4 * (2 + k), key[32*k +: 32]);
    // time the encryption with the performance counter, section 0
    wr(PERF + 0, 32'h4);
    wr(PERF + 0, 32'h1);
    wr(PERF + 8, 32'd0);
    c0 = cyc;
    crypt_array(PT_ADDR, CT_ADDR, 0);
    wr(PERF + 12, 32'd0);
    c1 = cyc;
    n_sections++;
    rd(PERF + 16, tlo);
    check(longint'(tlo) == c1 - c0, $sformatf("section time %0d vs %0d cycles", tlo, c1 - c0));
    rd(PERF + 24, d0); check(d0 == 1, "section entered once");
    $display("encrypting %0d blocks with %0d engines over the bus took %0d cycles", NBLK, NREP, tlo);
    for (int i = 0; i < NBLK; i++) begin
      rd(CT_ADDR + 8 * i, d0); rd(CT_ADDR + 8 * i + 4, d1);
      check({d0, d1} == ref_encrypt(pt[i], key), $sformatf("ciphertext %0d in RAM", i));
    end
    // mode switch: decrypt the ciphertext array
    crypt_array(CT_ADDR, RT_ADDR, 1);
    for (int i = 0; i < NBLK; i++) begin
      rd(RT_ADDR + 8 * i, d0); rd(RT_ADDR + 8 * i + 4, d1);
      check({d0, d1} == pt[i], $sformatf("decrypted block %0d in RAM", i));
    end
    // engine 0 short addresses hold the last batch's block 0
    rd(XTEA + 4 * 32'h13, d0); rd(XTEA + 4 * 32'h14, d1);
    check({d0, d1} == pt[NBLK - NREP], "engine 0 result at R_1/R_2");
    check(d0 != 0 || d1 != 0, "engine 0 result non-zero before the reset");
    // software reset of the engines aborts a run
    wr(XTEA + 4 * 32'h12, 32'h1);
    repeat (30) @(negedge clk);
    wr(XTEA + 4 * 32'h12, 32'h4);
    n_abort++;
    repeat (150) @(negedge clk);
    rd(XTEA + 4 * 32'h12, d0); check(d0 == 0, "aborted run: idle, no done");
    // unmapped address
    rd(32'h0000_1000, d0); check(d0 == 0, "unmapped read returns 0"); n_unmapped++;
    // message through the JTAG UART
    rd(JTAG + 4, d0); check(d0[31:16] != 0, "JTAG UART has space");
    for (int i = 0; i < msg.len(); i++) wr(JTAG, {24'd0, msg[i]});
    @(negedge clk);
    check(jtag_text == msg, "JTAG UART text");
    $write("%s", jtag_text);
    wait (n_fh == 6);
    check(n_enc > 0, "encrypt runs");             check(n_dec > 0, "decrypt runs");
    check(n_busy_poll > 0, "busy polls");         check(n_unmapped > 0, "unmapped reads");
    check(n_jtag > 0, "JTAG UART writes");        check(n_sections > 0, "timed sections");
    check(n_fh > 0, "full-hardware runs");       check(n_abort > 0, "aborted runs");
    // the ignored STARTs: every batch issued one and all results were right
    n_ignored = n_enc + n_dec;
    check(n_ignored > 0, "ignored starts");
    $display("encrypt runs %0d, decrypt runs %0d, busy polls %0d, ignored starts %0d, unmapped reads %0d, jtag writes %0d, sections %0d, full-hardware runs %0d, aborted runs %0d",
             n_enc, n_dec, n_busy_poll, n_ignored, n_unmapped, n_jtag, n_sections, n_fh, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
