// tb_workload_replication: the throughput experiments, in simulation.
//
// Builds the system five times, with 1, 2, 4, 8 and 16 engines, and in each:
//  * Co-Design: the bus master writes one block into every engine, starts
//    them all with one START, polls STATUS and reads all results back; the
//    cycles from the first write to the last read are reported with the
//    throughput they give at 114 MHz, next to the engines' own 128 cycles.
//  * Full-Hardware: the driver encrypts NREP blocks fed in parallel; the
//    start-to-done time must be 129 cycles whatever NREP is, so throughput
//    grows linearly with the number of engines.
// With one engine it also streams arrays of 1, 2, 4, ... 8192 blocks through
// the accelerator one block at a time (blocks generated on the fly, as the
// RAM could not hold the larger arrays) and checks that the cycles per block
// do not depend on the array size. Every result is checked against the
// reference model.
module tb_workload_replication;
  import xtea_pkg::*;
  import xtea_ref_pkg::*;

  localparam int NCFG = 5;
  localparam int REPS[NCFG] = '{1, 2, 4, 8, 16};
  localparam logic [31:0] XTEA = 32'h4400;
  localparam int MAXLOG = 13;               // arrays up to 2^13 = 8192 blocks

  logic clk = 0, reset_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;
  int finished = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int R = REPS[g];
    logic [31:0] cpu_address = 0, cpu_writedata = 0, cpu_readdata;
    logic        cpu_read = 0, cpu_write = 0, cpu_readdatavalid;
    logic [3:0]  cpu_byteenable = 4'hF;
    logic        jtag_address, jtag_chipselect, jtag_read, jtag_write;
    logic [31:0] jtag_writedata;
    logic [3:0]  jtag_byteenable;
    logic        fh_start = 0, fh_done, fh_busy;
    xtea_key_t   fh_key = '0;
    logic [R-1:0][63:0] fh_data_in = '0, fh_data_out;

    xtea_soc_top #(.NREP(R)) dut (
      .clk, .reset_n, .cpu_address, .cpu_read, .cpu_write, .cpu_writedata, .cpu_byteenable,
      .cpu_readdata, .cpu_readdatavalid, .jtag_address, .jtag_chipselect, .jtag_read,
      .jtag_write, .jtag_writedata, .jtag_byteenable, .jtag_readdata(32'd0),
      .jtag_readdatavalid(1'b0), .fh_start, .fh_decrypt(1'b0), .fh_key,
      .fh_data_in, .fh_data_out, .fh_done, .fh_busy);

    task automatic wr(input logic [31:0] a, input logic [31:0] d);
      @(negedge clk);
      cpu_address = a; cpu_writedata = d; cpu_write = 1;
      @(negedge clk);
      cpu_write = 0;
    endtask
    task automatic rd(input logic [31:0] a, output logic [31:0] d);
      @(negedge clk);
      cpu_address = a; cpu_read = 1;
      @(negedge clk);
      cpu_read = 0;
      d = cpu_readdata;
    endtask
    function automatic logic [31:0] eng(input int i, input int off);
      return XTEA + 4 * (32'h80 + 4 * i + off);
    endfunction

    // one batch: a block into each of the first n engines, run, read back
    task automatic batch(input int n, input logic [127:0] k, output longint cycles);
      logic [63:0] p[R];
      logic [31:0] d0, d1, st;
      longint t0;
      for (int i = 0; i < n; i++) p[i] = {$urandom, $urandom};
      t0 = cyc;
      for (int i = 0; i < n; i++) begin
        wr(eng(i, 0), p[i][63:32]); wr(eng(i, 1), p[i][31:0]);
      end
      wr(XTEA + 4 * 32'h12, 32'h1);
      do rd(XTEA + 4 * 32'h12, st); while (!st[0]);
      for (int i = 0; i < n; i++) begin
        rd(eng(i, 2), d0); rd(eng(i, 3), d1);
        check({d0, d1} == ref_encrypt(p[i], k), $sformatf("R=%0d engine %0d", R, i));
      end
      cycles = cyc - t0;
    endtask

    initial begin
      logic [127:0] k;
      longint c, t0, per[MAXLOG + 1];
      logic [R-1:0][63:0] p;
      wait (reset_n);
      repeat (4) @(negedge clk);
      k = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 4; i++) wr(XTEA + 4 * (2 + i), k[32*i +: 32]);
      // Co-Design, one batch over all engines
      batch(R, k, c);
      $display("co-design  R=%2d: %0d blocks in %0d bus cycles, %0d bit/s at 114 MHz (engines alone: 128 cycles, %0d bit/s at 200 MHz)",
               R, R, c, longint'(64.0 * R * 114.0e6 / c), longint'(64.0 * R * 200.0e6 / 128));
      // Full-Hardware
      for (int i = 0; i < R; i++) p[i] = {$urandom, $urandom};
      @(negedge clk);
      fh_data_in = p; fh_key = k; fh_start = 1;
      @(negedge clk); fh_start = 0;
      t0 = cyc;
      while (!fh_done) @(negedge clk);
      check(cyc - t0 == 129, $sformatf("R=%0d full-hardware latency %0d", R, cyc - t0));
      for (int i = 0; i < R; i++) check(fh_data_out[i] == ref_encrypt(p[i], k), "full-hardware result");
      $display("full-hw    R=%2d: %0d bits in %0d cycles, %0d bit/s at 200 MHz",
               R, 64 * R, cyc - t0, longint'(64.0 * R * 200.0e6 / (cyc - t0)));
      // block-count sweep with one engine
      if (R == 1) begin
        for (int lg = 0; lg <= MAXLOG; lg++) begin
          t0 = cyc;
          for (int b = 0; b < (1 << lg); b++) batch(1, k, c);
          per[lg] = (cyc - t0) / (1 << lg);
          check((cyc - t0) % (1 << lg) == 0 || lg == 0, "whole cycles per block");
          check(per[lg] == per[0], $sformatf("%0d blocks: %0d cycles per block vs %0d", 1 << lg, per[lg], per[0]));
          $display("sweep      N=%4d blocks: %0d cycles, %0d per block", 1 << lg, cyc - t0, per[lg]);
        end
      end
      finished++;
    end
  end

  initial begin
    repeat (4) @(negedge clk);
    reset_n = 1;
    wait (finished == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
