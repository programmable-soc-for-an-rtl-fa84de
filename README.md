# XTEA encryption by engine replication

XTEA is a lightweight 64-bit block cipher with a 128-bit key. It runs 32 rounds, and each round uses
only shifts, XORs and 32-bit additions. This design does not pipeline the cipher or shorten its
critical path. It gets throughput by **replication**: it builds one small iterative XTEA engine,
places many copies side by side, and gives each copy a different block. Sixteen engines at 200 MHz
encrypt 1024 bits every 129 cycles, about 1.6 Gb/s. Each engine is about 200 flip-flops and
70 word-level cells.

The engine is used in two configurations, and both are in this RTL:

* **Full-Hardware**: a driver feeds NREP engines in parallel from a 64×NREP-bit input and collects
  their 64×NREP-bit output (`xtea_driver`).
* **Co-Design**: the engines sit behind an Avalon memory-mapped slave (`xtea_avalon`) in a small
  processor system. The system has a bus interconnect, 8 KB of on-chip RAM and a performance
  counter. Software moves blocks in and out through registers, and the engines do the arithmetic.

`xtea_soc_top` places both configurations side by side, each with 16 engines by default. The
processor and the JTAG UART are not part of the RTL. The top brings out the processor's data-master
port and the UART's slave port as plain signals.

## The algorithm as the hardware sees it

A block is two 32-bit words, v0 and v1. The key is four words, k0 to k3. The helper function is
`f(x) = ((x << 4) ^ (x >> 5)) + x`. One encryption round is:

```
v0  += f(v1) ^ (sum + k[sum[1:0]])
sum += 0x9E3779B9
v1  += f(v0) ^ (sum + k[sum[12:11]])
```

`sum` starts at 0. All additions are modulo 2^32. Decryption runs the same steps in mirror order:
`sum` starts at 32 × 0x9E3779B9 = 0xC6EF3720, v1 is updated first with `sum[12:11]`, the updates
subtract, and `sum` decreases.

Both half-round updates have the same shape, `v ± (f(z) ^ sum_key)`. That shape is
`xtea_round_half`: two shifters, an XOR, the f adder, an XOR with the sub-key sum, and an
add/subtract unit steered by the direction. It is combinational.

## The engine: four cycles per round, 128 per block

`xtea_engine` has a single `xtea_round_half` and reuses it for both halves of a round. A 2-bit phase
counter steps through each round, and a 5-bit round counter counts 32 rounds:

| phase | encrypt                                  | decrypt                                  |
|-------|------------------------------------------|------------------------------------------|
| 0     | `subkey <= sum + k[sum[1:0]]`            | `subkey <= sum + k[sum[12:11]]`          |
| 1     | `v0 <= v0 + (f(v1) ^ subkey)`, `sum += Δ`| `v1 <= v1 - (f(v0) ^ subkey)`, `sum -= Δ`|
| 2     | `subkey <= sum + k[sum[12:11]]`          | `subkey <= sum + k[sum[1:0]]`            |
| 3     | `v1 <= v1 + (f(v0) ^ subkey)`            | `v0 <= v0 - (f(v1) ^ subkey)`            |

The sub-key sum gets its own cycle, so the half-round adder chain never includes the key multiplexer
or the sum adder. This makes the latency a fixed 32 × 4 = **128 cycles**.

Interface and timing:

* `start` is sampled at a clock edge (edge 0). At that edge the engine copies `block_in_0` (v0),
  `block_in_1` (v1) and `decrypt`.
* After edge 128, `v_0_out`/`v_1_out` hold the result and `done` is high for exactly one cycle.
  The outputs keep their value until the next result.
* `start` is ignored while `busy` is high.
* `key` is not copied inside the engine. Hold it stable from start to done. Both wrappers keep it
  in a register.
* `rst` is synchronous and active high.

The engine has a `NUM_ROUNDS_P` parameter (default 32) for experiments. The decrypt starting sum
follows it.

## Full-Hardware driver

`xtea_driver #(NREP)` shares the clock, reset, start, key and direction among all engines. When
`start` is high and the driver is idle, it copies `data_in`, `key` and `decrypt` into input buffer
registers, and starts the engines on the next cycle. Block `i` is `data_in[i] = {v0, v1}`, and
`data_out` uses the same layout. `done` is the AND of the engines' done pulses. The engines run in
lock-step, so this is the same pulse as the first engine's done.

The buffer adds one cycle: with start sampled at edge 0, results and `done` appear after edge 129.
Started back to back, the driver delivers 64 × NREP bits every 129 cycles:

| NREP | bits per run | throughput at 200 MHz |
|------|--------------|-----------------------|
| 1    | 64           | 99 Mb/s               |
| 4    | 256          | 397 Mb/s              |
| 16   | 1024         | 1.59 Gb/s             |

## Co-Design accelerator (`xtea_avalon`)

The processor fills a buffer register pair in every engine through a write demultiplexer. It writes
the key, and then starts all engines with one write. It polls a status register and reads the
results back through a read multiplexer. Addresses are in 32-bit words. In the system below, the
accelerator's byte address is 0x4400 + 4 × word.

| word        | access | meaning |
|-------------|--------|---------|
| 0x00        | R/W    | A: input v0 of engine 0 |
| 0x01        | R/W    | B: input v1 of engine 0 |
| 0x02–0x05   | R/W    | key k0–k3, shared by all engines |
| 0x12        | W      | START: bit 0 starts all engines, bit 1 selects decryption, bit 2 resets all engines (wins over bit 0) |
| 0x12        | R      | STATUS: bit 0 done (set when a run ends, cleared by START or reset), bit 1 busy |
| 0x13        | R      | R_1: result v0 of engine 0 |
| 0x14        | R      | R_2: result v1 of engine 0 |
| 0x80+4i+0…3 | R/W, R/W, R, R | A, B, R_1, R_2 of engine i, for i < NREP |

Engine 0 answers at both its short addresses and its window. Unmapped words read as 0. A write with
no byte enabled is ignored. A START while the engines are busy is ignored. The reset bit aborts a
run and clears the results and done, but keeps the key and input registers.

Timing:

* The slave takes every transfer in the cycle it is presented and returns read data one cycle later,
  with `readdatavalid` high.
* A START accepted at edge 0 starts the engines at edge 1. They finish at edge 129, and done is set
  at edge 130. A STATUS read accepted at edge 131 or later sees done.

A typical software loop, for each batch of NREP blocks:

1. Write A and B of each engine.
2. Write START = 1 (or 3 to decrypt).
3. Read STATUS until bit 0 is set.
4. Read R_1 and R_2 of each engine.

The run itself takes 128 cycles. The bus transfers around it take 4 × NREP + 1 + polls cycles, and in
practice they set the Co-Design throughput. With the testbench's bus master, which spends two cycles
per transfer, one batch takes 142 cycles with one engine and 262 cycles with sixteen.

## The processor system (`xtea_soc_top`)

Byte address map of the processor's data master:

| range           | slave |
|-----------------|-------|
| 0x2000–0x3FFF   | on-chip RAM, 8 KB (`onchip_ram`) |
| 0x4000–0x403F   | performance counter (`perf_counter`) |
| 0x4400–0x47FF   | XTEA accelerator (`xtea_avalon`) |
| 0x4800–0x4807   | JTAG UART, outside the RTL (`jtag_*` ports) |

`avalon_interconnect` decodes the address (`soc_map_pkg`). It gives the selected slave its word
offset and returns that slave's read data. Reads of unmapped addresses return 0, so the master never
waits forever.

Every internal connection uses `avalon_mm_if`. That interface carries address, chipselect, read,
write, writedata, byteenable, readdata and readdatavalid, with a fixed read latency of one cycle and
no wait states. Its assertions check that read and write are never high together, and that read data
always comes back one cycle after the read. A slave attached to the `jtag_*` ports must follow the
same timing. `cpu_*` is the master side: it asserts `cpu_read` or `cpu_write` for one cycle per
transfer, and `cpu_readdatavalid` marks the returned data.

The other blocks:

* `onchip_ram`: 2048 words × 32 bits, with byte enables and one-cycle reads. Its contents start at
  zero.
* `perf_counter`: a 64-bit global cycle counter and three section counters. Each section counter
  records the cycles spent in its section (64-bit) and how many times the section was entered.
  Word 0 takes start/stop/clear bits and reads the global count. Words 2 and 3 take BEGIN and END
  with a section number. Section s reads at words 4+4s (time, low), 5+4s (time, high) and 6+4s
  (entries). A counter counts the edges after its starting write, up to and including the edge of
  its stopping write.
* `reset_sync`: turns the active-low `reset_n` into a reset that is asserted at once and released
  synchronously after two clock edges. Everything in the system uses it.

## How far to trust it, and where it is this design's own

These parts come from the source description of this system:

* the algorithm and its constants, and the mixing and key-selection rules;
* the 128-cycle engine latency, and the registers of the engine (2-bit cycle counter, 5-bit round
  counter, sum, sub-key, v0, v1);
* the engine's port names and its start/done protocol, with done lasting one cycle;
* replication from 1 to 16 engines under a master start and master done;
* the write-demultiplexer / read-multiplexer wrapper, and one start for all engines;
* the register offsets 0 (A), 1 (B), 18 (START) and 19 (R_1);
* the component list of the processor system, and the 8 KB RAM at 0x2000–0x3FFF.

These parts are this design's own choices:

* the assignment of work to the four phases;
* the engine's key and direction ports, and the driver's one-cycle input buffer;
* the rest of the register map (key, STATUS, R_2, engine windows, the decrypt and reset bits);
* the Avalon timing (no wait states, read latency 1);
* the base addresses other than the RAM's;
* the performance counter's register map;
* the reset synchroniser.

Some points depart from the source or fill gaps in it:

* **Latency.** The source also mentions 32 cycles per block in one place. This design follows its
  128-cycle figure, which its throughput tables use.
* **Decryption pseudo-code.** The source's decryption pseudo-code starts `sum` at 0 and adds delta,
  which cannot invert the encryption. The standard XTEA decryption is used instead.
* **RAM address width.** The source gives the RAM a 12-bit address bus, but 8 KB of words needs only
  11 bits. The RAM uses 11.
* **Driver latency.** The driver takes 129 cycles rather than 128, because of its input buffer.
* **Parts not built.** The Nios II processor, the JTAG UART and the system-ID peripheral are vendor
  parts. They are not modelled. The GPIO/SRAM-controller arrangement from the generic system picture
  is not built either.

Verification:

* Every engine result in every testbench is compared with a behavioural reference written
  separately (`tb/xtea_ref_pkg.sv`).
* The reference itself is checked against the published vector: key 000102…0F, plaintext
  4142434445464748, ciphertext 497DF3D072612CB5.
* Decryption is checked by round trips.
* Cycle counts are checked exactly: 128 for the engine, 129 for the driver, 131 for the
  accelerator's start-to-done as seen on the bus.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With Verilator 5, from
the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_xtea_soc_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/xtea_pkg.sv rtl/soc_map_pkg.sv tb/xtea_ref_pkg.sv \
  tb/tb_xtea_soc_top.sv
./obj_dir/Vtb_xtea_soc_top
```

To run another testbench, swap in its name. The packages must be listed first.

| testbench | what it exercises |
|-----------|-------------------|
| `tb_xtea_round_half` | half-round arithmetic, random and corner values |
| `tb_xtea_engine` | known-answer vector, random encrypt/decrypt, 128-cycle latency, start ignored while busy |
| `tb_xtea_driver` | 16 engines in parallel, 129-cycle latency, input buffering |
| `tb_xtea_avalon` | register map, byte enables, STATUS timing, 16-engine runs both ways, software reset |
| `tb_onchip_ram` | 8 KB RAM with byte enables against a shadow copy |
| `tb_perf_counter` | global and section counts, entries, clear |
| `tb_avalon_interconnect` | address decoding of every window edge, unmapped accesses |
| `tb_reset_sync` | asynchronous assertion, two-edge release |
| `tb_xtea_soc_top` | whole system at default size: 64 blocks through RAM and 16 engines both ways, timed with the performance counter; Full-Hardware runs; START while busy; engine reset; JTAG output; unmapped read |
| `tb_workload_replication` | systems with 1, 2, 4, 8 and 16 engines: Co-Design and Full-Hardware cycle counts and throughput; arrays of 1 to 8192 blocks streamed through one engine at a constant 142 cycles per block |

The number of engines is the `NREP` parameter of `xtea_soc_top`, `xtea_driver` and `xtea_avalon`. The
accelerator's 8-bit word address space holds engine windows for up to 32 engines. For more, raise
`ADDR_W` there and the XTEA window size in `soc_map_pkg`.

The RAM holds 8192 bytes. An array of blocks stored in it must share that space with the program, so
arrays of thousands of blocks must be produced and consumed on the fly, as the workload testbench
does.
