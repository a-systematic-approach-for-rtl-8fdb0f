# Multi-port and heterogeneous register files from FPGA block RAMs

An FPGA block RAM has one read port and one write port. A wide VLIW core or a
group of processing elements needs many more ports than that, on one shared
set of registers. Building such a file from flip-flops and LUTs does not
scale: the port multiplexers quickly dominate area and clock rate. This RTL
builds many-ported register files out of simple dual-port RAMs with three
techniques:

* **Banking** adds write ports. The address space is split into banks, and each
  write port owns one bank.
* **Replication** adds read ports. Every bank keeps one identical RAM copy per
  read port.
* **Shift-register multi-pumping** adds ports in time. The register file runs
  N times faster than its user. Each physical port is time-shared N ways
  through a parallel-in/serial-out (PISO) shift register on its inputs and a
  serial-in/parallel-out (SIPO) shift register on its read output. The shift
  registers need only two-input multiplexers, so the fast clock does not slow
  down as N grows. A multiplexer/demultiplexer time-share would slow it down.

There are two designs, both in `rtl/`:

1. **`sr_mpompu_rf`, the emulated multi-port register file.** It is
   homogeneous: one word width and one address space. Its default is 64 bits
   x 512 words, with a 3-read/2-write base pumped 6 times. That gives
   **18 read and 12 write ports** per user clock cycle, from 6 RAM copies.
2. **`hrf`, the heterogeneous register file.** It is shared by processing
   elements (PEs) that differ in clock rate, word width, register count,
   number of ports and endianness. Each physical port has its own pumping
   factor.

`rf_top` instantiates both side by side. They share no signals.

## Multi-pumping: the timing contract

This is the part a user must get right. The terms used here:

* The **register-file clock** `clk` is the fast clock.
* A **user** is a processor or PE whose clock period is exactly N
  register-file cycles, phase-aligned with `clk`. In an FPGA, a clock manager
  derives both clocks from one source. That clock manager is not part of this
  RTL.
* A **window** is one user clock period.

The user's clock edge is represented inside the register-file domain by the
load strobe (`ld`, `load_r[p]`, `load_w[p]`). The strobe is high for the
first register-file cycle of every window.

```
register-file cycle   |  0  |  1  |  2  | ... | N-1 |  0  | ...
ld                    |‾‾‾‾‾|_____|_____|_____|_____|‾‾‾‾‾|
lane served           |  0  |  1  |  2  | ... | N-1 |  0 (next window)
read data valid       |                       |all N|
                                                    ^ user clock edge:
                                                      samples all N reads and
                                                      presents the next N requests
```

* In cycle 0 the user presents N lanes of requests: addresses, write data and
  write enables. Lane 0 goes straight through the PISO's output multiplexer to
  the RAM. Lanes 1..N-1 are captured in the PISO registers.
* In cycle k, lane k is applied to the physical port. A write in lane k takes
  effect at the end of cycle k. A read in lane k returns its data in cycle k,
  and that data is shifted into the SIPO.
* In cycle N-1, all N read results are valid together. Lanes 0..N-2 come from
  the SIPO registers. Lane N-1 comes straight from the RAM output. The user
  samples them at its next clock edge, which ends the window. Read latency is
  therefore one user cycle.
* **Ordering within a window:** lanes run in order 0..N-1, and all physical
  ports work in parallel. A read in lane x sees every write from lanes below x
  of the same window, on any write port. It does not see writes from lane x or
  above. A read and a write of the same word in the same lane return the old
  value. No hazard logic exists, so the compiler or the user must allocate
  accordingly.
* The strobe must come exactly every N cycles once it has started. The user's
  clock does not stop, and an idle window simply has all enables low. An
  immediate assertion in each port checks this.
* With N = 1, a port is a plain wire to the base file, and the strobe is
  ignored.
* The PISO chain shifts in zeros behind the last lane, so it is empty between
  windows. A synchronous reset clears it, so random power-up contents cannot
  issue writes before the first load.

The RAMs read **asynchronously**: data comes out in the cycle its address is
applied. The schedule above depends on this. The last lane must come from the
RAM within the cycle, and each read value must reach the SIPO at the end of
its own cycle. Mapping onto synchronous-read block RAM would delay every read
lane by one cycle. That would change the contract: results would be valid one
register-file cycle into the next window. On FPGAs the asynchronous form maps
to LUT RAM.

## Banking and replication (`mpo_rf`)

With NW write ports, the top ceil(log2 NW) address bits select one of
2^ceil(log2 NW) equal slots. Banks 0..NW-2 take one slot each, and the last
bank takes the rest. For 512 words and three write ports, the banks are
0-127, 128-255 and 256-511, and read multiplexers decode `ADDR[8:7]`. Bank j
is written by write port NW-1-j. Write addresses are global, but a port can
only write its own bank. A write aimed elsewhere is dropped silently. Each
bank holds NR copies, and read port r reads copy r of the bank that its
address selects.

The emulated file `sr_mpompu_rf` is this base with `mpu_read_port` on every
read port and `mpu_write_port` on every write port, all sharing one `ld`.
Emulated port (j, x) is lane x of physical port j. Changing `NR`, `NW` and
`MPUF` trades RAM copies against user clock rate. For example, 18R&12W can be
built as 9R&6W x2 (54 copies), 6R&4W x3 (24) or 3R&2W x6 (6).

## The heterogeneous register file (`hrf_base`, `hrf`)

**Address spaces.** Every PE that writes owns a bank. A bank is its local
address space, with its own width `BANK_W[i]` and a power-of-two height
`BANK_H[i]`. Banks are stacked into one global space of `HT = sum(BANK_H)`
words, and bank i starts at the sum of the heights before it. A write port
addresses only its own bank, using a local address of log2(`BANK_H[i]`) bits,
so no PE can overwrite another's registers. A read port addresses the whole
global space with ceil(log2 HT) bits, so any PE can read any PE's results. A
read-only PE owns no bank. Reads at or above `HT` return zero.

**Word widths.** Read data is as wide as the widest bank (`DW`). A word from
a narrower bank is sign-extended on the way out by repeating its top bit. A
narrower PE uses the low bits of the read bus. A write port uses the low
`BANK_W[i]` bits of its `DW`-wide data bus.

**Endianness.** Data is stored little-endian. Each read and write port has a
fixed connection scheme, set by `R_ENDIAN` / `W_ENDIAN` (see `endian_map`):

| value | wiring |
|---|---|
| `ENDIAN_LITTLE` | straight |
| `ENDIAN_BIG_BIT` | whole bus bit-reversed |
| `ENDIAN_BIG_BYTE` | byte order reversed, bits within bytes kept |

On a write port the reordering covers the bank's width. On a read port it
covers the full `DW`-bit word, after sign extension. The reordering is pure
wiring.

**Bank selection.** Each read port compares its global address with every
bank's range. When banks are stacked in decreasing size, this reduces to
decoding the upper address bits. It also stays correct for any stacking order.

**Pumping per port.** `R_MPUF[p]` and `W_MPUF[q]` set each physical port's
factor, and each port has its own load strobe. Port buses are `MAXF` lanes
wide, where `MAXF` is the largest factor. Lanes at or above a port's factor
are ignored, and read as zero. A PE that uses several physical ports must give
them all the same factor, equal to its clock ratio.

**Default configuration:** four PEs, one register-file clock `CLKRF`.

| PE | clock | ports | factor | bank |
|---|---|---|---|---|
| PE0 | CLKRF/3 | read port 0 (3 reads) | 3 | none (read only) |
| PE1 | CLKRF/2 | read port 1, write port 0 (2 reads, 2 writes) | 2 | bank 0: 64 x 32 bit, global 0-63 |
| PE2 | CLKRF | read port 2, write port 1 | 1 | bank 1: 64 x 8 bit, global 64-127 |
| PE3 | CLKRF/4 | read port 3 (4 reads) | 4 | none (read only) |

This gives `DW` = 32, a 7-bit read address, 6-bit write addresses and
`MAXF` = 4.

## Files

| file | contents |
|---|---|
| `rtl/rf_pkg.sv` | endianness enum, parameter-array helpers (bank bases, maxima, log2) |
| `rtl/sdp_ram.sv` | 1W/1R RAM: synchronous write, asynchronous read |
| `rtl/piso_sr.sv`, `rtl/sipo_sr.sv` | the two shift registers |
| `rtl/mpu_read_port.sv`, `rtl/mpu_write_port.sv` | one pumped physical port, with the load-period assertion |
| `rtl/mpo_rf.sv` | banked and replicated base file |
| `rtl/sr_mpompu_rf.sv` | emulated multi-port register file |
| `rtl/endian_map.sv` | bit or byte reordering |
| `rtl/hrf_base.sv` | heterogeneous base file |
| `rtl/hrf.sv` | heterogeneous file with per-port pumping |
| `rtl/rf_top.sv` | both files side by side |

Heterogeneous parameters are unpacked arrays of length `rf_pkg::MAX_PORTS`
(16), so they are set with keyed patterns, for example
`.BANK_W('{0: 32, 1: 8, default: 0})`.

## Changing the configuration

`rf_top` exposes every parameter of both files with an `ERF_` or `HRF_`
prefix.

* **Emulated file.** `W`, `DEPTH`, `NR`, `NW` and `MPUF` can be set freely.
  Port counts are `NR*MPUF` reads and `NW*MPUF` writes. `DEPTH` need not be a
  power of two, but the partition assumes `DEPTH` is at least
  2^ceil(log2 NW).
* **Heterogeneous file.** Set `NB` banks with `BANK_W` and `BANK_H` (heights
  must be powers of two, and elaboration stops otherwise). Set `NR` read ports
  with `R_MPUF`. Give one `W_MPUF` entry per bank, and endianness per port.
  Every array needs at most 16 entries. `DW`, the address widths and `MAXF`
  follow automatically.
* **Byte endianness** needs the affected width to be a multiple of 8.

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and a watchdog ends a run that hangs. With
Verilator 5:

```
verilator --binary --timing --assert rtl/*.sv tb/tb_hrf.sv --top-module tb_hrf
./obj_dir/Vtb_hrf
```

For `tb_erf_workloads`, also add `tb/erf_env.sv`. Testbenches that check the
RAM contents fill every word first, so they do not depend on initial memory
contents.

| testbench | what it establishes |
|---|---|
| `tb_sdp_ram`, `tb_piso_sr`, `tb_sipo_sr`, `tb_endian_map` | the primitives, against independently computed values |
| `tb_mpu_read_port`, `tb_mpu_write_port` | the lane k -> cycle k schedule, data valid in cycle N-1, no writes before the first load |
| `tb_mpo_rf` | the 128/128/256 partition with three write ports, port-to-bank ownership, dropped out-of-bank writes |
| `tb_sr_mpompu_rf` | 2R&2W x3: lane-ordered read-after-write within a window, window length |
| `tb_hrf_base` | unaligned banks of 16, 8 and 12 bits, sign extension, out-of-range reads, bit- and byte-reversed ports |
| `tb_hrf` | default configuration: overlapping windows of length 3, 2, 1 and 4 against a cycle-level model |
| `tb_rf_top` | both files at once on separate clocks, with big-endian HRF ports; counts every mechanism and fails if one never occurs |
| `tb_rf_top_full` | the same, with every parameter of `rf_top` at its default |
| `tb_erf_workloads` | nine evaluated configurations: 32 x 64 with 12R&6W (three splits), 64 x 512 with 18R&12W (three splits), 64 x 512 with 32R&24W (two splits), 32 x 512 with 8R&4W from 2R&1W x4 |

All of them run in well under a second.

## Where this RTL goes beyond, or departs from, the published architecture

* **Asynchronous RAM read.** This keeps the described pumping schedule exact;
  see the timing section above. Moving to synchronous block RAM would shift
  every read result by one fast cycle.
* **Shift-register details.** The PISO clears its last-lane register when
  not loading, and its reset is an addition. The original drawing shows that
  register without an input multiplexer.
* **Load-period assertion.** Writing the user clock as a strobe that must
  recur every N cycles is a modelling choice of this RTL.
* **Bank and port rules.** Port NW-1-j writes bank j, and out-of-bank writes
  are dropped. These follow the published figure, where each write port is
  wired to one bank. The accompanying text could also be read as steering
  each write to whatever bank its address selects. Write-conflict handling
  (renaming, live-value tables) is left to software, as intended.
* **Bank sizes.** Each RAM copy is sized to its bank, not to a full 512-word
  block RAM.
* **Heterogeneous file choices.** The following are choices of this RTL:
  * range-compare bank selection, which also allows unaligned stacking;
  * zero for out-of-range reads;
  * the byte-swap form of byte endianness;
  * read-side reordering over the full width;
  * zero on unused lanes.
* **Default sizes.** The widths and heights of the default HRF come from a
  three-PE evaluation system: 64 x 32-bit and 64 x 8-bit, 128 words in all.
  The port arrangement comes from a four-PE overview. Neither source gives
  endianness, so all ports default to little-endian.
* **Not included.** The following are outside this RTL:
  * the clock manager (DCM/PLL) and the processing elements themselves;
  * the multiplexer-based multi-pumping, live-value-table and flip-flop
    register files, which serve only as comparison baselines;
  * the fitted frequency and block-RAM-count models used for high-level
    synthesis, and the generator and synthesis scripts;
  * the variant with a register on every external port, which exists only
    for timing measurement. It would add one user cycle of latency on each
    side.
