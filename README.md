# Secure DRAM/NVMM emulation memory path

Non-volatile main memory (NVMM) is slower than DRAM. It also keeps its contents
after power is removed, so whatever is stored on it can be read or tampered with
later. This RTL is the memory side of an FPGA platform that emulates such a
system on ordinary DRAM. It does two things:

* **Latency injection.** Requests that fall in a configurable "NVMM" address
  range are slowed down, with any of three models.
* **Memory protection.** Requests that fall in a protected range go through a
  Memory Protection Engine (MPE). The MPE encrypts each 64-byte cacheline in
  counter mode and checks it against an SGX-style integrity tree, so data taken
  off the DIMM cannot be read, and altered data is flagged.

Everything runs in one 200-MHz memory clock domain, so one clock is 5 ns. All
latencies are set in clocks through memory-mapped registers.

```
 LLC port ──► MPE ──► bus delay injector ──► memory controller ──► DDR command port
 (llc_*)      │  Frontend (roots, locks)       (coarse-grain /       (bank machines with   (ddr_*, to a PHY)
              │  8 × Tree (AES, CWMAC, MEM)      DCPMM delay)          extra tRCD/tRP/tRAS)
              │  Backend (1 outstanding)
              ◄──────────────────── responses ◄────────────────────────┘
 MMIO (mmio_*) ─► nvmm_csr: NVMM range, mode, latencies, MPE keys, counters
```

The top module is `nvmm_sim_top`. The CPUs, the last-level cache, the SoC
interconnect, the DDR3 PHY and the DIMM are not part of it. Their sides are
brought out as plain ports:

* `llc_*`: cacheline requests and responses. Each carries an id, and responses
  may come back out of order.
* `ddr_*`: one ACT/RD/WR/PRE command per clock goes out. Read data comes back
  in the order the RD commands were issued.

## The integrity tree

The protected region starts at `PROT_BASE` (default `0xC000_0000`). It holds
384 independent trees. Each tree covers 4096 cachelines (256 KiB), so the
region is 96 MiB of data in all. A tree has four levels of 64-byte nodes:

* **Level 2, level 1 and level 0 nodes** each hold eight 56-bit counters and a
  56-bit MAC. Each counter is the version of one child node.
* **Meta nodes** hold the eight counters of eight cachelines.
* **PD_Tag lines** hold the 56-bit MACs of eight ciphertext cachelines.

Only the 384 roots, one 56-bit counter each, are kept on chip, in the Frontend.

Metadata follows the data region level by level, in this order: L2 nodes, L1,
L0, Meta, then PD_Tag. Node `k` of a level lives at:

    PROT_BASE + 96 MiB + 64 * (level_offset + k)

The level offsets are 0, 384, 9·384, 73·384 and 585·384. That makes 1097 lines
per tree, about 26 MiB in total, which fits in a 32-MiB metadata region.
`mpe_pkg::node_addr` holds the formula.

**MAC of a node.** A Carter-Wegman MAC built by `cwmac`:

1. Hash the message in GF(2^64) with key `K_P`. The hash is a polynomial over
   the message words, reduced by x^64+x^4+x^3+x+1, one word per clock.
2. XOR the hash with `AES_KM(tweak)`.
3. Keep the low 56 bits.

The node message is its seven counter words, the parent's counter and the node
address. The cacheline message is its eight ciphertext words, its counter and
its address.

**Encryption pad.** The pad for block `j` of a line is
`AES_KE({address, counter, 6'b0, j})`. The four blocks are computed by four
AES-128 cores in parallel (`aes_otp`).

### What a Tree does per request (`mpe_tree`)

1. Load the L2, L1, L0 and Meta nodes, the cacheline and its PD_Tag.
   A MAC check starts as soon as each item arrives. The pad starts once the
   Meta node, which holds the line's counter, is in.
2. Compare every MAC with the one stored in the node (the root for L2).
   * For a read, the response goes out right away: plaintext, or
     `corrupt = 1` if any MAC differs.
3. For a write, in the same clock:
   * increment the root and one counter per level;
   * encrypt the new data with the new counter.
4. Store the line, PD_Tag, Meta, L0, L1 and L2. The MAC needed by each store is
   computed while the previous store is under way.
5. Send the write response.

With memory that answers loads in 18 clocks and stores in 12, a read takes 109
clocks and a write takes 182. `tb_mpe_tree` checks both numbers exactly.

A write whose path fails verification is refused. It returns `corrupt` and
changes nothing.

### Sharing eight Trees among 384 roots (`mpe_frontend`, `mpe_backend`)

The Frontend handles requests in order:

* **Unprotected address:** the request goes straight to the Backend (bypass).
* **Protected address:**
  1. Derive the root from the address.
  2. If that root is locked, stall.
  3. Otherwise, if no Tree is idle, stall.
  4. Otherwise, lock the root and hand the lowest idle Tree the request
     together with the root's counter.
  5. When that Tree responds, write its updated root counter back and unlock
     the root.

Responses from the Trees and the bypass are returned round-robin.

The Backend is a round-robin arbiter with exactly one request in flight to the
memory controller. Tree memory traffic is therefore serialised. With eight
Trees busy, the memory port stays fully used.

Keys are written as ten 32-bit words: `K_E` is words 0–3, `K_P` words 4–5 and
`K_M` words 6–9. Root counters reset to 0, so a memory image built with the
matching keys and all-zero counters verifies from the start. The testbench
memories generate that image on the fly; `sit_ref_pkg::ref_init_line` holds the
formula.

## Latency injection

Injection applies only to addresses in `[nvmm_base, nvmm_limit)`.

**Coarse-grain (`bus_delay_injector`, mode 1).** Reads and writes each have a
one-entry channel. An NVMM request sits in its channel for `rd_delay` or
`wr_delay` clocks before it reaches the controller. While it sits there, the
next request in the same direction waits. This models the lost bandwidth of a
bus that holds one request at a time. A DRAM request passes in one clock.

**DCPMM (`dcpmm_boundary`, mode 2).** Every NVMM request pays the base delay.
A request whose 256-byte block differs from that of the previous request in the
same direction also pays `*_add256`. One whose 4-KiB page differs pays
`*_add4k` instead. The first request after reset counts as a 4-KiB crossing.

**Fine-grain and extended fine-grain (`bank_machine`, any mode).** The per-bank
state machine enforces DDR3 timing with down-counters. The defaults are
DDR3-1600 values rounded up to 5-ns clocks:

| Parameter | Clocks |
|-----------|-------:|
| tRCD      | 3      |
| tRP       | 3      |
| tRAS      | 7      |
| tRTP      | 2      |
| tWR       | 3      |

On top of these, three extra delays apply:

* An ACTIVATE to an NVMM row adds `add_trcd`.
* The row is held open for `add_tras` more clocks. Because PRECHARGE waits
  until tRAS, tRTP and tWR have all expired, this gives the
  max(tRTP, rest of tRAS) rule.
* A PRECHARGE of an NVMM row that was written (dirty) adds `add_trp`. Clean
  rows pay only the standard tRP.

A bank precharges as soon as it has no request, or when the next request is for
another row.

**Memory controller (`nvmm_mc`).** The address map is bank = offset[31:29],
row = [28:13] and column = [12:6] from `0x8000_0000`. The controller has one
request slot per bank, a round-robin command arbiter issuing one command per
clock, and separate read and write response queues with reserved space.

## Registers (`nvmm_csr`, 32-bit words)

| Word  | Register                         | Notes |
|-------|----------------------------------|-------|
| 0     | NVMM base, 4-KiB page number     | |
| 1     | NVMM limit, 4-KiB page number    | Exclusive |
| 2     | Mode                             | 0 = off, 1 = coarse-grain, 2 = DCPMM |
| 3–4   | Read / write delay               | Coarse delay, or DCPMM base |
| 5–6   | Read extra: 256 B / 4 KiB        | DCPMM |
| 7–8   | Write extra: 256 B / 4 KiB       | DCPMM |
| 9–11  | Extra tRCD / tRP / tRAS          | |
| 16–25 | MPE key words                    | Write-only |
| 32–45 | Counters                         | Read-only |

Latencies use the low 16 bits and are counted in clocks. A setting of 8 µs is
1600 clocks.

The counters at words 32–45, in order:

| Word | Counter |
|-----:|---------|
| 32 | Lock stalls |
| 33 | Tree stalls |
| 34 | Corrupt responses |
| 35 | ACT |
| 36 | ACT to NVMM rows |
| 37 | RD |
| 38 | WR |
| 39 | Row hits |
| 40 | Clocks a precharge was held by extra tRAS |
| 41 | Dirty-row extra tRP |
| 42 | Delayed bus requests |
| 43 | Bus stall clocks |
| 44 | 256-B crossings |
| 45 | 4-KiB crossings |

Reset clears all registers: no NVMM range, injection off.

## Where this departs from, or goes beyond, the platform it models

* The document describes a write response both as leaving "after the update
  XOR" and as taking 182 clocks. Here it is sent after the stores, which gives
  the 182 clocks.
* DCPMM: an access that stays inside the current 256-byte block still pays the
  base latency. This follows the published latency settings ("base" plus
  "additional"). One example in the text instead suggests that only the
  crossing request is delayed.
* Node formats, MAC message layout, tweaks, the AES counter-block format, the
  metadata layout and the GF(2^64) hash are this design's choices, in the style
  of SGX. The metadata layout has 1097 lines per tree; the source states 1096
  nodes.
* Root counters are plain registers. The source keeps them in non-volatile
  on-chip storage.
* The Frontend serves requests strictly in order: a stalled request blocks those
  behind it.
* The bus delay module delays only the request; responses return undelayed. It
  adds one register stage.
* Not modelled: bus-level DDR3 rules (tCCD, tRRD, tFAW, tWTR), refresh, and the
  PHY. The 50-MHz CPU clock domain and the TileLink/AXI4 protocols are not
  modelled either.

## Files

* `rtl/`:
  * packages: `nvmm_pkg`, `mpe_pkg` (types, the node-address formula, GF and
    AES helper functions);
  * modules: one per file.
* `tb/`:
  * `tb_<module>.sv`: self-checking testbenches;
  * `ddr3_model.sv`: behavioural DDR3 model that flags every timing breach;
  * `line_mem_model.sv`: fixed-latency line memory;
  * `sit_ref_pkg.sv`: independent reference model of AES, the MAC, the pad and
    the initial memory image.

Some blocks have no testbench of their own:

* `mpe_frontend`, `mpe_backend` and `mpe_mem` are tested through `tb_mpe`.
* `bank_machine` is tested through `tb_nvmm_mc`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nvmm_sim_top \
    rtl/nvmm_pkg.sv rtl/mpe_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
    tb/sit_ref_pkg.sv tb/ddr3_model.sv tb/line_mem_model.sv tb/tb_nvmm_sim_top.sv
./obj_dir/Vtb_nvmm_sim_top
```

Any other testbench builds the same way with its own `--top-module`. Each
prints `TB_RESULT checks=N failures=M`.

`tb_nvmm_sim_top` runs the whole path at its default size: 8 Trees and 384
roots, with nothing scaled down. It checks:

* data, encryption and tamper detection;
* DDR3 timing;
* exact latency additions for coarse delay, DCPMM crossings and extra tRCD.

It also counts these mechanisms and fails if any of them never happens: lock
stalls, Tree stalls, bypass, corrupt responses, NVMM activates, row hits,
extra-tRAS holds, dirty-row tRP, bus delays, 256-B and 4-KiB crossings, and all
eight Trees busy at once. The bus-channel stall can never occur in the full
path, because the Backend keeps only one request in flight. It is checked in
`tb_bus_delay_injector` instead.

In the full path with the DDR3 model, an isolated protected read takes about
210 clocks. An unprotected one takes about 33.

`tb_micro_bench` runs a latency micro benchmark at the default size. It makes
64 dependent cacheline reads with a 64-byte stride in four cases: unprotected
and protected, each on DRAM and on NVMM. The NVMM cases use DCPMM timing: a
base of 200 clocks (1 µs), plus 400 or 500 clocks for reads that cross a
256-byte block or a 4-KiB page. It prints the average latency of each case.

One result is checked exactly. Unprotected NVMM reads must average
200 + (15·400 + 500)/64 clocks more than DRAM reads, because the first read of
the walk counts as a 4-KiB crossing and 15 more cross a 256-byte block.

The measured averages are 12, 79, 314 and 4279 clocks for DRAM unprotected,
DRAM protected, NVMM unprotected and NVMM protected. Protected NVMM reads are
slow because a Tree's six loads run one after another, and each pays the DCPMM
delay.
