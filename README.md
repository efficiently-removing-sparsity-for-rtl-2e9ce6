# Parallel round-robin arbiter: removing sparsity from a wide stream

A wide datapath carries a batch of **P** elements every cycle. Each element is
either valid or empty, and downstream logic wants only the valid ones, packed
tightly, with none lost and none reordered. The **parallel round-robin
arbiter (PRRA)** does this packing on the fly. It takes one batch per cycle
and never pushes back on the producer. It writes the valid elements of each
batch, in their input order, to consecutive output lanes. It starts at the
lane after the one the previous batch ended on, and wraps from lane P-1 to
lane 0. Read across successive output batches, the output lanes then fill in
strict round-robin order. A consumer that keeps one buffer or memory bank per
lane therefore receives a dense, ordered stream: lane 0 gets elements 0, P,
2P, …, lane 1 gets 1, P+1, …, and so on.

As a behavioural definition, with a running offset `o` that starts at 0:

```
j = 0
for i in 0 .. P-1:
    if in[i].valid:  out[(o + j) mod P] = in[i];  j = j + 1
all other out lanes are invalid
o = (o + j) mod P
```

Example, P = 4: the offset is 1 and the batch holds valid `a`, invalid,
valid `b`, valid `c`. Then `a` goes to lane 1, `b` to lane 2 and `c` to lane
3, lane 0 stays empty, and the next batch starts at lane 0.

The implementation needs only **P/2 · log2 P two-by-two switches**, the minimum
for a network in which every input can reach every output. A sorting-network
implementation needs far more.

## How it works

The arbiter is two pipelines in a row:

```
 (valid_i, data_i) --> rolling prefix scan --> (valid_i, index_i, data_i) --> reverse butterfly --> (valid_j, data_j)
                       log2 P + 1 stages        lanes not yet moved           log2 P stages
```

### Destination indices: the rolling prefix scan

An element's destination lane is the offset plus the number of valid
elements before it in the batch, modulo P. The scan computes this for all
lanes at once:

* **Stages 0 … log2 P − 1** form a Kogge-Stone prefix sum over the valid bits.
  At stage k, lane i adds the running value of lane i − 2^k. After the last of
  these stages, lane i holds the number of valid lanes from 0 to i,
  inclusive.
* **The final stage is stateful.** It adds a *last offset* register to every
  lane, then loads that register with the new value of lane P − 1. The
  register holds "all valid elements seen so far, minus one", modulo P. Reset
  sets it to P − 1, which is −1 modulo P. The inclusive count plus this
  register equals the offset plus the exclusive count, so a valid element's
  value is exactly its destination lane.

All counts are log2 P bits wide: only the value modulo P matters. Lanes are
not moved in the scan. Data and valid bits ride alongside the counts.

### Routing: the reverse butterfly

The network has log2 P stages of P/2 switches:

* Stage `l` pairs the lanes that differ only in bit `l` of their lane number
  (the *upper* lane has the bit clear). Stage 0 pairs neighbours; the last
  stage pairs lane i with lane i + P/2.
* Each switch steers by bit `l` of the destination indices of its two inputs
  A (upper) and B (lower). It swaps them when

  ```
  C = (A.valid & A.index[l]) | (B.valid & ~B.index[l])
  ```

  So a valid element that needs bit `l` = 1 moves to the lower lane, and one
  that needs 0 moves to the upper lane. An invalid element never decides
  anything; it takes whichever output is left.
* After stage `l`, every valid element sits on a lane whose low `l`+1 bits
  already match its destination. After the last stage it has arrived.

**Why two valid elements never collide.** A switch would fail if both of its
inputs were valid and wanted the same output. The arbiter's target patterns
are special. The valid elements keep their order and land on a contiguous,
wrapping run of lanes; the invalid ones do not matter. Every such target
order is a rotation of a bitonic sequence. A butterfly routes bitonic
sequences, so its mirror image, the reverse butterfly, can produce them
without blocking. The network does not *rely* on this silently:
`reverse_butterfly` asserts at every clock edge that no switch has a
conflict. No simulation has triggered it, for any size from P = 2 to P = 256.

A tempting variant of the swap rule drops the negation on B's bit. That
variant cannot send a valid B to the upper lane, and one of the fault tests
(below) shows that it routes incorrectly.

### Pipelining and the parameter S

The arbiter has `2·log2 P + 1` combinational stages. Global stage numbers are
0 … log2 P − 1 for the scan, log2 P for the stateful stage, and log2 P + 1 …
2·log2 P for the butterfly. Parameter `S` chooses which stages end in a
register: stage k is registered when `(k + 1) mod S == 0`. The stateful stage
is always registered because it holds the offset. The rule lives in
`prra_pkg::stage_reg`, and `prra_pkg::prra_latency` counts the result.

| P   | S = 1 | S = 2 | S = 4 | S = 8 | S = 16 |
|-----|-------|-------|-------|-------|--------|
| 2   | 3     | 1     | 1     | 1     | 1      |
| 4   | 5     | 3     | 1     | 1     | 1      |
| 8   | 7     | 3     | 1     | 1     | 1      |
| 16  | 9     | 5     | 3     | 2     | 1      |
| 32  | 11    | 5     | 3     | 2     | 1      |
| 64  | 13    | 7     | 4     | 2     | 1      |
| 128 | 15    | 7     | 3     | 1     | 1      |
| 256 | 17    | 9     | 5     | 3     | 2      |

The table gives the latency in cycles. With `S = 1` the arbiter is fully
pipelined. With a large S only the offset register remains, and a batch needs
one cycle. Throughput is one batch per cycle in every case.

## Modules

| File | Module | Role |
|------|--------|------|
| `rtl/prra_pkg.sv` | package | stage-register rule, latency, AXI register map |
| `rtl/swap_switch.sv` | `swap_switch` | 2×2 switch with the swap rule; flags conflicts |
| `rtl/rolling_prefix_scan.sv` | `rolling_prefix_scan` | destination index per lane |
| `rtl/reverse_butterfly.sv` | `reverse_butterfly` | log2 P switch stages |
| `rtl/prra.sv` | `prra` | the arbiter: scan followed by network |
| `rtl/prra_axi.sv` | `prra_axi` | top: AXI4-Lite peripheral around `prra` for bring-up on an FPGA |

### `prra` interface

Parameters: `P` (lanes, a power of two ≥ 2, default 8), `DATA_W` (element
width, default 64) and `S` (register placement, default 1).

| Port | Dir | Width | |
|------|-----|-------|-|
| `clk`, `rst_n` | in | 1 | clock; synchronous, active-low reset |
| `in_stb` | in | 1 | a batch is present this cycle |
| `in_valid` | in | P | valid bit per lane |
| `in_data` | in | P × DATA_W | element per lane |
| `out_stb` | out | 1 | the batch that entered LATENCY cycles ago |
| `out_valid` | out | P | valid bit per output lane |
| `out_data` | out | P × DATA_W | packed, rotated elements; don't-care where invalid |

There is no ready signal: the arbiter accepts every cycle. A cycle without
`in_stb` is treated as a batch with no valid elements and leaves the offset
unchanged. For a continuous stream, tie `in_stb` high. Reset clears the
pipeline's valid bits and sets the offset to lane 0. Data registers have no
reset.

### `prra_axi` register map

`prra_axi` is a debug and measurement wrapper. A host writes one input batch
into registers and releases it. The batch enters the arbiter for exactly one
cycle, and the output batch is captured into registers for the host to read.
The arbiter keeps its offset between releases, so a series of releases
behaves like a slow stream. The bus is AXI4-Lite with 32-bit data and 16-bit
byte addresses. There is one write and one read in flight, and WSTRB is
honoured.

| Address | Access | Content |
|---------|--------|---------|
| `0x0000` CTRL | W | bit 0: release the input batch; bit 1: clear DONE and BATCHES |
| `0x0000` CTRL | R | bit 0: BUSY; bit 1: DONE |
| `0x0004` BATCHES | R | output batches captured since reset or clear |
| `0x0008` INFO | R | `{8'b0, LATENCY[7:0], DATA_W[15:0]}` |
| `0x000C` LANES | R | P |
| `0x1000 + 4w` | RW | input valid bits of lanes 32w … 32w+31 |
| `0x2000 + 4w` | R | output valid bits |
| `0x4000 + 4(n·NDW + w)` | RW | input data of lane n, bits 32w … 32w+31 |
| `0x8000 + 4(n·NDW + w)` | R | output data of lane n |

Here `NDW = ceil(DATA_W / 32)`. Any other address returns SLVERR, and so does
a write to a read-only register. DONE rises LATENCY + 2 cycles after the
write handshake that releases a batch.

## Verification

Every testbench checks itself against a model written independently of the
RTL. It ends by printing `TB_RESULT checks=N failures=M`, and it has a
watchdog.

| Testbench | What it covers |
|-----------|----------------|
| `tb_swap_switch` | every input combination, 3-bit index, at each steering bit |
| `tb_rolling_prefix_scan` | indices, pass-through and latency for S = 1 and S = 16 |
| `tb_reverse_butterfly` | random offsets and masks, and full rotations, for P = 8 and P = 32 |
| `tb_prra` (uses `prra_harness`) | random streams against the behavioural model for four configurations; exact latency; requires wrapping, full, empty and idle cycles |
| `tb_prra_workloads` | every P = 2 … 64 with every S = 1, 2, 4, 8, 16; 64-bit data |
| `tb_prra_wide` | P = 128 and 256 with S = 1 and 16; 64-bit data |
| `tb_prra_axi` | the top at default parameters, end to end over AXI (see below) |

`tb_prra_axi` drives 200 batches through the bus, compares every result, and
counts how often each mechanism happened. The run fails if any count is
zero. The mechanisms are:

* wrapping, full and empty batches;
* back-to-back releases;
* a partial write strobe;
* stalled B and R responses;
* address and data sent in separate cycles;
* SLVERR and clear;
* exact latency probes through the bus.

Each module also has a deliberately broken variant, and the matching
testbench fails on it:

* the swap rule without the negation;
* the offset reset to 0;
* switch data inputs crossed;
* the network fed undelayed data;
* one extra cycle of release delay.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/prra_pkg.sv tb/tb_prra.sv --top-module tb_prra
./obj_dir/Vtb_prra
```

Replace `tb_prra` with any testbench name. The package must come first. The
two sweeps compile into large models: expect about 2 minutes of C++ build for
`tb_prra_workloads` and about 4 minutes for `tb_prra_wide`. The others build
in seconds.

## Design choices and limits

This RTL follows the published architecture in these points:

* the two-part structure;
* the Kogge-Stone scan with a stateful last stage, reset to P − 1;
* the stage wiring of the reverse butterfly;
* the LSB-first steering and the swap rule;
* the element width of 64 bits;
* the set of sizes and register placements.

Its own choices are:

* **Register placement rule.** The exact mapping from S to registered stages
  is this design's reading of "S = 2 skips every other register". It
  reproduces the 5-stage depth quoted for P = 4 when fully pipelined, and
  leaves a single register level when S is large.
* **`in_stb`/`out_stb`.** These sideband strobes are an addition, so that a
  user can tell which output cycles carry a batch.
* **Reset.** The reset is synchronous and active low. Reset values other than
  the offset are chosen here.
* **Default size.** The default of P = 8 is the size of the published network
  diagrams. The evaluation covers every power of two from 2 to 256, all
  available through the parameter.
* **The AXI wrapper.** Only its purpose is given by the original design: load
  a vector, release it, read the result. Its register map, the AXI4-Lite
  protocol and the width are invented here.

Not included:

* the sorting-network arbiter (odd-even sorter, popcount and barrel shifter)
  that the reverse-butterfly design is compared against;
* an HLS version;
* any FPGA platform logic. The host and interconnect connect to
  `prra_axi`'s AXI ports.

Each module has been linted with Verilator (`-Wall`) and elaborated with the
slang front end of Yosys.
