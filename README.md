# LUT-based scan tester for a die in a 3D stack

An FPGA layer in a 3D chip stack can be reused as a scan tester for a
neighbouring die. Through-silicon vias give it far more connections to that
die than a package has pins, so it can feed many short scan chains in
parallel. That cuts the number of shift clocks and the toggling in the die.
This RTL is the tester. It stores a deterministic (ATPG) pattern set in the
FPGA's own small lookup tables, plays the patterns into the chains, compacts
the responses in a MISR and reports pass or fail.

The central idea is how the patterns are stored. Each chain gets one
LUT-sized **slice** of every pattern (32 bits on an FPGA with 5-input LUTs).
Many slices are identical, or become identical once their don't-care bits
are chosen, so a slice is stored **once** in a shared LUT pool. Each chain
gets a multiplexer over the few LUTs it needs. A small RAM then tells every
multiplexer, pattern by pattern, which input to take. The data stored is the
merged pool plus the select values, not the full pattern set.

## How a pattern set becomes LUT contents

The merge runs offline, before the FPGA is configured. Its results are the
three content parameters of `tester_top`:

| parameter  | shape                                   | meaning |
|------------|-----------------------------------------|---------|
| `LUT_INIT` | `[N_LUTS][LUT_DEPTH]`                   | the merged slices; bit `a` of LUT `i` is shifted out at LUT address `a` |
| `MUX_MAP`  | `[N_CHAINS][MUX_IN]` of LUT indices     | which LUT drives data input `k` of chain `c`'s mux |
| `SEL_INIT` | `[N_PATTERNS*N_SEGS][N_CHAINS]` of selects | which mux input chain `c` takes for pattern `p`, segment `s` (entry `p*N_SEGS+s`) |

Two merge strategies fit this hardware. Both visit the slices in chain
order and put each one into the first pool entry it can share.

* **Adjacent fill, then compress.** Every don't-care is first replaced by
  its neighbouring bit. This keeps shift toggling low. Only slices that are
  then bit-identical can share a LUT.
* **X-retaining merge (XRET).** Don't-cares are kept while merging. A slice
  may join a pool entry if no care bit conflicts; the entry then takes on
  the slice's care bits. Don't-cares left at the end get adjacent fill. This
  needs far fewer LUTs, at some cost in toggling, and it is the preferred
  strategy unless shift power matters most.

In both cases a chain's mux reuses an input already wired to the chosen LUT.
If there is none, the mux gets a new input. The slice's select value is that
input's index.

**The default contents** come from a small worked example: three 5-bit chains
and four patterns, merged with XRET.

| pattern | chain 1 | chain 2 | chain 3 |
|---------|---------|---------|---------|
| 1       | 01XX1   | 100X0   | XX1X1   |
| 2       | 1XX11   | 11XX1   | 110XX   |
| 3       | X0XX0   | 1X001   | 1X0XX   |
| 4       | XX11X   | 101XX   | X1XX1   |

The twelve slices fit into four LUTs: L0 = 01111, L1 = 10000, L2 = 10111 and
L3 = 11001 (leftmost bit = address 0, shifted first). The wiring is:

| chain | mux inputs (LUTs) | select values for patterns 1..4 |
|-------|-------------------|---------------------------------|
| 1     | L0, L2, L1        | 0, 1, 2, 0                      |
| 2     | L1, L3, L2        | 0, 1, 1, 2                      |
| 3     | L0, L3            | 0, 1, 1, 1                      |

Sixty pattern bits are stored as 20 LUT bits plus 24 select bits. Both
merges are also written as elaboration-time SystemVerilog functions, in
`tb/tester_workload_env.sv`. They build the three parameters for larger,
generated pattern sets.

## Datapath

```
 se_gen ──► lut_addr_gen ──addr──► lut_layer ──N_LUTS bits──► mux_layer ──► scan_reg ──► scan_in_o[N_CHAINS]
   │    └─► ram_addr_gen ──addr──► sel_ram ───selects─────────────┘
   │                                                    scan_out_i[N_CHAINS] ──► misr ──► sig_cmp ──► pass/done
   └── control word (scan enable, die reset, load, compact, check), delayed 2 clocks ──► scan_en_o, asic_rst_o
```

* `lut_addr_gen`: one counter gives the bit address for all LUTs at once.
* `lut_layer`: the LUT pool, read asynchronously, like FPGA LUTs.
* `ram_addr_gen` / `sel_ram`: the select-line memory. It has one entry per
  pattern and segment and a synchronous read, so it maps to block RAM or to
  distributed RAM plus a register.
* `mux_layer`: one mux per chain. A LUT may feed several muxes.
* `scan_reg`: the registered scan-data bus to the die.
* `misr`: the signature register. It has `N_CHAINS + 5` stages with XNOR
  feedback. Chain `k` is XORed into stage `k+1`. `TAPS` has bit `t-1` set
  for tap stage `t`.
* `sig_cmp`: compares the final signature bit by bit (XNOR, then AND) with
  `GOLDEN`.
* `se_gen`: the sequencer. It also drives scan enable and the die reset.

### Timing

All control comes from `se_gen` as one word per clock (`tester_pkg::scan_ctl_t`).
The word is delayed by two registers so that it stays in step with the data
path. The data path is: select-RAM read, then LUT read and mux, then the
scan register. As a result `scan_in_o`, `scan_en_o` and MISR compaction
always refer to the same clock. The die must present `scan_out_i` (its last
flip-flop of each chain) before the clock edge. The MISR samples it on every
edge where `scan_en_o` is high and a captured response is being unloaded.

With chain length `C = N_SEGS * LUT_DEPTH`, a test runs as follows:

1. Two pipeline clocks, then `ASIC_RST_CYCLES` clocks with `asic_rst_o`
   high.
2. For each pattern: `C` shift clocks with `scan_en_o` high, then one
   capture clock with it low. From the second pattern on, the shift also
   unloads the previous response into the MISR.
3. `C` unload-only shift clocks. The scan bus holds its last value during
   these.
4. One check clock. `test_done_o` rises on the next clock, and
   `test_pass_o` is valid from then until reset.

From the first shift clock to `test_done_o` takes `N_PATTERNS*(C+1) + C + 1`
clocks. The default example takes 30. For a 32-bit, 40-pattern, 6-chain set
it takes 1353.

### Chains longer than one LUT

If a chain is longer than a LUT, it is split into `N_SEGS` segments of
`LUT_DEPTH` bits. Segment 0 is shifted first. Each segment of each pattern
has its own select entry, and the RAM address steps at every LUT wrap. With
`N_SEGS = 1` the chain is exactly one LUT long, which is the efficient case.

## Parameters of `tester_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `N_CHAINS` | 3 | scan chains fed in parallel |
| `LUT_DEPTH` | 5 | bits per LUT slice (32 for 5-input LUTs) |
| `N_SEGS` | 1 | LUT slices per chain |
| `N_PATTERNS` | 4 | patterns applied |
| `N_LUTS` | 4 | size of the merged LUT pool |
| `MUX_IN` | 3 | inputs per chain mux; chains needing fewer repeat a LUT |
| `SEL_W`, `LUT_IDX_W` | derived | select and LUT-index widths |
| `LUT_INIT`, `MUX_MAP`, `SEL_INIT` | worked example | merge results, see above |
| `MISR_LEN` | `N_CHAINS + 5` | signature length |
| `MISR_TAPS` | taps 8,6,5,4 | XNOR feedback taps; must be replaced whenever `MISR_LEN` changes |
| `GOLDEN` | 0 | expected signature, a placeholder; it depends on the die under test |
| `ASIC_RST_CYCLES` | 2 | length of the die reset |

Tap sets for the benchmark-sized configurations, as stage numbers:
11 bits → 9,11; 19 → 1,2,6,19; 23 → 18,23; 34 → 1,2,27,34;
177 → 172,174,175,177.

Ports: `clk`, `rst` (synchronous, active high) and `scan_out_i[N_CHAINS]`
are inputs. `scan_en_o`, `asic_rst_o`, `scan_in_o[N_CHAINS]`, `test_done_o`
and `test_pass_o` are outputs.

## Where this design makes its own choices

* **Pass/fail handshake.** `test_done_o` marks when `test_pass_o` is
  valid. A test starts when `rst` is released; there is no start input.
* **Golden signature.** `GOLDEN` defaults to 0 because the right value
  depends on the die. For a real die, compute it by simulating the die with
  the applied patterns.
* **Mux size.** Every chain mux has `MUX_IN` inputs. A design sized to each
  chain's own mux would save some FPGA logic.
* **Shift/unload overlap.** The die reset length and the overlap of shift
  and unload are this design's choices.
* **No SerDes model.** The scan link is assumed to be a direct TSV
  connection with no serializer latency. A SerDes would add latency on both
  directions, and `scan_out_i` sampling would need a matching delay.
* **Short last chain.** If the last chain is shorter than `C`, pad its
  slices at the start (the bits shifted first fall out of the chain).
* **Select storage.** The select RAM always has a registered read port.
  This covers both mappings, distributed RAM or block RAM.
* **Not reproduced.** The FPGA resource and clock frequency results of the
  method are not reproduced here. Nor are its power and test-time
  comparisons with on-chip decompression.
* **Merge is not hardware.** The merge algorithms are offline steps. Their
  only SystemVerilog form is the elaboration-time copy in
  `tb/tester_workload_env.sv`, which covers both strategies.

## Files

`rtl/` holds one module or package per file: `tester_pkg`, `lut_addr_gen`,
`lut_layer`, `ram_addr_gen`, `sel_ram`, `mux_layer`, `scan_reg`, `misr`,
`sig_cmp`, `se_gen` and the top, `tester_top`.

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`) and
the following:

* `tb_tester_top.sv`: the worked example end to end against a behavioural
  die (`scan_die_model.sv`). It checks every shifted bit against the care
  bits of the table above and the signature against a software model. It
  also checks the clock counts, and that a fault-free die passes and a die
  with a stuck-at fault fails.
* `tb_tester_top_full.sv`: the same flow with every parameter at its
  default. The default golden value is a placeholder, so it checks that the
  verdict agrees with the model rather than that the test passes.
* `tb_tester_workloads.sv` with `tester_workload_env.sv`: generated pattern
  sets at the sizes of two benchmark circuits, merged at elaboration and
  checked end to end. The sizes are 6 chains × 40 patterns with an 11-bit
  MISR, and 14 chains × 120 patterns with a 19-bit MISR, all with 32-bit
  chains. A third set has 64-bit chains (two segments). The 6-chain set is
  merged both ways. XRET needs 40 LUTs and the scan inputs toggle 3287 times
  inside slices. Adjacent fill first needs 224 LUTs but toggles only 678
  times. The test checks that direction: adjacent fill never uses fewer LUTs
  and never toggles more. The generated sets are sparser in care bits than
  real ATPG sets, so XRET merges them into fewer LUTs than real sets would
  need.
* `tb_tester_benchmark_sizes.sv` with `tester_hash_env.sv`: the three
  largest benchmark sizes, each run end to end with 32-bit chains:

  | circuit | chains | patterns | LUTs | mux inputs | MISR | clocks |
  |---------|--------|----------|------|------------|------|--------|
  | Color   | 29     | 91       | 1182 | 91         | 34   | 3036   |
  | fm      | 18     | 365      | 2074 | 256        | 23   | 12078  |
  | fpu     | 172    | 254      | 1387 | 128        | 177  | 8415   |

  The LUT counts are the pool sizes that the real pattern sets merge to.
  The contents are hash-generated rather than merged, so any size can be
  elaborated quickly. Every shifted bit is checked against the stored
  contents, and the signature and test length are checked as well.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tester_pkg.sv \
    tb/tb_tester_top.sv --top-module tb_tester_top -Mdir obj -o sim
./obj/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Swap in
another `tb_*.sv` the same way. `tb_tester_workloads` and
`tb_tester_benchmark_sizes` each spend two to three minutes in elaboration. Their
contents are computed by constant functions at compile time; simulation
itself takes under a second.

To run the tester on your own pattern set, run the merge and pass its
`LUT_INIT`, `MUX_MAP` and `SEL_INIT` to `tester_top`. Set `N_CHAINS`,
`LUT_DEPTH`, `N_SEGS`, `N_PATTERNS`, `N_LUTS` and `MUX_IN` to match. Set
`MISR_TAPS` for the new `MISR_LEN`, and set `GOLDEN` from a simulation of
the die.
