# Reconfigurable shared scan-in (RSSA) test architecture

Scan test loads every flip-flop of a chip through shift registers (scan
chains). How long that takes, and how much data the tester has to store,
depends on the length of the longest chain. Splitting the flip-flops into many
short chains shortens the load, but a chip has few pins to feed them. The
usual answer is to **share** scan inputs: one pin broadcasts the same bits
into many chains at once. The catch is that chains sharing a pin must hold
identical data in every row. When a test needs a 0 in one chain and a 1 in
the same row of another chain on the same pin, that test cannot be applied.
The more chains share a pin, the more often this happens.

This design keeps the sharing but makes it **reconfigurable**. A small
multiplexer sits in front of every chain. One configuration-select signal,
common to all chains, switches the whole chip between several broadcast
patterns (*configurations*). Each configuration has a different grouping of
chains onto pins. A fault that cannot be tested in one grouping can be tested
in another. The select may stay fixed while a pattern loads (*static*), or it
may change between shift cycles (*dynamic*), so that each row of scan cells
uses whichever grouping can load it. The chain outputs are compacted into a
multiple-input signature register (MISR), and only the signature is compared.

```
 si[0..M_IN-1] ──┬──────────────┬──────── ... ──┐
                 │              │               │
            ┌────┴────┐    ┌────┴────┐     ┌────┴────┐
 cfg_sel ──►│chain_mux│    │chain_mux│ ... │chain_mux│   mapping_logic
            └────┬────┘    └────┬────┘     └────┬────┘
            scan chain 0   scan chain 1 ... wrapper chains (last N_WRAP)
                 │              │               │
                 └──────────────┴──── so ───────┴──► misr ──► signature
```

## Configurations and the mapping logic

This is the core of the design and the part to understand before changing
anything.

**What a configuration is.** A configuration assigns to every chain `n` one
scan input `idx`, and optionally an inversion `inv`. In that configuration,
chain `n` receives `si[idx] ^ inv` on every shift. The pair is a
`rssa_pkg::map_entry_t`.

**Prime-based configurations (the default).** Configuration `j` uses `M_j`
scan inputs. Chain `n` (counting from 0) is driven by input `n mod M_j`, so
every `M_j`-th chain shares a pin. The default set is `M = 2, 3, 5, 7`
(`CFG_M`, configuration 0 first), which needs 7 scan-input pins. The
configurations use prime numbers of inputs because two configurations with
`M_a` and `M_b` inputs force the same chains together only every `lcm(M_a,
M_b)` chains. Numbers with no common factor push that distance as far as it
goes for a given pin count. Chains that are next to each other usually share
logic cones, and so tend to need independent data. The "every M-th chain"
grouping keeps such neighbours on different pins.

**Table-driven configurations.** With `CUSTOM_TABLE = 1`, `CFG_TABLE[j][n]`
gives the entry of chain `n` in configuration `j`. Any grouping can be
supplied this way, including inverted connections. Typical sources are a
compatibility analysis that puts mutually compatible chains on the same pin,
often with only two pins. Producing such a table is a job for the test
generation flow, and no table of that kind is built in.

**Why one select is enough.** In the general form (`mapping_logic_full`),
every chain has a `2*M_IN`-way multiplexer over all inputs and their
inverses, with its own `$clog2(2*M_IN)`-bit select. That is
`N_CHAINS * $clog2(2*M_IN)` control wires, about 2,100 at the default size.
Once the configurations are fixed, `chain_mux` wires its input `j` straight to
the (possibly inverted) scan input the chain uses in configuration `j`. The
same select value `j` then means "configuration `j`" in every chain, and a
single `$clog2(N_CFG)`-bit select (2 bits by default) serves the whole chip.
When a chain uses the same pin in two configurations, that pin is simply
wired to both multiplexer positions. Synthesis shares the resulting logic: at
the default size the whole mapping comes to a few hundred cells.

**Dynamic configurations.** `cfg_sel` reaches the first cell of each chain
through combinational logic only. Changing it between two shift clocks
therefore changes the grouping for the next row. After a full load, cell
`CHAIN_LEN-1-t` of chain `n` holds `si[idx_n(cfg_t)] ^ inv` from shift
cycle `t`. Choosing `cfg_t` for each row is up to the pattern generator. The
end-to-end testbench does it the simple way: for each row it takes the first
configuration that loads the row without error, or else the one with the
fewest wrong bits. A dynamic configuration needs no extra hardware, so it
does not count toward `N_CFG`.

## Test sequence and timing

All control comes from the tester. Nothing in the design sequences itself.

| step | inputs | clocks |
|---|---|---|
| load | `se=1`, `test_mode=1`, `si` and `cfg_sel` valid before each rising edge | `CHAIN_LEN` |
| capture | `se=0`: scan cells load `func_d`, wrapper cells hold | 1 |
| unload + next load | `se=1`, `misr_en=1`: `so` is compacted while the next pattern enters | `CHAIN_LEN` |

- **Output timing.** `so[n]` is the last cell of chain `n`, with no extra
  latency. The MISR absorbs the `so` value present at each enabled edge.
- **First pattern.** Keep `misr_en=0` (or `rst_n` low) while the first
  pattern loads, so that the unknown power-up contents stay out of the
  signature.
- **Cost per pattern.** A pattern costs `CHAIN_LEN + 1` clocks when loads and
  unloads overlap. It costs `M_IN * CHAIN_LEN` bits of tester data, or fewer
  when a static configuration leaves pins unused.

## Blocks

| module | role |
|---|---|
| `rssa_pkg` | `map_entry_t`, default sizes, `prime_entry()` |
| `scan_cell` | Mux-D flip-flop: `se ? si : d`. No reset, because it is a functional flop of the circuit and is set by shifting. |
| `scan_chain` | `LEN` scan cells. Cell 0 is next to the input; `so` is the last cell. |
| `wrapper_chain` | A scan chain around primary inputs. Its cells hold during capture. `core_in` follows the cells when `test_mode=1` and the pins otherwise. |
| `chain_mux` | Per-chain `N_CFG`-way multiplexer with hard-wired, optionally inverted inputs. |
| `mapping_logic` | One `chain_mux` per chain with a shared `cfg_sel`. Configurations are prime-based or come from a table. |
| `mapping_logic_full` | The unoptimized per-chain `2*M_IN`-way selection. The top builds it when `FULL_MAPPING=1`. |
| `misr` | 32-bit internal-feedback LFSR, x^32+x^22+x^2+x+1. Chain `i` is XORed into bit `i mod 32`. It has an enable and an asynchronous reset. |
| `rssa_top` | Everything above. The logic under test connects through `func_d`/`cell_q` and `pi_pin`/`pi_core`. |

The combinational logic of the chip under test is not part of this RTL. Its
connections are ports of `rssa_top`:

- `func_d` and `cell_q` are the functional input and output of every scan
  cell, chain-major.
- `pi_pin` and `pi_core` are the primary inputs before and after the wrapper
  chains.

## Parameters of `rssa_top`

| parameter | default | meaning |
|---|---|---|
| `N_CHAINS` | 537 | all chains, including the wrapper chains |
| `N_WRAP` | 25 | wrapper chains; they are the last `N_WRAP` chain numbers |
| `CHAIN_LEN` | 135 | cells per chain |
| `M_IN` | 7 | scan-input pins |
| `N_CFG` | 4 | configurations |
| `CFG_M` | `{7,5,3,2}` | inputs used by each prime-based configuration; configuration 0 is the rightmost |
| `CUSTOM_TABLE`, `CFG_TABLE` | 0, `'0` | use an explicit `[N_CFG][N_CHAINS]` table of `map_entry_t` instead |
| `FULL_MAPPING` | 0 | build `mapping_logic_full` and drive it from `chain_ctl` |
| `MISR_W`, `MISR_POLY` | 32, `32'h00400007` | signature register |

The defaults describe a chip with about 69,000 flip-flops in 512 internal
chains of 135 cells, plus 25 wrapper chains. That is 3,375 wrapped primary
inputs and 72,495 scan cells in total, with a 537-to-7 parallel load. The
wrapper-chain count is this design's choice. With 69,000 flip-flops, any
value from 23 to 25 keeps the chain length at 135.

At the defaults, the designs it can carry without any change are the prime-based
ones with up to 537 chains, chains up to 135 cells long, and up to 7 pins. This
covers the benchmark set it was sized for, except one circuit that needs 11
pins (set `M_IN=11`, `N_CFG=5`, and add 11 to `CFG_M`).

## Choices made in this design

The sizes, the prime-based rule, the shared select, the inverted connections,
the wrapper chains and the MISR on all chain outputs follow the architecture
as it is described. The following were left open there and are decided
here:

- **Select polarity and encoding.**
  - Scan enable is active high.
  - Configurations are numbered from 0.
  - A `cfg_sel` value with no configuration drives 0 into every chain.
  - `mapping_logic_full` encodes its select as `{input, inv}`.
- **Wrapper chains.**
  - They are the last `N_WRAP` chains, each `CHAIN_LEN` cells long.
  - They hold during capture.
  - `test_mode` switches the logic's inputs between pins and wrapper cells.
- **MISR.** Its width, polynomial, XOR folding of many chains into fewer bits,
  enable and reset are this design's choices. Only the existence of a MISR on
  all chain outputs is given.
- **Scan cells** have no reset.
- **Setup timing.** `cfg_sel` has the same setup requirement as the scan
  inputs: it must settle before the shifting edge. Nothing re-times it, so
  the tester must place it in the same cycle as the data it steers.
- **Width of the shared select.** The architecture counts the optimized select
  as a single control input. Here it is one bus of `ceil(log2(N_CFG))` pins,
  which is 2 pins for the four default configurations.
- **No configuration step.** A test sequence in general begins by applying
  the scan configuration. Here that costs no clock, because `cfg_sel` is
  combinational into the multiplexers. A pattern therefore takes `CHAIN_LEN`
  shift clocks plus one capture clock.

Not built:

- the logic under test, whose circuits are not given;
- the generation of configurations (scan-chain grouping by logic cone,
  compatibility analysis, prime-based selection, per-shift post-processing),
  which is software in the test-generation flow. The testbench contains only
  the small per-row selection needed to check the dynamic example.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the block
with values computed separately in the testbench and prints
`TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|---|---|
| `tb_scan_cell`, `tb_scan_chain`, `tb_wrapper_chain` | shift and capture behaviour, bit order on `so`, hold during capture, pin/cell selection |
| `tb_chain_mux` | every input and select value, including inversion and the unused code |
| `tb_mapping_logic` | the 537-chain prime mapping for all four configurations; the four-chain, two-input example with a table and an inverted entry |
| `tb_mapping_logic_full` | random per-chain selects |
| `tb_misr` | cycle-by-cycle against a bit-level model; a single flipped input bit changes the signature |
| `tb_rssa_top` | end to end (see below) |
| `tb_rssa_full` | the full default size (see below) |
| `tb_rssa_workloads` | the architecture at the sizes of six benchmark designs (see below) |

**`tb_rssa_top`** runs three small instances:

- **Prime-based instance.** Patterns are loaded in every static
  configuration and in dynamic ones, then captured, then compacted while the
  next pattern loads. Cells, scan outputs, wrapped inputs and the signature
  are checked every cycle.
- **Two-configuration example.** The per-row selection must choose 0,0,1,1
  for a vector that loads exactly. For a vector that cannot load, it must
  leave exactly one wrong bit in each of the two conflicting rows. All 16
  row-by-row select sequences, which two configurations give over four rows,
  are then applied with random inputs. Every chain is compared with the
  configuration table.
- **Unoptimized mapping.** It runs with random per-chain selects.

Every mechanism is counted: static loads per configuration, dynamic loads,
capture, overlapped unload, compaction, wrapper stimulus and functional
mode, inverted connection, the example's selections and all 16 select
sequences. A mechanism that
never occurs fails the test.

**`tb_rssa_full`** uses the default parameters. It loads one pattern in a
dynamic configuration and checks all 72,495 cells. It then captures, and
unloads into the MISR while the next pattern loads. The signature and the
135-cycle load and unload times are checked. Building it takes a few minutes
of C++ compilation; the simulation itself takes well under a second.

**`tb_rssa_workloads`** builds the architecture at the chain count, chain
length and pin count used for six benchmark designs. It runs on the helper
`rssa_workload_runner`. The sizes are 487/20/7, 516/26/7, 80/11/7, 77/10/11
(five configurations, up to M = 11), 129/14/5 (three configurations) and
139/13/7. Each design loads one static pattern per configuration and one
dynamic pattern, and checks:

- every cell after each load;
- the signature;
- L + 1 clocks per pattern;
- the tester data volume. A static pattern in configuration j costs
  `M_j * L + (M_p - M_j)` bits, because each idle pin is specified once. A
  dynamic pattern costs `M_p * L` bits.

The benchmark logic itself is replaced by random capture data.

## Simulating

The package must come first. Then let verilator find the modules in `rtl/`:

```
verilator --binary --timing -Wno-fatal rtl/rssa_pkg.sv tb/tb_rssa_top.sv \
          -y rtl --top-module tb_rssa_top
./obj_dir/Vtb_rssa_top
```

Use the same command for any other testbench. `tb_rssa_full` needs several
minutes to build.
