# Low-power BIST with a bit-swapping LFSR

This is a built-in self-test (BIST) for an 8x8 multiplier. Its pattern
generator switches less than a plain LFSR does.

A conventional LFSR makes each of its outputs toggle on about half of all
clocks. During a self-test those toggles spread into the circuit under test,
and that is where much of the test power goes. A **bit-swapping LFSR**
(BS-LFSR) keeps the LFSR and adds one row of 2:1 multiplexers after it. The
last stage of the register is the selection line. While it is 0, neighbouring
bits trade places. While it is 1, the word passes unchanged. The output still
visits all 2^n − 1 non-zero words once per period, but each swapped bit
toggles a quarter less often.

The generator drives a small BIST around an 8x8 Vedic multiplier, which is
the circuit under test (CUT). Each pattern is used as an address. It reads
an operand pair from a data memory and the expected product from a signature
memory. The CUT multiplies the pair, and a comparator raises `valid` when the
product matches.

## The bit-swapping generator (`bs_lfsr`)

The register is an n-bit Fibonacci LFSR that shifts towards its MSB. The
default is n = 8 with polynomial x^8 + x^6 + x^5 + x^4 + 1. Bits are numbered
1..n, and bit 1 is `q[0]`, the stage that takes the XOR. Bit n (`q[N-1]`) is
the selection line, and swapping happens while it is **0**:

| n    | pairs swapped while bit n = 0        | bits never swapped |
|------|--------------------------------------|--------------------|
| odd  | (1,2), (3,4), …, (n−2, n−1)          | n                  |
| even | (1,2), (3,4), …, (n−3, n−2)          | n−1, n             |

The selection bit itself is never moved, so the swap can be undone from the
output. The mapping is therefore one-to-one, and the pattern sequence is a
reordering of the LFSR's states within each word.

Why this saves transitions: over one period, every stage of a maximal-length
LFSR toggles 2^(n−1) times. In a swapped pair, bit 2k+1 shows either itself or
its neighbour, depending on the selection line. Neighbouring LFSR stages are
the same sequence one clock apart, and the selection line is independent of
them. As a result, each output of a swapped pair toggles 2^(n−1) − 2^(n−3)
times, and each pair saves 2^(n−2) transitions. For n = 8 that is:

| output           | toggles per period | note            |
|------------------|--------------------|-----------------|
| plain LFSR bit   | 128                | 2^7             |
| swapped bit 1..6 | 96                 | 25 % fewer      |
| bits 7, 8        | 128                | not swapped     |
| pair (2 bits)    | 192 instead of 256 | 2^6 = 64 saved  |
| whole 8-bit word | 832 instead of 1024| 19 % fewer      |

`bs_lfsr_tb` checks these counts exactly. The 25 % saving per swapped pair
is the figure usually quoted for this scheme. Power in the CUT depends on the
CUT, and nothing here models it.

Ports: `load` (synchronous, reloads `SEED`) wins over `en` (advance one
step). `state` is the plain LFSR register, `pattern` the swapped word, and
`swap` the active-high form of the selection line. `pattern` follows
`state` combinationally.

## Test flow and timing (`bist_top`)

```
          check ─────────────────────────────┐
                                             ▼
 bs_lfsr ─ addr ─┬─► data_memory ──{a,b}──► operand_mux ─► vedic_8x8 ─ product ─┐
   ▲             │                 manual_a/b ──┘                               ▼
   │             └─► signature_memory ─────── signature ──────────► response_analyzer ─ valid
   └── load/en ── test_controller ◄───── mismatch ◄─────────────────────────┘
```

The `check` input selects the mode:

* **Normal mode (`check` = 1).** The multiplier works on `manual_a` and
  `manual_b`, and `product` is available combinationally. The generator is
  held at its seed, and `valid`/`mismatch` stay 0.
* **Test mode (`check` = 0).** The test controller leaves IDLE on the next
  clock and runs for 255 clocks, one pattern per clock: one full LFSR
  period, so every non-zero address is read exactly once.

Both memories have registered reads, so operands and signature arrive one
clock after their address. The compare slot (`cmp_en`) is the advance pulse
delayed by one clock. In each slot, `valid` = 1 means the product matched and
`mismatch` = 1 means it did not. The controller counts both. One clock after
the 255th pattern, `test_done` rises, and `test_pass` tells whether all
compares matched. That is 257 clocks after `check` falls (1 clock to enter
RUN, 255 patterns, 1 for the last compare). The verdict and the counters
`patterns_checked` and `patterns_failed` hold until `check` returns to 1.
Raising `check` during a run abandons it. The next fall of `check` starts a
fresh run from the seed.

The all-zero word is not in the LFSR period, so address 0 of either memory
is never tested.

## Tables

The operand and signature tables are computed in SystemVerilog (`bist_pkg`),
not read from files:

* data memory, address i: `a = (29·i + 7) mod 256`, `b = (167·i + 13) mod 256`.
  Both multipliers are odd, so all 256 words differ and each operand takes
  every 8-bit value once.
* signature memory, address i: `a · b` of data memory entry i.

Both memories have a write port (`data_we`, `sig_we`, `wr_addr`,
`wr_operands`, `wr_signature`), so either table can be replaced in normal
mode. You can load a different operand set with its products, or plant a
wrong signature to see the BIST report it. Contents survive reset. Only the
initial values come from the formulas.

## The multiplier under test (`vedic_8x8`)

This is an unsigned, combinational Urdhva-Tiryagbhyam ("vertically and
crosswise") multiplier, built in three levels:

* `vedic_2x2`: four AND terms and two half adders.
* `vedic_4x4`: four 2x2 blocks give `q0 = aL·bL`, `q1 = aH·bL`, `q2 = aL·bH`
  and `q3 = aH·bH`. The crosswise sum `t = q1 + q2 + q0[3:2]` supplies
  `p[3:2]`, and `p[7:4] = q3 + t[4:2]`.
* `vedic_8x8`: the same construction with 4-bit halves, where
  `t = q1 + q2 + q0[7:4]`.

`vedic_8x8_tb` checks all 65,536 operand pairs.

## Files

| file | contents |
|------|----------|
| `rtl/bist_pkg.sv` | widths, `operand_pair_t`, controller state enum, table formulas |
| `rtl/bs_lfsr.sv` | bit-swapping LFSR (parameters `N`, `TAPS`, `SEED`) |
| `rtl/data_memory.sv`, `rtl/signature_memory.sv` | 256 x 16 memories, registered read, write port |
| `rtl/operand_mux.sv` | CUT operand select by `check` |
| `rtl/vedic_2x2.sv`, `rtl/vedic_4x4.sv`, `rtl/vedic_8x8.sv` | the multiplier |
| `rtl/response_analyzer.sv` | product/signature comparator |
| `rtl/test_controller.sv` | IDLE/RUN/DONE sequencer and verdict counters |
| `rtl/bist_top.sv` | the whole BIST |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
one also has a watchdog. For example, to simulate the whole design:

```
verilator --binary --timing -Irtl -Itb rtl/bist_pkg.sv tb/bist_top_tb.sv \
          -y rtl --top-module bist_top_tb -o sim && ./obj_dir/sim
```

`bist_top_tb` runs the top at its default size, with no parameter overrides.
It runs normal-mode products, a clean self-test, table writes, a self-test
that must flag exactly one planted bad signature, an abandoned run and a
clean rerun. It checks every clock against its own reference model. It also
confirms that the swapped address bus toggles less than the plain LFSR
register (830 against 1022 transitions within one run).

## What follows the source scheme and what is chosen here

These follow the published scheme:

* the bit-swapping rule, including its selection line and pair layout;
* n = 8;
* the block structure: BS-LFSR, data memory, operand multiplexer, Vedic
  multiplier, signature memory, comparator with a `valid` bit, and a
  controller mode signal that means test mode at 0 and normal mode at 1;
* 256 entries per memory;
* the 8x8 multiplier.

These are this design's own choices:

* the feedback polynomial and the seed;
* the memory contents and word layout;
* the registered memory reads and the write ports;
* the controller's run length, states, counters and abort behaviour;
* `valid` held at 0 outside compare slots;
* the `mismatch`, `test_done` and `test_pass` outputs;
* the inner structure of the Vedic multiplier, which is the standard one;
* the asynchronous active-low reset.

The generator is used test-per-clock: the whole 8-bit word is applied in
parallel every clock. The scheme also works test-per-scan, with the swapped
bits shifted into a scan chain, but that variant is not built. A plain LFSR
for comparison is not a separate module, because `bs_lfsr`'s `state` output
is exactly that LFSR. FPGA area and power figures depend on the target
device and on which ports are bonded. This RTL does not reproduce them.
