# Transformed pseudo-random patterns: an LFSR test pattern generator with cube-mapping logic

An LFSR is the cheapest on-chip test pattern generator for built-in self-test,
but for circuits with random-pattern-resistant faults it may need millions of
patterns to reach full fault coverage. This design keeps the LFSR unchanged and
puts a small, purely combinational *mapping logic* block between it and the
circuit under test (CUT):

```
   +-------------------+
   |   LFSR (N stages) |   original patterns, one per clock
   +---------+---------+
             | orig_pattern[N-1:0]
   +---------v---------+
   |   mapping logic   |<-- test_mode
   +---------+---------+
             | cut_pattern[N-1:0]   transformed patterns
   +---------v---------+
   |        CUT        |   (not part of this RTL)
   +-------------------+
```

The mapping logic picks out original patterns that would detect no new fault
and moves them onto patterns that test the hard faults. It adds no flip-flops
and no stored seeds or weights. Its only control is one `test_mode` line.

## Cube mappings

All transformations are built from one primitive, the *cube mapping*
M(S -> I). A cube over the n inputs is a product of literals, written as a
string over {0, 1, X} (X = the input does not appear). S is the *source cube*
and I is the *image cube*:

* If the original pattern A lies in S, then every input that is a literal of I
  is forced to that literal's value. Every other input keeps its value from A.
* If A is not in S, it passes unchanged.

Example: S = a1'a2 (01X) and I = a2'a3 (X01) on three inputs. Patterns 010 and
011 both become 001, and the other six patterns are left alone.

A cube mapping needs very little hardware (`rtl/cube_mapping.sv`):

* **Decoder.** One AND gate over the literals of S. Complemented literals use
  inverted inputs. A `test_mode` input is added so the mapping is off in
  normal operation.
* **Forcing gates.** One two-input gate per literal of I, on that input's line.
  A literal 1 gets an OR with the decoder output. A literal 0 gets an AND with
  the inverted decoder output.
* **Other inputs.** Inputs that are not in I get no gate.

Cost: one gate plus one gate per image literal.

### Several mappings: order and override

`rtl/mapping_logic.sv` cascades `NMAP` cube mappings. Two rules set the
structure, and they are the least obvious part of the design:

1. **Every decoder reads the original pattern**, straight from the LFSR. No
   decoder reads a line that an earlier mapping has already changed.
2. **Later mappings sit after earlier ones on each line.** A pattern can lie
   in the source cubes of two mappings. If both force the same input, the
   later mapping wins.

This is safe because the procedure that chooses the mappings picks each new
source cube so that it holds no pattern the fault coverage depends on.
Changing either rule changes the patterns that are produced. The testbench
catches both changes.

### The C17 configuration (the defaults)

The default parameters are the mapping logic found for the 5-input ISCAS-85
circuit C17 (inputs a..e). The goal is 100% fault coverage in 10 patterns.
Two mappings are used:

| order | source cube | image cube | gates on the lines |
|---|---|---|---|
| 0 | b e'  (X1XX0) | a' d e (0XX11) | AND on a, OR on d, OR on e |
| 1 | a' e' (0XXX0) | a b' c' (100XX) | OR on a (after the AND), AND on b, AND on c |

That comes to 8 gates: two 3-input decoders (with `test_mode`) and six
2-input gates. Applied to the 10-pattern original set of the example:

| original | transformed | why |
|---|---|---|
| 11010 | 01011 | in `be'`: a=0, d=1, e=1 |
| 11100 | 01111 | in `be'` |
| 01010 | 10011 | in both: mapping 0 sets d, e; mapping 1 overrides a and sets b, c |
| 00100 | 10000 | in `a'e'`: a=1, b=0, c=0 |
| 00111, 11011, 10111, 10110, 00101, 10100 | unchanged | in neither source cube |

The original set misses five faults. Their test cubes are XX00X, X111X,
010X1, 0111X and X001X. None of the original patterns lies in any of them.
After the transformation, every test cube holds at least one pattern.

### How the mappings are chosen (offline, not in the RTL)

The cubes come from a software procedure that runs before the RTL is written:

1. Fault-simulate the LFSR patterns with fault dropping. Note which pattern
   first detected each fault.
2. **Source cube.** Find a large cube that contains none of those
   fault-dropping patterns. This is a binate covering problem. Because of this
   rule, every fault already detected keeps at least one test.
3. **Image cube.** Generate ATPG test cubes for the faults still undetected.
   Start from the cube that intersects the most test cubes, and add literals
   one at a time while the number of newly detected faults rises. Then drop
   any literal whose removal costs no coverage, because every literal costs
   one gate.
4. Repeat from step 1 until the coverage target is met.

To use the RTL with another circuit, set the cube parameters to the output of
this procedure.

## Pattern generator

`rtl/lfsr.sv` is an external-XOR (Fibonacci) LFSR. For the characteristic
polynomial x^N + c_{N-1}x^{N-1} + ... + c_1 x + c_0, it realises the
recurrence s(t+N) = XOR_k c_k s(t+k):

* Stage k holds s(t+k).
* On each enabled clock the register shifts toward stage 0, and the feedback
  bit enters stage N-1.
* `POLY` holds c_{N-1}..c_0. The x^N term is implied.
* All N stages go to the CUT in parallel, one pattern per clock.

The method does not prescribe the LFSR's internal
structure or its reset. Both are this design's choices.

`rtl/tpg_pkg.sv` holds the LFSR set-ups used for the ISCAS benchmark
experiments. Each has a primitive characteristic polynomial and an initial
seed:

| circuit | stages | polynomial | seed (hex) |
|---|---|---|---|
| s420 | 35 | x^35+x^2+1 | 3_3ad1_dab3 |
| s641 | 54 | x^54+x^37+x^36+x+1 | 1a_9a83_c447_3c79 |
| s713 | 54 | x^54+x^37+x^36+x+1 | 0a_128c_b016_6b6d |
| s838 | 67 | x^67+x^10+x^9+x+1 | 3_df4e_0de8_4455_0811 |
| s1196 | 32 | x^32+x^22+x^2+x+1 | 29fc_1f94 |
| C2670 | 233 | x^233+x^74+1 | 0f7_d383_..._2c05 (see package) |
| C7552 | 207 | x^207+x^43+1 | 2f25_0e9a_..._02c3 (see package) |

Seed bit k goes to stage k. The published seeds do not fix this bit order,
so the patterns produced here need not be the exact sequence behind the
published coverage figures.

Reported results for these circuits: with an LFSR alone, each needs 1M to more
than 100M patterns for full coverage. With mapping logic, 1K to 50K patterns
are enough. The mapping logic costs from a handful of gates up to a few
hundred, depending on the circuit and the test length. Those cubes were not
published, so only the LFSR half of each set-up can be instantiated here.

## Top level: `tpg_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one pattern per rising edge while `en` is high |
| `rst_n` | in | 1 | asynchronous, active low: loads `SEED` |
| `en` | in | 1 | advance the LFSR (low = hold the pattern) |
| `test_mode` | in | 1 | high: mappings active. Low: `cut_pattern == orig_pattern` |
| `orig_pattern` | out | N | LFSR state |
| `cut_pattern` | out | N | transformed pattern for the CUT inputs |
| `map_hit` | out | NMAP | decoder output of each mapping |

Timing:

* `cut_pattern` is combinational from `orig_pattern` and `test_mode`. The
  transformation adds no latency.
* The mapping logic does add delay in front of the CUT. The cascaded netlist
  can be flattened by synthesis to keep that delay short.
* The pattern after reset is `SEED`.

Parameters:

* `N`: width.
* `NMAP`: number of mappings.
* `POLY` and `SEED`: LFSR set-up.
* `SRC_MASK`, `SRC_VAL`, `IMG_MASK`, `IMG_VAL`: the cubes, packed
  `[NMAP-1:0][N-1:0]`, with mapping 0 applied first.

In a cube, a mask bit of 1 marks a literal and the value bit gives its
polarity. Input a (a_1) is the most significant bit. Elaboration stops with
an error in any of these cases:

* a value bit is set outside its mask;
* the seed is zero;
* the polynomial has no constant term.

The default configuration is C17 with a 5-stage LFSR, x^5+x^2+1 and seed
00111. The C17 example's own ten patterns were chosen by hand, not produced
by an LFSR, so this 5-stage polynomial and seed are this design's choice. The
LFSR visits all 31 non-zero patterns. The testbench checks that, within one
period, all five C17 test cubes are hit.

## Where the design follows the method and where it chooses

Taken from the method:

* the overall structure (LFSR, then combinational mapping logic, then CUT);
* the cube-mapping semantics;
* one decoder per source cube, with a `test_mode` input;
* one AND or OR gate per image literal;
* the override order;
* the C17 cubes;
* the benchmark LFSR stages, polynomials and seeds.

This design's own choices:

* LFSR structure, reset and enable;
* the 5-stage polynomial and seed;
* seed bit order;
* the mask/value encoding of cubes.

Not included:

* **The CUT.** The ISCAS benchmark netlists are external.
* **Benchmark mapping logic.** Only the C17 cubes are published.
* **The mapping-selection software.**

## Verification

Every testbench checks itself and ends with a line of the form
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|---|---|
| `tb/tb_cube_mapping.sv` | the 3-input example, all 8 patterns, test mode on and off; an 8-input mapping, checked exhaustively against a reference built from cube strings, with an independent value on the line input |
| `tb/tb_mapping_logic.sv` | the 10 C17 patterns against the table above; test cubes hit: 0 originally, 1 with the first candidate image a'e, 3 with a'de, 5 with both mappings; all 32 patterns against a reference, test mode on and off |
| `tb/tb_lfsr.sv` | seed after reset; hold while `en` is low; period exactly 31 with 31 distinct non-zero states; reload on reset; the s420 set-up for 2000 patterns against a bit-sequence reference |
| `tb/tb_tpg_top.sv` | end to end at the default parameters: every original and transformed pattern over two periods with test mode on, a hold, and one period with test mode off. It counts mapping 0 alone, mapping 1 alone, override (both), normal mode and LFSR wrap, and fails if any count is zero |
| `tb/tb_table1_lfsrs.sv` | all seven benchmark LFSR set-ups for 50K patterns (the longest test length evaluated), against the reference; no seed repeat within the run |

`tb/tb_lfsr_runner.sv` is a helper that runs one LFSR set-up against the
reference.

Run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/tpg_pkg.sv tb/tb_tpg_top.sv --top-module tb_tpg_top
./obj_dir/Vtb_tpg_top
```

Replace `tb_tpg_top` with any other testbench name. All of them finish in
seconds.

Lint gives two kinds of warning, and both are expected:

* **Unused package constants.** The benchmark set-ups in `tpg_pkg` are not
  used by the default top.
* **`rst_n` used both synchronously and asynchronously.** This comes from the
  `disable iff` of the LFSR's assertion that the all-zero state never occurs.
