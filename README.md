# Online-arithmetic perceptron and FC classifier

A perceptron computes `u = sum(w_i * x_i) + b` and then `y = (u >= 0)`. Built the
usual way, each stage waits for the one before it to finish: the multipliers
produce full words, the adder tree waits for its carries to settle level by level,
and only then does the activation see `u`. This design instead runs the whole neuron
in **online arithmetic**. Every value travels as a stream of radix-2 signed digits
(`-1, 0, +1`), one digit per clock, **most significant digit first**. A stage can
start as soon as the first few digits of its input have arrived. So the
multipliers, the reduction tree, the binary conversion and the activation all work
at the same time on different digit positions. Because the digits are redundant, no
adder anywhere has a carry that runs along the word. Every stage costs a fixed
number of clocks, whatever the data.

Two consequences shape the design:

* The threshold decision usually comes long before the last digit of `u`. The sign
  of a signed-digit number is the sign of its first nonzero digit.
* In a classifier layer the winning class is often known early too. Once the
  leading logit is far enough ahead that the digits still to come cannot change
  the ranking, the layer stops and reports the class (early termination).

The top level, `ol_fc_classifier`, is a fully connected layer of four such
perceptrons (one per class) over a 64-element Q8.8 feature vector, with this early
classification built in. Beside it sits a small alignment unit for floating-point
operands.

## Numbers and digit streams

* A digit is `sd_t`, a 2-bit signed value: `2'b11` = -1, `2'b00` = 0, `2'b01` = +1.
  `2'b10` never occurs. The type and the helper functions are in `rtl/ol_pkg.sv`.
* A stream has a *leading weight* `2^E`: the digit in the stream's k-th cycle weighs
  `2^(E-k)`. A stage that makes a value larger adds one digit at the head of the
  stream (`E+1`). It never widens a word.
* Operands are `NB`-bit two's-complement words (`NB = 16`, Q8.8). A word `X` is
  treated as the fraction `X * 2^-NB`, and converting it to digits needs no
  arithmetic. The sign bit becomes digit -1 (or 0), and every other bit becomes
  digit +1 (or 0), at weights `2^-1 ... 2^-NB`.
* The bias `B` is a `2*NB`-bit two's-complement integer at product scale (Q16.16 for
  Q8.8 operands). It enters the reduction tree as one more stream, so the
  activation only has to compare with zero.
* The result word is exact: `u_o = sum(X_i * W_i) + B`, read as an integer with
  `2*NB` fraction bits (Q16.16 scaling for Q8.8 inputs). At `N = 64` the word has 44
  bits.

## One neuron: `ol_perceptron`

```
 weight BRAM (bit planes) --w digits--+
                                       +--> 64 x ol_mult ---+ 64 product streams
 feature register file ----x digits--+                      |
 bias word ---> ol_bin2sd --------------------------------+ 1 bias stream
                                                          v
                              ol_csa_tree (65 -> 2 streams, 10 levels of 3:2 nodes)
                                                          v
                              ol_add (2 -> 1, root of the tree) = u stream, MSD first
                                   |                         |
                              ol_sd2bin (u word)      ol_threshold (y, early)
```

Timing of one operation at the defaults (N = 64, NB = 16, online delay 3). Cycle 0
is the cycle in which `start` is taken:

| cycle | event |
|---|---|
| 0 | weight bit plane 0 read from the BRAM; pipeline registers cleared |
| 1 ... 16 | operand digit j (MSD first) enters all 64 multipliers at cycle j+1 |
| 5 | first product digits and first bias digit enter the tree |
| 15 | first digits of the two tree output streams |
| 17 | first digit of `u` (43 digits in all, cycles 17 ... 59) |
| 18 ... 60 | `y_valid_o` one cycle after the first nonzero digit of `u` (about cycle 24 to 32 for random full-range Q8.8 data) |
| 61 | `done_o`: `u_o` is complete |

The latency, `2*NB + DELTA + 2*LV + 6` cycles (`LV` = number of 3:2 levels), does
not depend on the data. Only one operation runs at a time. `start` is ignored while
`busy_o` is high. `cancel` stops an operation at once.

### Online multiplier (`ol_mult`)

This is the part that needs the most care. Both operands arrive digit-serially,
and so does the product. The unit keeps three values: the prefixes `X` and `W` of
the operands built so far, and a residual `R`. In every cycle it forms

```
v = 2R + (x_j * W_new + w_j * X_old) * 2^-3
```

`W_new` already includes `w_j`, and `X_old` does not yet include `x_j`, so the
term `x_j*w_j` is counted exactly once. For the first three cycles (the online
delay) `v` simply becomes the new residual. After that, an output digit `p` is
chosen from `v` truncated to two fractional bits:

* `p = +1` if the truncated `v` is at least 1/2,
* `p = -1` if it is below -1/2,
* `p = 0` otherwise.

The new residual is then `v - p`. The residual stays below about 1.13 in
magnitude. The register therefore needs 3 integer bits and `NB + 3` fraction bits
(22 bits at NB = 16).

After the operands' 16 digits, the unit keeps iterating with zero input digits.
After 32 output digits the residual is zero and the product is exact. Those 32
digits finish 35 cycles after the first operand digit. The output digit passes one
register, so `p_1` appears 4 cycles after the first operand digit. The signal
`first` restarts the unit in the same cycle that it carries the first digits.

### Reduction tree (`ol_csa_tree`, `ol_csa32`, `ol_sd_delay`)

A 3:2 node takes three digit streams. It splits each digit into a positive and a
negative bit (`d = pos - neg`) and adds:

* the three positive bits in one full adder,
* the three negative bits in another.

The two sum bits form a sum digit, and the two carry bits form a carry digit of
twice the weight. Both digits stay in `{-1,0,1}`, so nothing propagates between
digit positions. To keep the two output streams aligned:

* the carry digit is registered once,
* the sum digit is registered twice.

Both output streams then start one cycle after the inputs, with one extra leading
digit. Streams left over in a level (`M mod 3`) go through two registers so they
stay aligned. `ol_csa_tree` generates levels until two streams remain.
Going from 65 streams to 2 takes 10 levels, which is 10 cycles.

### Root adder (`ol_add`)

The root adder merges the last two streams into the single `u` stream. Per digit
position, `s = a + b` lies in `[-2, 2]` and is split into a transfer to the next
more significant position and a local digit. When `s = ±1`, the split looks one
position further down, so that the local digit plus the incoming transfer never
leaves `{-1,0,1}`. The online delay is 2, and the output has one more leading digit.

### Conversion and activation (`ol_sd2bin`, `ol_threshold`)

The converter uses on-the-fly conversion. It keeps two registers: `Q`, the value
of the digits so far, and `QM = Q - 1`. Each digit appends one bit to one of them,
so no carry-propagate adder is needed. `prefix_o` is the running value after each
digit, and the classifier compares these running values.

The threshold unit sets `y = 1` at the first digit of `u` that is +1, and `y = 0`
at the first digit that is -1. If all digits are zero, `u = 0` and `y = 1`. The
leading digits of `u` cover the headroom of a 64-term sum, so they are usually zero
for real data. The first nonzero digit, and with it `y`, typically arrives 7 to 15
digits into the stream, well before its end (`y_early_o`).

### Weight memory and feature register file

`ol_weight_mem` is a plain synchronous block RAM organised by **bit planes**.
Word `s*NB + j` holds bit `NB-1-j` of all N weights of weight set `s`, with lane `i`
in bit `i`. Reading consecutive words therefore streams all N weights MSD-first,
at one read per clock. To load a weight set, write its 16 bit planes. Four weight
sets are kept per neuron.

`ol_input_rf` holds the N features. One element is written per cycle. The file
presents digit `dig_idx` of every element at once.

## Classifier layer and early termination: `ol_fc_classifier`

The K = 4 perceptrons share one feature register file and run in lockstep, each
with its own weight BRAM and bias. `ol_gap_criterion` sees the running values of
the four logits, each in units of the latest digit's weight. The digits still to
come can change each logit by less than one unit. So if the leader is more than
2 units ahead of every other logit, the ranking is final. This is the test
"gap > 2·|R|" with a remainder bound of one unit. If the gap is too small, the test
repeats on the next digit. After the last digit the largest logit wins, and ties
go to the lowest index.

* `early_en = 1`: the layer stops all four perceptrons as soon as the class is
  known and pulses `done_o`. In random tests with a clear winner this happens
  about 32 cycles after `start` instead of 62. When the two top logits are close,
  it happens later.
* `early_en = 0`: the layer runs to the end and also returns the exact logits
  `u_o[k]` and threshold outputs `y_o[k]`. `done_o` comes 62 cycles after `start`.

`class_early_o` reports whether the class was decided before the last digit.

### Floating-point alignment (`ol_fp_align`)

For floating-point operands the exponents travel first. `ol_fp_align` takes all
exponents in one cycle (`fp_exp_valid`). It finds the largest exponent and
registers the shift `e_max - e_i` of each lane. The mantissa digit streams that
follow leave delayed by their lane's shift. Delaying an MSD-first stream by one
cycle is a right shift by one digit, so the streams come out aligned and nothing
has to stop mid-mantissa. Lanes shifted by more than `MAXSH` (16) contribute zero.

The unit stands beside the Q8.8 layer with its own `fp_*` ports; the fixed-point
datapath does not use it.

## How this relates to the published method

These parts follow the original method:

* a perceptron made of an online multiplier bank, a 3:2 redundant adder tree,
  redundant-to-binary conversion and threshold activation,
* the digit set `{-1,0,1}`, MSD-first order and an online delay of 3,
* weights in block RAM and features in a register file,
* N = 64, n = 16 (Q8.8) and 4 classes,
* the gap criterion for early classification,
* exponent-first alignment for floating point.

These parts are choices made here, where the method only names a block or gives
its function:

* the multiplier recurrence and selection rule,
* the borrow-save construction of the 3:2 node,
* the root adder,
* on-the-fly conversion,
* the bit-plane memory layout,
* the bias as an extra tree stream,
* the remainder bound used by the gap test,
* all handshakes and widths.

Points where the design departs from published figures:

* **Tree depth and latency.** The method's latency model is
  `T = 2n + p + L*p` with `L = ceil(log2 N)`, which gives 53 cycles plus overhead at
  N = 64, n = 16. A single-perceptron latency of 13.5 cycles is also quoted. This
  design uses one clock per 3:2 level, which needs 10 levels for 65 streams. It
  computes the full 43-digit result in 61 cycles. The first digit of `u` is ready
  at cycle 17. For random data the threshold decision comes around cycle 24 to 32,
  and an early class decision around cycle 32.

  The same count at the sizes of the published latency table (N = 128, so 11 tree
  levels for 129 streams) is `2n + 3 + 2*11 + 6`:

  | n | this design (cycles, simulated) | method's model `2n + p + Lp` |
  |---|---|---|
  | 8 | 47 | 40 |
  | 12 | 55 | 48 |
  | 16 | 63 | 56 |
  | 20 | 71 | 64 |

  The gap is a constant 7 cycles. Latency grows by 2 cycles per operand digit, as
  in the model. The extra cycles come from the second register on each tree
  level, the bias stream, the root adder and the controller.
* **Converter.** Conversion is on-the-fly. It delivers a running value per digit
  and the full word after the last digit, rather than one final bit per cycle.
* **Scope.** The convolution stages, the pooling and the split into two FC layers
  of the full CNN are not included: one 64-to-4 FC layer is. Nothing here is
  constrained for a particular FPGA or checked against a 200 MHz clock.

A generic Yosys synthesis of the top at its defaults gives about 26,800 word-level
cells, 19,700 flip-flop bits and 19,700 memory bits. The memory bits are 4 × 4,096
weight bits plus the register file and the alignment delay lines.

## Files

All files are in `rtl/` (design) and `tb/` (testbenches).

| module | role |
|---|---|
| `ol_pkg` | digit type, online delay, tree-level functions |
| `ol_fc_classifier` | top: K perceptrons, shared feature file, gap criterion, FP alignment |
| `ol_perceptron` | one neuron with controller |
| `ol_mult` | online multiplier |
| `ol_csa_tree`, `ol_csa32`, `ol_sd_delay` | 3:2 reduction tree |
| `ol_add` | online root adder |
| `ol_sd2bin` | on-the-fly converter |
| `ol_threshold` | digit-serial threshold activation |
| `ol_bin2sd` | bias word to digit stream |
| `ol_weight_mem` | bit-plane weight BRAM |
| `ol_input_rf` | feature register file |
| `ol_gap_criterion` | early classification |
| `ol_fp_align` | exponent-first alignment loop |
| `tb_ol_sweep_point` (in `tb/`) | one size point of the latency sweep, used by `tb_ol_latency_sweep` |

Each module's opening comment gives its interface and timing.

## Simulation

Every testbench `tb/tb_<module>.sv` is self-checking. It compares against
integer reference values computed in the testbench. It prints
`TB_RESULT checks=<n> failures=<n>`, and a watchdog ends it if it hangs. To run
one, for example the full layer at its default size:

```
verilator --binary --timing --assert -Irtl rtl/ol_pkg.sv tb/tb_ol_fc_classifier.sv \
          --top-module tb_ol_fc_classifier -o sim
./obj_dir/sim
```

The simulator finds the other modules through `-Irtl`. The package must be listed
first.

What the testbenches check:

* **Per-block tests.** Exact products (including -1/2 × -1/2), tree and adder
  sums, conversion after every digit, and the cycle of each early decision.
* **`tb_ol_perceptron`.** Checks `u` exactly, the digit stream, `y`, the 61-cycle
  latency and recovery after `cancel`, over 60 random and corner-case vectors with
  four weight sets.
* **`tb_ol_latency_sweep`.** Builds four perceptrons with N = 128 and n = 8, 12,
  16 and 20. It checks 8 results of each exactly, checks each latency against the
  formula above, and prints the measured latencies. It needs `-Itb` as well as
  `-Irtl`, because it uses the helper `tb_ol_sweep_point`.
* **`tb_ol_fc_classifier`.** Runs 48 vectors in both modes and checks logits,
  classes and latencies. It also counts that early decisions, full-length
  decisions, exact ties, early-terminated runs, weight-set switches and both
  threshold outcomes all occur. It also exercises the alignment unit.

All testbenches except the sweep run at the default sizes. Each finishes in a few seconds.
