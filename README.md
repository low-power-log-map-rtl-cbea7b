# Log-MAP turbo decoder with reduced backward-metric memory access

A sliding-window log-MAP (BCJR) decoder spends much of its power writing every
backward state metric of a window to memory and reading it back in the forward
pass. This design writes only a small fraction of them. The backward recursion
of a trellis butterfly can be inverted: given the two backward metrics of
time *k* and the branch metric, the two metrics of time *k+1* can be
recomputed. During the forward pass the decoder therefore recovers most of the
metrics at time *k+1* from those at time *k*. It stores only the metrics whose
inversion is numerically ill-conditioned. An 8-bank metric memory lets each
state be written and read on its own, so only the metrics that are needed
cause an access.

The RTL implements this method for the 8-state constituent code of the W-CDMA
turbo code. It has two such log-MAP decoders in an iterative turbo decoder.
The method comes from the paper *Low-Power Log-MAP Turbo Decoding Based on
Reduced Metric Memory Access*. The paper gives the equations, thresholds,
memory sizes and block structure. The fixed-point formats, the window
schedule, the buffering and all interfaces are this implementation's own.
The last section lists where it departs from the paper.

## The trellis and its butterflies

The constituent encoder is the W-CDMA recursive systematic code: feedback
1 + D² + D³, parity 1 + D + D³. State `s = {a[k-3], a[k-2], a[k-1]}`, and the
new register bit enters at the LSB. States *j* and *j+4* (j = 0..3) both lead to states
*2j* and *2j+1*, which gives four butterflies. Flipping the oldest register bit
flips both the input and the parity bit of a branch. Inside a butterfly, two
branches therefore carry the metric *g* and two carry *−g*. Here *g* is the
metric of branch *j → 2j*:

```
beta_k(j)   = max*(beta_{k+1}(2j) + g, beta_{k+1}(2j+1) - g)
beta_k(j+4) = max*(beta_{k+1}(2j) - g, beta_{k+1}(2j+1) + g)
```

Branch metrics are `gamma(d,c) = 0.5·(d·(ys+La) + c·yp)`, with d the
systematic and c the parity bit (±1). `branch_metric` computes γ(1,1) and
γ(1,−1) and negates them for the other two. This makes γ(−d,−c) = −γ(d,c)
hold bit for bit, which the inversion needs. `turbo_pkg` holds the trellis
functions; `pair_gamma_idx(j)` selects *g* for butterfly *j*.

## Recovering backward metrics (the core of the design)

Solving the two butterfly equations for the metrics at *k+1* gives, for the
even next state:

```
e^beta_{k+1}(2j) = (e^(beta_k(j)+g) - e^(beta_k(j+4)-g)) / (e^(2g) - e^(-2g))
```

In the log domain, `ln|e^x − e^y| = min(x,y) + L(|x−y|)` with
`L(v) = ln(e^v − 1)`. This turns the quotient into

```
beta_{k+1}(n) = min(x, y) + L(|x - y|) + 2|g| - L(|4g|)
  n = 2j   : x = beta_k(j)   + g,  y = beta_k(j+4) - g
  n = 2j+1 : x = beta_k(j+4) + g,  y = beta_k(j)   - g
```

`L` has three regions:

| argument v          | L(v)                                                    |
|---------------------|---------------------------------------------------------|
| v < Th = 0.75       | falls steeply towards −∞; no small table can follow it |
| 0.75 ≤ v < Th2 = 2.0 | 5-entry table: round(4·ln(e^v − 1)) = 0, 2, 4, 5, 6 LSB |
| v ≥ 2.0             | v (the curve has met the line y = x)                    |

Th is ln 2 rounded onto the 0.25 grid.

This gives the rule that decides storage (`approx_check`). During the backward
pass, after β_k is computed from β_{k+1}, each β_{k+1}(n) is tested. It is
**recoverable** if `|x − y| ≥ Th` and `|4g| ≥ Th`. Otherwise it is written to
the metric memory. The test costs a subtraction, two shifts and two
comparisons per state.

`approx_flag` keeps one 8-bit flag word per time index of the window (32 × 8
bits). In the forward pass, `siso_decoder` reads the flag word for time *k*.
Each β_{k+1}(n) then comes either from its memory bank (flag clear) or from
`reverse_calc` (flag set). `reverse_calc` always works from the β_k the
forward pass currently holds. That β_k may itself have been recovered, so
small errors can carry from one step to the next until a stored metric
replaces them. An argument below Th cannot come from the backward-pass test
itself. It can only appear through such a carried error, and it is clamped to
the Th table entry.

**Why modulo arithmetic.** Stored and recovered metrics are mixed state by
state in one vector. They must therefore share a common offset. Normalising
the metrics by subtracting a value at each step would give stored and
recomputed metrics different offsets. All α and β metrics are therefore 9-bit
numbers that wrap around and are never normalised. Every max, min and
threshold test works on a wrapped difference, sign-extended where needed.
The channel and a-priori widths are kept small enough that the spread of
the metrics stays below half the 9-bit range.

**Bank organisation.** `beta_mem` has NBANKS separately enabled banks, 32
words deep. With the default of 8, each state has its own 32 × 9-bit bank, and
only the metrics that must be stored are accessed. With 4, 2 or 1 banks, one
word holds 2, 4 or 8 neighbouring states. A word is then stored (and its flags
cleared) if any of its states fails the test. Fewer banks thus mean more
accesses, each of them wider.

## Window schedule (`siso_decoder`)

A block of `n_len` symbols is processed in windows of W = 32, in increasing
order. Each window runs three passes, one trellis step per clock:

1. **ACQ**: a training backward recursion over the next window, starting
   from equal metrics. It supplies β at the end of the current window. The
   last window skips it and starts from equal metrics (no trellis termination
   is assumed).
2. **BWD**: the backward recursion from the end of the window to its head.
   At step *k* this pass:
   - writes the flags of β_{k+1};
   - writes the non-recoverable β_{k+1}(n) to their banks;
   - writes ys+La and yp to the branch memory (`branch_mem`).

   The β register ends up holding β at the head of the window.
   One turnaround clock (TURN) then issues the first memory read.
3. **FWD**: the forward recursion from the head. At step *k* this pass:
   - rebuilds γ_k from the branch memory;
   - assembles β_{k+1} from memory and reverse calculation;
   - computes the LLR from α_k, γ_k and β_{k+1} (`llr_unit`, two 8-input
     max* trees);
   - advances α and β.

α carries over from window to window. It starts at 0 for state 0 and −16.0
for the other states.

Timing: `3·n_len − min(W, n_len) + ceil(n_len/W)` clocks from `start` to
the last output, a little over 3 clocks per symbol for long blocks. Outputs (`out_idx`, `out_llr`,
`out_ext = LLR − (ys+La)` saturated to 6 bits, `out_hard`) appear one clock
after their forward step. `done` pulses after the last output. The decoder
reads its inputs through `in_addr` and expects `{in_ys, in_yp, in_la}` in the
same cycle. The metric and branch memories behave like synchronous SRAMs:
read data appear one clock after the read enable and are held until the next
read of that bank. The forward pass therefore reads one step ahead, using
the flags of the next time index. It registers those flags (`sel_q`) to
choose, in the next clock, between the memory word and the reverse
calculation for each state. The flag memory is a register file read in the
same cycle. `mem_wr` and `mem_rd` expose the bank enables for activity
measurement.

## Number formats

All soft values are two's complement with 2 fractional bits (LSB = 0.25):

| quantity                          | bits |
|-----------------------------------|------|
| channel sample ys, yp             | 5    |
| a-priori / extrinsic              | 6    |
| ys + La                           | 7    |
| branch metric                     | 8    |
| state metric α, β (modulo)        | 9    |
| LLR                               | 12   |

The max* correction `ln(1+e^−d)` is 3, 2, 2, 2, 1, …, 1, 0 LSB for
d = 0, 1..3, 4..8 and ≥ 9.

## Turbo decoder (`turbo_decoder`, top level)

Decoder 1 works on the natural order with parity stream 1. Decoder 2 works on
the interleaved order with parity stream 2. Each uses the other's extrinsic
output as a-priori input. The permutation π is a loadable table
(`interleaver`), used in two ways:

- Interleaving: decoder 2 fetches systematic data and a-priori values from
  natural address π(k).
- Deinterleaving: decoder 2 writes its extrinsic value and hard decision
  back to π(k).

The frame buffers (systematic, two parity, two extrinsic, decisions) hold
N_MAX = 5114 entries, the largest W-CDMA block. One iteration is decoder 1
followed by decoder 2; in the first iteration decoder 1 has no a-priori input.

Use:

1. Load the data. Before decoding:
   - write the systematic samples through `sys_*`;
   - write π through `pi_*`;
   - send the parity samples through `par_valid`/`par_data`, after one
     `par_clear`, in the order z₀, z′₀, z₁, z′₁, …; the `demultiplexer`
     sorts them into the two parity buffers. Its outputs are registered, so
     a sample reaches its buffer one clock later than the other loads; leave
     at least one clock between the last `par_valid` and `start`.
2. Pulse `start` with `n_len` (1..5114) and `n_iter` (1..31).
3. Wait for `done`. This takes `n_iter · 2 · (3·n_len − min(32, n_len) + ceil(n_len/32) + 2)`
   clocks.
4. Read the decisions through `dec_addr` → `dec_bit`.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
`tb/tb_ref_pkg.sv` is an integer reference model written directly from the
equations, without wrap-around. The testbenches compare the RTL with it bit
for bit:

- the arithmetic units, on random operands placed around the wrap point;
- `siso_decoder`, on every LLR, extrinsic value, decision and index, plus the
  cycle count and the number of bank writes and reads, for two block lengths
  and two bank organisations;
- `turbo_decoder`, on every decoded bit of blocks of 40, 300 and 5114 bits
  (2, 4 and 8 iterations), plus the cycle count. It also requires each
  mechanism to occur at least once: skipped writes, bank reads, table and
  linear regions of L, the training pass, a short last window, extrinsic
  saturation and repeated iterations.

`tb_reverse_calc` also checks that a recovered metric is within 1.0 of the
true one.

`tb_access_rate` runs four turbo decoders with 1, 2, 4 and 8 banks on the same
Gaussian-noise frames (640 bits, 8 iterations, 0 to 10 dB). It reports the access rate:
the bits moved to and from the metric memory, relative to storing all
72 bits of every time index. Measured:

| Eb/N0 | 1 bank | 2 banks | 4 banks | 8 banks |
|-------|--------|---------|---------|---------|
| 0 dB  | 0.67   | 0.57    | 0.35    | 0.21    |
| 1 dB  | 0.85   | 0.53    | 0.32    | 0.16    |
| 2 dB  | 0.89   | 0.56    | 0.33    | 0.17    |
| 4 dB  | 0.96   | 0.62    | 0.38    | 0.19    |
| 6 dB  | 0.99   | 0.67    | 0.41    | 0.21    |
| 8 dB  | 0.99   | 0.69    | 0.41    | 0.21    |
| 10 dB | 0.99   | 0.70    | 0.39    | 0.21    |

For comparison, the paper reports 0.57 / 0.29 / 0.18 / 0.10 at 2 dB.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/turbo_pkg.sv tb/tb_ref_pkg.sv tb/tb_turbo_decoder.sv \
    --top-module tb_turbo_decoder -o sim && ./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M`. The full-size
turbo-decoder test takes well under a minute.

## Departures from the paper and open points

- **Odd-state test.** The paper states the storage test for β_{k+1}(2j) and
  says the remaining states use "equal" conditions. Here each state uses its
  own exponent difference (`β_k(j+4) − β_k(j) + 2g` for 2j+1), which is the
  one its inversion actually needs. This is a likely reason why the measured
  access rates, in particular for 1 and 2 banks, are higher than the
  paper's. The literal reading (the even state's test reused for the odd
  state) was also simulated. It lowered the 8-bank access rate to about
  0.22, but the recovered odd-state metrics were then often wrong, and 44
  of 640 bits stayed in error at 4 dB. It was rejected. The paper's fixed-point scheme is not given either.
- **Access rate and SNR.** The paper's success rate improves with SNR. Here
  it is nearly flat from 1 dB up (0.16 to 0.21 for 8 banks), and the 1-bank rate worsens, probably because with
  saturated extrinsic values, one successor dominates more often, and the
  other successor then fails the test.
- **Schedule and throughput.** The passes run one after another with one
  backward unit: about 3 clocks per symbol. The paper does not describe
  its schedule. It quotes about 95 MHz for 2 Mbit/s with 8 iterations; this
  design reaches 1.96 Mbit/s at 95 MHz for a 5114-bit block.
- **Memories.** The paper uses compiled SRAMs and adds registers to hide
  control delay. Here the metric and branch memories are arrays with SRAM
  timing (synchronous read), so a compiled macro can replace them. The
  read-ahead costs one turnaround clock per window. The flag memory keeps
  a same-cycle read.
- **Interleaver.** The W-CDMA interleaver rule is not implemented. π is
  loaded as a table, so the standard's permutation can be supplied from
  outside.
- **Window boundaries.** The training pass, the unterminated block end and
  the α start values are this design's choices.
- **Two decoder instances.** The top has two decoder instances, as in the
  usual two-decoder drawing. They never run at the same time, so one
  time-shared instance would do.
- **Power.** Power figures are not reproduced. `mem_wr`/`mem_rd` give the
  access counts from which memory power can be estimated.

## Files

`rtl/`: `turbo_pkg` (types, formats, trellis, tables), `maxstar`,
`branch_metric`, `beta_unit`, `alpha_unit`, `approx_check`, `reverse_calc`,
`approx_flag`, `beta_mem`, `branch_mem`, `llr_unit`, `siso_decoder`,
`interleaver`, `demultiplexer`, `turbo_decoder` (top).
`tb/`: one `tb_<module>.sv` per module, `tb_access_rate.sv`, `tb_ref_pkg.sv`.
