# Coefficient-segmented FIR filter

In a multiply-accumulate FIR filter most of the dynamic power goes into the
multiplier, and much of that comes from its coefficient input changing from one
tap to the next. This design cuts that activity by **segmenting** each
coefficient:

    h_k = s_k + m_k      s_k = +/- 2^e  (a power of two)
                         m_k = the remainder, small by construction

The product `h_k * x` then becomes `(x << e) +/- (m_k * x)`. The power-of-two
part is a shift, which costs far less than a multiplication. Only the small
remainder `m_k` reaches the multiplier. A small `m_k` has few significant bits.
Under the two's complement rule it also never changes sign, so its upper bits
do not toggle between taps.

The RTL is a complete, parameterisable time-multiplexed FIR filter built around
this idea. It covers three number representations, two segmentation rules, a
Baugh-Wooley two's complement array multiplier and a sign-magnitude array
multiplier. Everything is synthesizable SystemVerilog (IEEE 1800-2017).

## Splitting a coefficient (`coef_segmenter`)

Both rules start from the smallest exponent `i` with `2^i >= |h|`.

**Two's complement rule** (`REPR_TWOS`). It keeps every `m_k >= 0`, so the
multiplier's coefficient operand never swings between positive and negative
and its sign-extension bits stay still:

| case                    | s_k        | m_k              |
|-------------------------|------------|------------------|
| `|h|` is a power of two | `h`        | 0                |
| `h > 0`                 | `2^(i-1)`  | `h - 2^(i-1)`    |
| `h < 0`                 | `-2^i`     | `h + 2^i` (>= 0) |

**Sign-magnitude rule** (`REPR_SIGNMAG` and `REPR_MIXED`). A sign-magnitude
operand has no sign extension, so `m_k` may be negative. The rule therefore
takes the *nearer* power of two, which makes `|m_k|` as small as possible:

* if `||h| - 2^i| < ||h| - 2^(i-1)|`, then `s = 2^i` and `m = |h| - 2^i` (`m <= 0`);
* otherwise `s = 2^(i-1)` and `m = |h| - 2^(i-1)`;
* if `h < 0`, both are negated.

Examples with 8-bit coefficients:

| h    | two's complement rule | sign-magnitude rule |
|------|-----------------------|---------------------|
| 127  | 64 + 63               | 128 + (-1)          |
| 7    | 4 + 3                 | 8 + (-1)            |
| 96   | 64 + 32               | 64 + 32 (a tie takes the lower power) |
| -100 | -128 + 28             | -128 + 28           |
| -128 | -128 + 0              | -128 + 0            |
| 0    | 0 + 0                 | 0 + 0               |

In both rules `|m_k| < 2^(W-2)`, and the shift exponent is at most `W-1`. The
segmenter is combinational. It returns `s` as an exponent, a sign and a zero
flag. The zero flag is set only for `h = 0`: the rules above would need
`2^-1` for it, so this design handles it as a special case. The segmenter sits
in front of the coefficient memory, so each coefficient is split once, as it is
written, and never again while the filter runs.

## Number representations

The parameter `REPR` (type `seg_pkg::repr_e`) selects one of three
configurations. Each one uses the matching segmentation rule and multiplier:

| REPR                   | samples  | m_k in memory    | multiplier | product handling |
|------------------------|----------|------------------|------------|------------------|
| `REPR_MIXED` (default) | two's    | sign-magnitude   | Baugh-Wooley, fed `{0, |m_k|}` | MSB of `m_k` selects add or subtract |
| `REPR_TWOS`            | two's    | two's (>= 0)     | Baugh-Wooley | always added |
| `REPR_SIGNMAG`         | sign-mag | sign-magnitude   | sign-magnitude array | product sign selects add or subtract |

Mixed mode is the default. Most DSP datapaths have a two's complement
multiplier, and this mode still gets most of the benefit of sign-magnitude
coefficients. The multiplier only ever sees a non-negative coefficient, and the
sign moves to an adder-subtractor behind it. This is the same as choosing
between a multiply-accumulate and a multiply-subtract instruction on a DSP.
In `REPR_SIGNMAG`, samples enter as `{sign, magnitude}` and the output is
still two's complement, because the add or subtract performs the conversion.

## Datapath and schedule (`seg_fir`)

    coef_i -> coef_segmenter -> coef_memory[k]
                                  |                  |
                                  | m_k              | s_k (exponent, sign, zero)
                                  v                  v
    x_i -> data_memory --x[n-k]-> multiplier         barrel_shifter <-- x[n-k]
                                  |                  |
                                  v                  v
                       +/- (sign of m_k)        +/- (sign of s_k)
                                  |                  |
                                  +----> acc <-------+      acc: one sum over N_TAPS cycles
                                          |
                                          +--> y_o

    fir_control drives k, the data address of x[n-k], accumulator clear/enable
    and the x and coefficient handshakes.

One multiplier, one shifter and one accumulator serve all `N_TAPS` taps:

* **Idle.** `x_ready_o` and `coef_ready_o` are high. Coefficient writes are
  accepted only in this state. A write while busy is ignored.
* **Accept.** At the edge where `x_valid_i && x_ready_o`, the sample goes into
  the circular data memory at the write pointer.
* **Run, `N_TAPS` cycles.** In cycle `k`, the coefficient word `k` and the sample
  `x[n-k]` (newest minus `k`, modulo `N_TAPS`) are read asynchronously. The shifter
  forms `x << e_k` and the multiplier forms `x * m_k`. In a single cycle the
  accumulator computes `acc <- (k == 0 ? 0 : acc) +/- product +/- shifted`.
* **Output.** After the last tap `y_valid_o` pulses for one cycle. `y_o` is the
  accumulator register. It keeps its value until the first tap of the next
  sample. `x_ready_o` is high again in the same cycle, so a waiting sample is
  taken at once.

**Timing:** a sample accepted at clock edge e0 gives `y_valid_o` in the cycle
after edge e`N_TAPS`, a latency of `N_TAPS` cycles. Throughput is one sample
per `N_TAPS + 1` cycles. Reset (`rst_n`, asynchronous, active low) clears the
sample history, the accumulator and the controller. The coefficients are not
reset: load all `N_TAPS` of them after reset. A filter shorter than `N_TAPS`
is loaded with zeros in the unused taps. A zero coefficient costs nothing in
the shifter, because the zero flag suppresses that term, and its `m_k = 0`.

`y_o` is the full-precision sum, `ACC_W = 2*W + clog2(N_TAPS)` bits wide. No
rounding or saturation is applied, and no overflow is possible.

## Multipliers

* `baugh_wooley_mult`: W x W two's complement array multiplier. It forms
  partial products with AND gates. The partial products that involve exactly
  one sign bit are inverted, and the constant `2^W + 2^(2W-1)` is added. The
  rows are summed by one ripple-carry row of full adders (`ripple_adder`, made
  of XOR, AND and OR gates) per multiplier bit.
* `sm_array_mult`: sign-magnitude array multiplier. It multiplies the
  `(W-1)`-bit magnitudes with the same kind of array, and the product sign is
  the XOR of the operand signs. A zero product can come out as "-0", which the
  accumulator treats as zero.

Both are plain gate arrays, so gate-level switching activity can be measured
in them. Neither is pipelined. The row-by-row ripple organisation was chosen
for clarity, not for speed.

## Parameters (`seg_fir`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N_TAPS`  | 89      | number of taps. 89 is the longest of the ten reference filters, whose lengths range from 32 to 89. |
| `W`       | 16      | sample and coefficient width. The reference sizes are 8, 16 and 24 bits. |
| `REPR`    | `REPR_MIXED` | number representation, see above |
| `ACC_W`   | `2*W + $clog2(N_TAPS)` = 39 | output and accumulator width |

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

* `tb_coef_segmenter`: every 8-bit coefficient under both rules, and random
  and corner 16-bit coefficients. The reference walks the algorithm literally
  (`i = i + 1` until `2^i >= |h|`).
* `tb_baugh_wooley_mult`, `tb_sm_array_mult`: every 8x8 operand pair, and
  random and corner operands at 16 and 24 bits.
* `tb_barrel_shifter`, `tb_data_memory`, `tb_coef_memory`, `tb_add_sub_acc`,
  `tb_fir_control`: unit checks, including the address sequence and the
  `N + 1` cycle rate of the controller.
* `tb_seg_fir`: four small filters side by side, 8 taps at 8 bits in each
  representation and 13 taps at 16 bits in mixed mode. They get corner-case and
  random coefficient sets, a coefficient reload and random gaps between
  samples. Every output is compared with a direct convolution of the *raw*
  coefficients, and the latency of every output is checked. The testbench
  counts stalls, back-to-back samples, refused coefficient writes, zero
  coefficients, pure shifts and subtractions, and fails if any of them never
  occurs.
* `tb_seg_fir_full`: the default configuration (89 taps, 16 bits, mixed
  mode). It loads an 89-tap Blackman lowpass and checks 300 outputs.
* `tb_seg_fir_workloads`: ten reference filters, run at 8, 16 and 24 bits in
  all three representations. There are five lowpass and five bandpass
  filters, 32 to 89 taps, with Hamming, Kaiser and Blackman windows.

The last two testbenches also count the bit toggles at the multiplier's
coefficient input between consecutive taps. They compare that count with what
the raw two's complement coefficients would cause there. These are results
from one run, over ten window-designed filters, 60 random samples each:

| W  | mixed | two's | sign-magnitude |
|----|-------|-------|----------------|
| 8  | 75 % fewer | 68 % fewer | 65 % fewer |
| 16 | 46 % fewer | 37 % fewer | 40 % fewer |
| 24 | 30 % fewer | 25 % fewer | 26 % fewer |

These figures count toggles at the operand input only. They are not a power
figure: they leave out toggles inside the multiplier array, wire capacitance
and the shifter's own cost. The shifter's cost is small next to the
multiplier's: a few percent of an array multiplier of the same width. The
reduction shrinks as the wordlength grows, because the remainder `m_k` keeps
more significant bits.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/seg_pkg.sv tb/tb_seg_fir.sv --top-module tb_seg_fir
    ./obj_dir/Vtb_seg_fir

Replace `tb_seg_fir` with any other testbench name. All of them finish in
seconds.

## Where this design goes beyond its source

The source design describes the segmentation algorithm, the three
representations, the two multiplier types and a mixed-mode filter
architecture: coefficient memory, data memory, two's complement multiplier,
an add/sub steered by the coefficient MSB, an accumulator and a control block.
The following are this implementation's own choices:

* **The shift path.** The source architecture drawing shows no shifter. Here a
  barrel shifter on the data-memory output feeds a second add/sub into the same
  accumulator cycle. A two-cycle-per-tap schedule through a single adder would
  work as well.
* **Segmentation in hardware.** Originally the coefficients were segmented
  offline. Here the segmenter sits in front of the coefficient memory, so raw
  coefficients can be loaded.
* **Controller, handshakes, memory organisation, reset and widths.** None of
  these are specified in the source. The asynchronous-read register files
  would become synchronous SRAM in a real implementation, which would add one
  pipeline stage.
* **Zero coefficients.** `h = 0` is handled as `s = 0, m = 0`.
* **Ties in the sign-magnitude rule** take the lower power of two, as the
  strict `<` in the rule implies.
* **Reference filters.** The original coefficient sets were Parks-McClellan
  and window designs that are not published. The workload testbench
  re-designs the ten filters by the window method from their band edges and
  lengths. The sampling rate is taken as twice the highest band edge, and a
  Hamming window is used where none is named. The toggle counts above are
  therefore indicative only.
* **Power figures.** The source reports switched capacitance from a 0.7 um
  layout, with reductions of roughly 27 % to 86 % depending on size and
  representation. That cannot be reproduced from RTL. Only the toggle proxy
  above is provided.
