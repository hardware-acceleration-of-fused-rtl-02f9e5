# Online (MSDF) arithmetic for fused CNN layers with early termination

A convolution followed by ReLU and MaxPool throws most of its work away:
every negative pre-activation becomes 0, and three out of four pooled pixels
are discarded. If the arithmetic delivers its results **most significant
digit first** (MSDF, also called online arithmetic), this can be detected
while the result is still being computed: the first non-zero digit tells
the sign, and comparing digit strings from the top tells which pixel of a
pooling window is the largest. The computation of the losing values can then
be stopped, and because digits stream from one operation straight into the
next, a chain of layers can be evaluated without storing intermediate
results.

This repository holds synthesizable SystemVerilog for that scheme:

* an online **multiplier** and an online **inner product unit** whose
  datapath is kept fully busy by generating one partial-product term per
  clock in a fixed order,
* a **microcoded sequencer** that drives one or several of these units,
* **transposed operand buffers** that deliver one digit of every operand
  per read,
* an online **ReLU** and an online **MaxPool** that each raise
  early-termination signals,
* a **fused processing element** that computes one pooling window
  (convolution + ReLU + 2x2 MaxPool) and freezes units as soon as their
  result is known to be irrelevant,
* a **fused layer pair** that chains two layers at digit level: 150 fused
  elements of LeNet-5 layer 1 stream their digits into one layer-2 inner
  product, whose ReLU stops all of layer 1 as soon as the layer-2 output is
  known to be negative,
* the top level `msdf_accel`, which places the fused layer pair and a
  stand-alone multiplier side by side.

Default configuration: 8-digit operands (`N = 8`); layer 1 of the pair uses
25-term inner products (`K1 = 25`, a 5x5 kernel) with 2x2 pooling
(`M = 4`); layer 2 is one 150-term inner product (`K2 = 150`, a 5x5 kernel
over 6 channels). The stand-alone `fused_pe` defaults to `K = 256`.

## Digits

All values are fractions in (-1, 1) written with radix-2 signed digits,
each digit in {-1, 0, +1}: `x = sum_i x_i 2^-i`. The representation is
redundant (`.1-1` and `.01` are both 1/4), which is what allows a digit to
be emitted before all input digits are known.

A digit is the packed struct `msdf_pkg::bsd_t = {pos, neg_n}`: a posibit
and a negabit of equal weight, with the negabit stored **inverted**. Its
value is `pos + neg_n - 1`, so `+1 = 2'b11`, `-1 = 2'b00`, and zero is
`2'b01` (emitted by this library) or `2'b10` (also accepted). With the
negabit inverted, ordinary full adders work on negabits unchanged.

## The balanced online multiplier (`online_datapath`, `online_multiplier`)

### The recurrence

The product is produced by the radix-2 serial-parallel online recurrence
with online delay 2. With `x_i` the digits of x and `Y` the value of y:

    v      = 2 * (v_prev - Z_prev) + 2^-2 * x_i * Y
    Z      = select(v)          (the next product digit)

`select` looks only at a 4-bit estimate `v_hat` of the carry-save residual
(2 integer bits, 2 fraction bits, a 4-bit adder on the top bits of both
vectors) and returns

| v_hat            | digit |
|------------------|-------|
| 0.5 .. 1.75      | +1    |
| -0.5 .. 0.25     | 0     |
| -2 .. -0.75      | -1    |

Truncating both carry-save vectors makes `v_hat` at most 1/2 below `v`;
with these thresholds `|v - Z|` stays within 3/4 because the added term is
below 1/4 in magnitude. The first two rows fill the online delay and give
no digit; the last two digits come from two flush steps with no new term.
After all n digits, `|x*y - p| <= 3/4 * 2^-n`.

### One partial product per clock

A conventional serial-parallel unit needs `Y` in parallel (two's
complement) and a serial-serial unit leaves about half of its digit slices
idle. Here both operands stay in their buffer as digits, and the term
`x_i * Y` is rebuilt for every row by Horner's rule in the **partial
product row register (PPR)**, one single-digit term `P(i,j) = x_i * y_j`
per clock, most significant j first:

    clock of row i    operation
    column 0          PPR      <- P(i,0)
    column 1..n-2     PPR      <- 2*PPR + P(i,j)
    column n-1        residual <- 2*(residual - Z) + 2*PPR + P(i,n-1)
    (after row n-1)   2 flush steps: residual <- 2*(residual - Z)

Every clock therefore adds a term of the same small width, so no barrel
shifter is needed, and one **6:2 carry-save compressor** (`csa_6to2`)
serves both registers. Its six inputs are 2*PPR (sum and carry, muxed to 0
in column 0), the new term, 2*residual (sum and carry, muxed to 0 except at
the end of a row) and a constant for -2Z. PPR and residual are both kept in
carry-save form and are loaded only when the micro-instruction says so.

A multiplication takes `n*n + 2` clocks: **66 clocks for n = 8**. The first
product digit leaves at the end of row 3 (clock `3n`), then one digit per
row, and the last two in the flush steps.

### Fixed-point scaling

Inside the datapath the residual and PPR are integers scaled by `2^F`,
`F = n + 2 + L` (bit F has weight 1), and each carry-save vector is
`W = F + 2` bits wide. The residual stays in (-2, 2), so all arithmetic is
exact modulo `2^W`. In that arithmetic `-2Z * 2^F` is the single bit `F+1`
for Z = +1 and for Z = -1 alike, which is why the sixth compressor input is
one gated bit.

The selected digit is computed from the compressor output in the clock the
residual is loaded and is registered with it (it is the Z of the next
update). This puts selection in series with the compressor; selecting from
the register instead would shorten the path but add a clock of latency.

## Inner product unit (`online_ipu`, `bsd_popcount`)

The inner product `sum_{k=1..K} A_k * B_k` is rewritten as
`sum_i sum_j (sum_k A(k,i) * B(k,j)) 2^-(i+j)`: the sum over k moves inside.
In each clock the unit reads digit plane i of all activations and digit
plane j of all weights, forms the K single-digit products and reduces them
with two popcounts (number of +1 products minus number of -1 products) to
one term in [-K, K]. From there it is the multiplier datapath above, with
the same schedule and the same 66 clocks for any K. Only the popcount and a
few bits of register width grow with K.

The result is scaled by `2^-L`, `L = clog2(K)`, so that it stays inside
(-1, 1): the unit emits the digits of `p = 2^-L * sum A_k B_k`, with
`|p - 2^-L * sum A_k B_k| <= 3/4 * 2^-n`. A consumer that needs the
unscaled value shifts by L.

`online_ipu` holds no sequencer; it takes the micro-instruction and reads
the digit planes named by an external `online_ctrl`, so several units can
share one sequencer. `en = 0` freezes all of its registers.

## Microcoded sequencer (`online_ctrl`)

The schedule is a constant ROM of `n*n + 2` words computed at elaboration
by a function (no data file). A word holds the activation plane address
(row i), the weight plane address (column j) and the control word
`msdf_pkg::uop_t`:

| field     | meaning                                           |
|-----------|---------------------------------------------------|
| pp_en     | add the new term (0 in the flush steps)           |
| ppr_clear | feed 0 instead of 2*PPR (column 0, flush)         |
| ppr_load  | load PPR (all columns but the last)               |
| res_load  | load residual (last column, flush)                |
| res_add   | feed 2*(residual - Z) (not in row 0)              |
| sel_en    | a digit is selected (rows 2..n-1, flush)          |
| last      | last word                                         |

`start` (while idle) runs the program from the next clock; `done` pulses
in the clock after the last word; `kill` aborts at once and sets `killed`.
Operand buffers are read asynchronously so the plane named in a clock is
used in that clock.

## Transposed operand buffers (`transposed_buffer`)

Word d of a buffer is digit plane d of K operands. One read is exactly
what the inner product unit consumes in a clock, so no parallel-to-serial
converter is needed, and every plane is read many times per result (each
weight plane n times). A producer that works MSDF, such as the previous
layer, naturally writes whole planes, most significant first. An extra
element port writes the n digits of one operand.

## Online ReLU (`online_relu`)

Three states: WAIT (only zeros seen; zeros pass), POS (the first non-zero
digit was +1; all digits pass), NEG (it was -1; the output is 0 from that
digit on and `terminate` is high). The string `.00-11111` is negative after
its third digit and the other five digits need not be computed. Output is
combinational, same clock as the input.

## Online MaxPool (`online_maxpool`)

Each input has an *effective* flag, set at the start of a window. At each
digit position the output digit is the largest digit among the effective
inputs; every effective input whose digit is smaller loses its flag and may
stop. The inputs still effective share the output prefix, so the result is
always one input's digit string. For the four inputs

    .1-100'0000   .1001'0101   .1000'-1-100   .001-1'0000

the flags after digits 1..4 are (listing inputs 1..4) TTTF, FTTF, FTTF,
FTFF: three of the four are settled after four digits.

This is the **digit-wise** maximum of redundant strings, which is not always
the numerical maximum: `.1-1-1-1` (1/16) beats `.0111` (7/16). Such cases
are rare with trained networks (around 1 % of pooled outputs), but the
result of a window is only guaranteed to be *one* of its rectified pixels,
within the multiplier accuracy, not always the largest.

## Fused processing element (`fused_pe`)

One element evaluates one pooling window:

    kernel buffer --+--> IPU 0 --> ReLU 0 --+
    act buffer 0 ---+                       |
    ...                                     +--> MaxPool --> out_digit
    act buffer 3 ---+--> IPU 3 --> ReLU 3 --+
                    |
    online_ctrl ----+ (one sequencer for all four units)

Unit m runs while its ReLU has not seen a negative digit **and** the MaxPool
still counts it as effective (`unit_live[m]`); otherwise its registers are
frozen from the next clock. When no unit is left, or `kill_in` is raised by
a consumer further down a fused chain whose own result has become
irrelevant, the sequencer is aborted and `stopped_early` pulses; the digits
not sent are then 0. A complete window takes 66 clocks and sends 8 digits.

Loading: `wr_en`, `wr_buf` (0..M-1 selects a pixel's activation buffer, M
the kernel), `wr_addr` (digit plane), `wr_plane` (K digits). Statistics,
accumulated over runs: `cnt_relu_stop` (pixels stopped by ReLU),
`cnt_pool_stop` (pixels stopped by MaxPool), `cnt_early_stop` (windows
ended early), `cnt_kill` (of those, by `kill_in`) and
`cnt_skipped_unit_cycles` (clocks a unit did not compute, including the
rest of an aborted program for all units).

## Fused layer pair (`fused_layer_pair`)

The pair computes one layer-2 output pixel of a two-layer network from
scratch, with both layers overlapped digit by digit:

    150 x fused_pe (layer 1) --digits--> plane store --+
                                                       +--> IPU (150 terms) --> ReLU --> out_digit
    layer-2 kernel buffer ------------------------------+        ^
    online_ctrl (layer 2) -------------------------------------- +
              kill <-- ReLU negative (backward termination) -- all layer-1 elements

Every layer-1 element is a `fused_pe` with `K1 = 25` terms; all start
together. Each writes the digits of its pooled, rectified result into
column p of a digit-plane store (N planes of K2 digits), which is the
activation operand of the layer-2 unit. Layer 2 has its own sequencer and
starts `3n` clocks after layer 1, when the first layer-1 digits exist; since
a unit consumes digit j of its activation operand only at row j of its
program, and layer 1 produces digit j no later, layer 2 never waits. A
complete run therefore takes `3n + 1 + n*n + 2 = 91` clocks for `n = 8`
instead of `2 * 66 = 132` for the two layers run one after the other, and
no layer-1 result needs to be stored in full before layer 2 starts.

Backward termination: as soon as the layer-2 ReLU sees a negative leading
digit, the layer-2 output is 0 whatever follows, so every layer-1 element
that is still running is killed together with layer 2 (`stopped_early`
pulses, `cnt_backward_kill` counts kills that reached running layer-1
elements). With large positive layer-1 activations and a negative kernel
the run ends after 51 clocks with all 150 elements still busy. `kill_in`
does the same on behalf of a further layer. Layer-1 digits not produced
because an element stopped on its own are 0, which is their value.

Loading: layer-1 buffers through `wr_en`, `wr_pe` (element), `wr_buf`,
`wr_addr`, `wr_plane` (as `fused_pe`); the layer-2 kernel through
`w2_wr_en`, `w2_wr_addr`, `w2_wr_plane`. `l1_busy` shows which layer-1
elements still run; `cnt_l1_relu_stop`, `cnt_l1_pool_stop` and
`cnt_l1_early_stop` sum the layer-1 statistics (the last counts elements
that stopped on their own, not by a kill).

## Top level (`msdf_accel`)

`fl_*` ports are those of the fused layer pair, `mul_*` those of the
stand-alone multiplier (which reads its operands through `mul_x_idx` /
`mul_y_idx` from a buffer outside the top). One clock, one active-low
asynchronous reset. Reset clears all control and datapath registers; the
operand buffers are not reset and must be loaded before a run.

## What is this design's own

The arithmetic (digit set, selection function, online delay, the row-by-row
PPR schedule, the 6:2 compressor, the popcount merging, the n*n+2 cycle
count), the ReLU state machine and the MaxPool algorithm follow the scheme
this design implements. The following are choices made here:

* the fixed-point scaling (`F = n + 2 + L`, `W = F + 2`) and the `2^-L`
  scaling of inner products;
* selecting the digit from the compressor output rather than from the
  residual register (keeps the 66-clock count, longer critical path);
* the inside of the 6:2 compressor (four rows of 3:2 counters) and of the
  popcount;
* the microcode word layout, the start/done/kill handshake and the
  asynchronous-read buffer interface;
* the organisation of the fused element (one window per element, lock-step
  units sharing the sequencer and kernel buffer) and the zero tail after an
  early stop;
* in MaxPool, the maximum digit is taken over effective inputs only;
* the layer pair's plane store, its 3n-clock start offset for layer 2 and
  its kill wiring (the scheme states only that a negative layer-2 ReLU
  output lets all work of the earlier layer stop).

Not built: an array computing all 16 x 10 x 10 layer-2 pixels (the pair
computes one, and recomputes the overlapping layer-1 outputs that
neighbouring layer-2 pixels share), the layer-2 MaxPool after the pair,
the fully connected and softmax layers, and the conventional serial-serial
online units the scheme is usually compared against.

## Sizes

| k (terms)    | clocks per result | where it fits                                  |
|--------------|-------------------|------------------------------------------------|
| 8 .. 128     | 66                | the pair's layer-2 unit (K2 = 150)             |
| 150          | 66                | LeNet-5 layer 2, the top's default             |
| 256          | 66                | `fused_pe` default; `online_ipu` with K = 256  |
| 512, 1024    | 66                | `online_ipu` with that `K`                     |

A LeNet-5 layer-1 window is 25 terms, a layer-2 window 150 terms, fully
connected layers 256, 120 and 84 terms. The default top holds 150 layer-1
elements, i.e. 600 inner product units of 25 terms, plus the 150-term
layer-2 unit: about 300 kbit of operand buffers (each element keeps five
buffers of 8 x 25 two-bit digits). It is large by construction, since every
layer-1 output under one layer-2 pixel has its own element.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench              | what it shows                                                                 |
|------------------------|-------------------------------------------------------------------------------|
| `tb_csa_6to2`          | sum + carry equals the total of the six inputs (random, corners)              |
| `tb_online_select`     | all 256 estimate combinations against the selection table                    |
| `tb_bsd_popcount`      | 3000 random planes, both zero encodings                                       |
| `tb_online_datapath`   | all 6561 pairs of 4-digit operands, schedule driven by the testbench         |
| `tb_online_ctrl`       | every micro-instruction of the program, 66-clock length, kill                |
| `tb_online_multiplier` | 400 products: value bound, 8 digits, first digit at row 3, 66 clocks, kill   |
| `tb_online_ipu`        | 300 inner products at K = 8: value bound, timing, en = 0 freeze              |
| `tb_ipu_sizes`         | K = 8 .. 1024 in one run: 66 clocks and value bound at every size            |
| `tb_transposed_buffer` | plane and element writes against a reference array                           |
| `tb_online_relu`       | both worked examples, 500 random strings                                      |
| `tb_online_maxpool`    | the worked example trace, 500 random windows against the lexicographic max   |
| `tb_fused_pe`          | LeNet-5 layer-1 windows (K = 25): result, timing, every termination path     |
| `tb_fused_layer_pair`  | reduced pair (K1 = 9, K2 = 12): layer-1 and layer-2 values, 91 clocks, backward and external kills |
| `tb_msdf_accel`        | default size: LeNet-5 layers 1 and 2 fused, plus multiplier products         |

The value check everywhere is independent of the digit algorithm: the
testbench computes the exact integer product or inner product and requires
the digit string to lie within `3/4 * 2^-n` of it (for the fused element,
of the rectified value of at least one pixel). The fused-element, layer-pair and top
testbenches count each mechanism (ReLU stop, MaxPool stop, early stop of a
whole window, downstream kill, backward kill from layer 2, complete run,
killed multiplication) and fail if one never happened. The top testbench
takes about a minute to build and 25 s to run. The data are random digits, not trained LeNet-5
weights, so the termination rates seen say nothing about those of a real
network.

## Simulating

Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_msdf_accel \
        -y rtl -y tb +libext+.sv rtl/msdf_pkg.sv tb/tb_msdf_accel.sv
    ./obj_dir/Vtb_msdf_accel

Replace `tb_msdf_accel` by any testbench name. `msdf_pkg.sv` must be read
first; the other files are found by module name. Every simulation above
finishes in well under a second. Parameters: `N` (digits), `K` (terms),
`M` (pooled pixels); all widths follow from them.
