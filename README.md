# RSD-coded driving of a binary-weighted current-steering DAC

A binary-weighted current-steering DAC is the simplest DAC to lay out:
N cells of 1, 2, 4, ... 2^(N-1) unit currents, each steered into one of two
loads. It behaves badly on signals with a high crest factor, such as OFDM,
where most samples are small. In two's complement, a small positive sample
and a small negative one differ in every bit. So the largest cell (and the
next ones) toggles at nearly every zero crossing, even though the output
barely moves. Each toggle injects that cell's static and dynamic error, and
the cell is the one with the largest absolute error.

This design keeps the plain binary-weighted array but drives it with
*redundant signed digits* (RSD). Each cell gets a digit S in {-1, 0, +1}
instead of a bit, and the digits are chosen so that a small sample gets 0 in
all the large cells. A cell whose digit is 0 delivers no net current. For
small signals the large cells therefore sit still, and their errors stay out
of the output. The recoding is a short pipeline of identical compare-and-
double stages. The only change to the analog side is that every cell is
split into two half-weight sources, so that it can deliver +I, 0 or -I.

```
 din (12 b) ──► rsd_coder ──► switch_driver ──► sw_a, sw_b ──► current_steering_array ──► v_out
 alpha (12 b) ─┘  12 stages,    digit → 2 switch     (24 switch   (behavioural model,
                  12 cycles     controls, 1 cycle     controls)    two loads R_L, R'_L)
```

Setting the decision level alpha to 0 turns the same hardware into a
conventional binary-weighted DAC. That makes side-by-side comparison easy.

## The recoding stage

Each stage receives a residue D in (-1, 1), emits one digit and passes a new
residue on:

```
S = +1   if  D >=  alpha
S =  0   if  -alpha < D < alpha
S = -1   if  D <= -alpha
D_next = 2*D - S
```

With alpha = 0 the middle band is empty. The stage then emits the sign of D,
and the cascade produces ordinary offset-binary bits (digit +1 for bit 1,
-1 for bit 0). With 0 < alpha <= 0.5 a residue near zero is simply doubled,
and its digit is 0. For any alpha in [0, 0.5] the new residue stays inside
(-1, 1), so every stage has the same number format. Above 0.5 the residue
would overflow, so the coder clips alpha to 0.5.

The transfer curve of a stage is a sawtooth. For binary coding it has one
jump, at D = 0. For RSD coding it has two jumps, at ±alpha, with a segment
of slope 2 through the origin in between. Because the digits are redundant,
one value has many digit strings. The choice of alpha only decides which
string is used; it never changes the value represented.

An input of alpha/3 shows the effect. Stage 1 sees alpha/3 and stage 2 sees
2*alpha/3, so both emit 0. Only from stage 3 on, once the residue
4*alpha/3 has crossed alpha, do non-zero digits appear. The two largest
cells carry no net current for this sample.

## Number format and why the conversion is exact

The 12-bit two's-complement input word x is read as the fraction

```
D_in = (2x + 1) / 2^N        (N = 12)
```

In hardware this is the word with a 1 appended: `{din, 1'b1}`. These
values are the odd multiples of 2^-N. They lie strictly inside (-1, 1),
symmetric about zero, and no input lands exactly on 0. Every residue is
kept as an (N+1)-bit signed integer d with D = d / 2^N. A stage computes
`2*d - S*2^N` and drops the top bit, which is redundant while D stays in
(-1, 1).

This choice makes the N-digit expansion exact for every alpha in [0, 0.5]:

```
D_in = sum_{j=1..N} S_j * 2^-j         equivalently   sum_b S_b * 2^b = 2x + 1
```

Here b = N - j is the weight index of stage j. The argument is short. The
residue entering stage j is an odd multiple of 2^-(N-j+1), so it is never 0.
It always reaches the last stage as ±1/2, which that stage (alpha <= 1/2)
turns into a digit of ±1 and a final residue of exactly 0. The coder checks
this with an assertion.

The DAC output is therefore `v_out = R_L * I_LSB * (2x + 1)`, whatever alpha
is. RSD and binary coding produce the same ideal output; they differ only in
which sources carry it. The scale is symmetric about zero. Code x = 0 gives
+1 unit, not 0, and code -1 gives -1 unit.

## Pipeline and timing (`rsd_coder`)

The N stages are combinational (`rsd_stage`). The coder registers the
residue after every stage, so each clock adds one stage of logic: one
comparison and one add of a constant. The digit of stage j is decided j
cycles after the word enters. A per-stage shift register of length N - j
delays it, so that all N digits of one word leave on the same clock edge.

| path                              | latency     | rate           |
|-----------------------------------|-------------|----------------|
| `din` to digits `s` (`rsd_coder`) | N = 12 cycles | 1 word / cycle |
| digits to switch controls         | 1 cycle     | 1 word / cycle |
| `din` to `sw_a`/`sw_b`, `v_out`   | N + 1 = 13 cycles | 1 word / cycle |

The target rate is 250 MS/s from a 250 MHz clock, one word per clock.

Each stage reads `alpha` at the moment it processes a word. A change of
alpha therefore reaches the output over N cycles; words already in flight
see a mix of old and new levels. Every such word is still converted
exactly, because any sequence of levels in [0, 0.5] gives a valid expansion.

Reset (`rst_n`, asynchronous, active low) clears the pipeline. A valid flag
travels with each word and forces the digits to 0 until the first real word
reaches the output, so after reset every cell pair rests in its zero state.
Without the flag, a zero residue with alpha = 0 would decode to a string of
non-zero digits.

## Cell pairs and switch controls (`switch_driver`)

The cell of weight b (2^b unit currents) is built from two sources, A and
B, of 2^(b-1) units each. Control 1 steers a source into the positive load
R_L, 0 into R'_L:

| digit S | sw_a | sw_b | net current of the cell |
|---------|------|------|-------------------------|
| +1      | 1    | 1    | +2^b units              |
| 0       | 1    | 0    | 0                       |
| -1      | 0    | 0    | -2^b units              |

In binary coding the two halves always move together and act as one cell.
The total source area is unchanged by the split. The zero state always uses
A to R_L and B to R'_L; nothing in this design alternates the halves. The
controls are registered, so all 24 switches change on the same edge.

In the digit arrays (`rsd_coder.s`, `switch_driver.s`) and the switch
vectors, index b is the weight. `s[N-1]` is the digit of the first stage
(the largest cell), and `s[0]` is that of the last stage (the smallest
cell).

## The analog array model (`current_steering_array`)

This block is a behavioural model, not synthesizable logic. It stands for
the analog array: 2N half sources, with the two loads R_L and R'_L. It
outputs both load currents and `v_out = R_L * (i_pos - i_neg)` as real
values, averaged over one clock period. The default `I_LSB = 20 mA / 4095`
makes the 24 sources add up to 20 mA full scale. `R_L = 50 ohm` is an
arbitrary choice.

Two optional error models let the benefit of the coding be measured. Both
are zero by default.

* `REL_ERR_PPM[2b]`, `REL_ERR_PPM[2b+1]`: static error of sources A and B
  of weight b, in ppm of their nominal current.
* `SKEW_PPM[k]`: switching-time error. When source k moves to the other
  load at a clock edge, it keeps feeding the old load for this fraction
  (ppm) of the following period; a negative value means it switches early.
  This is a first-order model of timing skew and glitch charge: the error
  appears only in periods where the source toggles. The model's `clk` input
  only marks those periods.

The model does not include output impedance, settling or noise.

## Top level (`rsd_dac`)

| port           | dir | width | meaning |
|----------------|-----|-------|---------|
| `clk`          | in  | 1     | sample clock |
| `rst_n`        | in  | 1     | asynchronous reset, active low |
| `din`          | in  | N     | sample x, two's complement, one per clock |
| `alpha`        | in  | N     | decision level × 2^N: 2048 = 0.5 (the main setting), 1024 = 0.25, 0 = binary coding; above 2048 acts as 2048 |
| `sw_a`, `sw_b` | out | N     | switch controls of the A and B source of each weight |
| `i_pos`, `i_neg`, `v_out` | out | real | model load currents (A) and differential output (V) |

Parameters: `N` (12), `I_LSB`, `R_L`, `REL_ERR_PPM`, `SKEW_PPM`. In the
intended split, `rsd_coder` and `switch_driver` are digital logic, and
everything after `sw_a`/`sw_b` is the analog array, which
`current_steering_array` only models. Synthesis of the digital part should
start from `rsd_coder` + `switch_driver`, since the real-valued model in
`rsd_dac` is not synthesizable.

The coder uses no multiplier or memory: per stage, two comparators, an adder
of ±2^N and some registers. `rsd_pkg` holds the digit type (`rsd_digit_e`:
`2'b01` = +1, `2'b00` = 0, `2'b11` = -1) and `digit_value()`.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=<n>
failures=<n>`. Each one also has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_rsd_stage` | all 8192 residues × six decision levels (0, 1/4096, 0.25, 0.5, two random) against the decision rule computed in real arithmetic, including the out-of-range flag |
| `tb_rsd_coder` | a stream of 6000 words (random, small, extreme, alpha/3) at alpha = 0.5, 0.25, 0, random and out of range; digits must appear exactly 12 cycles later, match a real-arithmetic model of the cascade and add up to 2x+1; binary coding must equal the offset-binary bits; the two largest digits must be 0 for an input of alpha/3; zero digits after reset |
| `tb_switch_driver` | the digit-to-switch table, its one-cycle register and the reset state |
| `tb_current_steering_array` | load currents against integer weight sums, the 20 mA full scale, `v_out`, and both error models |
| `tb_rsd_dac` | whole DAC at default parameters, 8000 words through reset, binary and RSD coding, alpha changes and an out-of-range alpha: `v_out` exact 13 cycles after each word. On small signals (below 0.1 of full scale) the two largest cells toggle hundreds of times with binary coding and never with RSD coding |
| `tb_rsd_dac_ofdm` | OFDM-like workload, described below |

The workload test applies 96 equal carriers at 250 MS/s: 24 between 5 and
15 MHz and 72 between 20 and 50 MHz, on a grid of 250 MHz / 600, with
pseudo-random phases. The sum is scaled to an rms value of 1/6 of full
scale. Six copies of the DAC convert one 600-sample period: an ideal one
(checked for exactness); binary and RSD coding (alpha = 0.5), each once
with static and once with switching-time errors; and RSD coding at
alpha = 0.25 with the switching-time errors. The MTPR (missing tone
power ratio) is the mean carrier power divided by the largest power in the
empty 15 to 20 MHz band. It is computed with a DFT in the testbench. The
errors are independent per source, drawn once from a normal distribution
and fixed in the testbench:

* static errors shrink as one over the square root of the source size,
  0.28 % for a half source of the largest cell, which stands for roughly
  8-bit matching;
* switching-time errors have a 1 % spread.

With the default seed the test prints:

```
MTPR ideal sources (12-bit quantisation only): 60.3 dB
MTPR static errors:    binary 46.9 dB, rsd 52.0 dB, difference 5.2 dB
MTPR switching errors: binary 41.7 dB, rsd 48.4 dB, difference 6.7 dB
MTPR switching errors, alpha = 0.25: 41.1 dB
```

Across eight random seeds (different carrier phases), RSD coding improved
the MTPR by 1 to 9 dB with static errors and by 2.4 to 12.6 dB with
switching errors. It also cut the samples in which the two largest cells
toggle by about a third. The alpha = 0.25 copy is printed for information only. Over the same eight
seeds it came out between 4.7 dB below and 2.5 dB above binary coding, and
usually a few dB below. On this signal the benefit comes from the wide zero
band of alpha = 0.5. The test requires fewer large-cell toggles and a
higher MTPR under switching errors. These numbers depend on the assumed
error tables and are not a prediction for any particular chip.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
          rtl/rsd_pkg.sv tb/tb_rsd_dac.sv --top-module tb_rsd_dac -o sim
./obj_dir/sim
```

Replace `tb_rsd_dac` with any other testbench name. The package must be
listed first; `-y rtl` finds the other modules by file name. Every run
finishes in well under a second. `tb_rsd_dac` uses the top's default
parameters. The others set `N = 12` explicitly or pass error tables to the
array model.

## Where this RTL makes its own choices

The RSD decision rule, the residue equation, the stage cascade, the
half-weight source pairs, binary coding as the comparison case, 12-bit
words, alpha = 0.5 as the main setting and 20 mA full scale all come from
the published scheme. The following are this design's own choices:

* the input mapping `(2x+1)/2^N` and the fixed-point format;
* a register after every stage and the digit alignment, hence the 12 + 1
  cycle latency;
* alpha as a run-time input that also selects binary coding, with clipping
  above 0.5;
* the 2-bit digit code, and which half source is on R_L in the zero state;
* the reset behaviour and the flush flag;
* the load resistance and both error models in the analog model.

In the prototype described for this scheme, the coder ran in an FPGA next
to the analog chip. Here both sit under one top-level module, with
`sw_a`/`sw_b` as the boundary between them. The OFDM signal generator and
the spectrum measurement are not part of the RTL; the workload testbench
stands in for both.
