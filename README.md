# A 32-tap FIR filter in distributed arithmetic

This is a multiplier-free FIR filter. A direct-form filter with N taps needs N
multipliers per output. Distributed arithmetic (DA) replaces them with table
look-ups and one shift-and-add accumulator. The filter works through the input
samples one bit position at a time. For each bit position, the bits of all the
samples together form a table address. The table holds, for every address, the
sum of the coefficients whose bit is set. An accumulator then weights each
table output by its power of two.

The default configuration is a 32-tap linear-phase low-pass filter:

- sampling rate 4 kHz, pass band to 60 Hz, stop band from 400 Hz;
- 0.1 dB pass-band ripple and 60 dB stop-band attenuation;
- equiripple design, order 31;
- coefficients scaled by 2^16 and rounded to integers;
- 7-bit samples.

One table over 32 taps would need 2^32 words. It is therefore split into four
tables of 8 taps, each with 256 words.

## The arithmetic

The filter computes

    y(n) = sum_{k=0}^{31} c_k * x(n-k)

Write each B-bit sample as its bits, x = sum_j b_j * 2^j. Exchanging the two sums
gives

    y(n) = sum_{j=0}^{B-1} 2^j * P_j,   P_j = sum_k c_k * b_j(x(n-k))

P_j depends only on the 32 bits b_j(x(n-k)). With the taps split into four
groups of eight:

    P_j = T_0[a_0] + T_1[a_1] + T_2[a_2] + T_3[a_3]

Here a_t is the 8-bit address made of bit j of the samples at taps 8t..8t+7.
T_t[a] is the sum of c_{8t+i} over all i where bit i of a is set. So
T_0[1] = c_0 = -137, T_0[2] = c_1 = -212 and T_0[3] = -349.

The sum over j is computed without a shifter, LSB first:

    s_0 = P_0,   s_j = s_{j-1}/2 + P_j

The accumulator is halved each step. The bits shifted out at the right are kept,
so after B steps y = s_{B-1} * 2^(B-1) + (kept bits), with nothing lost.

For two's complement samples the sign bit weighs -2^(B-1). The last step then
subtracts instead of adding: s_{B-1} = s_{B-2}/2 - P_{B-1}.

### Worked example

The filter is fed these 32 samples, oldest first:

    0 4 8 12 16 20 24 28 32 36 40 44 48 52 56 60
    64 68 71 75 79 83 87 90 94 98 102 105 109 113 116 120

The 32nd output is **4089353**. This is the direct-form sum, and the DA steps
give the same value:

| bit j | T_0 | T_1 | T_2 | T_3 | P_j | P_j * 2^j |
|---|---|---|---|---|---|---|
| 0 | 0 | 0 | 19952 | -1199 | 18753 | 18753 |
| 1 | 0 | 0 | 20935 | -195 | 20740 | 41480 |
| 2 | -694 | 19090 | 18714 | -694 | 36416 | 145664 |
| 3 | -564 | 20836 | 10111 | -697 | 29686 | 237488 |
| 4 | -649 | 25096 | 5742 | -360 | 29829 | 477264 |
| 5 | 0 | 34855 | 0 | -2057 | 32798 | 1049536 |
| 6 | 0 | 0 | 34855 | -1743 | 33112 | 2119168 |
| | | | | | total | 4089353 |

The testbenches check every number in this table.

## Structure

    in_sample --> sample_buffer --> bit_shift_register --addr[31:0]--> 4 x da_lut --> lut_adder --> shift_accumulator --> out_data
                  (32 taps,          (32 x 7-bit words,    8 bits each   (256 words    (sum of the   (s = s/2 +/- P_j,
                   decimation)        right shift / clk)                   each)         4 outputs)    exact result)

| File | Role |
|---|---|
| `rtl/da_fir_pkg.sv` | Coefficients (`FIR_COEFS`) and functions for the word widths |
| `rtl/da_fir.sv` | Top: wires the blocks; `sub` is raised on the sign-bit step when `IN_SIGNED` is set |
| `rtl/sample_buffer.sv` | Delay line of `N_TAPS` samples, tap 0 newest. Offers a frame after every `DECIM`-th sample and stalls the input while a frame waits |
| `rtl/bit_shift_register.sv` | Address generator. Loads a frame in parallel, shifts every word right once per clock, outputs the LSBs |
| `rtl/da_lut.sv` | One partial-product table. The words are computed at elaboration from the coefficients and read combinationally |
| `rtl/lut_adder.sv` | Adder tree over the table outputs |
| `rtl/shift_accumulator.sv` | Halving accumulator with add/subtract and a low-bit register; registered output |

### Word widths (defaults)

| Signal | Width | Why |
|---|---|---|
| coefficient | 16, signed | the largest tap is 7148; 16 bits is a chosen margin |
| table word | 19, signed | sum of 8 coefficients: 16 + log2(8) |
| P_j | 21, signed | sum of 4 table words: 19 + 2 |
| accumulator | 22 + 6 low bits | \|s\| < 2 max\|P\| |
| `out_data` | 28, signed | 21 + 7; exact, no rounding |

`out_data` carries the 2^16 scale of the coefficients. Divide by 65536 to get
the real-valued filter output.

## Interface and timing

| Port | Dir | Width | |
|---|---|---|---|
| `clk` | in | 1 | rising edge |
| `rst_n` | in | 1 | asynchronous, active low. Clears the delay line, so the first 31 outputs see zeros for samples not yet received |
| `in_valid`, `in_ready`, `in_sample` | in, out, in | 1, 1, `IN_W` | a sample is taken on an edge where both valid and ready are high |
| `out_valid`, `out_data` | out | 1, `OUT_W` | `out_valid` pulses for one cycle; `out_data` holds until the next output |

- **Rate.** One output takes `IN_W` clock cycles, one per sample bit. With
  `DECIM = 1` the input therefore takes at most one sample every `IN_W` (7)
  cycles. A faster source is held off with `in_ready`.
- **Overlap.** The buffer takes the next sample while the current output is
  computed. The bit shift register takes the next frame during the last bit of
  the current one, so outputs can follow each other every `IN_W` cycles without
  a gap.
- **Latency.** On an idle filter, `out_valid` rises with the 8th (`IN_W`+1)
  clock edge after the edge that accepted the sample. The first edge moves the
  frame into the bit shift register. The next 7 edges accumulate bits 0..6, and
  the last of them also loads the output register.

## Parameters of `da_fir`

| Parameter | Default | Meaning |
|---|---|---|
| `N_TAPS` | 32 | filter length |
| `N_LUTS` | 4 | number of tables; must divide `N_TAPS`. Each table has 2^(`N_TAPS`/`N_LUTS`) words |
| `IN_W` | 7 | sample width, at least 2 |
| `IN_SIGNED` | 0 | 1: samples are two's complement and the sign-bit step subtracts |
| `DECIM` | 1 | an output after every `DECIM`-th sample (decimating filter) |
| `COEF_W` | 16 | coefficient width |
| `COEFS` | `da_fir_pkg::FIR_COEFS` | `int` array of `N_TAPS` integer coefficients |

To change the filter, pass a new `COEFS` array, and `N_TAPS` if the length
changes. The tables are rebuilt at elaboration. Table size grows as
`N_LUTS * 2^(N_TAPS/N_LUTS)` words, so keep 8 to 10 taps per table.

## Where this design makes its own choices

The DA method, the structure, the filter, the 32 taps, the four-way table split
and the worked example come from the filter this RTL implements. The following
were left open and are choices of this design:

- **Sample format.** Samples are 7-bit unsigned by default, which covers the
  example's data (0..120). `IN_SIGNED = 1` gives two's complement samples with
  a subtracting sign-bit step. This mode is tested at 8 bits.
- **Coefficient word.** The coefficient word is 16 bits wide. The coefficient
  values themselves, round(c * 2^16), belong to the filter design; only the
  storage width is chosen here.
- **Tap order.** Tap 0 holds the newest sample, as in the FIR equation, so the
  worked example's oldest sample (0) meets c_31. Because the coefficients are
  symmetric, pairing the k-th listed sample with c_k gives the same 4089353,
  and the table above is written that way.
- **Control.** The handshakes, the input stall, the reset behaviour and the
  exact (unrounded) output are this design's own.
- **Decimation.** The buffer is described as buffering and decimating, but no
  factor is given. `DECIM` defaults to 1.
- **Table storage.** The tables are combinational constant ROMs computed from
  `COEFS`, not loaded from files. There is no pipeline register between the
  tables, the adder and the accumulator, so the critical path is an 8-bit ROM
  read, a 4-input add and a 22-bit add.

Not included: the coefficient design flow (filter design tool, scaling script)
and the conventional multiplier-based FIR, which appears only for comparison.
The end-to-end testbench models the conventional filter as its reference.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_da_lut` | all 4 x 256 words against sums of the coefficients; the first 31 words of table 0 (0, -137, -212, -349, ... -1411); the T_t columns of the example |
| `tb_lut_adder` | the example's P_j, the extreme inputs, 2000 random sets |
| `tb_bit_shift_register` | 300 random frames with random gaps and back-to-back frames; every address bit, first/last flags and `load_ready`; 7 cycles per frame |
| `tb_shift_accumulator` | the example sequence (4089353); the extremes; 500 random sequences with and without the sign-bit subtraction; `out_valid` exactly one cycle after the last step |
| `tb_sample_buffer` | `DECIM` = 1 and 3 side by side, with random consumers; frame contents, frame timing, stalls |
| `tb_da_fir_full` | the filter with every parameter at its default: the worked example spaced (latency 8 edges), back to back (one output per 7 cycles), and after a reset in the middle of a stream, then 500 random samples. Every output is compared with a direct-form convolution |
| `tb_da_fir` | the same default filter, plus a second instance with 8-bit signed samples and `DECIM` = 2 fed 400 random samples. It fails if input stall, back-to-back outputs, sign-bit subtraction or decimation never occurred |

Run a testbench with Verilator 5, for example:

    verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_da_fir_full -y rtl -y tb +libext+.sv rtl/da_fir_pkg.sv tb/tb_da_fir_full.sv
    ./obj_dir/Vtb_da_fir_full

Each run takes well under a second.
