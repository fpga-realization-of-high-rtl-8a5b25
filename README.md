# Distributed-arithmetic FIR filters with a bit-serial shift accumulator

An N-tap FIR filter computes y[n] = sum C_i x[n-i]. Distributed arithmetic
(DA) avoids multipliers. The samples are processed one bit position at a
time. In each clock cycle, one bit of every sample in the delay line forms an
N-bit address. That address selects a precomputed sum of coefficients from a
look-up table (LUT). A shift accumulator then adds the B words read for a
B-bit sample, each shifted by one more bit position. The word read in the last
cycle belongs to the sign bits, so it is subtracted. The time per output is
B cycles, whatever the filter order.

The usual speed limit is the shift accumulator, a carry-propagate adder as
wide as the LUT word plus its feedback. In this design the accumulator is
instead a row of *bit-serial adders*, one full adder per bit, with registers
between neighbouring cells. The longest path is then one full adder and an
XOR. Around that accumulator (`bsa`) the RTL builds three filter structures:

| module            | structure                                                   | LUT words | output latency      |
|-------------------|-------------------------------------------------------------|-----------|---------------------|
| `da_fir_full`     | one LUT addressed by all N sample bits                      | 2^N       | B                   |
| `da_fir_part`     | D LUTs of E inputs (N = D*E), pipelined adder tree          | D * 2^E   | B + log2 D          |
| `da_fir_systolic` | chain of D cells, each a LUT plus a registered adder        | D * 2^E   | B + D               |

Latency is counted from the first cycle in which a sample's bits address the
LUTs to the cycle in which its output is flagged. All three produce one output
every B cycles. `da_fir_top` places one of each side by side. Defaults
throughout are 8 taps, B = 16-bit samples, 8-bit coefficients, and D = 2,
E = 4 for the decomposed versions.

## The bit-serial shift accumulator (`bsa`)

This is the part that needs the most care. Its job is to turn B signed W-bit
words a_0 .. a_{B-1}, one per clock, into

    y = sum_{t=0}^{B-2} a_t 2^t  -  a_{B-1} 2^{B-1}

Cell p (p = 0 is the least significant bit) is a `bit_serial_adder`. That is a
full adder with a flip-flop that holds its carry for the next cycle. Each cycle,
cell p adds three bits:

* bit p of the incoming word, XORed with `s`, so the word is inverted in the
  sign-bit time;
* the registered sum of cell p+1, which is the right shift;
* its own stored carry.

The result goes into cell p's sum register. The sum register of cell 0 drops
out one result bit per clock on `y_bit`, least significant bit first.

The accumulator is held in carry-save form: a sum vector and a carry vector.
It is never resolved while accumulating. Two details make this form exact for
two's-complement data:

* **Sign extension.** The most significant cell takes its *own* registered
  sum as its shift input, the way an arithmetic right shift copies the sign
  bit. In that column every bit has negative weight: the word's sign bit, the
  sum's sign bit, and the carry, whose weight is -2^W. A plain full adder is
  still correct there, because -(a+b+c) = -(sum + 2*carry). As a result the
  state never overflows, whatever the words are.
* **Subtraction.** -a = ~a + 1. The XOR gates invert the word. The "+1" at
  the LSB of the last word has weight 2^{B-1}. It cannot be added in that
  cycle, because all three inputs of cell 0 are in use. It is remembered
  (`s_q`) and added when the result is read out.

**Read-out.** Only one bit leaves per clock, and a new result starts every B
cycles. So only the low B-1 result bits come out serially; they are collected
in a shift register. When `first` starts the next accumulation, the upper
W+1 bits are formed in a single W+1-bit addition:

    high = sum vector (signed) + 2 * carry vector (top carry negative) + s_q

`y = {high, low bits}` (W+B bits) is presented in that same cycle, together
with `y_valid`. In the same cycle, `first` gates all shift inputs and carries
to zero, so the next run begins from a cleared accumulator with no idle
cycle. Runs must follow each other directly: `s` on word B-1 and `first` on
the next word. `sign_control` produces exactly that pattern. An assertion
flags `s` and `first` arriving together.

The read-out adder is the one carry-propagate path in the accumulator. It is
used once per B cycles and could be pipelined or made bit-serial if it limited
the clock. It is this design's own addition. The serial cell array, the XOR
inversion, the sign control and the self-fed most significant cell are the
published structure.

## Data framing and the input shift register

Samples are B-bit two's complement. They arrive **bit-serially, least
significant bit first, one bit per clock on `x_bit`**. `sign_control` counts
bit times 0..B-1 from reset. Each filter's `frame_start` output is high in
bit time 0, the cycle that must carry the LSB of a new sample.

`input_shift_register` is one chain of N*B flip-flops shifting right every
clock. The serial input enters the top of the x[n] register. The LSB end of
each register feeds the next older one. The address bit for tap i is the
rightmost bit of register i. A sample shifted in during frame k is therefore
read out, bit by bit, during frame k+1, while sample k+1 is shifted in behind
it. Its output appears in frame k+2 (later by the latency in the table above).
The first output after reset belongs to the all-zero history and is 0.

## The three filters

**Full LUT (`da_fir_full`).** Input shift register → `da_lut` with E = N
(256 words for 8 taps) → `bsa`. The LUT is read combinationally, so
`sign_control`'s strobes need no delay.

**Partitioned LUT (`da_fir_part`).** LUT z holds every sum of coefficients
C_{zE} .. C_{zE+E-1} and is addressed by the bits of x[n-zE] ..
x[n-zE-E+1]. For 8 taps that is two 16-word tables: taps 0-3 and taps 4-7.
`adder_tree` adds the D LUT outputs in ceil(log2 D) registered levels. The
`s`/`first` strobes are delayed by the same number of cycles. For 64 taps,
D = 16 tables of 16 words (256 words instead of 2^64) give an output 20 cycles
after its first address, against 16 for a full table.

**Systolic (`da_fir_systolic`).** The N address bits go through
`word_parallel_converter`. It cuts them into D groups of E bits and delays
group z by z cycles. This skew means each group reaches its cell together with
the partial sum that has passed through the cells before it. Each `pe1`
computes `OUT <= IN + LUT(VIN)`, with a combinational 2^E-word LUT and a
registered adder. The left end of the chain is fed 0. The last cell feeds the
`bsa`, whose strobes are delayed D cycles. The critical path is one small LUT
plus one adder, independent of N.

## LUT contents and coefficients

`da_lut` builds its table at elaboration. Entry k is the sum of
`COEF[BASE+i]` over the bits i set in k, so entry 0 is 0 and entry 2^E-1 is
the sum of all E coefficients. Every filter takes its coefficients as the
`int` array parameter `COEF` (64 entries; the first N are used). They should
be CW-bit signed values. The word width is W = CW + ceil(log2 N), enough for
any sum of N coefficients. The output is W+B bits wide and cannot overflow.
The default set in `da_pkg` is c[i] = ((53 i + 17) mod 256) - 128. It is an
arbitrary spread of 8-bit values of both signs, chosen for testing, not a
designed filter response. Pass your own set for a real filter.

## Parameters

| parameter | default | meaning                                   | where            |
|-----------|---------|-------------------------------------------|------------------|
| N         | 8       | taps                                      | filters, top     |
| B         | 16      | sample width = cycles per output          | all              |
| CW        | 8       | coefficient width                         | filters, top     |
| D, E      | 2, 4    | LUT groups and inputs per group, N = D*E  | part, systolic   |
| W         | 8       | word width of a stand-alone `bsa`         | `bsa`            |
| COEF      | see above | coefficients                            | filters, LUTs    |

`da_fir_full` with large N is impractical, because its table has 2^N words.
Use `da_fir_part` or `da_fir_systolic` beyond about 10 taps. They have been
simulated at 16, 32 and 64 taps with E = 4.

## Departures from the published architecture

* **LUT read timing.** The LUTs are read combinationally, so the cycle counts
  above are B, B + log2 D and B + D exactly. An implementation that maps the
  256-word table to a synchronous block RAM adds one cycle. `da_lut` has a
  `REG_OUT` option for that, but the filters do not use it.
* **Result output.** Besides the serial bit stream, the accumulator delivers
  a parallel W+B-bit result, using the read-out adder described above.
* **Placement of the "+1".** The "+1" of the sign-bit subtraction is added
  at read-out, not by a separate half adder at the serial output.
* **Bit order.** The original figures number the accumulator's input bits
  with 0 at the sign (most significant) end. The RTL uses the usual LSB-0
  numbering.
* **Reset and clears.** All state has an asynchronous active-low reset,
  `rst_n`. The per-computation clears act in the same cycle as the first word.
* **Baselines not built.** The conventional left- and right-shift
  accumulators that the bit-serial accumulator is compared against are not
  included.
* **No timing or area figures.** Timing and area figures depend on the FPGA
  flow and are not reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `bit_serial_adder_tb` runs serial additions of random 16-bit pairs.
* `bsa_tb` runs back-to-back accumulations at W = 8, 16, 20 and 32 against
  the formula above. This includes runs of all most-negative and all
  most-positive words, and it also checks `y_bit`.
* `sign_control_tb`, `input_shift_register_tb`, `da_lut_tb`, `adder_tree_tb`,
  `word_parallel_converter_tb` and `pe1_tb` check their blocks against
  independent models.
* The filter testbenches, through `tb/fir_checker.sv`, send random sample
  streams that include the extreme values. They compare every output with
  plain integer convolution and check the exact cycle of every output and of
  `frame_start`. They also require that negative samples reached the
  sign-bit time and that outputs came at full rate.
* `da_fir_top_tb` runs all three filters at the default sizes.
* `da_fir_orders_tb` runs the partitioned and systolic filters at 16, 32 and
  64 taps.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/da_pkg.sv tb/da_fir_top_tb.sv --top-module da_fir_top_tb
    ./obj_dir/Vda_fir_top_tb

Replace the testbench name to run another one. Each finishes in well under a
second.
