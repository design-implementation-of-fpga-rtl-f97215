# Constant-coefficient FIR filters: shift-register and distributed-arithmetic forms

This RTL computes the same finite-impulse-response (FIR) filter in two ways:

    y[n] = c[0]·x[n] + c[1]·x[n-1] + … + c[N-1]·x[n-N+1]

* **Shift-register form (`fir_sr`).** Samples move through a chain of tap
  registers. Each tap has its own multiplier, and an adder chain sums the
  products. It produces one output per clock.
* **Distributed-arithmetic form (`fir_da`).** This form has no multiplier.
  The coefficients are constants, so every sum of a subset of them can be
  computed ahead of time and stored in a small table. The filter reads one
  bit of every stored sample per cycle and uses those bits as the table
  address. A shift-accumulator then adds up the table words, weighted by
  their bit positions.

A stand-alone **multiplier-accumulator (`mac`)** is included too. It is built
from the same three multiplier steps that the shift-register filter's
multipliers use.

Defaults: 8-bit signed samples, 8-bit signed coefficients, four taps, and the
coefficients `{-5, 37, 37, -5}`. Outputs are 18 bits, which is exact, so they
never overflow. All of these are parameters.

## Module map

    fir_top
    ├── fir_sr            shift-register filter
    │   └── booth_mult ×N     one multiplier per tap
    │       ├── booth_pp_gen      step 1: radix-2 Booth recoding, partial products
    │       └── pp_compressor     step 2: carry-save adder array
    │                              step 3: final adder (in booth_mult)
    ├── fir_da            distributed-arithmetic filter
    │   ├── da_lut            table of coefficient sums
    │   └── da_accumulator    ± adder and shifting register
    └── mac               multiplier-accumulator
        ├── booth_pp_gen
        └── pp_compressor      (the accumulator enters the array as an extra operand)
    fir_pkg               default widths, coefficients, output-width function

## The distributed-arithmetic filter

Write each B-bit two's-complement sample in terms of its bits:
`x = -x_{B-1}·2^{B-1} + Σ_{b<B-1} x_b·2^b`. Then swap the two sums:

    y = Σ_k c[k]·x[k] = Σ_b w_b · 2^b · LUT(x_b[0], x_b[1], …, x_b[N-1])
    LUT(a) = Σ_{k: a_k = 1} c[k]          w_b = -1 for the sign bit, +1 otherwise

The inner sum depends only on N address bits. `da_lut` therefore holds 2^N
precomputed words: 16 for four taps, which is one 4-input LUT per output bit on
an FPGA. The table is computed from the `COEFS` parameter when the design is
elaborated. To change the filter, change the parameter; nothing needs
regenerating.

`fir_da` keeps the last N samples in its own tap register, `t[0]` (newest) to
`t[N-1]`. A bit counter runs from the sign bit down to bit 0. Bit `b` of every
tap forms the table address. `da_accumulator` processes the bits most
significant first:

    acc <= (first ? 0 : 2·acc) + (sub ? -LUT : +LUT)

The first step is the sign bit, so `first` and `sub` are both raised on that
step. The doubling is a one-place left shift of the register. After B steps the
register holds the exact result. No rounding takes place.

**Timing.**
* `in_ready` is high while the filter is idle.
* A sample is taken on an edge where `in_valid` and `in_ready` are both high.
* The next B cycles run the loop, with `in_ready` low.
* `out_valid` pulses B+1 = 9 cycles after the sample was taken. `y_out` (the
  accumulator) holds the result in that cycle.
* A new sample can be taken in the same cycle, so the filter gives one output
  every B+1 clocks.
* `y_out` stays valid until the next sample is taken. While the loop runs, it
  shows partial sums.

## The shift-register filter and its multipliers

`fir_sr` has N tap registers. Every tap, the first one included, is taken
after a register. This follows the block diagram that this structure comes
from. On an edge with `in_valid` high, `x_in` enters `t[0]` and the chain
shifts. `y_out` is combinational from the taps. `out_valid` is `in_valid`
delayed by one cycle. No output register is drawn in the source structure, so
none is added. For a faster clock, add one.

Each `booth_mult` follows three steps:

1. **Booth encoding** (`booth_pp_gen`). Each overlapping pair `(y[i], y[i-1])`
   of the multiplier, with `y[-1] = 0`, becomes a digit in {-1, 0, +1}:
   `10 → -X`, `01 → +X`, `00/11 → 0`. Partial product i is that multiple of X,
   shifted left by i and sign-extended to the full width. No
   sign-extension-prevention trick is used.
2. **Partial-product compression** (`pp_compressor`). A linear array of 3:2
   carry-save adders reduces the partial products to one sum vector and one
   carry vector. No carry propagates inside the array.
3. **Final addition.** One carry-propagate adder.

An immediate assertion checks a sign rule for non-zero operands: if the
operands' sign bits are equal the product is positive, and if they differ it
is negative. This is the rule given by the sign-check step in the multiplier's
flow chart. Here it falls out of the Booth arithmetic and is not built as a
separate path.

## The multiplier-accumulator

`mac` adds the current accumulator value to the partial products as one more
operand of the carry-save array. The single final adder therefore does both
the multiplication's last addition and the accumulation.

* With `in_valid`, `acc <= (clear ? 0 : acc) + x·y`.
* With `clear` alone, `acc <= 0`.
* The result appears one cycle later.
* There are `GUARD` = 4 guard bits, enough for 16 full-scale products.
  Beyond that the sum wraps modulo 2^ACC_W.

## Top level

`fir_top` feeds one sample stream to both filters with the same coefficients.
A sample is accepted only when the DA filter is ready (`in_ready`), and the
same strobe shifts it into the shift-register filter. The two therefore always
hold the same taps, and `da_y` equals `sr_y` whenever `da_valid` is high. The
MAC has its own ports (`mac_*`) and is not connected to either filter.

All resets are asynchronous and active-low, and they clear every register.
The design uses a single clock.

## Where this design makes its own choices

The source description gives the structures but not their sizes. These are
this design's choices:

* **Sizes and coefficients.** The word lengths, the four-tap default and the
  coefficient set are not specified. Four taps matches the number of stages
  drawn for the shift-register structure.
* **Number format.** The bit-level DA equation is written for unsigned samples,
  but its accumulator is drawn with an add/subtract unit. This design uses
  two's-complement samples and subtracts on the sign bit. That is the only
  role a subtractor has in this structure. The unsigned reading is available
  as an option: set `X_SIGNED = 0` on `fir_top`, `fir_sr` or `fir_da`. The DA
  filter then only adds, and the shift-register filter puts a zero sign bit in
  front of each tap before its multiplier.
* **Multiplier sign handling.** The multiplier is described by a flow chart
  that first decides the sign from the operands' sign bits, which suggests
  sign-magnitude arithmetic, and also as "radix-2 Booth encoding". This design
  uses Booth on two's complement and keeps the sign rule only as an
  assertion.
* **Interfaces.** The valid/ready handshake, MSB-first bit order, the
  carry-save array shape (linear, not a Wallace tree) and reset behaviour are
  not specified.
* **Not implemented.** An adaptive filter is discussed as an application: a
  variable filter whose weights an update algorithm changes from an error
  signal. Its update algorithm is not specified, so it is not implemented.
  Both filters here have constant coefficients.
* **Published resource figures.** The source reports an FPGA result of 22
  4-input LUTs and 12 slices for the shift-register filter. That result gives
  no word lengths or tap count. It cannot be matched to this RTL: at the
  default sizes, four 8×8 multipliers need far more logic.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares outputs
with values computed independently in the testbench, and each ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `tb_booth_pp_gen` | all 65 536 operand pairs: every partial product, digit sign and their sum |
| `tb_pp_compressor` | random and corner operand sets, 8- and 3-operand arrays |
| `tb_booth_mult` | all 8×8 operand pairs; random 12×6 |
| `tb_mac` | random accumulate/clear streams, wrap-around, one-cycle latency |
| `tb_da_lut` | every entry, four-tap default and a three-tap set |
| `tb_da_accumulator` | DA-style bursts with holds; step-wise and closed form |
| `tb_fir_sr` | default, five-tap asymmetric and unsigned-sample filters, full-scale inputs, `out_valid` timing |
| `tb_fir_da` | default, three-tap asymmetric and unsigned-sample filters, 9-cycle latency, back-pressure |
| `tb_fir_top` | end to end at the default parameters (see below) |

`tb_fir_top` runs 5000 DA results at the default parameters. It checks both
filters against a convolution, against each other, and against the DA
latency. It also checks the MAC every cycle. It counts the mechanisms it
exercises and fails if any never happens: accepted samples, samples held off
while the DA loop is busy, sign-bit subtractions, Booth -1 digits, MAC
accumulations and MAC clears.

To simulate with Verilator (from the directory that holds `rtl/` and `tb/`):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top
    ./obj_dir/Vtb_fir_top

Swap in another testbench name to run another test. Each run takes well under
a second.

## Changing the filter

Override `TAPS` and `COEFS` together, for example
`fir_top #(.TAPS(5), .COEFS('{3, -128, 127, 11, -60}))`. `OUT_W` follows from
`fir_pkg::sop_width`.

The DA table grows as 2^TAPS. For long filters the usual remedy is to split
the taps into groups of four, with one table per group, and add the table
outputs. That partitioning is not implemented here.

The DA loop takes DATA_W+1 cycles per sample. Processing several bits per
cycle, with one table per bit, would shorten it. That is not implemented
either.
