# Bit-serial echo canceller with a shared 8-bit multiplier

A gigabit copper transceiver sends and receives on the same wire pair. Part
of what it sends comes straight back as echo, and an adaptive FIR filter
subtracts a replica of that echo from the received signal. Each filter tap
multiplies a transmitted symbol by a coefficient that models one echo. Most
echoes are small, so their coefficients fit in 4 bits. Only a few are large
enough to need 8 bits.

This design uses that fact. Each tap has a small 4-bit **bit-serial**
multiplier. Bit-serial means one bit per clock: the data and the
coefficient go in least-significant bit first, and the product comes out
the same way. The filter also has **one extra multiplier, C**. C stays idle
while every coefficient is small. When one tap needs an 8-bit coefficient,
its serial wires continue into C, and for that period the two multipliers
act as one 4 x 8 multiplier. Area stays close to a 4-bit filter, and C
draws no switching power while echoes are small. The cost is a rule: only
one tap per period may use 8-bit mode. If more than one tap asks, the
`error` output is raised.

Terms used below:

- **data term:** the 4-bit transmitted value.
- **coefficient:** the tap weight. It is 8 bits wide at the input. It is
  used as 4 bits when its five most-significant bits are all equal, and as
  8 bits otherwise.
- **frame:** the clocks one multiplication is fed over. It lasts 4 clocks
  in 4-bit mode and 8 clocks in 8-bit mode.
- **period:** 8 clocks. A tap's mode can change only at a period boundary.

## The serial Modified Booth cell (`bs_mult_cell`)

The multipliers use radix-4 (Modified Booth) recoding of the coefficient.
A Booth digit i is formed from bits (Y2i+1, Y2i, Y2i-1) and has one of the
values {-2, -1, 0, +1, +2}. It is encoded as three control bits:

| Y2i+1 Y2i Y2i-1 | digit | Ys Yb Ya |
|---|---|---|
| 000 / 111 | 0 | s 0 0 |
| 001 / 010 | +1 | 0 0 1 |
| 011 | +2 | 0 1 0 |
| 100 | -2 | 1 1 0 |
| 101 / 110 | -1 | 1 0 1 |

The three bits mean:

- **Ys** is the sign (Ys = Y2i+1).
- **Ya** selects X (Ya = Y2i xor Y2i-1).
- **Yb** selects 2X. It is Yb = not(Y2i xor Y2i-1) and (Y2i+1 xor Y2i).

The first cell has no Y-1, so it uses 0 in its place. Subtraction inverts
the selected multiple of X and loads Ys as the carry on the first bit. That
is the usual ~A + 1.

One cell handles one digit, so a 4-bit multiplier (`bs_mult4`) is a chain
of two cells. Multiplier C is the same chain with digit indices 2 and 3.
Each cell does three things:

1. One clock after LSBEnable, it latches its three coefficient bits as the
   digit.
2. It forms the bit of Z·4^i·X at the current weight. It gets the 2X
   multiple by taking the previous X bit, so no extra register is needed.
3. It adds that bit to the partial product coming from the previous cell,
   using a bit-serial adder (`bs_adder`). The adder is a full adder with a
   carry flip-flop. At the first bit, a 2:1 mux loads the sign bit into the
   carry instead of the stored carry.

X is sign-extended beyond its 4 bits. The cell holds the frame's sign bit
in a flip-flop.

**Two product wires.** A product of a 4-bit X and an L-bit coefficient has
L + 4 bits, but a frame is only L clocks long. The cell therefore sends the
result on two wires:

- **ProductLow (`.lo`)** carries weights 0..L-1 during the frame.
- **ProductHigh (`.hi`)** carries weights L..L+3 during the four clocks
  that follow the frame. Those clocks are already the first four clocks of
  the next frame.

So that frames can follow each other without gaps, each cell has two serial
adders. The *lo* adder works on the current frame. The *hi* adder finishes
the previous frame, starting from the carry the lo adder had left at weight
L-1.

**Cell timing.**

| Signal | Delay through one cell |
|---|---|
| X, LSBEnable | 3 clocks |
| Y | 1 clock |
| partial products (.lo, .hi) | 1 clock (the sum is registered) |

- X and LSBEnable: 2 of the 3 clocks come from the 4^i weight shift, and 1
  is a pipeline register.
- Y: the digit of the next cell is found one clock after that cell's
  LSBEnable.
- Partial products: the registered sum leaves every cell's critical path at
  one full adder.

At the first cell, X starts two clocks after LSBEnable, so the digit is
ready before X arrives. With these delays, every cell of a chain adds bits
of equal weight. The first ProductLow bit leaves a 4-bit multiplier
**4 clocks** after its LSBEnable.

## Frames, periods and the frame tags

A 4-bit tap makes two products per period. These frames start at clocks 0
and 4, and the tap takes a new word on clocks 3 and 7. An 8-bit tap makes
one product per period and takes its word on clock 7. A tap's mode for the
next period is decided from the word taken on clock 7 only. A word taken on
clock 3 is always treated as a 4-bit coefficient, and its upper bits are
ignored. This keeps every 8-bit frame aligned to a period.

The shared multiplier must see the wires of the 8-bit tap, and nothing
else. This is harder than it sounds, because a wire stays busy after its
frame ends:

- ProductHigh runs four clocks past the end of the frame.
- X reaches the second cell later than LSBEnable does.

Each serial wire in the line bundle `bs_line_t` therefore carries a
**tag** bit that travels with it. The tag says whether the bit belongs to
an 8-bit frame. The multiplexing in front of C is done per wire, from the
tags, in three levels:

1. **Per tap, 2:1 ModeSel gate.** A tap's wire is passed on only while its
   tag is set.
2. **N:1 MuxSel.** Picks the tap whose tag is set. With two taps this is
   AorBtoC.
3. **2:1 Conoff.** Passes the selected wire if exactly one tap's tag is
   set. Otherwise C is fed zeros, so it does not toggle.

Each select therefore switches exactly at the boundary of the frame it
steers, with no global retiming.

## Control: counters, converters, signal generator

- **Parallel-to-serial converters (PSCs).** Each tap has two:
  - `data_psc`: 4 flip-flops and a 4:1 mux. For selects above 3 it returns
    the sign bit.
  - `coef_psc`: 8 flip-flops and an 8:1 mux.

  Both load on the last clock of a frame.
- **`data_counter`.** Counts 0123 0123 in 4-bit mode, and 0123 3333 in
  8-bit mode. In 8-bit mode it keeps selecting bit 3, which sign-extends
  the data term.
- **`coef_counter`.**
  - It counts 0123 0123 in 4-bit mode and 01234567 in 8-bit mode.
  - It gives LSBEnable on the first clock of each frame.
  - It also gives a frame-end strobe and a period-end strobe.
- **`generic_counter`.** One data counter and one coefficient counter,
  used per tap.
- **`signal_generator`.**
  - **Mode bit.** For each tap it compares the five coefficient MSBs and
    registers the mode bit at period end.
  - **Two-tap status.** With two taps it forms:
    - `error` = A and B
    - `conoff` = A xor B
    - `aorbtoc` = B
  - **N taps.** With N taps these become: more than one tap; exactly one
    tap; the index of that tap.
  - **Counters.** It holds the generic counters.

  The filter itself re-derives the same selects from the wire tags. The
  signal generator's `error`, `conoff` and `aorbtoc` are brought out as
  status for the current period.
- **`result_collector`.** Rebuilds words from ProductLow and ProductHigh.
  One collector per tap keeps 4-bit frames. One collector after C keeps
  8-bit frames.

## Interface of `echo_canceller_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `data_in[t]` | in | 4 | data term of tap t |
| `coef_in[t]` | in | 8 | coefficient of tap t, two's complement |
| `word_taken[t]` | out | 1 | tap t samples `data_in`/`coef_in` on this clock |
| `result_low[t]`, `result_high[t]` | out | 4, 4 | 4-bit mode product of tap t (low, high half) |
| `result_prod[t]` | out | 8 | the same product, signed |
| `result_valid[t]` | out | 1 | tap t result valid |
| `result_c_low`, `result_c_high` | out | 8, 4 | 8-bit mode product from C |
| `result_c_prod` | out | 12 | the same product, signed |
| `result_c_valid` | out | 1 | C result valid |
| `error` | out | 1 | more than one tap wants 8-bit mode this period |
| `conoff` | out | 1 | C is in use this period |
| `aorbtoc` | out | clog2(N) | tap joined to C this period |

`NTAPS` (default 2) sets the number of taps.

**Timing.**

- The first period starts on the second clock after reset is released.
- Hold each word until `word_taken` shows it has been sampled.
- Results come out in the order the words were taken:
  - a 4-bit product appears on its tap's outputs **13 clocks** after its
    `word_taken` clock;
  - an 8-bit product appears on the `result_c_*` outputs **19 clocks**
    after its `word_taken` clock.

In a period with `error` set, neither tap in 8-bit mode produces a result.

**Throughput.** Each tap makes one 4-bit product every 4 clocks. C makes
one 8-bit product every 8 clocks. At a 125 Mbaud symbol rate, every tap
would need a product every 8 ns. That takes a 500 MHz clock for 4-bit taps
and a 1 GHz clock for the 8-bit path.

## What follows the original architecture and what is this design's own

These parts follow the published architecture:

- the Booth encoding and the cell chain;
- two cells per 4-bit multiplier;
- the shared multiplier N+1 joined through ModeSel, MuxSel and Conoff;
- the error, conoff and aorbtoc equations;
- the five-MSB mode test;
- the counter sequences and the PSC structure;
- the two-tap default.

These parts are this design's own choices:

- **Timing and tags.** The exact clock offsets inside the cell, the
  two-adder cell, the frame tags and the per-wire mux evaluation are new.
- **Mode switching.** The mode changes only at 8-clock boundaries, and
  clock-3 words are always small.
- **Result collectors.** The collectors, and the word outputs they drive,
  are new.
- **Reset.** Reset is synchronous and active high, and the counters reset
  to 7.
- **Latency.** The original architecture reports a latency of four clocks.
  Here that is the delay from LSBEnable to the first product bit of a
  multiplier. A whole product word takes 13 or 19 clocks, as given above.
- **Where the running sum travels.** In the original scheme, the running
  partial sum moves along the high wire, and each cell peels its lowest
  bits off onto the low wire. Here, each cell adds its term on the low
  wire at full weight, and the upper bits are finished on the high wire
  after the frame. The outputs split the product the same way: the low
  word on ProductLow and the high word on ProductHigh.
- **Register count.** The original architecture counts about 7 flip-flops
  per coefficient bit. This cell uses about 40 flip-flops per digit. The
  extra registers are the frame tags, the second adder and the weight
  counters, which gap-free frames and the shared multiplier need.
- **Multiplier sizes.** The cell and `bs_mult4` have size parameters:
  `DW` (data width), `SHORT_L` and `LONG_L` (the frame lengths) and
  `NCELL`. The defaults give the echo canceller's 4-bit multiplier. With
  `NCELL = n/2` and `DW = SHORT_L = LONG_L = n`, the same cells form a
  standalone n x n serial multiplier. `tb_serial_mult_nxn` tests this for
  n = 8 and n = 16. The timing requires the data width to be no larger
  than the frame length.

The filter computes the per-tap products; it does not sum the taps. It does
not adapt the coefficients. Those are inputs, expected to come from an LMS
update, which is not part of this RTL. The DAC, ADC, hybrid and
symbol generator around the canceller are not part of it either. A real
1000BASE-T canceller has over a hundred taps. `NTAPS` can be raised, but
only one tap per period can use the 8-bit path.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The expected values are computed in the
testbench from integer arithmetic, not from the RTL's structure.

`tb_echo_canceller_top` runs the top at its default parameters for 400
periods with random words. Random means:

- coefficients are a mix of small and large;
- 8-bit requests are sometimes made on both taps at once.

It checks every product value and its latency. It also counts how often
each mechanism happened:

| Mechanism | Count |
|---|---|
| 4-bit products | about 1000 |
| 8-bit products from tap A | about 80 |
| 8-bit products from tap B | about 80 |
| mode switches | several hundred |
| error periods | about 70 |
| periods with C idle | about 170 |

A mechanism that never happens counts as a failure.

`tb_echo_canceller_ntap` runs the same kind of test with seven taps. At
that size, `error`, `conoff` and `aorbtoc` take their general forms, and
every one of the seven taps must get the shared multiplier at least once.

`tb_serial_mult_nxn` runs the multiplier alone as 8 x 8 and 16 x 16
serial multipliers. It checks 300 back-to-back products at each size and
the delay to the first product bit.

The cell, multiplier and filter testbenches also check the LSBEnable-to-first-bit delay and the
Booth digits of both the first cell and a later cell.

## Simulating and changing it

With Verilator 5, for example for the top:

    verilator --binary --timing --assert -Irtl -y rtl rtl/bs_pkg.sv \
        tb/tb_echo_canceller_top.sv --top-module tb_echo_canceller_top
    ./obj_dir/Vtb_echo_canceller_top

Any other testbench runs the same way with its own name. Sizes shared by
all modules live in `rtl/bs_pkg.sv`. The tap count is the `NTAPS`
parameter of `echo_canceller_top`. If you change the cell's internal delays,
change them together with the X and weight-marker offsets at the filter
input (`bs_filter`) and with the latency constants in the top testbench.
