# Three-parallel FIR filter with the fast FIR algorithm and Vedic multipliers

This is an FIR filter that handles three input samples per clock. A plain
three-parallel filter splits the N-tap filter into its three polyphase parts
and needs nine subfilters of length N/3, which is 3N multipliers. This design
uses the 3x3 *fast FIR algorithm* (FFA) instead. It needs six subfilters, or
2N multipliers, and pays for the saving with a few extra adders, subtractors
and two block delays. All products in the subfilters come from *Vedic*
("vertically and crosswise") multipliers. These form every partial product
at the same time and then combine them with ripple-carry adders. They are
built as a hierarchy: 2x2, then 4x4, then 8x8 bits.

At the default size, the filter has 24 taps with 8-bit unsigned samples and
8-bit unsigned coefficients. It takes one block of three samples per clock
and gives out one block of three full-precision 21-bit outputs per clock.

## How the fast FIR algorithm works here

Write the input, output and coefficients in polyphase form with block size 3:

    X0 = x(3k),   X1 = x(3k+1),   X2 = x(3k+2)       (same for Y)
    H0 = h(3j),   H1 = h(3j+1),   H2 = h(3j+2)       (three 8-tap filters)

Let D be a delay of one block, which is z^-3 at the sample rate. A direct
three-parallel filter then computes

    Y0 = H0X0 + D(H1X2 + H2X1)
    Y1 = H0X1 + H1X0 + D(H2X2)
    Y2 = H0X2 + H1X1 + H2X0

which takes nine subfilter products. The FFA gets all nine cross terms from
six subfilters:

    p0   = H0 X0                    p01  = (H0+H1)(X0+X1)
    p1   = H1 X1                    p12  = (H1+H2)(X1+X2)
    p2   = H2 X2                    p012 = (H0+H1+H2)(X0+X1+X2)

and the post-adders then separate the terms again:

    a  = p0 - D(p2)                 (H0X0 - D H2X2)
    b  = p12 - p1                   (H1X2 + H2X1 + H2X2)
    c  = p01 - p1                   (H0X0 + H0X1 + H1X0)
    Y0 = a + D(b)
    Y1 = c - a
    Y2 = p012 - c - b

You can check each line by expanding it. In Y0, for example, the D(H2X2)
hidden in D(b) cancels the -D(p2) in a. This cancellation is why the
intermediate values can be negative even though every input and output is
non-negative. The post-adder therefore computes in two's complement, two
bits wider than the widest subfilter output. Only at the end does it
truncate each output to its true, non-negative width.

There are exactly two block-delay registers. One holds the previous block's
H2X2. The other holds the previous block's b. Both advance only when a block
is accepted. Each subfilter keeps the history of its own polyphase stream.
Together, these registers make up all of the filter's memory.

The sum subfilters work on pre-added data and pre-added coefficients.
`ffa3_preadd` forms X0+X1, X1+X2 and X0+X1+X2 on the input block. A copy
of the same module on each tap forms h(3j)+h(3j+1), h(3j+1)+h(3j+2) and the
sum of all three. These operands are 9 or 10 bits wide, so they do not fit
the 8x8 multiplier. The subfilters that take them use a 16x16 Vedic
multiplier instead: four 8x8 modules and three ripple-carry adders, the same
construction one level up, with the unused high operand bits tied to zero.

## The Vedic multiplier hierarchy

**2x2 (`vedic_mul2`).** Four AND gates form a0b0, a0b1, a1b0 and a1b1.
- Bit 0 is a0b0, the vertical product.
- The two crosswise products go into a half adder. Its sum is bit 1.
- Its carry and a1b1 go into a second half adder. That adder gives bit 2
  (its sum) and bit 3 (its carry).

**4x4 (`vedic_mul4`).** Split each operand into a high and a low 2-bit half.
Four 2x2 blocks form all four half products at once: q0 = aL·bL,
q1 = aH·bL, q2 = aL·bH and q3 = aH·bH. Three ripple-carry adders combine
them:

    adder 1 : {q3, 00} + {00, q2}        6 bits
    adder 2 : q1 + {00, q0[3:2]}          4 bits
    adder 3 : adder1 + adder2      ->  p[7:2]      p[1:0] = q0[1:0]

The two low product bits skip the adders entirely. Adders 1 and 2 work at
the same time, so the carry path is two adders deep.

**8x8 (`vedic_mul8`) and 16x16 (`vedic_mul16`).** These repeat the 4x4
arrangement with four of the next smaller module. The adders are 12/8/12
bits wide for the 8x8 module and 24/16/24 bits for the 16x16 module. The
low quarter of the product (4 or 8 bits) comes straight from q0.

**Ripple-carry adder (`rc_adder`).** A chain of `full_adder` cells. None of
the adder carry-outs above can be set for any operand values, so they are
left unconnected.

## Interface and timing (`ffa3_fir`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active-low reset; clears every delay line, both block delays and the outputs |
| `in_valid` | in | 1 | `x` holds a block to accept at this edge |
| `x` | in | 3 × DATA_W | `x[l]` = x(3k+l), unsigned |
| `coef` | in | TAPS × COEF_W | `coef[i]` = h(i), unsigned; read combinationally, hold it stable while data flows |
| `out_valid` | out | 1 | `y` holds a new output block |
| `y` | out | 3 × Y_W | `y[l]` = y(3k+l) = Σ h(i)·x(3k+l−i), unsigned |

- **Latency.** A block accepted at clock edge t appears at edge t+2, with
  `out_valid` high. The first register is the subfilter output register. The
  second is the post-adder output register.
- **Throughput.** One block (three samples) per clock.
- **Gaps.** `in_valid` may drop at any time. Nothing moves while it is low,
  and the sample stream seen by the filter is just the accepted blocks.
- **After reset.** The filter starts with zero history.

The multipliers and adder chains are purely combinational. The critical path
therefore runs from the subfilter delay line, through one Vedic multiplier
and the subfilter's adder chain, into the subfilter output register.

Parameters: `DATA_W` (default 8), `COEF_W` (8), `TAPS` (24, must be a multiple
of 3), and `Y_W`, which defaults to `DATA_W + COEF_W + $clog2(TAPS)` and is
enough for the full-precision result. `DATA_W` and `COEF_W` may go up to 14,
so that the pre-added operands still fit the 16x16 multiplier. An initial
assertion checks both limits.

## Files

| file | role |
|---|---|
| `rtl/fir_pkg.sv` | block size L = 3 and the default sizes |
| `rtl/ffa3_fir.sv` | top: pre-adders, six subfilters, post-adder |
| `rtl/ffa3_preadd.sv` | the three FFA pre-sums |
| `rtl/fir_subfilter.sv` | one direct-form subfilter of length TAPS/3 |
| `rtl/ffa3_postadd.sv` | subtractors, adders and the two block delays |
| `rtl/vedic_mul2.sv`, `vedic_mul4.sv`, `vedic_mul8.sv`, `vedic_mul16.sv` | the multiplier hierarchy |
| `rtl/rc_adder.sv`, `full_adder.sv`, `half_adder.sv` | adder cells |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Design choices beyond the published structure

These parts follow the published structure: the six-subfilter FFA
structure, the equations above, the positions of the two block delays, the
2x2/4x4/8x8 Vedic multipliers, and the use of the 8x8 multiplier in the
filter. The rest is this design's own:

- **Filter length.** No particular length is fixed. 24 taps is a choice,
  giving subfilters of 8 taps.
- **Number format.** Samples and coefficients are unsigned, because the
  Vedic multiplier is an unsigned multiplier. Signed filtering would need a
  sign-magnitude wrapper around the multipliers or a signed variant of them,
  and neither is provided.
- **16x16 multiplier.** The sum subfilters use a 16x16 Vedic multiplier,
  because their operands outgrow 8 bits.
- **4x4 adder widths.** The first and last adders of the 4x4 module are
  6 bits wide, as the bit fields of its block diagram require (`{q3,00}` is
  six bits). The 4-bit width sometimes quoted for these adders would lose the
  top bits of q3.
- **Subfilters and adders.** Each subfilter is a plain direct-form FIR with
  a registered output. The pre-adders and the subfilter adder chains are
  written as behavioural `+`. Only the adders inside the multipliers are
  explicit ripple-carry chains.
- **Linear phase.** Symmetric coefficients are not folded to save
  multipliers. A linear-phase filter simply loads symmetric coefficients.
- **Handshake, registers and reset.** The `in_valid`/`out_valid` handshake,
  the two register stages and the asynchronous reset are all choices of this
  design.
- **Two-parallel filter left out.** The simpler two-parallel FFA filter
  (three subfilters) is related but is not part of this design.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/fir_pkg.sv tb/tb_ffa3_fir.sv \
        --top-module tb_ffa3_fir
    ./obj_dir/Vtb_ffa3_fir

Replace the testbench name to run another one. The package file is only
needed for the top.

`tb_ffa3_fir` runs the filter at its default size. It compares every output
with a plain sample-by-sample convolution over the accepted input stream,
and checks that each block arrives exactly two clocks after it was accepted
and that `out_valid` is never high at any other time. It goes through four
phases:

1. 300 blocks with random symmetric (linear-phase) coefficients and random
   gaps in `in_valid`.
2. A reset in the middle of the stream.
3. Full-scale data with full-scale coefficients, which drives every output
   to its maximum, 24·255·255.
4. An impulse in each of the three lanes.

At the end, it fails if any of these never happened: a stall, a non-zero
value in either block delay, the mid-stream reset, or a full-scale output.

The other testbenches cover one module each:

- **Multipliers.** The 2x2, 4x4 and 8x8 multipliers are checked for every
  operand pair. The 16x16 multiplier gets corner values and 20,000 random
  pairs.
- **Subfilter.** Two subfilters are checked against a reference
  convolution: an 8x8-multiplier one and a 16x16-multiplier one.
- **Post-adder.** The post-adder is checked against the direct polyphase
  equations, so its reference shares none of the FFA's subtractions.

Each testbench was also shown to fail on a deliberately broken copy of its
module.

Building `tb_ffa3_fir` takes Verilator a few minutes, because the 48
flattened multipliers make a large netlist. The simulation itself finishes
in well under a second.
