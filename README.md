# Low-power three-parallel retimed LFSR, with an LSB-pair steganography front end

A linear feedback shift register (LFSR) normally produces one bit per clock.
The clock cannot go faster than the feedback loop allows, so the usual serial
form is slow. This design computes the LFSR of

    g(x) = 1 + x + x^8 + x^9

three bits per clock. It pipelines and retimes the three-parallel form until
the loop from any state flop back to itself holds only a 2:1 mux and one
2-input XOR. Every state flop is a *gated-clock* flop. Such a flop gets a clock
edge only when its next value differs from its current one, so a bit that
does not change costs no clock power.

The LFSR is then used as a pseudo-random number generator (PRNG), seeded by a
key, for image steganography. A message bit is hidden in a *pair* of pixels,
as the XOR of their two least significant bits, after being scrambled with a
PRNG bit. The receiver runs an identical LFSR from the same key and undoes
the scrambling.

## The serial LFSR and its look-ahead form

The serial reference is a Galois-style shift register: one flop, a chain of
seven, then one more, with XORs after the first flop and after the chain of
seven. The output `y(n)` is the last flop. `w(n) = y(n) ^ u(n)` is fed back into
the first flop and into both XORs. As a recursion:

    y(n) = y(n-1) ^ y(n-8) ^ y(n-9) ^ u(n-1) ^ u(n-8) ^ u(n-9)

With `u = 0` and a non-zero starting state, the register runs free as a
generator. With a message on `u`, it is the division register of a CRC.

`y(n)` depends on `y(n-1)`, so three outputs cannot be produced in one clock
as written. Substituting the recursion into itself twice removes `y(n-1)` and
`y(n-2)`:

    y(n) = y(n-3) ^ y(n-8) ^ y(n-11) ^ v(n)
    v(n) = u(n-1) ^ u(n-2) ^ u(n-3) ^ u(n-8) ^ u(n-11)

In polynomial terms, the numerator and the denominator are both multiplied by
`1 + z^-1 + z^-2`. Over GF(2), `(1 + z^-1)(1 + z^-1 + z^-2) = 1 + z^-3`. Every
feedback term is now at least three samples (one block) old. The three
outputs of a block therefore depend only on earlier blocks, and can be
computed side by side. `lfsr_pkg` holds the tap list of `v`.

## Three-parallel datapath (`lfsr3_retimed`)

Block `c` is the three input bits `u(3c), u(3c+1), u(3c+2)`, which arrive on
`u[2:0]` in one clock. The outputs `y(3c+j)` come out on `y[j]`. The datapath
has three parts.

**Feed-forward network.** `v` for the block being entered is an XOR of the
current input and an input history of 4 blocks (12 flops). `u(n-11)` reaches 4
blocks back. The tap positions are computed in a loop from the tap list, as
lane `(j-d) mod 3`, `((j-d) mod 3 - (j-d)) / 3` blocks back. This network has
no feedback. A pipelining cutset, register `t`, separates it from the loop.

**Retimed feedback loop.** For output lane `j` of block `c`, the terms needed
are:

| lane | `y(n-3)`          | `y(n-8)`          | `y(n-11)`         |
|------|-------------------|-------------------|-------------------|
| 0    | block c-1, lane 0 | block c-3, lane 1 | block c-4, lane 1 |
| 1    | block c-1, lane 1 | block c-3, lane 2 | block c-4, lane 2 |
| 2    | block c-1, lane 2 | block c-2, lane 0 | block c-3, lane 0 |

Only `y(n-3)` is needed at once. The two older terms already sit in flops one
clock earlier, so their XOR `h` is formed one clock early and stored in the
cutset register together with `v`: `t <= h ^ v`. The loop is then

    fb  = fb_en ? y_q : 0
    y_q <= fb ^ t

so the critical loop is one mux and one 2-input XOR. Without this retiming,
the loop would also contain the XOR tree of the older terms. The shared
feedback nodes, each needed by two lanes, would then load the loop with their
fan-out. The feedback delay line holds `fb` for one block (`d1`, all three
lanes) and for two blocks (`d2`, lanes 1 and 2 only; lane 0 never needs it).

**Feedback muxes.** The muxes select either the fed-back outputs or a
constant 0. `fb_en` acts on the block held in the cutset register, which is
one clock behind `u`. To restart from the zero state (a new message, or a new
key), do this:

1. Drive `u = 0` for the clock after the last block.
2. Hold `fb_en` low for the next 6 clocks, with `u` still 0.

Every register is then 0. The asynchronous reset `rst_n` reaches the same
state.

**Timing.** One block is accepted every clock. A block entered before rising
edge `k` is on `y` after rising edge `k+1`, a latency of 2 clocks: the cutset
register, then the output register. The state is 23 flops: 12 input history,
3 cutset, 3 output, 3 + 2 feedback delay.

**Keys.** There is no separate seed port. A key is loaded by shifting it in
through `u` from the zero state. Nine key bits (3 clocks) cover the whole
serial state. After that, hold `u = 0` and the LFSR runs free.

## Gated-clock flops (`gated_ff`, `lfsr_reg`)

Each state bit is a flop whose clock is

    gclk = ~(clk_n & (d ^ q))

`clk_n` is the inverted system clock. One inverter serves all flops of an LFSR.

- While `clk` is high, `gclk` stays high.
- While `clk` is low, `gclk` falls only if the flop's input differs from its
  output.
- `gclk` rises again at the next rising edge of `clk`, and the flop loads `d`.

The result is exactly a rising-edge flop that receives no edge when it would
not change. If `d` changes back to `q` during the low phase, `gclk` can rise
early. The flop then reloads the value it already holds, which is harmless.

Whether gating saves power depends on how often a bit toggles. Each flop adds
an XOR and a NAND, and these load the clock, so gating wins only when the
clock capacitance saved outweighs the gates added. In the testbenches, the
gated LFSR delivered 28–41 % of the clock edges that plain flops would get.

`lfsr_reg` wraps a W-bit register. `GATED = 1` builds gated flops;
`GATED = 0` builds ordinary `always_ff` flops with the same behaviour. The
`CLOCK_GATING` parameter of `lfsr3_retimed` and of the top selects between
them. Its default is 1. Each register brings out the clock its flops received
(`gclk`), so that clock activity can be counted.

Gated clocks derived from data need care in synthesis and timing analysis.
The XOR/NAND pair must not glitch high during the clock's high phase. Here
`clk` holds `gclk` high during that phase, but a real flow must keep this
structure intact (no resynthesis into other gates). The RTL describes the
structure; it does not make it safe for every library.

## LSB-pair steganography (`stego_pair_embed`, `stego_pair_extract`)

- **Sender.** Each lane computes `m = msg ^ prn`. If
  `lsb(a) ^ lsb(b) == m`, the pair passes unchanged. Otherwise the LSB of
  pixel `a` is inverted, so that pixel moves by one gray level, and `changed`
  is raised. Pixel `b` is never modified.
- **Receiver.** It computes `msg = lsb(a) ^ lsb(b) ^ prn`.

Because the bit lives in the XOR of two LSBs, about half of all pairs need
no change. The per-pixel LSB distribution is less disturbed than with plain
LSB replacement.

## Top level (`lfsr_stego_top`)

The top has two sides, sharing one clock.

- **Sender:** one `lfsr3_retimed` and three embed lanes.
- **Receiver:** one `lfsr3_retimed` and three extract lanes.

Lane `j` uses LFSR output bit `j` of the same clock. Three pixel pairs and
three message bits are handled per clock. Each side has its own `u` (key
input) and `fb_en`. The embed and extract paths are combinational, and the
LFSR outputs and flop clocks are brought out. Parameters: `PIX_W = 8` (gray
levels) and `CLOCK_GATING = 1`.

## What is this design's own choice, and what is missing

These follow the original architecture:

- the polynomial and three-way parallelism;
- a pipelining cutset between the feed-forward network and the loop;
- retiming so that the loop carries no extra delay and no shared XOR;
- the feedback muxes with a 0 input;
- the XOR-plus-clock-gate flop with one shared clock inverter;
- the XOR-of-two-LSBs embedding rule.

These are choices made here:

- The exact look-ahead equation, tap placement and latency were derived
  here. They are verified against the serial register. They may differ in
  detail from other drawings of the same architecture.
- Who drives the muxes, and when; the flush sequence.
- The asynchronous reset.
- Key loading through `u`.
- Which pixel of a pair is modified.
- The message randomizer as a plain XOR with the LFSR bit of the same lane.
- 8-bit pixels.

Not built:

- **Pixel selection (interleaver).** Pairs must arrive already chosen. No
  rule for mapping PRNG bits to pixel positions is defined here.
- **Several LSBs per pixel.** Only one bit per pair is carried.
- **Two keys.** A design with two separate seed keys would need a rule for
  combining them. Each side here takes one key stream.

**Caveat on the polynomial.** `1 + x + x^8 + x^9 = (1 + x)^9` over GF(2). It is
a CRC-style polynomial, not a primitive one. Left to run free, its output
repeats with a period of at most 16 bits, whatever the key. The architecture
is right for this polynomial and demonstrates the technique, but the stream is
a weak keystream. A practical PRNG would use a primitive polynomial, which
means deriving a new look-ahead tap list for it.

## Files

| file | contents |
|------|----------|
| `rtl/lfsr_pkg.sv` | lanes, look-ahead tap list, flop count, `lane_t` |
| `rtl/gated_ff.sv` | gated-clock flop |
| `rtl/lfsr_reg.sv` | W-bit register of gated or plain flops |
| `rtl/lfsr3_retimed.sv` | three-parallel pipelined, retimed LFSR |
| `rtl/stego_pair_embed.sv`, `rtl/stego_pair_extract.sv` | LSB-pair lanes |
| `rtl/lfsr_stego_top.sv` | sender and receiver |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl --top-module lfsr_stego_top_tb \
        rtl/lfsr_pkg.sv tb/lfsr_stego_top_tb.sv
    ./obj_dir/Vlfsr_stego_top_tb

Replace the top module and testbench file to run another testbench. `-Irtl`
lets Verilator find the modules by file name.

What the testbenches check:

- **`lfsr3_retimed_tb`** runs a gated and a plain instance side by side
  against a bit-serial model of the shift register: a random message, a
  flush, a key load with free running, a second flush, and a second message.
  Every output bit is checked, and so is the 2-clock latency. The test also
  confirms that gated flops skip clock edges.
- **`lfsr_stego_top_tb`** runs the whole design at its default parameters
  for three sessions. Same key: every message bit must come back. New key
  after a flush: again, every bit must come back. Mismatched keys: the
  recovered bits must go wrong. The test counts key loads, flushes, modified
  and unmodified pairs, wrong-key errors and suppressed clock edges, and
  fails if any of these never happened.
- **`gated_ff_tb`** checks that the flop is clocked exactly when its input
  differs from its output, including input glitches during the low phase.
- **`stego_pair_embed_tb`** and **`stego_pair_extract_tb`** cover all LSB
  combinations, plus random pixels.

Not checked by simulation: the clock speed gained by retiming and the power
saved. Both depend on a cell library, and neither is measured here.
