# N-bit parallel-output LFSR

A linear feedback shift register (LFSR) is the usual hardware pseudo-random
generator: a chain of flip-flops shifts by one place per clock, and the bit
entering the chain is the XOR of a few taps. The classic single-output LFSR
gives one new pseudo-random bit per clock. Earlier "multiple output"
architectures get more than one bit per clock. They clock only some of the
flip-flops each cycle and move the taps around. That takes a phase
generator, switch control logic or extra XOR gates.

This design does the opposite. Every flip-flop is clocked on every edge, and
the whole register is the output. That gives N output bits per clock from
N D flip-flops, one 2-input XOR and a load multiplexer. There is no phase
generator and no control unit. The cost is power, since the whole register
toggles every cycle. The characteristic polynomial has two terms besides
the constant:

    F(X) = 1 + X^(N/2) + X^N

At the default N = 6 this is 1 + X^3 + X^6.

## The circuit

Flip-flop k (k = 1..N) is bit `q[k-1]`. On every rising edge:

    q[N-1:1] <= q[N-2:0]                 // bits move from LSB towards MSB
    q[0]     <= q[TAP-1] ^ q[N-1]        // XOR of flip-flop N/2 and flip-flop N

If `load` is high at the edge, `q <= r` replaces the shift. For N = 6 that is
six D flip-flops, FF1 to FF6, and one XOR fed from FF3 and FF6 whose output
goes back into FF1. Synthesis gives one 6-bit register, one 1-bit XOR and a
6-bit 2:1 multiplexer for the load.

The N output bits of one clock are not N independent new bits. Only `q[0]` is
new; the other bits are the previous word shifted by one. Consecutive words
overlap in N-1 bits. What the design offers is a full N-bit word every clock
from the cheapest possible LFSR hardware.

## The sequence at N = 6, and why it is short

With seed `001011` (written q[5]..q[0]) the register runs through nine states
and then repeats:

    001011 -> 010110 -> 101101 -> 011010 -> 110100 ->
    101000 -> 010001 -> 100010 -> 000101 -> 001011 -> ...

A plain 6-bit shift register that only rotates would repeat after 6 clocks.
A maximum-length 6-bit LFSR would run through 63 states. The two-term
polynomial sits in between, and this follows from its algebra:

    X^(3N/2) + 1 = (X^(N/2) + 1) (X^N + X^(N/2) + 1)

So the feedback polynomial divides X^(3N/2) + 1. That means **every state
returns to itself after 3N/2 clocks**, whatever the seed. This is 9 clocks for
N = 6, 24 for N = 16 and 48 for N = 32.

For N = 6 the polynomial is also irreducible. As a result, all 63 non-zero
seeds have a period of exactly 9, in seven disjoint cycles. The all-zero seed
locks the register at zero. The generator suits only uses that need very
little security and very little hardware. It is not a cryptographically
strong generator, and it is far from maximum length.

## Interface and timing

`par_lfsr #(N, TAP)`:

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| `clk`  | in  | 1     | rising-edge clock; every flip-flop is clocked every cycle |
| `load` | in  | 1     | synchronous seed load; has priority over shifting |
| `r`    | in  | N     | seed |
| `q`    | out | N     | register contents = the N-bit parallel output |

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 6       | register length |
| `TAP`     | `N/2`   | middle tap: flip-flop `TAP` is XORed with flip-flop `N` (must be 1..N-1) |

- A seed presented with `load` high at edge k appears on `q` right after edge k.
- Each later edge with `load` low gives the next state, so there is one new
  word per clock.
- Holding `load` high reloads `r` on every edge.

There is no reset. `q` is undefined until the first load, and a design that
uses the generator must load a non-zero seed before it reads `q`.

## Design choices beyond the published circuit

These follow the published circuit:
- N = 6
- the tap positions
- the shift direction
- the port set: `r`, `load`, `clk`, `q`
- the plain D flip-flops without reset
- the load multiplexer in front of each flip-flop

These choices belong to this RTL:
- **Load is synchronous.** The published description only says that the seed
  is given to Q while `load` is high. Its schematic uses plain D flip-flops
  with a multiplexer in front, which means a synchronous load.
- **The `TAP` parameter** lets the middle tap move. Its default is N/2,
  rounded down for odd N. The published polynomial is only defined for even N.
- **Concurrent assertion** `a_load` checks that a seed loaded at one edge is
  on `q` after it.
- **No guard against the all-zero seed.** The register stays at zero, as any
  XOR LFSR does.

## Verification

| testbench | what it runs |
|-----------|--------------|
| `tb/par_lfsr_tb.sv` | The default N = 6 design, end to end. It checks the one-clock load latency and the nine-state sequence above, twice around. It runs all 64 seeds for 20 clocks each and checks every state and the period: 9 for each non-zero seed, 1 for zero. It covers a load in the middle of a run and a load held high for several edges. Each state is compared with a reference that follows the output bit stream `s[t] = s[t-3] ^ s[t-6]` rather than the register. Every mechanism (load, shift, a 1 fed back into the LSB, a return to the seed) must occur at least once. |
| `tb/par_lfsr_sweep_tb.sv` with `tb/par_lfsr_check.sv` | N = 4, 5, 8, 16, 32 and 64 with the default tap, and N = 7 with TAP = 3. Each runs 8 random non-zero seeds for 100 clocks against the same bit-stream reference. For even N it also checks the return to the seed after 3N/2 clocks. |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog if it hangs. To run one with Verilator 5:

    verilator --binary --timing --assert --top-module par_lfsr_tb \
        -y rtl -y tb +libext+.sv tb/par_lfsr_tb.sv
    ./obj_dir/Vpar_lfsr_tb

For the sweep, use `--top-module par_lfsr_sweep_tb` and `tb/par_lfsr_sweep_tb.sv`
instead. Both run in well under a second.

## Changing it

- Use a different length with `par_lfsr #(.N(16)) u (...)`.
- The shift and the feedback are the two lines of the `always_ff` block in
  `rtl/par_lfsr.sv`. A polynomial with more taps needs a wider XOR on `q[0]`
  and nothing else.
- If a maximum-length sequence is needed, choose a primitive polynomial
  instead of the two-term form. The structure and the one-word-per-clock
  timing stay the same.
