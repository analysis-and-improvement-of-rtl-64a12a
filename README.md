# Multiple-polynomial LFSR random number generator for EPC Gen2 tags

EPC Gen2 RFID tags need a 16-bit pseudorandom number (RN16) for anti-collision
and to blind password exchanges. They have room for only a few thousand gates.
A linear feedback shift register (LFSR) fits that budget, but it is linear.
Anyone who sees 2n consecutive output bits of an n-cell LFSR can solve a
linear system for its feedback polynomial and predict everything after.
Mixing true random bits into the LFSR's *output* or *state* does not fix this.
Whenever the random bits happen to be zero, the raw LFSR sequence shows
through, and an eavesdropper can recover the polynomial from a few hundred
bits.

This generator instead lets true random bits choose the feedback polynomial.
In every LFSR cycle, three bits from an on-tag true random number generator
(TRNG) select one of eight primitive degree-16 polynomials. A window of output
bits is then no longer the output of any single LFSR, so the linear system an
attacker would solve has no stable solution. The hardware cost over a plain
LFSR is small:

- three flip-flops for the random bits;
- a small decoder;
- six AND gates that switch taps on and off.

## The polynomial set

Each polynomial is read as C(x) = 1 + c1·x + … + c16·x^16. Coefficient c_k
taps cell s_(17-k) of the register, whose cells run s16 (input) to s1 (output).
All eight polynomials share x^16, x^15, x^9 and 1. They differ only in the six
terms x^4, x^6, x^8, x^10, x^12 and x^14:

| sel | polynomial                          | switchable taps |
|-----|-------------------------------------|-----------------|
| 0   | x16 + x15 + x10 + x9 + x8 + x6 + 1   | c10 c8 c6       |
| 1   | x16 + x15 + x14 + x12 + x10 + x9 + 1 | c14 c12 c10     |
| 2   | x16 + x15 + x14 + x10 + x9 + x8 + 1  | c14 c10 c8      |
| 3   | x16 + x15 + x9 + x6 + 1              | c6              |
| 4   | x16 + x15 + x9 + x4 + 1              | c4              |
| 5   | x16 + x15 + x12 + x9 + x6 + x4 + 1   | c12 c6 c4       |
| 6   | x16 + x15 + x14 + x12 + x9 + x8 + 1  | c14 c12 c8      |
| 7   | x16 + x15 + x14 + x12 + x9 + x4 + 1  | c14 c12 c4      |

Every one of them is primitive: on its own it gives the maximal period
2^16 − 1. `tb_mp_feedback` checks this through the RTL feedback network.

Because the common terms are wired permanently, the feedback function is a
chain of eight two-input XORs:

- c9 (cell s8), c15 (s2) and c16 (s1) feed the chain directly;
- c4 (s13), c6 (s11), c8 (s9), c10 (s7), c12 (s5) and c14 (s3) each pass an
  AND gate enabled by the decoder first.

The table is in `mp_prng_pkg::poly_taps`. The enable vector is
`{c14,c12,c10,c8,c6,c4}`.

## Datapath

```
             +--------------------------------------------------+
  fb ------> | s16 s15 s14 s13 ... s3 s2 s1 | --> out_bit (s1), rn16 = {s16..s1}
   ^         +--------------------------------------------------+
   |              |      |     |    |    |     |    |   |   |
   |             AND    AND   AND  (s8) AND   AND  AND (s2)(s1)
   |              |      |     |    |    |     |    |   |   |
   +------------- XOR chain (8 XORs) <------------------------+
                  ^ six enables
   TRNG -> t0 -> t1 -> t2 -> decoding logic (select + rotation)
   seed storage -> LFSR load          controller: init / req / 16 rotations
```

| module            | role                                                              |
|-------------------|-------------------------------------------------------------------|
| `mp_prng`         | top level; wires the blocks below                                 |
| `mp_lfsr16`       | 16-cell shift register, shifts toward s1, loadable with the seed  |
| `mp_feedback`     | 6 AND + 8 XOR feedback network                                    |
| `mp_trn_reg`      | three cells t0..t2 filled serially from the TRNG                  |
| `mp_poly_decoder` | turns t into a polynomial, applies the rotation rule              |
| `mp_seed_store`   | 16-bit seed register                                              |
| `mp_prng_ctrl`    | seed load and 16-cycle runs                                       |
| `mp_prng_pkg`     | sizes, types, the polynomial table                                |

## Decoding logic and the rotation

If the same polynomial were used in two consecutive cycles, an attacker would
get a longer stretch of fixed-polynomial output. The decoder therefore
remembers the index it used in the last LFSR cycle. When the three random bits
name that index again, it takes the next one, (t + 1) mod 8. So two
consecutive LFSR cycles never use the same polynomial, even when the TRNG
stalls or repeats. The exact rotation rule is this implementation's reading of
"a simple rotation" in the original proposal.

The random-bit register shifts only when `trn_valid` is high. The TRNG may be
slower than the clock. A stalled source leaves t unchanged, and the rotation
then alternates between two polynomials instead of repeating one.

## Control and timing

`mp_prng_ctrl` has three states: IDLE, RUN and DONE.

- **Seed load.** `init` in IDLE copies the seed storage into the LFSR in one
  cycle.
- **Generation.** `req` in IDLE starts a run of `ROUNDS` = 16 LFSR cycles.
  There is one new polynomial selection per cycle.
- **Result.** If `req` is high in cycle 0, the LFSR shifts in cycles 1–16 and
  `rn16_valid` pulses in cycle 17. The LFSR contents `{s16..s1}` are then the
  new number. They stay on `rn16` until the next run.
- **Back-to-back.** With `req` held high, one number comes out every 18
  cycles.
- **While busy.** `init` and `req` are ignored. In IDLE, `init` wins over
  `req`.

The Gen2 budget is 220 cycles (2.2 ms at 100 kHz) per 16-bit number, so 17
cycles leaves a wide margin. A Gen2 uplink at 640 kbps would need a clock of at
least 720 kHz to stream numbers continuously.

`poly_sel` shows the polynomial used by the LFSR cycle in progress. It is for
observation only. `out_bit` is cell s1, the serial output.

Reset is asynchronous and active-low. After reset:

- the LFSR and the seed storage hold `SEED_DEFAULT` (16'hACE1);
- t and the remembered index are 0.

## Seed storage and the zero state

The all-zero state is a fixed point of every polynomial in the set. The seed
storage therefore ignores writes of zero, and an assertion in `mp_prng` flags
the LFSR if it ever reaches zero.

The write port (`seed_wr`, `seed_in`) lets each tag be personalised with its
own seed. It costs 16 flip-flops, which is more than the roughly 24 gates the
original estimate gives for seed storage. That estimate implies a seed that is
hard-wired or held in existing memory. If the seed comes from elsewhere, tie
`seed_wr` low and set `SEED_DEFAULT`.

## What is not included

The TRNG itself is not included. It is a physical noise source (thermal
noise, oscillator jitter, power-up memory state or received-signal strength
are the usual candidates), and no particular circuit is specified. It enters
through `trn_bit` / `trn_valid`. The testbenches drive these from `$urandom`.

## Parameters

| parameter      | default  | meaning                                                        |
|----------------|----------|----------------------------------------------------------------|
| `ROUNDS`       | 16       | LFSR cycles per number (also on `mp_prng_ctrl`)                |
| `SEED_DEFAULT` | 16'hACE1 | seed after reset (also `RESET_VALUE` on `mp_lfsr16`); this value is arbitrary |

The LFSR length (16), the 3 selector bits and the polynomial table are fixed
in `mp_prng_pkg`. The tap wiring in `mp_feedback` is specific to this
polynomial set, so changing the length means choosing a new set.

## Size

Generic synthesis of `mp_prng` gives 45 flip-flops and about 107 two-input
gates and muxes. The flip-flops are:

- 16 LFSR;
- 3 random bits;
- 16 seed;
- 3 previous index;
- 7 controller.

At about 12 gate equivalents per flip-flop this is roughly 700 gate
equivalents. That is in line with the original estimate of about 760, and well
under the 2,000–5,000 usually quoted for a Gen2 PRNG.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench                | what it shows                                                                 |
|--------------------------|-------------------------------------------------------------------------------|
| `tb_mp_feedback`         | random vectors against a parity model; full period 65535 for all 8 polynomials |
| `tb_mp_lfsr16`           | shift, load priority, reset value against a model                            |
| `tb_mp_trn_reg`          | serial fill, hold when no fresh bit                                          |
| `tb_mp_poly_decoder`     | table lookup, rotation, never the same polynomial twice, all 8 used           |
| `tb_mp_seed_store`       | reset value, writes, zero writes ignored                                     |
| `tb_mp_prng_ctrl`        | exactly 16 shift cycles, result in cycle 17, busy, ignored inputs            |
| `tb_mp_prng`             | whole generator at default parameters against a cycle-accurate model; 17-cycle latency; counts each mechanism (seed write, rejected zero seed, seed load, rotation, every polynomial, TRNG stall, request while busy) and fails if one never happens |
| `tb_mp_prng_stats`       | 2 million numbers: 1024-bin histograms of the upper and lower 10 bits within 0.8–1.25 of uniform (Gen2 property 1, reduced), serial correlation below 0.005 (property 3 as usually tested), bit balance, 18-cycle throughput |
| `tb_mp_prng_attack`      | the linear attack on 32-bit windows (solve a 16x16 GF(2) system, look for 16 identical solutions in a row): recovers a plain LFSR's polynomial every time, but on 400,000 bits of this generator no recovered polynomial predicts the following 16 bits more than 0.025 % of the time (measured: 1 window in about 400,000) and the self-verified attack never succeeds |
| `tb_mp_prng_population`  | 10,000 tags with the same seed and 10,000 with random seeds: no two share their first 64 output bits (Gen2 property 2) |

Measured results:

- `tb_mp_prng_stats`: histograms between about 0.92 and 1.10 of uniform;
  serial correlation about 0.001.
- `tb_mp_prng_population`: no repeated sequence in either population.

The full Gen2 property-1 test over all 65536 values needs hundreds of millions
of numbers and was not simulated.

To run one testbench with Verilator, from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mp_prng_pkg.sv tb/tb_mp_prng.sv --top-module tb_mp_prng -o sim
./obj_dir/sim
```

`tb_mp_prng_stats` takes about 20 s. The others take about a second or less.

## Where this RTL makes its own choices

The structure is the original proposal's:

- the 16-cell LFSR and the output at s1;
- the three random bits;
- the eight polynomials and the fixed and switchable taps;
- the AND/XOR network;
- sixteen rotations per number.

The following are choices of this implementation:

- the handshake (`init`, `req`, `rn16_valid`) and the 17-cycle latency;
- taking `rn16` as the register contents after the 16 cycles;
- the `trn_valid` strobe, and the random-bit register as a plain shift
  register;
- the selector-to-polynomial order (the order listed above) and the enable bit
  order;
- the rotation rule ((t + 1) mod 8 on a repeat);
- the seed default, the writable seed register and the rejection of zero
  seeds;
- asynchronous reset.

The original text says the eight polynomials have "ten common elements and six
different ones". Their listing shows four common terms (x^16, x^15, x^9, 1) and
six switchable ones. This RTL follows the listing and the six-AND-gate
structure.
