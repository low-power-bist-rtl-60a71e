# Low-power scan BIST with a q-bit LFSR pattern generator

Built-in self-test (BIST) of a scan design spends a large share of its energy in
the test logic itself. The pseudo-random pattern generator, an LFSR, clocks every
cell of its register once per pattern bit it delivers, and every one of those
transitions costs switching power. This design uses a *modified LFSR* instead.
In one step it computes **q new bits** of the same pseudo-random sequence. Its
register therefore changes once per q delivered bits, not once per bit. The scan
chain still receives exactly the bit stream a standard LFSR would give it, one
bit per clock. The test patterns, and so the fault coverage, are the same; the
switching activity per delivered bit falls roughly as 1/q.

Around that generator sits a complete test-per-scan BIST: a controller that
alternates shifting and capturing, and a serial signature analyzer that
compacts the responses leaving the scan chain. The circuit under test is not
part of the RTL. The top module brings out its scan port.

## The q-bit generator

### Sequence and state

The generator of degree N with polynomial f(x) = 1 + c1·x + … + cN·x^N
(cN = 1) produces the sequence

    s[t] = XOR over all i with ci = 1 of s[t-i]

The state is a window of the last N bits, `state[i] = s[t-1-i]`, so `state[0]`
is the newest bit. A polynomial is written as a bit mask `POLY[N:0]`, where bit i
is ci. For example, 1 + x^3 + x^28 is `(1<<28) | (1<<3) | 1`.

### The V^q matrix (`vq_matrix`)

Everything the sequence does in the next q steps is a linear function of the
current state over GF(2). Call the one-step state-transition matrix V. Then the
state q steps ahead is V^q · state, and each of the q new bits s[t] … s[t+q-1]
is some row of state bits XORed together. `vq_matrix` works these rows out at
elaboration time with a constant function:

1. Start with the N window bits as unit vectors.
2. Extend the window by q positions, applying the recurrence to the vectors
   rather than to bits.

The circuit then holds nothing but one XOR tree per output bit. There is no
coefficient memory and no run-time matrix multiply. Because the recurrence is
simply chained past the window, q may be larger than N. For example, a degree-5
generator can deliver 10 bits per step.

### The register (`qbit_generator`)

`qbit_generator` is the N-bit state register. Each clock with `step` high, it
loads V^q · state. The q bits of the current step are always present on
`y[q-1:0]`:

- `y[0]` is the oldest bit, s[t].
- `y[q-1]` is the newest.
- Reading y[0], y[1], … and then the next step's group gives the standard LFSR
  stream without a gap.

### Pacing the scan input (`modq_counter`, `lp_tpg`)

`lp_tpg` is the complete pattern generator. A modulo-q counter counts the clocks
on which `en` is high:

- **Serial output:** `scan_bit = y[cnt]` is the bit for the scan chain.
- **Generator step:** when the counter is at q-1 (`last`), the generator steps
  on the same clock edge.
- **Parallel outputs:** `y` carries the whole group, and `group_start` marks
  cnt = 0. A design that feeds several scan chains in parallel can use these.

Timing with q = 5 and `en` held high:

    clock          0    1    2    3    4    5    6 ...
    cnt            0    1    2    3    4    0    1
    scan_bit      s0   s1   s2   s3   s4   s5   s6
    state         S0   S0   S0   S0   S0   S5   S5     (changes once per 5 clocks)

After reset (synchronous, active high, loads `SEED`), the first scan bit is
valid in the cycle after `rst` falls.

### Switching activity

`tb/tb_tpg_sweep.sv` runs the generator at q = 2…10 for every configuration
listed under "Polynomials". It also counts how many bits of the generator
register toggle per delivered bit, which is the weighted-switching-activity
measure behind dynamic power. The measured values follow N/(2q):

| degree | q=2 | q=3 | q=5 | q=10 |
|---|---|---|---|---|
| 5  | 1.29 | 0.86 | 0.52 | 0.26 |
| 28 | ≈7.0 | ≈4.7 | ≈2.75 | ≈1.4 |
| 33 | ≈8.4 | ≈5.6 | ≈3.3 | ≈1.65 |

A standard LFSR toggles about N/2 register bits per delivered bit. The XOR
network grows with q, but it is evaluated only once per group.

The power savings reported for the method come from FPGA power-analysis tools:

| degree | tool measurement | saving, 10 vs 2 new bits |
|---|---|---|
| 5  | about 225 mW at q = 2 down to 53 mW at q = 10 | n/a |
| 33 | per new bit | about 82 % |
| 28 | per new bit | about 82 % |

Those numbers cannot be reproduced by RTL simulation. The toggle count is the
closest stand-in.

## The BIST around it

### Top module (`lp_bist_top`)

    lp_tpg ── scan_in ─▶ [ circuit under test, scan chain of SCAN_LEN cells ] ── scan_out ─▶ signature_analyzer
       ▲                        ▲ scan_en, capture                                               ▲
       └──────────── bist_controller (tpg_en, scan_en, capture, sa_en, sa_clear) ────────────────┘

### Controller (`bist_controller`)

After a one-clock `start` pulse, the controller repeats this cycle `PATTERNS`
times:

1. **SHIFT:** `SCAN_LEN` clocks. The generator delivers one bit per clock into
   the chain.
2. **CAPTURE:** one clock. The circuit under test loads its response into the
   scan cells.

While a pattern is shifted in, the previous response shifts out and is
compacted. During the first load the chain holds no response, so the analyzer
is held. After the last capture:

3. **UNLOAD:** `SCAN_LEN` more clocks compact the final response.
4. **DONE:** `done` stays high and `signature` is valid until the next `start`.

`busy` lasts exactly PATTERNS·(SCAN_LEN+1)+SCAN_LEN clocks. A new `start`
clears the analyzer, and the generator carries on from where it stopped, so
the run uses fresh patterns. `rst` restores the seed.

### Signature analyzer (`signature_analyzer`)

The signature analyzer is an LFSR with an input, wired as a polynomial divider
(internal XOR). For a response stream d0, d1, …, d(M-1), the signature is the
remainder of d0·x^(M-1) + … + d(M-1) divided by the analyzer polynomial.
`sig[i]` is the coefficient of x^i.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 33 | generator degree |
| `Q` | 5 | new bits per generator step |
| `POLY` | 1+x^2+x^3+x^4+x^6+x^7+x^33 | generator polynomial, bit i = coefficient of x^i |
| `SEED` | 33'h1_2345_6789 | reset state (must not be zero) |
| `SA_N`, `SA_POLY` | 33, same as `POLY` | analyzer degree and polynomial |
| `SCAN_LEN` | 33 | scan cells in the circuit under test |
| `PATTERNS` | 1000 | patterns per run |

The defaults live in `rtl/bist_pkg.sv`.

### Where the defaults come from

Degree 33 is the size the method used for the ISCAS'85 benchmark C1908, and
C1908's 33 primary inputs set `SCAN_LEN`. q = 5 is the size of the method's
worked example. The method sweeps q from 2 to 10 without naming one main value.

### Design choices

The following are this design's own choices, not part of the method:

- the seed;
- the analyzer's structure and polynomial;
- the controller's sequence;
- `PATTERNS`;
- the `en` input of `lp_tpg` and its parallel outputs.

The method also describes low-power signature analyzers without giving their
structure, so the analyzer here is a plain serial one.

### How the counter and generator are connected

The method names three parts of the generator:

- a modulo-q counter;
- the V^q matrix logic;
- the q-bit register.

It does not say how the three are connected. The reading used here is that the
counter paces the register and chooses the serial bit. This keeps the bit stream
identical to a standard LFSR, which lets the rest of a scan BIST stay unchanged.

## Polynomials

The method was evaluated with the following configurations:

- **Degree 5:** all six primitive polynomials.
- **Degree 28:**
  - 1+x^3+x^28
  - 1+x+x^4+x^6+x^28
  - 1+x+x^4+x^5+x^6+x^8+x^28
- **Degree 33:**
  - 1+x^4+x^6+x^33
  - 1+x^2+x^3+x^4+x^6+x^7+x^33
  - 1+x^4+x^10+x^19+x^20+x^23+x^33
- **Degree 6, worked example:** 1+x^3+x^6 with q = 5.

All three degree-28 polynomials are primitive, and so are the second and third
degree-33 polynomials. Two of the listed polynomials are not primitive:

| polynomial | problem | effect |
|---|---|---|
| 1+x^3+x^6 | divides x^9−1 | the sequence repeats every 9 bits |
| 1+x^4+x^6+x^33 | x has order 516 033 modulo it | far from the full 2^33−1 period |

The default therefore uses 1+x^2+x^3+x^4+x^6+x^7+x^33, which is primitive. Any
polynomial can be set with `POLY`; the hardware works for all of them.

Workloads the defaults cannot hold:

- **ISCAS'89 s38417:** about 1664 scan cells, from 28 inputs plus 1636
  flip-flops. It needs `SCAN_LEN = 1664`, and `N = 28` to match the method's
  choice. The counters size themselves from the parameters.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_modq_counter` | Q = 5 and 3 against an integer model under random enables |
| `tb_vq_matrix` | new bits and next state against q steps of a standard LFSR, for random states; degree 33 / q 5 and degree 5 / q 10 |
| `tb_qbit_generator` | every group against the standard LFSR; the state holds without `step`; the degree-5 period is 31 steps |
| `tb_lp_tpg` | serial stream bit-exact against the standard LFSR under random enables; the counter equals the bit index mod q; the group stays constant for q clocks (degree 33 / q 5 and degree 28 / q 10) |
| `tb_signature_analyzer` | signatures of random streams against schoolbook polynomial long division, with `clear` |
| `tb_bist_controller` | the phase of every cycle, the latency and the event counts, over two runs |
| `tb_lp_bist_top` | the whole BIST at default sizes, with a behavioural circuit under test; see below |
| `tb_lp_bist_top_small` | the same checks for degree 28, q = 10 and a 50-cell chain (length not a multiple of q) |
| `tb_tpg_sweep` | all evaluated polynomials at q = 2…10; stream correctness and toggle counts |

`tb_lp_bist_top` uses the behavioural circuit under test in `tb/cut_model.sv`.
It compares every pattern bit with a reference LFSR and models the scan chain
and circuit in software. It compares both runs' signatures with long-division
remainders. It also counts shift, capture, unload, generator steps, done and
restart.

The reference models are in `tb/tb_ref_pkg.sv` and are independent of the RTL.

The RTL carries concurrent assertions of its own. In `bist_controller` they
check these scan rules:

- shift and capture never overlap;
- the generator and the analyzer run only while the chain shifts;
- a capture lasts one clock.

In `lp_tpg` an assertion keeps the counter inside 0…q-1.

To simulate with Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/bist_pkg.sv tb/tb_ref_pkg.sv tb/tb_lp_bist_top.sv --top-module tb_lp_bist_top
    ./obj_dir/Vtb_lp_bist_top

Replace `tb_lp_bist_top` with any other testbench name to run it.

## Files

`rtl/`:

- `bist_pkg.sv`: defaults and the phase enum.
- `vq_matrix.sv`, `qbit_generator.sv`, `modq_counter.sv`, `lp_tpg.sv`: the
  generator.
- `signature_analyzer.sv`, `bist_controller.sv`: the rest of the BIST.
- `lp_bist_top.sv`: the top.

`tb/` holds the testbenches, the reference package, the sweep helper
`tpg_sweep_unit.sv` and the stand-in circuit under test.
