# Low-energy prime-field ECC scalar multiplier with a flattened power profile

This is a small, serial elliptic-curve processor. It computes one scalar
multiplication Q = k·P on a short Weierstrass curve y² = x³ + ax + b over
GF(p). It is built for devices with little energy to spare, such as sensor
nodes and RFID tags. With N = 192 it needs about 630,000 clock cycles per
192-bit multiplication. The clock can be slow, around 1 MHz.

The design follows a published low-energy processor that was tuned for power.
The aim is a power draw that stays close to its average throughout the
computation. A flat power trace has two benefits:

* The battery's peak current comes close to its average current.
* A simple power analysis attack has less to read from the trace.

In the published analysis, one unit caused most of the peaks: the
adder/subtractor, working in the "halving" phase of the modular inverse. Its
fix is kept here. The unit has **a single adder**, which performs a modular
addition or subtraction in two clock cycles instead of one. The other
variant, with two chained adders and operand-isolation gates, is not built.

Everything runs in affine coordinates. The curve is not fixed in hardware: p,
a and one precomputed constant are inputs.

## Block structure

```
ecc_processor
├── ecc_scalar_ctrl   key-bit loop, double-and-always-add
├── ecc_point_ctrl    microcode: point double, point add, moves, conversions
└── ecc_datapath      executes one micro-operation at a time
    ├── ecc_regfile   12 field-element registers, operand multiplexer
    ├── mont_mul      bit-serial Montgomery multiplier (+ its M register)
    ├── addsub_mod    single-adder adder/subtractor (+ its result register)
    └── mont_inv      Montgomery inverse controller, borrows addsub_mod
```

`ecc_pkg` holds the shared encodings: micro-operations, adder commands,
routine names, phases and the register map. The testbenches are in `tb/`;
`tb/ecc_ref_pkg.sv` is their reference arithmetic.

## Arithmetic

### Montgomery domain, R = 2^(N+2)

The multiplier computes A·B·2^-(N+2) mod p. All point arithmetic therefore
works on Montgomery representatives x̃ = x·R mod p, with R = 2^(N+2). The
host supplies `r2` = R² mod p = 2^(2N+4) mod p together with p and a. A
Montgomery multiplication by `r2` moves a value into the domain. A
multiplication by the constant 1 moves it back out. `r2` is the only extra
number the host must compute for a new curve.

### `mont_mul`: bit-serial Montgomery multiplier

B sits in an (N+2)-bit shift register and is consumed one bit per clock,
least significant bit first. Each step does three things:

1. It adds A, gated by the current bit of B, to the running value M.
2. It adds p if that sum is odd.
3. It shifts right by one.

After N+2 steps, M = A·B·2^-(N+2) mod p, and M lies in [0, 2p) for A, B < p.
The unit does no final subtraction. Instead, the data-path passes the product
through the adder unit as (M + 0) mod p. Every register then holds a fully
reduced value below p.

### `addsub_mod`: one adder, two cycles

This unit has one (N+2)-bit adder with a carry input. A subtraction adds the
inverted operand with a carry-in of 1.

| command  | cycle 1                      | cycle 2                                  |
|----------|------------------------------|------------------------------------------|
| `AS_ADD` | res = A + B, carry out kept  | (none)                                   |
| `AS_SUB` | res = A − B, carry = (A ≥ B) | (none)                                   |
| `AS_MADD`| res = A + B                  | res − p, kept only if it does not borrow |
| `AS_MSUB`| res = A − B                  | res + p, kept only if cycle 1 borrowed   |

The plain commands serve the inverse. The modular ones serve the point
formulas and the reduction of products. `AS_MADD` with B = 0 reduces any
value in [0, 2p) to [0, p).

### `mont_inv`: the inverse and its two phases

This is the least obvious part of the design. It is also the part whose
timing shapes the power profile. The inverse returns r = a^-1·2^(N+2) mod p,
in two phases that are reported on the `phase` output.

**Calculation phase.** This phase is the binary "almost Montgomery inverse".
It starts from u = p, v = a, r = 0, s = 1, k = 0 and repeats one step until
v = 0:

* If u is even, halve u and double s.
* Otherwise, if v is even, halve v and double r.
* If both are odd and u > v: u ← (u − v)/2, r ← r + s, s ← 2s.
* If both are odd and u ≤ v: v ← (v − u)/2, s ← s + r, r ← 2r.

Each step also increments k. Afterwards r is reduced below p and replaced by
p − r, so that r = a^-1·2^k mod p. For an n-bit p, k lies between n and 2n.

Comparisons, differences and sums all go through `addsub_mod` in plain mode.
Halving and doubling are wiring. A step with an even operand takes one
clock. A step with two odd operands takes four or five: one subtraction to
compare, possibly one more for v − u, then the r + s sum.

**Halving phase.** Here r is divided by 2 modulo p k − (N+2) times: an even
r is shifted right, an odd r gets p added first. The result is
a^-1·2^(N+2). For a Montgomery input ã = a·R, that result is ã^-1·R = a^-1.
One multiplication by `r2` then gives a^-1·R, the Montgomery form of the
inverse. k can fall short of N+2, which happens with a prime much shorter
than N bits. Then r is instead doubled modulo p N+2−k times, in the same
phase.

For a 192-bit prime, about 77 halvings are left per inverse, not about 270.
This is why the halving phase is only about 7 % of the run time.

### Register widths

u, v, r and s, and the adder, are N+2 bits wide. During the calculation
phase r + s reaches about 3p. The multiplier's sums stay below 4p.

## Point operations: `ecc_point_ctrl`

Each routine is a list of data-path micro-operations (`ADD`, `SUB`, `MUL`,
`INV`, `MOV` on register addresses). The sequencer issues one, waits for its
`done`, and moves to the next. Register names come from `ecc_pkg`: P is in
PX and PY, the accumulator Q in QX and QY, and the result T in TX and TY.

| routine    | does                                                           |
|------------|----------------------------------------------------------------|
| `RT_INIT`  | PX, PY, A ← Montgomery form (× `r2`); Q ← P                    |
| `RT_DBL`   | T ← 2Q: d = 2y₁, λ = (3x₁² + a)/d                              |
| `RT_ADD`   | T ← Q + P: d = x₂ − x₁, λ = (y₂ − y₁)/d                        |
| `RT_KEEP`  | Q ← T                                                          |
| `RT_DUMMY` | T moved into a scratch word (same cost as `RT_KEEP`)           |
| `RT_FINAL` | Q ← ordinary coordinates (× 1)                                 |

In `RT_DBL` and `RT_ADD`, the denominator is formed first, then inverted,
then multiplied by `r2`. After that: x₃ = λ² − x₁ − x₂ and
y₃ = λ(x₁ − x₃) − y₁. A doubling costs 1 inverse, 5 multiplications and
8 additions or subtractions. An addition costs 1 inverse, 4 multiplications
and 6 subtractions.

Latencies of the micro-operations (from the clock that samples `start` to
the one that writes the result):

* `ADD` and `SUB`: 2 clocks.
* `MUL`: N+5 clocks.
* `MOV`: 2 clocks.
* `INV`: depends on the data, about 730 clocks at N = 192.

## Scalar loop: `ecc_scalar_ctrl`

The controller scans k from the top. It skips leading zeros, one per clock,
and sets Q = P at the first 1. For every lower bit it runs the same four
routines: `DBL`, `KEEP`, `ADD`, then `KEEP` if the bit is 1 or `DUMMY` if it
is 0. A point addition is therefore computed for every bit, and the routine
sequence does not depend on the key (double-and-always-add). The inverse's
loop, however, takes a data-dependent number of clocks, so the total time
still varies from key to key.

## Interface and timing (`ecc_processor`)

| port     | dir | width | meaning                                               |
|----------|-----|-------|-------------------------------------------------------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset               |
| `start`  | in  | 1     | one-clock pulse while `busy` is low                   |
| `p`      | in  | N     | odd prime, below 2^N                                  |
| `a`      | in  | N     | curve coefficient a (b is never needed)               |
| `r2`     | in  | N     | 2^(2N+4) mod p                                        |
| `k`      | in  | N     | scalar                                                |
| `px`, `py` | in | N    | base point, affine                                    |
| `busy`   | out | 1     | operation running                                     |
| `done`   | out | 1     | one-clock pulse; `qx`, `qy` valid from then on        |
| `k_zero` | out | 1     | k was 0 (result is the point at infinity)             |
| `qx`, `qy` | out | N   | k·P, affine                                           |
| `phase`  | out | 2     | idle / other work / inverse calculation / inverse halving |

All inputs are captured at `start`. The only parameter is `N`, the field
width, 192 by default. Any odd prime below 2^N works, so smaller curves can
run on a wider build.

## How far to trust it

Verified in simulation, against reference arithmetic written with the
language's wide `*` and `%` operators and Fermat inversion:

* Each unit is checked with random operands at N = 192, on the P-192 prime
  and on shorter primes. The multiplier latency (N+2 steps) and the adder
  latencies (1 and 2 cycles) are checked.
* The point microcode is checked for 2P, 3P, 4P and 6P on NIST P-192 and on
  a random curve over 2^31 − 1.
* The whole processor at N = 64 is checked against a reference scalar
  multiplication, for 12 keys over 2^61 − 1 and 65521, including k = 0, 1
  and 2.
* At N = 192, three full k·G on P-192 with random 192-bit keys are checked.

The full-size runs take 632,181 to 632,968 clocks. About 37.5 % of them
are in the inverse calculation phase, 7.1 % in the halving phase and 55.3 %
elsewhere. The published processor reports 652,000 clocks, split
40.9 % / 7.4 % / 51.7 %. The full-size testbench requires the count to stay
within 10 % of 652,000.

Concurrent assertions in `ecc_processor`, `ecc_datapath` and `mont_mul`
check the handshake rules during every simulation. They check that no unit
starts while busy and that the adder unit has one user at a time. They also
check that each Montgomery step's sum is even before the shift.

Known limits:

* Affine formulas cannot represent the point at infinity. An intermediate Q
  equal to ±P, or equal to the point at infinity, gives a wrong result
  without warning. For a random key on a large curve this is vanishingly
  unlikely. It can happen for small curves or for keys near multiples of
  the point order. Only k = 0 is detected.
* Timing depends on the data, as noted above.
* Power is not modelled. The flat-profile property rests on the structure:
  one adder, and two-cycle modular operations.

## Where this RTL departs from the published description, and what it adds

The published description fixes the following:

* The data-path (multiplexer, Montgomery multiplier with M register,
  adder/subtractor with result register, temporary registers).
* The multiplier's internal structure and its 2^-(n+2) factor.
* The adder unit's operand and carry arrangement, and its reduction to one
  adder with two-cycle modular operations.
* The affine point formulas, the order "denominator, inverse, the rest",
  and double-and-always-add.
* The two inverse phases.
* The 192-bit field size.

This design makes its own choices for:

* the 12-word register file standing for the temporary registers;
* the micro-operation set and the microcode;
* the final reduction of each product through the adder unit;
* the exact inverse procedure, including the doubling fallback;
* supplying R² mod p from outside;
* every handshake, encoding and reset value.

Two differences from the published description:

* It says that the inverse uses the multiplier as well. Here the inverse
  controller uses only the adder unit, and the multiplier finishes the
  domain conversion right after it.
* It mentions operand isolation (AND gates on the second adder's inputs
  during halving). That belongs to the two-adder unit and is absent here.

## Simulating with Verilator

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. To
build and run one, for example the end-to-end test:

```
verilator --binary --timing -Wno-fatal --top-module tb_ecc_processor \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_processor.sv
./obj_dir/Vtb_ecc_processor
```

Testbenches: `tb_mont_mul`, `tb_addsub_mod`, `tb_mont_inv`,
`tb_ecc_regfile`, `tb_ecc_datapath`, `tb_ecc_point_ctrl`,
`tb_ecc_scalar_ctrl`, `tb_ecc_processor` (N = 64) and
`tb_ecc_processor_full` (N = 192, default parameters, a few seconds of
simulation). To use a different curve, change `p`, `a` and `r2`.
