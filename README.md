# RSA transceiver in four architectures

This is a small, complete RSA cryptosystem in synthesizable SystemVerilog. A
single `start` runs a whole session in hardware:

1. draw two random primes p and q,
2. form the public key (n, e),
3. form the private key d,
4. encrypt a message, and
5. decrypt the ciphertext again.

The design follows an architecture study of RSA on FPGAs. That study builds the
cryptosystem from data flow graphs and then reschedules them to trade area
against time. Two choices are made independently, which gives four
architectural cases:

| case | encryption / decryption | extended Euclid (private key) |
|------|-------------------------|-------------------------------|
| 1 (default) | square and multiply | three multipliers working in parallel |
| 2    | square and multiply     | one multiplier used three times in turn |
| 3    | Montgomery exponentiation | three multipliers in parallel |
| 4    | Montgomery exponentiation | one multiplier in turn |

Both choices are parameters of the top module `rsa_top`: `EXP_ALG` and
`EE_SCHED`, with the enums defined in `rsa_pkg`. The key length `KEY_BITS` is
the width of n, phi(n), e, d, the message and the ciphertext. It defaults to 8.
The study evaluated 8-, 16- and 32-bit keys, and all three sizes simulate
correctly here in all four cases.

These are toy key sizes. The design shows how the architecture is built and
scheduled. It is not a secure RSA implementation (see *Limits*).

## Session flow

```
            seed                      message
             |                           |
        +----v-----+   p,q   +-------------+  n, e   +----------------------+
start ->| prime_gen|-------->|public_key_gen|------->| exponentiation unit  |--> cipher
        | (LFSR +  |         | n=p*q        |  phi,e | (modexp_sqm or       |
        | trial    |         | phi=(p-1)(q-1)|---+   |  modexp_mont)        |--> plain
        | division)|         | e: Euclid    |   |    +----------^-----------+
        +----------+         +-------------+   |               | d
                                               +--> private_key_gen (extended Euclid)
```

The sequencer in `rsa_top` runs the units in this order:

* **Primes.** `prime_gen` is started with the seed.
* **Public key.** `public_key_gen` receives p and q. It returns n, phi(n) and e.
* **Encryption and private key at the same time.** The exponentiation unit
  computes `cipher = message^e mod n`. In the same cycles `private_key_gen`
  computes `d = e^-1 mod phi(n)`. Neither needs the other's result, so they
  overlap. The sequencer waits for both to finish, in either order.
* **Decryption.** The same exponentiation unit computes `plain = cipher^d mod n`.
  Encryption and decryption share one unit, as in the original transceiver
  diagram. The multiplier counts reported for the four cases (7, 5, 5, 3) also
  fit one shared unit.

Then `done` pulses for one cycle. All outputs hold until the next `start`.

## Prime generation (`prime_gen`, `lfsr`)

A maximal-length Fibonacci LFSR, `KEY_BITS/2` bits wide, supplies the
candidates. Its low bit is forced to 1, so every candidate is odd. Candidates
below 3 are dropped.

Each candidate is tested by trial division. The odd divisors 3, 5, 7, ... are
tried one per clock cycle on the shared combinational divider:

* If a divisor leaves remainder 0, the candidate is composite and rejected.
* If the square of the divisor passes the candidate first, the candidate is prime.

The first prime found becomes p. The next prime that differs from p becomes q.

The prime 2 is excluded on purpose. Montgomery arithmetic needs an odd modulus,
so n = p·q must be odd. The study gives only the LFSR as the source of the
primes. The primality test is this design's own choice.

## Public key (`public_key_gen`)

The data flow graph is followed directly:

* two subtractors form p−1 and q−1;
* one multiplier forms n = p·q;
* a second multiplier forms phi(n) = (p−1)(q−1).

A candidate e is then checked with Euclid's algorithm. The unit starts with
A = phi(n) and B = e. Each cycle it replaces (A, B) by (B, A mod B). When
A mod B becomes 0, B is the gcd. If that gcd is 1, the unit accepts e.
Otherwise it tries the next candidate.

The candidates are 3, 5, 7, and so on. phi(n) is even, so an even e can never
work. The study only requires 1 < e < phi(n) and says nothing about the order
of candidates, so the smallest acceptable odd e is this design's choice.

## Private key: the two schedules of extended Euclid (`private_key_gen`)

This is where the arithmetic-level scheduling happens. The unit keeps two
vectors, A = (A1, A2, A3) and B = (B1, B2, B3). They start as (1, 0, phi) and
(0, 1, e). Throughout the run, A3 = A1·phi + A2·e, and the same holds for B.
While B3 ≠ 1 the unit does the following:

```
Q = A3 / B3                       (divider)
T_j = A_j − Q·B_j   for j = 1..3  (multiplier + subtractor per lane)
A ← B,  B ← T
```

When B3 reaches 1, B2·e ≡ 1 (mod phi), so d = B2. B2 is often negative. The
unit then adds phi to bring d into 0..phi−1. The study writes only `d = B2`,
so this correction is this design's addition. The lanes are signed and
`KEY_BITS+2` bits wide. The coefficients never exceed phi in magnitude, so the
low bits of each product are exact.

* **Parallel (`EE_PARALLEL`, cases 1 and 3).** Three multipliers and three
  subtractors compute T1, T2 and T3 in the same cycle. One iteration takes one
  clock.
* **Sequential (`EE_SEQUENTIAL`, cases 2 and 4).** One multiplier and one
  subtractor are multiplexed over the lanes. The lane index counts i mod 3.
  T1 and T2 are parked in registers. The update A ← B, B ← T happens on the
  third cycle, together with T3. Q comes from A3 and B3, which do not change
  until the update, so one division serves all three cycles. One iteration
  takes three clocks. Two multipliers are saved, and the multiplexer lengthens
  the path.

Cycle counts, from the clock edge that takes `start` to `done`: `iters + 1`
(parallel) or `3·iters + 1` (sequential). `iters` is the number of Euclid
remainder steps before the remainder reaches 1.

If B3 reaches 0 instead, e and phi share a factor. `done` then pulses with
`no_inverse` set. This cannot happen for an e from `public_key_gen`.

## Exponentiation, version 1: square and multiply (`modexp_sqm`)

This is right-to-left binary exponentiation. The unit starts with Z = base and
C = 1. For each exponent bit e_i, from i = 0 upward:

```
Z ← Z² mod n
C ← C·Z mod n   if e_i = 1      (old Z)
```

Both products and both reductions are combinational: two multipliers and two
`divmod` dividers. A whole iteration is done in one cycle. All `KEY_BITS`
exponent bits are always processed, so the latency is a fixed `KEY_BITS`
cycles.

## Exponentiation, version 2: Montgomery (`mont_prod`, `modexp_mont`)

Cases 3 and 4 replace square and multiply with Montgomery exponentiation. Let
R = 2^k, with k = `KEY_BITS`. The Montgomery product is
MP(A, B) = A·B·R⁻¹ mod n.

**`mont_prod`** computes MP one bit of B per cycle:

```
S = 0
for i = 0..k-1:
    S = S + A·b_i          (an AND, not a multiplier)
    q = S mod 2            (the low bit)
    S = (S + q·n) / 2      (an add and a shift)
```

The sum is always even before the halving, so the division is exact. With
A < n, B < 2^k and n odd, S stays below 2n. One closing cycle subtracts n when
S ≥ n. The study's iteration has no such subtraction. It is added here so that
every result is fully reduced. The latency is k + 1 cycles.

**`modexp_mont`** converts into and out of the Montgomery domain:

1. Nr = 2^(2k) mod n = R² mod n, from a combinational divider (one cycle).
2. Convert the inputs, with two units working in parallel:
   * C₀ = MP(Nr, 1) = R mod n, the Montgomery form of 1;
   * P₀ = MP(Nr, M) = M·R mod n, the Montgomery form of the base.
3. For each exponent bit, on the two units in parallel:
   * P ← MP(P, P);
   * C ← MP(C, P), only when e_i = 1.
4. Convert back: result = MP(1, C), which leaves the Montgomery domain.

Each round starts the units for one cycle, waits for their `done`, and takes
their results. This gives `1 + (k+2)(k+3)` cycles in total. That is many more
cycles than square and multiply, in exchange for having no multiplier and no
wide divider in the loop: the only divider computes the constant Nr.

## Measured session lengths

These are clock cycles from the workload simulations, over a few random seeds
per size. A session runs from `start` to
`done`, and its length depends on the primes drawn.

| key bits | cases 1 / 2 | cases 3 / 4 |
|----------|-------------|-------------|
| 8        | 32 – 43     | 238 – 249   |
| 16       | 53 – 87     | 707 – 741   |
| 32       | 224 – 426   | 2542 – 2744 |

Cases 1 and 2 take the same time, and so do cases 3 and 4. The sequential
extended Euclid runs while encryption runs, and it finishes before encryption
does. So at these sizes the slower schedule costs area and path length, but no
session time.

## Top-level interface (`rsa_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock (rising edge), synchronous active-low reset |
| start | in | 1 | one-cycle pulse; ignored while `busy` |
| seed | in | KEY_BITS/2 | LFSR seed (0 acts as 1) |
| message | in | KEY_BITS | plaintext, taken at `start` |
| p, q | out | KEY_BITS/2 | the primes |
| n, phi, e, d | out | KEY_BITS | modulus, totient, public and private exponent |
| cipher | out | KEY_BITS | message^e mod n |
| plain | out | KEY_BITS | cipher^d mod n |
| key_error | out | 1 | keys could not be formed (unreachable with odd distinct primes) |
| busy, done | out | 1 | session running; one-cycle end-of-session pulse |

The submodules all use the same handshake. A one-cycle `start` is ignored while
`busy`. A one-cycle `done` follows, and the results hold afterwards. Assertions
in `rsa_top` and `modexp_mont` check that no unit is started while busy.

n is only known after key generation, so a message at or above n cannot come
back unchanged. The arithmetic returns `plain = message mod n`. Keep the
message below the smallest possible n: 15 for 8-bit keys.

## Where this design goes beyond the description it follows

The study gives the data flow graphs, the two scheduling choices and the four
cases. This design adds or chooses the following:

* trial division as the primality test, odd primes only, and p ≠ q;
* the LFSR polynomials (standard maximal-length taps, widths 3 to 32);
* the order in which e candidates are tried (3, 5, 7, …);
* the correction of a negative B2, and the `no_inverse` exit;
* the closing subtraction in the Montgomery product;
* two Montgomery product units running side by side, and the round handshake;
* the reading of "key size" as the width of n (p and q half as wide);
* combinational operators with one data-flow-graph step per clock;
* the session sequencer, all handshakes, and reset.

The study's reported area, power and frequency figures come from a Virtex-5
device. This RTL has not been mapped to any FPGA, so none of those numbers are
reproduced.

## Limits

* Keys of 8 to 32 bits give no security. Wider keys need `rsa_ref_pkg`'s
  64-bit models to be replaced. The RTL itself takes `KEY_BITS` as a
  parameter, but the combinational dividers grow quadratically with it.
* The LFSR seed fully determines the keys.
* The `lfsr` tap table covers widths 3 to 32, so `KEY_BITS` must lie between 6
  and 64 and be even.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops, and it has a cycle-count watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_divmod` | divider against `/` and `%`, 16/8 and 65/32 bits |
| `tb_lfsr` | full period and all states for widths 4, 8, 13, 16; load; zero seed |
| `tb_prime_gen` | p, q prime and distinct for 4, 5, 8, 16-bit primes; composite and repeated-prime rejection |
| `tb_public_key_gen` | n, phi, smallest e, exact cycle count, 8 and 32 bits |
| `tb_private_key_gen` | both schedules at 16 and 32 bits; d, `no_inverse`, cycle counts |
| `tb_modexp_sqm` | 8 and 32 bits, corner cases, latency `KEY_BITS` |
| `tb_mont_prod` | 8 and 32 bits against the definition, latency `KEY_BITS+1` |
| `tb_modexp_mont` | 8 and 16 bits, latency `1+(k+2)(k+3)` |
| `tb_rsa_top` | end to end: default top (case 1) plus cases 2–4 at 8 bits, and a 16-bit case 3. It counts every mechanism: composite candidates, rejected exponents, encryption overlapping private key generation, negative B2, shared-multiplier iterations, exponent bits 0 and 1, Montgomery closing subtraction, reduced messages |
| `tb_rsa_full` | the top exactly as delivered (all defaults), one session per LFSR seed |
| `tb_rsa_workloads` | 8-, 16- and 32-bit keys in all four cases, printing session lengths |

`rsa_ref_pkg` holds the software reference models. `rsa_case_runner` is a
helper for the workload bench.

To run a testbench with Verilator (5.x), from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rsa_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/rsa_pkg.sv tb/rsa_ref_pkg.sv tb/tb_rsa_top.sv
./obj_dir/Vtb_rsa_top
```

To lint the design: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/rsa_pkg.sv rtl/rsa_top.sv`.

To change the architecture or key size, override the top's parameters, for
example `rsa_top #(.KEY_BITS(16), .EXP_ALG(rsa_pkg::EXP_MONTGOMERY), .EE_SCHED(rsa_pkg::EE_SEQUENTIAL))`.
