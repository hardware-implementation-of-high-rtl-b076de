# Saber polynomial multiplier in two's complement

The lattice-based key encapsulation scheme Saber spends most of its time multiplying
polynomials in the ring Z_q[x]/(x^N + 1), with N = 256 and q = 2^13. One operand is
always a *secret* with tiny coefficients (in [-5,5] for LightSaber, [-4,4] for Saber,
[-3,3] for FireSaber); the other has 13-bit (or 10-bit, modulo p = 2^10) coefficients.
This RTL computes

    W = G * D mod (x^N + 1)      over Z_(2^13)

where G is the secret polynomial (4-bit two's complement coefficients) and D, W have
13-bit coefficients. It does so with three ideas:

1. **Everything stays in two's complement.** Secrets are never converted to
   sign-magnitude; negation is split into a bitwise inversion inside the multiplier and
   a "+1" that rides along as the carry-in of some later adder.
2. **K coefficients of D per cycle.** D is cut into N/K chunks
   D_j = d_(Kj) + d_(Kj+1) x + ... + d_(Kj+K-1) x^(K-1), so that
   `W = sum_j (G * x^(Kj) mod f) * D_j mod f`. Each cycle multiplies the current rotated
   secret G^(Kj) = G * x^(Kj) mod f by one chunk.
3. **The reduction comes after the multiplications.** G^(Kj) * D_j has N+K-1
   coefficients; only the K-1 overflow coefficients need folding (x^N = -1), and that
   fold is done once per cycle, outside the multipliers.

With the defaults (N = 256, K = 2) a product takes 128 compute cycles. K = 4 halves
that to 64 at roughly twice the multiplier logic. Input loading and output draining
take N cycles each, serially.

## Datapath

```
 g_in (4b, serial) ──► CSR ──N x 4b──► MAA ──(N+K-1) x 13b + sign bits──► FMA ──► w_out (13b, serial)
                       ▲  (x^K mod f          ▲                          (fold x^N=-1,
                       │   every cycle)       d_in: K x 13b              N accumulators)
                     ctrl ────────────────────────────────────────────────┘
```

| Module | Role |
|---|---|
| `saber_polymul` | top level, wires the blocks below |
| `saber_ctrl` | phase sequencer and handshake |
| `saber_csr` | circular shift register holding G^(Kj) |
| `saber_si` | 4-bit sign inverter used by the CSR feedback |
| `saber_maa` | multiplication and addition: N x K products, row sums |
| `saber_prc` | pre-computes d, 2d, 3d, 4d, 5d of one D coefficient |
| `saber_mul` | multiplexer-based secret x coefficient multiplier |
| `saber_fma` | final modulo plus accumulation and serial output |
| `saber_final_mod` | folds the K-1 overflow rows back (x^N = -1) |
| `saber_acfo` | one accumulator / output-shift unit per coefficient of W |
| `saber_pkg` | shared constants, coefficient types, phase enum |

### Circular shift register (CSR)

The N secret coefficients sit in K banks of N/K 4-bit registers; bank b holds the
coefficients b, b+K, b+2K, ... . Each bank is a shift register with a multiplexer at its
entry. During loading a de-multiplexer steers the serial input to one bank and only that
bank's clock enable is set. During computation the entry multiplexer takes the bank's
exit register through a sign inverter instead, and all banks shift together. One shift
moves coefficient i to i+K and brings the top K coefficients back to positions 0..K-1
negated: exactly a multiplication by x^K modulo x^N + 1. The register next to the sign
inverter must therefore hold the highest coefficient of its bank, which is why G is
loaded **highest coefficient first**.

The sign inverter is an inverter per bit followed by a chain of half adders that adds 1.

### Multiplication and addition (MAA)

For each of the K coefficients of D_j, one pre-computing cell forms d, 2d, 3d, 4d and
5d with a chain of adders, shared by all N multiplier cells of that input. A multiplier
cell is not a multiplier at all: the 4-bit secret drives an 11-way multiplexer that picks
|g|*d (0, d, ..., 5d), and the secret's sign bit picks either that value or its bitwise
inverse. Because -x = ~x + 1, the cell's true product is `p + s`, where `s` is the sign
bit; the `+1` is deferred.

Output row r (0 <= r <= N+K-2) collects the products g[r-t] * d_t for the valid t. The
first product of a row is taken as is; every further product is added by an adder whose
carry-in is that product's sign bit. The first product's sign bit is still owed, and
leaves the MAA next to the row as `c[r]`. So **each row's value is `y[r] + c[r]`**, a
13-bit sum plus one pending carry bit. For K = 2 that is N-1 adders and N+1 rows.

Secret codes outside [-5,5] (6, 7, -6, -7, -8) select 0 and produce a zero product.

### Final modulo and accumulation (FMA)

Rows N..N+K-2 are the overflow of the product; with x^N = -1 they are subtracted from
rows 0..K-2. A subtraction is an inversion and an adder with carry-in, and here the
carry-in needs care: the folded row's value is `y + c`, so

    y[n] - (y[N+n] + c[N+n]) = y[n] + ~y[N+n] + (1 - c[N+n])

and the fold adder's carry-in is `~c[N+n]`, not a constant 1. A constant 1 is only
correct when the secret feeding the overflow row is non-negative; with a negative secret
there the result would be off by one (the testbenches catch this).

Each of the N accumulator units (AC-FO) then adds the reduced row and the row's pending
sign bit (as carry-in) into its 13-bit register. On the first compute cycle of a product
the register term is replaced by zero, so consecutive products need no clear cycle. After
the last compute cycle the units form a shift chain: unit n loads unit n-1, unit N-1
drives `w_out`. Unit 0 has no multiplexer and just holds its value while the chain shifts.
The result leaves **highest coefficient first**.

All arithmetic wraps modulo 2^13; for a mod-2^10 operand the low 10 bits of each result
coefficient are the mod-2^10 result.

## Operation and timing

`saber_ctrl` runs three phases after a one-cycle `start` pulse in the idle state:

| Phase | Cycles | Outputs | Caller drives |
|---|---|---|---|
| LOAD | N | `g_ready` = 1, cycle t | `g_in` = g[N-1-t] |
| COMP | N/K | `d_ready` = 1, `d_idx` = j | `d_in[t]` = d[K*j + t], t = 0..K-1 |
| OUT | N | `w_valid` = 1, `w_idx` = N-1-t, `done` on the last | reads `w_out` = w[w_idx] |

Signals are sampled on the rising clock edge; `g_in` and `d_in` must be stable in the
cycle where the matching ready is high. The first output appears 1 + N + N/K cycles after
the cycle in which `start` was sampled. The CSR-MAA-FMA path is one combinational stage, so
the critical path runs from a CSR register through a multiplier multiplexer, the row adder
chain, the fold adder and the accumulator adder. Phases of consecutive products do not
overlap. `rst_n` is a synchronous active-low reset of the sequencer only; datapath
registers are always written before they are read.

Parameters of the top: `N` (default 256, must be a multiple of `K`), `K` (default 2; 4 is
the other evaluated point), `CW` (index width, derived).

## Verification

Every module has a self-checking testbench in `tb/` that compares against integer
reference arithmetic written in the testbench and ends with a line
`TB_RESULT checks=<n> failures=<m>`:

| Testbench | What it covers |
|---|---|
| `tb_saber_si` | all 16 codes |
| `tb_saber_prc` | m*d for corner and random d |
| `tb_saber_mul` | every 4-bit code against random d |
| `tb_saber_maa` | rows vs. schoolbook product, K = 2 and 4, N = 8 |
| `tb_saber_final_mod` | fold with random rows and sign bits, K = 2 and 4 |
| `tb_saber_acfo` | accumulate, restart, hold, shift |
| `tb_saber_fma` | accumulation over N/K cycles and serial readout, K = 2 and 4 |
| `tb_saber_csr` | load and x^K rotation for a full turn, K = 2 and 4 |
| `tb_saber_ctrl` | cycle-by-cycle schedule, done, reset |
| `tb_saber_polymul` | end to end, N = 16, K = 2, 12 products |
| `tb_saber_polymul_k4` | end to end, N = 256, K = 4 (64 compute cycles), 4 products |
| `tb_saber_polymul_full` | end to end at the defaults (N = 256, K = 2), 4 products |

The end-to-end tests rotate through the three secret ranges, 13-bit and 10-bit D and an
all-extreme case (every secret -5 or +5, every D coefficient 8191), run the products
back to back, and check the N/K compute cycles and the latency. They also count that
negative secrets occurred, that negative values passed the CSR sign inverters, that a
non-zero overflow row was folded, and that the accumulators restarted; a count of zero is
a failure.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/saber_pkg.sv \
        tb/tb_saber_polymul_full.sv --top-module tb_saber_polymul_full -o sim
    ./obj_dir/sim

The full-size tests build in one to two minutes and simulate in well under a second.

## Where this RTL makes its own choices

The datapath follows the published CSR / MAA / FMA organisation. The following are
decisions of this implementation:

- **Fold carry-in.** The published description sets the fold adder's carry-in to a
  constant 1 while also stating that the secrets' sign bits serve as adder carry-ins. A
  constant 1 is wrong whenever the secret in the overflow row is negative; this RTL uses
  the inverted pending sign bit (equal to 1 for non-negative secrets).
- **Coefficient order.** G is loaded and W is delivered highest coefficient first; D is
  consumed in increasing chunk order. The register order in each CSR bank follows from
  the x^K rotation.
- **Which sign bit goes where.** In each MAA row the first product's sign bit is passed to
  the accumulator adder; the others are carry-ins of the row adders.
- **Sequencer and handshake.** The start/ready/valid interface, the index outputs, the
  phase encoding and the reset are this design's own; only the phase lengths (N, N/K,
  N) are given.
- **Accumulator restart** by zeroing the register term on the first compute cycle.
- **Pre-computation.** 2d..5d are built as a chain, each the previous one plus d.
- **Out-of-range secret codes** produce zero.
- **K > 2.** The structure is described for K = 2; the generalisation (adder chain per
  row, K-1 folded rows) is straightforward but this implementation's.

No FPGA mapping, timing constraints or power figures are part of this RTL. The
multiplier is a standalone block: the rest of a Saber processor (hashing, sampling,
rounding, memories) is outside its scope.
