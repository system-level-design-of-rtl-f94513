# Elliptic-curve server farms over GF(2^193)

Scalar multiplication Q = k·P on a binary elliptic curve takes on the order of
10^5 clock cycles. The time also depends on the scalar. A single engine is
therefore slow, and several engines working side by side finish their jobs out
of order. This RTL builds a *server farm*: four elliptic-curve engines behind
one input buffer. A reorder buffer hands the results back in the order the jobs
arrived. Two identical farms run side by side on the same job stream, and a
compare stage checks that they agree.

The design follows the architecture published in *System Level Design of
Reconfigurable Server Farms Using Elliptic Curve Cryptography Processor
Engines*. That article describes the system with Bluespec (BSV) library
components and reused Verilog IP. Everything here is plain synthesizable
SystemVerilog. Where the article gives only a block's function, or nothing at
all, the choices made are listed in "Departures and own choices" below.

```
                  job stream (k, f, a, b, xP, yP, x2P, y2P)
                    |                          |
        +-----------v-----------+  +-----------v-----------+
        | ecc_farm              |  | ecc_farm              |
        |  job_fifo             |  |  job_fifo             |
        |  dispatcher --serial--+->|  ...                  |
        |  4 x ecc_engine       |  |  4 x ecc_engine       |
        |  completion_buffer    |  |  completion_buffer    |
        +-----------+-----------+  +-----------+-----------+
                    |  results in job order    |
                    +------> result_compare <--+
                                   |
                       result, match flag, counters
```

## Field arithmetic

Field elements are polynomials over GF(2) of degree below M = 193. They are
reduced modulo f(x) = x^193 + x^15 + 1, the polynomial of the SEC 2 193-bit
curves. The polynomial is not wired in: it is loaded with every job as the
register `f`. Any trinomial or pentanomial whose x^(M-1) and x^(M-2)
coefficients are zero works. The multiplier depends on that property.
Addition and subtraction are both XOR.

### Three-bits-per-cycle multiplier (`gf_mul3x`, `gf_x3_mul`)

A classic serial multiplier (Mastrovito) adds one shifted copy of A per bit of
B, so it needs M cycles. This multiplier splits the product by the index of
the B bit modulo 3:

    Z0 = Σ b[3k]·x^(3k)·A     Z1 = Σ b[3k+1]·x^(3k)·A     Z2 = Σ b[3k+2]·x^(3k)·A
    A·B = Z0 + x·Z1 + x²·Z2   (mod f)

All three sums use the same running operand x^(3k)·A. Each cycle that operand
goes into three accumulators, gated by three bits of B. It is then advanced by
x³ in the combinational cell array `gf_x3_mul`. Shifting by three pushes three
bits out of the top. Because f has zero coefficients at x^(M-1) and x^(M-2),
each overflow bit folds back as one shifted copy of f, with no second
reduction. Output bit i is therefore `a[i-3] ^ a[M-3]f[i] ^ a[M-2]f[i-1] ^
a[M-1]f[i-2]`.

After ceil(M/3) = 65 cycles the accumulators hold Z0, Z1 and Z2. The final
products by x and x² are combinational at the output. `done` pulses 65 clock
edges after the edge that sampled `start`.

### Divider (`gf_div`, `gf_div_pkg`)

The divider is the most intricate part of the design. It computes A/B directly
with a binary form of Euclid's algorithm, so no separate inversion is needed.
It has four registers: R and S of M+1 bits, U and V of M bits. An up/down
counter δ of ceil(log2(M+1)) bits sits beside them. Initially R = B, S = f,
U = A, V = 0 and δ = 0.

The underlying single iteration looks only at the top bits r[M] and s[M] and
at whether δ is zero:

| condition | R, S | U, V | δ |
|---|---|---|---|
| r[M] = 0 | R ← xR | U ← xU mod f | δ + 1 |
| r[M] = 1, δ ≠ 0 | S ← x(S − s[M]·R) | V ← V − s[M]·U, U ← U/x mod f | δ − 1 |
| r[M] = 1, δ = 0 | R ← x(S − s[M]·R), S ← R | U ← x(V − s[M]·U) mod f, V ← U | 1 |

The invariants B·U ≡ c·A·R and B·V ≡ c·A·S (mod f) hold throughout, with the
same factor c for both pairs. Shifting S without touching V changes c, and the
U/x step compensates for that. After exactly 2M iterations U = A/B. Running
more or fewer iterations gives a wrong result, so the iteration count is exact.

The hardware never runs a single iteration. Each clock applies one *control
step*, which is two iterations fused into one compound operation per register,
for example R ← x²R, S ← x(S − xR), U ← U/x² or V ← V − U/x. A 19-case control
table (`gf_div_pkg::ctl_rom`) picks the operations from five bits:
- r[M] and r[M−1],
- s[M] and s[M−1],
- whether δ = 0.

The two lower bits are enough because they say what the top bits will be
after the first of the two iterations. δ changes by 0, ±2 or is set to 0 or 2,
so it is always even between steps. That is why "δ = 0 or not" covers all
cases; an assertion checks it. One case (R top bits 01 with S[M] = 0) cannot
occur from a legal start, because S keeps degree M while R[M] is 0.

With the default `STEPS = 1`, one control step per clock, a division takes
M = 193 cycles. `STEPS = 2` chains two control steps and takes ceil(M/2) = 97
cycles. In that case the last cycle runs only the one step still due.

The testbench recomputes the two single iterations every cycle and compares
them with the table-driven result. The divisor must be nonzero.

## The engine (`ecc_engine`)

The curve is y² + xy = x³ + a·x² + b. Points are kept in affine coordinates,
which is why the divider is needed.

**Loading.** Each job consists of eight parameter registers of M+1 = 194 bits:
k, f, a, b, xP, yP, x2P, y2P. They form one 1552-bit shift chain. The job is
shifted in on `serial_in`, one bit per cycle while `encrypt` is high. Bits go
most significant first, with k first and y2P last. The computation starts on
its own when the last bit arrives. `ready_ecc` falls with the first loaded bit.
It rises when `encrypted_point = {x, y}` is valid and stays high until the next
load begins. The point at infinity is returned as all zeros. 2P must be
supplied with the job; the engine does not compute it.

**Scalar recoding.** k is recoded on the fly into radix-4 signed digits:
d_i = −2·k[2i+1] + k[2i] + k[2i−1], with d_i in {0, ±1, ±2}. For M = 193 this
gives 97 digits. The top digit initialises Q, and 96 steps of Q ← 4Q + d_i·P
follow. ±P and ±2P come from the preloaded registers; negation is
−(x, y) = (x, x + y). A zero digit skips the addition, so the run time depends
on k. For random 193-bit scalars one job takes about 100,000 cycles.

**Control.** A small micro-code store (`ecc_pkg::ucode`) holds two routines,
doubling (10 micro-instructions) and addition (12). Each instruction names an
operation and three registers: a destination and two sources. The operations
are ADD (XOR), ADD1 (add the constant 1), MOV, MUL and DIV.

There is one multiplier and one divider. An instruction that uses one of them
starts it and waits for its `done`. The other instructions take one cycle.
Around the routines, a state machine handles the cases the formulas do not
cover:
- Q at infinity: the addition becomes a copy.
- Doubling a point with x = 0: the result is infinity.
- Adding Q to itself: the controller runs doubling instead.
- Adding −Q: the result is infinity.

The registers are the preloaded parameters plus the temporaries m0…m14 and the
accumulated point (xt, yt). The micro-code uses m0…m6, m13 and m14.

Cost per step: two doublings and at most one addition, which is 3 divisions and
8 multiplications, about 1,100 cycles.

## Farms and reordering

**`job_fifo`** is the input buffer. It is a valid/ready FIFO with 4 entries of
1552 bits.

**The dispatcher in `ecc_farm`** takes the oldest job when two conditions hold:
an engine is idle, and the reorder buffer has a free slot. It reserves a slot
and notes the token against the chosen engine, the lowest-numbered idle one.
It then shifts the job in serially over 1552 cycles. There is one serial
loader per farm, so only one engine is loaded at a time.

**Completion.** When an engine finishes, its point is written into the reorder
buffer under that engine's token, and the engine becomes free. If several
engines finish in the same cycle, the lowest-numbered goes first.

**`completion_buffer`** is the reorder buffer. It supports three operations:
- `reserve` returns the token of the next slot in order.
- `complete` stores a result under any token, in any order.
- `drain` releases results strictly in token order, so it waits while the
  oldest slot is still running.

It has 8 slots. Assertions flag a slot completed twice or a unit started while
busy.

**`ecc_server_farms`** is the top. It offers each job to both farms and
accepts it only when both input buffers can take it, which keeps the farms in
step. `result_compare` takes one result from each farm and passes farm 1's
result on. It raises `result_match` when the two agree and counts pairs and
mismatches. The random-number generator that produced jobs in the original
set-up is not part of this RTL; jobs enter on the `job_*` ports.

## Interfaces and timing at a glance

| module | handshake | latency |
|---|---|---|
| `gf_x3_mul` | combinational | — |
| `gf_mul3x` | `start` pulse → `done` pulse | ceil(M/3) = 65 edges |
| `gf_div` | `start` pulse → `done` pulse | ceil(M/STEPS) = 193 edges (97 with STEPS = 2) |
| `ecc_engine` | `encrypt`/`serial_in` bits → `ready_ecc` level | 1552 load cycles + about 1,100 cycles per nonzero step |
| `job_fifo`, `completion_buffer`, `ecc_farm`, `ecc_server_farms` | valid/ready | one cycle through each buffer |

All resets are asynchronous and active low (`rst_n`). Job format:
`{k, f, a, b, xP, yP, x2P, y2P}`, each M+1 bits, with k in the most
significant bits. Result format: `{x, y}`, 2M bits.

## Departures and own choices

- **Divider cells.** The original divider is a bit-sliced array of R/S/U/V
  cells driven by a control ROM. Here the same control table selects
  word-wide multiplexers. Its five 3-bit selects make a 15-bit control word.
  The original's block diagram shows 22 control bits, but it does not list
  the cell-level signals. The single-iteration rule above is this design's
  own statement of what the table does. The initial values S = f and V = 0
  are this design's.
- **Division latency.** The original gives two figures for the division
  latency: m cycles, and elsewhere 97 cycles. The default here is M cycles,
  one table step per clock. 97 cycles is available as `STEPS = 2`.
- **Engine datapath.** The original's block diagram shows more than is
  implemented here:
  - a squaring register with a shift/decode unit that feeds the multiplier's B
    input 2 bits at a time,
  - a 3-bit divider select.

  Their function is not described, so they are not reproduced. The multiplier
  and the divider take both operands in parallel from the register file.
- **Speed claim.** The original states that k·P completes in "96 clock
  cycles". Here that is read as 96 recoding steps. Each step needs several
  multi-cycle field operations.
- **Own choices.** The following are all this design's:
  - the micro-code and controller,
  - the load order and serial protocol,
  - the affine formulas and point-at-infinity handling,
  - the valid/ready handshakes,
  - the buffer depths (4 and 8),
  - the lowest-index engine allocation and the shared loader.
- **Scalar range.** k must be below 2^M. The top bit of the 194-bit k register
  must be zero.
- **Not built.** The AES-based random-number generator is not included.

## Simulating

Each module sits in `rtl/<name>.sv`. Shared types and the micro-code are in
`rtl/ecc_pkg.sv`, and the divider's control table is in `rtl/gf_div_pkg.sv`.
The packages go first on the command line. `-y` finds the modules by file
name. Each testbench in `tb/` is
self-checking and ends with a `TB_RESULT checks=… failures=…` line. The
testbenches compare against `tb/gf_ref_pkg.sv`, an independent bit-serial
multiplier, a Fermat inverter and a plain double-and-add k·P. Random curves are
made valid by deriving b from a random point.

```
verilator --binary --timing -y rtl -y tb rtl/ecc_pkg.sv rtl/gf_div_pkg.sv tb/gf_ref_pkg.sv \
          tb/tb_ecc_server_farms.sv --top-module tb_ecc_server_farms -Mdir obj
./obj/Vtb_ecc_server_farms
```

| testbench | what it runs |
|---|---|
| `tb_gf_x3_mul`, `tb_gf_mul3x` | random and edge operands at M = 193, latency 65 |
| `tb_gf_div` | random operands at M = 193, latency 193 (STEPS = 1) and 97 (STEPS = 2), per-cycle check of the control table against two single iterations |
| `tb_ecc_engine` | k·P at M = 193 for k = 0, 1, 2, 3, 6 and random k; checks 97 digits per job and that negative, ±2 and zero digits all occur |
| `tb_job_fifo`, `tb_completion_buffer`, `tb_result_compare` | random traffic against queue models |
| `tb_ecc_farm` | one farm at M = 31 (f = x^31 + x^3 + 1), 14 jobs |
| `tb_ecc_server_farms` | both farms at M = 31, 16 jobs with random curves |
| `tb_ecc_server_farms_full` | the top at its defaults (M = 193, 4 engines per farm), 6 jobs, about 3 s of simulation |

The farm-level tests count each mechanism and fail if one never occurs:
- input buffer full,
- all engines busy,
- out-of-order completion in both farms,
- a drain waiting on an older job,
- a result at infinity,
- the consumer stalling the output.

To run smaller fields, override `M` on the top and use a trinomial
x^M + x^t + 1 with t ≤ M − 3. The M = 31 tests do this.
