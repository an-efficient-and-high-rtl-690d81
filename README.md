# Systolic Montgomery multiplier for RSA-style modular arithmetic

Public-key schemes such as RSA and Diffie-Hellman spend almost all of their
time on one operation: the modular product `X * Y mod N` of very long
numbers, repeated inside a modular exponentiation. The straightforward way
needs a division by `N` after every product. Montgomery's method replaces
that division with additions and right shifts. It computes

    Mont(A, B) = A * B * 2^-n  mod M          (n = operand width, M odd)

one multiplier bit at a time. Each step adds `a_i*B` and, if the running sum
is odd, also `M`, which makes the sum even. The sum is then halved.

This RTL lays those n steps out as a two-dimensional array of one-bit
processing elements (PEs). There is one row per multiplier bit and one
column per bit of the partial result. On top of the array sit a two-pass
modular multiplier and a square-and-multiply exponentiator. A compact
bit-serial Montgomery multiplier is included alongside, for comparison.

Everything is parameterised by the operand width `N_BITS`, with a default
of 32 bits. That is the largest width at which this architecture was
originally built; 8 and 16 bits were also built. The structure extends to
RSA widths (1024 bits) with only the parameter changed.

## The arithmetic, in two lines

The systolic array evaluates, for i = 0 .. n-1:

    q_i   = r_0 xor (a_i and b_0)           -- makes R + a_i*B + q_i*M even
    R     = (R + a_i*B + q_i*M) / 2

With `B < M` and R starting at 0, R stays below `2M`. After n rows,
`R ≡ A*B*2^-n (mod M)`. One conditional subtraction of M then gives the
fully reduced value.

The 2^-n factor is removed by a second Montgomery product with the constant
`2^(2n) mod M`:

    Mont(Mont(X, Y), 2^2n mod M) = X * Y mod M

The constant depends only on the modulus. It is computed off-chip and
applied on the `constant` input (`r2` on the exponentiator).

## The processing elements and how a row adds

Every row chooses one addend for the whole row from `{a_i, q_i}`:

| a_i | q_i | row adds |
|-----|-----|----------|
| 0   | 0   | 0        |
| 0   | 1   | M        |
| 1   | 0   | B        |
| 1   | 1   | M + B    |

`M + B` is formed once per multiplication, so each PE needs only a 4:1
multiplexer and not a second adder.

* **`mont_pe`** (general cell, columns 1..n) is a 4:1 multiplexer feeding
  one full adder. The adder sums the chosen addend bit `x_j`, the incoming
  partial-result bit `r_j` and the carry from column j-1. Because the row
  divides by two, the sum bit leaves as bit j-1 of the next partial result,
  `r_(j-1)(i+1)`. The carry goes on to column j+1.
* **`mont_pe_q`** (column 0) decides `q_i`. With that choice, bit 0 of the
  column sum is always 0. The cell therefore only produces the carry into
  column 1, which is `r_0 AND x_0`. No full adder is needed because no carry
  enters column 0.
* **`mont_row`** holds one quotient cell and N_BITS general cells. The carry
  out of the last column becomes the top bit of R, so R is N_BITS+1 bits
  wide.

The decision `q_i` is made in column 0 and is needed by every column of the
same row. Within a row, both `q_i` and the carry chain therefore ripple
across the full width. This is the critical path of one row. It grows
linearly with N_BITS.

## Array timing and control (`mont_systolic_array`, `mont_mult`)

`B`, `M` and `M+B` run vertically through all rows. Bit `a_i` enters row i
from the side. Each row's result is registered, so the array advances one
row per clock. The operands are held in `mont_mult` for the whole
operation, which keeps one product in flight at a time.

`mont_mult` adds the controller around the array:

* `start` latches a, b and m, and forms `M+B`.
* A down counter is loaded from the `count` input and runs while the array
  settles. **`count` must be N_BITS-1**: 7, 15 and 31 for 8, 16 and
  32 bits. This design follows the convention of a separate count pin; it
  does not derive the value itself.
* The array output (below 2M) is then reduced by one subtraction of M and
  latched. `done` pulses.

Latency is N_BITS+1 clock cycles from the cycle that samples `start` to
`done`. Concurrent assertions check that the modulus is odd and that
`b < m` at every start.

## Modular multiplier (`mont_modmul`)

Its ports are the classic top-level pinout of this multiplier: `X`, `Y`,
`N`, `constant`, `count`, `start`, `clk`, `reset` in; `Result`, `state` out.
It runs two passes on one `mont_mult`: `R1 = Mont(X, Y)` and then
`Result = Mont(R1, constant)`.

`state` falls on start. It rises when `Result` is valid, 2*N_BITS+6 cycles
after start (70 cycles at 32 bits), and stays high until the next start.
`Y` must be below `N`. `X` may be any N_BITS-bit value.

## Modular exponentiation (`mont_modexp`)

This block works left to right in the Montgomery domain:

1. `a' = Mont(base, r2)` and `s' = Mont(1, r2)`, where `s'` is 1 in
   Montgomery form.
2. For each exponent bit, from the MSB down: `s' = Mont(s', s')`. If the bit
   is 1, also `s' = Mont(s', a')`.
3. `result = Mont(s', 1)`.

Each product costs N_BITS+3 cycles including hand-over. A run with an
E_BITS-bit exponent of Hamming weight w takes `(E_BITS + w + 3) * (N_BITS + 3)`
cycles. The exponentiator always processes all E_BITS exponent bits, so
leading zeros cost squarings. The outputs `n_squares` and `n_multiplies`
report how many of each the last run did. This is the operation of RSA
encryption (`c = m^e mod n`) and decryption (`m = c^d mod n`). Keys and
`r2` come from outside.

## Iterative multiplier (`mont_iterative`)

This is the bit-serial alternative, with one iteration every three clocks.
Its datapath:

* Shift register 1 holds A. Its bit 0 is `a_i`.
* Two 2:1 muxes, `0/B` (selected by `a_i`) and `0/M` (selected by bit 0 of
  the first sum), feed two adders.
* Shift register 2 holds R. It is loaded with the second sum and shifted
  right.

A six-state controller (S0 idle … S5 stop) and a down counter sequence it.
One multiplication takes 3*N_BITS+1 cycles. Like the textbook algorithm it
has **no final subtraction**, so `R` is in `[0, 2M)` and is N_BITS+1 bits
wide. Reduce it, or feed it to a further Montgomery product, which accepts
A up to 2^n.

## Top level (`mont_crypto_top`)

The top places the modular multiplier, the exponentiator and the iterative
multiplier side by side. They share only `clk` and `reset`. Exponentiator
ports carry the prefix `exp_` and iterative ones `it_`. The `count` pin
serves both systolic engines.

## Where this RTL departs from the source description, or fills gaps

* **Iterations.** One published listing of the systolic loop runs i = 0..n,
  i.e. n+1 iterations. The array drawing has n rows. This design uses n
  rows plus a final conditional subtraction, which is sufficient for
  `B < M`.
* **The constant.** One listing gives it as `2^n mod M`, but the
  surrounding text asks for `2^2n mod M`. Only `2^2n mod M` gives
  `X*Y mod N`, so that is what the testbenches apply. The hardware takes
  the constant as an input either way.
* **Quotient cell.** The reference drawing of the quotient cell shows a
  full adder fed with `r_1`. Here that bit is added in the column-1 cell
  instead. The sum is the same, arranged one column later.
* **Row registers.** Registers between rows, operand holding, the
  start/busy/done handshake, the meaning of `state`, synchronous
  active-high reset and the exponentiator's sequencing are this design's
  own choices.
* **Iterative multiplier.** The counter of the iterative controller is
  read as a down counter. Waiting in S0 and restarting from S5 on `start`
  are additions.
* **Not included.** RSA key generation (random numbers, primality tests,
  extended Euclid) is not part of this design.
* **Widths not simulated.** The array has N_BITS·(N_BITS+1) cells. Widths
  up to 128 bits are exercised by the testbenches, and 256 bits was
  simulated once. A 1024-bit instance is a parameter change, but it is a
  million cells and was not simulated.

## Files

`rtl/`:

* `mont_pkg.sv`: addend-select type and mux function.
* `mont_pe.sv`, `mont_pe_q.sv`, `mont_row.sv`, `mont_systolic_array.sv`:
  the array.
* `mont_mult.sv`: array plus controller.
* `mont_modmul.sv`, `mont_modexp.sv`, `mont_iterative.sv`: the engines.
* `mont_crypto_top.sv`: the top level.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. The
reference arithmetic is in `tb_mont_ref_pkg.sv`. It uses plain `*` and `%`
on wide vectors, independent of the bit-level algorithm. There are also two
workload benches:

* `tb_workload_operand_sizes.sv` runs 8/16/32-bit instances on their
  example operands.
* `tb_workload_wide_operands.sv` runs 128-bit products.

The top-level bench `tb_mont_crypto_top.sv` runs at the default
parameters. It covers a 32-bit RSA round trip (p = 65521, q = 65537,
e = 65537) and random products. It also counts how often each mechanism
occurred: both passes, the final subtraction taken and skipped, squares,
multiplies, skipped multiplies, ignored starts and unreduced iterative
results.

Every bench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
All of them pass. Each block's bench was also run against a copy of the
block with one deliberate bug, for example a missing carry term, a wrong
quotient rule or a skipped final subtraction. Each such copy was caught.
The cycle counts given above are checked by the benches.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mont_pkg.sv tb/tb_mont_ref_pkg.sv tb/tb_mont_crypto_top.sv \
        --top-module tb_mont_crypto_top -o sim
    ./obj_dir/sim

Replace the last file and `--top-module` to run another bench. Build time
grows steeply with width: about 40 s at 128 bits and about 8 minutes and
4 GB at 256 bits.

To change the size, set `N_BITS` (and `E_BITS` for the exponent) on
`mont_crypto_top`, and drive `count` with N_BITS-1.
