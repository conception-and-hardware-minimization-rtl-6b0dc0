# A Chien search with a factored error locator polynomial

A Reed-Solomon or BCH decoder finds the positions of the corrupted symbols by searching for the
roots of the error locator polynomial

    Lambda(x) = c8 x^8 + c7 x^7 + ... + c1 x + c0

over the code's Galois field. If `Lambda(alpha^-i) = 0`, symbol `i` of the code word is in
error. The Chien search tries every nonzero field element in turn, one per clock.

This RTL computes `Lambda(x)` without one multiplier per coefficient. It regroups the
coefficients in pairs, so that each pair is a first-degree polynomial scaled by a power of `x`:

    Lambda(x) = x^7 (c8 x + c7) + x^5 (c6 x + c5) + x^3 (c4 x + c3) + x (c2 x + c1) + c0

The powers `x, x^3, x^5, x^7` come from one squarer and a short chain of multiplications by
`x^2`, and they are shared by all the pairs. The default build is the Chien search for
**RS(255,239)**: 8-bit symbols in GF(2^8), with a locator polynomial of degree up to 8. It is a
single synthesizable block that puts out one value of `Lambda` per clock.

## The factored evaluator

### Even and odd degree

For a locator of even degree `T`, pair `k` (k = 0 .. T/2-1) is

    (c[2k+2] x + c[2k+1]) * x^(2k+1)

and the constant `c0` is added on its own. For odd `T`, pair `k` (k = 0 .. (T-1)/2) is

    (c[2k+1] x + c[2k]) * x^(2k)

The lowest pair (`k = 0`) has the power `x^0 = 1`, so it needs no second multiplier. For
example, with `T = 3`:

    Lambda = x^2 (c3 x + c2) + (c1 x + c0)

Three modules build this:

| module        | what it computes | hardware |
|---------------|------------------|----------|
| `power_chain` | `x, x^3, ..., x^(T-1)` (even `T`) or `1, x^2, ..., x^(T-1)` (odd `T`) | `x^2 = x*x`, then each power is the previous one times `x^2` |
| `pair_term`   | `(hi*x + lo) * x^p` | multiplier, XOR, multiplier (`HAS_POW = 0` leaves out the second one) |
| `chien_eval`  | `Lambda(x)` | one `power_chain`, `(T+1)/2` `pair_term`s, a chain of XORs from the highest pair down, constant last |

### Operator count

Count each multiplier, each adder (XOR word), the multiplexer and the register as one operator.
Then the complete search for degree `T` needs:

| T | classic search (`3 + 4T`) | this circuit | formula used by this circuit |
|---|---------------------------|--------------|------------------------------|
| 3 | 15 | 10 | `3 + (5T-1)/2` (odd `T`) |
| 4 | 19 | 13 | `3 + 5T/2` (even `T`) |
| 5 | 23 | 15 | |
| 6 | 27 | 18 | |
| 7 | 31 | 20 | |
| 8 | 35 | 23 | |

Take `T = 8` as an example. The 23 operators are:

- the trial-point generator: mux, alpha multiplier and register (3);
- four power multipliers;
- four pairs of two multipliers and one XOR each (12);
- four XORs to sum the pairs and the constant.

A caution on these numbers: the classic search multiplies each coefficient register by a
*constant* `alpha^k`, and a constant multiplier is only a few XOR gates. Here every pair and
power multiplier is a full *variable-by-variable* GF(2^8) multiplier. A lower operator count
therefore does not mean less logic. FPGA results for RS(255,239) show the factored circuit
using more 4-input LUTs than the classic one (about 500 against about 200), but far fewer
flip-flops: one 8-bit register here against nine coefficient registers.

## Trial points and the `ctr` input

`alpha_stepper` makes the trial points. A multiplexer selects either the constant `1`
(`ctr = 0`) or the register's own output (`ctr = 1`). The selected value is multiplied by
alpha and stored in the 8-bit register on every rising clock edge:

| clock edge (counted from the first edge with `ctr` low) | `ctr` at that edge | `x` after the edge |
|---|---|---|
| 1 | 0 | alpha^1 |
| 2 | 1 | alpha^2 |
| j | 1 | alpha^j |
| 255 | 1 | alpha^255 = 1 |

- Holding `ctr` low keeps `x` at alpha^1.
- Taking `ctr` low again for one clock restarts the search.
- After 255 steps, `x` wraps and runs through the field again.
- The asynchronous active-low `rst_n` clears the register to 0, so `ep` shows `c0` until the
  first clock edge.

`ep` is combinational from the register, so it is valid in the same clock cycle. A full
RS(255,239) search takes 255 clocks after the start edge. The critical path is deep: register,
squarer, three chained multipliers, pair multipliers and the XOR chain. There is no pipelining.

### Which root is which position

Because `alpha^255 = 1`, `alpha^j = alpha^-(255-j)`. So a zero at clock `j` means that code
word position **`i = 255 - j`** is in error (`i = n - j` for a code of length `n`). The search
therefore visits positions 254, 253, ..., 0, in that order. The block gives no position
number; count clocks from the start edge to get one.

## Top level: `chien_search_block`

| port    | dir | width      | meaning |
|---------|-----|------------|---------|
| `clk`   | in  | 1          | clock |
| `rst_n` | in  | 1          | asynchronous reset, active low |
| `ctr`   | in  | 1          | 0: start or hold at alpha^1; 1: advance |
| `coef`  | in  | `[T:0][M-1:0]` | `coef[k]` is the coefficient of `x^k`; hold it for the whole search |
| `ep`    | out | `M`        | `Lambda(x)` for the current trial point |
| `root`  | out | 1          | `ep == 0`: the current position is in error |

| parameter | default | meaning |
|-----------|---------|---------|
| `M`    | 8 | symbol width, field GF(2^M) |
| `PRIM` | `9'h11D` | primitive polynomial with its `x^M` term; 0x11D is x^8+x^4+x^3+x^2+1, so alpha^8 = 29 |
| `T`    | 8 | degree of the locator polynomial (`t` of the code), at least 2 |

Named settings are in `chien_pkg`: `RS255_*` for RS(255,239) and `RS15_*` for RS(15,11)
(GF(2^4), `PRIM = 5'h13`, `T = 2`). Any lower-degree locator can run on a larger block: set its
unused upper coefficients to zero.

`gf_mul` is the only arithmetic primitive. It is a shift-and-add GF(2^M) multiplier, and
synthesis reduces it to XORs when one input is a constant, as in the alpha multiplier.

## What follows the reference design and what is added here

These parts follow the reference design:

- the pairing of coefficients and the shared power chain;
- the mux, alpha multiplier and register loop;
- the order of the final additions;
- the GF(2^8) field;
- the trial order `alpha^1, alpha^2, ...`.

These parts are choices made for this RTL:

- The `root` flag.
- The reset, and its value 0.
- Which mux input `ctr` selects. It was chosen so that the degree-8 example's sequence of
  values comes out right.
- The insides of the multiplier.
- The extension of the pairing to any degree `T`.

These parts are not included:

- A second, even smaller variant of the factored circuit. It is known only by its operator
  count (`3 + 2T`).
- The key-equation (Euclidean) solver that supplies `coef`.
- Any error-value (Forney) stage.
- The board-level display harness used for the hardware test.

## Verification

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=F` and has a
watchdog. The reference model (`tb/gf_ref_pkg.sv`) uses log/antilog tables and plain Horner
evaluation. It shares no code with the RTL.

| testbench | what it shows |
|-----------|---------------|
| `tb_gf_mul` | all 65,536 GF(2^8) and 256 GF(2^4) products; alpha^0..8 = 1, 2, 4, ..., 128, 29 |
| `tb_alpha_stepper` | reset to 0, load of alpha, hold, 300 steps with wrap-around, reset in the middle of a run |
| `tb_power_chain` | every field element, degrees 8, 3 (GF(2^8)) and 5, 2 (GF(2^4)) |
| `tb_pair_term` | 5,000 random operands, with and without the power multiplier |
| `tb_chien_eval` | random polynomials of degree 8, 7, 3 and 2 at every field element; the degree-8 example below |
| `tb_chien_search_block` | default size, end to end (see below) |
| `tb_rs15_table1` | RS(15,11) example over GF(2^4) |

The end-to-end test runs at the default parameters. It covers two things:

- **The degree-8 example.** With coefficients 127, 127, 254, 128, 14, 14, 0, 32, 1 (from `c8`
  down to `c0`), `ep` is 1 after reset. After the start edge it must run
  254, 163, 63, 4, 160, 24, 112, 232, 169, 8, 25, 162, 79, 124, 3.
- **Locators built from known error sets.** The test uses 12 locators from 0 to 8 random
  error positions, one with 8 errors among them. Each is searched over all 255 positions,
  and one search runs past the wrap. `ep` is checked at every clock. `root` must rise exactly
  at clocks `255 - e_i`. The test counts starts, holds, advances, roots, wraps and resets,
  and fails if any of them never happens.

The RS(15,11) test takes `Lambda = 14x^2 + 14x + 1` over GF(2^4). Its values must be
3, 13, 12, 3, 15, 0, 14, 13, 14, 15, 2, 2, 0, 12, 1 for `x = alpha^1 .. alpha^15`, with errors
found at positions 9 and 2.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -y rtl -y tb --top-module tb_chien_search_block \
        -Mdir obj -o sim rtl/chien_pkg.sv tb/gf_ref_pkg.sv tb/tb_chien_search_block.sv
    ./obj/sim

Replace the testbench name to run any other test. The packages must come first on the command
line. `-y` finds the other modules by their file names. Every test finishes in well under a
second.

## Changing it

- **Another code:** set `M`, `PRIM` and `T`. `PRIM` must be primitive, or the register will not
  visit every element. For a shortened code of length `n < 2^M - 1`, only positions
  `i = 2^M - 1 - j` below `n` matter.
- **Lower degree:** build with a smaller `T`, or keep `T` and zero the upper coefficients.
- **Faster clock:** `chien_eval` is purely combinational. Registers between the power chain and
  the pairs, or after the pairs, can be added without changing the arithmetic. `root` then
  lags `x` by the same number of clocks.
