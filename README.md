# SCS-MM-New: a radix-2 Montgomery multiplier built around one row of configurable full adders

Modular multiplication of large integers is the inner operation of RSA and
similar public-key schemes. Montgomery's method replaces the division by the
modulus with a sequence of "add, then halve" steps, but each step is a
three-operand addition whose carry would ripple over the whole word. The
usual cure is to keep the running sum in carry-save form (two words SS and
SC whose sum is the value), which removes the carry chain at the price of a
final conversion back to binary.

This design pushes that idea as far as it goes in area: the **only** wide
arithmetic in the multiplier is a single row of `K+5` full-adder cells. That
one row

* precomputes `D = B_hat + N_hat`, the operand used when both the multiplier
  bit and the quotient bit are 1,
* runs every Montgomery iteration `(SS, SC) = (SS + SC + x) / 2`,
* and converts the carry-save result back to binary at the end.

Three refinements keep the cycle count down without lengthening the
critical path, which stays at one 4-to-1 multiplexer plus one full adder:

1. **Configurable adder cells.** Each cell works either as one full adder
   (a three-input carry-save addition, "1F") or as two half adders in
   series ("2H"). In 2H mode one pass moves every carry two bit positions, so
   the two binary conversions need about half as many passes.
2. **Quotient precomputation.** While iteration `i` is in the adder row, a
   small block (`skip_d`) already works out the quotient bits of the next two
   iterations from the three least significant bits of SS, SC and x.
3. **Iteration skipping.** When the next iteration would add `x = 0` (its
   multiplier bit and quotient bit are both 0) and the carry-save pair is
   even, that iteration is not executed: the registers are simply shifted by
   two positions instead of one.

## What is computed

Inputs: `a`, `b` (K bits), an odd modulus `n_hat` (up to K+2 bits).
Output: `s` (K+3 bits) with

    s ≡ a · b · 2^-(K+2)   (mod n_hat),        s < n_hat + b/4

The result is congruent but not fully reduced; a final comparison and
subtraction, if needed, is left to the user of the block. Internally
`B_hat = b << 3` is used; the three zero low bits make the low bits of every
possible `x` depend on the quotient bit only, which is what lets `skip_d`
work from three bits. The loop runs for `i = -1 … K+4`: the dummy iteration
`i = -1` (with `x = 0`) exists so that the quotient of iteration 0 is
precomputed like all others, and the three extra iterations at the end undo
the factor 8 in `B_hat`. So the Montgomery radix is `R = 2^(K+2)`.

Any odd `n_hat` works. Using `n_hat = N` gives the plain Montgomery product
modulo `N`; a multiple such as `3N` is also accepted (the result is then
congruent modulo `N` as well).

Word width: with `b < 2^K` and `n_hat < 2^(K+2)`, `D_hat < 2^(K+4)` and every
loop sum `SS + SC + x < 2·D_hat < 2^(K+5)`, so `W = K+5` bits never overflow.
The top carry of the adder row is brought out (`ovf`) and an assertion in
`scs_mm_new` checks it stays 0.

## The configurable full adder (`cfa`, `ccsa`)

Cell `j` receives `a_j` (SS side), `b_j` (SC side), the neighbour bits
`a_{j-1}`, `b_{j-1}`, the inverted multiplexer operand `~x_j` and the mode
bit `alpha`:

| alpha | third operand `t`           | sum_j             | carry_j (weight j+1)          |
|-------|-----------------------------|-------------------|-------------------------------|
| 1     | `x_j`                       | `a_j ^ b_j ^ t`   | `maj(a_j, b_j, t)`            |
| 0     | `a_{j-1} & b_{j-1}`         | `a_j ^ b_j ^ t`   | `(a_j ^ b_j) & t`             |

In mode 0 the XOR `a_j ^ b_j` and the AND `a_{j-1} & b_{j-1}` (computed in
cell `j` for its lower neighbour) form the first half adder of the pair, and
the rest of the cell forms the second. In both modes
`a + b (+ x) = sum + carry`. The row (`ccsa`) returns the carry word already
aligned to its weight (`carry[0] = 0`), so the registers can take it as is.

## The main loop, cycle by cycle

This is the part that takes the most care to follow.

**Delayed shift.** The SS and SC registers hold the raw adder output of the
previous cycle, not yet divided by two. The operand multiplexers M1 (SC side)
and M2 (SS side) apply the division on the way back into the adder:
`>> 1` normally, `>> 2` when the previous cycle decided to skip the next
iteration. Their other inputs are the precomputation operands (`N_hat` on
M1, `B_hat` on M2) and the unshifted register (for the 2H conversion passes).
The select code is `mm_pkg::opnd_sel_e`.

**Operand selection.** `sm3` picks `x` from `{0, N_hat, B_hat, D_hat}` with
the registered `(A_hat, q_hat)` of the current iteration, as an AND-OR per
bit delivered inverted.

**Look-ahead.** `lsb_mux` (M4/M5) gives `skip_d` bits 2:0 of the current
iteration's SS and SC, taken straight from register bits 4:1 so that
`skip_d` does not wait for the wide multiplexers. With `x[2:0] = q_hat &
N_hat[2:0]`, `skip_d` forms the low two bits of the next carry-save pair:

    SS[i+1]_0 = SS_1 ^ SC_1 ^ x_1          SC[i+1]_0 = maj(SS_0, SC_0, x_0)
    SS[i+1]_1 = SS_2 ^ SC_2 ^ x_2          SC[i+1]_1 = maj(SS_1, SC_1, x_1)
    q_{i+1} = SS[i+1]_0 ^ SC[i+1]_0        q_{i+2} = SS[i+1]_1 ^ SC[i+1]_1
    skip_{i+1} = ~(A_{i+1} | q_{i+1} | SS[i+1]_0)

If `skip_{i+1}` is set, iteration `i+1` would add zero to an even pair, so
it is dropped: the next cycle uses `>> 2`, `q_hat = q_{i+2}`,
`A_hat = A_{i+2}` and the loop index advances by two. Otherwise it uses
`>> 1`, `q_{i+1}`, `A_{i+1}`. The A register shifts by one or two positions
in step, so its two low bits are always `A_{i+1}`, `A_{i+2}`.

**Last iteration.** A skip decided in the last iteration (`i = K+4`) would
divide once too often, so the controller disables skipping there (`allow`).

## Phases and latency (`mm_ctrl`)

| phase   | mode | what happens                                                         |
|---------|------|----------------------------------------------------------------------|
| PRE     | 1F   | `(SS, SC) = B_hat + N_hat + 0`                                       |
| PCONV   | 2H   | passes until `SC == 0` (`zero_d`); then `D_hat = SS`, SS and SC cleared |
| LOOP    | 1F   | one iteration per cycle, `i = -1 … K+4`, with skipping                 |
| FCONV   | 2H   | first pass also applies the last iteration's pending shift; passes until `SC == 0` |
| DONE    |      | `done` high for one cycle; `s` = SS                                   |

`done` rises `5 + P + L + F` clock edges after the edge that samples `start`:
`P` is the number of 2H passes converting `D_hat`, `L` the number of loop
cycles (`K+6` minus skipped iterations), `F` the number of final passes after
the first. `P` and `F` depend on the longest carry chain in the data.

## Interface (`scs_mm_new`)

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start`    | in  | 1     | pulse while idle; `a`, `b`, `n_hat` are sampled in that cycle |
| `a`, `b`   | in  | K     | operands |
| `n_hat`    | in  | K+2   | odd modulus |
| `busy`     | out | 1     | from the cycle after `start` until `done` |
| `done`     | out | 1     | one-cycle pulse; `s` valid from then until the next `start` |
| `s`        | out | K+3   | result |
| `skip_evt` | out | 1     | an iteration is skipped this cycle (observation) |
| `alpha`    | out | 1     | adder mode this cycle (observation) |

Parameter: `K`, the operand width, default 8. It is the only parameter to
change; all widths follow from it.

## Modules

| file | role |
|------|------|
| `rtl/mm_pkg.sv`     | select-code and state enums |
| `rtl/cfa.sv`        | configurable full adder cell |
| `rtl/ccsa.sv`       | row of W cells |
| `rtl/sm3.sv`        | simplified multiplexer for `x` |
| `rtl/opnd_mux.sv`   | M1 / M2 operand multiplexers with the delayed shift |
| `rtl/lsb_mux.sv`    | M4 / M5 three-bit multiplexers for the look-ahead |
| `rtl/skip_d.sv`     | quotient look-ahead and skip decision |
| `rtl/zero_d.sv`     | SC == 0 detector |
| `rtl/mm_ctrl.sv`    | phase sequencer |
| `rtl/scs_mm_new.sv` | top: registers and wiring |

## Where this RTL makes its own choices

The algorithm, the datapath (registers, M1/M2/SM3/M4/M5, adder row, skip and
zero detectors) and the look-ahead and skip rule follow the published
SCS-MM-New description. The following are this implementation's:

* **`n_hat` is an input.** The derivation of the "new modulus" from `N` is not
  specified; the hardware accepts any odd value.
* **`skip_d` takes `N_hat[2:0]`.** The original skip detector uses only bit 2
  of the modulus, which ties the two lowest bits to fixed values. This version
  takes all three bits and is correct for any odd modulus; its gate count is
  therefore slightly higher than the original's.
* **No skip in the last iteration**, and **one final pass always made**
  (it applies the shift still pending from the loop).
* **Control:** the state machine, the loop counter, the start/busy/done
  handshake, the reset, and the way SS/SC are zeroed before the loop.
* **Widths:** `W = K+5`, `n_hat` K+2 bits, `s` K+3 bits, as derived above.
* **Cell gates:** `cfa` is written from the cell's function (full adder or
  two half adders), not as a copy of a particular gate netlist.
* **Default size:** K = 8 matches the 8-bit buses of the original
  demonstration. Nothing in the RTL limits K; the tests also run at K = 64
  and K = 1024.

Not included: the earlier design steps that this multiplier improves on
(a plain one-level CSA multiplier and its conventional full-adder cell), and
any final reduction of `s` below `n_hat`.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`);
each ends with a line `TB_RESULT checks=N failures=M`.

* `tb_scs_mm_new` (K = 8, 400 multiplications) and `tb_scs_mm_new_k64`
  (K = 64, 150 multiplications) share `tb/mm_tb_body.svh`. For every
  multiplication they check `s · 2^(K+2) ≡ a · b (mod n_hat)`, the output
  bound, bit-exact agreement with an independent word-level model of the
  skipping algorithm, and the exact start-to-done cycle count from that
  model. They also count each mechanism (skips, 2H passes, multi-pass
  conversions, each of the four `x` choices, a skip suppressed in the last
  iteration) and fail if one never occurs. Operands include corner cases
  (zeros, all ones, `n_hat = 1`, `3`, `3N`, `2^(K+2)-1`).
* `tb_scs_mm_new_k1024` runs 12 multiplications with K = 1024 (an RSA-1024
  sized modulus), about 25 s to build and run.

* Unit tests: `tb_cfa` and `tb_lsb_mux` are exhaustive; `tb_ccsa` checks both
  modes and full conversions against integer addition; `tb_skip_d` checks the
  look-ahead against a full-word carry-save step; `tb_mm_ctrl` plays the
  datapath and checks every cycle's controls and the latency.

Average start-to-done cycle counts measured by these tests (random operands,
mixed with the corner cases): 18 cycles at K = 8, 76 at K = 64 and 994 at
K = 1024. Without skipping the loop alone would take K + 6 cycles (1030 at
K = 1024); the skipped iterations more than pay for the two conversions.

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`
(`-y rtl` lets Verilator find each module in the file of the same name; the
package is listed first):

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
      rtl/mm_pkg.sv tb/tb_scs_mm_new.sv --top-module tb_scs_mm_new
    ./obj_dir/Vtb_scs_mm_new

To change the operand width, instantiate `scs_mm_new #(.K(...))`; the
testbench body `tb/mm_tb_body.svh` works for any K (see `tb_scs_mm_new_k64`).
