# Error-resistant NTT core for CRYSTALS-Kyber

This is a forward number theoretic transform (NTT) core for Kyber polynomials
(n = 256 coefficients modulo q = 3329). It is hardened against single event
upsets (SEUs), the bit flips that radiation causes in the registers of an
SRAM-based FPGA in orbit. The core itself is small: one butterfly unit, three
register banks and a counter. Two cheap codes protect the data it keeps in
registers:

* **Twiddle factors** never change during a transform, and a wrong twiddle
  factor corrupts every coefficient that uses it. Each one is stored with 5
  Hamming check bits, and a single flipped bit is **corrected** on every
  read before the butterfly uses the value.
* **Coefficients** are rewritten on every layer. Each stored coefficient
  carries one parity bit, which is **checked** whenever the butterfly reads
  the coefficient. A mismatch cannot be corrected, so it aborts the
  transform and asks the host to start again.

Neither protection adds a cycle. Loading takes 256 + 128 cycles and the
transform exactly 7 × 128 = 896 cycles, whether or not errors occur.

## Arithmetic: butterfly and Barrett reduction

Each cycle, the butterfly takes two coefficients `u`, `v` and a twiddle
factor `w`, all below q. It returns the Cooley-Tukey pair

    a = (u + v·w) mod q        b = (u − v·w) mod q

One 12×12 multiplier forms `v·w`, which is below q² < 2²⁴. An adder and a
subtractor follow, then two identical reducers that work in parallel. The
subtractor adds q² so that its 24-bit result is never negative. Adding q²
does not change the result mod q.

Each reducer (`barrett_reduce`) uses fixed constants k = 24 and
x = ⌊2²⁴ / q⌋ = 5039:

    y = (a · x) >> 24      z = a − y · q      if z ≥ q: z = z − q

For every a < 2²⁴, the estimate `y` is off by at most one, so one
conditional subtraction is enough. The testbench checks all 2²⁴ inputs. Both
multiplications are by constants and happen one after the other. The core
has no pipeline registers: a whole butterfly is combinational, and its
results are written at the next clock edge. The longest path therefore runs
from a bank read, through the multiplier and a reducer, to a bank write. Add
pipeline registers here if you need a higher clock frequency. Doing so
changes the schedule described below.

## Schedule: layers, addresses and ping-pong banks

The transform has 7 layers, l = 1 … 7. In layer l the two coefficients of a
butterfly are `len = 256 >> l` apart (128, 64, …, 2). Every layer runs 128
butterflies, one per cycle. For butterfly `b` of layer `l`:

    group  = b / len
    j      = group · 2·len + (b mod len)        reads/writes j and j + len
    twiddle index = 2^(l−1) + group

This is the loop order of the Kyber reference NTT. The twiddle bank must hold
Kyber's table `zeta_k = 17^br7(k) mod q` for k = 0 … 127, where br7 reverses
the 7 bits of k. Entry 0 is never read. With that table the output equals
Kyber's `NTT()` in normal (non-Montgomery) representation, in Kyber's
bit-reversed output order.

There are two coefficient banks, A and B, of 256 × 13-bit registers each.
Odd layers read A and write B; even layers read B and write A. A result goes
to the same two indices, in the other bank, as the operands it came from.
With 7 layers the result ends in bank B. Both banks are flip-flops with
asynchronous read ports: two reads and two writes every cycle, with no
memory latency. `sequence_counter` generates all addresses and the bank
direction from a phase register, a layer number and a 7-bit butterfly
counter.

## Error protection in detail

**Hamming code for twiddle factors.** The 12 data bits and 5 check bits form
a 17-position code word. Check bits sit at positions 1, 2, 4, 8 and 16. Data
bits 0 … 11 sit at positions 3, 5, 6, 7, 9 … 15 and 17, in that order. Check
bit i is the XOR of the data bits whose position has bit i set, so every
checked group has an even number of ones. Five bits is the smallest p with
2^p > 12 + p + 1.

* `h_compute` produces the check bits. The same module is used twice: once
  in the write path while twiddle factors are loaded, and once inside the
  butterfly core, where it recomputes them from the data as read.
* `h_correct` XORs the stored check bits with the recomputed ones to form
  the syndrome. A non-zero syndrome is the position of the flipped bit. If
  that position holds data, the bit is inverted. If it holds a check bit,
  the data is already right.
* The correction happens on every read. The stored word is **not** written
  back, so an upset stays in the register, and is corrected again on each
  read, until the next load. Two flips in one word are outside what the code
  can correct and give a wrong twiddle factor.

**Parity for coefficients.** Every stored coefficient gets an even-parity
bit from `parity_gen`. That happens on loading, and on each butterfly
result before it is written to the next bank. `er_butterfly_core` recomputes
the parity of `u` and `v` as they are read. On a mismatch it raises `rst_1`
(for u) or `rst_2` (for v). In that cycle:

* both bank writes are suppressed;
* the sequence counter drops back to coefficient loading;
* the `restart` output pulses for one cycle.

The inputs have already been overwritten by then, so the host must send the
256 coefficients and the 128 twiddle factors again. The whole transform then
runs from the start. Parity finds any odd number of flipped bits in a word.
An even number goes unnoticed.

The result bank is protected too. `rd_par_ok` reports whether the
coefficient being read out still matches its parity bit.

## Interface and timing

`ntt_er_top` has no parameters. All signals belong to `clk`'s domain.

| signal | dir | width | meaning |
|---|---|---|---|
| `rst` | in | 1 | synchronous, active-high reset; clears all banks, goes to coefficient loading |
| `clr` | in | 1 | synchronous return to coefficient loading (banks keep their contents) |
| `coef_in`, `coef_valid`, `coef_ready` | in/in/out | 12/1/1 | 256 coefficients (< q), index 0 first; a word is taken on each edge where valid and ready are both high |
| `tw_in`, `tw_valid`, `tw_ready` | in/in/out | 12/1/1 | 128 twiddle factors zeta_0 … zeta_127, same handshake, accepted after the coefficients |
| `done` | out | 1 | high from the end of the 896th compute cycle until `clr` or `rst` |
| `rd_idx` → `rd_coef`, `rd_par_ok` | in → out | 8 → 12, 1 | combinational read of the result bank |
| `restart` | out | 1 | one-cycle pulse: a parity error aborted the transform; resend everything |
| `tw_fixed` | out | 1 | a twiddle data bit was corrected in this cycle |
| `tw_err` | out | 1 | the twiddle read in this cycle had a non-zero syndrome (data or check bit) |
| `layer` | out | 4 | layer in progress (1 … 7) |

Timing of one transform, counted from the edge that accepts the last
twiddle factor: `done` is high exactly 896 cycles later. The load takes 384
accepted words, so with `coef_valid` and `tw_valid` held high it takes 384
cycles. After `done`, raise `clr` for one cycle to begin the next load.

## Design choices not fixed by the architecture

The architecture fixes the banks, the single combinational butterfly, the
Barrett structure, Hamming codes on twiddle factors, parity on coefficients,
restart on a parity error and the l × n/2 cycle count. The following were
chosen for this implementation:

* Barrett constants k = 24 and x = 5039. With these constants
  one correction step is exact over the whole 24-bit input range.
* The q² offset in the subtractor.
* Even parity, rather than odd parity. A register cleared by reset is then a
  valid word.
* The Hamming bit layout, and the combinational encoder in the twiddle write
  path.
* The valid/ready load handshakes, the combinational readout port, `clr`
  keeping the bank contents, and the status outputs `tw_fixed`, `tw_err` and
  `layer`.
* `rst_1` monitors u and `rst_2` monitors v.
* After a restart, both coefficients and twiddle factors are reloaded.
* Synchronous, active-high reset.

## Not included

* **Inverse NTT.** Only the forward transform is built. There is no
  Gentleman-Sande mode, no inverse twiddle order and no final scaling by
  n⁻¹.
* **An unprotected variant**, and a variant with Hamming codes on the
  twiddle factors but no parity on coefficients. Both are easy to derive:
  remove `parity_gen`/`h_compute`/`h_correct` and narrow the banks.
* **Scrubbing** (writing corrected twiddle factors back), and detection of
  double errors in twiddle factors.

## Files

`rtl/`

| file | content |
|---|---|
| `ntt_pkg.sv` | constants (q, n, widths, Barrett constants) and the stored-word types `pcoef_t` (value + parity) and `htw_t` (value + check bits) |
| `ntt_er_top.sv` | the top: banks, controller, core, input encoders, bank routing, readout |
| `sequence_counter.sv` | phases, load indices, butterfly and twiddle addresses, bank direction, restart |
| `er_butterfly_core.sv` | parity checks, Hamming correction, butterfly, output parity |
| `butterfly_core.sv` | modular Cooley-Tukey butterfly |
| `barrett_reduce.sv` | 24-bit to 12-bit reduction mod 3329 |
| `h_compute.sv`, `h_correct.sv` | Hamming(17,12) check bits and single-error correction |
| `parity_gen.sv` | parity bit |
| `coef_bank.sv`, `twiddle_bank.sv` | flip-flop register banks |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`ntt_ref_pkg.sv`. That package holds the reference models: the zeta table,
the textbook NTT computed with `%`, and a Hamming encoder that builds the
code word position by position.

`tb_ntt_er_top` runs ten full-size transforms against the reference model.
It flips register bits through hierarchical references to test each
protection:

* upsets in twiddle data bits and a check bit, which must be corrected;
* upsets in bank A during layer 1 and in bank B during layer 2, which must
  cause a restart;
* an upset in the result bank, which must drop `rd_par_ok`.

It also checks the 896-cycle compute time, and counts how often each
mechanism occurred.

`tb_seu_campaign` runs 60 transforms. In each one it flips a single random
bit, at a random compute cycle, in any of the three banks (parity and check
bits included). Every transform must end in one of three ways:

* the exact result;
* a restart, after which a reload gives the exact result;
* the exact result except at coefficients that `rd_par_ok` flags.

A wrong coefficient that is not flagged counts as a failure. The run shows
what the two codes guarantee together: no single upset in a register can
silently corrupt the output.

## Simulating

Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        rtl/ntt_pkg.sv tb/ntt_ref_pkg.sv tb/tb_ntt_er_top.sv --top-module tb_ntt_er_top
    ./obj_dir/Vtb_ntt_er_top

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. Replace
`tb_ntt_er_top` with any other `tb_<module>` to run that module's test. The
full-size end-to-end test runs in well under a second. The exhaustive
Barrett test takes a few seconds.
