# Serial-parallel GF(2^m) multipliers with a T-flip-flop accumulator

This RTL multiplies two elements of the binary field GF(2^m) in the standard
(polynomial) basis: prod = A · B mod Q(x), where Q(x) = x^m + q_{m-1}x^{m-1} + … + q_1x + 1
is the field's reduction polynomial. Arithmetic of this kind sits at the heart of
elliptic-curve cryptography and of Reed–Solomon style codes.

Two multipliers are provided. Both take A in parallel and B a piece at a time:

* **bit-serial/parallel** (`gf_bsp_mult`): one bit of B per clock, m steps per product;
* **digit-serial/parallel** (`gf_dsp_mult`): one w-bit digit of B per clock, ⌈m/w⌉ steps per product.

Both use the same idea for the result register. In GF(2^m), addition is a
bitwise XOR, and a T flip-flop that toggles on a 1 *is* a one-bit XOR accumulator.
A row of m T flip-flops, the **finite field accumulator (FFA)**, therefore adds
the partial products with no XOR gates in front of the storage.

The reduction polynomial is a run-time input, given as its lower m coefficients
(`8'h1B` for x^8 + x^4 + x^3 + x + 1). One netlist therefore serves every field
of degree m, the NIST trinomials included.

## The arithmetic

With B = Σ b_j x^j:

    A·B mod Q = Σ_j b_j · (x^j · A mod Q)

The bit-serial multiplier keeps x^j·A mod Q in a register and multiplies it by
x once per cycle. It ANDs that register with b_j and toggles the result into the FFA.

The digit-serial multiplier groups w consecutive terms. For digit j (bits b_{jw} … b_{jw+w-1}):

    A^j       = z^{jw} · A mod Q        (kept in the input register)
    partial_j = Σ_{i<w} b_{jw+i} · (z^i · A^j mod Q)
    A^{j+1}   = z^w · A^j mod Q         (written back to the input register)

It adds partial_j into the FFA.

Multiplying by x modulo Q takes one step. Shift left by one, and if a 1 falls
off the top (bit m-1), XOR q into the shifted value. Bit 0 takes the overflow
bit directly, because an irreducible Q always has a constant term of 1. For this
reason **bit 0 of the polynomial input is never read**.

## Bit-serial/parallel multiplier (`gf_bsp_mult`)

    a ──load──► MRU (LFSR, x^j·A mod Q) ──► AU (m ANDs) ──► FFA (m T flip-flops) ──► prod
    b ──load──► PISO shift register ── b_j ──┘
                 counter / control (start, en, done)

* **MRU (`gf_mru`)**, the modular reduction unit. It has m D flip-flops wired as a
  Galois LFSR, with a reduction cell `gf_rc` in front of flip-flops 1…m-1. A cell
  with q_i = 1 XORs in the feedback bit; a cell with q_i = 0 passes the bit through.
  With a hard-wired polynomial, the q_i = 0 cells would be plain wires. Here they
  are an AND-XOR, so the polynomial can stay programmable.
* **AU (`gf_and_unit`)**: m AND gates that form b_j · (x^j·A mod Q).
* **FFA (`gf_ffa`, `gf_tff`)**: the accumulator.
* **PISO (`gf_piso`)**: holds B and shifts right, so b_0 comes first.
* **Counter (`gf_counter`)**: counts the steps done, and advances only while `en` is high.

## Digit-serial/parallel multiplier (`gf_dsp_mult`)

The input register (`gf_input_reg`) holds A^j. The combinational **PGCMR** unit
(`gf_pgcmr`, product generator cum modular reduction) has three sections:

1. **Reduction section** (`gf_reduction_section`). It has w+1 cells (`gf_zmul`),
   and cell i outputs z^i·A^j mod Q. Cell 0 is a wire, and cell w gives A^{j+1}.
   Each cell is i multiply-by-z steps in cascade, built from the same
   reduction cells as the MRU.
2. **AND section**: w copies of `gf_and_unit`. Copy i is gated by b_{jw+i}.
3. **Addition section** (`gf_xor_tree`): a balanced binary tree of w-1 XC cells.
   Each XC cell is an m-bit XOR. For w = 8 the tree has 4 + 2 + 1 cells in three levels.

B sits in a `gf_piso` that shifts w bits per step. B is zero-padded to ⌈m/w⌉·w
bits, and the least significant digit goes first.

The longest combinational path is the z^w cell, which is w cascaded reduction
steps, followed by the AND section and a ⌈log2 w⌉-level XOR tree. Choosing w
trades this path against the number of cycles.

## Interface and timing (both multipliers)

| signal | dir | meaning |
|---|---|---|
| `clk` | in | clock, rising edge |
| `rst_n` | in | asynchronous reset, active low; nothing runs while it is low |
| `start` | in | one-cycle pulse: load A and B, clear the FFA and the counter |
| `en` | in | while high, one bit/digit is consumed per clock; low stalls every register |
| `a`, `b` | in | operands, sampled only in the `start` cycle |
| `p` / `q` | in | lower m coefficients of Q(x); bit 0 is ignored (taken as 1). Must be stable during the operation |
| `prod` | out | the FFA contents; it equals A·B mod Q from `done` until the next `start` |
| `busy` | out | high while bits or digits remain |
| `done` | out | one-cycle pulse when the product is complete |

If `en` is held high, `done` rises **m+1 cycles** after `start` for the
bit-serial multiplier. That is one load cycle plus m accumulate cycles. For the
digit-serial multiplier it is **⌈m/w⌉+1 cycles**, or 2 cycles at m = w = 8.
Every cycle with `en` low while `busy` adds exactly one cycle.

A `start` during `busy` abandons the current product and begins a new one.
`start` may also come in the cycle right after `done`. While an operation runs,
`prod` shows the partial sums.

`gf_mult_top` puts both multipliers side by side. Each one has its own
`bsp_*` / `dsp_*` ports, and they share `clk` and `rst_n`.

Parameters (typed `int unsigned`):

* `M`: the field degree, default 8.
* `W`: the digit size, default 8.

`gf_pkg` holds these defaults, `GF_Q_DEFAULT = 8'h1B`, and the controller state type.

## Where this RTL makes its own choices

These points follow the architecture described above but are not fixed by it:

* **Control.** The start/en/busy/done sequencing, the operand-capture rule and
  the restart-on-start behaviour are this design's own. So are the PISO register
  that feeds B and its LSB-first order.
* **T flip-flops.** A hand-built T flip-flop would gate its clock with the T
  input (a NAND with the clock, then an inverter). Here it is a flip-flop on
  the system clock with a synchronous enable, `q <= q ^ t`. The function is the
  same and the design keeps a single clock.
* **Polynomial.** The polynomial is an input port, not fixed wiring. This costs
  one AND gate per reduction cell. Tying `p`/`q` to a constant lets synthesis
  remove the q_i = 0 cells again.
* **Digit-serial scope.** This multiplier is usually motivated by trinomials.
  The reduction section here is general and handles any Q of degree m.
* **Enable.** `en` only stalls the operation. Nothing counts down.
* **Register count.** At m = 8 the bit-serial multiplier uses 30 flip-flops:
  8 MRU, 8 FFA, 8 PISO, a 4-bit counter, a state bit and a done bit. This RTL
  makes no claim about the smaller register counts sometimes quoted for this
  architecture. Those counts depend on how B is supplied and how the control is
  built.

## Sizes that have been simulated

* **GF(2^8)** with x^8 + x^4 + x^3 + x + 1, the default size. Known answer:
  0x83 · 0x57 = 0xC1.
* **GF(2^233)** with z^233 + z^73 + 1 and **GF(2^409)** with z^409 + z^87 + 1.
  These are the two NIST binary fields that trinomials generate. Both
  multipliers were run at these sizes with w = 8, which gives 30 and 52 digit
  steps. Set `M` (and `W`) to use them; the default build is GF(2^8).

## Testbenches (`tb/`)

Every testbench checks itself and ends by printing `TB_RESULT checks=N failures=F`.

The reference model is `tb_gf_ref_pkg`. It forms the full carry-less product
and reduces it by long division with Q, so it shares no algorithm with the RTL.

| testbench | what it covers |
|---|---|
| `tb_gf_mult_top` | both multipliers at default size, with the known answer, 400 random products and latency checks. It counts stalls, restarts, back-to-back operations and result hold, and each of these must occur |
| `tb_gf_bsp_mult`, `tb_gf_dsp_mult` | each multiplier alone, with random `en` stalls. `tb_gf_dsp_mult` also runs m = 13, w = 4, so each product takes four digits |
| `tb_gf_exhaustive_aes` | all 65,536 GF(2^8) products on both multipliers, checked against log/antilog tables built from the generator 0x03 (L(0x57) = 0x62, L(0x83) = 0x50, E(0xB2) = 0xC1) |
| `tb_gf_nist_fields` | m = 233 and m = 409 trinomial fields for both multipliers (about 35 s to build, well under 1 s to run) |
| `tb_gf_mru`, `tb_gf_ffa`, `tb_gf_piso`, `tb_gf_counter`, `tb_gf_input_reg`, `tb_gf_pgcmr`, `tb_gf_reduction_section`, `tb_gf_xor_tree`, `tb_gf_and_unit` | unit tests |

`tb_gf_mult_driver` is a parameterised helper that the multi-size tests use.

To run one testbench with Verilator:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/gf_pkg.sv tb/tb_gf_ref_pkg.sv tb/tb_gf_mult_top.sv --top-module tb_gf_mult_top
    ./obj_dir/Vtb_gf_mult_top

The simulation is two-state. Everything the design reads is reset, so the
results do not depend on the initial state.
