# Dual-rail NCL multiply-accumulate unit with reduced indeterminate standby states

An asynchronous circuit in NULL Convention Logic (NCL) does no switching while
it waits. In a pipeline without feedback, every wire then has a known value:
all data is NULL and every request asks for DATA. A leakage-reduction scheme
can use that. It picks high-threshold transistors only where a transistor is
off in that known standby state, and leaves the fast low-threshold transistors
everywhere else.

A multiply-accumulate (MAC) unit breaks this assumption. Its feedback loop
holds the accumulator during standby, so the loop's registers, its adders and
their completion logic idle at values that depend on the data. This design is
an unsigned 32 + 16×16 NCL MAC whose loop shrinks that data-dependent region.
An inverter (U0) and an asymmetric TH22 gate (U1) stop register REG0 from
taking the accumulator until a new product has arrived. During standby the
accumulator therefore stays in REG2. REG0, REG1, both carry-save adders and
the completion gate COMP0 then settle to fixed values.

The RTL describes the logic: the gates, registers, handshakes and datapath.
The other half of the technique cannot be written as RTL. That half is the
choice of high- or low-threshold transistors inside each gate, made for every
standby state the gate can have.

## NCL in brief

* **Dual rail.** Each bit is two wires, `r1` and `r0` (`ncl_pkg::dr_t`).
  DATA1 is `r1=1, r0=0`, DATA0 is `r1=0, r0=1`, NULL is both 0, and both 1 is
  illegal. A word is a packed array of `dr_t`.
* **Threshold gates with hysteresis.** A THmn gate raises its output once at
  least m of its n inputs are 1. It lowers the output only when all inputs are
  0, and holds it in between. `ncl_gate` is the shared set/reset/hold core.
  `ncl_thmn` adds the threshold, an optional weight on input 0 (for TH34w2),
  an optional inverted output and a reset value.
* **Registers and handshakes.** One bit of `ncl_reg` is two TH22 gates (data
  rail and request `Ki`) plus an inverted TH12 that gives the bit's
  acknowledge `Ko`. `Ko` is 1 while the bit is NULL.
  * `Ki = 1` (request for DATA): the register passes DATA.
  * `Ki = 0` (request for NULL): it passes NULL.
  * `ncl_comp`, the completion logic, combines a register's `Ko` bits into
    the `Ki` of the register before it. It is a tree of C-elements.
  * DATA and NULL wavefronts alternate, so two DATA words never merge.
* **Four-phase interface.** The MAC takes operands when `ko = 1` and NULL
  when `ko = 0`. It shows each result as DATA, then NULL, under the
  consumer's `ki`.

## Architecture

```
 X,Y ──► ncl_pp_tree ──PP1,PP2──► ncl_mac_loop ──A1,A2──► ncl_rca_pipe ──► A
         7 registers              4-register ring          15 registers
         (last one is REG3)       + REG4 buffer
```

1. **`ncl_pp_tree`** generates the partial products and sums them in a
   Wallace tree.
   * Row i of the product array is `X AND y[i]`, shifted left by i, 32 bits
     wide. Its empty positions are dual-rail zeros that follow the NULL/DATA
     phases of `y[i]`.
   * Word-level 3:2 carry-save levels reduce the rows: 16 → 11 → 8 → 6 → 4 →
     3 → 2.
   * The pipeline has an input register plus one register per level, 7 in
     all. The partial-product gates share the first pipeline section with the
     first level.
   * The last register, REG3, holds the product in carry-save form:
     PP1 + PP2 = X·Y.
2. **`ncl_mac_loop`** is the accumulator loop, described in the next section.
3. **`ncl_rca_pipe`** turns the carry-save accumulator into a binary number
   with a ripple-carry adder.
   * A2 is a shifted carry word, so its bit 0 is always 0.
   * Bit 0 needs only a half adder. Bits 1–30 form a 30-bit ripple-carry
     chain. Bit 31 keeps its sum and drops its carry.
   * The chain is cut into 15 pipeline stages of two bits each. Stage 1 also
     handles bit 0 and stage 15 also handles bit 31.
   * Each stage register carries three things: the result bits finished so
     far, the carry into the next bit, and the operand bits not yet added.

The function is `A(n) = A(n-1) + X(n)·Y(n) mod 2^32`, with `A(0) = 0` because
REG2 resets to DATA0.

## The accumulator loop and its standby state

```
        ┌───────────────────────── A1,A2 (new accumulator) ◄──────────────┐
        ▼                                                                 │
      REG2 ──► REG0 ──► COMB1 ──► REG1 ──► COMB2 ──► REGA ────────────────┤
   (reset to   ▲        CSA        │        CSA       ▲                   └──► adder
    DATA0)     │  PP1 ──►┘  PP2 ───┘                  │
               │  (from REG4)                         │
        U1 = asym TH22(A = COMP0, B+ = NOT REG3.Ko)   TH22(REG2 done, adder Ki)
```

* The loop is a ring of four full-word registers: REG2, REG0, REG1 and REGA,
  the loop output register. One DATA token, the accumulator, travels around
  it.
* COMB1 adds A1 + A2 + PP1 into two words. PP2 passes beside COMB1 into
  REG1, so REG1 holds three words.
* COMB2 adds those three words into the new A1, A2.
* REG4 buffers the product coming from REG3.
* The requests, each produced by completion logic:
  * COMP0 (completion of REG1) drives REG4's `Ki` and input A of U1.
  * The completion of REG0 drives REG2's `Ki`.
  * The completion of REGA drives REG1's `Ki`.
  * A TH22 gate of REG2's completion and the adder's request drives REGA's
    `Ki`.
  * The completion of REG4 drives REG3's `Ki`.

**The added gating.** Without it, REG0's `Ki` would simply be COMP0. With it,
REG0's `Ki` is the output of U1:

* U1 rises when COMP0 = 1 **and** REG3's completed `Ko` = 0, which means a
  product is waiting as DATA. The `Ko` reaches U1 through inverter U0.
* U1 falls as soon as COMP0 falls, whatever the product is doing.

In normal operation a product is always DATA by the time COMP0 rises, so the
loop behaves exactly as before. Once the pipeline has drained to NULL, REG0
never asks for the accumulator, and the accumulator stays parked in REG2.
Every other part of the loop then sits at a value known at design time:

| signal group | standby value |
|---|---|
| REG0, REG1, COMB1, COMB2, REGA outputs | NULL |
| COMP0 | 1 |
| REG0 `Ki` (U1) | 0 |
| REG2 contents | the accumulator (depends on the data) |
| REG2 `Ki` | 1 |

Only REG2, plus REG0's data inputs, still depends on the data. For the
transistor-level half of the technique this leaves four kinds of gate that
must tolerate two standby states:

* REG2's TH22 gates resettable to 0;
* REG2's TH22 gates resettable to 1 (the DATA0 reset);
* REG2's inverted TH12 `Ko` gates;
* REG0's TH22 gates, whose data input may be 0 or 1.

**One operation, step by step.**

1. The product arrives in REG3 and REG3's `Ko` falls, so U1 rises.
2. REG0 takes the accumulator from REG2, and REG4 takes the product.
3. REG0's completion falls, REG2's `Ki` falls, and REG2 takes NULL from REGA.
4. That NULL lets the TH22 gate raise REGA's `Ki`.
5. COMB1 and COMB2 compute. REG1 and then REGA latch the new value.
6. REG2 copies the new value from REGA once REG0 has returned to NULL.
7. REGA returns to NULL after the adder has taken its DATA.

## Simulation model and timing

NCL is self-timed and has no clock. To simulate and synthesise it without
combinational loops, every gate here is a state-holding element updated on
the rising edge of an **evaluation clock `eclk`**. Each gate therefore has
exactly one `eclk` period of delay. `eclk` is a modelling device, not part of
the circuit. The circuit is quasi-delay-insensitive, so any assignment of gate
delays, this unit delay included, gives the same results.

The testbenches add random waits on both sides of every handshake. Latencies
follow from the gate depth. For example, a carry-save adder settles two
periods after its inputs, which `tb_ncl_csa` checks. At the full size one
operation takes about 60–70 periods in a loaded pipeline. This says nothing
about real delay: 6.2 ns DATA-to-DATA time was reported for the transistor
implementation in a 130 nm process, and RTL cannot check that figure.

`rst` is asynchronous and active high. Every gate gets it, not only the
register gates, so that a two-state simulator starts from the standby state.
Register gates reset to NULL, except REG2's, which reset to DATA0.
Completion gates reset to 1, except REG2's completion, which resets to 0.

## Where this design chooses and where it departs

* **Register widths.**
  * The reference design's loop registers are 62 bits (REG0, REG2, REGA),
    93 bits (REG1) and 55 bits (REG3, REG4), which suggests 31-bit words and
    a trimmed product.
  * This design keeps whole 32-bit words instead: 64, 96 and 64 dual-rail
    bits. The arithmetic is the same modulo 2^32.
  * The partial-product tree also carries whole 32-bit rows, including rows'
    constant positions.
* **Wallace tree.** It is word-level and uses only full adders; leftover rows
  pass through unchanged. The way the first pipeline section combines
  partial-product generation with the first level is this design's choice.
  The reference only fixes the 7-stage count.
* **Adders.** The carry-save adders use the standard two-level NCL full adder
  (TH23 carry, TH34w2 sum), which matches the "2 gate delay" stated for them.
  The half adder, the AND gate and the zero generator are this design's own
  input-complete gates.
* **Completion logic** is a tree of C-elements with up to four inputs each.
* **REGA's request gate starts at 0.** A published standby drawing marks
  that gate's output as 1. With a 1, however, a new accumulator can reach
  REGA before REG2 has emptied, and the old and new values merge. This was
  observed in simulation at the full size. Starting at 0 follows the
  handshake. After the first operation the gate settles at 0 on its own.
* **REG0's request in standby is 0**, as the drawing marks. One description
  gives it as 1, but that is impossible while a TH22 gate's data input is 1
  and its output is 0.
* **Not modelled:** the choice of threshold voltage per transistor, and all
  power, energy and area figures.

## Files

| file | content |
|---|---|
| `rtl/ncl_pkg.sv` | dual-rail type, helpers, Wallace row-count functions |
| `rtl/ncl_gate.sv`, `ncl_thmn.sv`, `ncl_th22_asym.sv` | threshold-gate core, THmn gates, U1 |
| `rtl/ncl_and.sv`, `ncl_zero.sv`, `ncl_ha.sv`, `ncl_fa.sv` | dual-rail AND, DATA0 generator, half and full adders |
| `rtl/ncl_reg.sv`, `ncl_comp.sv` | DI register, completion tree |
| `rtl/ncl_csa.sv`, `ncl_csa_level.sv` | carry-save adder, one Wallace level |
| `rtl/ncl_pp_tree.sv`, `ncl_mac_loop.sv`, `ncl_rca_pipe.sv` | the three parts |
| `rtl/ncl_mac.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module listed above, and `tb_ncl_mac` for the whole MAC |

Parameters: `ncl_mac #(N = 16, W = 2N)`. Each part takes its own width:
`ncl_pp_tree #(N)`, `ncl_mac_loop #(W)`, `ncl_rca_pipe #(W)` with W even.
The number of adder stages is (W−2)/2 and the number of tree levels follows
from N.

## Simulating

The package must be read first; everything else is found by module name:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/ncl_pkg.sv tb/tb_ncl_mac.sv --top-module tb_ncl_mac -j 8
obj_dir/Vtb_ncl_mac
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>` and has
a watchdog. The full-size build of `tb_ncl_mac` takes several minutes because
the model has about 9,000 state-holding gates; it simulates in under a
second. `tb_ncl_mac` runs the default 16×16 / 32-bit MAC.

* It runs 60 operations with random operands and random handshake delays,
  including the all-ones product.
* It compares every result with a reference accumulator.
* It checks the standby state after reset and after every idle period
  (REG0, REG1 and COMB outputs NULL, COMP0 = 1, U1 = 0, REG2 holding the
  accumulator).
* It requires that U1 held REG0 back and that operations overlapped in the
  pipeline.

The block testbenches use smaller widths (8-bit operands for the tree, 8-bit
words for the loop, 12 bits for the adder) so they build quickly.
