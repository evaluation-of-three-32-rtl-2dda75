# Self-timed 32-bit adders in dual-rail DCVS logic

A self-timed adder does not wait for a clock edge sized for its worst case:
it tells its environment when the sum is ready. This design holds three such
adders — ripple-carry (RC), carry look-ahead (CLA) and binary carry
look-ahead (BCL) — built in dynamic differential cascode voltage switch
(DCVS) logic. They sit side by side on an evaluation chip with scan chains
for operands and results.

The central idea is a third carry signal. Besides generate `G = A·B` and
propagate `P = A xor B`, every bit forms a complement-generate, or kill,
signal `N = Ā·B̄`. With it, the complement carry has the same shape as the
true carry:

    C(i)  = G(i) + P(i)·C(i-1)
    C̄(i)  = N(i) + P(i)·C̄(i-1)

Exactly one of `G`, `N` and `P` is high for every operand pair. So both
halves of a differential gate can share one propagate transistor chain, and
every carry network written for the true carry can be mirrored for the
complement carry. The prefix ("o") operator of a Brent–Kung style adder
extends in the same way:

    (g, n, p) o (ĝ, n̂, p̂) = (g + p·ĝ,  n + p·n̂,  p·p̂)

## Signals, precharge and completion

Every data signal is a complementary pair, the type `dcvs_pkg::dr_t`, with
`t` for the true rail and `f` for the complement rail:

| `{t,f}` | meaning |
|---|---|
| `00` | not yet evaluated (the precharged "spacer") |
| `10` | logic 1 |
| `01` | logic 0 |
| `11` | illegal; assertions in `dcvs_xor` and `bcl_adder` report it |

Each adder has one control input `r`, which is the R line of the DCVS gates:

1. With `r` low the adder precharges. Every output rail, every per-bit
   completion `comp[i]` and the global completion `gco` are low.
2. The operands must be valid before `r` rises. When `r` is high, each gate
   raises one output rail as soon as its inputs decide the result. Carries
   spread through the adder, and `comp[i]` rises when sum bit `i` has
   evaluated.
3. `gco` rises once all sum bits and the carry-out have evaluated. The
   environment reads the sum, then lowers `r`.
4. `gco` falls when the adder has precharged, and the next operation may
   start.

The adders are combinational apart from the latch of the final C-element, so
this four-phase cycle is the only protocol. The gates are monotonic: a rail
only rises during evaluation. As a result, a bit whose incoming carry is
decided by a generate (`11`) or kill (`00`) below it completes without waiting
for the carry-in. Only runs of propagating bits wait. The testbenches check
this directly. They hold the carry-in in the spacer state and check which sum
bits complete and which do not, and that `gco` stays low.

Bit `i` of every vector is bit `i+1` in the usual 1-based numbering of adder
equations. `cin` is C0 and `cout` is C(WIDTH).

## The gates

| module | function |
|---|---|
| `dcvs_xor` | dual-rail XOR with completion output (`comp` = OR of the output rails, the NAND of the two precharged nodes). The adders use it as the input gate that forms (P, P̄) and as the output gate `S(i) = C(i-1) xor P(i)` with `Comp(i)`. |
| `dcvs_gp` | forms G, N, P and P̄ = G + N in one shared structure |
| `dcvs_cb` | carry block `C = G + P·Cin`, `C̄ = N + P·C̄in` |
| `dcvs_cb_ab` | carry block that takes generate and kill straight from the operand rails: `C = A·B + P·Cin`, `C̄ = Ā·B̄ + P·C̄in` |
| `dcvs_cla4` | 4-bit multi-output carry look-ahead gate with bypass (below) |

Every gate output is ANDed with `r`. That is the logical effect of the
evaluate transistor at the foot of each DCVS tree.

## Ripple-carry adder (`rc_adder`)

Each slice is an input XOR gate, a `dcvs_cb_ab` carry block and an output XOR
gate. This is the compact slice, chosen with `COMPACT = 1` (the default). The
carry ripples through the carry blocks. With `COMPACT = 0`, each slice instead
has a `dcvs_gp` block feeding a `dcvs_cb`. Both forms give the same logic. The
compact one saves transistors and, in silicon, the delay of the GP block when
a bit generates or kills.

## Carry look-ahead adder (`cla_adder`)

Each bit has a `dcvs_gp` block and an output XOR. Every group of four bits has
a `dcvs_cla4` gate, which gives all four carries of the group from one shared
propagate chain. Eight groups in series make 32 bits. `dcvs_cla4` adds a
bypass: a dynamic AND of the four propagate signals closes pass transistors
that join the group's carry-in straight to its carry-out. In logic this is
the redundant term `P4·P3·P2·P1·C0`, kept as a term of its own. The adder
brings out `all_p`, one flag per group, which is high while that group's
bypass is active.

## Binary carry look-ahead adder (`bcl_adder`)

This adder is the hardest part to follow. It is a parallel-prefix carry
network with one row per bit. All processors in a row pull the same two
dynamic lines, the row's G line and N line. The first processor to decide
the row's carry sets the carry directly, without the result passing through
the rest of the row.

Row `i` (1..WIDTH) holds these processors, from left to right:

* **P processor** (`bcl_p_proc`). It pulls the G line if the operand bits are
  `11` and the N line if they are `00`. Its propagate output is P(i), from the
  input XOR gate.
* **m = floor(log2 i) A or B processors** (`bcl_ab_proc`). The processor in
  column `j` combines the row's group (bits `i … i-2^(j-1)+1`) with the group
  of the same width in row `i-2^(j-1)`. It pulls the G line on `p_in·ĝ` and
  the N line on `p_in·n̂`, and passes on `p_out = p_in·p̂`. Each column doubles
  the span of the group.
  * An **A** processor also exports the row lines and its `p_out` to a
    higher row.
  * A **B** processor's result is used only inside its own row.
  * A processor is an A exactly when row `i + 2^j` exists.
* **C processor** (`bcl_c_proc`). Once the row's group `i … i-2^m+1`
  propagates, it copies the carry C(i-2^m) of a lower row into the row. For
  rows `i = 2^m` that carry is C0. The row lines then drive C(i) and C̄(i).

For 8 bits this gives the following rows (rows 1 to 8):

    1: P C        5: P A B C
    2: P A C      6: P A B C
    3: P A C      7: P B B C
    4: P A A C    8: P B B B C

The longest row has log2(WIDTH) + 2 processors.

Sharing the lines is sound. A group that generates forces C(i) = 1 whatever
lies below it, and a group that kills forces C(i) = 0. G and N can never both
be true, so no two processors of a row can pull opposite lines; `bcl_adder`
asserts this. The lines settle to the row's carry as soon as any processor
decides it. For the same reason, an A processor may export the row's lines
rather than only its own contribution. Each row and column is a generate
scope of its own, and rows read each other by hierarchical name, which keeps
the netlist free of false combinational loops. The input XORs, the network
and the output XORs (`S(i) = C(i-1) xor P(i)`) form the three stages.

## Global completion (`completion_tree`)

Each adder has one completion circuit. It combines the 32 bit completions and
the carry-out:

* **Binary tree over `comp[31:0]`.** The tree has five levels of two-input
  cells that alternate N, P, N, P, N. An N cell is high when precharged and
  falls when both inputs are high (a NAND). A P cell is low when precharged
  and rises when both inputs are low (a NOR). The last N cell goes low when
  every `comp[i]` is high.
* **NOR of the two carry-out rails.** Its output goes low when the carry-out
  has evaluated.
* **Two-input Muller C-element with inverted output.** It is written as an
  `always_latch`. `gco` rises when both inputs report completion, falls when
  both report precharge, and holds otherwise.

A full 33-input C-element would be as slow as the adder itself. The tree is
therefore a plain NAND/NOR tree, and it reports precharge as soon as any
`comp[i]` falls. This relies on all sum gates precharging in about the same
time, which holds because they are identical gates on the same `r`. For
widths whose tree has an even number of levels, such as 16 or 64, an inverter
restores the active-low tree output.

## The evaluation chip (`adder_chip`, the top)

The chip has few pads, so the operands enter serially:

* `scan_in` is a 65-bit shift register holding A in bits 31:0, B in bits
  63:32 and C0 in bit 64. It shifts on `clk` while `si_shift` is high, and
  the first bit sent ends in bit 0. Its bits become complementary pairs for
  all three adders.
* Each adder has its own control (`r_rc`, `r_cla`, `r_bcl`) and completion
  output (`gco_rc`, `gco_cla`, `gco_bcl`).
* Two `scan_out` registers capture the true rails of the results on
  `so_load`:
  * `{CLA cout, CLA sum, RC cout, RC sum}`, with the RC sum in the low bits,
    read on `so_data_rc_cla`;
  * `{BCL cout, BCL sum}`, read on `so_data_bcl`.
* Both registers shift towards bit 0 on `so_shift`, and `so_load` takes
  precedence over `so_shift`.
* `cla_bypass` brings the CLA group bypass flags out for observation.

One operation takes these steps:

1. Shift the 65 operand bits in.
2. Raise the `r` inputs and wait for the `gco` outputs.
3. Pulse `so_load` for one clock.
4. Lower the `r` inputs and wait for the `gco` outputs to fall.
5. Shift out 66 and 33 bits.

The adders never see `clk`.

## What this RTL does not capture

* **Time.** The logic has zero delay. It reproduces which signals wait for
  which, but not how long they take. Addition time against carry propagation
  length, precharge time, buffer delays, area and power cannot be read from
  it. The data-dependent completion itself, and everything that is logic, is
  modelled.
* **Transistor-level details.** Charge keepers, the weak transistors on the
  BCL row lines and charge sharing have no logic function and are not
  modelled. The same holds for the buffers that distribute R across each
  adder, for the "white" processors that carry C0 through the BCL network,
  and for the pads. These are wires here.
* **Choices of this design.** The scan chains appear only as named blocks in
  the design description. Their length, bit order, clocking and load/shift
  controls, and the separate `r` pin per adder, are choices of this design.
  So is the general rule used to extend the 8-bit BCL arrangement to 32 bits
  (above), which reproduces the 8-bit arrangement exactly.
* **Cell polarity.** The polarities inside the completion circuit are read
  from the cell descriptions. The description calls the tree output and the
  carry completion "high" on completion, while the gate symbols make both
  active low. `gco` is the same either way.
* **Not built.** The conventional BCL "black" processor and the
  many-input C-element are only reference points for comparison. They are not
  part of this design.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `adder_chip` | `WIDTH` | 32 | must be a power of two and a multiple of 4 |
| `rc_adder`, `cla_adder`, `bcl_adder` | `WIDTH` | 32 | power of two, at least 2, because of the completion tree |
| `rc_adder` | `COMPACT` | 1 | 1: XOR + `dcvs_cb_ab` slice; 0: `dcvs_gp` + `dcvs_cb` slice |
| `cla_adder` | `GROUP` | 4 | group size of `dcvs_cla4`; WIDTH must be a multiple of it |
| `completion_tree` | `WIDTH` | 32 | power of two |
| `scan_in` / `scan_out` | `N` | 65 / 66 | chain length |

## Simulation

All files are SystemVerilog 2017. The package must be compiled first. For
example, for the chip-level test:

    verilator --binary --timing --assert rtl/dcvs_pkg.sv \
        $(ls rtl/*.sv | grep -v dcvs_pkg) tb/tb_adder_chip.sv \
        --top-module tb_adder_chip -o sim
    ./obj_dir/sim

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_adder_chip` | The whole chip at 32 bits, pins only. It runs one addition for each carry propagate length 0..32, then random operands, through both scan chains. It checks all three adders, the evaluate/precharge handshake on each `gco`, the separate `r` controls and the CLA bypass, and counts each of these mechanisms. |
| `tb_rc_adder`, `tb_cla_adder`, `tb_bcl_adder` | One adder at 32 bits. Directed and 3000 random additions. Precharged state, both rails, `comp`, `gco`. Early completion with the carry-in held back. For the CLA, the group bypass flags. |
| `tb_adder_widths` (with `width_checker`) | All adders, including the `COMPACT = 0` ripple-carry form, at 8, 16, 32 and 64 bits |
| `tb_completion_tree` | Random completion orders, release of `gco` only by the last completion, and the C-element hold during precharge |
| `tb_dcvs_*`, `tb_bcl_*_proc` | Exhaustive checks of each gate and processor over all legal dual-rail input states |
| `tb_scan_in`, `tb_scan_out` | Serial load, parallel capture, hold, and load-over-shift priority |

All testbenches run in well under a second.
