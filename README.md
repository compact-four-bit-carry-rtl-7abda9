# Four-bit carry look-ahead adder in multi-output DCVS logic

This is a logic-level SystemVerilog model of a dual-rail, precharged
carry look-ahead (CLA) adder. Its central piece is one dynamic gate that
produces all four carries of a four-bit slice in both polarities,
C1..C4 and C1bar..C4bar. In the underlying circuit, the two
complementary NMOS trees share transistors, so the slice needs fewer
devices and input wires than a conventional differential cascode
voltage switch (DCVS) design. Slices are chained into a 32-bit adder.

The RTL describes what every dynamic node computes in each clock phase.
It does not describe transistors. Delay, area and power are properties
of the transistor circuit and are not modelled here.

## Why the carry complement needs a new form

A CLA carry is `C_i = G_i + P_i C_{i-1}`, where:

- the generate term is `G_i = A_i B_i`;
- the propagate term is `P_i = A_i xor B_i`.

Expanded over four bits, the expression is recursive, and a single
multi-output domino gate can deliver every `C_i` from taps on one shared
series chain.

DCVS logic needs the complement carry as well, from a second tree in the
same gate. Inverting the carry expression directly gives an OR-of-AND
form that does not share the chain. This design rewrites it with the
kill signal `N_i = Abar_i Bbar_i`:

    Cbar_i = N_i + P_i Cbar_{i-1}

This has the same shape as the true carry: `N_i` replaces `G_i`, and
`Cbar_{i-1}` replaces `C_{i-1}`. Both trees can therefore use the same
`P4-P3-P2-P1` series chain. At the bottom of the chain sits `C0` in one
tree and `C0bar` in the other. Pull-downs hang off the chain nodes:
`G1..G4` in the true tree and `N1..N4` in the complement tree. The node
above `P_i` is the dynamic node of carry `i`.

In each tree the two terms are mutually exclusive:

- `G_i P_i = 0`;
- `N_i P_i = 0`.

Because of this, discharging a higher node never falsely discharges a
lower one. Only `G`, `N`, `P` and the carry-in pair enter the gate,
which is 14 input lines. A conventional design would need both rails of
`P` and `G`.

## Dual-rail signals and the clock

Every logical value travels as a pair (true rail, complement rail):
operands, carries and sums alike. All gates share one clock `clk`:

| `clk` | phase     | rails                                             |
|-------|-----------|---------------------------------------------------|
| 0     | precharge | every dynamic node is high, so both output rails are 0 |
| 1     | evaluate  | exactly one rail of each pair rises once its inputs are valid |

The whole adder is one domino cascade, and a result appears in the same
evaluate phase as its operands. There are no flip-flops. Input rails
must be 0 during precharge and may only rise during evaluate (the domino
rule). Assertions in `modcvs_cla_adder4` and `modcvs_cla_adder32` check
that no carry or sum pair ever has both rails high.

## The gates

**`pg_gate`**, one per bit, derives four signals from `(A_i, Abar_i)`
and `(B_i, Bbar_i)`. It has three precharged nodes on one clocked foot
transistor:

| node | discharges when | output after the inverter |
|------|-----------------|---------------------------|
| 1 | series `A_i B_i` conducts | `G_i` |
| 2 | series `Abar_i Bbar_i` conducts | `N_i` |
| 3 | cross-coupled `A/Abar`, `B/Bbar` branches conduct (bits differ) | `P_i` |

`Pbar_i` is the NAND of the `G` and `N` nodes, which equals `G_i + N_i`.
No separate tree is needed for it. `Pbar_i` is used only by the sum gate.

**`modcvs_cla_gate`** is the four-output look-ahead gate described
above. Its outputs are `c[3:0] = C4..C1` and `c_n[3:0] = C4bar..C1bar`.

**`carry_bypass`** is the reduced carry propagation circuit inside the
look-ahead gate. It is a four-input dynamic AND of `P4..P1`. Its output
turns on two bypass transistors, which join the carry-in transistor
directly to the `C4` and `C4bar` nodes. When a slice only propagates,
its carry-in therefore reaches its carry-out without passing through the
four series propagate transistors. Logically the bypass is redundant,
because the chain conducts in the same cases. Its value is electrical
(a shorter discharge path through chained slices). The model still
builds it as a separate path so that it can be observed. Its enable
comes out of the slice as `byp`.

**`dcvs_sum_xor`** forms `S_i = C_{i-1} xor P_i` and its complement from
the dual-rail carry and propagate signals. It uses two cross-coupled
trees under one clocked foot.

**`modcvs_cla_adder4`** wires four PG gates, one look-ahead gate and four
sum gates into one slice. The sum gate of bit `i` sees `C_{i-1}`: this is
the carry-in for bit 0 and a carry from the look-ahead gate otherwise.

**`modcvs_cla_adder32`** is the top module. It chains `NSLICES` slices
(default 8, which gives 32 bits). The dual-rail carry-out of each slice
drives the carry-in of the next. There is no second look-ahead level.
A carry that crosses the whole adder passes through each slice's bypass.

`modcvs_pkg` holds the slice width (4), the default slice count (8) and
`rails_exclusive()`, which the assertions use.

## Interface of the top

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 0 = precharge, 1 = evaluate |
| `a`, `a_n` | in | 32 | operand A, true and complement rails |
| `b`, `b_n` | in | 32 | operand B, true and complement rails |
| `ci`, `ci_n` | in | 1 | carry-in pair |
| `s`, `s_n` | out | 32 | sum pair |
| `co`, `co_n` | out | 1 | carry-out pair |
| `byp` | out | `NSLICES` | bypass enable of each slice |

Bit 0 of every vector is the least significant bit, called bit 1 in the
usual CLA numbering (`A_1`, `C_1`). Within one slice, `c[k]` is
`C_{k+1}`.

## Where the model departs from the circuit, and the choices it makes

- **Kill signal.** The kill signal is taken to be the product
  `Abar_i Bbar_i`. This is the only reading under which
  `Cbar_i = N_i + P_i Cbar_{i-1}` holds and `N_i P_i = 0`.
- **Dynamic nodes.** Each node is modelled as its logic function ANDed
  with `clk`. Because the inputs obey the domino rule, this equals the
  charge the node would hold. The following are electrical and are
  absent:
  - charge sharing;
  - keepers (an optional PMOS feedback device per output);
  - the anti-charge-sharing PMOS device in the bypass AND;
  - transistor sizing.
- **Bypass connection.** The bypass transistors are taken to connect
  the carry-in transistor to the `C4`/`C4bar` nodes.
- **Ports.** Using flat vectors for the dual rails, and bringing out
  `byp`, are choices of this model.
- **32-bit adder.** It is a plain series chain of slices. Only the fact
  that four-bit slices are connected in series is given. A faster
  group-level look-ahead is not part of this design.

Published circuit-simulation results for this adder, in a 1.0 µm CMOS
process at 5 V, compare it with a conventional DCVS adder. The
four-bit slice has:

- 176 transistors instead of 209;
- about 27% less area;
- a worst-case carry of 2.58 ns instead of 2.91 ns;
- about 29% lower average power at 1 MHz.

The 32-bit adder has a worst-case carry of 15.43 ns instead of 18.87 ns.
None of these figures can be checked against this RTL.

## Simulating

Every file has one module or package, named after it. Read the package
first, and let verilator find the modules in `rtl/`. To run the
end-to-end test of the 32-bit top:

    verilator --binary --timing --assert -y rtl +libext+.sv \
      rtl/modcvs_pkg.sv tb/modcvs_cla_adder32_tb.sv \
      --top-module modcvs_cla_adder32_tb -o sim
    ./obj_dir/sim

To test a block, use its testbench `tb/<module>_tb.sv` as the top
instead. Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. One operation is one `clk` period of
10 time units: precharge, then evaluate. Results are compared 4 units
into the evaluate phase.

What the testbenches cover:

- `pg_gate_tb`, `carry_bypass_tb` and `dcvs_sum_xor_tb`: every input
  combination, in both phases.
- `modcvs_cla_gate_tb` and `modcvs_cla_adder4_tb`: all 512 combinations
  of two four-bit operands and a carry-in. These include the worst-case
  carry operands A = F, B = 0 with carry-in 0 and 1.
- `modcvs_cla_adder32_tb`: runs the top at its default 32 bits. The
  vectors are:
  - the worst-case operands A = FFFFFFFF, B = 0 with carry-in 0 and 1;
  - all-generate and all-kill patterns;
  - a generate under a propagating run at every bit;
  - carries fed into each slice;
  - 4000 random operand pairs.

  The testbench also counts, and requires, a bypass in every slice, a
  carry into every slice, and a carry through all 32 bits.

To change the width, set `NSLICES` on `modcvs_cla_adder32`. The slice
itself is fixed at four bits, because one look-ahead gate spans exactly
four stages.
