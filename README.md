# Clock-gated 16-bit ALU with a BEC carry select adder

A general-purpose ALU spends much of its power on switching that does no useful
work: every functional unit and every result register sees every clock edge and
every operand change, although only one operation is wanted per cycle. This
design attacks that on two fronts:

* **Latch-free clock gating.** Each of the sixteen operations has its own result
  register. Only the register of the selected operation gets a clock edge. The
  other fifteen are fed a clock that stays low. The gate is a plain AND of clock
  and enable, with no latch.
* **A cheaper fast adder.** The arithmetic unit is built on a 16-bit
  square-root carry select adder (CSLA). In it, the usual second ripple carry
  adder per group (the one that assumes a carry in of 1) is replaced by a
  Binary to Excess-1 Converter (BEC). A BEC adds one to the first adder's result
  with a short AND/XOR chain. This trades a little delay for fewer gates and
  less switching.

On top of that, the operands of the idle unit (arithmetic or logic) are forced
to zero, so its inputs stop toggling while the other unit works.

Everything is plain synthesizable SystemVerilog. The adder is fixed at 16 bits.
The ALU has sixteen operations selected by a 4-bit code.

## The carry select adder (`csla_bec16`)

A ripple carry adder (RCA) is slow because bit *i* waits for the carry from
bit *i-1*. A carry select adder splits the word into groups. Each group
computes its result for both possible carries in at the same time. When the
real carry arrives from the group below, a multiplexer only has to choose. In
the square-root form, groups grow towards the MSB. A higher group has more time
to compute, because its carry arrives later.

The 16-bit layout:

| bits    | RCA (carry in 0) | BEC   | multiplexer          | selected by            |
|---------|------------------|-------|----------------------|------------------------|
| [1:0]   | 2-bit, carry in = `cin` | none | none          | none                   |
| [3:2]   | 2-bit            | 3-bit | 6:3 (2 × 3 → 3)      | carry out of [1:0]     |
| [6:4]   | 3-bit            | 4-bit | 8:4                  | carry out of [3:2]     |
| [10:7]  | 4-bit            | 5-bit | 10:5                 | carry out of [6:4]     |
| [15:11] | 5-bit            | 6-bit | 12:6                 | carry out of [10:7]    |

In every upper group, the W-bit RCA runs with carry in 0 and gives a (W+1)-bit
value `{c0, s0}`. The result for carry in 1 is just that value plus one. This is
what the (W+1)-bit BEC produces:

```
y[0] = ~x[0]
y[i] =  x[i] ^ (x[0] & x[1] & ... & x[i-1])
```

The group's multiplexer then passes `{c0, s0}` or `BEC({c0, s0})` on. The top
bit of the choice is the carry into the next group, and the last one is `cout`.
The BEC never overflows, because an RCA result is at most 2^(W+1) - 2.

Compared with a CSLA that has two RCAs per group, the BEC version swaps W full
adders for W+1 XORs and W ANDs per group. The cost is one extra AND/XOR level
on the carry-in-1 path.

Modules: `full_adder` → `rca #(W)`; `bec #(W)`; `csla_mux #(W)`;
`csla_bec16` instantiates them, with a generate loop over the four upper groups.

## Operations (`arith_unit`, `logic_unit`)

`sel[3]` picks the unit and `sel[2:0]` the operation:

| sel | op    | result          | adder operands (x, y, cin) | cf                 |
|-----|-------|-----------------|----------------------------|--------------------|
| 0   | ADD   | A + B           | A, B, 0                    | carry out          |
| 1   | SUB   | A − B           | A, ~B, 1                   | 1 = no borrow      |
| 2   | RSB   | B − A           | B, ~A, 1                   | 1 = no borrow      |
| 3   | INCA  | A + 1           | A, 0, 1                    | carry out          |
| 4   | DECA  | A − 1           | A, 0xFFFF, 0               | 1 = no borrow      |
| 5   | INCB  | B + 1           | B, 0, 1                    | carry out          |
| 6   | DECB  | B − 1           | B, 0xFFFF, 0               | 1 = no borrow      |
| 7   | NEGA  | −A              | ~A, 0, 1                   | 1 only for A = 0   |
| 8   | AND   | A & B           | none                       | 0                  |
| 9   | OR    | A \| B          | none                       | 0                  |
| 10  | XOR   | A ^ B           | none                       | 0                  |
| 11  | NAND  | ~(A & B)        | none                       | 0                  |
| 12  | NOR   | ~(A \| B)       | none                       | 0                  |
| 13  | XNOR  | ~(A ^ B)        | none                       | 0                  |
| 14  | NOTA  | ~A              | none                       | 0                  |
| 15  | NOTB  | ~B              | none                       | 0                  |

All eight arithmetic operations share the one CSLA. Only its operands and carry
in change. The codes are collected in `alu_pkg` (`arith_op_e`, `logic_op_e`).
This operation set and its encoding are a choice of this implementation. The
architecture only fixes a 4-bit select over arithmetic and bitwise logic
operations. Change `arith_unit`, `logic_unit` and `alu_pkg` together to use a
different set.

## Clock gating and timing (`op_decoder`, `clock_gate`, `gated_reg`, `alu16_cg`)

An AND-gate clock gate has no latch to hold its enable. So the enable must not
change while the clock is high. If it did, the gated clock would get a runt
pulse, or an extra rising edge in the middle of the cycle. This design meets
that rule by construction. `op_decoder` registers the one-hot enables
(`en_q[15:0]`) and the operation code (`op_q`) on the **falling** edge. They are
then constant for the whole high phase that follows.

```
           ___     ___     ___     ___
  clk    _|   |___|   |___|   |___|   |___
          ^P0     ^P1     ^P2
  a,b,sel,en  <== op k ==><== op k+1 ==>     (change after a rising edge)
  en_q,op_q          <=== k ===><== k+1 ==>  (updated at the falling edge)
  gclk[k]         ___|   |__________        (only register k is clocked at P1)
  out, cf                 <== result k ==>   (valid just after P1)
```

* Drive `a`, `b`, `sel` and `en` after a rising edge. `sel`/`en` must be valid
  at the following falling edge. `a`/`b` must be valid at the next rising edge.
* At that rising edge, only `gclk[sel]` pulses, and register `sel` loads the
  result (with the carry, for arithmetic operations).
* `out`/`cf` are read from the register that last loaded. They change just
  after that rising edge: one operation per cycle, latency one cycle.
* With `en` low, no enable is set. No register in the ALU is clocked except
  the small output-select register, and `out`/`cf` hold.
* `reset` is asynchronous and active high. It clears all registers,
  including the enables, so no gated clock runs during reset. `out` and `cf`
  read 0 until the first operation completes.

Operand isolation: `alu16_cg` passes `a`/`b` to the arithmetic unit only when an
arithmetic operation is decoded, and to the logic unit only for a logic
operation. Otherwise the unit sees zeros.

Top-level ports of `alu16_cg`:

| port  | dir | width | meaning                                        |
|-------|-----|-------|------------------------------------------------|
| clk   | in  | 1     | clock                                          |
| reset | in  | 1     | asynchronous reset, active high                |
| en    | in  | 1     | run an operation this cycle                    |
| a, b  | in  | 16    | operands                                       |
| sel   | in  | 4     | operation code (table above)                   |
| out   | out | 16    | result of the last operation                   |
| cf    | out | 1     | carry flag of the last operation               |

With generic synthesis the ALU comes to about 290 flip-flop bits: sixteen 16-bit
result registers, eight carry bits, the 20 decoder bits and the output select.
It needs 56 I/O pins.

### Implementation notes

* The gated clocks are generated in logic. For an FPGA, the AND gate should map
  to a clock-enable primitive or a global clock buffer with enable (for example
  BUFGCE). For an ASIC, use an integrated clock gating cell or keep the AND cell
  out of the clock-tree optimisation. Timing analysis must know that the
  enables launch on the falling edge: this gives the decoder half a cycle.
* The 16 result registers cost area. The gating saves power by keeping 15 of
  them still. If area matters more than power, one shared result register
  clocked by `|en_q` keeps most of the saving.

## How faithful this is

Taken from the architecture this RTL implements:
* the 16-bit operands, the 4-bit select, and clock, reset and result ports;
* latch-free clock gating of the unused parts of the ALU;
* a square-root CSLA as the adder of the arithmetic unit;
* the CSLA's group layout, BEC widths and multiplexer sizes.

This implementation's own choices:
* the operation set and its codes;
* one result register per operation;
* the falling-edge enable register;
* operand isolation;
* the function of `en` and `cf`, whose names are those of two signals in the
  original design's simulation;
* asynchronous active-high reset;
* the standard full-adder and BEC gate equations.

Not included:
* the ungated reference ALU;
* the CSLA with two RCAs per group. Both exist only as baselines against which
  the gated ALU and the BEC adder were measured.

The reference implementation on a Spartan-3E FPGA reports:
* about 380 flip-flops and 57 I/O pins;
* 198 mW total against 209 mW for the ungated ALU (119 mW against 130 mW
  dynamic).

This RTL has fewer flip-flops (about 290). The register organisation behind
the larger count is not known. The power figures have not been reproduced.
Doing so needs an implementation and a power analysis, not RTL simulation.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`:

| testbench        | what it checks |
|------------------|----------------|
| `tb_rca`         | all inputs for W = 2 and W = 5 |
| `tb_bec`         | all inputs for W = 3 and W = 6 |
| `tb_csla_bec16`  | 0x1234 + 0x4567 = 0x579B, carry-chain corner cases, 20 000 random sums; both multiplexer paths of every group exercised |
| `tb_clock_gate`  | gated clock follows clk only in enabled cycles; edge count = enabled cycles |
| `tb_op_decoder`  | one-hot decode of every code, en low, outputs stable while clk high, async reset |
| `tb_arith_unit`  | all 8 operations, corner and random operands, result and carry |
| `tb_logic_unit`  | all 8 operations, random operands |
| `tb_alu16_cg`    | end to end, default parameters: all 16 codes, then ~3000 random cycles with idle (`en` low) cycles and a mid-run reset |

`tb_alu16_cg` checks several things against an independent model:
* every result and carry, with latency one;
* exactly one gated clock edge per operation, on the selected register;
* no gated clock edge at all in idle cycles;
* idle registers keep their values;
* the idle unit's operands are zero.

It counts each of these mechanisms, and a mechanism that never occurred is
reported as a failure.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/alu_pkg.sv tb/tb_alu16_cg.sv \
          --top-module tb_alu16_cg -o sim
./obj_dir/sim
```

Replace `tb_alu16_cg` with any testbench name. Linting the design:
`verilator --lint-only -Wall -Irtl rtl/alu_pkg.sv rtl/alu16_cg.sv`. The only
warnings are unused package constants.

## Files

| file | content |
|------|---------|
| `rtl/alu_pkg.sv`     | widths, operation enums |
| `rtl/full_adder.sv`  | 1-bit full adder |
| `rtl/rca.sv`         | W-bit ripple carry adder |
| `rtl/bec.sv`         | W-bit Binary to Excess-1 Converter |
| `rtl/csla_mux.sv`    | group multiplexer of the CSLA |
| `rtl/csla_bec16.sv`  | 16-bit square-root CSLA with BECs |
| `rtl/arith_unit.sv`  | arithmetic unit around the CSLA |
| `rtl/logic_unit.sv`  | bitwise logic unit |
| `rtl/op_decoder.sv`  | falling-edge one-hot operation decoder |
| `rtl/clock_gate.sv`  | AND clock gate |
| `rtl/gated_reg.sv`   | result register on a gated clock |
| `rtl/alu16_cg.sv`    | top level: the clock-gated ALU |
| `tb/tb_*.sv`         | one self-checking testbench per module above |
