# Majority-gate ripple adder and a MAC unit built on it

Quantum-dot cellular automata (QCA) have just two native logic elements: the
inverter and the three-input majority gate, M(a,b,c) = ab + bc + ca. Every
majority gate that a signal passes through costs one QCA clock phase. So an
adder for this technology is judged by how many majority gates sit on its
carry path, and by how many gates it uses in all.

In a plain ripple-carry adder, each bit position puts one majority gate on the
carry path. The adder here is still a ripple adder, but it moves the carry two
bit positions at a time through a **single** majority gate. That roughly
halves the critical path and keeps the gate count low. This repository
describes the adder as synthesizable SystemVerilog, gate for gate. It also
contains a small multiply-accumulate (MAC) unit that uses the adder for its
partial-product sums and for its accumulator.

The RTL models the logic only. The QCA cell layout and the four-phase QCA
clock are not modelled: here a majority gate is a single level of
combinational logic.

## The two-bit carry step

For bit i, let p_i = a_i | b_i (propagate) and g_i = a_i & b_i (generate). A
majority gate builds both, with a constant third input:
p_i = M(a_i, b_i, 1) and g_i = M(a_i, b_i, 0).

The look-ahead form of the carry two positions up is

    c_{i+2} = g_{i+1} + p_{i+1} g_i + p_{i+1} p_i c_i

Majority-logic identities turn this into

    c_{i+2} = M( M(a_{i+1}, b_{i+1}, g_i),  M(a_{i+1}, b_{i+1}, p_i),  c_i )

The two inner gates depend only on operand bits, so they settle early, in
parallel, in every slice. After that, the incoming carry c_i meets just the
outer gate. The carry between the two positions is formed beside the chain,
for the sum bits only:

    c_{i+1} = M(p_i, g_i, c_i)

To see why the outer formula is right, take two cases:

- If c_i = 0, the outer gate gives the AND of the inner two. That is
  g_{i+1} + p_{i+1} g_i.
- If c_i = 1, it gives their OR. That is g_{i+1} + p_{i+1} p_i.

`qca_carry2` is this slice: six majority gates, one of them on the carry path.

The adder has no carry input (c_0 = 0), which simplifies the lowest slice,
`qca_carry2_lsb`:

- c_1 = g_0
- c_2 = M(a_1, b_1, g_0)

It needs no p_0, and c_2 is two gates deep.

## The N-bit adder

`qca_adder #(N)` has three parts:

- the low slice;
- N/2 − 1 general slices in a chain, each taking c_{2k} and giving c_{2k+2};
- the sum block `qca_sum`, which makes every sum bit once all the carries are
  ready:

      s_i = M( ~c_{i+1},  c_i,  M(a_i, b_i, ~c_i) )

Worst case: a carry generated at bit 0 and carried to the top. It goes
through 2 gates in the low slice and 1 gate in each of the other (N−2)/2
slices. The sum block then adds 2 more gates and an inverter. In all, the
path is **N/2 + 3 majority gates and one inverter**:

- N = 16: 11 gates, where a plain ripple adder needs N + 2 = 18.
- N = 64: 35 gates and one inverter, about 36 clock phases, or 9 four-phase
  QCA clock cycles.

Gate count at N = 16: 2 + 7 × 6 + 2 × 16 = 76 majority gates. Of these, 32
are in the sum block.

The adder's outputs are s = (a + b) mod 2^N and the carry out c_N. N must be
even. The default is 16. The testbench also checks N = 2 and N = 64.

## MAC unit

`mac_unit` (the top level) is built as follows:

```
 wr_en / wr_addr / wr_data
        |
 mac_operand_regs --op_a, op_b--> mac_multiplier --mul_p--> [stage 1 reg] --prod_s1--+
        |                         (Booth rows +                                     |
        +--start, accumulate--+    qca_adder chain)                                 |
                              |                                                     v
                              +--> [stage 1 valid] --acc_en-->  mac_accumulator (qca_adder + overflow) --> acc, ovf
                                                  --s1_valid--> [product reg], done --> product, done
```

### Operand registers and the alias address

Operand A is reachable at two addresses. The address decides what the write
does. Each write updates one register and starts one operation:

| `wr_addr` (`mac_pkg::mac_addr_e`) | Register written | Operation started |
|---|---|---|
| `ADDR_A` (0) | A | multiply and accumulate: acc += A·B |
| `ADDR_A_ALIAS` (1) | A | multiply only; acc is left alone |
| `ADDR_B` (2) | B | multiply only |
| `ADDR_NONE` (3) | none | none (the write is ignored) |

A typical dot product writes B first and then A at `ADDR_A`, once per term.
The alias address lets you use the multiplier (`product`) without disturbing
a running sum.

### Multiplier

`mac_multiplier #(W)` multiplies two signed W-bit numbers using radix-4
Booth recoding:

- Each three-bit window of B chooses 0, ±A or ±2A.
- In each row (`mac_booth_row`), multiplexers choose A or 2A.
- A negative digit inverts the row. An "add cell", a chain of half adders,
  then adds 1 at the row's LSB, so every row is a complete two's-complement
  number.
- Row j is shifted left by 2j.
- A chain of W/2 − 1 `qca_adder` instances, each 2W bits wide, adds the rows.
  The result is exact for any signed W × W product.

### Accumulator and overflow

`mac_accumulator #(N)` adds the sign-extended product to `acc` with a
`qca_adder`. The overflow check uses the signed rule: both operands have the
same sign, but the sum has the other sign. On overflow, the sum wraps modulo
2^N and `ovf` is set. `ovf` is sticky: it stays set until `clr_acc` or reset.
Large products overflow the 16-bit accumulator after a few terms. For
example, (−128)·(−128) = 16384, so the second such term already overflows.

### Timing

A write sampled at rising edge t goes through the pipeline like this:

| Edge | What happens |
|---|---|
| t | The operand register is loaded. `start` goes high for one cycle. |
| t+1 | The multiplier output is registered (stage 1). The accumulator gets a full cycle for its addition. |
| t+2 | `product` and, for a MAC, `acc`/`ovf` take the result. |
| after t+2 | `done` is high for one cycle. |

The latency is fixed at two edges. The unit accepts one write per cycle, back
to back.

`clr_acc` clears `acc` and `ovf` synchronously and has priority over an
accumulation at the same edge. If no accumulation should be lost, assert it
only when the pipeline is empty. `rst_n` is an asynchronous, active-low reset
for every register.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `qca_adder`, `qca_sum`, `mac_accumulator` | `N` | 16 | adder / accumulator width (even) |
| `mac_multiplier`, `mac_booth_row`, `mac_operand_regs` | `W` | 8 | operand width (even, ≥ 4) |
| `mac_unit` | `W`, `N` | 8, 16 | operand and accumulator width, N ≥ 2W |

The 16-bit adder is the width the design is built around. The 8-bit operands
are chosen so that a full product fits that adder exactly.

## What is fixed by the design and what is a choice here

These parts are the adder design itself:

- the majority-gate formulas of the two-bit slice;
- the simplified low slice for c_0 = 0;
- the chain of N/2 slices followed by a separate sum block;
- the worst-path count of N/2 + 3 gates;
- the 16-bit width;
- the MAC's structure: two operand registers, one of them with a primary and
  an alias address; a multiplier built from multiplexers, half adders, full
  adders and an add cell; the new adder used in the adder array; and a
  signed-overflow check on accumulation.

These are choices made in this RTL:

- the exact gate form of the sum bit;
- radix-4 Booth as the reading of "multiplexers + add cell";
- 8-bit operands and a 16-bit accumulator;
- the address encoding, and the rule that B writes and alias writes only
  multiply;
- the two-stage pipeline and the `done` pulse;
- wrap-around with a sticky overflow flag;
- the `clr_acc` input;
- the asynchronous reset.

Not modelled:

- the QCA layout, cell counts, area, power and clock phases;
- the hybrid Ladner–Fischer/ripple adder that the design is compared against.

Area and power numbers quoted for this adder come from layout and FPGA
tools. This RTL cannot reproduce them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_qca_maj`, `tb_qca_carry2`, `tb_qca_carry2_lsb` | every input combination |
| `tb_qca_sum` | random operands, with carries computed independently and a random c_0 |
| `tb_qca_adder` | N = 16: 65536 structured operand pairs (all pairs of two byte-derived patterns), 20000 random words and carry-chain corners. N = 64: random. N = 2: every input combination. |
| `tb_mac_multiplier` | every 8 × 8 signed pair; 20000 random 16 × 16 pairs, including −32768 · −32768 |
| `tb_mac_operand_regs` | random writes to all four addresses; register contents and `start`/`accumulate` pulses |
| `tb_mac_accumulator` | 20000 random steps against a wide-integer model. Positive and negative overflows and clears are counted; each must happen. |
| `tb_mac_unit` | End to end, at the default parameters: a directed dot product (expects −74), an alias multiply that must leave acc unchanged, then 30000 random cycles. Every `done` is checked for latency 2, product, acc and ovf. MAC, alias multiply, B multiply, ignored address, back-to-back writes, overflow and clear must each occur. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mac_pkg.sv tb/tb_mac_unit.sv \
          --top-module tb_mac_unit -Mdir obj_tb_mac_unit
./obj_tb_mac_unit/Vtb_mac_unit
```

To lint any module, use the same pattern with
`verilator --lint-only -Wall -Irtl rtl/mac_pkg.sv rtl/<module>.sv`. Every
testbench finishes in well under a second.

## Files

- `rtl/qca_maj.sv`: majority gate
- `rtl/qca_carry2.sv`: general two-bit carry slice
- `rtl/qca_carry2_lsb.sv`: lowest slice, no carry input
- `rtl/qca_sum.sv`: sum block
- `rtl/qca_adder.sv`: N-bit adder
- `rtl/mac_pkg.sv`: register address type
- `rtl/mac_operand_regs.sv`: operand registers with the alias address
- `rtl/mac_booth_row.sv`: one Booth partial-product row with its add cell
- `rtl/mac_multiplier.sv`: signed multiplier
- `rtl/mac_accumulator.sv`: accumulator with overflow flag
- `rtl/mac_unit.sv`: top level
- `tb/tb_<module>.sv`: one testbench for each module above except
  `mac_booth_row` (it is covered by `tb_mac_multiplier`)
