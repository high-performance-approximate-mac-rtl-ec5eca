# Approximate 8x8 MAC unit with majority-logic compressors

This is a multiply-accumulate (MAC) unit for error-tolerant workloads such as the convolution
layers of a CNN. The multiplier is an unsigned 8x8 Dadda multiplier in which wide compressors cut
partial-product reduction to **two stages**. Most of the 64 partial products are reduced by
*approximate* 5:2 and 7:2 compressors. Each of these is a short chain of 3-input majority gates
instead of a tree of full adders. A 17-bit (2N+1) accumulator is fed back into the multiplier's
final adder, so one carry-propagate addition both finishes the product and accumulates it.

The design follows the published architecture "High-performance approximate MAC multiplier using
majority logic compressors for CNNs". The gate-level equations of the compressors come from that
publication. The column-by-column placement of the reduction tree, the control interface and a
few polarity details are this implementation's own choices. They are listed under
[Departures and own choices](#departures-and-own-choices).

## Datapath

```
 a[7:0], b[7:0]
      |
 dadda8_reduce      64 partial products -> stage 1 -> stage 2 -> two 16-bit rows
      |  row_a, row_b
 mac_final_adder    row_a + row_b + (clear ? 0 : acc)        17 bits, wraps mod 2^17
      |  acc_next                         ^
 mac_accumulator    17-bit register ------+---> acc (result)
```

| Module | Role |
|---|---|
| `mac_pkg` | `N = 8`, `ROW_W = 16`, `ACC_W = 2N+1 = 17` |
| `approx_mac` | top: wires the three stages together |
| `dadda8_reduce` | partial products and the two reduction stages (structural netlist) |
| `mac_final_adder` | adds the two rows and the accumulator feedback |
| `mac_accumulator` | the accumulator register |
| `maj_comp42`, `maj_comp52`, `maj_comp72` | approximate majority-logic compressors |
| `exact_comp42`, `exact_comp52` | exact compressors built from full adders |
| `full_adder`, `half_adder`, `maj3` | cells |

## The compressors

A k:2 compressor takes the bits of one column, plus carry-ins from the compressor one column
lower. It returns a *Sum* of the same weight and several bits of double weight: *Carry*, *Cout*,
*Cout1* and *Cout2*. The Couts go sideways into the `cin` inputs of the next column's compressor
in the same stage. The Carry goes down to the next stage.

### Exact compressors (used at the edges and in stage 2)

* **4:2** (`exact_comp42`): `FA(x1,x2,x3)` gives Cout. `FA(s, x4, cin)` gives Sum and Carry.
  The result is `x1+x2+x3+x4+cin = Sum + 2(Carry+Cout)`. Cout does not depend on cin, so a row
  of these cells has no ripple path.
* **5:2** (`exact_comp52`): three chained full adders with Cout1, Cout2 and finally Sum/Carry.
  The result is `x1+..+x5+cin1+cin2 = Sum + 2(Carry+Cout1+Cout2)`.

### Majority-logic compressors (the approximate part)

`Maj(A,B,C) = AB + BC + CA`. Each compressor is a chain of majority gates. Each gate's output is
complemented and fed into the next gate together with two more inputs. The carry outputs
are **input bits passed straight through**, which is where the hardware saving comes from.

| Cell | Gate chain | Sum | Carry | Cout1 / Cout | Cout2 |
|---|---|---|---|---|---|
| `maj_comp42` | m1 = Maj(x3, x4, ~cin) | Maj(~m1, x1, x2) | x4 | x3 | – |
| `maj_comp52` | m1 = Maj(x5, x4, ~cin1); m2 = Maj(~m1, x3, ~cin2) | Maj(~m2, x1, x2) | x5 | x4 | x3 |
| `maj_comp72` | m1 = Maj(x7, x6, ~cin1); m2 = Maj(~m1, x5, ~cin2); m3 = Maj(~m2, x4, x3) | Maj(~m3, x1, x2) | x6 | x5 | x4 |

These cells do not preserve the arithmetic count of their inputs. The tapped bits are counted
at double weight, and the remaining bits only affect the single Sum bit. This is the main source
of error in the multiplier (see [Accuracy](#accuracy)). Sum is 0 when all inputs and carry-ins
are 0, so a zero operand always gives a zero product.

## The reduction tree

Column `j` holds the partial products `a[k] & b[i]` with `i + k = j`. Its height is
1, 2, …, 8, …, 2, 1 for columns 0 to 14. The columns form three regions:

* columns 4–9, the tall middle of the diamond, use the approximate majority compressors;
* columns 10–14, the most significant, use exact cells;
* columns 0–3, the least significant, use simple adders and one majority 4:2.

**Stage 1** (one cell per column; Couts chain to the next column's `cin`):

| Column | Bits | Cell | Notes |
|---|---|---|---|
| 0 | 1 | – | passes |
| 1 | 2 | half adder | |
| 2 | 3 | full adder | its carry is `cin` of column 3 |
| 3 | 4 | majority 4:2 | Cout → `cin1` of column 4 |
| 4 | 5 | majority 5:2 | `cin2` = 0 |
| 5 | 6 | majority 5:2 | 1 bit left for stage 2 |
| 6 | 7 | majority 7:2 | |
| 7 | 8 | majority 7:2 | 1 bit left for stage 2 |
| 8 | 7 | majority 7:2 | |
| 9 | 6 | majority 5:2 | 1 bit left; Cout1/Cout2 → column 10 |
| 10 | 5 | exact 5:2 | Cout1 → column 11 `cin`, Cout2 → stage 2 |
| 11 | 4 | exact 4:2 | |
| 12–14 | 3, 2, 1 | – | pass to stage 2 |

Each compressor takes its column's bits in partial-product row order: row 0 goes to `x1`, and
so on.

**Stage 2** uses only exact cells. After stage 1 the column heights are
`1 1 2 1 2 3 2 3 2 3 2 3 5 2 1` (column 0 first). Each column is given the cell that leaves at
most two bits once the carry from below arrives:

* half adders on columns 6, 8 and 10;
* full adders on columns 5, 7, 9, 11 and 13;
* one exact 4:2 on column 12, which takes its fifth bit on `cin`.

Column 13's full adder absorbs the Cout of that 4:2.

The rows `row_a` and `row_b` are the two bits left in each column. Their sum needs 17 bits,
because the approximate cells can overshoot 255·255.

The whole tree uses 4 half adders, 6 full adders, 1 majority 4:2, 3 majority 5:2,
3 majority 7:2, 1 exact 5:2 and 2 exact 4:2. `dadda8_reduce` is written as a plain structural
netlist in that order, so the table above can be read against the code.

## Interface and timing (`approx_mac`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous, active-low reset; clears the accumulator |
| `valid` | in | 1 | perform one MAC this cycle |
| `clear` | in | 1 | with `valid`: load the product instead of adding it (starts a new sum) |
| `a`, `b` | in | 8 | unsigned operands |
| `acc` | out | 17 | accumulator, the unit's result |

The multiplier and the final adder are combinational. The accumulator is the only register.
When the unit samples `a`, `b`, `valid` and `clear` at a rising edge, `acc` shows the new sum
right after that edge. This gives one MAC per cycle, one cycle of latency and no stalls. With
`valid` low the accumulator holds its value. The sum wraps modulo 2^17. Nothing saturates, and
no overflow flag is raised.

## Accuracy

All 65 536 operand pairs were run through the unit and the result compared with `a*b`:

| Metric | Value |
|---|---|
| Error rate ER (share of wrong products) | 97.75 % |
| Mean error distance MED | 457.7 |
| NMED (MED / 255²) | 7.04 × 10⁻³ |
| Mean relative error distance MRED (non-zero products) | 9.77 × 10⁻² |

These values come from the compressor equations as published, and they are much worse than the
figures published for this architecture: ER 1.9 %, MED 0.6, NMED 0.4 × 10⁻³ and MRED
0.8 × 10⁻³. The gap is built into the majority cells. Their Carry and Cout outputs copy
single input bits and do not count the column. For example, a 7:2 cell whose inputs x4, x5 and
x6 are 1 gives 6 for a true count of 3. No placement of these cells in the tree can reach the
published error rate. If accuracy matters more than area, replace the majority cells in
columns 4–9 with exact ones. `exact_comp52` has the same ports as `maj_comp52`, so it drops
straight in.

## Departures and own choices

* **7:2 majority cell.** It is taken from the published circuit drawing. That drawing also
  puts a complement on the output of the last majority gate. That complement was left out, as
  in the 4:2 and 5:2 cells. With it, Sum would be 1 for all-zero inputs, and 0 × 0 would give
  448.
* **5:2 majority cell.** The published equation has no complement between the first and
  second majority gates. The circuit drawing shows one, and this design follows the drawing.
* **Placement.** The published dot diagram gives the regions and the cell families, not a
  netlist. The per-column placement above, the input order and the lateral Cout → cin
  chaining are this design's own.
* **Exact 5:2 and 4:2 on columns 10–11.** The drawing shows exact compressors in the upper
  region without giving their sizes.
* **Final adder.** The final adder is a behavioural `+` over three operands. The published
  diagram feeds the accumulator back into this adder.
* **Control and format.** `valid`, `clear`, the reset, the unsigned operand format and the
  modulo-2^17 wrap are not specified in the source and were chosen here.
* **Not included.** The approximate-full-adder compressors and the multiplexer-based
  compressors are the comparison variants in the published study. So is the exact 7:2
  compressor. None of them is part of this unit. The published LUT, delay and power results
  come from an FPGA implementation and are not reproduced here.

## Simulating

Every module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    --top-module tb_approx_mac rtl/mac_pkg.sv tb/tb_approx_mac.sv -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_maj3`, `tb_half_adder`, `tb_full_adder` | exhaustive truth tables |
| `tb_exact_comp42`, `tb_exact_comp52` | exhaustive: Sum + 2·(carries) equals the input count; Cout independent of the carry-in |
| `tb_maj_comp42/52/72` | exhaustive against the gate equations, evaluated by counting |
| `tb_dadda8_reduce` | 300 pairs against `tb/dadda8_vectors.hex`, plus the full 65 536-pair error sweep |
| `tb_mac_final_adder` | random operands, clear, and the 17-bit wrap |
| `tb_mac_accumulator` | load, hold, synchronous update and asynchronous reset |
| `tb_approx_mac` | end-to-end dot products of 25 terms, random idle cycles, and per-cycle comparison with a model (checks the one-cycle latency). Counts clears, holds and accumulator wraps, and fails if one never occurs. Runs at the default size |
| `tb_error_analysis` | all 65 536 pairs through the unit, one per cycle; prints ER, MED, NMED and MRED |

Each line of `tb/dadda8_vectors.hex` holds `a` (2 hex digits), `b` (2) and the expected 17-bit
row sum (5). The expected values come from an independent bit-level model of the same cell
equations and placement. The two sweep testbenches also compare the total error count (64 062)
and the summed error distance (29 993 152) with that model.
