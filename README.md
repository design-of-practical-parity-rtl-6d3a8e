# Majority-gate parity generators and checkers for QCA

Quantum-dot cellular automata (QCA) compute with one primitive: the
three-input **majority gate** M(x, y, z), plus inverters. AND and OR are
majority gates with one input pinned to 0 or 1 (a fixed cell of polarization
-1 or +1). Parity logic is XOR logic, and XOR is expensive in this
technology. The usual way to build a wide XOR is a cascade of 2-input XORs,
and it spends many majority gates and clock zones.

This design builds parity circuits from two small majority-gate XORs, a
2-input one and a 3-input one, each with three majority gates. Wide parity
functions are chains of 3-input XOR stages, plus one 2-input stage where
needed. Area and latency then grow linearly with the number of inputs.

The RTL models these circuits at gate level, one module per gate structure.
Outputs are bit-exact. A separate cycle model reproduces the QCA
clock-zone latency.

## The gates

| module      | function                    | structure                                   | majority gates | inverters |
|-------------|-----------------------------|---------------------------------------------|----|---|
| `maj3`      | M(x,y,z)                    | xy + yz + xz                                | 1  | 0 |
| `xor2_maj`  | a ^ b                       | M( ~M(a,b,0), M(a,b,1), 0 )                 | 3  | 1 |
| `xor3_maj`  | a ^ b ^ c (3-bit even parity generator) | M( M(a,b,~c), c, ~M(a,b,c) )    | 3  | 2 |
| `xnor3_maj` | ~(a ^ b ^ c) (3-bit odd parity generator) | M( M(a,b,c), ~c, ~M(a,b,~c) ) | 3  | 2 |

Why the 3-input XOR works: C sits on one input of the output gate, so it
selects between AND and OR of the other two inputs.

* If c = 0, the output is `M(a,b,1) AND NOT M(a,b,0)`, which is OR(a,b)
  AND NAND(a,b) = a ^ b.
* If c = 1, the output is `M(a,b,0) OR NOT M(a,b,1)`, which is AND(a,b)
  OR NOR(a,b) = ~(a ^ b).

The 3-input XNOR is the same circuit with every input of the output gate
inverted. This works because the majority function is self-dual:
M(~x,~y,~z) = ~M(x,y,z).

## Parity circuits

Even parity makes the total number of ones, parity bit included, even.
Odd parity makes it odd. A checker recomputes the parity of the data and
compares it with the received parity bit. Its output `err = 1` reports a
mismatch. Any single-bit error is detected.

* **3-bit generators**: `xor3_maj` (even) and `xnor3_maj` (odd). Latency is
  3 clock zones (0.75 QCA clock cycle).
* **4-bit checkers** (`parity_checker4`, parameter `ODD`): the 3-input gate
  over a, b, c, then `xor2_maj` with the received bit `pin`.
  * Even checker: `err = a^b^c^pin`.
  * Odd checker: the 3-input XNOR feeds the same XOR2, so
    `err = ~(a^b^c^pin)` with no extra inverter.
  * Latency is 5 zones: 3 for the first gate and 2 for the XOR2.
* **N-input generator** (`parity_generator_n`, default `N = 15`): a chain of
  3-input XORs.
  * Stage k takes the running parity on its `c` input (d[0] for stage 0)
    and two fresh bits d[2k+1], d[2k+2].
  * 15 inputs need 7 stages. An even N ends with one `xor2_maj`.
  * With `ODD = 1` the last 3-input stage is the XNOR gate.
* **N-bit checker** (`parity_checker_n`, default `N = 16`): the (N-1)-input
  generator over the data, then `xor2_maj` with the received bit.

Bit 0 of every data vector is the first input (A1, or A in the 3-bit circuits).

## Clock zones and latency

QCA is clocked in zones. A four-phase field lets each zone latch what the
previous zone computed, and four zones make one clock cycle. A QCA circuit
is therefore a fine-grained pipeline. A new input wave can enter every
cycle, and results come out a fixed number of zones later.

The logic modules above are combinational, because only their function is
modelled. `qca_zone_delay` adds the timing: a shift register that moves
one zone per rising edge of `clk`. Here `clk` is a zone tick, four per QCA
cycle.

The latencies follow one rule: one zone per majority-gate level. A 3-input
XOR stage costs 3 zones and a 2-input XOR costs 2
(`parity_qca_pkg::gen_zones`, `chk_zones`).

| circuit | latency |
|---------|---------|
| 3-bit generator | 3 zones |
| 4-bit checker | 5 zones |
| 15-input generator | 7 × 3 = 21 zones |
| 16-bit checker | 21 + 2 = 23 zones |

The 3-zone and 5-zone figures are the stated latencies of the original QCA
layouts. The 21 and 23 are this model's extrapolation: the original states
only that latency grows linearly.

The electric-field clock itself has no logic function and is not modelled.

## Top level: `parity_qca_top`

The top places all circuits side by side, each with its own inputs:

| group | inputs | outputs |
|-------|--------|---------|
| 3-bit generators, even and odd | `g3_d` | `g3_even_p`, `g3_odd_p` |
| 4-bit checkers, even and odd | `c4_d`, `c4_pin` | `c4_even_err`, `c4_odd_err` |
| `GEN_N`-input generators, even and odd | `gn_d` | `gn_even_p`, `gn_odd_p` |
| `CHK_N`-bit checkers, even and odd | `cn_d`, `cn_pin` | `cn_even_err`, `cn_odd_err` |

Every output also has a `*_q` copy delayed by that circuit's zone latency.

* `rst_n` is a synchronous, active-low reset. It clears only the zone
  registers.
* Hold an input for one QCA cycle (four `clk` edges). Its result then
  appears on `*_q` after exactly the latency in the table above.
* The parameters are `GEN_N = 15` and `CHK_N = 16`.

## Where this model departs from the original or fills gaps

* **2-input XOR wiring.** The inverter sits between the AND-like majority
  gate and the output gate, giving `M(~M(a,b,0), M(a,b,1), 0)`: NAND AND
  OR, which is XOR.
* **Odd generator and odd checker.** The odd generator's output is
  `~(a^b^c)`, as odd parity requires. The odd checker reuses that gate in
  front of the XOR2. The original layout of the odd checker has four cells
  more than the even one, so its internal arrangement may differ. Its
  function is the same.
* **Extended circuits.** The order in which the 15 inputs enter the chain,
  the even-N ending, the odd variants and the 21/23-zone latencies are
  choices of this model.
* **Zone model.** It holds one value per zone. It does not model the
  switch, hold, release and relax phases, or QCA cell polarization.
* **Physical results are not modelled.** This covers cell counts (49 cells
  per 3-bit generator, 84 and 88 per 4-bit checker), area (0.04 µm² and
  0.08 µm² with 18 nm cells at 2 nm spacing), the absence of wire
  crossings, and cost-function comparisons. The RTL reproduces the logic
  and the zone-level timing only.

## Simulating

All code is SystemVerilog-2017. The package `rtl/parity_qca_pkg.sv` must
be read first. Each testbench checks itself and prints
`TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/parity_qca_pkg.sv tb/tb_parity_qca_top.sv --top-module tb_parity_qca_top
./obj_dir/Vtb_parity_qca_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_maj3`, `tb_xor2_maj`, `tb_xor3_maj`, `tb_xnor3_maj` | exhaustive truth tables, with expected values from counting ones |
| `tb_parity_checker4` | all 16 words, through the even and odd checkers |
| `tb_parity_generator_n` | all 2^15 words at N = 15, plus N = 2, 3, 4, 8, even and odd |
| `tb_parity_checker_n` | every 15-bit word sent with the correct and with the wrong parity bit, plus N = 5 exhaustively |
| `tb_qca_zone_delay` | random streams through 0, 1, 3 and 5 zones, and reset |
| `tb_parity_qca_top` | end to end at default sizes (below) |

`tb_parity_qca_top` runs 3000 QCA cycles, all at the default sizes:

* It generates parity for random words.
* It sends each word to the checkers either clean, with one data bit
  flipped, or with the parity bit flipped.
* It requires every error to be flagged and no clean word to be flagged.
* It checks every `*_q` output at its exact zone latency.
* It counts each of these cases and fails if any never occurred.

To change a width, set `GEN_N` and `CHK_N` on the top, or `N` on the
generator and checker modules. The latency formulas follow automatically.
