# Racetrack-memory in-memory radix-4 Booth multiplier

Racetrack memory stores bits as magnetic domains along a nanowire. A current
pulse shifts every domain one position along the wire, and fixed magnetic
tunnel junctions (MTJs) read or write the domain that sits under them. The
memory is very dense, but it is sequential: a bit can only be used once it has
been shifted to an access port.

This design turns that constraint into the datapath. It multiplies two N-bit
two's complement numbers inside the memory. Operands stream past the access
ports one bit per shift. Small magnetic full adders sit next to the ports and
add the streams bit-serially. The stripes themselves are the pipeline
registers between adder stages. The multiplication uses radix-4 Booth
recoding: N/2 partial products are generated in parallel, then summed by a
binary tree of serial adders.

The RTL models all of this as synthesizable logic at cycle level. Each domain
is a flip-flop. One clock cycle is one shift/write step of the memory. The
adders' sense amplifiers are modelled as integer resistance comparisons. The
default build is 64 × 64 → 128 bits.

## Data flow of one multiplication

```
 x_in,y_in ──► operand_store                         rows (K = N/2 stripes)
               ├ X stripe (serial) ─x_bit─► pp_writer[i] ─► row stripe i ─┐
               └ Y stripes (bit-sliced)                                   │
                   │ y_bits                                               ▼
                   └► booth_encoder[i] ──ctl──► pp_writer[i]        pp_adder_tree
                                                                 (serial MFAs,
                                                                  stage stripes)
                                                                          │
                                               result stripe ◄── sum_bit ─┘
```

| phase | cycles | what moves |
|-------|--------|------------|
| LOAD  | N      | X is written bit by bit (LSB first) into its stripe. In the first cycle each bit y_j of Y is written into Y stripe j. |
| PRE   | N − 1  | Row stripe i is shifted s_i = 2i (+1 if its digit is ±2) times with nothing written. This gives the row its 4^i weight, plus the ×2. |
| DATA  | 2N     | X leaves its read head one bit per cycle, LSB first. After its top bit it stops shifting, so the sign bit repeats. Row i takes 2N − s_i bits. Every row stripe has then shifted exactly 2N times, so all rows are aligned. |
| ADD   | 2N + D − 1 | All rows shift out together, one bit per cycle. Tree level l handles bit c at cycle c + l. The root writes the product into the result stripe. |

K = N/2 and D = log2(K). `done` is first seen high 6N + D − 1 clock edges
after the edge that accepted `start`. For N = 64 that is 388 cycles. If one
cycle is one 5 ns racetrack write, the clock is 200 MHz and one product takes
1.94 µs. Multiplications run one after another; one operation's addition does
not overlap the next one's generation.

## The magnetic full adder (`mfa`, `pcsa`)

Each full adder is two pre-charge sense amplifiers (PCSAs). A PCSA compares
the resistance of its two discharge branches:

- While its clock (`eval`) is low, both outputs are precharged to 1.
- While it is high, the branch with the lower resistance pulls its own output
  to 0.

A stored 1 is the high-resistance, antiparallel state. Resistances are
integers in units of R_L/2, so R_L = 2 and R_H = 5 (R_H = 2.5 R_L).

| stage | left branch | right branch | output |
|-------|-------------|--------------|--------|
| carry | MTJs A, B, Ci in series: 6, 9, 12 or 15 | 2R_H = 10 | Co = 1 when two or more inputs are 1 (majority) |
| sum   | stacked pairs A/B and B/Ci; a pair is R_H when its bits differ: 4, 7 or 10 | R_H = 5 | Sum_in = 0 only when A = B = Ci |

A 2-to-2 MUX selected by Co gives Sum = Co ? ¬Sum_in : Sum_in. This equals
A ⊕ B ⊕ Ci in all eight cases. The unit test checks every case against the
full-adder equations. The adder needs only the carry for its XOR. That is why
the sum stage needs only two stacked elements, not a tree of MTJs.

`rm_serial_adder` turns one MFA into a bit-serial adder. A register stands for
the carry domain between bits. On the first bit, an explicit `cin` replaces
the stored carry.

## Booth recoding and the partial-product rows

The multiplier is read in overlapping groups {y(2i+1), y(2i), y(2i−1)}, with
y(−1) = 0. `booth_encoder` raises exactly one of zero, one, two, ne_one and
ne_two (digits 0, +1, +2, −1, −2), and also `neg` = ne_one | ne_two.

The multiplier is stored bit-sliced: stripe j holds bit j. All groups
therefore sit under read heads at the same time and are decoded in parallel.
Loading a new multiplier pushes the older ones one domain deeper.

`pp_writer` turns the X stream into one row:

- **zero**: the row is never written. Erased domains read as 0.
- **×2 and the row weight**: these are extra shifts of the row stripe before
  data arrives (PRE phase). They are not a data operation.
- **negation**: a 2-to-2 MUX selected by `neg` crosses the bit/complement
  pair, so the row is written inverted.
- **+1 after inversion**: inverting gives ¬X; −X needs ¬X + 1. The +1 comes
  from an MFA wired as an incrementer (B = 0) whose initial carry is `neg`.
  It runs while the row is written, so each stored row is the exact two's
  complement value.

The +1 is the least obvious part of the design. The adder tree has K − 1
adders and therefore K − 1 initial carries. The multiplier has K rows, and
row i needs its +1 at weight 4^i, not at weight 1. Placing the +1 as the row
is written avoids both problems. It costs one MFA and one carry bit per row.

## Pipelined addition (`pp_adder_tree`)

Level 0 has K/2 serial adders, each adding a pair of rows. Each further level
adds pairs of the previous level's sums. For N = 8 this is a left adder, a
right adder and a middle adder.

Each intermediate sum is written into a stage stripe through a combined
read/write port. The next level reads it back from that port one cycle later.
So the whole tree is a bit-level pipeline, D cycles deep, with no registers
other than the stripes. The tree needs N/2 to be a power of two; 8, 16, 32
and 64 all qualify.

## Module map

| file | role |
|------|------|
| `rm_pkg.sv` | `booth_ctl_t` and the resistance constants |
| `rt_stripe.sv` | racetrack stripe: shift register with a write head and a read head (or one W/R port), cleared to 0 |
| `pcsa.sv`, `mux22.sv`, `mfa.sv` | sense amplifier, 2-to-2 MUX, magnetic full adder |
| `rm_serial_adder.sv` | bit-serial adder around one MFA |
| `booth_encoder.sv` | radix-4 group → control signals |
| `pp_writer.sv` | negation MUX, +1 incrementer and write enable for one row |
| `operand_store.sv` | X stripe (serial, 2N domains) and N Y stripes (bit-sliced, 64 domains) |
| `pp_adder_tree.sv` | tree of serial adders with stage stripes |
| `rm_booth_ctrl.sv` | LOAD/PRE/DATA/ADD sequencer that issues every shift and write |
| `rm_booth_multiplier.sv` | top level |

## Top-level interface (`rm_booth_multiplier #(N = 64)`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock (one memory step per cycle); asynchronous active-low clear |
| `start` | in | 1 | begin a multiplication; accepted only while `busy` is low |
| `x_in`, `y_in` | in | N | multiplicand and multiplier, two's complement, captured at the start edge |
| `busy` | out | 1 | an operation is in progress |
| `done` | out | 1 | one-cycle pulse; `product` is valid from then on |
| `product` | out | 2N | the result stripe read out in parallel; holds X·Y until the next operation writes it |
| `res_bit`, `res_valid` | out | 1 | the product bit-serially, LSB first, as it is written |

The product is the full 2N-bit signed product. Unsigned operands of up to N − 1
bits work unchanged. The multiplier is treated as signed, because its top
group may produce a negative digit.

## What is modelled, and how far to trust it

- **Digital behaviour**: the logic is exact and is checked against integer
  arithmetic. At 64 bits this covers hundreds of random products and the
  corner cases (−2^(N−1) squared, all ones, and each Booth digit pattern).
  8, 16 and 32 bits are checked the same way.
- **Analog parts are abstracted.** The MTJ, the transistor-level PCSA race,
  and the shift and write current drivers are not modelled. A PCSA is a
  comparator of integer resistances, a domain is a flip-flop, and a shift is a
  clock-enabled move. Energy, area and the 240 ps adder delay are outside the
  model.
- **Choices made here, not given by the architecture**:
  - the sequencer and its phase lengths;
  - the host write buffer on `x_in`/`y_in`;
  - asynchronous reset that clears every stripe (real racetrack memory is
    non-volatile);
  - one-directional shifting;
  - head positions and stripe lengths: rows and the result are 2N domains,
    the Y stripes 64 domains (a 128F track with 2F domains);
  - separate stage stripes for intermediate sums, rather than extra ports on
    the operand stripes;
  - the +1 incrementer in each row's write path, described above.
- **Not built**:
  - overlapping consecutive multiplications;
  - restoring X to its original position after use. X stays in the stripe's
    overflow domains and is overwritten by the next load;
  - multi-precision composition for operands wider than N, such as RSA
    operands of 512 bits or more.

## Simulating

Every testbench in `tb/` is self-checking and ends with
`TB_RESULT checks=<n> failures=<m>`. Build one with Verilator 5. List the
package first, and let Verilator find the other modules by name:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/rm_pkg.sv \
          tb/tb_rm_booth_multiplier.sv --top-module tb_rm_booth_multiplier
./obj_dir/Vtb_rm_booth_multiplier
```

| testbench | covers |
|-----------|--------|
| `tb_rm_booth_multiplier` | top at its default N = 64: the 52 × 107 = 5564 example, corner cases and random products. Checks latency and the serial stream, and counts every Booth digit. |
| `tb_rm_booth_sizes` | top at N = 8, 16 and 32 side by side |
| `tb_rt_stripe`, `tb_pcsa`, `tb_mfa`, `tb_booth_encoder`, `tb_pp_writer`, `tb_rm_serial_adder`, `tb_pp_adder_tree`, `tb_operand_store`, `tb_rm_booth_ctrl` | one block each, against an independent reference |

`rm_mul_driver` is the shared stimulus and checker for the two top-level
benches. To try another width, instantiate `rm_booth_multiplier #(.N(n))` with
`rm_mul_driver #(.N(n))`, as `tb_rm_booth_sizes` does. N/2 must be a power of two.
