# Self-repairing hybrid carry-select adder

A 64-bit adder that checks each of its full adders on every addition and
works around a faulty one while it runs. The adder is split into blocks, and
every block carries one spare full adder. When a full adder's checker reports
an error, that block moves its operands and results one position up, past the
faulty cell, and the spare takes the top bit. The sum stays correct in the same
combinational pass. Nothing needs a reset, a retry or a stored fault map.

Two ideas keep the cost low:

* **Hybrid structure.** The lowest block is a plain ripple-carry adder. For the
  least significant bits a carry-select stage would only add multiplexer
  delay. Every higher block is a carry-select block built on one ripple chain
  instead of the usual two.
* **Local checking.** Each full adder checks itself from its own inputs and
  outputs. A wrong incoming carry does not cause a false report, so every
  error report points at one physical cell.

The RTL is plain synthesizable SystemVerilog and purely combinational.

## Organisation

```
 a,b[63:56]   ...   a,b[15:8]         a,b[7:0]
     |                  |                 |
 +----------+       +----------+      +----------+
 | CSeA blk |<- ... | CSeA blk |<-----| RCA blk  |<-- cin
 | 9 SFAs   |       | 9 SFAs   | cout | 9 SFAs   |
 +----------+       +----------+      +----------+
     |                  |                 |
  sum[63:56]        sum[15:8]          sum[7:0]
```

By default there are eight blocks (`NBLK = 8`) of eight bits each
(`BLK_BITS = '{default: 8}`). Each block is built from nine self-checking full
adders (SFAs), and the ninth is the spare. The carry-out of a block is the
actual carry-in of the next block. The block sizes may also grow by one from
block to block (m, m+1, m+2, ...). This "square-root" arrangement balances the
ripple delay inside a block against the select delay along the block chain.
`BLK_BITS` is an array for this purpose, and its entries must add up to `WIDTH`.

Module hierarchy:

```
hybrid_adder
 ├─ rca_block          (block 0)
 │   ├─ ips  ×(BITS+1) input shifter
 │   ├─ rbl  ×(BITS+1) SFA + carry bypass
 │   └─ ops  ×(BITS+1) output shifter (sum bits and carry-out)
 └─ csea_block         (blocks 1 .. NBLK-1)
     ├─ inl            bottom cell: SFA with carry-in 0   (contains ips)
     ├─ abl  ×BITS     upper cells, the top one spare     (contain ips)
     ├─ ops  ×(BITS+2) output shifter (sums, carry-0, X)
     └─ mofc           block carry-out
sfa = sfa_sum + sfa_cout + sfa_eqt + checker
hsa_pkg: fault-injection type and constants
```

## The self-checking full adder (`sfa`)

A full adder has a property that does not depend on whether its carry-in is
right. If A, B and Cin are all equal, then Sum and Cout are equal (0,0 or 1,1).
Otherwise they differ. The SFA computes:

* `Sum = not((A xor B) xnor Cin)`, which is the usual full-adder sum;
* `Cout = not((A xnor Cin)·¬A + (A xor Cin)·¬B)`, which is A when A = Cin and B otherwise;
* `Eqt = not((A xor B) + (A xor Cin))`, an equivalence tester that is 1 when all three inputs are equal;
* `G1 = Sum xnor Cout` and `Ef = G1 xor Eqt`.

`Ef` is 0 when the cell works. It is 1 when Sum or Cout is inverted, and also
when the equivalence tester itself fails (a false alarm). If Sum and Cout are
both inverted, the property still holds, and that fault goes undetected.

The three sub-modules follow a two-stage pass-transistor form: an XOR stage, a
selecting stage and an output inverter. Here that form is written as gates.

## Carry select on a single ripple chain (`inl`, `abl`, `mofc`)

A classic carry-select block adds twice, once for each possible carry-in. This
block adds once, with carry-in 0, and derives the carry-in-1 result from that
sum:

* Adding 1 to a number inverts its lowest bit. It inverts every higher bit
  whose lower bits are all 1.
* The INL (bottom cell) forms `S1 = ¬S0`.
* Each ABL forms `S1 = S0 xor X_prev`. Here `X` is an AND chain over the
  carry-in-0 sum bits: `X_i = X_{i-1} & S0_i`, and the INL starts it with `X = S0`.
* In each cell, the actual block carry-in selects `S0` or `S1`.
* The MOFC forms the block carry-out the same way: `C1 = C0 xor X_top`, and
  the carry-in selects `C0` or `C1`.

## Repair by shifting: the hardest part

Each block handles faults on its own. Number its physical cells 0 .. BITS; cell
BITS is the spare. Every cell has an SFA error `ef_own` and a **cumulative
flag** `ef_cum = ef_own | ef_cum(below)`. That flag is 1 at and above the lowest
faulty cell, and it drives every repair multiplexer:

| mechanism | where | rule |
|---|---|---|
| input shift (IPS) | cell p | operands `a[p], b[p]`, or `a[p-1], b[p-1]` when `ef_cum(p-1)` is set; the spare gets 0, 0 when nothing is shifted |
| carry bypass (CBP) | cell p | on `ef_own`, the cell's carry-out is its carry-in, so the chain skips the faulty adder |
| sum bypass (SBP) | INL/ABL | on `ef_own`, the sum fed to the X AND gate becomes 1, so `X` passes through unchanged |
| output shift (OPS) | bit j | result bit j comes from cell j, or from cell j+1 when `ef_cum(j)` is set |
| carry-out / X shift | block top | the block's carry (and in a CSeA block the MOFC's `X`) comes from cell BITS-1, or from the spare when `ef_cum(BITS-1)` is set |

Example: a block with a fault in cell 3.

* Cells 0–2 add bits 0–2 as usual.
* Cell 3 still receives bits 3 (its input mux looks at the flag *below* it,
  which is 0). Its checker fires, its carry bypass passes cell 2's carry
  upward, and its sum bypass keeps X unchanged.
* Cells 4–8 receive bits 3–7.
* The output shifter takes sum bits 3–7 from cells 4–8. The block carry and
  X come from cell 8, the spare.

The faulty cell's operands never depend on its own error, so the repair logic
contains no loop. It is a single combinational path.

Limits that follow from the structure:

* Each block repairs one fault. With two faulty cells in a block, one operand
  bit is lost, and the result is generally wrong. The error vector `ef` still
  shows both cells. With faults spread at random over the 72 SFAs, the chance
  that every fault lands in a different block is 1 for one fault, 63/71 = 0.887
  for two, and 0.684 for three.
* Repair happens on every addition and is not stored. A stuck-at fault that
  does not change the result for the current operands is not reported, and it
  does not matter.
* The multiplexers, OR gates and checker gates outside the SFA are not
  checked themselves.
* A false alarm from an equivalence tester only costs the spare. The result
  stays right.

## Interface

`hybrid_adder #(WIDTH = 64, NBLK = 8, BLK_BITS = '{default: 8})`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | WIDTH | operands |
| `cin` | in | 1 | carry-in |
| `fault_inj` | in | `sfa_fault_t [WIDTH+NBLK]` | fault-injection hooks, one per physical SFA; tie to `SFA_FAULT_NONE` |
| `sum` | out | WIDTH | sum |
| `cout` | out | 1 | carry-out |
| `ef` | out | WIDTH+NBLK | error output of every physical SFA |
| `blk_fault` | out | NBLK | block-level fault localization: some SFA in the block reported an error |

Physical SFAs are numbered block by block from the least significant end. Block
k owns SFAs `base(k) .. base(k)+BLK_BITS[k]`, where
`base(k) = (bits of the blocks below k) + k`. The last SFA of each range is the
spare. With the default sizes, SFA `9k + cell` belongs to block k.

`sfa_fault_t` (in `hsa_pkg`) has three bits: `sum_flip`, `cout_flip` and
`eqt_flip`. Each one inverts one internal node of that SFA.

Timing: there is no clock. All outputs settle one adder delay after the inputs
change. Register the adder wherever the surrounding pipeline needs it.

## What follows the original architecture and what is this design's own

These parts follow the published architecture:

* a ripple-carry block at the bottom and single-chain carry-select blocks above it;
* INL, ABL, MOFC and SFA logic, including the checker gates;
* one spare per block, the cumulative OR chain of error flags, and the input
  and output shifters;
* the carry bypass and the X-chain bypass;
* the 64-bit, 8 × 9 configuration.

These parts are this design's own choices:

* The **fault-injection hook** in every SFA. Use it for test; in use, tie it to
  `SFA_FAULT_NONE`.
* Taking the **block carry-out and the MOFC's X** from the spare after a fault,
  through the same output multiplexer as a sum bit.
* Feeding the **spare operands 0 and 0** when nothing is shifted.
* Applying the output shifter **after** the carry-select multiplexers in a
  carry-select block.
* The **X-chain bypass** that sets X_i = X_{i-1} on an error. Some wording of
  the architecture can be read the other way round. The bypass is the only
  reading under which the X chain skips the faulty cell.
* Making **`blk_fault`** a port.
* A parameterised **`BLK_BITS` array**, so that the equal-size blocks and the
  growing (square-root) sizes both come from the same RTL.

Published implementation figures came from a smaller FPGA build and are not
targets of this RTL: 68 LUTs, 130 I/Os, about 30 W dominated by I/O, and
2.4–2.8 ns input-to-output paths for a 32-bit instance.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M` at the end. Expected values come from integer
addition or from each module's truth table, computed in the testbench.

| testbench | what it covers |
|---|---|
| `tb_sfa_sum`, `tb_sfa_cout`, `tb_sfa_eqt` | exhaustive truth tables |
| `tb_sfa` | every input with every combination of injected faults; `Ef` must equal the parity of the inverted nodes |
| `tb_ips`, `tb_ops`, `tb_mofc` | the multiplexers and the final-carry module |
| `tb_rbl`, `tb_inl`, `tb_abl` | exhaustive cell tests, including bypass behaviour |
| `tb_rca_block`, `tb_csea_block` | 20 000 random additions, each with no fault or one fault anywhere in the block (spare included); exact error vector; double faults localized |
| `tb_hybrid_adder` | full 64-bit adder at default parameters; up to one fault in every block at once; counts each mechanism (faulty INL, faulty spare, false alarm, repaired block selected by carry-in 1, full 64-bit carry ripple through repaired blocks, all eight blocks repaired) and fails if one never happened |
| `tb_hybrid_adder_sqrt` | the growing-size arrangement, 4+5+6+7+8 = 30 bits |
| `tb_fault_recovery` | recovery rate for 1, 2 and 3 random faults among the 72 SFAs, compared with the one-spare-per-block probability |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/hsa_pkg.sv \
          tb/tb_hybrid_adder.sv --top-module tb_hybrid_adder -Mdir obj -o sim
./obj/sim
```

Each testbench runs in well under a second.
