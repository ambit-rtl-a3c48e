# Ambit: bulk bitwise operations inside commodity DRAM

When a DRAM row is activated, every cell of the row shares its charge with a
bitline, and the sense amplifiers drive each bitline to full 0 or 1 and write
the value back into the cells. Ambit makes two small changes to that array.
The DRAM interface stays as it is.

* **Three rows at once.** If three rows are raised together, each bitline sees
  three cells. The sense amplifier then settles on their **bitwise majority**.
  If one of the three rows holds all zeros, the majority is the AND of the
  other two; if it holds all ones, it is the OR.
* **A second wordline on some cells.** A few rows use *dual-contact cells*.
  Each such cell can connect either to the bitline or to the inverted bitline
  on the other side of the sense amplifier. A value written through the
  inverted side is stored inverted, which gives NOT.

The memory controller gets everything else from ordinary ACTIVATE and
PRECHARGE commands sent to reserved row addresses. An 8 KB row is one operand,
and all banks work in parallel.

This repository holds a synthesizable SystemVerilog model of the whole path:

* the reserved-address decoder;
* a subarray at the level of whole rows;
* banks and chips;
* a rank of eight chips;
* a memory controller that accepts
  `bbop(op, dst, src1, src2, size)` requests for not, and, or, nand, nor, xor
  and xnor, together with plain 64-bit reads and writes.

## Row address groups

Each subarray has 1024 row addresses, split into three groups:

| group | addresses | what they select |
|---|---|---|
| B | B0-B15 (local 0-15) | the four compute rows T0-T3 and the two dual-contact rows DCC0 and DCC1, alone or in pairs and triples |
| C | C0, C1 (local 16, 17) | a row of zeros and a row of ones, set at reset |
| D | D0-D1005 (local 18-1023) | data rows, the only rows software sees |

The B-group has its own small decoder (`ambit_bgroup_decoder`). One B address
can raise up to three wordlines, so a triple-row activation is a single
ACTIVATE:

| B | raises | B | raises |
|---|---|---|---|
| B0-B3 | T0-T3 | B8 | DCC0 n-wordline, T0 |
| B4 | DCC0 d-wordline | B9 | DCC1 n-wordline, T1 |
| B5 | DCC0 n-wordline | B10 | T2, T3 |
| B6 | DCC1 d-wordline | B11 | T0, T3 |
| B7 | DCC1 n-wordline | B12 | T0, T1, T2 |
| | | B13 | T1, T2, T3 |
| | | B14 | DCC0 d-wordline, T1, T2 |
| | | B15 | DCC1 d-wordline, T0, T3 |

The *d-wordline* connects a DCC to the bitline. The *n-wordline* connects it to
the inverted bitline. B8 and B9 are what make xor short: one ACTIVATE stores a
source row in T0 and its complement in DCC0.

Where the groups sit inside the 10-bit local address is this design's own
choice.

## How a subarray executes commands

This is the least obvious part of the model. It is easiest to follow as a
sequence of commands to one subarray (`ambit_subarray`, `ambit_sense_amp`).

1. **First ACTIVATE** from the precharged state. The rows it raises, one to
   three of them, are resolved. One row is simply read. Three rows give their
   majority. The result is latched in the sense amplifiers, and every raised
   row is overwritten with it. A DCC raised through its n-wordline is
   overwritten with the complement. This restore is what makes a triple-row
   activation destructive: T0, T1 and T2 all end up holding the result.
2. **Second ACTIVATE** while the sense amplifiers are still on. Nothing is
   sensed again. The amplifiers hold their value, so the new rows are simply
   overwritten by the latched value. This is the in-DRAM copy at the heart of
   every step. It is also how `AAP(B4, Dk)` moves the complement held in DCC0
   out to a data row.
3. **PRECHARGE** lowers every wordline and disables the sense amplifiers.

A step is therefore either **AAP(a1, a2)**, meaning ACTIVATE a1, ACTIVATE a2,
PRECHARGE (copy the result of a1 into a2), or **AP(a)**, meaning ACTIVATE a,
PRECHARGE (used for an in-place triple-row activation).

Column READ and WRITE are served from the latched row, as in any DRAM.

The cells are stored bits. The analog charge sharing is replaced by its
logical result.

## Operation programs

`ambit_op_program` lists the steps of each operation. Di and Dj are the sources
and Dk is the destination.

```
not : AAP(Di,B5)  AAP(B4,Dk)
and : AAP(Di,B0)  AAP(Dj,B1)  AAP(C0,B2)  AAP(B12,Dk)
nand: and's first three steps, then AAP(B12,B5)  AAP(B4,Dk)
xor : AAP(Di,B8)  AAP(Dj,B9)  AAP(C0,B10)  AP(B14)  AP(B15)  AAP(C1,B2)  AAP(B12,Dk)
```

The other three programs are derived by changing control rows:

* or and nor use C1 where and and nand use C0.
* xnor swaps C0 and C1 in the xor program. B14 and B15 then compute
  `!Di | Dj` and `Di | !Dj`, and the final triple-row activation ANDs them.

Every program reads its sources into the compute rows before computing, so the
data rows are never destroyed.

## Split decoder timing

A plain AAP needs two full row cycles, `2*tRAS + tRP` = 80 ns at DDR3-1600.
The B-group has its own decoder, so when exactly one address of an AAP is in
the B-group, the second ACTIVATE can be sent soon after the first. The AAP
then takes about tRAS + 4 ns + tRP.

`ambit_aap_engine` issues these timings in clock cycles of 1.25 ns:

| step | commands | cycles |
|---|---|---|
| overlapped AAP | ACT, ACT at +tRCD (8), PRE at +32, next at +40 | 40 (50 ns) |
| serial AAP (both addresses in the same decoder, or `SPLIT=0`) | ACT, ACT at +28, PRE at +56, next at +64 | 64 (80 ns) |
| AP | ACT, PRE at +28, next at +36 | 36 |

The 4 ns overlap rounds up to 4 cycles, so the overlapped AAP is 50 ns rather
than 49 ns. One xor row operation takes 5×40 + 2×36 = 272 cycles. An and takes
160 cycles.

Only the nand step `AAP(B12, B5)` falls back to serial timing, because both of
its addresses are B-group.

## Controller and interleaving

`ambit_controller` turns a bbop into row operations.

* **Address map.** Byte address `a` is in global row `g = a / 8192`. That row
  lives in bank `g mod 8`, subarray `(g / 8) mod 2`, data row
  `D[g / 16]`. Contiguous data is therefore spread over all banks.
* **Acceptance check.** A bbop is accepted only if:
  * all operands are row-aligned;
  * the size is a non-zero whole number of rows;
  * all operands start at the same bank and subarray (congruent modulo 16
    rows);
  * all rows exist.

  Otherwise it is answered with `rsp_rejected`, and the host must compute the
  result itself.
* **Dispatch.** Each bank has its own AAP engine. The controller hands out one
  row operation per cycle, in order, and waits if the target bank's engine is
  still busy. A round-robin arbiter lets one engine drive the shared command
  bus per cycle. Engines that lose a cycle simply slip by a cycle, because all
  delays are minimums.
* **Host reads and writes.** These are closed-page ACT, RD/WR, PRE sequences.
  They are served only when no bbop is in progress.
* **Statistics.** `stats` counts overlapped AAPs, serial AAPs, APs, dispatch
  stalls, command-bus conflicts and rejected requests.

## Rank model

`ambit_system` joins the controller to eight x8 chips that run in lock-step:

* Every chip receives the same commands and holds 1 KB of each 8 KB row.
* Chip c carries data bits `8c+7:8c` of the 64-bit word.
* Each chip has 8 banks (`ambit_chip`).
* Each bank has 2 subarrays (`ambit_bank`).

At the defaults the rank stores 8 × 2 × 1006 rows × 8 KB = 131.9 MB of data
rows.

## Departures from the described design

* **Subarrays per bank.** The number is not given. Two are used, which keeps
  simulation memory low. The design is parameterised by `N_SUB` (a power of
  two).
* **Gap between the two ACTIVATEs.** The second ACTIVATE only has to wait until
  the first row is well on its way to being sensed; no figure is given. tRCD is
  used.
* **Not modelled:**
  * tRRD/tFAW limits between banks;
  * refresh;
  * CAS latency (read data returns one cycle after READ);
  * bursts (one column access moves 64 bits).
* **Host and bbop traffic are not interleaved.** Host accesses wait for the
  bbop to finish.
* **Operands in different subarrays are rejected.** They are not copied
  between subarrays; that copy mechanism (RowClone-PSM) is not built.
* **Host-side parts are not built:** the CPU bbop instruction, the driver that
  co-locates bit vectors, and cache flushing and invalidation before an
  operation.
* **Two cells with different values** activated together from the precharged
  state resolve to 0. No program does this.

## Files

| file | role |
|---|---|
| `rtl/ambit_pkg.sv` | sizes, timing, command / operation types |
| `rtl/ambit_bgroup_decoder.sv` | B0-B15 to wordlines |
| `rtl/ambit_row_decoder.sv` | group classification, C/D index |
| `rtl/ambit_sense_amp.sv` | row of sense amplifiers: read, majority, latch, columns |
| `rtl/ambit_subarray.sv` | rows, DCC rows, restore and copy behaviour |
| `rtl/ambit_bank.sv`, `rtl/ambit_chip.sv` | bank and chip command decode |
| `rtl/ambit_op_program.sv` | AAP/AP programs of the seven operations |
| `rtl/ambit_aap_engine.sv` | per-bank command sequencer with overlapped timing |
| `rtl/ambit_controller.sv` | bbop checking, interleaving, dispatch, host access |
| `rtl/ambit_system.sv` | top: controller plus rank |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_ambit_workloads.sv` | application kernels run through the whole system |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example:

```
verilator --binary --timing -Irtl rtl/ambit_pkg.sv tb/tb_ambit_system.sv \
    --top-module tb_ambit_system -o sim && ./obj_dir/sim
```

The end-to-end testbench `tb_ambit_system` uses 4 banks, 2 subarrays and
64-bit rows per chip (a 64-byte rank row). It does the following:

* writes vectors of five rows;
* runs all seven operations and compares every word read back;
* checks that misaligned and cross-subarray requests are rejected;
* counts the mechanisms used: triple-row activations, negating writes through
  an n-wordline, ACTIVATEs overlapping in several banks, and overlapped,
  serial and AP steps;
* checks the latency of each row operation against the timings above.

`tb_ambit_workloads` uses the same configuration. It runs three application
kernels as chains of bulk operations on 4096-bit vectors (eight rows each):

* **Bitmap-index query.** Weekly activity is the OR of seven daily bitmaps.
  The query finds users active in every week, overall and within one gender.
* **Bit-sliced column scan.** It evaluates `value < 11` over 4-bit values
  stored as four bit slices, using running less-than and equal vectors.
* **Set operations.** Union, intersection and difference of three sets.

Each result is compared with a reference computed directly from the inputs.
The testbench also checks that an eight-row OR takes 320-400 cycles.

That is the largest configuration simulated. The full-width top (8 KB rows,
8 banks, 2 subarrays, eight chips) passes lint and elaboration. It has not been
simulated, because a verilator build of the complete 1 Gbit rank does not finish
in a reasonable time.
