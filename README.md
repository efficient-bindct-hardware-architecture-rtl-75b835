# 8x8 forward BinDCT-C7 in SystemVerilog

A multiplier-free 2D discrete cosine transform for 8x8 image blocks. The
BinDCT replaces the cosine rotations of Chen's DCT factorisation with
*lifting steps* whose coefficients are powers of two (or sums of two), so
every multiplication becomes an arithmetic right shift. This core uses the
**C7** coefficient set, which is close to the floating-point DCT in coding
gain at moderate cost:

| coefficient | P1  | U1  | P2 | U2  | P3  | U3  | P4  | U4              | P5  |
|-------------|-----|-----|----|-----|-----|-----|-----|-----------------|-----|
| value       | 1/2 | 1/2 | 1  | 1/2 | 1/4 | 1/4 | 1/2 | 3/4 = 1/2 + 1/4 | 1/2 |

The hardware is built for small area, not for many results per cycle. Pixels
enter one per clock and coefficients leave one per clock. In the default
build, each of the eight arithmetic stages (four per 1D pass) shares one
adder/subtractor (two in the last stage) over eight clock cycles. Three
larger and faster stage combinations can be selected with a parameter
(see [Architectures](#architectures)). The whole design is controlled by
three counters, with no state machine.

## The 8-point transform

One 1D pass turns x0..x7 into Y0..Y7 in four stages:

```
stage 1  a0 = x0+x7  a1 = x1+x6  a2 = x2+x5  a3 = x3+x4
         a4 = x3-x4  a5 = x2-x5  a6 = x1-x6  a7 = x0-x7
stage 2  Z0 = a5 - a6/2          H  = a6 + Z0/2
         Z1 = H + Z0/4           Z2 = Z1/2 - Z0
stage 3  b0 = a0+a3  b3 = a0-a3  b1 = a1+a2  b2 = a1-a2
         d0 = a4+Z2  d1 = a4-Z2  d3 = a7+Z1  d2 = a7-Z1
stage 4  Y0 = b0+b1              Y7 = d3/4 - d0
         Y1 = d3 - Y7/4          Y6 = b3/2 - b2
         Y2 = Y6/2 - b3          Y5 = d2 + d1
         Y3 = d2 - Y5/2          Y4 = Y0/2 - b1
```

`/2` and `/4` are arithmetic right shifts, which round toward minus
infinity. The factor U4 = 3/4 is applied as two shifted terms with the
intermediate sum H, so stage 2 needs only adds and shifts. A constant input
c gives Y0 = 8c and all other outputs 0. The 2D transform of a constant
block is therefore 64c at (0,0) and zero elsewhere. The testbenches check
this.

The signs are taken exactly as specified for this architecture. As a
result, Y2 is the negative of the more common lifting form `b3 - Y6/2`. If
you need the other sign convention, negate Y2 after the transform.

## Scheduling one pass on shared operators

This is the part that needs the most care. A counter, **cntr8**, counts
0,1,…,8 for the first line of a block. After that it reloads 1 whenever it
reaches 8, so each later line takes counts 1..8 (eight cycles). Every
multiplexer select, add/sub mode and register enable in a stage is decoded
directly from this count:

| count | stage 1 (1 add/sub) | stage 2 (1 add/sub) | stage 3 (1 add/sub) | stage 4 (2 add/subs) |
|-------|---------------------|---------------------|---------------------|----------------------|
| 1     | a6 = x1 − x6        |                     | d0 = a4 + Z2 (prev) |                      |
| 2     | a5 = x2 − x5        |                     | d3 = a7 + Z1 (prev) |                      |
| 3     | a0 = x0 + x7        | Z0                  | b2 = a1 − a2 (prev) |                      |
| 4     | a3 = x3 + x4        | H                   | d2 = a7 − Z1 (prev) | Y0, Y7 (prev)        |
| 5     | a1 = x1 + x6        | Z1                  | d1 = a4 − Z2 (prev) | Y1, Y6 (prev)        |
| 6     | a2 = x2 + x5        | Z2                  | b0 = a0 + a3        | Y2, Y5 (prev)        |
| 7     | a7 = x0 − x7        |                     | b3 = a0 − a3        | Y3, Y4 (prev)        |
| 8     | a4 = x3 − x4        |                     | b1 = a1 + a2        |                      |

"(prev)" means the operation still belongs to the line of the previous
8-cycle period. Stages 3 and 4 overlap the next line's stage 1 and 2. The
order is chosen from the data dependencies:

* a6 and a5 come first because the stage-2 chain Z0 → H → Z1 → Z2 is serial
  and everything odd waits for it.
* Stage 3 starts on its even half (b0, b3, b1) as soon as a0..a3 exist. Its
  odd half (d*) and b2 run in the next period.
* Stage 4 computes pairs in which the second member feeds the first member
  of the next pair: Y7 → Y1, Y6 → Y2, Y5 → Y3, Y0 → Y4.

Every register is read before its producer overwrites it with the next
line. For example, stage 4 reads b0 at count 4 and stage 3 rewrites it at
count 6. This is why no extra pipeline registers are needed between the
stages. A line is loaded into the X registers at the end of count 8. Its
Y0/Y7 are ready 12 cycles later, and its Y3/Y4 15 cycles later.

## Architectures

Each stage can be built in up to three ways:

* **S.1**: fully parallel, with one operator per result.
* **S.2**: one adder and one subtractor. The two results of an operand pair
  are computed together.
* **S.3**: the most shared form. It uses one add/sub, or two in stage 4.

The parameter `ARCH` of `bindct_2d` and `bindct_1d` selects one of four
combinations. All four keep the 8-cycle line period and the same control
structure. They differ only in the stage implementations and in the count
tables in `bindct_pkg::arch_sched`:

| `ARCH` | stage 1 | stage 2 | stage 3 | stage 4 | 1D latency | outputs (cycles) | published total |
|--------|---------|---------|---------|---------|------------|------------------|-----------------|
| 12 (default) | S.3 | S.3 | S.3 | S.3 | 21 | 107..170 | 170 |
| 30 | S.2 | S.3 | S.3 | S.3 | 18 | 101..164 | 166 |
| 22 | S.2 | S.3 | S.2 | S.3 | 17 | 99..162  | 162 |
| 7  | S.1 | S.3 | S.2 | S.3 | 16 | 97..160  | 160 |

Here "1D latency" (LAT) is the cycle, counted from a line's first sample,
in which the serializer reads Y0 of that line.

Only ARCH 12's operation order is taken from the published design. The
other three are this design's own schedules: every operation is placed as
early as its inputs and its operator allow. Each schedule satisfies two rules:

* No register is overwritten by the next line before its last reader has
  used it.
* Yk is computed no later than cycle LAT+k−1 and no earlier than cycle
  LAT+k−8, so the serializer finds it when it reads it.

The schedules, in cntr8 counts (a line's stage-1 period is counts 1..8,
and later counts belong to the next period):

* **ARCH 22:**
  * stage 1: a1/a6, a2/a5, a0/a7, a3/a4 on 1..4;
  * stage 2: Z0, H, Z1, Z2 on 3..6;
  * stage 3: b1/b2 on 3, b0/b3 on 5, d3/d2 on 6, d0/d1 on 7;
  * stage 4: Y0/Y7 on 8, then Y1/Y6, Y2/Y5, Y3/Y4 on 1..3.
* **ARCH 7:**
  * stage 1: all eight results on 1;
  * stage 2: 2..5;
  * stage 3: b1/b2 on 2, b0/b3 on 3, d3/d2 on 5, d0/d1 on 6;
  * stage 4: Y0/Y7 on 7, Y1/Y6 on 8, Y2/Y5 on 1, Y3/Y4 on 2.
* **ARCH 30:**
  * stage 1 and 2 as ARCH 22;
  * stage 3: b1, b2, b0, b3, d3, d0 on 3..8, then d2 and d1 on 1 and 2;
  * stage 4: Y6 on 8, Y0/Y7 on 1, Y1/Y2 on 2, Y4/Y5 on 3, Y3 on 4.

ARCH 7 and 22 reproduce the published cycle counts exactly. ARCH 30
finishes two cycles earlier than published: 164 instead of 166. Its single
stage-3 operator starts on b1 and b2 while stage 1 is still producing the
other pairs.

### Using one pass on its own

`bindct_1d` is a complete 8-point transform with eight parallel inputs and
outputs. It needs only a cntr8 count, which must run 1..8 with the line
loaded into `x` at the end of count 8. Set `W` to the input word length;
the outputs are W+4 bits wide.

Built as ARCH 22, all eight results of a line are valid together from 20
to 24 cycles after the cycle its first sample would have entered an input
block. In terms of the parallel load, that is from 12 to 16 cycles after
the load. `tb_bindct_1d_parallel` runs this configuration at 12- and
16-bit inputs. This is the form in which the design is usually compared
with other 8-point DCT approximations.

## From 1D to 2D

```
xin ─► input block 1 ─► 1D pass 1 ─► serializer ─► transpose ─► input block 2 ─► 1D pass 2 ─► serializer ─► yout
        (cntr8-1)        8→12 bit    ("before      memory        (cntr8-2)        12→16 bit    (output)
                                      SRAM")       64 x 12 bit
                      bindct_cycle_ctrl ("Cntr-N-Cycle") enables both passes, the memory and out_rdy
```

* **Input block.** This is an 8-deep shift register plus eight X registers
  that load when cntr8 reads 8. The first line therefore takes 9 cycles and
  every later line 8 cycles, so a sample is accepted every cycle.
* **Serializer.** This is an 8-to-1 multiplexer over the stage-4 registers,
  selected by the count: Y0 on count 5 … Y3 on 8, then Y4 … Y7 on counts
  1..4. Each Yk is read in the cycle after it is written, at the earliest.
  It is read in the cycle before the next line overwrites it, at the latest.
  The stream therefore runs without gaps, in ascending order.
* **Transpose memory.** The memory holds 64 words. Writes go row by row to
  address w. Read r goes to address `(r%8)*8 + r/8`, which is the row and
  column halves of the pointer swapped. Writes are synchronous, and reads
  are synchronous with one cycle of latency.
* **Word widths.** Each stage adds one bit: 8 → 9 → 10 → 11 → 12 in the first
  pass and 12 → … → 16 in the second. The integer reference shows that the
  worst-case values fit, and the testbenches drive all-(−128), all-127 and
  checkerboard blocks without mismatch.

Timeline of one block (default ARCH 12), counting the `start` cycle as
cycle 0. For another architecture with pass latency LAT, the windows are:

* writes: LAT..LAT+63
* reads: LAT+64..LAT+127
* second pass: from LAT+65
* output: 2·LAT+65..2·LAT+128

| cycles   | what happens                                                              |
|----------|---------------------------------------------------------------------------|
| 0..63    | 64 samples enter, row-major                                               |
| 0..84    | cntr8-1 runs (line 7's stage 4 and serializer end at 84)                  |
| 21..84   | first-pass results are written to the transpose memory, one per cycle    |
| 85..148  | memory read column by column                                              |
| 86..170  | cntr8-2 runs the second pass                                              |
| 107..170 | `out_rdy`: the 64 coefficients on `yout`, one per cycle                   |

The second pass starts only after the last first-pass result has been
written. The first coefficient appears in cycle 107 and the last in cycle
170. These are also the figures published for this architecture.

Output order: coefficient k of the stream is C[k%8][k/8]. The row index is
the vertical frequency and the column index the horizontal one. The output
is column by column, because the second pass works on columns.

## Interface (`bindct_2d`)

| port      | dir | width | meaning                                                               |
|-----------|-----|-------|-----------------------------------------------------------------------|
| `clk`     | in  | 1     | clock                                                                 |
| `rst_n`   | in  | 1     | asynchronous reset, active low                                        |
| `start`   | in  | 1     | high in the cycle the first sample is on `xin`; ignored unless `ready` |
| `xin`     | in  | 8     | signed samples (for pixels, subtract 128 first), row-major, 64 consecutive cycles |
| `ready`   | out | 1     | a `start` in this cycle would be accepted                             |
| `busy`    | out | 1     | a block is in flight                                                  |
| `out_rdy` | out | 1     | `yout` holds a coefficient                                            |
| `yout`    | out | 16    | signed coefficient                                                    |

There is no back-pressure. Once started, the samples must arrive on
consecutive cycles, and the output must be taken when `out_rdy` is high.

The parameter `CONTINUOUS` selects the operating mode:

* **`CONTINUOUS = 0` (default): one block at a time.** There is one transpose
  memory, and `ready` is low for cycles 1..170 after a start. The peak
  throughput is 64 pixels per 171 cycles.
* **`CONTINUOUS = 1`: continuous streaming.** A second transpose memory is
  added, and the two are used in ping-pong: the second pass reads block b
  from one while the first pass writes block b+1 into the other.
  * A new block may start exactly 64 cycles after the previous one. The
    samples then form an unbroken stream, and after the first 107 cycles the
    output delivers one coefficient every clock.
  * A new block may also start at least 86 cycles after the previous one.
    This leaves each cntr8 a gap in which it returns to 0.
  * Every block still has the 107/170-cycle latency from its own start.
  * The minimum gap is LAT+65 cycles for the other architectures.

## Area and speed

The published implementations on a Xilinx Virtex-6 all ran at
378.2 MHz, a clock limited by the transpose memory. Their sizes were:

| `ARCH` | LUTs | registers | cycles per block |
|--------|------|-----------|------------------|
| 12     | 813  | 1817      | 170 |
| 30     | 833  | 1809      | 166 |
| 22     | 846  | 1801      | 162 |
| 7      | 938  | 1801      | 160 |

At that clock:

* Single-block mode gives about 141 Mpixel/s. With ARCH 7, which takes 161
  cycles per block, it gives about 150 Mpixel/s. That is enough for 1080p
  at 60 Hz (148.5 Mpixel/s).
* Continuous mode gives 378 Mpixel/s.

This RTL has not been placed and routed, so those numbers are the reference
implementation's, not measurements of this code. Technology-independent
synthesis of the default top gives about 600 word-level cells, 1053
flip-flop bits and 768 memory bits, which are the transpose memory.

A generic yosys mapping to 6-input LUTs, with the transpose memory built
from flip-flops and its read multiplexer in LUTs, gives:

| `ARCH` | LUTs |
|--------|------|
| 12     | 1684 |
| 30     | 2016 |
| 22     | 2034 |
| 7      | 2125 |

These counts are not comparable with the published ones in absolute
terms. They do rank the four architectures in the same order.

## Where this RTL departs from, or adds to, the published design

* **Architecture.** The default is the most resource-shared variant (Arch
  N°12). The three other retained combinations (N°7, 22, 30) are built with
  this design's own schedules (see [Architectures](#architectures)). ARCH 30 is two
  cycles faster than published. The discarded combinations of the
  exploration are not selectable. Stage 2 exists only as S.3, and stage 4
  only as the two-operator form, because no retained combination uses the
  other forms.
* **Rounding.** Shifts are arithmetic, which rounds toward minus infinity.
* **Signed input.** Input samples are signed two's complement.
* **Reset.** There is an asynchronous reset to zero for all registers except
  the memory array.
* **Serializers.** The serializers are pure multiplexers over the stage-4
  registers. This reproduces the published 107/170-cycle figures exactly.
* **Controller windows.** The cycle controller's window bounds (21, 84, 85,
  86, 107, 148, 170 for ARCH 12) are derived from the stage schedule above.
* **Continuous-mode rules.** The start-acceptance rules, the three in-flight
  block slots and the bank-switching scheme are this design's own. The
  published description only says that a second memory with a
  demultiplexer and a multiplexer is added.
* **No extra handshake.** `ready` and `busy` were added for convenience.
* **Count decoding.** Each stage compares the full 4-bit count with its
  schedule table. The published control words use only the two or three low
  count bits per stage. The decoded controls are the same, but the
  comparison logic is a little larger.

## How far it is verified

Each module has a self-checking testbench. Every testbench compares against
an integer model (`tb/bindct_ref_pkg.sv`), which evaluates the equations
above in 32-bit arithmetic and so cannot overflow. The stage testbenches
also check on which count each result is written.

* `tb_bindct_2d` runs nine blocks through the default design:
  * constant, extreme, checkerboard, edge and random blocks;
  * back-to-back and gapped starts;
  * an ignored start.
  It checks every coefficient and the 107/170 timing. It also counts that
  each control mechanism occurred.
* `tb_bindct_2d_stream` runs eight blocks in continuous mode. It checks
  every coefficient's value and cycle, the 256-cycle unbroken output run of
  a four-block burst, and the refused starts.
* `tb_bindct_2d_arch` runs all four architectures side by side on the same
  input, in single-block mode, and ARCH 22 and 7 in continuous mode. It
  checks every coefficient's value and cycle. It also checks the accepted
  and refused starts and a 512-cycle unbroken output run.
* `tb_bindct_1d` runs the four architectures' 1D passes on the same lines.
  It checks each Yk in exactly the cycle the serializer reads it. A
  latency one cycle off in either direction makes this check fail.

Nothing has been checked on an FPGA or against a floating-point DCT beyond
the DC case.

## Files

| file | contents |
|------|----------|
| `rtl/bindct_pkg.sv` | widths, C7 shift amounts, architecture schedule tables, timetable |
| `rtl/bindct_2d.sv` | top level |
| `rtl/bindct_cycle_ctrl.sv` | Cntr-N-Cycle controller |
| `rtl/bindct_cntr8.sv` | cntr8 sequencer |
| `rtl/bindct_input_block.sv` | serial-to-parallel input |
| `rtl/bindct_1d.sv` | one 1D pass (stages 1–4) |
| `rtl/bindct_stage1.sv` … `bindct_stage4.sv` | the four stages (S.1/S.2/S.3 where used) |
| `rtl/bindct_serializer.sv` | parallel-to-serial output |
| `rtl/bindct_transpose_ram.sv` | 64-word transpose memory |
| `rtl/bindct_transpose_pingpong.sv` | double transpose memory (continuous mode) |
| `tb/bindct_ref_pkg.sv` | integer reference model |
| `tb/tb_*.sv` | one testbench per module, plus the two end-to-end tests |

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/bindct_pkg.sv tb/bindct_ref_pkg.sv tb/tb_bindct_2d.sv --top-module tb_bindct_2d
./obj_dir/Vtb_bindct_2d
```

Replace `tb_bindct_2d` with any other testbench name. Each testbench ends
with a line `TB_RESULT checks=N failures=M`. A watchdog ends the run with a
failure if it hangs.

## Changing it

* **Input width.** Change `IN_W` in `bindct_pkg`. The intermediate and
  output widths follow from it (+4 bits per pass).
* **Coefficient set.** Another BinDCT coefficient set whose coefficients are
  single powers of two only needs new `SH_*` constants. Coefficients with
  more terms need extra steps in stage 2 or 4, and so a new schedule.
* **Schedule.** A schedule is one entry of `arch_sched` in `bindct_pkg`. Any
  new entry must keep the two rules from [Architectures](#architectures),
  and its `lat` field must be the resulting pass latency. The serializer
  offset and the controller windows follow from `lat`. Add the new entry to
  `tb_bindct_1d`, which checks both rules directly.
