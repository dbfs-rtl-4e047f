# Soft SIMD shift-add pipeline with Dynamic Bitwidth-Frequency Scaling

Quantised neural networks multiply small fixed-point numbers (3 to 16 bits).
This design multiplies them with shifts and additions instead of a
combinational multiplier. A 48-bit word is cut at run time into equal signed
subwords ("Soft SIMD"). All subwords are processed in parallel by one shifter
and one carry-ripple adder.

The adder's carry chain is cut at every subword boundary. Its real delay
therefore depends on the subword width, not on the 48-bit word. Dynamic
Bitwidth-Frequency Scaling (DBFS) uses this. Before each operation the
controller sets the clock period for that operation's subword width. A design
closed at 200 MHz for the full word can then run 3-bit operations at about
826 MHz and 24-bit operations at about 326 MHz. The supply voltage stays the
same.

The RTL here covers the datapath, the multiplication sequencer and the DBFS
controller. The clock generator itself is analog. It is outside the RTL; a
behavioural model of it is in `tb/`.

## Subwords and guardbits

| mode (`mode_e`) | `M3` | `M4` | `M6` | `M8` | `M12` | `M16` | `M24` |
|---|---|---|---|---|---|---|---|
| subword width | 3 | 4 | 6 | 8 | 12 | 16 | 24 |
| subwords per 48-bit word | 16 | 12 | 8 | 6 | 4 | 3 | 2 |

Subword *i* of width *w* occupies bits `[i*w +: w]` and holds a two's
complement value. The MSB of each subword is its **guardbit** position.
`softsimd_pkg::mode_mask()` turns a mode into a 48-bit mask with a 1 at every
guardbit.

- **Adder (`au_adder`).** Inside the ripple carry chain, both operand bits at a
  guardbit are forced to 0 for an addition and to 1 for a subtraction.
  - Addition: the carry leaving a subword is then always 0.
  - Subtraction: the carry is always 1. This is the "+1" of `A + ~B + 1` that
    the next subword needs.
  - The lowest subword takes `sub` as its carry-in.
  - The bit written at the guardbit is the subword's real sign bit. Each
    subword therefore holds its exact result modulo 2^w.
- **Shifter (`au_shifter`).** It is logarithmic: stages of 1, 2 and 4
  positions, so 0..7 in total. A bit whose source would come from the next
  subword up gets the subword's sign instead. This is an arithmetic shift that
  stays inside each subword.
- **Overflow rule.** Operands should carry their information in *w-1* bits,
  with the guardbit a copy of the sign. Then a sum or difference never
  overflows, and the extra bit absorbs the growth. Outside this rule, results
  wrap within the subword and never disturb a neighbour.

## Pipeline

```
             +--------- feedback (AU result register, SRC_FB) --------+
             v                                                         |
 R0..R3 --> X mux --> shifter (>>> k) --+                              |
 R0..R3 --> Y mux ----------------------+--> ripple add/sub --> res_q -+--> DPU --> R[dst]
                                        stage 1 (AU)                 stage 2   (+ out_data)
                                                         R[hisel] --> DPU upper word
```

- **Stage 1: `arith_unit` (AU).**
  - Computes `res = (X >>> k) +/- Y` in the operation's mode.
  - X and Y each come from R0..R3, from the AU's own result register (`SRC_FB`)
    or from zero.
  - The result lands in `res_q` one clock later.
  - An operation issued in the next cycle can read `res_q` back. A multiply
    therefore runs at one shift-add step per cycle.
- **Stage 2: `data_pack_unit` (DPU).**
  - A multiplexer network. It converts the AU result to the same subword width
    or to an adjacent one (3<->4<->6<->8<->12<->16<->24) and writes it into a
    register.
  - Its source is the subword sequence of `{R[hisel], res_q}`. Output subword
    *j* takes source subword `offset + j`.
  - Widening from *L* values to wider subwords needs two operations, for
    example offsets 0 and 4 for 6x8-bit to 12-bit.
  - Narrowing can gather values from two words into one.
  - `msb_align = 0` keeps the integer value: sign extension when widening,
    dropping MSBs when narrowing. This suits accumulators.
  - `msb_align = 1` keeps the fraction: zero padding when widening, dropping
    LSBs when narrowing. This suits requantisation.
  - A conversion between non-adjacent widths raises `conv_err` and writes zero.
- **`reg_file`.** Four 48-bit registers.
  - Written by the DPU at the end of stage 2, or loaded directly through
    `ld_*`. A pipeline write to the same register wins over a load.
- **Timing.** An operation issued in cycle *t* writes its register and appears
  on `out_valid`/`out_data` at the edge ending cycle *t+1*.
- **Read-after-write interlock.** An operation that reads a register written
  by the operation right ahead of it stalls for one cycle. `raw_stalls` counts
  these cycles.

### Micro-operation (`softsimd_pkg::uop_t`)

| field | meaning |
|---|---|
| `xsel`, `shamt` | shifted operand and shift amount 0..7 |
| `ysel`, `op` | added (`OP_ADD`) or subtracted (`OP_SUB`) operand |
| `mode` | AU subword width. This is also the width the clock is set for |
| `wb`, `dst` | write the DPU result to `R[dst]` |
| `dmode`, `hisel`, `offset`, `msb_align` | DPU conversion, as above |

## Multiplication by shift and add

A multiplication multiplies every subword of a register by one scalar *w*.
The scalar is read as fixed point with one integer bit, `Q1.(mbits-1)`, range
[-1, 1).

1. `csd_encoder` recodes *w* into canonical signed digits. Each digit is in
   {-1, 0, +1}, and no two non-zero digits are adjacent. A random 16-bit value
   has on average about 5.4 non-zero digits, close to a third of its bits.
2. `mul_sequencer` walks through the non-zero digits from the least
   significant end. It issues one AU step per digit:
   ```
   first digit d_i          : acc = 0 +/- A
   next digit d_j (j > i)   : acc = (acc >>> (j - i)) +/- A      (zeros skipped)
   after the last digit d_k : acc = acc >>> (mbits-1-k)         (if k < mbits-1)
   ```
   - A gap of more than 7 positions is split into extra `acc >>> 7` steps.
   - *w = 0* costs one step.
3. The result is `A * w / 2^(mbits-1)`, in A's format, truncated by at most one
   LSB per shift step.
4. The intermediate accumulator stays below 4/3 of |A|. The guardbit therefore
   holds it when A respects the *w-1*-bit rule.
5. Only the last step writes back, and only if requested. The product is
   always left in `res_q`, so the next command can use it as `SRC_FB`.

Example: *w = 7* in `Q1.3` is `0111` = `1 0 0 -1` in CSD. That takes two
steps, `acc = 0 - A` and `acc = (acc >>> 3) + A`, which gives 7A/8.

## DBFS clock control

`dbfs_clock_ctrl` sits in front of the AU. It compares the mode of the
operation waiting to issue with the mode the clock is set for.

1. If they differ, issue stops.
2. The controller raises `clk_req` with `clk_period_ps = T(W)`, where *W* is the
   subword width of that mode.
3. It waits for `clk_ack`, records the new mode, and lets the operation go in
   the next cycle.
4. The clock generator must keep `clk_period_ps` stable while `clk_req` is
   high. It changes its period without a glitch, then raises `clk_ack` for one
   cycle.

No operation starts under a clock that is too fast for it. This holds when
widths grow (accumulation) and when they shrink.

The shortest safe period is a constant part (shifter, multiplexers) plus one
adder bit per subword bit:

    T(W) = T_CONST + W * T_BIT,   T_CONST = 945.4 ps,  T_BIT = 88.42 ps

These two constants place the line through two points: 826 MHz at 3 bits and
326 MHz at 24 bits. Both come from post-layout results of a 28 nm, 0.9 V
implementation of this architecture. The other widths are interpolated on the
same line. For a different technology, set `T_CONST_FS`, `T_BIT_FS` and
`NOMINAL_PS`.

| W | 3 | 4 | 6 | 8 | 12 | 16 | 24 | (48, design time) |
|---|---|---|---|---|---|---|---|---|
| period (ps) | 1211 | 1300 | 1476 | 1653 | 2007 | 2361 | 3068 | 5000 (constraint) |
| MHz | 826 | 769 | 678 | 605 | 498 | 424 | 326 | 200 |

The DPU's delay does not depend on width and is shorter than the AU's. It
plays no part in the choice of period. After reset no width is set and the
design-time period (5000 ps) is requested.

## Commands (`softsimd_dbfs_top`)

- `cmd_t` is either `CMD_UOP` (one micro-operation) or `CMD_MUL`.
  - `CMD_MUL` fields: multiplier `w`, `mbits`, mode `mmode`, multiplicand
    register `msrc`, and optional write-back `mwb`/`mdst`.
- Commands use valid/ready. A multiplication is taken when the sequencer is
  idle. Later commands wait until all its steps have issued.
- `busy` is high while the sequencer, the AU stage or a clock change is active.
- Loads through `ld_*` bypass the pipeline. Make them when `busy` is low, or
  to registers nothing in flight uses.

### Mapping a dot product

Many dot products run side by side, one per subword. This is how a
convolution layer maps after im2col, and how a fully connected layer maps
directly. The end-to-end testbench runs one with six 8-bit lanes and six
weights:

1. Load the activation vector into R0.
2. `CMD_MUL` by weight *i*. The product is in `res_q`.
3. Accumulate into an 8-bit accumulator while the sum is sure to fit (two
   products).
4. Widen the accumulator to 12 bits (two words, R2 and R3).
5. For the following weights, widen each product the same way and add in
   12-bit mode.
   - The clock switches between the 8-bit and 12-bit periods each time.
6. Narrow the 12-bit sums back into one 8-bit word, keeping the MSBs. The
   DPU gathers from both registers.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/softsimd_pkg.sv tb/tb_lane_pkg.sv tb/tb_softsimd_dbfs_top.sv \
  --top-module tb_softsimd_dbfs_top -Mdir obj && obj/Vtb_softsimd_dbfs_top
```

- `tb_softsimd_dbfs_top` runs the design end to end at its full size.
- `tb_cnn_layers` runs convolution layers of the shapes found in small CNNs.
  Each computes one output channel for six output pixels, with 8-bit
  activations:
  - LeNet-5 conv1: 5x5x3 = 75 taps, 4-bit weights
  - LeNet-5 conv2: 5x5x6 = 150 taps, 3-bit weights
  - VGG16 conv1_1: 3x3x3 = 27 taps, 6-bit weights
  - ResNet20 stage-1 conv: 3x3x16 = 144 taps, 5-bit weights

  Products are summed in a 12-bit, then a 16-bit, accumulator, and the sums
  are requantised to 8 bits at the end. Every stage is compared exactly with
  an integer model. Each layer's run time is reported against the same cycle
  count at 200 MHz. This comes to 2.5x to 2.7x, including the cycles spent on
  clock changes (about 50 to 400 per layer).
- `tb_mul_throughput` multiplies random vectors by random scalars for every
  multiplicand width (3 to 24 bits) and multipliers of 3, 4, 6 and 8 bits.
  - It checks every lane of every product.
  - It measures the time the AU spends on the steps from the generated clock.
  - It prints multiplications completed per 5 ns, with DBFS and at a fixed
    200 MHz.
  - The gain must equal 5000 ps / T(W). That is 4.13x for 3-bit and 1.63x
    for 24-bit multiplicands.
  - With 3-bit multiplicands and 3-bit multipliers, about 39 multiplications
    complete per 5 ns, averaging 1.7 steps each.
- `tb_lane_pkg` holds the integer reference models the testbenches compare
  against.
- `prog_clock_gen_model` is the behavioural clock generator:
  - It generates the requested period.
  - It keeps the old period for a few cycles of relock time before switching.
  - Then it acknowledges.

What the testbenches establish:

- **Shifter and adder:** every mode, every shift, against integer arithmetic.
- **DPU:** every mode pair, offset and alignment.
- **CSD recoder:** all 65,536 16-bit values (value, non-adjacency, top digit).
- **Sequencer:** random products against the exact product with the
  truncation bound, and the step count against an independent
  non-adjacent-form count.
- **DBFS controller:** the requested and measured clock periods, and the
  stall length.
- **End to end, checked exactly:**
  - the dot product
  - 3-bit multiplications at the 1211 ps clock, one step per cycle
  - a 24-bit multiplication with a split shift
- **End to end, every mechanism seen at least once:** clock switches in both
  directions, interlock stall, feedback, CSD subtraction, zero skipping, split
  shift, widening, two-word narrowing. Every issued operation is also checked
  to run at its own width's period.

Assertions in the RTL report an error when a rule is broken (Verilator then
stops the simulation):
- a command changes while it waits for `cmd_ready`;
- the clock request changes while it is pending;
- an operation issues under a clock period other than its own width's;
- a multiplication names a source the sequencer cannot read.

Run Verilator with `--assert` to enable them.

## How far to trust it, and what is this design's own

Taken from the architecture as described:
- the 48-bit datapath and the seven subword widths
- guardbit-controlled add/subtract and arithmetic shift
- the carry-ripple adder and the logarithmic shifter with a 7-bit maximum
- the AU -> DPU two-stage order
- four feedback registers
- DPU conversions between adjacent widths only
- LSB-first CSD shift-add multiplication with zero skipping and LSB truncation
- setting the clock from the subword width
- 200 MHz at design time, 826 MHz at 3 bits and 326 MHz at 24 bits

Choices made here, where the architecture description gives no detail:
- the mask encoding and all control encodings (`uop_t`, `cmd_t`)
- the operand sources, and the shifter sitting in front of the adder
- what the adder writes at a guardbit (the exact sign, so results are exact
  modulo 2^w)
- the DPU's two-word source with offset and the choice of alignment
- the hardware multiplication sequencer, including how it splits long shifts
- the register load port and its priority
- the read-after-write interlock
- the req/ack clock handshake, and holding issue during every clock change
- the clock periods for 4 to 16 bits, interpolated rather than measured
- asynchronous active-low reset everywhere

Not covered:
- The clock generator itself, which is analog.
- The timing claim itself. That the carry chain really sets the critical path
  per width is a property of the physical implementation. Simulation cannot
  show it, and nothing here constrains it. To use DBFS on a real chip, time
  the AU under case analysis for each mode and fill in the period table.
- Energy, area, and comparison with a single-cycle combinational SIMD
  multiplier. The speedups the testbenches print compare this design with
  itself at a fixed 200 MHz, one layer shape at a time. They are not
  whole-network figures.
