# FIR filtering for an audio ASIC: from one multiplier to 256

An audio amplifier controller delivers 32-bit samples at 48 to 192 kHz and
a 49.152 MHz master clock. At 192 kHz that leaves **256 clock cycles per
sample**, and a FIR filter has to produce its output inside that budget:

    y[n] = sum_{k=0}^{N-1} c_k * x[n-k]

A 100-tap filter can be computed by one multiplier over about 100 cycles,
or by 100 multipliers in a single cycle. Every point in between is possible
too. This RTL implements that trade-off as two designs:

* **`fir_dsp`**, a small programmable DSP with `NUM_MEM` multipliers
  working in parallel. `NUM_MEM = 1` is a classic single-MAC processor.
  Larger values split the sample and coefficient stores over `NUM_MEM`
  memories, so a filter of N taps takes `ceil(N/NUM_MEM)` multiply cycles.
  `NUM_MEM` may be 1 to 255; 1..33, 64, 110, 128 and 255 are simulated.
  A parameter also removes its clock gating, for comparison.
* **`fir_parallel`**, a fully parallel filter with 256 multipliers and a
  delay line whose active length is chosen at run time.

`fir_dsp_top` places both side by side with separate ports and a shared
clock and reset. By default it has `NUM_MEM = 2` and 256 parallel taps.

## Number format

Samples, coefficients, the accumulator and the outputs are all signed
**Q1.31**, i.e. 32-bit two's complement with 31 fraction bits
(`fir_dsp_pkg::sample_t`).

A product is formed at 64 bits, and bits 62..31 are kept. Keeping those
bits truncates toward minus infinity and wraps on overflow: -1 × -1 gives
-1. Sums wrap at 32 bits. The hardware does no rounding and no saturation;
if you need either, add it in `fir_dsp_pkg::fx_mul` and the adders. Every
reference model in the testbenches uses the same rules, so results are
compared bit-exactly.

## The programmable DSP (`fir_dsp`)

### Datapath

```
 frame_trig ──► prog_counter ──► P-MEM (256 words) ──► instruction
                                                         │
 sample_in ──► X memories 0..n-1 ◄── xaddr_decoder ◄── xptr_ctrl (base, rd_sel,
                   │ (ceil(256/n) words)                  shft_cnt, wr_sel, wr_ptr)
                   ▼
             barrel_shifter ──► lane reverse ──► X registers ─┐
                                                              ├─► n multipliers ─► adder tree
 Y memories 0..n-1 (row = mem_pnt) ──────────────► Y registers ┘        │
                                                             accumulator ─► output register (sout)
```

The memories read asynchronously and write on the clock edge. They are
flip-flop arrays that stand in for SRAM. The X/Y registers, the
accumulator, the output register, the pointers and the program counter all
run on a **gated clock** (see "Clock gating and `busy`" below).

### Instruction word

Each P-MEM word is one instruction. The packed fields, MSB first, are
`{xbase_inc, xwr_en, prog_jump, mem_pnt[AW-1:0], outp, acc_en}`, with
`AW = clog2(ceil(256/NUM_MEM))`. The word is therefore AW+5 bits wide:
12 bits for n = 2 and 13 bits for n = 1.

| field | effect when set |
|---|---|
| `acc_en` | accumulator += sum of the n lane products in the X/Y registers |
| `outp` | output register <= accumulator, accumulator <= 0 (wins over `acc_en`) |
| `mem_pnt` | row to read: Y memories at `mem_pnt`, X memories at `base - mem_pnt` (or one row earlier, see below) |
| `prog_jump` | end of program: the program counter parks at address 255 |
| `xwr_en` | write `sample_in` into the next X slot |
| `xbase_inc` | one output is done: advance the read pointers for the next frame |

A read instruction loads the X/Y registers, and the following
instruction's `acc_en` consumes them. The read and the multiply are thus
pipelined by one cycle.

### The FIR program

For N taps with `P = ceil(N/NUM_MEM)`, the program is `P + 4` words long:

| addr | instruction |
|---|---|
| 0 | `xwr_en`: store the new sample |
| 1 | read row 0 |
| 2 .. P | read row r = 1..P-1, `acc_en` |
| P+1 | `acc_en` (last row) |
| P+2 | `outp`, `xbase_inc` |
| P+3 | `prog_jump` |

Measured from the clock edge on which `frame_trig` is seen, the new output
appears in `sout` after **P+3 edges**. `busy` drops after P+4, and the core
clock runs for P+5 edges per sample. A 100-tap filter therefore needs 104
cycles with one multiplier, 54 with two, 29 with four and 5 with 255. Every
case fits the 256-cycle budget. The Y memories must hold zero in the unused
lanes of the last row whenever N is not a multiple of n.

Coefficient `c_j` goes to **Y memory `j mod n`, row `j div n`**. Samples are
written the same way: the k-th sample written lands in X memory `k mod n`,
row `k div n`. Both X rows and sample counts wrap, so the X memories form a
single circular buffer of `n * ceil(256/n)` samples.

### Matching samples to coefficients (the hard part)

In read step `r`, lane `m` holds coefficient `c_(r*n+m)`. Suppose the
newest sample is number `k`. Then lane m needs sample `k - r*n - m`, which
is stored in X memory `(k-m) mod n`, at row `(k - r*n - m) div n`. Two
things follow:

* **Rows.** Every X memory is read either at `base - mem_pnt` or at
  `base - mem_pnt - 1`, circularly. The per-memory choice is the `rd_sel`
  vector in `xptr_ctrl`. On each `xbase_inc` it steps through
  `0111 → 0011 → 0001 → 0000 → 0111…`, which is the example for n = 4. When
  it returns to the full pattern, `base` advances one row. The base
  therefore moves once every n samples.
* **Lanes.** The n memory outputs are rotated by the barrel shifter:
  `out[k] = in[(k + shft_cnt) mod n]`. The shifter has `ceil(log2 n)`
  stages, and stage s rotates by 2^s when bit s of the count is set. The
  rotated vector is then reversed into the X registers
  (`xreg[m] = rotated[n-1-m]`). `shft_cnt` starts at `1 mod n` and
  advances mod n with each `xbase_inc`.

The net effect is exactly the formula above. A wrong shift direction,
missing reversal or wrong row select shows up at once in the testbenches'
reference comparison.

### Clock gating and `busy`

A register `running` is set by `frame_trig` and cleared when the
`prog_jump` instruction executes.
- The core clock is gated by `frame_trig | running`, so between programs
  nothing in the core toggles. The gate is also open while `rst` is high,
  so the registers behind it are reset even without a clock edge arriving
  from a running program.
- The memories have their own gate, which a programming write also opens.
  Memories can thus be loaded while the core is stopped.

The gate is a latch (transparent while the clock is low) followed by an AND
gate, the usual integrated clock-gating cell.

While not running, the decoder executes a no-operation instead of the
P-MEM word at the parked address. The first edge of a frame therefore only
restarts the program. Reset parks the program counter at address 255.

Setting the parameter `CLOCK_GATING` to 0 builds the ungated variant the
original also measured. Both gates are removed and the clock runs all the
time. The registers then hold between programs through their enables:
the no-op keeps the pointers, accumulator and output still, and the X/Y
registers load only while the core is enabled. The default is 1 (gated).

A new `frame_trig` must not arrive while `busy` is high, and no memory may
be programmed while `busy` is high. Both rules are assertions in `fir_dsp`.

### Programming port

When `prog_we` is high, `prog_data` is written on the clock edge:
- `prog_target` selects the memory: `PT_PMEM`, `PT_XMEM` or `PT_YMEM`;
- `prog_bank` picks which X or Y memory;
- `prog_addr` gives the word.

The memories have no reset, so load the program, the coefficients and the
sample history before the first frame. Zero the history if you want a clean
start.

## The fully parallel filter (`fir_parallel`)

The filter has 256 positions. Each position has a coefficient register, a
32×32 multiplier and a multiplexer that can inject the input sample. A
delay line of 255 registers runs from high to low positions, and an adder
tree sums the products.

With injection position `p = inj_pos` the filter has **p+1 taps**:
- position p gets the input sample;
- positions below p get their delay register;
- positions above p contribute zero, and their registers are not clocked.

Store coefficient `c_i` at position `p - i` through `coef_we/coef_addr/coef_data`.

Present a sample with `frame` high for one cycle. `sample_out` for that
sample is valid combinationally in the same cycle, and the edge then shifts
the line.

After the length changes, the line still holds samples placed for the old
length. The first p outputs are then not a clean filter of the new length.
(The DSP has no such effect, because its history is one circular buffer.)

## Files

| file | content |
|---|---|
| `rtl/fir_dsp_pkg.sv` | Q1.31 type, `fx_mul`, programming-target enum |
| `rtl/fir_dsp.sv` | the programmable n-multiplier DSP |
| `rtl/prog_counter.sv` | program pointer: restart, park, idle |
| `rtl/xptr_ctrl.sv` | read base, read-select vector, shift counter, write pointer/select |
| `rtl/xaddr_decoder.sv` | per-memory X read rows and write enables |
| `rtl/barrel_shifter.sv` | staged rotator for the X lanes |
| `rtl/mac_unit.sv` | n products, adder tree, accumulator, output register |
| `rtl/adder_tree.sv` | balanced adder tree (shared) |
| `rtl/async_ram.sv` | asynchronous-read, synchronous-write memory |
| `rtl/clock_gate.sv` | latch-based clock gate |
| `rtl/fir_parallel.sv` | fully parallel variable-length FIR |
| `rtl/fir_dsp_top.sv` | both designs side by side |
| `tb/*.sv` | self-checking testbenches; each ends with `TB_RESULT checks=… failures=…` |

## Simulating

Verilator 5 is used for everything:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/fir_dsp_pkg.sv tb/tb_fir_dsp_top.sv --top-module tb_fir_dsp_top
./obj_dir/Vtb_fir_dsp_top
```

Swap in any other testbench name. Each testbench has a watchdog, uses
`$urandom` for its data, and compares against a model written
independently in the testbench.

| testbench | what it runs |
|---|---|
| `tb_fir_dsp_top` | Full-size top at default parameters, described below. |
| `tb_fir_dsp_sweep` | 100 taps, 300 samples, 256-cycle frames, for n = 1..33, 64, 110, 128 and 255, then ungated for n = 1..33. Checks every output and its latency. |
| `tb_fir_dsp` | n = 1..4 with 100 taps and n = 5 with 7 taps, plus n = 3 without clock gating, all past the wrap of the circular X buffer. |
| `tb_fir_parallel` | 100, 8, 256 and 1 taps, with length switches and hold without `frame`. |
| `tb_async_ram`, `tb_prog_counter`, `tb_xptr_ctrl`, `tb_xaddr_decoder`, `tb_barrel_shifter`, `tb_mac_unit`, `tb_clock_gate` | Unit tests against closed-form models: pointer sequences as formulas of the event counts, rotation as index arithmetic, latch behaviour with enable changes in both clock phases. |

`tb_fir_dsp_top` runs a 100-tap filter on both designs, 300 samples at one
sample per 256 cycles. It then reprograms both to 30 taps and runs 100 more
samples. It counts each mechanism and requires it to occur:
- program start and park;
- gated-off cycles;
- memory writes while the core clock is off;
- X wrap and base advance;
- non-zero barrel shift;
- output transfers;
- each programming target;
- reprogramming and the parallel length switch.

Every testbench finishes within a few seconds.

## Size

After coarse synthesis with yosys, the default top (n = 2, plus the
256-tap parallel filter) has:
- about 2,900 word-level cells;
- 16,500 flip-flop bits, mostly the parallel filter's 511 registers of 32 bits;
- 19,456 memory bits (P-MEM 256×12, four 128×32 X/Y memories);
- 261 multiply-accumulate cells.

## Where this RTL departs from, or adds to, the original design

* **Programming interface.** The single write port for P, X and Y
  memories is this design's own. So is the coefficient write port of the
  parallel filter. The original only states that the memories and
  registers are loaded from outside.
* **Reset.**
  - The program counter resets to the parked address rather than 0, and
    the decoder issues no-ops while parked. In the original, registers
    reset to 0 and an enable held them during loading; with the gated
    clock, a reset to 0 would execute word 0 twice.
  - The memories are not reset.
* **Clock gating.** The original gates the whole design with one AND gate.
  Here there are two gates (core, and memories + programming), and each is
  a latch-based cell instead of a bare AND. The gates also stay open
  during reset. `CLOCK_GATING = 0` gives the ungated variant.
* **Parallel filter.** Positions above the injection point are forced to
  zero instead of relying on their registers holding zero. The adder chain
  is built as a balanced tree; the sum is the same.
* **Arithmetic.** Truncation and wrap-around follow the default behaviour
  of the fixed-point types used in the original. Nothing is rounded or
  saturated.
* **Barrel shifter direction.** The prose says the samples are shifted
  left, while one figure caption says "right". The left rotation of the
  original's code is what is built, and it is confirmed by the end-to-end
  reference checks.
* **Not built.** The amplifier controller IC around the DSP, which supplies
  the samples, the frame trigger and the clock, is outside this RTL. Its
  signals are the top's ports.
