# A 16-bit fixed-point DSP with a 15-word instruction cache

This is synthesizable SystemVerilog for a programmable 16-bit fixed-point signal
processor with a 60 ns machine cycle. Its main idea is simple. A multiply/accumulate
needs three words in every cycle: an instruction, a fixed coefficient and a variable data
word. The usual answer is three buses and three memories. This design has only two
buses. The **program memory bus** carries instructions and coefficients from a
2048 x 16 ROM. The **data bus** carries variables to and from a 512 x 16 RAM. The third
path comes from a small **instruction cache** of 15 words. A loop written as
`do k { ... }` is fetched from program memory once. Its remaining k-1 passes are replayed
from the cache, so during those passes the program memory bus is free to deliver a
coefficient in every cycle. As a result a FIR filter runs at one tap per machine cycle
(60 ns), and the loop needs no unrolled code in ROM.

```
            program memory bus (16)                         data bus (16)
 ROM 2048x16 ──┬──────────────┬───────────────┐   ┌──────┬──────┬──────┬──────┬──────┐
 (or RB pins)  │              │               │   │      │      │      │      │      │
            cache 15x16 ──► MUX ──► IR ──► (control unit, outside)    │      │      │
               ▲ loop control                 │   │      │      │      │      │      │
 AB pins ◄── XAAU (pc, pt, pr, pi, i)         └─► x    DAU    YAAU   RAM   SIO    PIO
                                                 (coefficient)   (r0-r3,  512x16
                                                                  j,k,rb,re)
```

## What is in `rtl/`

| file | block |
|---|---|
| `dsp_pkg.sv` | shared types: data-bus register codes, ALU/shifter/condition codes, the decoded control word `ctl_t` |
| `dsp_top.sv` | the whole processor: buses, instruction fetch, stall and bubble rules |
| `icache.sv` | 15 x 16 instruction cache with the `do k` / `redo k` loop controller |
| `dau.sv` | data arithmetic unit: multiplier, product aligner, ALU/shifter, a0/a1, extract/saturate |
| `xaau.sv` | program-side address unit: pc, pt, pr, pi, i |
| `yaau.sv` | RAM address unit: r0-r3, j, k, rb, re, modulo compare |
| `dsp_rom.sv` | 2048 x 16 instruction/coefficient ROM |
| `dsp_ram.sv` | 512 x 16 data RAM |
| `sio.sv` | double-buffered serial port |
| `pio.sv` | parallel port, master or slave, 8 or 16 bit |
| `clk_div2.sv` | divide-by-two of the 33.33 MHz input clock |

All parameter defaults are the real sizes: a 2048-word ROM, a 512-word RAM and a 15-word
cache.

## The control word: what this RTL leaves out

The processor's instruction set and its encoding are not specified here. Nothing is
known about the instruction decoder except that it is built from two PLAs. So the
RTL stops at the decoded level:

* `dsp_top` brings out the instruction register on `instr`, with `instr_valid`.
* An external control unit decodes `instr` combinationally. In the same cycle it
  returns a `ctl_t` on `ctl`.

`ctl_t` (see `dsp_pkg.sv`) describes one instruction:

* one data-bus move `src -> dst`, where either side may be `R_RAM`, meaning `*rN`
  through the YAAU with post-modification `ya_mod`;
* the arithmetic fields `dau`: `mult_en` (p = x*y), `x_rom_we` (x = *pt, with
  post-modification `pt_mod`), the ALU/shifter operation, its operands, its destination
  and its condition, and counter increments;
* program flow `xa_op` with target `imm`;
* the loop fields `do_start`/`redo_start`/`do_n`/`do_k`;
* the interrupt acknowledge `iack`.

For example, one FIR tap `a0 = a0 + p, p = x * y, y = *r0++, x = *pt++` is:
`src=R_RAM, dst=R_YH, ya_sel=0, ya_mod=YM_INC, dau.x_rom_we=1, pt_mod=PT_INC,
dau.mult_en=1, dau.alu_op=A_ADD, dau.acc_we=1`.

`tb/tb_dsp_top.sv` contains such a control unit as a behavioural model. Each program
word there is an index into a table of `ctl_t`. To run real code you write a decoder for
whatever encoding you choose and place it between `instr` and `ctl`.

## Instruction fetch, the cache and the stall rule

This is the part that is hardest to see from the block diagram.

**Pipeline.** `IR` holds the instruction being executed. In the same cycle the next
instruction is fetched into `IR`, either from program memory at `pc` or from the cache.
Memories are read asynchronously, so a word and its use fall in the same 60 ns cycle.

**Program memory bus conflict.** Program memory has one port. When the executing
instruction reads a coefficient (`x = *pt`), the address bus carries `pt`, not `pc`.
When the next instruction would also come from program memory, the fetch is delayed by
one cycle and `IR` gets a bubble (`fetch_stall` is high). Inside a cached loop the next
instruction comes from the cache, so no stall happens. The stall is the cost a two-bus
machine pays without the cache.

**`do k {N instructions}`** (N = 1..15). The cycle that executes the `do` switches the
cache controller to *load*. The next N fetches come from program memory as usual, and
each word is also written into the cache at the address counter. When the counter
reaches N-1 it wraps to 0 and the loop counter counts one pass. If passes remain, the
controller switches to *replay*. In replay, fetches take the cache word, `pc` does not
step, and `replay` is high. When the loop counter runs out, fetching continues from
program memory at `pc`, which already points past the loop body.

**`redo k`** replays the N words already in the cache k more times, without reading
program memory.

Timing of a one-instruction FIR loop with k = 31: the body executes in 31 consecutive
cycles. The first of them is fetched from memory and the other 30 are replayed. Around
the loop there are two set-up instructions (each stalls once, since they read a
coefficient outside the cache) and one closing accumulate.

Jumps, calls, returns and interrupts discard the word fetched in their own cycle (one
bubble). They are not allowed inside a cached loop, and an assertion in `dsp_top`
checks this.

## Data arithmetic unit (`dau`)

There are two ways through the unit:

* **Multiply/accumulate, two stages.** Stage one computes p = x * yh, a 16x16 signed
  product with the full 32 bits. Stage two aligns p according to `auc[1:0]`: shift right
  by 2, no shift, or shift left by 2. It then sign-extends p to 36 bits and adds it into
  a0 or a1. One instruction runs both stages, so the product added in a cycle is the one
  formed in the cycle before.
* **ALU path, one stage.** The multiplier is bypassed. The ALU operand b is either
  yh:0 (16-bit data) or yh:yl (32-bit data).

The ALU has 15 functions: pass b, add, sub, b-a, -b, and, or, xor, ~a, -a, |a|, a+1, a-1,
clear, pass a. The shifter has 8 functions: arithmetic right shift and left shift by 1, 4,
8 or 16 places.

**Conditional accumulator functions.** Any accumulator write can be conditioned on the
psw flags of the previous result: always, negative, positive-or-zero, zero, non-zero,
greater than zero, less than or equal to zero, and guard bits in use. The flags are
n, z, v (36-bit overflow) and lmv. A compare is an ALU operation with `acc_we = 0`.
`max`, `min`, `abs` and limiting are then two instructions each.

**Extract/saturate.** Reading `a0h` or `a1h` onto the data bus gives bits 31:16 of the
accumulator. If the value uses the guard bits (bits 35:31 are not all equal), the result
is clamped to 0x7FFF or 0x8000. Setting `auc[2]` turns the clamp off.

c0, c1 and c2 are 16-bit counters.

Register bit layouts:

* psw: `{n, z, v, lmv, 12'b0}`
* auc: `[1:0]` product shift (0 = none, 1 = right 2, 2 = left 2), `[2]` saturation off

## Address units

* **XAAU.** `pc` steps on every fetch from program memory. `pt` addresses coefficients
  and tables, and after each coefficient read it is post-modified by +1 or +i. A call
  saves `pc` in `pr` and an interrupt saves it in `pi`. The return operations reload
  `pc` from `pr` or `pi`. The XAAU drives the 16-bit address bus `AB`: `pt` during a
  coefficient read, `pc` otherwise.
* **YAAU.** Any of r0-r3 addresses the RAM, for a read or a write. After the access the
  pointer steps by 0, +1, -1, +j or +k. **Modulo addressing:** a pointer equal to `re`
  that is stepped by +1 reloads `rb` instead. This gives a circular buffer of any length
  at any address. `re = 0` turns modulo addressing off.

## Memories and external program memory

The ROM (2048 x 16) and the RAM (512 x 16) read asynchronously and write on the clock
edge. The ROM has a load port (`rom_load_*`), which takes the place of mask programming.
With `EXM` high, the program memory bus is taken from the `RB` pins instead of the ROM.
The address is always on `AB`, so up to 64K words of external memory can replace the ROM
at full speed.

## Serial and parallel ports

**SIO.** The SIO is double buffered. `isr` shifts in from `DI` on each rising edge of
`ICK`. A high `ILD` on an edge marks the first bit of a 16-bit word, MSB first. After
16 bits the word moves to `sdx(in)` and `IBF` is raised. A data-bus read of `sdx` clears
`IBF`.

On the output side, a write of `sdx` fills `sdx(out)`. A high `OLD` on a rising edge of
`OCK` moves the word into `osr`, and it leaves on `DO`, MSB first. `OSE` is high when
nothing is being shifted, and `DOEN` is high while `DO` carries data.

External bit clocks are synchronised to the internal clock, so they must run at no more
than a quarter of its rate. Interrupt masks are in `sioc[0]` (input full) and
`sioc[1]` (output empty).

**PIO.** The PIO has two modes, selected by `pioc[0]`:

* **Slave** (`pioc[0] = 0`). An external master writes with a low pulse on `PIDS` and
  reads with a low pulse on `PODS`.
* **Master** (`pioc[0] = 1`). A write of `pdx` drives the word on `PB` with a `PODS`
  strobe that is `STROBE` cycles long. Writing `pioc` with bit 5 set runs a `PIDS`
  input strobe.

`pioc[1]` selects 8-bit mode, which uses PB00-PB07 only. Interrupt masks are
`pioc[2]` (input full), `pioc[3]` (output empty) and `pioc[4]` (the `INT` pin). `IACK`
echoes the control unit's acknowledge. All bidirectional pins appear as
input/output/enable signals.

## Clocking and reset

`CKI` (33.33 MHz) is divided by two into the internal clock. That clock has a 50% duty
cycle and a 60 ns period, and it is also driven out on `CKO`. Every register uses the
rising edge of this clock. `RSTB` is an asynchronous active-low reset of all registers
except the divider and the memory arrays.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`.

`tb_dsp_top` runs the whole processor at default sizes. It runs one program twice, once
from the on-chip ROM and once from external memory. The program:

* fills a 32-word circular delay line;
* computes a 32-tap FIR filter with `do 31`, then a second one with `redo 31`;
* stores the results in RAM and sends one out of the parallel port;
* forces a saturating extraction;
* takes a serial-input interrupt.

The testbench checks every result against a model, and checks that the loop runs one tap
per 60 ns cycle. It also counts each mechanism (fetch stall, replay, redo, modulo wrap,
saturation, jump bubble, interrupt, parallel output, external-memory mode) and fails if
one of them never happens.

`tb_dsp_sos` runs a cascade of four second-order IIR sections over eight input samples.
Each section takes five multiplies. It uses the first sample's `do 4` and the remaining
samples' `redo 4`. The seven-instruction section body is listed in the testbench's
header. It folds b0 into the state coefficients (c1 = b1 + b0*a1, c2 = b2 + b0*a2), so
the output does not wait for the new state. The testbench checks all outputs and states
bit for bit. It also checks that replayed sections start exactly 7 cycles (420 ns)
apart.

`tb_dsp_lms` runs the tap loop of a double-precision adaptive (LMS) FIR filter over six
samples of eight taps. Each tap filters with the high word of its coefficient and updates
the full 32-bit coefficient (high and low words in RAM) by g times the data word. The
step-size-times-error factor g is supplied in RAM for each sample. The seven-instruction
tap body uses only the data bus: seven moves in seven cycles, with the next tap's data
word loaded in the fifth step. The testbench checks every output and every final
coefficient word bit for bit, and checks that replayed taps start 7 cycles (420 ns)
apart. The error computation between samples is not part of the program.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dsp_pkg.sv tb/tb_dsp_top.sv \
          --top-module tb_dsp_top -o sim && ./obj_dir/sim
```

Replace `tb_dsp_top` with any other testbench, for example `tb_icache` or `tb_dau`.

## How far to trust it, and where it departs from the original chip

Taken from the original design:

* the block structure and the two buses;
* every register name;
* the widths: 16x16 -> 32 product, 36-bit accumulators (two of them), 16-bit data and
  address buses;
* the memory sizes (ROM 2048 x 16, RAM 512 x 16, cache 15 x 16);
* the product shift of -2/0/+2, a 15-function ALU and an 8-function shifter (four right,
  four left), saturation;
* register-indirect addressing with post-modification and modulo addressing;
* `do k` / `redo k` with their register, counter and loop-counter structure;
* EXM, 64K external words, and double-buffered serial I/O;
* a parallel port that can be master or slave, 8 or 16 bit, and maskable I/O interrupts;
* the divide-by-two clock.

This implementation's own choices:

* all encodings, including the decoded control word;
* the list of ALU functions and the shift distances;
* the condition set and the psw/auc/sioc/pioc bit layouts;
* the modulo rule (wrap at `re` on +1 steps);
* the stall and bubble rules and the asynchronous memory reads;
* serial framing, PIO strobe timing and 8-bit behaviour;
* the 8-bit loop count.

Not built:

* the instruction decoder (its instruction set is unknown);
* the serial port's time-division-multiplex features (`srta`, `tdms`, `SYNC`, `SADD`)
  and active clock generation;
* the parallel port's `PSEL`.

The original chip uses two-phase overlapping clocks with level-sensitive latches. Here
single-edge flip-flops replace them, which keeps the cycle-level behaviour but not the
circuit. The second-order-section schedule in `tb_dsp_sos` and the adaptive-FIR tap
schedule in `tb_dsp_lms` are this implementation's own; the original instruction
sequences are not known.
