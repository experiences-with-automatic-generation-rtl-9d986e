# A microprogrammed audio-band DSP core and an ISDN decision feedback equalizer

This RTL implements a small, specialised signal processor of the kind an
architecture-driven silicon compiler (Lager) produced in the 1980s. Its first
application is the adaptive decision feedback equalizer (DFE) of an ISDN
U-interface receiver.

The processor's main idea is that a signal-processing algorithm does not
need a general-purpose CPU. Instead it uses:

- a bit-parallel datapath with four pipeline stages (memory access, shift,
  complement-add, i/o);
- a serial-parallel multiplier in place of an array multiplier;
- a controller made only of a program counter, a loop counter and a ROM of
  **undecoded** control words. There are **no branches**. The program runs
  from start to end once per sample;
- decisions made without jumps. A small user-defined state machine looks at
  the processor status and sets a *condition bit*. The condition bit decides
  whether a write happens. Both outcomes are computed, and only the wanted
  one is stored.

Several such processors, each with its own word length and program, work
side by side on one chip. They talk over bit-serial links. A parallel bus
carries sample-rate i/o, and an interrupt-driven buffer carries frame-rate
data to and from a host.

The top level, `dfe_isdn_chip`, is one core running the DFE program. It
takes one received sample per symbol, equalizes it, decides the symbol, and
keeps adapting its seven coefficients.

## The equalizer

The line code is binary, so every past decision `a_i` is +1 or -1. Per
symbol the program computes:

```
x_rec = x_in - sum_{i=1..6} t_i        t_i = c_i if a_i = +1 else -c_i
a_0   = sign(x_rec)                    (the output decision, sign(0) = +1)
err   = sign(x_rec - c_0*a_0)
c_i   = c_i + k*err*a_i   for i = 0..6 (sign-sign LMS, k = 64 LSB)
```

`c_1..c_6` cancel the postcursor interference of the last six symbols. `c_0`
tracks the amplitude of the wanted symbol, and the error is measured against
it. The feedback sum uses 6 multiplications and the updates use 7, but none
needs a real multiplier:

- **Packed delay line.** The six past decisions share one 12-bit word, two
  bits per symbol: `2'b10` is +1 and `2'b01` is -1. `a_6` sits in bits 1:0
  and `a_1` in bits 11:10. Each symbol the word shifts right by two, and the
  new decision enters at bits 11:10. After reset the word is zero. Code
  `2'b00` counts as -1 in the filter, as the equation says (anything but
  `10` gives `-c_i`).
- **Sign multiply step (`MULD`).** The packed word is loaded into the
  multiplier register (MR). Each step looks at MR bits 1:0, adds or subtracts
  one coefficient read from RAM, and shifts MR right by two. So the whole
  feedback sum takes six one-cycle steps.
- **Error sign without a multiply.** `a_0` is only known after the feedback
  sum, so the program computes both `x_rec - c_0` and `x_rec + c_0` in
  three cycles. The condition FSM keeps the sign of the one that matches
  `a_0`, and that sign becomes the condition bit.
- **Adaptation step.** Two conditional writes of immediates store
  `KE = -err*k` in RAM. The packed delay line is loaded into MR again, and
  for each coefficient a `MULDL` step (`acc = a_i == +1 ? -KE : KE`,
  that is `k*err*a_i`) is followed by `c_i + acc`, written back. That is
  two cycles per coefficient.

The decision leaves as the 2-bit code on `x_out`. The same code goes, as a
16-bit word, onto the bit-serial output `tr_sd/tr_sv`. That link is meant for
a second processor that recovers the symbol timing. That processor is not
part of this RTL: its algorithm is only known to use the signs of the last
three equalized samples.

### The DFE microprogram (`lager_prog_pkg::dfe_word`)

| addr | operation | notes |
|---|---|---|
| 0 | MR <- RAM[A] | packed delay line |
| 1 | acc <- x_in; DO 2, 6 times | |
| 2 | acc -= +-RAM[1+X0]; MR >>= 2; X0++ mod 6; FSM DEC: cond = (acc >= 0) | feedback taps c6..c1, acc = x_rec |
| 3 | RAM[AHI] <- 0x0400 | code of -1, pre-shifted |
| 4 | RAM[AHI] <- 0x0800 if cond | code of +1 when x_rec >= 0 |
| 5 | acc -= RAM[C0]; FSM ERRP: if cond, state[0] = (acc >= 0) | x_rec - c0 |
| 6 | acc += RAM[C0] | back to x_rec |
| 7 | acc += RAM[C0]; FSM ERRN: cond = state[0] = (cond ? state[0] : acc >= 0) | x_rec + c0; cond is now err >= 0 |
| 8 | MR <- RAM[A] | delay line again, for the update |
| 9, 10 | RAM[KE] <- -k, then RAM[KE] <- +k if not cond | KE = -err*k |
| 11 | acc <- RAM[AHI] | |
| 12 | RAM[A] <- acc + (RAM[A] >>> 2); DO 13..14, 6 times | delay line update |
| 13 | acc <- MR[1:0] == 10 ? -RAM[KE] : RAM[KE]; MR >>= 2 | `MULDL`: k*err*a_i |
| 14 | RAM[1+X0] <- acc + RAM[1+X0]; X0++ | c6..c1 |
| 15 | MR <- RAM[AHI] >>> 10; out, serial <- same | decision code a0 |
| 16 | acc <- `MULDL` RAM[KE] | k*err*a0 |
| 17 | RAM[C0] <- acc + RAM[C0]; end of program | |

RAM layout: `c0` is at 0, `c6..c1` at 1..6, the delay line `A` at 8, the
new decision code (shifted left by 10) `AHI` at 9, and the step `KE` at 10.

One symbol takes 33 issued words. Between passes the PC idles for one
cycle (the DFE processor is built with `DRAIN = 0`), so symbol strobes can
come **every 34 clock cycles**. `overrun` pulses when they come faster. At
the 144 kbit/s line rate and the original 5 MHz clock there are 34.7 cycles
per symbol, so the program fits with 0.7 cycle to spare. The published chip
also used 34 cycles, 26 of them for the filter and the coefficient update;
here those take 8 and 14 words, plus 3 to form the step `KE`. The words
are packed tightly around the pipeline rules below. For example, word 10
writes `KE` exactly three words before word 13 first reads it, and word
12's delay-line update comes after word 8 has read the old line.

## The core processor (`lager_proc`)

```
 sync ─► PC ──┐                    ┌────────── AUIO ──────────┐ ◄─► par_in/par_out
            ROM ─ undecoded word ─►│ S1 mem  S2 shift  S3 add  S4 i/o │ ◄─► serial in/out
 SPC ─────────┘   │      │         └──┬──────────▲──────────┬──┘ ◄─► host buffer
                  ▼      ▼            │addr      │status    │cond
                 AAU ──► RAM          AAU       FSM ────────┘
```

| block | module | function |
|---|---|---|
| PC | `lager_pc` | Master program counter. Starts at 0 on `sync`, stops after the word with `eop`, then waits for the next strobe (one strobe may queue). |
| SPC | `lager_spc` | Slave PC. `DO tgt,cnt` repeats the words from the next one up to `tgt`, `cnt` times in all. `CALL tgt`/`RET` give one subprogram level. Loops do not nest. |
| ROM | `lager_rom` | 256 undecoded 80-bit words, filled at elaboration from `lager_prog_pkg::prog_word(PROG, addr)`. |
| AUIO | `lager_auio` | The four-stage arithmetic and i/o pipeline, with the accumulator (WL+2 bits), MR and the multiply steps. |
| RAM | `lager_ram` | 64 x WL local variables. Asynchronous read with write bypass. Cleared by reset. |
| AAU | `lager_aau` | Address = field, field+X0 or field+X1. X0 and X1 are cleared, incremented or decremented modulo `X0_MOD`/`X1_MOD`. |
| FSM | `lager_fsm` | Table-driven condition FSM (see below). |
| serial | `lager_ser_tx`, `lager_ser_rx` | Bit-serial links: LSB first, one bit per clock, with a valid wire. |
| host buffer | `lager_host_iobuf` | 16-word two-port buffer with an interrupt that the program raises and the host acknowledges. |
| Booth | `lager_booth` | Radix-4 recoder for the two-bits-per-step multiply. |

### The microword (`lager_pkg::uword_t`)

Every field drives its own piece of hardware, and each pipeline stage reads
only its own fields:

- **S1, memory access:**
  - `src`: RAM, parallel input, serial input, host buffer or the immediate
    `k`;
  - `amode`/`addr`: the address, direct or indexed. This one address is used
    both for the read in S1 and for the RAM or host write in S4;
  - `x0op`/`x1op`: index register update, done after the address is formed.
- **S2, shift:** `shf` is an arithmetic right shift of the operand by 0..15.
- **S3, complement-add:**
  - `aop`: one of `NOP LD ADD SUB MULS MULL MULD MULB MULBL MULDL`;
  - `mrop`: one of `NOP LOAD SH1 SH2`.
- **S4, i/o:**
  - `wram`: never, always, if cond, or if not cond;
  - `wsel`: the write data is the accumulator or the shifted operand;
  - `wout`, `wser`, `whost`, `hirq`: the other i/o writes and the host
    interrupt;
  - `fop`: the FSM operation.
- **Fetch:** `seq`/`tgt`/`cnt` for loops and the subprogram, and `eop`.

### Pipeline timing: the rules a program must follow

The hardest part of writing programs for this core is the pipeline timing:

- A word is taken from the ROM at one clock edge. Its S1 runs in the next
  cycle, and its S4 three cycles later.
- The accumulator and MR change at the end of S3. So the very next word can
  use them, and S4 of the same word writes the new accumulator value.
- A RAM write happens at the end of S4, and RAM reads happen in S1. With the
  bypass, **a value written by word n can be read by word n+3 or later**.
  Words n+1 and n+2 still see the old value. The assembler would have had to
  enforce this; here the programs are scheduled by hand.
- The FSM steps in S4, on the status that S3 of the same word left behind.
  The new condition bit gates the writes of **later** words. A write in the
  same word still sees the old bit.
- The index registers change in S1. The `x0z`/`x1z` status bits seen by the
  FSM in S4 therefore already include the updates of the three words
  issued after it.
- Between program passes the PC idles for one cycle plus `DRAIN` cycles
  (default 3). Three drain cycles let the last writes of one sample land
  before the first reads of the next. A program that does not need this,
  such as the DFE, can use `DRAIN = 0`.
- `eop` ends the pass only on a word that does not jump. On the last word
  of a loop body it takes effect after the final repetition.

### Multiplication

- `MULS` (`acc = (acc + MR[0]*M) >>> 1`) is repeated WL-1 times, with
  `MR >>= 1`. A final `MULL` (`acc -= MR[0]*M`) accounts for the sign bit.
  The result is `floor(M*B / 2^(WL-1))`, a fractional two's complement
  product, in WL cycles.
- `MULB` (`>>> 2`), repeated WL/2-1 times, plus a final `MULBL` (`>>> 1`)
  uses the Booth decoder on `{MR[1:0], previous MR[1]}` with `MR >>= 2`. It
  gives the same result in half the cycles.
- `MULD` (`acc = MR[1:0] == 10 ? acc - M : acc + M`) is the two-bit sign
  step described above. `MULDL` (`acc = MR[1:0] == 10 ? -M : M`) starts a
  new sum with it. Both are used with `MR >>= 2` to walk the delay line.

### The condition FSM

The table index is `{fop, cond, acc_sign, MR[1], MR[0], x0z, x1z, state[1:0]}`
(10 bits), and each entry is `{next_state, next_cond}`. An `fop` of 0 holds
both. Both programs use one table, `lager_prog_pkg::fsm_table`:

| fop | effect |
|---|---|
| 1 `DEC` | cond = (acc >= 0) |
| 2 `ERRP` | if cond: state[0] = (acc >= 0) |
| 3 `ERRN` | e = cond ? state[0] : (acc >= 0); cond = state[0] = e |

A new application changes the table function. In a layout the table would
be a small PLA.

## Top-level interface (`dfe_isdn_chip`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock, synchronous active-high reset (clears RAM, so all coefficients start at 0) |
| `x_strobe`, `x_in[15:0]` | in | one echo-cancelled received sample per symbol; `x_in` is latched on the strobe |
| `x_out[1:0]`, `x_out_valid` | out | decision code (`10` = +1, `01` = -1), valid for the cycle `x_out_valid` is high |
| `tr_sd`, `tr_sv` | out | the decision code as a 16-bit word on the serial link to timing recovery |
| `tr_in_d`, `tr_in_v` | in | serial link from timing recovery (the DFE program does not read it) |
| `h_addr`, `h_we`, `h_wdata`, `h_rdata`, `h_irq`, `h_irq_ack` | in/out | host buffer port (the DFE program does not use it) |
| `overrun` | out | a strobe arrived while one was still waiting |

Parameters: `WL = 16` (word length) on the top. `lager_proc` also takes
`PROG`, `WL`, `RAM_DEPTH = 64`, `ROM_DEPTH = 256`, `HB_DEPTH = 16`,
`X0_MOD`, `X1_MOD` and `DRAIN = 3` (the top sets 0). The equalizer program uses a 16-bit word; the
vocoder processors of the same family used 18 and 26 bits, which the
parameter allows.

## How far to trust it, and where it departs from the original

Taken from the published design:

- the block structure of the processor;
- the four pipeline stages and their roles;
- serial-parallel multiplication and the optional second-order Booth step;
- the two index registers with modulo counting;
- a controller with loops and one subprogram level but no branches;
- a status-driven condition bit that gates writes;
- bit-serial links between processors, a parallel sample bus and an
  interrupt-driven host buffer;
- the equalizer equations, its six feedback taps and the packed 2-bit
  delay line.

This design's own choices:

- the entire instruction encoding and microword layout;
- the exact multiply step equations, the guard bits and the shift range;
- the RAM bypass and RAM clearing at reset;
- the restart-on-strobe control, drain delay and overrun flag;
- the FSM as a lookup table and its status list (MR bits and the previous
  condition bit were added);
- the `MULDL` step;
- the serial link format, and the sizes of RAM, ROM and host buffer;
- the DFE schedule, its RAM layout, the step size `k = 64` and
  `sign(0) = +1`.

The published chip needed 34 cycles per symbol. This program also needs 34:
33 words plus one idle cycle (see above).

Not included:

- the timing recovery processor;
- the echo canceller and the sampler, which are off chip;
- the LPC vocoder and the other applications of the same family. Their
  programs are not available; the core would run them given a program and
  FSM table.

Verification is bit-exact against independent models, with one exception
noted below. The equalizer test checks convergence on a model line.
Nothing here has been checked against the original silicon.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/lager_pkg.sv rtl/lager_prog_pkg.sv \
          tb/tb_dfe_isdn_chip.sv --top-module tb_dfe_isdn_chip -Mdir obj && ./obj/Vtb_dfe_isdn_chip
```

Other modules are found through `-Irtl` (or add `-y rtl`).

| testbench | what it checks |
|---|---|
| `tb_dfe_isdn_chip` | 600 symbols through a line with three postcursors plus noise, at default parameters. It checks every decision and the final coefficients and delay line bit-exactly against a reference model of the equations. It also checks convergence (`c_0..c_3` within 400 LSB of the line response, no decision errors in the second half), 33 issued words per symbol with strobes 34 cycles apart and no overrun, and the serial copy of each decision. It counts loop repeats, taken and suppressed conditional writes, both directions of the sign steps, FSM steps, and an overrun provoked at the end. |
| `tb_lager_proc` | The test program (`PROG_TEST`) on 40 random samples: the `MULS` and Booth products equal `floor(M*B/2^15)`, serial echo +5, the subprogram with conditional writes, modulo-3 and modulo-wrap indexing, the host interrupt, and 50 issued words per pass. |
| `tb_lager_auio` | 800 random microwords against a model of shift, add and multiply steps, with 4-edge latency and the write gating. |
| `tb_lager_auio_wl` | The same pipeline at 18 and 26 bits, the other word lengths of the processor family: random microwords against a width-independent model, and serial and Booth products of full-width operands against `floor(M*B/2^(WL-1))`. The driver is `tb/lager_auio_wl_run.sv`. |
| `tb_lager_pc`, `tb_lager_spc`, `tb_lager_rom`, `tb_lager_aau`, `tb_lager_ram`, `tb_lager_fsm`, `tb_lager_booth`, `tb_lager_ser_link`, `tb_lager_host_iobuf` | each unit against a model or a hand-worked sequence |

The exception is `tb_lager_rom`, which compares the ROM with the program
function it was filled from, plus a few hand-written spot checks.

## Changing it

- **New program.** Add a `case` function next to `dfe_word` in
  `rtl/lager_prog_pkg.sv`, give it a number in `prog_word`, and build the
  words from `UW_NOP` by setting fields. Follow the timing rules above. If
  the program needs other decisions, extend `fsm_table`.
- **Word length.** Change `WL` on `lager_proc`. The immediate field is 16
  bits and is sign-extended or truncated to `WL`.
- **Several processors.** Instantiate `lager_proc` several times, each with
  its own `PROG`, and wire `ser_out_*` of one to `ser_in_*` of another.
