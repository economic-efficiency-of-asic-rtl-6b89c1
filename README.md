# A transport-triggered FFT processor

This is a small programmable processor that computes fast Fourier transforms of 2 to 16384
complex points. It aims to use about as little energy as a fixed-function FFT block. It
follows the design in *"Economic efficiency of ASIC processor with low power consumption due
to FFT calculations"* (Yeghiazaryan, Karapetyan, Papyan). These ideas come from that paper:

* **Transport triggering.** The processor has no opcodes in the usual sense. An instruction
  is a set of data moves between the ports of function units. A unit starts working when a
  value lands on its *trigger* port. Operand ports are registers, so an operand moved once
  can be reused by several later operations.
* **FFT-specific function units.** A complex adder computes any output of a 4-point DFT. A
  complex multiplier applies twiddle factors. A twiddle-factor generator produces
  exp(-j2πk/N) from a table held in logic.
* **Two single-port data memories** instead of one dual-port memory.
* **Per-unit clock gating**, so a unit that is not addressed in a cycle gets no clock edge.

Complex samples are 32-bit words: a 16-bit real part in the upper half and a 16-bit
imaginary part in the lower half, both Q1.15 two's complement.

## Structure

```
            prog_* ──► imem ──► instruction word: 4 move slots {src,dst} + 32-bit immediate
                         ▲              │
                       gcu ◄────────────┤ (jump / branch / halt sockets)
                                        ▼
                       tta_ic: 4 buses, source sockets ──► destination sockets
        ┌────────┬────────┬────────┬────────┬─────────┬─────────┬────────┐
       rf      cadd     cmul      tfg      alu      lsu0      lsu1    gcu
    (16 regs) (radix-4 (a*b)   (W_N^k,  (address  │          │
               butterfly)       2 stages) arith.)  bank 0    bank 1   (sram_sp, 16384 x 32 each)
                                                   ▲          ▲
                                  host_* port (core idle) ────┘
   every unit except rf and gcu has its own clk_gate
```

| module | role |
|---|---|
| `fft_tta` | top level: wires everything below, plus the program and host ports |
| `fft_pkg` | complex type, move type, socket numbers, opcodes |
| `tta_ic` | the transport buses: slot decoding and source multiplexing |
| `gcu` | program counter, zero-penalty jump, branch-if-non-zero, halt, cycle counter |
| `imem` | instruction memory, 512 × 76 bits, synchronous read |
| `rf` | 16 × 32-bit registers |
| `cadd` | complex adder: 4-point and 2-point butterflies |
| `cmul` | complex multiplier |
| `tfg` | twiddle-factor generator |
| `alu` | integer unit for addresses and loop counters |
| `lsu` | load-store unit, one per bank |
| `sram_sp` | single-port data bank |
| `clk_gate` | latch-based clock gate |

## The complex adder (`cadd`)

This is the unit that makes radix-4 cheap. It has four operand ports O1..O4 and a trigger
port T. The opcode travels as the data of the move to T. Once four samples sit in O1..O4,
four moves to T, with opcodes k = 0, 1, 2 and 3, produce the four outputs of one radix-4
butterfly. The operands are not moved again.

```
y_k = (O1 + (-j)^k·O2) + (-1)^k·(O3 + (-j)^k·O4)        k = 0..3
    = Σ_m O(m+1)·(-j)^(m·k)                              (the 4-point DFT)
```

The hardware follows that bracketing:

1. **Rotators.** O2 and O4 each pass a rotator. For odd k it swaps the real and imaginary
   parts.
2. **First-level adders.** Two adders form O1 ± rot(O2) and O3 ± rot(O4). Each component
   adds or subtracts on its own: the real part subtracts for k = 2 and 3, the imaginary part
   for k = 1 and 2. Together with the swap, this multiplies by (-j)^k with no multiplier.
3. **Second-level adder.** It adds the two first-level sums for even k and subtracts them for
   odd k.
4. **Output multiplexer.** It returns either the second-level sum (4-point) or only the first
   sum O1 ± O2 (a 2-point butterfly). The 2-point form serves the last stage when log2 N is
   odd.

Opcode bits (`cadd_op_t`):

| bits | name | meaning |
|---|---|---|
| 1:0 | `k` | which output |
| 2 | `radix2` | return the first-level sum only |
| 3 | `scale` | divide by 4 (radix-4) or 2 (radix-2), rounding half up |

Results saturate to 16 bits. With `scale` set in every stage, the whole transform computes
DFT/N and cannot overflow.

## The twiddle-factor generator (`tfg`)

The generator returns W = exp(-j2πk/N) for any N = 2^L up to 16384. Move L to its operand
port, then move k to its trigger port.

The index is first scaled to the 16384-point circle: k' = k << (14 − L). Only one octant of
that circle is stored: cos and sin of 2πi/16384 for i = 0..2048, which is 2049 entries. The
top three bits of k' pick the octant. The remaining 11 bits address the table, mirrored
(2048 − r) in odd octants. The octant then decides whether cosine and sine are swapped and
which are negated.

The table is a constant computed at elaboration, round(32767·cos) and round(32767·sin), using
Taylor series (accurate far below one LSB on [0, π/4]). It becomes combinational logic, not a
RAM.

Timing: stage 1 registers the octant and the address; stage 2 registers the looked-up,
corrected factor. The result can be read two cycles after the trigger, and a new index can
be triggered every cycle. A decimation-in-frequency FFT only uses octants 0–5; all eight are
tested.

## Programming model

**Instruction word.** Each instruction has 4 move slots and one 32-bit long immediate.
Bits 75:44 hold the immediate; slot b sits in bits [11b+10 : 11b] as {src[4:0], dst[5:0]}.
All slots read their sources in the same cycle. All writes land at the following clock
edge. Destination 0 means "no move".

| source | socket |
|---|---|
| r0..r15 | 0..15 |
| immediate | 16 |
| alu, cadd, cmul, tfg results | 17, 18, 19, 20 |
| lsu0, lsu1 load data | 21, 22 |

| destination | socket | | destination | socket |
|---|---|---|---|---|
| cadd O1..O4 | 1..4 | | lsu1 data / load / store | 13 / 14 / 15 |
| cadd T (opcode) | 5 | | r0..r15 | 16..31 |
| cmul operand / trigger | 6 / 7 | | alu operand | 32 |
| tfg L / trigger k | 8 / 9 | | alu trigger + op (add, sub, and, or, xor, shl, shr, ltu) | 40..47 |
| lsu0 data / load / store | 10 / 11 / 12 | | gcu condition / jump / bnz / halt | 48 / 49 / 50 / 51 |

**Results and latencies.** A result register holds its value until the unit is triggered
again.

* cadd, cmul, alu and the load-store units can be read the cycle after the trigger.
* tfg can be read two cycles after the trigger.
* An operand moved in the same cycle as the trigger is used by that operation.
* A jump or a taken branch costs nothing: the next fetch address is formed in the cycle that
  executes it.

Nothing in hardware checks latencies or bus conflicts. As in any statically scheduled
machine, the program is responsible for them.

**Running a program.**

1. Write the program through `prog_*` and the input samples through `host_*`. The host port
   is only honoured while `busy` is low; `host_rdata` follows a read by one cycle.
2. Pulse `start`.
3. Wait for `done`. `cycles` then holds the number of instructions executed.

`fu_clk_en` shows which units' clocks ran in each cycle: bits 0..5 are cadd, cmul, tfg, alu,
lsu0 and lsu1.

## The FFT program and the memory ping-pong

`tb/fft_sw_pkg.sv` contains a small assembler (`fft_asm`) and `gen_fft(log2n)`. That function
writes the program the tests run.

**Stages.** The program runs radix-4 decimation-in-frequency stages with strides
S = N/4, N/16, …, 1. If log2 N is odd, a final radix-2 stage follows.

**Memory ping-pong.** Each load-store unit is wired to its own bank, so bank choice is
static. Stage s loads from bank s mod 2 and stores into the other bank. Each single-port bank
therefore only ever reads or only ever writes during a stage. The input goes in bank 0. The
output ends up in bank (number of stages) mod 2, in digit-reversed order: X[k] sits at
`out_pos(k, N)`, where

```
out_pos(k, N) = (k mod 4)·N/4 + out_pos(⌊k/4⌋, N/4),   out_pos(k, 2) = k,   out_pos(0, 1) = 0
```

**One radix-4 butterfly.** It takes 17 instructions:

* 4 loads;
* three twiddle requests (n, 2n, 3n, for transform size 4S);
* four adder triggers;
* three complex multiplications;
* four stores;
* the loop bookkeeping.

The integer unit computes all addresses, one operation per cycle, and that sets the pace.

**Cycle counts.** The table compares this program with the cycle counts reported for the
original machine.

| N | stages | instructions | cycles, this program | cycles reported for the original |
|---|---|---|---|---|
| 64 | 3 | 73 | 910 | 207 |
| 1024 | 5 | 121 | 23 140 | 5 160 |
| 8192 | 7 | 153 | 243 048 | 57 396 |
| 16384 | 7 | 169 | 509 290 | 114 722 |

The reported counts fit N·⌈log4 N⌉ plus 15–40 cycles. That is one sample per cycle per
stage: each cycle one bank is read and the other written, which is the rate the ping-pong
organisation allows. Reaching it needs operand addresses produced without the integer unit,
a software-pipelined loop (the original program has a 14-instruction prologue, a
16-instruction kernel and a 17-instruction epilogue) and more buses. The paper gives none of
that machinery, so this design does not guess at it. The RTL runs the same algorithm about
4.5 times slower.

## Clock gating

Each of cadd, cmul, tfg, alu and the two load-store units sits behind a `clk_gate`. The gate
latches the enable while the clock is low and ANDs it with the clock. Its enable is "a move
arrives at one of my ports this cycle", plus, for tfg, "my pipeline holds work". Across the 64- to
16384-point runs, the complex multiplier is clocked in about one cycle in six, and each
load-store unit in about one in ten.

`test_en` forces all unit clocks on. The latch in `clk_gate` is the only latch in the design,
and it is intended. In an implementation, the library's integrated clock-gating cell replaces
it.

## What is from the paper and what is not

**Taken from the paper:**

* the transport-triggered organisation with registered operand ports and trigger ports;
* a complex adder with four operands and an opcode trigger;
* the structure of the adder: rotators on O2 and O4, two ± adders, a second ± adder and an
  output multiplexer;
* a complex multiplier;
* a twiddle generator for transforms up to 16K points with a 2049-entry table in logic and
  two pipeline stages;
* 16 + 16-bit complex data;
* two single-port data memories;
* clock gating of idle units.

**Choices made in this design, where the paper is silent:**

* the rotator's reading as a real/imaginary swap;
* the opcode encoding, scaling, rounding and saturation;
* the multiplier's latency;
* the octant folding of the twiddle table;
* bus count, socket map and instruction format;
* register count, memory depths and reset (asynchronous, active low);
* the host port and the branch scheme;
* the integer unit;
* the ping-pong use of the two banks;
* the FFT program itself.

**Not built:**

* Instruction-code compression. The paper names it but does not describe it.
* The high-rate addressing machinery described under the cycle counts above.
* The paper's 4 nm area, power and frequency figures. These are properties of an
  implementation, not of the RTL.

## Simulating

Each unit has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_fft_tta` runs 2- to 256-point transforms end to end. It compares every bin against a
  double-precision FFT; the tolerance is 3 LSB, and the observed error is 1 LSB. It checks
  each run's cycle count against the schedule above. It then runs a bank-to-bank copy
  program, which loads from one bank and stores into the other in the same instruction;
  the FFT program's stage-by-stage ping-pong never does that. Finally it repeats two
  transforms with `test_en` forcing every unit clock on. Throughout, it counts how often
  each mechanism occurred: radix-4 and radix-2 butterflies, triggers on held operands,
  twiddle multiplications, twiddles from each octant, taken branches, loads and stores on
  both banks, cycles with both banks busy, and gated-off cycles for each unit. A mechanism
  that never occurs fails the test.
* `tb_fft_full` does the same FFT check at the default size, for every length from 64 to
  16384 points. The maximum error is 2 LSB, and it runs in about a second.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/fft_pkg.sv tb/fft_sw_pkg.sv tb/tb_fft_tta.sv --top-module tb_fft_tta
./obj_dir/Vtb_fft_tta
```

For another testbench, change the last file and `--top-module`. For example, `tb/tb_cadd.sv`
needs only `rtl/fft_pkg.sv` ahead of it.

To change the configuration, use the `fft_tta` parameters `NBUS`, `NREG`, `IMEM_DEPTH`,
`DMEM_DEPTH` and `LOG2N_MAX`. The program generator assumes 4 buses and 16 registers, and the
socket map in `fft_pkg` has room for 16 registers.
