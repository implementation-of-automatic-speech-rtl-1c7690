# A 16-bit DSP56001-style processor for low-power speech recognition

This is synthesizable SystemVerilog for a small fixed-point digital signal
processor built to run an isolated-word speech recogniser in under one MIPS.
The recogniser works in 20 ms frames. For each frame it computes 16th-order LPC
cepstral features, scores 5-state HMM word models with diagonal-covariance
Gaussians and takes one Viterbi step. The processor follows the published
architecture of such a recogniser's ASIC DSP. It is a micro-programmed machine
modelled on the Motorola DSP56001, cut down from 24-bit to 16-bit data to save
area and power:

* separate X and Y data memories, each with its own address bus and data bus;
* a single-cycle multiply-accumulate ALU with 40-bit accumulators;
* a dual address generator with modulo (circular) addressing;
* a controller that runs one instruction per clock, with zero-overhead
  branches and nested hardware loops;
* a host interface through which a PC boots the processor, sends data to it
  and reads results back.

One instruction can do an arithmetic operation, two memory moves and two
pointer updates in the same cycle:

    MAC X0,Y1,A   X:(R0)+,X0   Y:(R4)-,Y1

The block structure, bus widths, memory sizes, register set, addressing modes,
ALU operation list and host-interface behaviour come from the published
description. That description does not give the binary instruction encoding,
the boot program, the host register map, the rounding mode or the loop-stack
depth. These are this design's own choices, and they are marked as such below
and in each file's header.

## Block structure

```
            XA (11) ──────────────┬──────────────────────┐
            YA (11) ────────────┐ │                      │
                          ┌─────┴─┴───┐  NORM  ┌─────┐   ┌──────────┬──────────┐
               AGU_CNT ──►│   agu     │◄───────│ alu │◄─ │ X memory │ Y memory │
                          └─────┬─────┘        └┬──┬─┘   │ data_mem │ data_mem │
  ┌────────────┐                │               │  │     └────┬─────┴────┬─────┘
  │ bus_switch │◄── XD (16) ────┼───────────────┴──┼──────────┘          │
  │            │◄── YD (16) ────┼──────────────────┴─────────────────────┘
  │            │◄── GD (16) ────┴──────────┬───────────────┐
  └────────────┘                      ┌────┴────┐  flags  ┌┴───────────────┐
       PC data (8), PC address (16) ─►│ host_if │◄───────►│ cu (+boot_rom) │── MX/MY/ALU/AGU_CNT
                                      └────┬────┘         └──┬──────────▲──┘
                                           │ PD (24)      PA (10)    PD (24)
                                           └──────────►┌─────▼──────────┴─┐
                                                       │     prog_mem     │
                                                       └──────────────────┘
```

| file | unit |
|---|---|
| `rtl/dsp_top.sv` | the whole processor and its buses |
| `rtl/cu.sv` | controller: fetch, decode, program counter, jumps, DO loops, stalls, program load |
| `rtl/boot_rom.sv` | 64 x 24 loader ROM, inside the controller |
| `rtl/alu.sv` | X0, X1, Y0, Y1, multiplier, 40-bit adder, A and B, shift/saturate/round/normalise stage |
| `rtl/agu.sv` | R0-R7, N0-N7, M0-M7 and two address units |
| `rtl/data_mem.sv` | one 2048 x 16 data memory (used for both X and Y) |
| `rtl/prog_mem.sv` | 1024 x 24 program memory |
| `rtl/host_if.sv` | 8-bit PC port, 16- and 24-bit words, flags, status register |
| `rtl/bus_switch.sv` | copies one of XD, YD, GD onto another |
| `rtl/dsp_pkg.sv` | widths, control-word structs, instruction encoders |

The original buses are bidirectional. Here each bus is a multiplexer, because
the design has no tristate drivers. XD carries either X memory or the ALU. YD
carries either Y memory or the ALU. GD carries the controller (immediate data
or the loop counter), the AGU or the host interface. The bus switch is the only
path between buses. For example, `MOVE #5,X0` puts the immediate on GD and
routes GD to XD, and the ALU then loads X0 from XD. `MOVE X:(R1),N2` reads X
memory onto XD and routes XD to GD, and the AGU then loads N2 from GD.

## The controller pipeline

This is the part that needs the closest reading.

Every instruction takes one cycle. The fetch and decode of the next
instruction overlap the execution of the current one. Program memory and the
boot ROM are read combinationally. The fetch stage decodes the word into a
control word, and that control word is registered as the execute stage
(`ex` in `cu.sv`). In the next cycle the execute stage drives the ALU_CNT,
AGU_CNT, MX_CNT and MY_CNT control words, the bus route and the host-interface
strobes.

Branches and loops cost nothing beyond their own fetch:

* **Jumps** (`Jcc addr`) are resolved in the fetch stage. A conditional jump
  is fetched while the previous instruction executes. So that a jump can follow
  a `CMP` directly, the condition is evaluated on `ccr_next`: the flags that the
  ALU is producing in that cycle. The jump occupies one execute slot as a NOP.
* **DO loops** (`DO #n,end` or `DO reg,end`) run in the execute stage,
  because the count may come from any register over GD. The loop counter,
  start address (the word after the DO) and end address (the last word of the
  body) are loaded there. The loop that was active before is pushed onto a
  4-entry stack. Each time the fetch stage fetches the end address while the
  counter is above 1, it returns to the start address and decrements the
  counter. When the counter reaches 1, the fetch stage pops the stack and falls
  through. In the cycle in which the DO executes, the word after it is already
  being fetched, so the new loop registers are bypassed to the fetch stage.
  This is why a one-instruction loop works.
* **Stalls.** Reading the host data word while it is empty, or writing the
  output word while it is full, freezes both stages. Nothing is written during
  a stall.
* **Program load.** `WAIT DATAPC,P:(R0)+` stalls until the PC has written a
  24-bit word. It then writes that word to program memory at R0, with R0 taken
  from the X address bus, and post-increments R0. The write uses the single
  program address bus PA, so no fetch happens in that cycle and one empty
  cycle follows.

Programming rules that follow from this: the last instruction of a loop body
must not be a jump, and loops must not share an end address. A loop count of 0
runs the body once. A fifth nested loop overwrites the outermost entry on the
stack. There are no subroutine calls.

## Instruction encoding (own design)

All instructions are 24 bits. The encoder functions in `dsp_pkg`
(`i_par`, `i_movi`, `i_movr`, `i_movm`, `i_jmp`, `i_doi`, `i_dor`,
`i_wait`, `i_norm`) produce them, and the testbenches use these functions as
their assembler.

```
0 | op[22:19] | srca[18:17] | srcb[16:15] | dst[14] | Xmove[13:7] | Ymove[6:0]   parallel
    move field = en | store | reg[1:0] | Rn | mode[1:0]
      X reg 0 X0 1 X1 2 A 3 B, Rn = R0/R1;  Y reg 0 Y0 1 Y1 2 A 3 B, Rn = R4/R5
      mode 0 (Rn)  1 (Rn)+  2 (Rn)-  3 (Rn)+Nn
10 | dst[21:16] | imm[15:0]                                     MOVE #imm,dst
11 | op[21:18] | ...                                            other:
     0 MOVE src,dst   1 MOVE X/Y:ea<->reg (R0-R3 for X, R4-R7 for Y; all seven modes)
     2 Jcc (AL EQ NE GE LT GT LE CS; bit 10 leaves the boot ROM)
     3 DO #count(8 bit),end   4 DO reg,end   5 WAIT DATAPC,P:(R0)+   6 NORM Rn,A/B
```

ALU operations: NOP, MPY, MPYR, MAC, MACR, ADD, SUB, NEG, ABS, RND, DIV, CLR,
TFR, CMP, ASL, ASR. For ADD, SUB, CMP and TFR, `srcb = 1` selects the other
accumulator, and any other value selects the 16-bit register named by `srca`.
Register codes on GD: 0-3 X0 X1 Y0 Y1, 4/5 A/B (high word, limited on read),
6/7 A0/B0, 8/9 A2/B2, 10 host data word, 11 host flags (read) / status register
(write), 12 loop counter (read), 16-23 R0-R7, 24-31 N0-N7, 32-39 M0-M7.

## Arithmetic

Data is two's-complement fractional. The 16 x 16 product is sign-extended and
shifted left one place, so its binary point lines up with bit 31 of the 40-bit
accumulator (8 extension bits, then A1 and A0). Details:

* **Rounding** (MPYR, MACR, RND) adds 2^-16 and clears A0. This is round half
  up, not the DSP56001's convergent rounding.
* **Saturation.** A 40-bit overflow saturates the accumulator to the largest
  positive or negative value and sets V.
* **Limiting.** Reading A or B onto a 16-bit bus while the extension byte is in
  use gives 0x7FFF or 0x8000.
* **DIV.** `DIV S,D` does one non-restoring step: D = 2D + C, minus S when D
  and S have the same sign, plus S otherwise. The new C is the quotient bit.
  After `CLR` (which clears C) and 16 steps with a positive dividend below the
  divisor, A0 holds the 15-bit quotient.
* **NORM.** `NORM Rn,D` shifts D left and decrements Rn while D is unnormalised
  and not zero. It shifts D right and increments Rn while the extension is in
  use. Repeating it builds a floating-point exponent in Rn, which is what the
  NORM link from the ALU to the AGU is for.

Besides the published operation list (multiply and multiply-accumulate, each
with or without rounding, round, divide step, normalise step, add, subtract,
negate, absolute value), the ALU has CLR, TFR, CMP, ASL and ASR. Programs need
them to clear and copy accumulators, to compare before a conditional branch,
and to scale by two. Like the original, it has no logical operations.

If a parallel move writes the same accumulator as the arithmetic result, the
move wins. Moves read register values from before the instruction.

## Addressing

Each address register Rn works with its own Nn and Mn. The X unit uses R0-R3
and drives XA; the Y unit uses R4-R7 and drives YA. Both units work in the
same cycle. The addressing modes are (Rn), (Rn)+, (Rn)-, (Rn)+Nn, (Rn)-Nn,
(Rn+Nn) and (Rn-Nn). The two indexed forms, (Rn+Nn) and (Rn-Nn), do not
change Rn.

Mn = 0x7FF selects linear arithmetic. Any other Mn selects modulo Mn+1 over a
buffer aligned to the next power of two, as on the DSP56001. The design does
not check that Rn starts inside its buffer, or that |Nn| <= Mn+1.

## Host link and booting

The PC side is a synchronous byte port with one-cycle `pc_wr` / `pc_rd`
strobes. The register map is this design's choice:

| `pc_addr[2:0]` | register |
|---|---|
| 0, 1, 2 (write) | IN_L, IN_M, IN_H. The DSP reads {IN_M, IN_L} (16 bits) or {IN_H, IN_M, IN_L} (24 bits). |
| 3, 4 (read) | OUT_L, OUT_H of the 16-bit DSP output word |
| 5 (read) | STATUS_DSP, written by the DSP |
| 6 (read) | flags: bit 0 in_full, bit 1 out_full |

`pc_addr[15:3]` must match `BASE[15:3]`.

The PC writes the high bytes first. Writing IN_L marks the word full, and
further PC writes are ignored until the DSP has taken the word. Reading OUT_L
marks the output word empty.

After reset the controller runs the boot ROM loader:

```
MOVE #0,R0 ; MOVE HID,N1 ; DO N1,3 ; WAIT DATAPC,P:(R0)+ ; JMP P:0 (leave ROM)
```

The PC sends the program length L as a 16-bit word, then the L instructions as
24-bit words. The program then starts at address 0.

## Fit for the recogniser

The sizes below are those reported for the recogniser's program:

| | needed | built |
|---|---|---|
| program | 487 x 24 | 1024 x 24 |
| data, 10 word models | 752 temporaries + 289 constants + 10 x 189 = 2931 words | 2 x 2048 words |
| data, 20-word active vocabulary | 752 + 289 + 20 x 189 = 4821 words | does not fit in 2 x 2048 |
| cycles per 20 ms frame | 13375 | one instruction per cycle, so fclk >= 0.67 MHz |

The recogniser's assembly program itself is not available, so it has not been
run on this RTL. Instead, `tb_frame_frontend` runs the first stages of the
front end on one frame: pre-emphasis, a 240-point Hamming window and
autocorrelation lags 0 to 16. It uses 960 data words and a 34-word program.
Measured instruction counts (= cycles, without host-link waits) against the
reported cycle budget:

| stage | this design | reported |
|---|---|---|
| pre-emphasis (reported figure includes segmentation) | 724 | 659 |
| Hamming window | 486 | 489 |
| autocorrelation, 17 lags | 4083 | 4707 |

`tb_segmentation` shows how a continuous stream is cut into overlapping
frames of 240 samples every 160. The pre-emphasised samples go into a
240-word circular buffer (R0 with M0 = 239, at a base that is a multiple of
256). Each frame writes 160 new samples over the oldest ones. R0 then points
at the oldest sample of the frame, so one pass of 240 (R0)+ reads windows the
frame in time order and brings R0 back to where it started. No samples are
copied. The test program, which also sums the frame energy and uses no
parallel moves, takes 1846 cycles per frame.

`tb_hmm_classify` runs the classification side for 10 word models of 5 states
over six frames: Gaussian state scores, one Viterbi step per frame, and the
choice of the best model at the end. Each Gaussian score is written as
c + sum(w x^2 + v x), with w = -1/(2 sigma^2) and v = mu/sigma^2, so each
dimension costs two MACs. The frame is held in a 34-word circular buffer
(interleaved x^2 and x) that every state rereads through modulo addressing.
The Viterbi step keeps only self and next-state transitions. Per frame:

| stage | this design | reported |
|---|---|---|
| Gaussian scores, 50 states | 1903 | 3609 |
| Viterbi step | 408 (depends on branches) | 1429 |
| class determination | 52 (depends on branches) | 87 |

`tb_levinson` runs the order-16 Levinson-Durbin recursion. Each reflection
coefficient comes from 16 DIV steps on |num| / E, followed by a sign fix with
compare and branch. The coefficient vectors of two successive orders sit in
two buffers that swap roles each iteration. Each buffer is kept in both X and
Y memory, so one MAC reads a_j and a_(i-j) together. It runs in 1402 cycles
against a reported 1345.

`tb_lpc_cepstrum` converts 16 LPC coefficients to cepstral coefficients
c_1..c_16 with the minimum-phase recursion. It stores h_k = (k/16) c_k so that
every value stays a fraction. Each coefficient then takes n MACs, a multiply
by the constant 1/n and four left shifts. It runs in 457 cycles.

`tb_log_energy` computes c_0 = ln(E) / 16 for the residual energy E. NORM
shifts E up to a mantissa m in [0.5, 1) and counts the shifts down in R3.
The four bits of m below its leading one then index a 16-entry table of
ln(m) / 16 through (R4+N4) addressing. Finally a DO loop whose count is R3
adds ln(2) / 16 that many times. One value takes 36 to 51 cycles, depending
on the exponent. With the cepstrum recursion this gives about 500 cycles,
against a reported 1050 for c_0..c_16.

Together the kernels take about 9560 cycles per frame, against 13375 reported
for the whole recogniser. The total takes the front end from
`tb_frame_frontend`, which starts from a ready frame, so it leaves out the
circular-buffer handling of `tb_segmentation`. It also leaves out the scaling
steps of the original. Pre-emphasis and Levinson-Durbin run slightly over
their reported figures; the other stages run at or below theirs. These
are this design's own programs, not the original recogniser. They show that
every stage of it fits the instruction set, at about the reported cost.

## Where this design departs from the published one

* The three bidirectional data buses (XD, YD, GD) are multiplexers with one
  driver per bus per cycle, because the design has no tristate nets. The bus
  switch selects which bus feeds which.
* The program memory is a separate block beside the controller, as in the
  block diagram. The text places it inside the controller; the function is
  the same.
* Instruction encoding, boot program, host register map, loop-stack depth
  (4 levels) and rounding mode (round half up) are this design's own.
* The extra ALU operations listed under Arithmetic.
* The ISA-bus side of the host interface is reduced to a synchronous register
  port with one-cycle read and write strobes.
* The program memory is a RAM loaded at boot. The published ROM data tables
  (window coefficients and other constants) are kept in data RAM, as the
  original did during development.
* The example kernels are this design's own programs. For instance, the c_0
  table has 16 entries where the published one has 15.

## Verification

Each unit has a self-checking testbench in `tb/` that compares against values
computed independently, with plain integer arithmetic or hand-written
constants. Each prints one `TB_RESULT checks=N failures=M` line.

* `tb_alu`: 300 random operations against a 64-bit integer model, plus
  division, normalisation, saturation and limiting.
* `tb_agu`: random addressing on both units, linear and modulo.
* `tb_cu`: boot, program load, nested loops, one-instruction and count-1
  loops, taken and untaken jumps, a host stall, and an exact cycle count.
* `tb_host_if`, `tb_bus_switch`, `tb_data_mem`, `tb_prog_mem`, `tb_boot_rom`:
  the smaller units.
* `tb_dsp_top`: the whole processor at its default sizes. It boots a 72-word
  program over the host port and loads random data. The program then runs a
  dot product with dual parallel moves and MACR, a modulo-16 circular buffer,
  nested loops, a maximum search with compare and branch (class
  determination), NORM in both directions, a 16-step division and 40-bit
  saturation. The testbench checks every result, the exact cycle count of the
  dot product (20 cycles for 20 instructions), and that each mechanism
  happened at least once.
* `tb_frame_frontend`: the front-end frame described above. The 17
  autocorrelation values (high and low words) must equal a bit-true integer
  model of the same fixed-point steps. The instruction count of each stage
  must equal the count worked out from the program.
* `tb_hmm_classify`: the classification frames described above. The
  recognised model, its score and all 60 Viterbi scores must equal a bit-true
  integer model. The winning score must be unique and not saturated. The
  Gaussian stage's instruction count is checked exactly.
* `tb_levinson`: the 16 reflection coefficients, 16 LPC coefficients and the
  prediction error, bit-exact against an integer model that includes the
  division step.
* `tb_lpc_cepstrum`: the cepstrum recursion, bit-exact against an integer
  model, with its exact instruction count (20 + n cycles per coefficient).
* `tb_segmentation`: four overlapping frames of a continuous stream through
  a modulo buffer. Each frame energy must equal a bit-true integer model, and
  the frame loop's instruction count is checked exactly.
* `tb_log_energy`: c_0 for 40 energies spread over every exponent. Each
  result must equal a bit-true integer model and lie within 0.003 of
  ln(E)/16. The instruction count is checked exactly.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl rtl/dsp_pkg.sv \
          tb/tb_dsp_top.sv --top-module tb_dsp_top -o sim
./obj_dir/sim
```

Not verified: gate-level timing and power. Every run uses the same random
seed.
