# LINC — a programmable link and interconnection chip in SystemVerilog

LINC is "glue" for pipelined systems built from off-the-shelf arithmetic
chips, register files and I/O ports. Instead of a board full of buses,
multiplexers, pipeline registers and FIFOs, one chip takes eight 4-bit data
streams in and hands eight 4-bit streams out. Along the way it can

* delay each input by 0 to 31 cycles, or group inputs into one or two FIFOs;
* route any input to any output, with a new routing every cycle;
* hold each output stream in a 14-stage pipeline register file and read any
  stage back out.

The routing is not sent to the chip every cycle. The chip stores up to 32
control patterns of 64 bits each, and each cycle a 5-bit address picks one.
The patterns sit in one bank of a two-bank memory, so a new program can be
loaded into the other bank while the chip runs. Wider datapaths use several
chips side by side (bit slicing). Larger crossbars use several chips whose
outputs are wired together and switched on and off through the output
enables.

This repository holds synthesizable RTL for one LINC chip, with testbenches
that check it.

## Datapath

```
 DI[i] ─► FPD i ─► [crossbar-in reg] ─► 8x8 crossbar ─► [crossbar-out reg] ─► PRF j ─► DO[j]
 (x8)  delay/FIFO      (32 bits)         3-bit select      (32 bits)         14 stages  (x8)
          ▲                                   ▲                                ▲
      d-code register              control pattern register (CPR) ──pipeline──┘
      FIFO controller              ▲
      WAF/RAF, WBF/RBF             control pattern memory, 2 banks x 32 x 64 bits, addressed by CA
```

* **FPD** (`linc_fpd`, `linc_fpd_ctrl`). This is the FIFO-or-programmable-delay
  stage. Each input has a 32 x 4 register file. As a *delay* of d cycles, the
  register file is written every running cycle at a free-running pointer and
  read d entries behind it. A delay of 0 bypasses the register file. As a
  *FIFO column*, the register file is written at the FIFO's tail when the
  write request comes and read at its head. FPDs that belong to the same FIFO
  share one head and one length, so a FIFO is 4 to 32 bits wide and 31 words
  deep.
* **Crossbar** (`linc_crossbar`). Output j takes input `xsel[j]`. Any input may
  feed several outputs.
* **PRF** (`linc_prf`). This is the pipeline register file. When its shift bit
  is set, the crossbar value enters stage 0 and every stage moves on by one.
  The output port shows one of three things, chosen by a 4-bit select: a
  stage (0-13), the crossbar value itself (14), or nothing (15, output
  enable low).

## The two-cycle transfer, and why a program can ignore it

The hardest part of LINC to follow is how the control is lined up with the
data. A data item takes two cycles from input pin to output pin. Yet the
pattern in use when the item *enters* controls the whole transfer, so
software can treat FPD, crossbar and PRF as if they had no delay at all. All
it has to remember is a fixed two-cycle delay at the output pins. The
pipeline works like this (`linc_cpr`, `linc_scan_path`):

| cycle | CA pins | control in use | data |
|-------|---------|----------------|------|
| t-1 | address a | — | — |
| t | — | CPR = pattern a | DI and FIFO requests enter the FPDs; the FPD outputs are captured in the crossbar-input register |
| t+1 | — | crossbar field of a (delayed 1 cycle) | the crossbar routes; the result is captured in the crossbar-output register |
| t+2 | — | PRF fields of a (delayed 2 cycles) | the PRF output is on DO; the PRF shifts at the end of the cycle |

So a pattern address goes out one cycle ahead of the data it controls. Data
appears two cycles after it entered. When a PRF stage is read in the same
cycle as a shift, the read sees the contents *before* the shift. FIFO status
(AFF/AFE/BFF/BFE) appears two cycles after the request cycle.

While `run` is low the whole pipeline holds: CPR, both crossbar registers,
the PRFs and the delay lines. The output pins keep showing what they showed.
The FIFOs and the loading/testing logic keep working.

## Control pattern (64 bits, `cpat_t` in `linc_pkg`)

| bits | field | meaning |
|------|-------|---------|
| 23:0 | `xsel[j]` at [3j+2:3j] | crossbar output j takes FPD `xsel[j]` |
| 31:24 | `shift[j]` | PRF j shifts in its crossbar value |
| 63:32 | `osel[j]` at [32+4j+3:32+4j] | PRF j output: 0-13 stage, 14 crossbar value, 15 off |

The field widths come from the original specification: 24 bits of crossbar
control, one shift bit and a 4-bit output select per PRF. The bit positions
and the select codes are this implementation's choice.

## FIFOs and delays: the d-code

The d-code register has one byte per FPD (`dfield_t`):

| bits | meaning |
|------|---------|
| 4:0 | count: delay length 0-31, or the FIFO's current length |
| 6:5 | role: 00 or 11 delay, 01 A-FIFO column, 10 B-FIFO column |
| 7 | unused |

Loading a d-code clears both FIFO heads. Each FIFO's length is taken from the
count field of its lowest-numbered member. Write zero there to start with an
empty FIFO, as the specification asks. If you read the d-code back (mode
1011), the FIFO members show the FIFO's live length.

FIFO requests (`waf/raf`, `wbf/rbf`) act in the cycle they are given, just
like data. On a read request the FIFO's FPDs show the head entry to the
crossbar in that cycle, and the head then moves on. A write to a full FIFO or
a read from an empty one is ignored. The status flags say *almost*: almost
full means at most two free slots (29-31 items), and almost empty means at
most two items (0-2). This leaves time for a controller one or two cycles
away. A consequence for software: when a computation ends, up to two valid
items may still sit in a FIFO that reports almost empty. Writing two dummy
items while the chip is halted pushes them out. The flag is two cycles late,
so this method is exact only when the reader leaves one cycle between reads
while it drains the FIFO; a reader that reads every cycle can run past the
last real item into the dummies. The same lateness means a controller whose
own loop through LINC is longer must slow down: in `tb_linc_coop_fifo` a
system that forwards data from one chip's FIFO into the next chip's FIFO
reads at most every other cycle.

## Loading and testing over the CC bus

With `cs` high, `mc` selects one operation per cycle (`mode_e`, decoded by
`linc_mode_decode`). The operation takes effect at the end of that cycle.

| mc | operation | mc | operation |
|----|-----------|----|-----------|
| 0000 | c-code shift register ← CC byte | 1000 | d-code shift register ← CC byte |
| 0001 | CC ← c-code shift register byte, rotate | 1001 | CC ← d-code shift register byte, rotate |
| 0010 | CPR ← c-code shift register | 1010 | d-code register ← d-code shift register |
| 0011 | c-code shift register ← CPR | 1011 | d-code shift register ← d-code register (live FIFO lengths) |
| 0100 | loading bank[addr] ← shift register, addr+1 | 1100 | scan path shift in from CC[0] |
| 0101 | shift register ← loading bank[addr], addr+1 | 1101 | CC[0] ← scan path, rotate |
| 0110 | swap working and loading bank | 1110 | d-code load and bank swap together |
| 0111 | addr ← 0 | 1111 | no operation |

A 64-bit word moves in eight cycles. The first byte shifted in ends up in
bits 7:0, and shift-out presents bits 7:0 first. Shift-out rotates, so after
eight cycles the register is back as it was. To load a program:

1. Use mode 0111 once.
2. For each pattern, use mode 0000 eight times and then mode 0100. Mode 0101
   skips a word.
3. Use mode 0110 to swap banks.

This can all happen while the chip runs. A bank swap reaches the data one
cycle later than a d-code load issued at the same time, because the pattern
address is used one cycle early. Issue the swap one cycle earlier if both
must apply to the same data item. `cc_oe` is high only for modes 0001, 1001
and 1101.

**Scan path.** The crossbar-input and crossbar-output registers (32 + 32 bits)
form a one-bit chain on CC[0]. Chain bit 0 is `xin_q[0][0]`, and bits 32-63
are `xout_q`. Scan-in shifts toward bit 0 and enters at bit 63. Scan-out
rotates: after 64 cycles every bit has been seen and the chain is back in
place, so a halted chip can be inspected and then resumed. Scanning
overrides normal capture and should only be done while the chip is halted.

## Reset

`reset` is synchronous and acts only once it has been high for two
consecutive cycles. It then clears the control pipeline, so every output
turns off and stays off until running patterns turn outputs on again. It
also clears the FIFOs, the delay pointer, the bank flip-flop (bank 0
working), the loading address, the shift registers and the d-code. A d-code
of all zeros makes every FPD a zero-length delay. The pattern memory and the
data registers are not cleared.

## Pins (`linc`)

| port | width | meaning |
|------|-------|---------|
| `clk`, `reset`, `run` | 1 | clock, reset, run/halt |
| `cs`, `mc` | 1, 4 | chip select, mode control |
| `ca` | 5 | control pattern address (one cycle ahead) |
| `cc_in`, `cc_out`, `cc_oe` | 8, 8, 1 | CC bus: in, out, drive enable |
| `di`, `dout`, `dout_oe` | 8x4, 8x4, 8 | data in, data out (0 when off), output enables |
| `waf`, `raf`, `wbf`, `rbf` | 1 each | FIFO write/read requests |
| `aff`, `afe`, `bff`, `bfe` | 1 each | almost full / almost empty |

## Where this RTL departs from the original chip

* **Clocking.** One rising-edge clock replaces the external two-phase clock
  and the dynamic half-cycle stages of the original. The cycle-level
  behaviour (two-cycle transfer, one-cycle-early address) is kept.
* **Tri-state pins.** They are brought out as data plus output enables. The
  tri-state drivers, the pads and the power pins are not part of the RTL.
  Several chips can share a bus by combining the `dout_oe` signals outside
  the chip.
* **Storage.** The 64 x 64 control pattern memory and the FPD storage are
  written as register arrays with asynchronous reads. A memory compiler
  macro could replace them.
* **The specification does not give these details; this RTL chooses them:**
  - the bit layout of the pattern and the d-code, and the output-select codes;
  - the shift direction of the shift registers and the scan chain order;
  - ignoring writes to a full FIFO and reads from an empty one;
  - the FIFO length on d-code load;
  - what reset clears;
  - treating mode 1111 as a no-operation;
  - driving CC[7:1] to 0 during scan-out.
* **Board-level arrangements are not in the RTL.** These are the bit-sliced
  and larger-crossbar arrangements of several chips, and the application
  systems built around LINC (Warp, FFT, robot-arm and geometry cells), which
  need floating-point units outside LINC. The testbenches build several of
  them from chip instances and simple behavioural models (see below).

## Example program: corner turning

`tb/tb_linc_corner_turn.sv` transposes 4x4 matrices that arrive one column
per cycle, four rows in parallel. The program has three parts:

* **Delays.** FPD i is a delay of i cycles.
* **Patterns.** Four patterns, used in turn, route FPD (c-j) mod 4 to output j
  in cycle c.
* **PRF taps.** Every PRF shifts every cycle. Output j taps stage 2-j, and
  output 3 takes the crossbar value directly.

Column j then leaves port j serially, starting 3 cycles after the matrix
starts (plus the 2-cycle pin delay). A new matrix enters every 4 cycles.
Two matrices in a row form an 8x4 matrix transposed by using the chip twice
over.

## Example program: an FFT butterfly cell

`tb/tb_linc_fft_cell.sv` puts LINC at the centre of a butterfly cell for a
constant-geometry FFT, with a multiplier and an adder/subtractor whose
results come back into the chip. Each butterfly computes X0 = a + b*w and
X1 = a - b*w: four multiplies and six additions. Two chips are bit-sliced to
8 bits. The units are behavioural, one cycle deep, and compute modulo 256
in place of floating point.

* **Ports.** Inputs: data memory, weights, product, ALU result. Outputs:
  the two multiplier operands, the two ALU operands, and the memory and
  weight streams passed on to the next cell.
* **Schedule.** A butterfly starts every 6 cycles, so the ALU is busy every
  cycle and three butterflies are in flight at once.
* **Buffering.** The PRFs on the ALU side keep a and the products until
  their partner arrives. One round trip through a unit takes 3 cycles: the
  2-cycle pin delay plus one cycle in the unit.
* **Weights.** PRF 1 shifts only when new weights arrive, so later
  butterflies reuse a weight pair without sending it again. Frame slots 0
  and 1 each need a version with that shift and one without, which makes
  eight patterns: six for the loop and two for new weights.

The testbench checks every product, every ALU result and the pass-through
streams.

## Testbenches and how to run them

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_linc` | The whole chip at full size against a cycle-level model of the programmer's view. Covers random patterns, data, FIFO traffic with fill/drain phases, halts, one-cycle reset pulses (which must do nothing), background loading and bank swaps while running, d-code loads with and without swap, scan-out and resume, read-back modes and scan-in. It also counts each mechanism and fails any that never happened. |
| `tb_linc_corner_turn` | The corner-turning program above, 40 matrices. |
| `tb_linc_fft_cell` | The FFT butterfly cell above, 200 butterflies with weights reused at random. |
| `tb_linc_multichip` | Eight chips as one 16x16 crossbar, 8 bits wide. Two nibble slices, and four chips per slice whose outputs share wires through `dout_oe`. It runs 32 random routings and checks that exactly one chip drives each wire. |
| `tb_linc_coop_fifo` | Three cooperating systems pass bursty data through the FIFOs of two chained chips under almost-full/empty flow control, then use the two-dummy termination. Every item must arrive once, in order, and no FIFO may be read empty or written full. |
| `tb_linc_fpd`, `tb_linc_fpd_ctrl` | Delay and FIFO storage; pointers, lengths, and status timing (exactly two cycles). |
| `tb_linc_crossbar`, `tb_linc_prf` | Routing and broadcast; PRF shifting and the three output kinds. |
| `tb_linc_cpm`, `tb_linc_ccode_ctrl`, `tb_linc_cpr` | Bank separation, the loading sequence, the read-back modes, and the CPR pipeline depths. |
| `tb_linc_dcode_ctrl`, `tb_linc_scan_path`, `tb_linc_mode_decode` | D-code load/unload, scan rotation, and the mode table. |

To build and run one (Verilator 5):

```
verilator --binary --timing --assert --top-module tb_linc \
    -Irtl -y rtl -y tb rtl/linc_pkg.sv tb/tb_linc.sv -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second. The top module has no
parameters, so `tb_linc` always runs the chip at its full size. The
submodules take `NPORT`, `DW`, `NSTAGE`, `CPW`, `NPAT` and `AW` parameters,
whose defaults are the chip's sizes.

## Files

`rtl/linc_pkg.sv` holds the shared types and constants, and `rtl/linc.sv` is
the top. Every other `rtl/linc_*.sv` file is one block named above. Each file
opens with a comment on its function, interface and timing.
