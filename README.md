# Programmable versus dedicated ARX hardware

Many symmetric ciphers and hash functions are built from three operations on
machine words: modular **A**ddition, **R**otation and **X**OR (ARX). This RTL
holds two engines for such work, written to be compared:

* **PPE**, a *programmable* ARX processing element. It runs small programs of
  56-bit instructions. Its ALU and rotator can be split into four 16-bit, two
  32-bit or one 64-bit unit, so one datapath serves algorithms with different
  word sizes.
* **Custom Pi-cipher engine**, a *fixed* datapath for the "\*" operation of
  the Pi-cipher authenticated cipher. A round controller chains eight such
  operations into one cipher round.

Both sit side by side in `arx_crypto_top` and share only clock and reset.
The programmable element trades area and speed for flexibility. The original
FPGA comparison found the dedicated cores several times more efficient in
throughput per area. That trade is the point of having both.

All RTL is SystemVerilog-2017 and uses the defaults described below. Every
module has a self-checking testbench in `tb/`.

---

## 1. The programmable element (PPE)

### 1.1 Datapath

```
             ext. input (64) ──┐
                               ▼
                       ┌── MUX (IO[1]) ◄──────────────── PE output ◄─┐
                       ▼                                             │
       ┌──────────── coefficient RAM, 64 x 64 bit ────────┐          │
       │ port A                                     port B│          │
       ▼                                                   ▼          │
   ALU X ◄───  ALU  ◄── Y ── MUX (ACC[1]) ◄── port B     rotator      │
                │                 ▲                        │          │
                ├──► accumulator ─┘ (load = ACC[0])        │          │
                └────────────────► MUX (IO[0]) ◄───────────┘          │
                                        └─────────────────────────────┘
```

* **Coefficient RAM** (`ppe_coef_ram`): 64 words of 64 bits (512 bytes). It
  has two synchronous read ports and one write port.
* **ALU** (`ppe_alu`, slices in `ppe_alu16`): four 16-bit slices. Each does
  add, XOR, pass X or pass Y.
* **Accumulator** (`ppe_accumulator`): holds an ALU result. It can be fed back
  as the ALU's Y operand, so `C + a + b + c` takes three instructions and
  never goes through the RAM.
* **Rotator** (`ppe_rotator`): four 16-bit rotators. Their mode decides
  whether they work as one 64-bit, two 32-bit or four 16-bit rotators.
* **Output multiplexer**: selects the ALU or the rotator as the element's
  output. A second multiplexer selects that output or the external input as
  the word written back to the RAM.

### 1.2 Instruction word

The instruction is 56 bits wide, most significant field first
(`ppe_pkg::ppe_instr_t`):

| field | bits | use |
|---|---|---|
| IO | 2 | `[1]` write the external input instead of the PE output; `[0]` PE output from the rotator instead of the ALU |
| rotator mode | 11 | see 1.4 |
| RC3..RC0 | 4 each | rotation count of each 16-bit lane |
| ACC | 2 | `[1]` ALU Y from the accumulator instead of port B; `[0]` load the accumulator |
| ALU mode | 3 | bit k joins slice k to slice k+1: `000` 4x16, `101` 2x32, `111` 1x64 |
| OP | 2 | `00` add, `01` XOR, `10` pass X, `11` pass Y |
| R/W | 2 | `[1]` write the RAM at ADDRW; `[0]` read ports A and B |
| ADDRW, ADDRB, ADDRA | 6 each | write, port-B and port-A addresses |

The field widths and their order come from the published instruction format.
Placing the first field at the top bit is this design's choice. So is the
meaning of each bit in the 2-bit fields and the OP and ALU-mode encodings.

### 1.3 Timing

An instruction takes two stages:

1. **Read.** In the cycle the instruction is valid, ADDRA and ADDRB are read.
2. **Execute.** In the next cycle, the ALU, rotator, accumulator and
   multiplexers act on the two words. The result is written to ADDRW at the
   end of that cycle.

The RAM ports are *write-first*: a port that reads the address being written
in the same cycle returns the new word. As a result, an instruction can use
the previous instruction's result with no gap, and the element never stalls.
It issues one instruction per clock. `pe_out` is registered.

Latency from the host's instruction address to `pe_out`:

| cycle | what happens |
|---|---|
| c | the host presents the instruction address |
| c+1 | the instruction is read from the instruction RAM |
| c+2 | the instruction executes |
| c+3 | the result is on `pe_out` |

External input for a load instruction must be on `data_in` in cycle c+2.

### 1.4 The width-configurable rotator

This is the least obvious part of the element. The rotation is to the
**right**. To rotate left by n, program a right rotation by width−n; for
example, ROTL⁷ on 64 bits is a right rotation by 57 = 48 + 9.

Each output lane i has a *neighbour* lane N(i):

* N(i) = i+1 (mod 4) when the four lanes form one 64-bit word;
* N(i) = i XOR 1 when the lanes form two 32-bit words.

The rotation happens in two coarse steps and one fine step:

1. **By 16.** A lane may take its neighbour's word. Mode bit 8 controls the
   even lanes and bit 9 the odd lanes.
2. **By 32.** A lane may take the word two lanes up (mode bit 10).
3. **Fine.** Each lane rotates right by its own count RCi (0..15). The bits
   it shifts in come either from itself or from N(i).

Mode bits `[7:0]` hold a 2-bit code per lane, lane 3 at the top:

* low bit: refill from N(i) rather than from the lane itself;
* high bit: N(i) is the 32-bit partner.

The seven published mode codes decode as follows:

| mode | operation |
|---|---|
| `00001010101` | 64-bit ROR by RC |
| `01101010101` | 64-bit ROR by 16+RC |
| `10001010101` | 64-bit ROR by 32+RC |
| `11101010101` | 64-bit ROR by 48+RC |
| `00011011101` | two 32-bit ROR by RC |
| `01111011101` | two 32-bit ROR by 16+RC |
| `00000000000` | four 16-bit ROR by RC3..RC0 |

The codes are published; the bit-by-bit reading above is this design's. It is
the simplest reading that makes every listed code do what its row says.
Codes outside the table give other, well-defined lane permutations. In the
32- and 64-bit modes, give all four RC fields the same count.

### 1.5 Programming model

The instruction RAM (`ppe_instr_ram`) holds 64 instructions of 56 bits
(448 bytes). It has two independent ports:

* The **programming port** (`prog_en`, `prog_addr`, `prog_data`) writes one
  instruction per clock.
* The **run port** (`cfg_en`, `instr_addr`) reads one instruction per clock
  and executes it.

The host drives the instruction address directly; there is no program
counter. Because the two ports are independent, the host can:

* load a new program while the current one runs;
* start a program before all of it is loaded;
* run a program longer than 64 instructions by rewriting slots just ahead of
  execution.

A read of the slot being written in the same cycle returns the new
instruction. The testbenches use the third pattern: instruction n goes into
slot n mod 64 one cycle before it runs.

`tb/ppe_prog_pkg.sv` contains an example: the full 64-bit Pi-cipher \*
operation as a 68-instruction program. It has 16 loads, then 52 instructions
using accumulator chaining, 64-bit rotations and XORs. The program uses 36 of
the 64 RAM words.

---

## 2. The custom Pi-cipher engine

### 2.1 The \* operation

The operation combines two inputs of four 64-bit words each,
X = (X0..X3) and Y = (Y0..Y3), into Z = (Z0..Z3).

**Step 1.** Each path computes four rotated sums, each a constant plus three
of its words:

| | X path (μ) | Y path (ν) |
|---|---|---|
| T0 | ROTL⁷(C0 + X0 + X1 + X2) | ROTL¹¹(C4 + Y0 + Y2 + Y3) |
| T1 | ROTL¹⁹(C1 + X0 + X1 + X3) | ROTL²³(C5 + Y1 + Y2 + Y3) |
| T2 | ROTL³¹(C2 + X0 + X2 + X3) | ROTL³⁷(C6 + Y0 + Y1 + Y2) |
| T3 | ROTL⁵³(C3 + X1 + X2 + X3) | ROTL⁵⁹(C7 + Y0 + Y1 + Y3) |

**Step 2.** Each path mixes its four sums with three-input XORs:

| X path (μ) | Y path (ν) |
|---|---|
| T4 = T0⊕T1⊕T3 | T8 = T1⊕T2⊕T3 |
| T5 = T0⊕T1⊕T2 | T9 = T0⊕T2⊕T3 |
| T6 = T1⊕T2⊕T3 | T10 = T0⊕T1⊕T3 |
| T7 = T0⊕T2⊕T3 | T11 = T0⊕T1⊕T2 |

**Output (σ).** Z3 = T4+T8, Z0 = T5+T9, Z1 = T6+T10, Z2 = T7+T11.

C0..C7 are the constants in `rtl/pi_pkg.sv`. Their bytes descend, and each
byte has four bits set.

### 2.2 Core structure (`arx_core`)

```
 inpx (32) → X buffer → 4 adders → rotator left → XOR bank ─┐
                                                            ├→ 4 output adders → FIFO → op_bus
 inpy (32) → Y buffer → 4 adders → rotator left → XOR bank ─┘
                       (control unit: ADDX/ADDY, XAkC/YAkC, XRC/YRC, XXC/YXC, OAC, FIFOC)
```

| block | module | note |
|---|---|---|
| X and Y buffers | `arx_buffer` | each holds 4 words, loaded 32 bits per clock |
| step-1 adders | `arx_addbank` | constant plus three words |
| left rotators | `arx_rotbank` | fixed amounts, so only wiring in front of a register |
| XOR banks | `arx_xorbank` | step-2 equations |
| output adders | `arx_outadd` | σ step |
| output FIFO | `arx_fifo` | 8 words; takes a 4-word result at once, gives one word per pop |
| control unit | `arx_ctrl` | sequences all of the above |

**How it runs.** Load takes 8 cycles: each cycle with `arx_load` high (while
`ready` is high) takes one 32-bit chunk of X and one of Y. Chunk 0 is the low
half of word 0.

The control unit then runs one stage per clock: adders, rotators, XOR banks,
output adders, FIFO push. `arx_flag` pulses when the result enters the FIFO,
5 cycles after the last load cycle. Results leave on `op_bus`, Z0 first, one
word per `pop`.

If the FIFO has no room for four words, the unit waits in the push stage with
`stall` high. The core is not pipelined across operations: the next load
starts once the push is done.

### 2.3 A round (`pi_round`)

The 16-word state is four 4-word chunks I0..I3. A round is two chains of the
\* operation:

* left to right: J0 = CI \* I0, then Jn = J(n−1) \* In;
* right to left: K3 = J3 \* CR, then Kn = Jn \* K(n+1).

The output is K0..K3. The left operand always enters the X (μ) side. The
round constants CI and CR are inputs.

All eight operations run on one `arx_core`, streamed over its 32-bit buses. A
round takes 137 cycles from `start` to `done`: each operation needs 8 load
cycles, 5 compute cycles and 4 pops.

---

## 3. Where this RTL departs from, or goes beyond, the published design

* **Word width of the custom core.** The published block diagram draws 16-bit
  adders, rotators and XOR banks. Those serve the 16-bit-word Pi-cipher.
  Constants and rotation amounts are published only for 64-bit words, so the
  core is built for 64-bit words with the same block structure. A 16-bit
  version would need the 16-bit constants and amounts in `pi_pkg`.
* **Width variants.** Single-, double- and quad-width custom cores are named
  and measured in the original, but not described. Only the single core
  exists here.
* **Constants.** The eight 64-bit constants are those of the 64-bit
  Pi-cipher; C1 is `D1CCCAC9C6C5C3B8` and C7 is `3A393635332E2D2B`.
* **Rotate direction.** The text calls the rotators left-rotating, while the
  mode table lists right rotations. The table was followed.
* **ALU and rotator control.** The original shows an "FSM" beside each of
  them. Both units finish in one cycle, so here the control is combinational
  decoding of the mode.
* **Your choices, not the original's:**
  * all reset behaviour (asynchronous, active low, registers to zero; the
    RAM arrays are not reset);
  * pipeline stages and write-first memories;
  * bit meanings inside the IO, ACC, R/W, OP and ALU-mode fields;
  * the custom core's handshakes, FIFO depth and one-stage-per-clock
    schedule.
* **Round constants** for `pi_round` are not built in; they are inputs.

Measured throughput of the original FPGA builds is not reproduced here; this
is RTL, not a timed implementation. In cycles:

| work | PPE | custom core |
|---|---|---|
| one \* operation | 52 instructions, plus loads | 13 cycles, 8 of them loading over the 32-bit buses |
| one full round | 448 instructions (32 of them loads), 451 cycles (`tb_ppe_round`) | 137 cycles |

---

## 4. Simulating

Each block has a self-checking testbench, `tb/tb_<module>.sv`. Each one:

* prints `TB_RESULT checks=N failures=M` and calls `$finish`;
* has a watchdog that ends the run and counts a failure if it hangs;
* uses `$urandom` stimulus;
* checks against models written from the equations, not from the RTL
  (`tb/pi_ref_pkg.sv`).

Example, for the whole design:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/pi_pkg.sv rtl/ppe_pkg.sv tb/pi_ref_pkg.sv tb/ppe_prog_pkg.sv \
  tb/tb_arx_crypto_top.sv --top-module tb_arx_crypto_top -o sim
./obj_dir/sim
```

For any other block, replace `tb_arx_crypto_top` with its testbench. Keep the
package files first on the command line.

`tb_arx_crypto_top` runs both engines at their default sizes at the same
time:

* The custom engine computes a full Pi-cipher round.
* The PPE computes the round's first operation, CI \* I0, from a program that
  does not fit in its instruction RAM and is streamed in.

The test checks both against the reference model. It also counts how often
each mechanism was used and fails if one never was: accumulator chaining,
write-first reads, every ALU and rotator width, programming while running,
and slot reuse. It runs in well under a second.

Other testbenches of note:

* `tb_ppe_rotator` checks every row of the mode table;
* `tb_ppe_top` runs two \* operations back to back through the streamed
  instruction RAM;
* `tb_arx_core` checks the 5-cycle latency and the FIFO-full stall;
* `tb_ppe_round` runs a whole Pi-cipher round as a PPE program
  (`round_program` in `ppe_prog_pkg`).

## 5. Files

* `rtl/ppe_pkg.sv`, `rtl/pi_pkg.sv`: types, field layout and constants.
* `rtl/ppe_*.sv`: the programmable element. `ppe_top` is the element plus its
  instruction RAM.
* `rtl/arx_*.sv`, `rtl/pi_round.sv`: the custom Pi-cipher engine.
* `rtl/arx_crypto_top.sv`: both engines side by side.
* `tb/`: one testbench per module, the reference model (`pi_ref_pkg`) and the
  PPE program builder (`ppe_prog_pkg`).
