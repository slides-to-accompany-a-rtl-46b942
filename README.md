# An 8-bit relay computer in SystemVerilog

This is a logic-level model of a small 8-bit computer whose every gate,
register and control step is built from electromechanical relays: the relay
computer of Harry Porter (Portland State University). In relay
logic a signal is "1" when a wire carries +12 V and "0" when it is simply not
connected. Two consequences follow, and they shape the whole design:

* **A bus is a wired OR.** Any number of closed contacts may be tied to one
  wire. The wire carries 1 if any of them passes +12 V. Every bus in this
  model is the OR of the sources enabled onto it, and an idle bus reads 0.
* **A register bit holds itself.** A register bit is a relay that, once
  energised from its bus line, keeps itself energised through one of its own
  contacts. Loading a 0 cannot release it. A register must therefore be
  *cleared* before it is *loaded*, and a load ORs the bus into the bits.

The machine runs a compact instruction set on eight 8-bit registers, a
16-bit address space and a 32K byte static RAM. The RTL is synthesizable.
The relays themselves are not modelled. Each relay circuit is written as the
logic function it performs, and the timing is reduced to one strobe per
sequencer step.

## Architecture

```
                 8-bit data bus (wired OR)
   +------+------+------+------+------+------+------+------+-----+-----+-----+
   A      B      C      D      M1     M2     X      Y      ALU   imm   RAM
          |      |                                          ^           ^
          +--B,C-+----------------------------------------->|           |
                                                                        |
                 16-bit address bus (wired OR)                          |
   PC  Inc  M=M1:M2  XY=X:Y  J=J1:J2  ---------------------------> RAM address
        ^
        +-- incrementer (address bus + 1)
```

| Register | Width | Role |
|---|---|---|
| A, B, C, D | 8 | general registers. The ALU always reads B and C and writes A or D |
| M1, M2 | 8 | together M, the address used by LOAD and STORE |
| X, Y | 8 | together XY, a 16-bit register (return address of CALL, `XY+1`) |
| PC | 16 | program counter |
| Inc | 16 | holds address bus + 1. It advances PC and implements `XY <- XY+1` |
| J1, J2 | 8 | together J, the target address read from a branch instruction |
| Inst | 8 | instruction register |
| S, Cy, Z | 1 each | sign, carry and zero bits, stored by every ALU instruction |

The RAM is addressed by address-bus bits [14:0]. Bit 15 is ignored. The RAM
has an asynchronous read, and a write takes effect at the clock edge.

## The ALU

The ALU has no operand select. Its inputs are always registers B and C. A
3-bit function code goes through a 3-to-8 decoder. Each decoder line enables
one unit's output through an enable circuit, and the enabled outputs are
wired together:

| fff | function | result | Cy |
|---|---|---|---|
| 000 | add | B + C | adder carry |
| 001 | inc | B + 1 | adder carry |
| 010 | and | B & C | 0 |
| 011 | or  | B \| C | 0 |
| 100 | xor | B ^ C | 0 |
| 101 | not | ~B | 0 |
| 110 | shl | B rotated left by one (bit 7 moves into bit 0) | 0 |
| 111 | nop | 0 (no unit enabled) | 0 |

`inc` reuses the ripple-carry adder (eight full adders). C is gated off and
the carry into bit 0 is 1. S is bit 7 of the result. Z comes from the
zero-detect circuit. Clearing Cy for the logic functions is this model's
choice.

## Instruction set

| Encoding | Name | Effect | Steps |
|---|---|---|---|
| `00dddsss` | MOV8 | ddd <- sss. Registers A,B,C,D,M1,M2,X,Y are numbered 0..7. **ddd = sss clears the register** | 4 |
| `01rddddd` | SETAB | A (r=0) or B (r=1) <- ddddd sign-extended (-16..15) | 3 |
| `1000rfff` | ALU | A (r=0) or D (r=1) <- fff(B, C). Sets S, Cy, Z | 3 |
| `100100rr` | LOAD | A/B/C/D <- [M] | 3 |
| `100110rr` | STORE | [M] <- A/B/C/D | 3 |
| `1010dss0` | MOV16 | PC (d=0) or XY (d=1) <- M (ss=00), XY (01), J (10) | 4 |
| `10101110` | HALT | stop | 3 |
| `10110000` | INC16 | XY <- XY + 1 | 4 |
| `11000000 hi lo` | LDI16 | M1 <- hi, M2 <- lo | 6 |
| `111nczgl hi lo` | branch | J <- hi:lo. If l, XY <- address of the next instruction. If (n & S) \| (c & Cy) \| (z & Z) \| (g & !Z), PC <- J | 8 |

The named branches are:

* GOTO `11100110`
* CALL `11100111`
* BNEG `11110000`
* BCY `11101000`
* BZ `11100100`
* BNZ `11100010`

A return is `MOV16 PC <- XY` (`10100010`). Any other code executes as a
3-step no-operation.

Three readings in this table come from this model rather than from a
published definition:

* **Branch bits.** Six branch codes are defined. They are read as a bit
  field: bits 4..1 select the conditions, which are ORed together, and bit 0
  saves the return address.
* **MOV16 fields.** The numbering of `d` and `ss` follows the order in which
  the registers are listed. `ss = 11` is unused, and with d=1 it is the HALT
  code.
* **Byte order.** Two-byte operands are stored high byte first.

### Why `X=0` is written `MOV X,X`

This is the least obvious behaviour of the machine, and it comes straight
from the latching registers. MOV8 takes two execute steps:

1. **E1:** clear the destination register.
2. **E2:** the source drives the data bus and the destination loads it.

When the source and the destination are the same register, the source has
already been cleared by the time it drives the bus. So `00dddddd` sets the
register to 0. The sample program uses exactly this (`0011 0110` = `X=0`).
MOV16 into XY clears X and Y in the same way first, so `XY <- XY` also gives
0. All other loads (SETAB, ALU, LOAD, and the internal PC, Inc, J and Inst
loads) clear and load in the same strobe. Their source is never the
destination.

## Clock, sequencer and control

**Clock.** `clock_gen` models the relay oscillator as four relays A, B, C, D
in a twisted ring:

* B follows A, C follows B, D follows C.
* A follows NOT D.

The ring cycles through eight phase patterns. The machine clock is
`Clock = (A and B) or (C and D)`, which is high for five of the eight
patterns. `tick` pulses once per rising edge of Clock. One tick is one
sequencer step, i.e. `8*CLK_DIV` cycles of the simulation clock `clk`. The
ring structure is this model's reading of the oscillator. Only the Clock
equation is taken as given.

**Sequencer.** The `sequencer` is a one-hot chain of eight steps. Every
instruction begins with the same two fetch steps:

1. **F1:** address bus <- PC, Mem Read, Inst <- data bus, Inc <- address bus + 1.
2. **F2:** address bus <- Inc, PC <- address bus.

The control unit (`control`) maps the current step, the decoded instruction
(`instr_decoder`) and S/Cy/Z to enables, clears, loads and memory strobes,
and flags the last step. All registers change on the tick that ends a step.
The execute steps are listed at the top of `rtl/control.sv`. The step
sequences are this model's own; instruction timings of the original machine
are not reproduced.

A branch always reads its two address bytes into J (E1..E4). It then
optionally saves PC in XY (E5), and copies J to PC if the condition holds
(E6). A branch that is not taken therefore costs as much as one that is.

## Files

Every module has a header comment with its function, interface and timing.

| File | Contents |
|---|---|
| `rtl/relay_pkg.sv` | ALU codes, register numbers, instruction classes, decoded-instruction and control structs |
| `rtl/not_gate.sv`, `rtl/or_gate.sv` | relay NOT and OR circuits |
| `rtl/logic_bit.sv`, `rtl/logic8.sv` | 1-bit and 8-bit NOT/AND/OR/XOR |
| `rtl/full_adder.sv`, `rtl/adder8.sv` | full adder, 8-bit ripple adder |
| `rtl/shl8.sv`, `rtl/zero_detect.sv`, `rtl/decoder3to8.sv` | rotate, zero detect, function decoder |
| `rtl/bus_enable.sv`, `rtl/bus_or.sv` | enable circuit, wired-OR bus |
| `rtl/alu.sv` | the ALU |
| `rtl/relay_reg.sv` | latching register (clear, OR-load) |
| `rtl/inc16.sv` | 16-bit incrementer |
| `rtl/sram.sv` | 32K x 8 RAM |
| `rtl/clock_gen.sv`, `rtl/sequencer.sv` | four-phase clock, step sequencer |
| `rtl/instr_decoder.sv`, `rtl/control.sv` | instruction decoding and per-step control |
| `rtl/relay_computer.sv` | top level |

## Top-level interface (`relay_computer`)

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_DIV` | 1 | clk cycles per relay-clock phase |
| `MEM_BYTES` | 32768 | RAM size |

**Controls**

* `rst`: synchronous reset. It clears all registers, the flags and the
  sequencer, so execution starts at address 0.
* Loader port (`ld_we`, `ld_addr`, `ld_data`, `ld_rdata`): writes a program
  into RAM, and reads RAM back, while `rst` is held. An assertion enforces
  that writes happen only during reset. The port is this model's addition.
* `run`: lets the clock oscillate.

**Status outputs**

* `halted`: set by HALT.
* `instr_count`: counts completed instructions.
* `dbg_regs[0..7]`: A, B, C, D, M1, M2, X, Y.
* `dbg_pc`, `dbg_j`, `dbg_inst`: PC, J and the instruction register.
* `dbg_flags`: {S, Cy, Z}.
* `dbg_cond`: whether the branch condition of the current instruction holds.
* `dbg_phases`, `dbg_clock`: the four clock phases and the machine clock.
* `step_tick`, `step_state`: the step strobe and the one-hot sequencer state.

Together these outputs stand in for the front-panel lamps.

Assertions check two things: at most one source drives the data bus, and
the sequencer is always one-hot.

## Simulation

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/relay_pkg.sv tb/tb_relay_computer.sv --top-module tb_relay_computer
./obj_dir/Vtb_relay_computer
```

`tb_relay_computer` runs the whole machine at its default size. It contains
its own instruction-level model of the machine and checks the design
against it after every instruction. It compares:

* all registers, PC, J and the flags;
* the number of steps each instruction took;
* the whole RAM at the end of each program, read back through the loader port.

It runs two kinds of program:

1. **The sample program.** This is a shift-and-add multiply of B by C into X:
   a 29-byte loop with BNEG and BNZ. It is placed at 0010h behind a prologue
   that loads B and C from memory (its three branch addresses are moved by
   10h). It runs for several operand pairs. Whenever B*C < 256, X must equal
   B*C. A larger product wraps differently, because the program shifts with
   a rotate.
2. **Random programs.** 64 programs fill all of RAM with random bytes.

The testbench counts every instruction class, taken and untaken branches,
calls, self-move clears, Cy/Z/S being set, the XY+1 carry into X, and
stores. A mechanism that never occurs counts as a failure. The multiply
takes 96-118 instructions (3.3k-4.0k clk cycles). The whole testbench runs
in about a second.

`tb_relay_computer_slow` runs the multiply (13 x 11) with `CLK_DIV = 3`. It
checks that every step is exactly 24 clk cycles long, and that the run ends
with X = 143 after the same 105 instructions (452 steps).

The leaf testbenches cover their blocks exhaustively where that is feasible:

* ALU: all 8 x 65536 cases.
* Adder, logic unit, incrementer: all inputs.
* Decoder: all 256 codes.
* Control: every code x every flag setting.

## Limits and departures

* The model is cycle-level logic, not relay timing. Contact bounce, relay
  delays and the overlap of clock phases inside a step are not modelled.
* Some choices are this model's own, as described above:
  * the instruction step sequences and their lengths;
  * the branch bit-field reading;
  * the MOV16 field numbering;
  * Cy = 0 for logic functions;
  * the clock ring;
  * reset and the loader port.
* Undefined codes are no-operations.
* Lamps and the power transistors that drive the data-bus relays from the
  RAM are not modelled. The RAM output is simply gated onto the data bus.
