# TOY-Lite: a teaching CPU built from decoders, multiplexers and register bits

TOY-Lite is a very small stored-program computer: 16 words of memory,
4 registers and a 4-bit program counter, with 10-bit words throughout and the
16-instruction set of the TOY teaching machine. This RTL builds it the way
you would build it on a breadboard. Every larger part is put together from
the same few components: a decoder, a bus multiplexer, a ripple adder, an
incrementer, and a one-bit storage cell. A small control unit steps the
machine through one **fetch** cycle and one **execute** cycle per
instruction. A front panel of switches and lights loads programs and starts
the machine.

Everything is parameterized by one number, `RW`, the width of a
register-number field. With the default `RW = 2` you get TOY-Lite. With
`RW = 4` you get the 16-bit TOY machine: 256 words of memory, 16 registers
and an 8-bit PC.

## The instruction word

```
 9    6 5  4 3  2 1  0          9    6 5  4 3        0
+------+----+----+----+        +------+----+----------+
|opcode|  d |  s |  t |        |opcode|  d |   addr   |
+------+----+----+----+        +------+----+----------+
```

A word is `4 + 3*RW` bits. An address is `2*RW` bits: the `s` and `t` fields
read together. Here `R[x]` means register x and `M[a]` means memory word a.

| op | name             | effect                                   |
|----|------------------|------------------------------------------|
| 0  | halt             | stop; PC is left at the following word   |
| 1  | add              | R[d] <- R[s] + R[t]                      |
| 2  | subtract         | R[d] <- R[s] - R[t]                      |
| 3  | and              | R[d] <- R[s] & R[t]                      |
| 4  | xor              | R[d] <- R[s] ^ R[t]                      |
| 5  | shift left       | R[d] <- R[s] << R[t]                     |
| 6  | shift right      | R[d] <- R[s] >> R[t] (arithmetic)        |
| 7  | load address     | R[d] <- addr                             |
| 8  | load             | R[d] <- M[addr]                          |
| 9  | store            | M[addr] <- R[d]                          |
| A  | load indirect    | R[d] <- M[R[t]]                          |
| B  | store indirect   | M[R[t]] <- R[d]                          |
| C  | branch zero      | if R[d] == 0: PC <- addr                 |
| D  | branch positive  | if R[d] > 0 (signed): PC <- addr         |
| E  | jump register    | PC <- R[d]                               |
| F  | jump and link    | R[d] <- PC; PC <- addr                   |

Arithmetic is two's complement and wraps modulo 2^W. A shift by W or more
moves every bit out. All four registers are general purpose: none of them
is wired to zero.

## One instruction = two clock cycles

The control unit (`control.sv`) has one phase bit and a run/halt bit.

**Fetch cycle.** The address MUX puts the PC on the memory address. The
addressed word is on the memory output bus within the same cycle, because
memory reads are combinational. At the rising edge that ends the cycle, the
instruction register (IR) takes that word and the PC takes PC + 1.

**Execute cycle.** The opcode in IR decides what happens:

- which register goes out on read port 1 (`s`, or `d` for store, the
  branches and jump register); read port 2 always carries `t`;
- what the ALU computes;
- which source the register MUX, address MUX and PC MUX pass on;
- which of the three enable writes is on: register, memory or PC.

At the rising edge that ends the cycle, the result is written. A register
write, a memory write and a PC load can all happen on that same edge; jump
and link uses two of them.

Each instruction therefore takes exactly 2 cycles, halt included. The PC has
already been incremented when execute starts. That is why jump and link
saves the address of the following instruction, and why the PC points past
the halt once the machine stops.

**Run and halt.** Whether the machine runs is held in an SR flip-flop
(`sr_flipflop.sv`). The RUN switch sets it. Reset clears it, and so does a
halt instruction during its execute cycle. The flip-flop is written as a
level-sensitive latch; it is the only latch in the design, and it is there
on purpose. While the machine is stopped, the phase stays at fetch.

**One-hot rule.** Every MUX select that control produces must be one-hot,
and the PC must be told either to load or to increment, never both. A
concurrent assertion in `control.sv` checks this on every clock.

## Datapath

```
            +--------- PC MUX <-- IR.addr, R[d] (port 1), panel address
            v
   PC (counter: register + INC + 2-way MUX) ---+
                                               v
   IR.addr, R[t] (port 2), panel address --> ADDR MUX --> MEMORY (2^(2RW) x W)
   R[d] (port 1), panel data --> MEM-IN MUX ----------------^    |
                                                                 v  memory output
   IR <------------------------------------------------------------+
   REGISTER MUX <-- ALU, memory output, IR.addr, PC
        v
   REGISTERS (2^RW x W, two read ports) --port 1 (a)--> ALU
                                        --port 2 (b)--> ALU
```

| file | part | how it is built |
|---|---|---|
| `toy_lite.sv` | the computer | wires the parts below together |
| `control.sv` | control unit | phase flop, SR run flip-flop, opcode decode into a `ctrl_t` struct |
| `alu.sv` | ALU | every function computes all the time; a 3-to-8 decoder line ANDs each result; an OR collects the selected one |
| `adder.sv` | adder | ripple-carry chain of full adders (parity sum, majority carry) |
| `incrementer.sv` | INC | half-adder chain with carry-in 1 |
| `shifter.sv` | shifter | plain barrel shift, left and arithmetic right |
| `decoder.sv` | decoder | one AND term per output |
| `bus_mux.sv` | MUX | AND each bus with its select line, OR the results |
| `program_counter.sv` | PC | register + incrementer + 2-way MUX; control wires load / increment / enable write |
| `proc_register.sv` | IR, and the PC's storage | K register bits that share one enable write |
| `memory_bank.sv` | main memory | address decoder + memory-bank bits; each output column is an OR |
| `register_file.sv` | registers | dual-port bits + three decoders (two read, one write) |
| `reg_bit.sv`, `mem_bit.sv`, `dp_mem_bit.sv` | storage cells | flip-flop; flip-flop with read select; flip-flop with two read selects |
| `toy_pkg.sv` | shared definitions | opcode enum, phase enum, MUX select positions, control-word struct |

The memory and the registers are made of individual flip-flop cells with
decoders and OR trees, not inferred RAM arrays. The structure is meant to
match the component-level picture. With `RW = 2` there are 215 flip-flops
in total.

## Front panel

All front-panel inputs act only while the machine is stopped:

- `panel_deposit` writes `panel_data` into memory at `panel_addr`;
- `panel_load_pc` sets the PC to `panel_addr`;
- `mem_out` shows memory at `panel_addr`;
- `panel_run` starts the machine from the current PC.

The lights are `running`, `phase`, `pc` and `ir`. The switches reach the
datapath through extra inputs on the address MUX and the PC MUX, plus a
2-way MUX in front of the memory input. This wiring is this design's own.

Drive the panel inputs away from the rising clock edge. Keep `panel_run`
high for about one cycle, and do not press it in the execute cycle of a
halt (an assertion checks this).

## Departures and choices to know about

These points are this design's choices:

- **Instruction meanings.** The opcode names and numbers are TOY's. The
  register transfers in the table above (which field is the destination,
  the signed test in branch positive, the arithmetic right shift) follow the
  usual TOY definitions.
- **Bit order.** The first register field after the opcode is taken as the
  destination.
- **Clocking.** Each phase is one full clock cycle, and every storage
  element is a rising-edge flip-flop. A real two-phase machine would
  instead write in the "clock" part of each phase. The behaviour seen from
  one instruction to the next is the same.
- **Reset.** A synchronous reset clears every register, every memory word,
  the PC, the IR and the run bit. The component-level cells have no reset.
- **Register write address.** The register file has a write address
  separate from its two read addresses, so R[d] <- R[s] op R[t] finishes in
  one execute cycle.
- **Control wires.** The control word has 22 select, enable and function
  bits, plus three register addresses. The classic TOY-Lite design counts
  27 control wires but does not list them, so this control word does not
  try to match that count.
- **Not modelled.** The clock generator is not modelled; `clk` is an input.
  Relays and transistors, below the gate level, are not modelled either.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example, the whole computer:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/toy_pkg.sv \
    tb/tb_toy_lite.sv --top-module tb_toy_lite -o sim
./obj_dir/sim
```

`tb_toy_lite` runs at the default size. It keeps its own instruction-level
model of TOY-Lite. It loads programs through the front panel, runs them,
and compares every memory word and the final PC with the model. It also
checks that each program took exactly 2 cycles per instruction. Four
directed programs cover all 16 opcodes, taken and untaken branches, jump
and link / jump register, and the PC wrapping from 15 to 0; their key
results are also checked against hand-worked values. After that come 150
random programs that the model shows will halt. At the end the bench
reports how often each opcode and each mechanism occurred, and an opcode or
mechanism that never occurred counts as a failure.

To build the 16-bit TOY, set `RW = 4` on `toy_lite`. `tb_toy_classic`
builds it at that size: 256 x 16 memory, 16 registers and an 8-bit PC. It
runs one directed program, which uses the high registers, addresses above
15 and 16-bit overflow, and then 20 random programs. Every result is checked
against the same kind of instruction-level model.
