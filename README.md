# Summing a linked list in hardware, and the datapath parts it is built from

The main design here is a small fixed-function processor. It walks a linked
list held in an 8-bit memory and adds up the 2's complement numbers stored in
the list. It is a standard example of register-transfer design. You first write
the algorithm as register transfers. You then give each register, adder and mux
in those transfers a place in a datapath, and a small state machine sequences
the datapath. Finally you reschedule the work between the states so that the
clock can be faster or the hardware cheaper.

Next to it, the same top level holds the building blocks such a datapath is
made from. Each can be used and tested on its own:

- an adder hierarchy (half adder, full adder, ripple-carry adder) and a 16-bit ALU;
- an accumulator datapath and a bit-slice datapath;
- two small RTL sequences, each with its own controller;
- four ways of connecting registers: dedicated muxes, one shared mux, one bus, two busses;
- a register with load and output enables, a 4 x 4 register file and a 1024 x 4 SRAM.

All of it is synthesizable SystemVerilog-2017 (`rtl/`). Every module has a
self-checking testbench (`tb/`).

## 1. The list processor

### What it computes

The memory has 256 words of 8 bits. A list node at address `p` is two
consecutive words:

| address | contents                                  |
|---------|-------------------------------------------|
| `p`     | pointer to the next node (0 = end of list) |
| `p+1`   | the node's number, 8-bit 2's complement    |

The first node is always at address 0, and the list has at least one node. A
one-cycle pulse on `START` makes the processor sum the list from its head.
`DONE` then rises, and `R` holds the sum modulo 2^8. `DONE` stays high, and `R`
stays valid, until the next `START`.

As register transfers (`,` separates transfers in the same cycle, `;` separates
cycles):

```
on START:  NEXT <- 0, NUMA <- 1, SUM <- 0;
loop:      SUM  <- SUM + Mem[NUMA];                       -- COMPUTE_SUM
           NUMA <- Mem[NEXT] + 1, NEXT <- Mem[NEXT];      -- GET_NEXT
           until the pointer just read is 0;
           R = SUM, DONE = 1
```

`NEXT` points at the current node and `NUMA` at its number. The memory has one
port, so the processor can make only one access per cycle. Each node therefore
costs two cycles: one to read the number, one to read the pointer.

### Why there is a NUMA register (the optimisation)

The direct version of this algorithm reads the number at `Mem[NEXT+1]`. That
puts an 8-bit increment, a memory read and the SUM addition in series, all in
one cycle. The other cycle does little but a memory read. Computing the number's
address one cycle early, in the otherwise idle pointer cycle (`NUMA <- Mem[NEXT] + 1`),
takes the increment off the critical path.

Two datapaths follow from that idea, selected by the `ARCH` parameter:

- **`ARCH = 3` (default): one shared adder.** In COMPUTE_SUM the adder adds SUM and
  the memory word. In GET_NEXT it adds the constant 1 and the memory word. A mux
  in front of the adder (`ADD_SEL`) makes the choice. This saves an adder at the
  cost of one mux delay.
- **`ARCH = 2`: two adders**, `SUM + D` for SUM and `D + 1` for NUMA. `ADD_SEL` is ignored.

The original estimates for this design, from a component library (2:1 mux
1 ns, memory read 10 ns, register clock-to-Q and setup 0.5 ns each), give these
clock periods:

| version | clock period |
|---------|--------------|
| direct `Mem[NEXT+1]` version | about 31 ns |
| `ARCH = 2` | about 23 ns |
| `ARCH = 3` | about 24 ns |

The RTL has no delays, and these numbers are not checked here. The direct
version is not built.

### Datapath (`lp_datapath`)

```
            D (memory data, read asynchronously)
            |
 ADD_SEL: {SUM | 1} --+--> (+) <-- D          (ARCH 3; ARCH 2 has SUM+D and D+1)
                           |
        SUM_SEL: {adder | 0}  -> SUM   (LD_SUM)
       NEXT_SEL: {adder | 1}  -> NUMA  (LD_NEXT)
       NEXT_SEL: {D     | 0}  -> NEXT  (LD_NEXT)   --> ==0 --> NEXT_ZERO
          A_SEL: {NEXT | NUMA} -> memory address A
```

`NEXT_SEL = 0` loads the start constants, so one control bit serves both NEXT
and NUMA, and `LD_NEXT` loads both registers. `NEXT_ZERO` tests the value about
to enter NEXT, not the NEXT register. The end of the list is thus known in the
same GET_NEXT cycle that reads the last pointer, and no extra cycle is spent.
The six control points are bundled in the `lp_ctrl_t` struct (`rtl150_pkg`).

### Controller (`lp_controller`) and timing

| state       | controls                                         | next state |
|-------------|--------------------------------------------------|------------|
| any, START=1 | NEXT_SEL=0, SUM_SEL=0, LD_NEXT=1, LD_SUM=1       | COMPUTE_SUM |
| IDLE        | none                                             | IDLE |
| COMPUTE_SUM | A_SEL=1, ADD_SEL=1, SUM_SEL=1, LD_SUM=1           | GET_NEXT |
| GET_NEXT    | A_SEL=0, ADD_SEL=0, NEXT_SEL=1, LD_NEXT=1         | DONE if NEXT_ZERO, else COMPUTE_SUM |
| DONE        | `DONE`=1                                         | DONE |

For an n-node list, the edge that samples `START` is followed by 2n working
cycles. `DONE` is high after edge 2n+1, counting the START edge as edge 0.
`START` restarts the processor from any state, including in the middle of a list.
A synchronous `rst` puts the controller in IDLE with `DONE` low. The datapath
registers have no reset; `START` initialises them.

### Memory and system wrapper

`lp_memory` is a 2^AW x DW array with an asynchronous read, which the datapath
needs: it uses the word in the same cycle it addresses it. It has a single
address port. A synchronous write through that port exists only so that lists
can be loaded.

`lp_system` puts the processor and memory together. A `load_en` / `load_addr` /
`load_data` port takes over the memory's address port while the processor is
idle or done; an assertion flags loading while it is busy. `SUM_W` can widen SUM
and R, with the numbers sign-extended. The default is 8, matching the 8-bit
result bus.

## 2. Arithmetic: from half adder to ALU

- `half_adder`: `s = a ^ b`, `c = a & b`.
- `full_adder`: two half adders, the first adding `bin + cin`, the second adding
  `ain` to that sum. The two carries are ORed; they are never both 1.
- `ripple_adder #(N=16)`: N identical full adders with a rippling carry.
- `alu #(W=16)`: operations ADD, SUB, AND, OR, NOT (`~a`), XOR, PASS A and PASS B,
  selected by the 3-bit `alu_op_e` code. ADD and SUB share the ripple adder;
  SUB is `a + ~b + 1`. The flag `n` is the sign of the result and `z` is high
  when the result is zero. The carry out is not brought out.

## 3. Accumulator and bit-slice datapaths

**`acc_datapath`** is a single-address machine's execution unit: `AC <- AC op REG`.
REG loads from `din` when `ld_reg` is high. AC is the ALU's first operand, so
SUB gives `AC - REG`. The result goes back to AC when `ld_ac` is high.

**`bitslice`** is one bit of a datapath. It holds the AC bit and one bit each of
the registers R0, rs, rt and rd. Three bit busses run through it:

- the input bus, carrying the memory bit or the AC bit, which the registers load from;
- the X bus, carrying one register;
- the Y bus, carrying one register or AC.

A 1-bit ALU (ADD with carry, AND, OR, XOR) writes AC. **`bitslice_datapath #(N=16)`**
repeats the slice N times with one set of controls (`bs_ctrl_t`), chaining carries
from `ci` through to `co`. ADD is then an N-bit ripple add. The per-bus select
codes and the slice's operation set are this implementation's choices; the
structure only fixes which storage and busses a slice has.

## 4. Two RTL sequences and their controllers

These show how a datapath and a controller follow from an RTL description. Each
has a datapath module, plus a wrapper module holding a controller with one state
per step. In both, `start` begins the sequence, `busy` is high during it, and
`done` pulses once at the end.

- **`rtl_seq_example`** runs `ACC <- ACC+R0, R1 <- R0;  ACC <- ACC+R1, R0 <- R1;  R0 <- ACC;`
  in three cycles. In `rtl_seq_datapath`:
  - mux S2 feeds R0 or R1 to the adder;
  - mux S3 puts the S2 output or ACC on the register input bus;
  - muxes S0 and S1 let R0 and R1 load that bus or hold.

  An ACC load enable is added, because ACC must hold in the third step. An
  `init` port loads starting values.
- **`rtl_abc_example`** runs `regA <- IN; regB <- IN; regC <- regA+regB; regB <- regC;`
  in four cycles. IN fans out to regA and to a mux in front of regB; the mux
  chooses IN or regC. The caller must present the second operand on IN in the
  second step.

## 5. Moving values between registers

- `bus_transfer`: a decoder turns `sel` into enables for sources A and B on a
  shared bus, and C loads the bus when `ld` is high. `C <- A` is `sel=0, ld=1`;
  `C <- B` is `sel=1, ld=1`.
- Four registers rs, rt, rd and R4 (`regs[0..3]`), wired in four styles:

  | module | structure | transfers per cycle |
  |--------|-----------|---------------------|
  | `ic_point_to_point` | a 4:1 mux in front of every register; a register loads every cycle and holds by selecting itself | any permutation, swaps included |
  | `ic_mux_input` | one shared 4:1 mux; a load enable per register | one value, to any set of registers |
  | `ic_common_bus` | output enables onto one bus; load enables | one value |
  | `ic_two_bus` | every register drives either bus and loads from either, through its own 2:1 mux | two values |

Tri-state busses are modelled as AND-OR busses with enables, because the logic
here is two-state. Assertions check that no bus has two drivers. The same
applies to the storage parts below. Their disconnected output is shown by an
enable output (`q_en`, `io_oe`) going low, and the data output then reads 0.

## 6. Storage parts

- `register_ld_oe #(W=8)`: `ld` loads on the rising edge; `oe` connects the output.
- `regfile4x4`: 4 words x 4 bits, with a combinational read at `ra` (when `re` is
  high) and a clocked write at `wa` (when `we` is high). A read and a write can
  happen in the same cycle. A read of the word being written shows the old value
  until the clock edge.
- `sram1024x4`: 1024 x 4 with `rd`, `wr` and a 10-bit address. The bidirectional
  data pins are split into `io_in`, `io_out` and `io_oe`. The read is
  asynchronous. The write is clocked, unlike the asynchronous part it models, so
  that it synthesizes to a memory. Write wins over read.

## Where this departs from, or adds to, the original description

- **Width of SUM.** Numbers and pointers are 8 bits, and R is 8 bits wide, so SUM
  is 8 bits and wraps. The timing analysis of the original speaks of a "15-bit
  add" for SUM. Set `SUM_W` higher if a wider, non-wrapping sum is wanted.
- **Added ports.** Memory loading, `rst`, `busy`, `init`, `start`/`done` on the
  small examples and the `q_en`/`io_oe` enables are additions. The original
  describes the datapaths and transfers, not these ports.
- **Local choices, not given by the source:**
  - the ALU's operation encoding and its PASS A / PASS B codes;
  - the bit slice's control encoding and its operations;
  - DONE held high until the next START;
  - START accepted in any state.
- **Not built:**
  - the unoptimised direct version of the list processor;
  - a gate-level controller netlist shown only to illustrate critical-path
    delays (its gates and signals are not specified).
- **Timing.** The clock-period figures above are the original estimates. No
  delay model or synthesis to that component library is included.

## Verification

Each `tb/<module>_tb.sv` drives its module and compares the outputs with values
computed independently in the testbench. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends a hung run. The
list-processor tests:

- run both `ARCH` settings side by side;
- cover the four-node example list (nodes at 0x00, 0x05, 0x0E, 0x0A), a one-node
  list, a 127-node list that fills the memory and random lists;
- check the sum in R, and that DONE rises exactly 2n+1 cycles after START;
- check a restart in the middle of a run.

`rtl_design_top_tb` runs the whole top with every parameter at its default. It
loads and sums lists through the memory port and exercises each of the other
designs. It also counts how often each mechanism occurred, and fails if one
never did. The mechanisms counted include START, COMPUTE_SUM, GET_NEXT, end of
list, restart, memory load, every ALU operation, the bit-slice carry chain,
both RTL sequences, each interconnect style, the output enables and SRAM
reads and writes.

The testbenches were also run against deliberately broken copies of each module
(a wrong constant, a miswired mux, a dropped carry and so on). Every one was caught.

## Simulating

The simulator is plain Verilator 5. Files are found by module name, and the
package is listed first:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl +libext+.sv rtl/rtl150_pkg.sv tb/list_processor_tb.sv \
    --top-module list_processor_tb -Mdir obj_lp -o sim
./obj_lp/sim
```

Replace `list_processor_tb` with any other testbench, for example
`rtl_design_top_tb` for the whole design. To lint a module:
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/rtl150_pkg.sv rtl/<module>.sv`.
The testbenches use only `$urandom` for random data, so no constraint solver
is needed.

## Files

| file | contents |
|------|----------|
| `rtl/rtl150_pkg.sv` | shared types: ALU op codes, list-processor states and control struct, bit-slice controls |
| `rtl/list_processor.sv`, `lp_datapath.sv`, `lp_controller.sv`, `lp_memory.sv`, `lp_system.sv` | the list processor |
| `rtl/half_adder.sv`, `full_adder.sv`, `ripple_adder.sv`, `alu.sv` | arithmetic |
| `rtl/acc_datapath.sv`, `bitslice.sv`, `bitslice_datapath.sv` | example datapaths |
| `rtl/rtl_seq_*.sv`, `rtl/rtl_abc_*.sv` | the two RTL sequences |
| `rtl/bus_transfer.sv`, `rtl/ic_*.sv` | register interconnect |
| `rtl/register_ld_oe.sv`, `regfile4x4.sv`, `sram1024x4.sv` | storage |
| `rtl/rtl_design_top.sv` | everything side by side |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
