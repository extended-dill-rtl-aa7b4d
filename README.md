# A 4-bit single-cycle sub-CPU and its gate-level component library

This is a very small register CPU core. It has four 4-bit registers and five
instructions, and runs one instruction per clock cycle. Around it sits a
library of classic textbook parts: adders, comparators, decoders, code
converters, flip-flops, latches, registers and a counter. The core is built
from those parts.

The core has no program counter and no instruction memory. An outside agent
presents a 9-bit instruction on `ir` and clocks the core once. The core also
talks to an external data memory over two 4-bit buses. The point of the design
is the datapath: how a handful of decoders, tri-state bus drivers,
demultiplexers and multiplexers become a working CPU datapath. Each of those
pieces is a separate module that can be reused on its own.

The design follows the sub-CPU example and component library of the technical
report *Extended DILL: Digital Logic in LOTOS* by J. He and K. J. Turner
(University of Stirling, CSM-142, 1997). In that report the circuits are
written as LOTOS processes. This is an independent SystemVerilog rendering
of the same hardware. Where the report leaves a point open, or contradicts
itself, the choice made here is stated below.

## The instruction set

An instruction has 9 bits:

```
  8     7 6     5 4    3 2    1 0
+-----+-------+------+------+------+
| IMM | OP    | DR   | SA   | SB   |
+-----+-------+------+------+------+
                     \ immediate /   (IR[3:0] when IMM = 1)
```

| OP | IMM | Assembly          | Effect                                     |
|----|-----|-------------------|--------------------------------------------|
| 10 | 1   | `Load DR,#v`      | `R[DR] <= IR[3:0]`                         |
| 10 | 0   | `Load DR,SA`      | `R[DR] <= M[R[SA]]`                        |
| 01 | –   | `Store SA,SB`     | `M[R[SA]] <= R[SB]`                        |
| 11 | –   | `Add DR,SA,SB`    | `{Flag1, R[DR]} <= R[SA] + R[SB]`          |
| 00 | –   | `Cmp SA,SB`       | `Flag0 <= (R[SA] == R[SB])`                |

Fields an instruction does not use are don't-care. IMM is ignored except for
a load. Flag1 is the carry of the last `Add`. Flag0 is 1 if the last `Cmp`
found its operands equal. No other instruction changes the flags.

Once a register was cleared, the only way to put a value into it used to be a
load from memory. But the memory address itself has to come from a register.
The immediate load exists to break that circle. It is also why the instruction
has 9 bits rather than 8.

The types and constants live in `dill_pkg`: `opcode_e`, the `instr_t` field
struct, and the `ctrl_t` control word.

## How an instruction moves through the datapath

```
 ir[8:6] --> ctrl_word --> RW AorC MW MorF LI ADD CMP
 ir[5:4] --> decoder2to4 --> DR one-hot  (write select)
 ir[3:2] --> decoder2to4 --> SA one-hot --+
 ir[1:0] --> decoder2to4 --> SB one-hot --+--> register_file
                                               |  R[SA] -> BusA  (= memory address)
                                               |  R[SB] -> BusB  (= memory write data)
   BusA, BusB --> demux1to2 (AorC) --+--> ripple_adder -> Sum, Carry -> Flag1 (ADD)
                                     +--> comparator4  -> Ls, Gr
                                                 Equal = ~(Ls|Gr)  -> Flag0 (CMP)
   RegIn = LI ? IR[3:0] : (MorF ? dt_in : Sum)     --> register_file write port
```

**Instruction decoder (`ctrl_word`).** This is pure combinational logic on
IR[8:6]:

| Signal | Equation            | Meaning                                    |
|--------|---------------------|--------------------------------------------|
| RW     | IR7                 | write a register (Load, Add)               |
| AorC   | IR6                 | buses to the adder (1) or comparator (0)   |
| MW     | ~IR7 & IR6          | memory write (Store)                       |
| MorF   | IR7 & ~IR6          | write-back from memory (1) or adder (0)    |
| LI     | IR8 & IR7 & ~IR6    | write-back is the immediate operand        |
| ADD    | IR7 & IR6           | load Flag1                                 |
| CMP    | ~IR7 & ~IR6         | load Flag0                                 |

Store also has AorC = 1, so its operands pass through the adder, but nothing
loads the result.

**Register file (`register_file`).** It holds four `reg_load_clr` registers.
Register *i* loads RegIn at the rising edge when `RW & DR[i]`. Each register
drives both buses through a `tri_repeater`, enabled by `SA[i]` for BusA and
by `SB[i]` for BusB. Because the enables come from one-hot decoders, exactly
one register drives each bus at any time. The two buses leave the core as
`bus_a_or_marr` and `bus_b_or_dtout`, the memory address and write data.
The memory answers on `dt_in`.

**ALU.** Two `demux1to2` send the buses either to a 4-bit `ripple_adder` or to
a 4-bit `comparator4`. The unused side sees zeros. The comparator is a
cascade of one-bit slices, most significant first. It says "less" or
"greater", and equality is the absence of both.

**Flags.** Both flags are 1-bit load-enabled registers. A plain D flip-flop
would pick up a new carry or compare result on every instruction. The load
enable (ADD for Flag1, CMP for Flag0) makes a flag hold until the next
instruction of its own kind.

## Timing

- One instruction takes one clock period. Apply `ir` after the rising edge.
  While the clock period runs, the decoders, buses, ALU and write-back
  multiplexers settle.
- The destination register and the flag load at the next rising edge.
- `mw`, both buses and the memory address are combinational in `ir` and the
  register contents. An external memory must do two things:
  - return `M[bus_a_or_marr]` on `dt_in` within the same cycle;
  - write `bus_b_or_dtout` at the rising edge when `mw = 1`.
  The testbench memory model does exactly this.
- `clr_n` is an asynchronous, 0-active clear of all four registers and both
  flags. Hold it at 1 for normal operation.
- Running the ten-instruction example program takes ten cycles.

## Tri-state buses with two logic values

The library's tri-state parts come from a two-valued world: there is no `z`.
A tri-state driver is modelled like this:

- `tri_repeater` outputs its data ANDed with its enable, so a disabled driver
  contributes 0.
- The bus (`tri_bus`, used twice inside `register_file`) is the OR of all
  contributions.

With exactly one enabled driver, this gives the same value as a real tri-state
bus. `tri_bus` carries an immediate assertion that at most one enable is
active. A bus with no driver reads 0; a real bus would float.

The same style is used in two more places:

- `register_4_tri` has an output enable `q_en`, and its `q` is forced to 0
  when disabled.
- In `bus_transfer`, four registers share one bus through a decoder with
  0-active outputs, and a fifth register G loads the bus. This is the classic
  "shared bus" textbook example.

The practical consequence: these modules can be synthesized as written into
AND-OR logic. To get real tri-state pads you would replace the AND by a
`z`-driving assignment at the chip boundary.

## The component library

Besides the core, `rtl/` holds the library parts. The report gives gate-level
netlists for most of them. Each is written and tested on its own.

| Module | Function |
|--------|----------|
| `full_adder`, `ripple_adder` (N = 8) | ripple-carry adder; the core uses N = 4 |
| `comparator1`, `comparator4`, `comparator8` | cascaded magnitude comparator: `ls`, `gr` outputs; `comparator1` is the NAND netlist of one slice |
| `decoder2to4`, `decoder3to8` | line decoders, 1-active outputs |
| `bcd_to_dec`, `excess3_to_dec`, `excess3gray_to_dec` | 4-bit code to one-of-ten, 0-active outputs; invalid codes drive no output |
| `parity8` | XOR tree over 8 inputs: 1 when the number of ones is odd |
| `demux1to2`, `mux2to1` (W = 8), `mux2to1_reg_8` | steering; the last registers the mux output on the falling edge |
| `dlatch4` | 4-bit transparent D latch |
| `reg_4x4_rw` | 4 words x 4 bits made of D latches, separate write and read addresses, read output 1 when disabled |
| `rs_latch` | unclocked NOR RS latch; R = S = 1 gives Q = Qbar = 0 |
| `latch_preclr` | clocked RS latch with 0-active preset and clear |
| `ms_rs_ff_preclr`, `jk_ff_preclr`, `d_ff_preclr` | master-slave flip-flops with 0-active async preset and clear; outputs change at the falling clock edge |
| `rs_ff_edge` | RS flip-flop sampling on the falling edge |
| `bi_counter4_reset` | 4-bit ripple binary counter of JK toggle stages, async reset when both reset inputs are 1 |
| `register_8`, `shift_register8` | 8-bit register and serial-in serial-out shift register on the falling edge |
| `reg_load_clr` | load-enabled register, async clear (used in the core) |
| `register_4_tri` | 4-bit D register with two 0-active load gates, async clear, output enable `~(m\|n)` |
| `tri_repeater`, `tri_bus`, `bus_transfer` | two-valued tri-state drivers and the bus example |
| `half_adder`, `encoder4to2`, `demux2to4`, `mux4to1` | small combinational parts; the encoder is a plain OR encoder, exact for one-hot inputs |
| `divider` (N = 3) | divide-by-2^N counter (N = 1, 2, 3 give divide by 2, 4, 8), falling or rising edge by `NEG_EDGE`; no reset |

The five modules of the last two rows are parts the report only names and
describes in a few words. Their circuits here are the textbook ones. Several other named parts
are sizes of modules above: a 2- or 4-bit adder is `ripple_adder` with N = 2
or 4, a 4-bit register is `register_8` with W = 4, an 8-bit D latch is
`dlatch4` with W = 8, a 2-bit shift register is `shift_register8` with N = 2,
and a T flip-flop behaves as `divider` with N = 1.

### Storage elements are written by function

The report builds flip-flops and latches from cross-coupled NAND or NOR
gates.
Such loops cannot settle in a two-state, zero-delay simulator, and a
synthesis tool would flag them as combinational loops. So every storage
element here is written as what it does, with `always_ff` or `always_latch`,
while the combinational parts keep the report's gate structure. In
particular:

- The master-slave flip-flops are modelled as registers on the falling
  clock edge, with the async preset and clear given priority. With both
  preset and clear active, `q` and `qbar` are both 1, as the NAND pair would
  give.
- `rs_ff_edge` depends on gate delays to make its clock pulse. It is written
  as an ordinary falling-edge register.
- `dlatch4`, `latch_preclr`, `rs_latch` and `reg_4x4_rw` are real latches,
  on purpose. Lint reports them as latches.
- The counter is a true ripple counter. Each stage is clocked by the previous
  stage's output, so its outputs do not all change at once. Stage 3 is the
  least significant bit and stage 0 the most significant, as in the report's
  netlist.

Some yosys versions do not synthesize a flip-flop with both an async preset
and an async clear. This affects `ms_rs_ff_preclr` and the parts built on it:
`jk_ff_preclr`, `d_ff_preclr`, `register_4_tri`, `bi_counter4_reset` and the
top. Verilator and other front ends accept them.

## Where this RTL departs from the report, and why

- **Register clear.** The report ties the clear inputs of the core's
  registers permanently inactive. Here the clear is the `clr_n` port, so the
  registers start from a known state. With `clr_n = 1` the circuit is the
  report's. As a side effect, the report's first experiment, a memory load
  whose address register was undefined, now simply reads `M[0]`.
- **Flag0 polarity.** The signal table and the behavioural trace both say
  Flag0 = 1 means "equal". One structural trace in the report shows the
  opposite values for two compare steps. The signal table is followed.
- **Immediate multiplexer.** The block diagram labels the immediate input of
  the last write-back multiplexer as input 0. The signal table and the
  decoder equation make LI = 1 select the immediate. The latter is followed.
- **Comparator slice pins.** The prose for one comparator slice swaps the
  roles of the data and cascade pins relative to how the 4-bit comparator
  connects it. The connection is followed: it is the only reading under which
  the netlist compares.
- **`reg_4x4_rw` address order.** The netlist makes `wb`/`rb` the address
  MSB, while its figure suggests the opposite. The netlist is followed.
- **Excess-3 decoder.** Output *k* goes low for input *k*+3, which is the
  definition of the code.
- **Added ports.** The report gives no way to load `bus_transfer`'s four
  source registers, so `ld`/`din` ports were added. The 8-bit comparator's
  cascade inputs are tied off internally, as in the report.
- **Carry input.** `ripple_adder` has a real carry-in, which the core ties
  to 0.

## Not included

- **External parts of the core.** The data memory, the program counter and
  the instruction memory are outside the core. The report draws them only as
  blocks around it and does not design them. The testbenches contain a
  16 x 4 memory model.
- **Parts named but not designed.** The report's library tables also name
  parts whose behaviour their names do not pin down. These are not provided:
  - lock-out flip-flops;
  - a bucket brigade and a pass-on circuit;
  - RS latches with data inputs;
  - T flip-flops with a D input;
  - a clock source.

  Basic gates, with or without tri-state outputs, are plain SystemVerilog
  operators here, or `tri_repeater`.

## Top level

`dill_top` holds the core and, beside it, one instance of each library part
that the core does not already contain. Each has its own port group:
`cpu_*`, `bt_*`, `add8_*`, `cmp8_*`, `dec38_*`, `bcd_*`, `xs3_*`, `xs3g_*`,
`par_*`, `rf_*`, `tr_*`, `cnt_*`, `rsff_*`, `lat_*`, `sr_*`, `mr_*`, `ha_*`,
`enc_*`, `dmx4_*`, `mux4_*`, `div_*`, `rsl_*`. The parts
are independent. Only the core, the bus example and the tri-state register
share `clk`.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. The expected values
are computed independently inside the testbench: truth tables, integer
arithmetic, or a reference state model. Combinational parts are tested
exhaustively where the input space allows it.

- **`tb_sub_cpu`** runs, in order:
  1. the memory load `Load R0,R1` on cleared registers;
  2. the report's ten-instruction program: four immediate loads, an add with
     carry (0011 + 1110 = 1 0001), an unequal and an equal compare, a store
     to M[0] and a load back;
  3. 400 random instructions.

  For every instruction it checks three things:
  - the buses and `mw` during the cycle;
  - all registers and flags right after the rising edge, which fixes the
    one-cycle latency;
  - the memory after a store.
- **`tb_dill_top`** drives the whole top at default parameters.
  - The core adds up four memory words, stores and reloads the sum,
    compares, adds 15 + 15 for a carry, and runs random code.
  - Every library part is exercised through the top.
  - The testbench counts each mechanism and fails if any never happened:
    immediate and memory loads, store, add, carry, equal and unequal compare,
    each bus source, counter wrap and reset, tri-state disable, async clear,
    latch preset, divider wrap, RS latch with both inputs active.

To simulate with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dill_pkg.sv tb/tb_sub_cpu.sv --top-module tb_sub_cpu
./obj_dir/Vtb_sub_cpu
```

Replace `tb_sub_cpu` by any other testbench name. `--timescale` is needed
because only the testbenches declare one. `-Wno-fatal` keeps Verilator's
warnings from stopping the build. These are width warnings in testbench
expressions, and a `NOLATCH` note that Verilator prints for the
`always_latch` block of `dlatch4`. Testbenches include
`rtl/check.svh` by that path, so run from the top directory. Verilator is a
two-state simulator. The testbenches therefore pulse every async reset after
time 0, rather than relying on an initial value, and should pass with
`+verilator+rand+reset+2` and any seed.

## Changing it

- The core's sizes are parameters of `sub_cpu` (`W`, `NREG`, `IRW`, defaulting
  to the package constants). The instruction format and the 4-bit comparator
  tie them to 4/4/9, and an elaboration-time check rejects other values.
  Widening the core means widening the fields in `dill_pkg` and the
  comparator, and giving the immediate more bits.
- The library parts are parameterized where their structure allows:
  `ripple_adder #(N)`, `mux2to1 #(W)`, `register_8 #(W)`,
  `shift_register8 #(N)`, `bus_transfer #(W)`, `tri_bus #(N, W)`,
  `divider #(N, NEG_EDGE)`.
- To add an instruction, extend `ctrl_word` and `opcode_e`. If a new result
  source is needed, add a write-back multiplexer. Then add its case to the
  reference model in `tb_sub_cpu`.
