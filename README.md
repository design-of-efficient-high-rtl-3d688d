# A 4-bit processor with three interchangeable adders

The adder is the part of an ALU whose delay limits how fast a small processor can
be clocked. In a ripple carry adder, the carry has to pass through every bit position
in turn. This design is a minimal 4-bit processor built bottom-up from gates: full
adders, a ripple carry adder, an eight-operation ALU, a registered ALU, a 16-word
RAM and an instruction-decoding state machine. The ALU can use any one of three
adders:

- **ripple carry (RCA)**: the carry passes through every bit;
- **carry look ahead (CLA)**: every carry is computed directly from the bits'
  generate and propagate signals;
- **carry skip (CSKA)**: a 4-bit ripple group is bypassed when every one of its bits
  propagates.

All three give the same results. They differ only in how long the carry path is.
The top level, `cpu4_top`, holds three otherwise identical processing units side by
side, one with each adder. That keeps all three variants buildable from one file
and lets them be compared cycle for cycle.

Everything is synthesizable SystemVerilog. The RAMs are the exception in one
respect: the asynchronous RAM stores its data in latches, as an unclocked RAM must.

## Hierarchy

```
cpu4_top                      three processing units, index 0 = RCA, 1 = CLA, 2 = CSKA
└─ dsp_processor #(ADDER)     one 4-bit processor
   ├─ instruction_decoder     four-state sequencer
   ├─ ram16x4_sync            16 x 4 RAM, clocked, bidirectional data bus
   │  └─ ram16x4              16 x 4 asynchronous RAM (storage)
   └─ alu_registered          ALU + result/carry registers
      └─ alu
         ├─ arith_unit #(ADDER)   B-select multiplexer + adder
         │  ├─ ripple_carry_adder    (ADDER_RCA)
         │  ├─ cla_adder             (ADDER_CLA, default)
         │  │  ├─ cla_logic4
         │  │  └─ full_adder
         │  └─ carry_skip_adder      (ADDER_CSKA)
         │     └─ ripple_carry_adder
         └─ logic_unit
full_adder → basic_gate (AND / OR / XOR / NOT primitives)
```

Shared types are in `cpu4_pkg`: the ALU select `alu_sel_e`, the instruction word
`instr_t`, the adder choice `adder_kind_e` and the decoder states `dec_state_e`.

## The three adders

All three are built from the same one-bit cell, `full_adder`. It is made of five
primitive gates and exposes its propagate and generate signals as well as its sum and
carry:

```
p = a ^ b     g = a & b     s = p ^ cin     cout = g | (p & cin)
```

**Ripple carry** (`ripple_carry_adder`, `WIDTH` = 4) chains the cells: C0 goes in
at bit 0, and C4 comes out of bit 3. The worst case is a carry born at bit 0 and
propagated by every later bit, so the delay grows linearly with the width.

**Carry look ahead** (`cla_adder`, `cla_logic4`). Here each cell is used only for s,
p and g. The carry into each bit comes from a separate 4-bit look ahead unit, which
expands the recurrence C(i+1) = G(i) + P(i)·C(i) into a sum of products. Every carry
is then two gate levels deep:

```
C1 = g0 + p0 c0
C2 = g1 + p1 g0 + p1 p0 c0
C3 = g2 + p2 g1 + p2 p1 g0 + p2 p1 p0 c0
C4 = g3 + p3 g2 + p3 p2 g1 + p3 p2 p1 g0 + p3 p2 p1 p0 c0
PG = p3 p2 p1 p0          GG = g3 + p3 g2 + p3 p2 g1 + p3 p2 p1 g0
```

`cla_logic4` writes this as loops over product terms. After flattening it is the
expression above. Widths above 4 must be multiples of 4 and use a second look
ahead level. Each 4-bit section reports its PG and GG, and the carry into section
s+1 is formed directly from them:
GG(s) + PG(s)·GG(s−1) + … + PG(s)…PG(0)·cin.
No carry ripples from section to section. That second level is a flat sum of
products over all sections, so it grows quadratically in terms; for very wide
adders a tree of look ahead units would be the next step. The adder's `pg`/`gg`
outputs are the group propagate and generate of the whole width.

**Carry skip** (`carry_skip_adder`, `WIDTH` = 4, `GROUP` = 4). Each group of four bits
is a ripple carry adder. Its carry-out is

```
Carry = C(i+4) + P(i,i+3) · C(i),    P(i,i+3) = P(i+3) P(i+2) P(i+1) P(i)
```

When all four bits propagate, the group's carry-in reaches the next group through one
AND and one OR instead of four ripple stages. This is always correct: when
P(i,i+3) = 1, the ripple chain delivers the same carry, only later. The saving appears
when groups are chained (WIDTH = 8 or more). In a single 4-bit group, only the
carry-out has the short path; the sum bits still ripple. The `skip` output shows, per
group, that its propagate product is 1.

Logically the three adders are interchangeable, and the testbenches check this
exhaustively at 4 and 8 bits, and with random operands at 16 and 32 bits. The speed difference between them is a property of
the gate netlist and of timing analysis. No simulation here measures it.

## ALU operations

`alu` is combinational. `alu_registered` adds registers for `f` and `cout`: they load
on the rising edge when `en` = 1 and are cleared by the active-low asynchronous reset
`rst_n`. S2 chooses between two halves:

| S2 S1 S0 | cin = 0 | cin = 1 | names |
|---|---|---|---|
| 000 | a | a + 1 | transfer a (B = 0000) / increment a |
| 001 | a + b | a + b + 1 | add / add with carry |
| 010 | a + ~b | a + ~b + 1 = a − b | subtract with borrow / subtract |
| 011 | a − 1 | a | decrement a / transfer a (B = 1111) |
| 100 | a \| b | | OR |
| 101 | a ^ b | | XOR |
| 110 | a & b | | AND |
| 111 | ~a | | NOT |

- **Arithmetic half** (`arith_unit`): a multiplexer picks the adder's second input B
  from S1 S0 (0000, b, ~b, 1111). The adder then forms a + B + cin. The carry-out is
  the adder's carry. So for a subtraction, cout = 1 means "no borrow".
- **Logic half** (`logic_unit`): ignores cin. For logic operations, cout is 0.

## Processor and instruction timing

An instruction is a 3-bit opcode, which is the ALU select S2..S0, plus one carry-in
bit (`instr_t`). It comes with two 4-bit operands: `op1` is an immediate value and
`op2` is a RAM address. Every instruction does

```
RAM[op2] <= op1  <op>  RAM[op2]        (the ALU's a = op1, b = RAM[op2])
```

and leaves the result on `databus` and `cout`. This covers a small but complete
instruction set:

- transfer (000, cin = 0) stores an immediate value;
- OR with `op1` = 0 reads a word out;
- the other rows modify a word in place.

The decoder goes round four states, one instruction per trip:

| cycle | state | what happens |
|---|---|---|
| 0 | FETCH | `ready` = 1; `instr`, `op1`, `op2` are sampled at the end of the cycle |
| 1 | READ  | RAM read request at `op2` (csn = 0, rwn = 1) |
| 2 | EXEC  | the RAM drives RAM[op2] on the bus; the ALU takes a = op1, b = bus and loads its result register (`en`) |
| 3 | WRITE | the decoder drives the registered result on the bus and requests a write at `op2` (rwn = 0) |

So an instruction takes exactly 4 cycles. `databus`/`cout` change at the end of
EXEC, are valid from the WRITE cycle on, and hold until the next EXEC. The written
word lands in the RAM during the next FETCH, so a following instruction at the same
address reads the new value.

There is no handshake. The program source must present a new instruction whenever
`ready` is high; whatever is on the inputs then is executed. The decoder starts
fetching in the first cycle after reset.

## The RAMs

`ram16x4` is the plain RAM. It has `addr`, `datain`, `csn` (chip select, active low),
`rwn` (1 = read, 0 = write) and `dataout`:

- **Read**: while csn = 0 and rwn = 1, `dataout` shows the addressed word
  combinationally. Otherwise `dataout` is 0.
- **Write**: while csn = 0 and rwn = 0, the word follows `datain`. The write is
  level sensitive and there is no clock, so the 64 storage bits are latches. Tools
  report them as such.

`ram16x4_sync` is the version used in the processor. It adds a clock, a reset, and
one bidirectional data bus `data` in place of `datain`/`dataout`:

- **Registered inputs**: `addr`, `csn`, `rwn` and the bus value are registered on
  the rising edge and fed to a `ram16x4`. The latches therefore only see inputs that
  change at clock edges.
- **Read timing**: a read requested in cycle t drives the bus in cycle t+1. Four
  tristate drivers, one per bit, are enabled by the registered read request.
- **Write timing**: a write requested in cycle t stores the bus value sampled at the
  end of cycle t.
- **Reset**: deselects the RAM. It does not clear the contents, which start
  undefined. Programs should store a word before reading it.

The bus therefore has two drivers: the RAM and the decoder. The decoder's sequence
never enables them together.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `dsp_processor`, `alu_registered`, `alu`, `arith_unit` | `ADDER` | `ADDER_CLA` | adder in the ALU |
| `alu*`, `arith_unit`, `logic_unit` | `WIDTH` | 4 | data width |
| `ripple_carry_adder`, `cla_adder`, `carry_skip_adder` | `WIDTH` | 4 | operand width (multiple of 4 for CLA, multiple of `GROUP` for CSKA) |
| `carry_skip_adder` | `GROUP` | 4 | skip group size |
| `ram16x4`, `ram16x4_sync` | `DEPTH`, `WIDTH` | 16, 4 | words, bits per word |
| `basic_gate` | `KIND` | `GATE_AND` | AND / OR / XOR / NOT |

The processor itself is fixed at 4-bit words and 4-bit addresses (`DATA_W`, `ADDR_W`
in `cpu4_pkg`). The ALU and the adders widen by parameter. The processor's word
width would also need wider operands and a wider RAM.

## Where this design departs from, or adds to, its source description

The sources were:

- the gate, adder, ALU and RAM structure;
- the ALU operation table;
- the port list of the RAM;
- the registered ALU with asynchronous active-low reset;
- the block diagram of decoder, RAM and ALU.

The following are this design's own choices:

- **Carry-in in the instruction.** The instruction needs the ALU's carry-in as well
  as the 3-bit opcode, so the instruction word carries a fourth bit.
- **Operands and states.** The use of the operands (immediate and RAM address) and
  the four decoder states were chosen here. The source only gives a four-state
  machine taking a 3-bit opcode and two 4-bit operands.
- **ALU load enable.** The registered ALU has a load enable, so that the result stays
  stable during write-back.
- **Undriven outputs.** cout is 0 for logic operations, and the asynchronous RAM
  outputs 0 when it is not reading.
- **Synchronous RAM structure.** The synchronous RAM registers the inputs of the
  asynchronous RAM, and its reset does not clear the contents.
- **Wider adders.** CLA sections are joined by a second look ahead level over their
  PG/GG. The carry skip adder
  is a string of 4-bit groups. `cla_logic4` defines PG and GG in the usual way.
- **Extra outputs.** The `p` output of the ripple adder and the `skip` output of the
  carry skip adder were added, for the skip adder and for observation.
- **Three units in one top.** The source describes one processor that is rebuilt with
  each new adder. Here the three versions stand side by side.

Left out:

- the software that turns an assembly program into an instruction stream, since the
  testbenches drive instructions directly;
- the FPGA area and timing comparison itself.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference results come from integer arithmetic
in `tb_ref_pkg`, not from the adder structures.

- **Gates, full adder, logic unit, look ahead unit:** exhaustive.
- **Ripple, look ahead and skip adders:** exhaustive at 4 bits and at 8 bits (131,072
  cases each). The tests include the group propagate/generate and skip flags, and a
  count of carries that actually skipped a group.
- **`tb_adder_widths`:** all three adders side by side at 8, 16 and 32 bits, with
  20,000 random operand pairs plus carry extremes. One extreme makes every skip group
  pass the carry on.
- **Arithmetic unit and ALU:** exhaustive over all selects, carry-ins and operands,
  with each of the three adders.
- **Registered ALU:** one-cycle load, hold when `en` = 0, asynchronous reset.
- **RAMs:** write and read of all words, no write when deselected, the one-cycle read
  timing on the bidirectional bus, and that the bus is released when the RAM is not
  reading or is in reset.
- **Decoder:** checked against a stand-in RAM and ALU. The test covers the state
  ring, the RAM controls and ALU inputs in every state, and the final memory
  contents.
- **`tb_dsp_processor`:** about 430 instructions on each of the three processor
  variants. Every result is checked, and so is the 4-cycle instruction period.
- **`tb_cpu4_top`:** the end-to-end test at default parameters. All three units run
  the same 551-instruction program: load all words, one instruction per ALU table
  row, a carry through all four propagate bits, random instructions, a mid-program
  asynchronous reset, then a read-back of all words. The test counts these events
  and fails if any never happens:
  - each of the 12 table rows;
  - an adder carry-out;
  - a carry-skip event;
  - a look ahead group propagate;
  - RAM reads and writes;
  - the reset.

To run a test with Verilator, for example the top level:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cpu4_top \
  -y rtl -y tb +libext+.sv rtl/cpu4_pkg.sv tb/tb_ref_pkg.sv tb/tb_cpu4_top.sv
./obj_dir/Vtb_cpu4_top
```

Any other testbench works the same way: change the top module and the last file
name. The `inout` bus between decoder and RAM is handled by Verilator's tristate
resolution. Some synthesis front ends cannot flatten `inout` connections across
module boundaries. For such a tool, the bus in `dsp_processor` would have to be
split into separate read and write data lines, as in the original unclocked RAM
interface.
