# Counting the ones of a 64-bit word, seven ways

The job is simple: take a 64-bit word and give the number of bits set in it,
a value from 0 to 64 on 7 bits. There is no timing constraint. Simple as it
is, the job shows how one function can be mapped to hardware along the whole
range from fully parallel to fully sequential, trading area for clock cycles:

| design             | module              | how it works                                   | result after                | flip-flops |
|--------------------|---------------------|------------------------------------------------|-----------------------------|-----------:|
| adder tree         | `onectr_tree`       | 63 adders in 6 levels                          | combinational               | 0 |
| recursive tree     | `onectr_recursive`  | the same tree, described by recursion          | combinational               | 0 |
| single sum         | `onectr_direct`     | a loop of 64 additions, left to synthesis      | combinational               | 0 |
| pipelined tree     | `onectr_pipeline`   | the tree with a register after every adder     | 6 cycles, one word per cycle | 183 |
| shift register     | `onectr_piso`       | shift the word out, add one bit per cycle      | 64 cycles                   | 71 |
| input multiplexer  | `onectr_mux`        | a counter picks one bit per cycle              | 64 cycles                   | 14 |
| small processor    | `onectr_proc`       | an 8-bit datapath run by a program in ROM      | 237 cycles                  | 9 (+16x8 register file) |

The flip-flop counts are those of this RTL after synthesis. The most
elaborate of the seven is the processor. It takes most of this text.

Beside the counters sits `cla_recursive`, an 8-bit carry-lookahead adder. It
is built with the same recursive construction as the recursive counter: two
half-size blocks plus one combining cell per level. It shows that the method
is general. It is not part of any counter.

## Common interface

Every counter implements the same entity, with the signals it needs:

| port      | dir | width | meaning |
|-----------|-----|------:|---------|
| `clk`     | in  | 1  | clock, rising edge (sequential designs) |
| `rst`     | in  | 1  | synchronous reset, active high (pipeline only) |
| `start`   | in  | 1  | starts a count (shift register, multiplexer, processor) |
| `InPort`  | in  | 64 | the word |
| `OutPort` | out | 7  | the number of ones |

`onectr_top` places all the designs side by side. Each design has its own
`<d>_InPort`, `<d>_OutPort` and, if it has one, `<d>_start`, for `d` in
`tree`, `rec`, `dir`, `pipe`, `piso`, `mux` and `proc`. `clk` and `rst` are
shared. The adder has the ports `cla_a`, `cla_b`, `cla_c`, `cla_s`, `cla_g`
and `cla_p`.

Shared constants and types are in the package `onectr_pkg`: widths, the
multiplexer-source and register-address enums, the ALU operation enum and the
ROM word struct.

## Adder trees

`onectr_tree` adds the 64 bits in pairs with 32 one-bit adders. Those give
2-bit counts. It adds those in pairs with 16 two-bit adders, and so on. After
six levels, one 6-bit adder gives the 7-bit result. Adder *k* of a level
adds the outputs of adders *2k* and *2k+1* of the level before. The node is
`adder #(SIZE)`, an unsigned adder with a SIZE+1-bit output, so no level can
overflow. The parameter `N` (a power of two, default 64) sets the size.

`onectr_recursive #(SIZE)` describes the same tree by recursion. A counter of
SIZE bits is a counter of SIZE/2 bits on the low half, a counter of
SIZE-SIZE/2 bits on the high half, and one adder. A 1-bit counter is the bit
itself. The output has floor(log2(SIZE+1))+1 bits. Any SIZE works, not only
powers of two. The module instantiates itself, which SystemVerilog allows
because the parameter ends the recursion.

`onectr_direct` writes the function as a loop of 64 additions and leaves
the structure to synthesis.

## Pipelined tree

`onectr_pipeline` is the tree built from `adderreg`, an adder whose sum is
registered. Every level becomes one pipeline stage. A new word may enter on
every rising edge. Its count appears on `OutPort` six edges later. The
pipeline holds 32x2 + 16x3 + 8x4 + 4x5 + 2x6 + 7 = 183 flip-flops. `rst`
clears all of them at a clock edge.

## Serial counters

Both serial counters use a single 7-bit accumulator and take one bit per
cycle. Hold `start` high for at least one rising edge. The count is on
`OutPort` exactly 64 edges after the first edge with `start` low, and it
stays there until the next `start`.

* `onectr_piso`: an edge with `start` high loads `InPort` into a 64-bit
  shift register and clears the result. Each later edge shifts the register
  right by one and adds the bit that leaves it. `InPort` only has to be valid
  while `start` is high. After 64 shifts the register is empty, so the result
  stays unchanged.
* `onectr_mux`: an edge with `start` high clears a counter and the result.
  Each later edge adds `InPort[counter]`, chosen through a 64:1 multiplexer,
  and increments the counter. `InPort` must stay stable for the 64 cycles.
  The counter is 7 bits wide. Its top bit, set after 64 bits, stops the
  circuit. With a 6-bit counter that wraps around, the word would be added
  again and again.

## The processor

`onectr_proc` counts the ones with a program. Its datapath is 8 bits wide,
so the program treats the 64-bit word as eight bytes. It repeats the
following eight times: for each byte, add bit 0 to `Result`, then shift the
byte right by one.

```
        start                                    Flag
          |                                        ^
  +-------v-------- onectr_control ----------+     |
  |  PC (8 bit) --> onectr_rom (256 x 38) ---+--> Ctrl Sel Wen WA RAA RAB Op
  |   ^  next PC: start ? 0 : jump ? ADDR : PC+1  |
  +-----------------------------------------------+
                                   |
  +---------------- onectr_datapath v--------------------------------+
  |  InPort bytes IN0..IN7, Ctrl, ALU Y --[Sel]--> W                  |
  |  onectr_regfile 16x8: write W at reg[WA] on clk if Wen            |
  |                       A = reg[RAA], B = reg[RAB] (combinational)  |
  |  onectr_alu: Y = A op B, F --> Flag flip-flop                     |
  |  OutPort = Y[6:0]                                                 |
  +-------------------------------------------------------------------+
```

One instruction completes per clock cycle. In that cycle the ROM is read
at the PC, the registers are read, the ALU computes, and the multiplexer
selects the write data. At the rising edge the register write, the flag and
the PC update all take place together. There is no pipelining and there are
no hazards.

### Datapath

The register file, `onectr_regfile`, has 16 registers of 8 bits. Its two
read ports are combinational. Its one write port writes at the rising edge.
It has no reset. The program writes every register before it reads it.

| code | register | code | register |
|-----:|----------|-----:|----------|
| 0  | Result | 8  | Data6 |
| 1  | Mask   | 9  | Data7 |
| 2  | Data0  | 10 | Count |
| 3  | Data1  | 11 | Tmp   |
| 4  | Data2  | 12 | Zero  |
| 5  | Data3  | 13 | One   |
| 6  | Data4  | 14 | Eight |
| 7  | Data5  | 15 | (unused) |

The write data comes from a 10-way multiplexer. `Sel` = 0 selects the
instruction's 8-bit constant `Ctrl`. `Sel` = 1..8 selects byte IN0..IN7 of
`InPort` (IN*k* = `InPort[8k+7:8k]`). `Sel` = 9 selects the ALU result.
Codes 10 to 15 write zero.

The ALU, `onectr_alu`, is combinational:

| `Op` | name | result |
|-----:|------|--------|
| 0 | ADD | Y = A + B (mod 256) |
| 1 | SHR | Y = A >> 1 |
| 2 | AND | Y = A & B |
| 3 | EQ  | F = (A == B), Y = F |
| 4-7 | -  | Y = 0 |

F is 0 for every operation except EQ. The `Flag` flip-flop loads F at every
edge, so a conditional jump sees the EQ result of the instruction just
before it.

A constant cannot reach the ALU directly: the only path for a constant leads
into the register file. So the program first stores the constants it
compares or adds with (Eight, One, Zero) in registers.

### Instruction word and control

The 38-bit ROM word is `onectr_pkg::instr_t`, most significant field first:

| field | bits | meaning |
|-------|-----:|---------|
| `addr` | 37:30 | jump target |
| `jp`   | 29    | jump always |
| `jf`   | 28    | jump if `Flag` |
| `ctrl` | 27:20 | constant for `Sel` = 0 |
| `sel`  | 19:16 | write-data source |
| `wen`  | 15    | register write enable |
| `wa`   | 14:11 | write address |
| `raa`  | 10:7  | read address A |
| `rab`  | 6:3   | read address B |
| `op`   | 2:0   | ALU operation |

`onectr_control` holds the 8-bit PC. At each rising edge the PC becomes 0
while `start` is high. Otherwise it becomes `addr` when `jp` is set, or when
`jf` is set and `Flag` is high. In every other case it becomes PC+1. The
control unit also has a `pc` output, which is only there so the program can
be observed.

### Program

The ROM contents are computed from the address by a function in
`onectr_rom`, not listed word by word:

| address | instruction |
|--------:|-------------|
| 0        | Result <- 0 |
| 1        | Mask <- 1 |
| 2-9      | Data*k* <- IN*k* |
| 10-13    | Count <- 0, Zero <- 0, One <- 1, Eight <- 8 |
| 14+3*k*  | Tmp <- Data*k* AND Mask (*k* = 0..7) |
| 15+3*k*  | Result <- Result + Tmp |
| 16+3*k*  | Data*k* <- Data*k* >> 1 |
| 38       | Count <- Count + One |
| 39       | Count EQ Eight (sets Flag; no write) |
| 40       | if Flag jump 42 |
| 41       | jump 14 |
| 42       | Y = Result + Zero; jump 42 |
| 43-255   | jump 42 |

Word 42 is a hold loop. It keeps `Result` on the ALU output, which is
`OutPort`, until the next `start`.

**Timing.** Hold `start` high for at least one rising edge, with `InPort`
valid. `InPort` must stay stable until the eight bytes are loaded, that is
for 8 cycles after `start` falls. Keeping it stable to the end is simpler.
The PC reaches word 42 after 14 + 7x28 + 27 = **237** cycles. `OutPort`
shows intermediate ALU results until then. After that it holds the count.

To change the algorithm, edit `prog_word` in `rtl/onectr_rom.sv`. Then
update the step count that `tb/onectr_rom_tb.sv`, `tb/onectr_proc_tb.sv`
and `tb/onectr_top_tb.sv` expect.

## Recursive carry-lookahead adder

`cla_recursive #(SIZE)` (default 8) adds `a + b + c`. At every level, each
half reports a group generate `g` and a group propagate `p`. A combining
cell computes the carry into the upper half, `g_lo | (p_lo & c)`, and merges
the two halves: `g = g_hi | (p_hi & g_lo)`, `p = p_hi & p_lo`. A 1-bit cell
is a full adder with `g = a & b` and `p = a ^ b`. The carry out is
`g | (p & c)`. It is not a port, following the original example, which
brings out only G and P.

## How far to trust it, and where it departs from the original

* The processor's program is this design's own. The original defines the
  architecture, the instruction fields, the register and source codes and
  the loop-exit method. Its example ROM words are illustrations that do not
  form one program.
* The original gives 472 steps for the processor. This program takes 237
  cycles, one instruction per cycle. Where the other step count comes from is
  not known.
* Not specified in the original, and chosen here: the ALU operation codes,
  F and Y for EQ, the bit order of the ROM word, the registers Zero and One,
  the hold loop, and synchronous clearing of the PC by `start`.
* The input multiplexer's stop after 64 bits (see above) is an addition.
  The original gives 21 flip-flops for this counter; this one has 14.
* `adderreg` uses an active-high synchronous reset. The original does not
  say which polarity or timing it uses.
* The register file and the flag flip-flop have no reset. The processor
  has no `rst` input. It is restarted by `start`.
* In the carry-lookahead adder, the cell equations are the standard ones;
  the original only draws the cells.
* Verilator's lint reports undriven signals in `onectr_recursive` and
  `cla_recursive` when either is linted alone as a top. Inside a parent they
  elaborate fully and simulate correctly.

Two assertions guard the sequencing: in `onectr_control`, `start` always
brings the PC back to 0. In `onectr_mux`, the bit counter never goes past 64
once a count has started.

Every module has a self-checking testbench in `tb/`. The testbenches compare
against `$countones`, integer arithmetic or a model kept in the testbench,
and they check the cycle counts given above. `onectr_rom_tb` runs the
program on an instruction-level model written independently of the RTL.

`onectr_top_tb` runs all the designs at once at their default sizes: 13
words through the start-driven counters, and a new word every cycle through
the trees and the pipeline. It also counts how often each mechanism
occurred, and fails if one never did. The mechanisms are: pipeline words
back to back, pipeline reset, conditional jump taken and not taken,
loop-back jump, hold loop, restart in the middle of a count, multiplexer
stop, shift register emptied, and an adder generate and a carry through all
eight bits.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

```
verilator --binary --timing --assert -Irtl rtl/onectr_pkg.sv \
    tb/onectr_top_tb.sv --top-module onectr_top_tb
./obj_dir/Vonectr_top_tb
```

The same command works for any other `tb/<module>_tb.sv`; `-Irtl` lets
Verilator find the modules by name. Everything runs in well under a second.
