# Single cycle datapath unit (triple bus, 32 x 32-bit)

This is the datapath of a simple 32-bit computer in which every operation
takes exactly one clock cycle. Three internal buses connect a register file,
an ALU, an immediate register and an external memory:

```
                      +------------------+
   Z bus ------------>| register file    |-- X port --> X bus --+--> ALU operand A
   (z_wa, rwe)        | 32 x 32 bit      |                      +--> mem_addr
                      |                  |-- Y port --+
                      +------------------+            |
   im_va -- immediate register (im_en) ---------------+--> Y bus --+--> ALU operand B
                                                                   +--> store gate (st_en) --> mem_wdata
   ALU result (AU | LU | SU) ------------+
   mem_rdata --> load gate (ld_en) ------+--> Z bus --> register file write port
```

* The **X bus** carries register `x_ra`. It is the ALU's first operand and
  the memory address.
* The **Y bus** carries register `y_ra`, or the immediate value when
  `im_en = 1`. It is the ALU's second operand and the data for a store.
* The **Z bus** carries the ALU result, or the memory data for a load. When
  `rwe = 1` it is written into register `z_wa`.

Every control signal for one cycle is gathered in one **microcode word**
(`dpu_pkg::ucode_t`), which is applied at the start of the cycle. Signals
propagate through the register file read ports, the ALU or the memory, and
the result on the Z bus is clocked into the register file at the rising
edge that ends the cycle. The datapath does not sequence anything itself.
Whatever feeds it microcode (a controller, a microprogram memory or a
testbench) decides what happens each cycle.

## Read-before-write in one cycle

The key timing property is that a register can be both a source and the
destination of one operation. For `R2 = R1 + R2` with R1 = 1 and R2 = 3,
the Y bus shows 3 throughout the cycle. The adder forms 4, and R2 becomes 4
only at the edge that ends the cycle. The register file therefore reads
combinationally and writes on the clock edge. There is no bypass: a value
written in one cycle can be read from the next cycle on, and that is all a
single cycle machine needs.

## Microcode word

| field | width | meaning |
|---|---|---|
| `alu.au_en` | 1 | adder/subtractor drives Z |
| `alu.as_n` | 1 | 0 = add (X + Y), 1 = subtract (X - Y) |
| `alu.lu_en` | 1 | logic unit drives Z |
| `alu.lf` | 2 | logic function: 00 AND, 01 OR, 10 XOR, 11 NOT X |
| `alu.su_en` | 1 | shift unit drives Z |
| `alu.st` | 2 | shift type: 00 logical left, 01 logical right, 10 arithmetic right, 11 rotate right; distance = Y[4:0] |
| `x_ra`, `y_ra` | 5 each | registers placed on X and Y |
| `z_wa` | 5 | register written from Z |
| `rwe` | 1 | register write enable |
| `im_en` | 1 | 1 = immediate drives Y, register file Y out released |
| `im_va` | 32 | immediate value |
| `st_en` | 1 | store gate: Y bus to memory data lines |
| `ld_en` | 1 | load gate: memory data lines to Z bus |
| `rw` | 1 | memory read/write line: 0 = read, 1 = write |
| `msel` | 1 | memory select |

Examples (fields not listed are 0):

| operation | microcode |
|---|---|
| `R3 = R1 + R2` | `au_en=1 as_n=0 x_ra=1 y_ra=2 z_wa=3 rwe=1` |
| `R15 = R15 << R6` | `su_en=1 st=00 x_ra=15 y_ra=6 z_wa=15 rwe=1` |
| `R28 = R5 + imm` | `au_en=1 x_ra=5 im_en=1 im_va=imm z_wa=28 rwe=1` |
| `R4 = M[R7]` | `x_ra=7 z_wa=4 rwe=1 ld_en=1 rw=0 msel=1` (all ALU enables 0) |
| `M[R5] = R9` | `x_ra=5 y_ra=9 st_en=1 rw=1 msel=1 rwe=0` |

Rules that the microcode must follow are checked by immediate assertions
(`--assert` in Verilator):

* At most one of `au_en`, `lu_en`, `su_en` may be set, because the three
  units share the Z bus.
* `ld_en` may not be set together with an ALU enable.
* `st_en` and `ld_en` may not be set together.

## Buses without tri-states

Conceptually each bus has several tri-state drivers:

* the AU, LU and SU, and the load gate, on Z;
* the register file's Y port and the immediate register, on Y.

In this RTL, a driver that is switched off outputs zeros, and the Z bus is
the OR of its drivers. The Y bus is a 2:1 select controlled by `im_en`.
This keeps the design synthesizable and simulatable in two-state simulators,
and it behaves the same as long as the one-driver rules above hold. If no Z
driver is enabled, Z is 0.

The memory's bidirectional data lines are split into `mem_wdata`, which is
valid when `mem_drive` (that is, `st_en`) is 1, and `mem_rdata`. Joining
them onto one bidirectional pin is left to the pad ring or the board.

## External memory

The memory is not part of this RTL. The top brings out its interface:

* 32 address lines, `mem_addr`, driven from the X bus;
* 32 data lines, split as described above;
* the read/write line, `mem_rw`;
* the memory select line, `mem_msel`.

For a load to finish in one cycle, the memory must return read data
combinationally within the cycle, like an asynchronous SRAM. A write is
taken at the rising edge when `msel = 1` and `rw = 1`. Addresses are word
addresses. `tb/mem_model.sv` is a behavioural model of such a memory. It
keeps 256 words, selected by the low address bits.

## Files

| file | contents |
|---|---|
| `rtl/dpu_pkg.sv` | sizes, shift/logic encodings, `alu_ctl_t`, `ucode_t` |
| `rtl/register_file.sv` | 32 x 32 register file, 2 combinational reads, 1 clocked write, synchronous active-low reset to 0 |
| `rtl/add_sub_unit.sv` | adder/subtractor (one adder, X + ~Y + 1 for subtract) |
| `rtl/logic_unit.sv` | AND / OR / XOR / NOT |
| `rtl/shift_unit.sv` | barrel shifter |
| `rtl/alu.sv` | AU + LU + SU sharing the X and Y operands |
| `rtl/immediate_register.sv` | Y bus source select (immediate or register file) |
| `rtl/memory_gates.sv` | store and load gates between the buses and the memory data lines |
| `rtl/single_cycle_dpu.sv` | top: the triple bus datapath |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/mem_model.sv` | behavioural external memory for the top-level test |

The parameters `WIDTH` (32) and `NREGS` (32) can be changed on every
module. The microcode struct in `dpu_pkg` is sized by `WORD_W` and
`NUM_REG`, and the top casts its fields to its own parameters.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops with a
watchdog if it hangs. For example, for the whole datapath:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/dpu_pkg.sv tb/tb_single_cycle_dpu.sv --top-module tb_single_cycle_dpu
./obj_dir/Vtb_single_cycle_dpu
```

`tb_single_cycle_dpu` runs at the default size. It first runs the example
operations above and checks:

* the results;
* that each result is in its register one clock edge after its microcode;
* that the Y bus still shows the old R2 during `R2 = R1 + R2`.

It then applies 20,000 random legal microcode words, against a reference
model of the registers and memory. It checks the Z bus every cycle, and all
registers and memory words at the end. It counts each mechanism: add,
subtract, every logic function, every shift type, immediate operand, load,
store, same-register read and write, and a write suppressed by `rwe = 0`.
A mechanism that never occurred is a failure. The unit testbenches compare
each block against models written independently in the testbench, for
example the shifter bit by bit.

## Where this design makes its own choices

These points are not fixed by the datapath's description. They are choices
of this RTL:

* **Logic unit functions and code** (`lf`): only the unit's existence and
  enable are given.
* **Shift codes:** code 00 is a logical shift, but its direction is not
  given; left was chosen. Codes 01, 10 and 11 were chosen here. The distance
  is the low 5 bits of Y.
* **Immediate value:** a full 32-bit word, placed on Y in the same cycle as
  the microcode that carries it. No narrower field or sign extension is
  defined.
* **Status flags:** there are none (carry, overflow, zero).
* **Register file reset:** the synchronous reset to zero was added. All 32
  registers are ordinary; R0 is not hard-wired.
* **Memory behaviour:** word addressing and a same-cycle read are required
  of the external memory.
* **No simplified configuration:** the simpler add/subtract-only datapath
  (register file + AU) is the same structure with the LU, SU, immediate and
  memory disabled. It is not provided as a separate top.
