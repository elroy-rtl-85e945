# elRoy: a programmable linear systolic array

elRoy is a coprocessor for multiply-accumulate workloads such as discrete
convolution, matrix-vector and matrix-matrix products. It has two parts. A
small 16-bit control processor runs an ordinary program from memory. A linear
array of up to 32 identical cells does the arithmetic. Each cell holds two
16-bit operands, multiplies them, and adds the product to a 32-bit running
sum that moves from cell to cell. A 16-bit microcode word, broadcast by the
processor, tells every cell (or one addressed cell) what to do on each step.
A per-cell delay queue lets a running sum wait up to 7 extra steps inside a
cell. This is how a convolution skips zero filter coefficients without
spending a cell on each one.

The processor is the only master of the array. To the programmer the array
looks like a few special registers: write the cell instruction, push a value
onto the cell data lines (one write is one array step), set the sum that
enters the array, and read the sum that leaves it.

This repository holds synthesizable SystemVerilog (IEEE 1800-2017) for the
whole system, a testbench for every block, and an end-to-end testbench. That
testbench runs all three workloads on the full 32-cell configuration.

```
             host port (load programs / read results)
                  |
            +-----------+  32-bit read / 32-bit write
            |  memory   |<----------------------------+
            +-----------+                             |
                  |                                   |
            +--------------------------------------------+
            |            control processor                |
            | fetch/decode/execute, R0-R7, ALU+flags,     |
            | PC, stack, output registers                 |
            +--------------------------------------------+
   CINST (16b + strobe) | CDATA (16b + strobe) | ACCOUT (16b)   ^ ACCIN (16b)
                        v                      v                |
   data lines --> [cell N-1] -> [cell N-2] -> ... -> [cell 1] -> [cell 0] --> result
   (RA pipe, RB broadcast)   running sum flows left to right, cell 0 is the output end
```

## The cell

Each cell (`pe_cell`) contains:

* **RA**, a 16-bit register. When loaded, it takes the RA value of the cell to
  its left. The leftmost cell takes the data lines. The RA registers together
  form a shift pipe: N loads place N values across the array.
* **RB**, a 16-bit register that takes the data lines directly. The value is
  broadcast, so every cell that loads RB gets the same value.
* A signed 16 x 16 multiplier and a 32-bit adder:

  ```
  base = acc_ext ? sum coming from the left neighbour
       : acc_zero ? 0
       :            this cell's own accumulator (its queue output)
  sum  = base + (acc_sum ? RA' * RB' : 0)
  ```

  RA' and RB' are the register values *after* this step's load. A value put
  on the data lines therefore takes part in the product of the same step.
* A **FIFO delay queue** (`fifo_queue`): 8 stages of 32 bits. The sum is
  written into stage `delay` (0-7), every stage moves one place toward stage 0
  on each step, and stage 0 is the cell's accumulator output. With delay 0 the
  sum appears at the output right after the step. With delay d it appears d
  steps later, and zeros fill in behind it.
* A decoder (`cell_decode`) that accepts a microcode word when its parallel
  bit is set, or when its address field equals the cell's position. The
  accepted word is held, and it controls every following step.

A *step* is one strobe of the cell data lines. RA, RB and the queue change
only on a step. Three bits also act at the moment a word is accepted:

* *load delay* sets the cell's delay;
* *RB zero* clears RB;
* *accumulate zero* clears the whole queue.

That is why writing `CCLEAR` resets every cell without a data step.

### Microcode word

| bits  | field | meaning |
|-------|-------|---------|
| 15    | P     | parallel: every cell accepts the word |
| 14:10 | ADDR  | cell address (cell 0 is the output end); ignored when P = 1 |
| 9     | RA_L  | RA loads from the left neighbour (shift the pipe) |
| 8     | RB_L  | RB loads from the data lines |
| 7     | RB_Z  | RB is zero (if RB_L = 0) |
| 6     | ACC_E | base = sum from the left neighbour |
| 5     | ACC_Z | base = 0 (if ACC_E = 0) |
| 4     | SUM   | add RA*RB |
| 3     | DL    | load the delay field |
| 2:0   | DELAY | extra steps the sum waits in this cell |

These words are used by the programs and are named in `elroy_pkg`:

| name    | word   | effect on every cell |
|---------|--------|----------------------|
| CLRA    | 0x8290 | shift the RA pipe, RB zero, keep the accumulators (product is 0) |
| CLRA0   | 0x8220 | shift the RA pipe, clear the accumulators |
| CLAAE   | 0x8150 | load RB, sum = left + RA*RB (convolution) |
| CLAAI   | 0x8110 | load RB, sum = own + RA*RB (matrix products) |
| CPASS   | 0x80D0 | RB zero, sum = left: every step shifts the results one cell right |
| CCLEAR  | 0x80A8 | clear RB, the accumulators and the delay |

## How the array computes

This is the hardest part of the design to follow. Number the cells 0 (right,
output end) to N-1 (left, input end). Results move rightward, one cell per
step.

### Convolution with bubbles

Goal: y[n] = sum over t of h[t] * x[n-t].

1. Pack the non-zero coefficients of h into cells. Cell 0 gets the first
   non-zero coefficient, cell 1 the next, and so on. Cell i's delay is the
   number of zero coefficients between its coefficient and the previous one.
   Use `CSETDELI` (see below) once per cell.
2. Clear the accumulators and shift the packed coefficients into the RA pipe
   with `CLRA0`, one data write per cell. Write cell 0's coefficient first:
   after N writes, the first value written has reached cell 0.
3. Set ACCOUT to 0, select `CLAAE`, and write x[0], x[1], … to the data lines.
   After each write, read ACCIN: it is the next y.
4. Write length(h) - 1 zeros, reading ACCIN after each one. This drains the
   tail.

Why this works: a product made in cell i at step k leaves cell i at step
k + d_i. Cell i-1 adds its own product to it on the following step, and so
on, so the product reaches the output with a lag of

```
L_0 = d_0,    L_i = L_{i-1} + 1 + d_i
```

The output at step n is therefore the sum over i of h_i * x[n - L_i]. If the
delays are the zero-run lengths, L_i is exactly the tap index of cell i's
coefficient. A run of more than 7 zeros needs a cell with coefficient 0 and
delay 7, which accounts for 8 taps. Cells to the left of the last coefficient
hold 0 and just pass ACCOUT along.

Example: h = {3, 0, -2, 5, 0, 0, 7} packs into 4 cells: coefficients
{3, -2, 5, 7} with delays {0, 1, 0, 2}. The zero taps cost no cells and no
cycles, and one y leaves the array on every step.

### Matrix-vector product (A is M x N, M <= cells)

For each column k:

1. Write `CLRA`.
2. Shift column k of A into the RA pipe, row 0 first. Then write N_CELLS - M
   zeros so that row r sits in cell r.
3. Write `CLAAI` and then the vector element v[k]. That single step adds
   a[r][k] * v[k] to cell r's own accumulator.

After the last column, write `CPASS`. Read ACCIN (y[0]) and write a zero to
the data lines; repeat M times. Each step shifts the results one cell toward
the output. `CCLEAR` before the first column clears everything.

A matrix-matrix product is a loop of matrix-vector products, one per column
of the second matrix.

### Timing between processor and array

The processor registers everything it sends to the array: the cell
instruction word, ACCOUT and the data lines, each with its strobe. The array
therefore steps one cycle after the instruction's execute cycle, and the new
result is visible one cycle after that. The next instruction executes three
cycles after the one that stepped the array, so a read of ACCIN always sees
the updated result. The convolution inner loop is 6 instructions of 3
cycles each: one multiply-accumulate step of the whole array every 18 clock
cycles.

## Control processor

`main_processor` is a multi-cycle machine. Every instruction takes exactly
three cycles:

* **Fetch**: read the 32-bit word at PC into the instruction register (upper
  half) and the data register (lower half), then PC += 4.
* **Decode**: for a LOAD from memory, read the operand at the address in
  source 1 into the data register.
* **Execute**: ALU and write-back, memory write, branch, stack, and array
  outputs.

### Instruction word

| 31:28  | 27:24       | 23:20    | 19:16    | 15:0       |
|--------|-------------|----------|----------|------------|
| opcode | destination | source 1 | source 2 | data value |

Register codes:

| code | name    | use |
|------|---------|-----|
| 0-7  | R0-R7   | general registers, reset to 0 |
| 8    | ACCIN   | read: low 16 bits of the sum leaving cell 0 |
| 9    | ACCOUT  | write: the sum fed into cell N-1 (sign-extended) |
| A    | CINST   | write: cell microcode word (use LOAD with EXTDATA) |
| B    | CDATA   | write: cell data lines; every write is one array step (the assembler's names RA and RB both map to this code) |
| C    | CDELINT | LOAD to it builds a delay-set word (see below) |
| D    | EXTDATA | read: the instruction's data value |
| E    | CDATA   | same as B |

Opcodes:

| op | name  | action |
|----|-------|--------|
| 0  | OR    | dest = s1 OR s2 |
| 1  | XOR   | dest = s1 XOR s2 |
| 2  | ADD   | dest = s1 + s2 |
| 3  | SUB   | dest = s2 - s1 |
| 4  | AND   | dest = s1 AND s2 |
| 5  | COPY  | dest = s1 |
| 6  | PUSH  | push s1 |
| 7  | POP   | dest = pop |
| 8  | JMP   | PC = data |
| 9  | JA    | if the positive flag is set: PC = data |
| A  | JE    | if the zero flag is set: PC = data |
| B  | CMP   | flags from s2 - s1, nothing stored |
| C  | RTS   | PC = pop |
| D  | LOAD  | dest = mem[s1], or dest = data if s1 = EXTDATA |
| E  | JSR   | push PC+4; PC = data |
| F  | WRITE | mem[s1] = s2 |

Operand rules:

* With source 1 = EXTDATA, the data value takes source 1's place. The
  "data" forms (ADDD R3,R3,1, and so on) put the register in source 2. So
  SUBD and CMPD compute register - data, and JA after CMPD branches when the
  register is greater than the data.
* ACCIN may be either source.
* `LOAD CDELINT, s1, s2` writes the word
  `{0, s1[4:0], 000000, 1, s2[2:0]}`, which sets the delay of cell s1 to s2.
  A program can therefore compute cell numbers and delays in registers.

Flags:

* Zero, non-zero, positive (> 0) and negative are registered.
* They are updated by ALU instructions, LOAD and CMP.
* They are not updated by PUSH, POP, WRITE or branches.

Stack:

* One 16-entry stack holds both JSR return addresses and PUSH/POP data, so a
  subroutine must pop what it pushes before RTS.
* Overflow and underflow are simulation assertions; the hardware does not
  trap.

Addresses:

* Branch targets and the PC are byte addresses.
* Instructions sit at multiples of 4.

## Memory

`memory` stores 16-bit halfwords at even byte addresses. The default is 64 KiB
of address space, which is 32 K halfwords.

* A processor read returns `{mem[a], mem[a+2]}` on a 32-bit bus. That is a
  whole instruction, or a 16-bit value in the upper half.
* A write stores the upper half of the 32-bit write bus. The lower 16 bits of
  that bus are always zero.
* A separate 16-bit host port (`host_we_i`, `host_addr_i`, `host_wdata_i`,
  `host_rdata_o` on `elroy_top`) loads programs and data while `rst_i` holds
  the processor, and reads results afterwards.
* The processor starts at address 0 when reset is released.
* By convention a program ends in a jump to itself.

## Parameters

| parameter | where | default | notes |
|-----------|-------|---------|-------|
| N_CELLS | elroy_top, cell_array | 32 | 1-32; the 5-bit cell address caps it at 32 |
| MEM_ADDR_W / ADDR_W | elroy_top / memory | 16 | byte-address width |
| DEPTH | fifo_queue | 8 | delays 0-7 |
| N_REGS | regfile | 8 | |
| DEPTH | stack | 16 | own choice |
| DATA_W / ACC_W | elroy_pkg | 16 / 32 | |

At the default size, synthesis gives about 9.6 k flip-flop bits, mostly the
32 cells' 8-stage 32-bit queues, plus 512 Kbit of memory.

## How far it can be trusted, and where it departs from the original

The original description gives the cell datapath, the queue structure, the
instruction and microcode formats, and complete example programs. The
following choices are this implementation's own, either because the
description is silent or because its sources disagree:

* **ACCIN and ACCOUT directions.** Here ACCIN is read and ACCOUT is written.
  The instruction-set text and every example program agree with this. A
  comment in the original assembler definitions states the opposite.
* **CCLEAR encoding.** The original definition does not give a complete
  word. Here it is 0x80A8: parallel, RB zero, accumulate zero, delay 0.
* **CLRA.** Two different words are used for CLRA (0x8290 and 0x8220). Both
  are provided; they differ only in whether the accumulators are kept.
* **Multiplier operand timing.** The product uses the values loaded in the
  same step, and a word's delay, RB-zero and accumulate-zero bits act on
  acceptance. Both were chosen so that the example programs' instruction
  order gives correct results.
* **No extra state-machine stages.** The original mentions extra states for
  some cell operations. Here every cell operation finishes in the normal
  execute cycle, and the 18-cycle figure for a multiply-accumulate step still
  comes out.
* **WRITE field naming.** WRITE stores source 2 at the address in source 1,
  as the original instruction encodings do. Its prose names the fields
  differently.
* **Cell addresses.** Cells get their address from their position, instead of
  from a bank of switches per cell.
* **Added and chosen parts.** The host port, the shared 16-entry stack,
  combinational memory reads and the flag-update rule were all chosen here.
  So were the output registers and the memory write layout. Their original
  schematics are not available.
* **Wrap-around arithmetic.** Products and sums are signed and wrap at 32
  bits; ACCIN is the low 16 bits. The original does not discuss overflow.

Not included:

* The host computer that would use elRoy.
* The assembler and the listing converter. The testbenches encode
  instructions with the functions in `tb/elroy_asm_pkg.sv` instead.
* Arrays larger than 32 cells. The original's speed estimates for 64-1024
  cells do not fit the 5-bit cell address.

## Verification

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`.

* `tb_pe_cell` compares one cell with a behavioural model over thousands of
  random microcode words and steps.
* `tb_cell_array` runs 40 random sparse convolutions on a 6-cell array. The
  zero runs are packed with delays, including runs longer than 7.
* `tb_main_processor` runs a directed program that covers every instruction
  and all the array outputs.

`tb_elroy_top` runs the full 32-cell system through three programs written
into memory through the host port:

* a 20-tap convolution on 12 samples, with zero runs of 1, 2 and 9;
* a 32 x 5 matrix-vector product;
* a 4 x 9 by 9 x 4 matrix-matrix product, using JSR, PUSH/POP and padding.

It compares every result with its own reference and checks that a
convolution step is exactly 18 cycles. It also counts each mechanism (delay
bubbles, zero cells, addressed and parallel words, the three accumulate
modes, stack use, taken and untaken branches) and fails if any never
happens. The three programs take 1799, 2645 and 15626 cycles.

To simulate with plain Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/elroy_pkg.sv tb/elroy_asm_pkg.sv \
    -y rtl +libext+.sv tb/tb_elroy_top.sv --top-module tb_elroy_top -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

Block testbenches build the same way with their own top module. Only
`tb_main_processor` and `tb_elroy_top` need `tb/elroy_asm_pkg.sv`.

## Files

| file | contents |
|------|----------|
| rtl/elroy_pkg.sv | widths, opcodes, register codes, microcode word layout, named words |
| rtl/elroy_top.sv | processor + array + memory |
| rtl/main_processor.sv | control processor |
| rtl/control_fsm.sv | fetch/decode/execute sequencing and control decode |
| rtl/alu.sv, regfile.sv, pc_unit.sv, stack.sv | processor datapath |
| rtl/arb_in.sv, arb_out.sv, cdata_select.sv | read-bus registers; output registers and write bus; cell-instruction register |
| rtl/memory.sv | memory with host port |
| rtl/cell_array.sv | chain of N_CELLS cells |
| rtl/pe_cell.sv, cell_decode.sv | one cell; its word decoder |
| rtl/fifo_queue.sv, fifo_cell.sv | delay queue and one stage of it |
| tb/elroy_asm_pkg.sv | instruction encoders for test programs |
| tb/tb_*.sv | testbenches |
