# 168/E: a bit-slice processor that runs IBM 370 code

The 168/E was built for the LASS spectrometer at SLAC. Physics event reconstruction spends most of its time in tight
nested search loops. The aim was to farm that work out to many cheap processors, each about as fast as an IBM
370/168 on that kind of code. To avoid writing new software, each processor emulates the subset of
370 instructions that FORTRAN-compiled track-finding code uses. Programs are developed on the
mainframe, and their object code is translated into the 168/E's own program words.

This repository is a synthesizable SystemVerilog model of that processor. It follows the published
block diagrams: eight 2901A 4-bit slices forming a 32-bit integer unit, a separate 24-bit program memory
and 32-bit data memory, a 370-style address adder, a condition-code and branch unit, a
multiply/divide sequencer and a hexadecimal floating-point unit with 32- and 48-bit precision. Where the
published description is silent, the design fills in its own choices: mainly the bit encoding of the
program word, the host interface, and the insides of the floating-point unit. These choices are listed
below.

## The idea: one 370 instruction becomes one to three machine words

The 168/E has no 370 instruction decoder. A translator maps each 370 instruction to one or more
24-bit *program words*, and each word drives the hardware directly, much like a horizontal
micro-instruction. Two properties make this fast:

* Program and data memories are separate. A word is fetched while the previous one executes.
* Branch targets are known when the program is loaded. A branch word therefore carries an absolute
  program address and costs one machine cycle.

The inner loop used to compare processors searches a list for a coordinate below a prediction:

| 370 code           | 168/E words (one cycle each)                                            |
|--------------------|--------------------------------------------------------------------------|
| `LOOP CE 0,ED(9,10)` | slices: R9 + R10 → Y bus                                              |
|                    | memory: address = Y/2 + ED; word → FP working register                    |
|                    | FP: compare FR0 with working register → condition code                   |
| `BL FOUND`         | branch if code = 1 to FOUND                                              |
| `SR 9,1`           | slices: R9 − R1 → R9, set code                                           |
| `BNM LOOP`         | branch if code ≠ 1 to LOOP                                               |

That is 6 cycles per pass: 0.90 µs at the original 150 ns cycle, against 1.00 µs on the 370/168. The
end-to-end testbench runs exactly this loop and checks the 6-cycle period.

## Program word

Each word is 24 bits. The top 6 bits are the *control field*. They choose which part of the processor executes
the word. The low 18 bits are the *data field*. `rtl/lass_pkg.sv` defines all codes.

| control field | section | data field |
|---------------|---------|------------|
| `00 m ccc` | SLICE  | the 2901 micro-instruction: source(3) function(3) carry(1) destination(3) A(4) B(4). `ccc` picks how the result sets the condition code; `m` makes down-shifts arithmetic |
| `01 oooo`  | MEM    | `[15:14]` FP register (stores), `[13:12]` address source, `[11:0]` displacement in half-words |
| `10 0ooo`  | DLOAD  | 16-bit immediate to the D register (sign-extended, zero-extended, or upper half) |
| `10 10xx`  | FP     | op(3) precision(1) r1(2) r2(2) operand-2-is-working-register(1) |
| `10 1100` / `10 1101` | MUL / DIV | `[7:4]` multiplicand or divisor register, `[3:0]` product-high or remainder register |
| `10 1110` / `10 1111` | NOP / HALT | – |
| `11 mmmm`  | BRANCH | `mmmm` = 370 branch mask; `[17]` take the target from the Y bus; `[14:0]` absolute target |

The 18-bit slice field and its split into 3+3+1+3+4+4 bits come from the original. So does the split into a
6-bit control field and an 18-bit data field. The 3-bit codes inside the slice field are the standard
2901 codes. Everything else in this table is this implementation's encoding.

Condition-code modes (`cc_mode_e`) turn the 2901 flags into 370 codes:

* arithmetic: 0 zero, 1 negative, 2 positive, 3 overflow
* signed compare and unsigned compare: 0 equal, 1 low, 2 high
* logical: 0 zero, 1 not zero
* logical add/subtract: {carry, not zero}

## Pipeline, instruction register and one-cycle branches

This is the part of the design that takes most care (`rtl/lass_control.sv`).

* **Fetch.** The program counter addresses program memory, and the word appears on the program data
  bus in the same cycle. A BRANCH word is *executed here*. Its mask is tested against `cc_next`, the
  condition code as it will be at the end of the cycle. That includes a code being set right now by
  the word in the execute stage, whether a slice word or an FP compare. If the branch is taken, the
  counter loads the target, and the next fetch comes from the target. No delay slot, no bubble.
* **Execute.** At the clock edge the fetched word moves into the execute register. A SLICE word's
  18-bit field also goes into the *instruction register* that drives the slices.
* **Non-slice words keep the slices quiet but visible.** The instruction register changes only on
  slice words. During MEM, DLOAD, FP and branch words, register and Q writes in the slices are
  disabled. The slices keep computing the last micro-instruction on unchanged registers, so the Y bus
  still shows the last slice result. This is how "R9 + R10 → Y" in one word feeds the address adder in
  the next word. It is also why a register store takes two words: put the register on Y, then write Y.
* **Stalls.** A multi-cycle FP operation or a multiply/divide raises a stall. While it is raised, the
  counter, the fetch and the execute register hold. This stands in for the original's stopped counter
  clock.
* **Start and halt.** After reset the processor is halted. A one-cycle `start` begins execution at
  address 0, and a HALT word stops it.

## Integer datapath

* **Slices** (`am2901.sv`, `slice_array.sv`). The slice model has these parts:
  * 16 × 4-bit registers with two read ports and the Q register
  * the R/S operand multiplexers
  * an 8-function ALU
  * shifters in front of the registers and Q
  * the A/F output multiplexer
  * the carry, overflow, zero, sign and G/P flags

  Eight slices form 32 bits. The carries come from look-ahead over the slices' G/P outputs. The
  shift control closes the ends of the shift chains:
  * down-shift MSB: 0, F31, F31⊕OVR or a bit from the sequencer
  * register LSB on a double up-shift: Q31
  * Q MSB on down-shifts: F0
* **Memory addressing** (`mar_unit.sv`). Address = Y[16:1] + 12-bit displacement, in half-words.
  Registers hold 370-style byte addresses. A displacement alone reaches the first 8 KB, so small local
  data needs no base register. The address is used in the cycle it is formed and kept in the memory
  address register (MAR). There are four MAR controls: hold, Y + displacement, displacement only, and
  next full word.
* **D register** (`d_register.sv`). This register feeds the slices' direct-data inputs. It loads from
  memory (a full word, or a sign-extended half word) or from an immediate.
* **Data memory** (`data_memory.sv`). Two 16-bit halves with one word address. A half-word write stores
  the low 16 bits of the data into the addressed half. Half-word address bit 0 = 0 is the most
  significant half, so the memory is big-endian like the 370. Size: 32K words (128 KB).
* **Program memory** (`program_memory.sv`). 32K × 24 bits, with a load port.

## Multiply and divide (`muldiv_seq.sv`)

The sequencer stops the counter and issues slice micro-instructions itself:

* **Multiply**, signed 32 × 32 → 64 bits, 33 cycles. The multiplier is in Q. One cycle clears the
  high-word register. Then come 32 steps of "add the multiplicand if Q0 is set, shift the high word
  and Q right together". The MSB fill is the true sign F31⊕OVR, and the last step subtracts, because
  the multiplier's sign bit has negative weight. Result: high word in the named register, low word in Q.
* **Divide**, 64 / 32, 67 cycles, non-restoring. Each quotient bit takes a shift cycle and an
  add/subtract cycle. The Q shift-in carries the previous quotient bit. Three final cycles shift in the
  last bit, undo the extra register shift and correct a negative remainder. Required: divisor in
  (0, 2³¹) and high dividend word below the divisor. Signed division needs sign handling by the
  program around it.

## Floating-point unit (`fp_unit.sv`)

Numbers use the IBM hexadecimal format: sign, 7-bit excess-64 exponent (power of 16), then the fraction. A
register is 48 bits. The short format is its top 32 bits (6 hex digits) and matches 370 single
precision. The 48-bit format keeps 10 hex digits, where the 370 long format has 14.

Parts:
* four registers (370 FP registers 0, 2, 4, 6)
* a working register, loaded from memory by MEM words: high word, then the next word's upper half
* an aligning adder that keeps one guard digit
* a multiplier that takes one hex digit of the multiplier per cycle
* a divider that produces one quotient bit per cycle
* a leading-zero-digit normalizer

Operations and cycles:

| operation | cycles | notes |
|-----------|--------|-------|
| LOAD, load-and-test | 1 | sign kept, inverted, cleared or set (370 load, load complement, load positive, load negative) |
| compare | 1 | |
| add, subtract | 2 | |
| multiply | 13 | a short multiply writes the 48-bit product |
| divide | 47 | condition code unchanged; a zero divisor leaves the register unchanged |

Short operations read and write only the top 32 bits of a register. Results are truncated. Condition codes: 0 zero, 1
negative or low, 2 positive or high. Compare takes one cycle, so an FP compare followed by a branch
runs at full speed.

Divide needs the most explanation. Both fractions are assumed normalized, so their quotient lies
between 1/16 and 16. If the dividend fraction is not smaller than the divisor's, the dividend is
first shifted right one hex digit and the exponent is raised by one. After that the quotient is
always between 1/16 and 1. It is therefore already normalized. The restoring loop produces 44 bits,
which is 10 digits plus the guard digit, and the result is truncated to the precision.

MEM words store an FP register as two full words. The first holds bits 47:16. The second holds bits
15:0 followed by 16 zero bits, which is the second word of the 370 long format.

The FP unit is an option: a 168/E can be built without it. `lass_168e` has a parameter
`HAS_FPU` (default 1). With 0, FP words become one-cycle no-ops that leave the condition code alone,
and FP stores write zero.

## Host side (`lass_168e.sv`)

The multi-processor system around each 168/E is not specified, so the top offers a simple host port.
While the processor is halted, the host can write program memory and read or write data memory. Then it
pulses `start` and waits for `halted`. Observation outputs: `pc`, `cc`, the Y bus, the two stall
sources, and a taken-branch strobe.

## How far to trust it, and where it departs from the original

Follows the original closely:
* the block structure and bus widths of the processor and of the 2901A
* the 18-bit slice instruction and the 6 + 18 split of the program word
* the 15-bit counter, the 24/32-bit memories and the two half-word halves
* the adder + MAR addressing with a 12-bit displacement
* one-cycle branches
* multiply/divide by stopping the counter while the slices run conditional add and shift steps
* an FP unit that stops the integer unit and sets the condition code
* the 6-cycle timing of the benchmark loop

This implementation's own choices:
* the encoding of control fields, branch masks, MAR and D-register modes
* forwarding of the new condition code to a fetched branch
* the host port, `start` and HALT
* half-word units for addresses and the 15-bit data word address
* the multiply/divide step sequences and the divide operand limits
* the FP register count, the operation latencies and the store path
* no pre-normalization before a multiply or divide, and the divide method
* the FP operation list, taken from the 370 operations that compiled FORTRAN uses
* exponent overflow wraps; exponent underflow gives a true zero; there are no program interrupts

Not implemented:
* FP halve, unnormalized add and the 370's other rarely used FP operations
* byte (character) operations, decimal arithmetic, interrupts and I/O. The 168/E itself omits these.
* the FORTRAN translator and linker (software)

One reading to note: the original description of the loop gives `BNM LOOP` as "branch if greater
than 0". This model uses the 370 meaning, "not minus" (code 0, 2 or 3), so the last list element, at index 0, is also
compared.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lass_pkg.sv tb/lass_asm_pkg.sv tb/tb_lass_168e.sv --top-module tb_lass_168e
./obj_dir/Vtb_lass_168e
```

Replace `tb_lass_168e` with any other `tb_<block>`. Testbenches:

* `tb_lass_168e`: the whole processor at full size. It runs the search loop twice, once with a hit
  and once without, and checks the 6-cycle period. It then runs a second program that covers 32-bit
  immediates, multiply, divide, half-word store and load, arithmetic shift, unsigned compare, a branch
  through Y, 48-bit FP load, add, multiply, load negative, divide and store. It counts each
  mechanism and fails if one never happens. The mechanisms are FP stall, multiply stall, taken and
  untaken branch, branch to Y, forwarded code, half-word write, FP store and FP divide.
* `tb_lass_168e_nofpu`: the integer-only build (`HAS_FPU = 0`). It runs the search loop with an
  integer compare and checks that FP words neither stall nor change the condition code.
* Block testbenches:
  * `tb_am2901` and `tb_slice_array` check against integer reference models.
  * `tb_muldiv_seq` checks exact products, quotients and cycle counts.
  * `tb_fp_unit` checks add, subtract and multiply against real arithmetic on exactly
    representable values. It checks divide against an integer reference on random full-length
    fractions, and adds directed truncation, normalization and sign-control cases.
  * There is also one testbench for each of `status_branch`, `program_counter`, `mar_unit`,
    `d_register`, `data_memory`, `program_memory` and `lass_control`.

`tb/lass_asm_pkg.sv` has one function per word type (`sl`, `mem`, `dl`, `fp`, `mul`, `div`, `br`,
`halt`), so short programs can be written directly in a testbench. See `tb_lass_168e.sv` for examples.

## Changing it

* Memory sizes: the `PM_ADDR_W` and `DM_ADDR_W` parameters of `lass_168e`. The data memory address
  path is 16 half-word bits, so `DM_ADDR_W` above 15 also needs a wider `mar_unit`.
* New word types: add a code in `lass_pkg`, decode it in `lass_control`, and add an assembler
  function.
* FP operations: `fp_unit` runs a small state machine with four states: idle, multiply steps,
  divide steps and normalize. A new multi-cycle operation needs a state that holds `stall` high until
  its final cycle. That means widening the state type. One op code is left (3'd7). The FP word also
  has 7 unused bits.
