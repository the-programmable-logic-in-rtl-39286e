# PLiM: a resistive memory that runs programs on its own content

A resistive switch (a bipolar or complementary RRAM cell) changes state only
when its two electrodes P and Q are driven differently: P=1, Q=0 sets it,
P=0, Q=1 resets it, anything else leaves it alone. Written as logic, the new
state is a three-input majority:

    Zn = M3(P, ~Q, Z)          ("resistive majority", RM3)

So every write into such a memory is already a logic operation on the
written bit. The PLiM (Programmable Logic-in-Memory) computer adds a small
controller to an ordinary multi-bank resistive RAM and turns this into a
processor with one instruction:

    @A, @B, @Z      Z <- M3(A, ~B, Z)

A and B are single bits read from the array and applied as P and Q when Z is
written. Majority plus complement is functionally complete, so any Boolean
function can be compiled into a sequence of these instructions. Program and
data both live in the array; with the LiM input low the same array is a
plain RAM for a host.

This repository holds synthesizable SystemVerilog for the controller and the
memory (at the logic level of the cells), unit testbenches, an end-to-end
testbench, and a full-size testbench that encrypts PRESENT-80 blocks
entirely inside the memory. The architecture follows the PLiM computer of
Gaillardon, Amarú, Siemon, Linn, Waser, Chattopadhyay and De Micheli; the
encodings, timing and sizes that publication leaves open are choices of this
implementation and are listed below.

## The instruction

An instruction is three bit addresses, `@A, @B, @Z`, each `ADDR_W` bits wide.
A bit address is `{word address, bit position}`; position 0 is the least
significant bit of the word. With the default 16-bit words and 32-bit
addresses each field occupies two consecutive words, most significant word
first, so an instruction is six words:

| word | 0 | 1 | 2 | 3 | 4 | 5 |
|------|---|---|---|---|---|---|
| content | @A[31:16] | @A[15:0] | @B[31:16] | @B[15:0] | @Z[31:16] | @Z[15:0] |

Constants: a field `@A` or `@B` whose value is 0 or 1 stands for the constant
0 or 1 instead of an address (so bit addresses 0 and 1 cannot be read as
operands; they hold the first program word). In assembly a constant is
written without `@`:

    0, 1, @Z      Z <- 0        (M3(0, 0, Z))
    1, 0, @Z      Z <- 1        (M3(1, 1, Z))
    1, @a, @Z     Z <- ~a       if Z was 0
    @a, 0, @Z     Z <- a + Z    (copy if Z was 0)
    @b, 1, @Z     Z <- b . Z    (AND into Z)

Programs start at word 0 and run one instruction after the other; there is no
branch. Instructions may overwrite program words (the write reaches the
array before the next fetch).

## The controller (`plim_controller`)

The controller holds the registers @A, @B, @Z, A, B and the program counter,
and an FSM with the states

    ST_STD -> ST_MODE_CHECK -> ST_RESET_REGS -> ST_FETCH (x INSTR_WORDS)
          -> ST_READ_A -> ST_READ_B -> ST_WRITE_Z -> ST_PC_INC -> ST_FETCH ...

* `ST_STD`: standard memory mode. Host requests go straight to the memory.
  A rising `lim` leads to `ST_MODE_CHECK`.
* `ST_MODE_CHECK`: `lim` high goes on to `ST_RESET_REGS`, low back to
  `ST_STD`.
* `ST_RESET_REGS`: clears all work registers, PC = 0.
* `ST_FETCH`: one cycle per instruction word, reading word `PC + i`.
* `ST_READ_A`, `ST_READ_B`: read the words holding A and B. The memory
  answers one cycle later, so A is latched in `ST_READ_B` and B is taken
  directly from the read register in `ST_WRITE_Z`.
* `ST_WRITE_Z`: sends the write "bit @Z with P = A, Q = B".
* `ST_PC_INC`: PC advances by one instruction (`INSTR_WORDS` words); the
  memory pulses the array in this cycle. `lim` is sampled here: high fetches
  the next instruction, low returns through `ST_MODE_CHECK` to `ST_STD`.

There is no halt instruction. The host stops a program by lowering `lim`
while the last instruction executes; `pc` (word address of the current
instruction) and `state` are outputs so it can tell when. The testbenches
lower `lim` one cycle after seeing `state == ST_FETCH` with `pc` at the last
instruction.

Timing with the defaults (16-bit words, 32-bit fields, `INSTR_WORDS` = 6):

| cycles per instruction | memory accesses per instruction |
|---|---|
| 10 (6 fetch, read A, read B, write Z, PC+1) | 9 (6 word reads, A, B, the Z write) |

A whole program of N instructions keeps `busy` high for 10 N + 3 cycles
(mode check and register reset before, mode check after). Every instruction
reads its operands even when they are constants, so the count never varies.
At 1 ns per memory access that is 9 ns per instruction. In general an
instruction takes `3 * ADDR_W / WORD_W + 4` cycles.

## The memory (`plim_memory`, `rram_bank`, `block_decoder`, `write_circuit`, `rm3_cell`)

The memory stores `2**ADDR_W` bits as words of `WORD_W` bits, split over
`N_BANKS` banks of `ROWS x COLS` words (default 8 banks, 64 words per row,
2**19 rows: 4 Gbit). A word address is cut as `{bank, row, column}`. All
banks sense the same row and column; the block decoder forwards the chosen
bank's word to the read register.

* Read: `rd_en` samples the addressed word into the read register at the
  clock edge. The data is valid from the next cycle on and stays until the
  next read.
* Write: a request enters the write register at the clock edge; in the next
  cycle the write circuit drives the addressed bank and the word is stored
  at the end of that cycle. A read issued in the cycle straight after a
  write to the same word returns the old value; from the second cycle on it
  returns the new one. The controller never hits this case.
* Write circuit: a host store pulses every bit of the word with P = d and
  Q = ~d, which leaves d in each cell whatever it held. An RM3 write pulses
  only the addressed bit with P = A, Q = B. Bits outside the mask see
  P = Q = 0 and keep their state.
* `rm3_cell` is the logic function of one switch, `zn = M3(p, ~q, z)`;
  `rram_bank` applies it to every masked bit of the written word, so stores
  and logic writes go through the same cell model.

The banks are arrays of words; row and column decoding is the array index,
and the sense amplifiers are the array read. The analog side of the cells
(switching kinetics, the +/-2.3 V half-select programming scheme, the 5 uA
read threshold) is not modelled.

## Programming it: gates from RM3

Every gate below writes a fresh destination `z` (and a temporary `t`), so the
inputs may be anywhere:

| gate | instructions | count |
|---|---|---|
| z = a | `0,1,@z` `@a,0,@z` | 2 |
| z = ~a | `0,1,@z` `1,@a,@z` | 2 |
| z = a.b | `0,1,@z` `@a,0,@z` `@b,1,@z` | 3 |
| z = a+b | `0,1,@z` `@a,0,@z` `@b,0,@z` | 3 |
| z = a^b (5) | `0,1,@t` `@a,@b,@t` `0,1,@z` `@b,@a,@z` `@t,0,@z` | 5 |
| z = a^b (7) | `0,1,@t` `@a,0,@t` `0,@b,@t` `0,1,@z` `@b,0,@z` `0,@a,@z` `@t,0,@z` | 7 |

The 7-instruction XOR is the classic PLiM sequence; the 5-instruction one
uses that `@a,@b,@t` on a cleared `t` gives `a.~b` in one step.

### PRESENT-80 in memory (`tb/tb_present.sv`)

The full-size testbench generates a straight-line RM3 program for one
PRESENT-80 encryption, stores it from word 0, writes plaintext and key into
an input area, runs it, and reads the ciphertext. Round keys, round counter
and state all stay in the array:

| step | method | RM3 instructions |
|---|---|---|
| copy plaintext, key; counter = 1 | 2 per bit, 1 per counter bit | 293 |
| addRoundKey (x 32) | 7-instruction XOR per bit | 448 each |
| sBoxLayer (x 31) | 14-gate network per nibble, 59 instructions | 944 each |
| pLayer (x 31) | copy to permuted position | 128 each |
| KeyUpdate (x 31) | rotate by copying into the other key buffer, S-box on 4 bits, 5 XORs with the counter, in-memory 5-bit incrementer | 267 each |
| total | | 56 138 |

One block takes 505 242 memory accesses (561 383 clock cycles), i.e.
126.7 kbit/s at 1 ns per access. For comparison, the published PLiM mapping
counts 58 872 instructions (529 848 accesses, 120.7 kbit/s); it uses a
38-instruction S-box and one-instruction copies, while this program uses a
59-instruction S-box and two-instruction copies but saves in the key update.
The S-box network used (input x3..x0, output y3..y0):

    t1 = x1^x2   t2 = x2&t1   t3 = x3^t2   y0 = x0^t3   t4 = t1&t3
    t5 = t1^y0   t6 = t4^x2   t7 = x0|t6   y1 = t5^t7   t8 = t6^~x0
    y3 = y1^t8   t9 = t8|t5   y2 = t3^t9

## Parameters

| parameter | default | meaning |
|---|---|---|
| `WORD_W` | 16 | word width (power of two) |
| `ADDR_W` | 32 | bit-address width; a multiple of `WORD_W`; memory = 2**ADDR_W bits |
| `N_BANKS` | 8 | banks (power of two) |
| `COLS` | 64 | words per row in a bank (power of two) |

`WORD_W` = 16 and `ADDR_W` = 32 are the published configuration. The
published capacity is 8 Gbit, which 32-bit bit addresses cannot reach;
this implementation keeps the 32-bit addresses, since they set the
instruction format and the 9-access instruction, and so holds 4 Gbit.
`N_BANKS` and `COLS` are not given in the source and are choices here.
The 4 x 4 demonstration array corresponds to `WORD_W=4, ADDR_W=4,
N_BANKS=1, COLS=1`.

## Other choices made here

* `R/W` is `host_rw` (1 read, 0 write) qualified by `host_en`; the
  bidirectional data bus is split into `host_wdata` and `host_rdata`.
* Reset is asynchronous, active low, for the controller and the two memory
  registers; the array itself is not reset (non-volatile). Simulators with
  two-state logic start the array with random content.
* Constants are encoded as field values 0 and 1 (above).
* Instruction word order is most significant first.
* The incrementer and the S-box program of the PRESENT example are this
  implementation's own; the published incrementer listing was not used.

## Files

| file | content |
|---|---|
| `rtl/plim_pkg.sv` | FSM state and write-kind enums, constant codes, `rm3()` |
| `rtl/plim_computer.sv` | top: controller + memory |
| `rtl/plim_controller.sv` | FSM and work registers |
| `rtl/plim_memory.sv` | banks, block decoder, read and write registers |
| `rtl/rram_bank.sv` | one bank (array, row/column selection, RM3 write) |
| `rtl/block_decoder.sv` | bank read multiplexer and write enable |
| `rtl/write_circuit.sv` | P/Q levels and bit mask for a write |
| `rtl/rm3_cell.sv` | resistive switch logic function |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_present.sv` for PRESENT |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
        rtl/plim_pkg.sv tb/tb_plim_computer.sv --top-module tb_plim_computer
    ./obj_dir/Vtb_plim_computer

Replace the testbench name for the others. `tb_present` builds the top at
its defaults: its array takes about 512 MiB of host memory, and the run
(program load plus three encryptions) takes about 20 s. It checks the
published test vectors (all-zero plaintext and key gives 5579C1387B228445;
all-ones gives 3333DCD3213210D2) plus a random block against a software
model, and the cycle counts above.

What the testbenches cover:

* `tb_rm3_cell`: all eight input combinations against the switch state tables.
* `tb_rram_bank`, `tb_plim_memory`: random stores, random RM3 pulses and
  reads against a reference model; register timing.
* `tb_block_decoder`, `tb_write_circuit`: random inputs against expected outputs.
* `tb_plim_controller`: 300 random instructions (with constants) against a
  software execution, FSM state order, 10 cycles and 9 accesses per instruction.
* `tb_plim_computer`: the 4 x 4 one-instruction demonstration (word 3 goes
  from 0101 to 0111), the AND, OR, XOR and rotate sequences for every input
  value, a random program spread over all banks, and a count of each
  mechanism (mode switches, constants, set/reset/keep writes, every bank).

## Limits

* Logic-level model: timing is one clock per memory access; the 1 ns
  access time and the write energy of the published evaluation are not
  modelled.
* A write is not read back for verification; the controller trusts the
  cell to switch.
* Synthesizing the full 4 Gbit array as logic is not meaningful; a real
  implementation replaces the arrays in `rram_bank` with the RRAM macro and
  keeps the controller, registers, decoders and write circuit.
