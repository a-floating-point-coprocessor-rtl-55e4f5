# Floating-point coprocessors for the Butterfly processor node

A Butterfly processor node is a Motorola 68000 with a microprogrammed
processor node controller (PNC). The PNC sits between the 68000 and the
node's memory and drives the node's multiplexed address/data bus, called
MAD. The 68000 does floating point in software, which is slow. The boards
here attach to MAD and run in lock step with the PNC. The PNC passes them
32-bit operands as 16-bit halves and collects the results, while a pair
of WEITEK chips does the arithmetic: a 1032 multiplier and a 1033 ALU.

The RTL has two boards.

- **FPP1.** The simple, built design. A program asks for one operation
  (add, multiply, float, fix, ...) by writing to a "magic" address. A small
  fixed-microcode controller moves the operands into the WEITEK chips and
  puts the result on MAD for the PNC to store.
- **FPP3.** The high-speed design. It has a loadable 80-bit microcode
  engine, an on-board dual-port operand memory, and seed tables for
  division and square root. Whole computations run on the board, so data
  does not keep crossing the slow MAD bus.

`fpp_top` puts the two boards side by side. Each board would sit on its
own processor node, so they share only the clock and reset. The WEITEK
chips are bought parts, so they are not RTL. Their pins are ports, and
the testbenches supply behavioural models (`tb/wtc_model.sv`).

## FPP1: one operation per magic address

The 68000 starts an operation with a write to an address whose
MAD[21:16] bits are all ones. The low byte of that address names the
operation. The PNC then runs a fixed sequence in lock step with the board:

| cycle (0 = address phase) | MAD carries                          |
|---------------------------|--------------------------------------|
| 0                         | magic address (ADRLD high)           |
| 1-2                       | operation code                       |
| 3-4                       | operand 1, MS then LS half           |
| 7-8                       | operand 2, MS then LS half           |
| 19-20 (two-operand ALU)   | result from the board, MS then LS    |
| 20-21 (multiplier, one-operand ALU) | result from the board      |

The board never stalls the PNC. Correct operation therefore depends only
on both sides counting the same cycles. The table above is this design's
timing; the testbenches check it cycle by cycle.

### Control unit (`fpp1_control`, `fpp1_fsm_prom`)

An address decoder looks for the magic page. Two flip-flops then delay
the hit by two cycles. On the second one, a multiplexer gives the
microcode PROM the operation register (MAD[7:1], with bit 0 forced to
zero) in place of the next-address field. This jumps to the operation's
entry block.

The PROM holds 512 words of 28 bits. Its output is registered in the
control register (CTLREG). The entry address equals the low byte of the
magic address: ADD 04, SUB 08, NSUB 0c, WRAP 10, UNWRAP 14, FLOAT 18,
FIX 1c, AADD 20, ADDA 24, SUBA 28, MUL 2c, WMUL 30, MULW 34, WMULW 38.

Each entry block is four words long:
1. Load operand 1, MS half.
2. Load operand 1, LS half.
3. Put out the chip mode word (F = 8).
4. Put out the operation's function code, then jump to one of three
   shared tails: two-operand ALU (0x50), multiplier (0x70) or
   one-operand ALU (0x90).

Each tail then does the following:
- Loads the chip's mode register.
- Loads operand 2 (two-operand tails only).
- Clocks the operands into the chip.
- Waits for the chip's latency: 6 words for the ALU, 7 for the multiplier.
- Unloads the two result halves.
- Latches the status.
- Drives the result onto MAD, then returns to the idle loop at 0.

The PROM contents are not a table in the source: `fpp1_pkg::fsm_prom_word`
computes each word from these rules, and `fpp1_fsm_prom` fills the ROM
from it when it elaborates. To change the microcode, change the rules.

### Microword (`fpp1_pkg::microword_t`)

| bits  | field                                              |
|-------|----------------------------------------------------|
| 0-5   | GATE_S, LD_S, GATE_C, LD_C, LD_B, LD_A (active low)|
| 6-9   | 1032: L1, L0, U1, U0                               |
| 10-13 | 1033: L1, L0, U1, U0                               |
| 14-17 | F0-F3 function code                                |
| 18    | LD_F (active low)                                  |
| 19-26 | next address                                       |
| 27    | unused                                             |

L is the chip's load code: 00 nothing, 01 load A and B, 10 load A only,
11 load the mode register from F. In U, U1 low enables the chip's
output, and U0 selects the MS half (0) or the LS half (1).

### Function register and bus interface (`fpp1_function_reg`, `fpp1_bus_interface`)

The F code passes through two registers before it reaches the chips. This
lines it up with the operand loads that it belongs to.

The operand-1 path into the chips' A ports is two registers deep, and
operand 2 on the B ports is one deep. This way the A and B halves that
belong together reach the chips in the same cycle.

The result (C) and status (S) registers drive MAD when GATE_C or GATE_S
is low. C has priority, and the status goes out as the low three bits.

## FPP3: a microprogrammed board with its own memory

The FPP3 has four parts joined by three 16-bit buses:
- A and B carry operands.
- C carries results.
- MAD links the board to the PNC.

### The 80-bit microword (`fpp3`)

| bits  | field                                                        |
|-------|--------------------------------------------------------------|
| 0-18  | sequencer: branch address 0-11, instruction 12-15, condition select 16-18 |
| 19-35 | WEITEK chips: L and unload enable/half for each chip, F code |
| 36-50 | table ROM: capture MS/LS, function, drive MS/LS              |
| 51-76 | memory and buses: A/B/write offsets, write, segment load and source, C source, C-to-B bypass, drive MAD |
| 77-79 | unused                                                       |

The four field boundaries come from the original design. The bit order
inside each field is this design's own choice. The comment at the top of
`rtl/fpp3.sv` gives every position.

The WEITEK unload enables are active high in this word. That makes the
all-zero word safe: it is a jump to location 0, and every strobe is off.

### Micro engine (`fpp3_control`, `fpp3_bootstrap_fsm`, `fpp3_scan_reg`)

The sequencer models part of the AMD 2910: JZ, CJS, JMAP, CJP, CRTN and
CONT, with a five-word return stack. Any other code acts as CONT.
Condition select 0 means "always". Selects 1-3 are the WEITEK status bits
(infinity, negative, zero), and 4-7 read as zero, because the board's
comparators and condition PLA are not built. Each cycle the word at the
next address in the 4K x 80 writable control store (WCS) is clocked
into the pipeline register.

The WCS is RAM, so the PNC must fill it after reset. The bootstrap state
machine (BSFSM) handles this and every other PNC command. A command is an
address phase with MAD[21:16] = 111110; MAD[15:12] selects the command and
MAD[11:0] carries its argument.

| code | command               | allowed in  | effect |
|------|-----------------------|-------------|--------|
| 0    | LOAD MICROINSTRUCTION | boot        | five data words follow, 19 cycles apart, starting 3 cycles after the command; the word is written at the sequencer's address, which steps by one |
| 1    | END OF LOADING        | boot        | clears the pipeline register and sequencer; the engine runs, looping at 0 |
| 2    | BEGIN                 | run         | next address = argument (the MAP register) |
| 3    | BEGIN DIAGNOSTICS     | run         | engine stops |
| 4    | SCAN IN               | diagnostic  | one word, 3 cycles after the command, shifted into the chain |
| 5    | SCAN OUT              | diagnostic  | chain rotated 16 places; the bits appear on `scan_o` |
| 6    | SINGLE STEP           | diagnostic  | engine advances one word |
| 7    | END DIAGNOSTICS       | diagnostic  | engine runs again |

Loading is serial, to save parts. Each 16-bit word is captured in an
input register and then shifted into the pipeline register one bit per
cycle: 3 bus cycles plus 16 shifts, or 19 cycles a word. The pipeline
register is also the load shift register and the diagnostic scan chain,
so it holds partial words while data moves through it. During that time
the board is fed an all-zero microword (`ctl_valid` low), which keeps the
WEITEK chips and the memory from acting on garbage. One microinstruction
takes 97 cycles, so a full 4096-word store takes 397,312 cycles.

### Operand memory (`fpp3_dual_sram`)

The memory is two 16K x 16 RAMs holding the same data. Every write goes
to both, and each copy has its own read port, on A and B. Two operands
can therefore be read and one result written in the same cycle.

The address is an 8-bit segment number followed by a 6-bit offset from
the microcode, giving 256 segments of 64 words. The segment register
loads from constant 0 (the constants segment), from MAD[7:0] (chosen by
the PNC) or from C (chosen by the microcode). Reads are combinational and
writes happen at the clock edge.

### Table ROM unit (`fpp_table_rom`)

Division and square root start from a 12-bit-accurate seed and refine it
with one Newton step on the WEITEK chips:

- A / B = A * H1, where H1 = H * (2 - B * H) and H is about 1 / B.
- sqrt(A) = A * H1, where H1 = 0.5 * H * (3 - A * H * H) and H is about
  1 / sqrt(A).

The seeds come from ROMs that are computed in SystemVerilog when the
design elaborates. For an operand with exponent field E and top 12
fraction bits F:

| ROM                      | contents                                                   |
|--------------------------|------------------------------------------------------------|
| exponent, function 0     | G = 253 - E                                                |
| exponent, function 1     | G = ceil((379 - E) / 2)                                    |
| reciprocal fraction      | H = floor(2^25 / (4097 + F)) - 4096                        |
| sqrt fraction, odd E     | H = floor(2^19 / sqrt(4097 + F)) - 4096                    |
| sqrt fraction, even E    | H = floor(2^19 / sqrt(8192 + 2F)) - 4096                   |

The exponent ROM is 4K x 8, addressed by the 4-bit function and the
exponent. Only functions 0 and 1 are filled.

The seed is {sign, G, H, 11 zero bits}. It goes out on C in two halves,
the second through a delay register, in the two cycles after the
operand's halves are captured from B.

### Bus paths

The C bus carries one of four sources: the WEITEK result, the table ROM,
MAD, or the A bus. C can be written to memory, driven onto MAD, or fed
back to B through the bypass. A PNC write therefore runs MAD → C →
memory, and a PNC read runs memory → A → C → MAD.

## How far to trust it

Each module has a self-checking testbench in `tb/`, and every one passes.
Each testbench also fails when a deliberate bug is put into its module.

- **FPP1.** The PROM is checked word by word against an independent
  construction from the bit layout. `tb_fpp1` runs random operations of
  all 14 kinds through the full board with chip models. It checks every
  result and the exact MAD cycles, and it checks that foreign bus traffic
  never starts the board.
- **FPP3.** `tb_fpp3` loads a microprogram through the bootstrap machine
  (`tb/fpp3_pnc.svh` builds it). For random operands it then stores
  constants and operands in random segments and runs division and square
  root on the board. Both must come out within 1e-6 relative error of the
  exact value. Division takes 52 cycles (three multiplications, one
  subtraction). Square root takes 76 cycles (five multiplications, one
  subtraction). The steps are not overlapped.
- **Sequencer.** `tb_fpp3_control` runs a random 64-word program against
  a model of the sequencer, and it also checks scan-in, scan-out and
  single step.
- **Both boards.** `tb_fpp_top` runs both boards at full size at the same
  time.

The WEITEK models are the weak point. They model only what the boards
rely on: the two-cycle operand load, MS half first; the function code
taken at the second load; a result latency of 6 (ALU) or 7 (multiplier)
cycles; and a registered output two cycles after the unload request. The
real chips' wrapped formats and pipelined modes are not modelled, and
WRAP/UNWRAP pass data through unchanged. The latencies and the MAD cycle
numbers of the PNC sequence are choices that fit together. Check them
against the chip data sheets before building hardware.

## Departures and own choices

- FPP1 microcode: WRAP, UNWRAP, FLOAT and FIX take the one-operand tail.
  The multiplier waits seven words, and GATE_C gets a word of its own.
- The odd-exponent square-root fraction formula uses the square root
  shown in the table above. The exponent formula for the square root
  rounds up, which gives the right exponent for even E.
- FPP3: the sequencer instruction subset, the bit positions inside every
  microword field, the command encoding, the sample cycles of the loaded
  words, and the condition inputs are all this design's own.
- Only the 256 x 64 memory partition is built. The original also allowed
  64 x 256.
- Only the pipeline register and the MAD input register form the scan
  chain.
- Not included at all:
  - the second proposed board (FPP2), whose table ROM unit is the one
    used here;
  - the FPP3 comparators and condition PLA;
  - the optional NS16081 processor;
  - the WEITEK chips themselves.

## Files and simulation

`rtl/` holds one module or package per file:
- `fpp1_pkg.sv` is the package.
- `fpp_top.sv` is the top level.
- The FPP1 board is `fpp1.sv` and `fpp1_*.sv`.
- The FPP3 board is `fpp3.sv`, `fpp3_*.sv` and `fpp_table_rom.sv`.

`tb/` holds one testbench per module (`tb_<module>.sv`), plus:
- `fp32_ref_pkg.sv`, the reference arithmetic;
- `wtc_model.sv`, the chip model;
- `fpp3_pnc.svh`, the FPP3 microcode and PNC tasks.

Every testbench prints one line of the form
`TB_RESULT checks=N failures=M`.

To build and run a testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fpp1_pkg.sv tb/fp32_ref_pkg.sv tb/tb_fpp_top.sv --top-module tb_fpp_top
./obj_dir/Vtb_fpp_top
```

Any other testbench builds the same way: give its name in place of
`tb_fpp_top`.
