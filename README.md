# A latency-insensitive MIPS pipeline with variable-latency units

Most of a processor's clock period is set by a few long paths that real
programs seldom use: a carry that has to ripple through the middle of an
adder, the upper half of a 64-bit product, a read from the slow half of a
register file. This core is clocked for the *typical* path instead of the
worst. Each unit with a long path gets a small detector. When the detector
sees that the current operands really need the long path, the unit takes a
second cycle.

Extra cycles that appear at unpredictable times are hard to handle in a
classic pipeline with a central stall controller. Here they are not
special, because the pipeline is **latency-insensitive**:

- Every stage talks to its neighbours only through a *valid* signal going
  forward and a *stop* signal going back.
- Every pipeline register is doubled, so a datum arriving while the stage
  is stopped is never lost.

A unit that needs one more cycle just raises stop for one cycle. Data
dependencies, the multi-cycle divider and a late data memory use the same
mechanism.

The core runs the integer MIPS R2000 instruction set (no floating point)
plus the 32-bit `MUL`. It is a five-stage, in-order pipeline: IF, ID, EXE,
MEM, WB. It has no bypass paths, and branches and jumps are resolved in ID
with one delay slot. A 4-bit configuration register, the **VL Mask
Register** (VLMR), switches variable latency on or off per unit. Software
can therefore find out after reset which units need their second cycle at
the clock rate actually used, and switch off the ones that do not.

The microarchitecture follows M. R. Casu, S. Colazzo and P. Mantovani,
"Coupling Latency-Insensitivity with Variable-Latency for Better Than Worst
Case Design: A RISC Case Study", GLSVLSI 2011 (DOI 10.1145/1973009.1973043).
This RTL is an independent implementation of it. In the text below, "the
original" means that publication. The places where this RTL differs from
it, or fills in something it leaves open, are listed near the end.

## Valid/stop register pairs (`li_relay`)

Each pipeline register (IF/ID, ID/EXE, EXE/MEM, MEM/WB) is an `li_relay`
with two registers:

- The **main** register holds the datum offered downstream, with
  `out_valid`.
- The **ancillary** register catches a datum that arrives in the cycle the
  downstream stage stops. While the ancillary is full, the relay raises
  `in_stop` towards its upstream neighbour.

Because `in_stop` comes from a register, a stall walks back one stage per
cycle instead of reaching the whole pipeline at once. No datum is ever
overwritten. A stop that reaches an empty (invalid) main register has no
effect, because stopping a bubble is pointless.

A stage that holds its instruction (EXE during a variable-latency cycle, ID
waiting for an operand, MEM waiting for memory) does two things:

- It raises stop towards its own input relay.
- It sends an invalid token, a bubble, forward.

The program counter keeps its value while IF/ID is stopped. It needs no
ancillary register, because it can always refetch.

## Register tokens and the join in ID

Every register has a one-bit **token**. There are no bypass paths, so data
dependencies are handled by these tokens:

- An instruction that will write a register clears that register's token
  when it leaves ID.
- The instruction's write-back sets the token again.
- The decoded instruction and the tokens of the registers it reads meet in
  a **join** (`li_join`). The instruction leaves ID only when all of them
  are valid; otherwise ID stops.

This solves every read-after-write hazard without compiler help.

Timing in this design:

- A consumer reaches EXE four cycles after its producer did. In write-back
  order, the consumer retires four cycles after the producer.
- Independent instructions retire one per cycle.
- ID also waits for the token of its *destination* register. So two writes
  to the same register are never in flight together, and a late write can
  never revalidate a token that a newer write has cleared.
- R0 is always valid.

## Variable-latency units

Each VLMR bit enables one unit's second cycle. With a bit at 0 the unit
always finishes in one cycle, which is correct only if the clock is slow
enough for its worst path.

| VLMR bit | unit | long path detected when | cost |
|---|---|---|---|
| 3 `mul_v1` | multiplier | a 64-bit `MULT`/`MULTU` was issued and the next instruction is a HI/LO move, `MUL`, multiply or divide | 1 cycle on that next instruction |
| 2 `pcp8_v1` | PC+8 link adder (`JAL`, `JALR`, `BGEZAL`, `BLTZAL`) | same rule as the ALU adder, applied to PC+8 | 1 cycle |
| 1 `alu_v1` | ALU adder (add, sub, compare, load/store address) | carry out of bit 15 differs from the previous cycle's, and bits 16..22 all propagate | 1 cycle |
| 0 `RF_v1` | register file read port towards the branch unit | a branch or register jump reads a register in R16..R31 | 1 cycle |

Details of each unit:

- **Adders (`vl_adder`).** These are 32-bit Brent-Kung prefix adders.
  - The detector is cheap. One flip-flop keeps the carry out of bit 15 from
    the previous cycle; an XOR compares it with the current carry; a 7-input
    AND checks the propagate bits 16..22.
  - A carry out of bit 15 that did not change, or that stops before bit 23,
    settles in time.
  - The flip-flop is clocked every cycle. In the second cycle of a held
    addition the carry no longer differs, so the addition completes.
- **Multiplier (`multiplier`).**
  - It has an internal pipeline register. The `MULT`'s EXE cycle is the
    first of two, and LO is written in the second.
  - HI is written in the same second cycle, or in a third with `mul_v1`
    set.
  - The 32-bit `MUL` takes its low word in its own EXE cycle and is never
    slow itself.
  - The extra cycle is charged to the instruction that could see the slow
    half (see the departures list below).
- **Register file (`regfile`).**
  - R0..R15 always read in one cycle. R16..R31 may take two on the path to
    the branch controller.
  - A branch that needs R16..R31 with `RF_v1` set holds ID for one cycle.
    During that cycle the operands are captured into registers, and the
    branch decides from those copies in the next cycle.
  - Reads towards EXE are unaffected.
- **Divider (`divider`).** This one is not variable: the array divider
  always keeps its instruction in EXE for `DIV_LATENCY` = 9 cycles.

### The VLMR and the self-test it serves

The VLMR is COP0 register 16 (`cop0_vlmr`). `MTC0 rt, $16` writes it and
`MFC0 rt, $16` reads it. The new value holds from the clock edge at which the
`MTC0` leaves EXE.

Its reset value is `1011`: every unit starts in safe two-cycle mode except
the PC+8 adder. The reason is that the first instruction the core executes
is a test of that adder:

- At reset, `mips_core` puts a `JAL 0` in the IF/ID register as if it had
  been fetched from `0x007FFFF8`.
- Its link value, `0x00800000`, drives the adder's long path.
- The JAL writes R31, jumps to address 0, and has the word at `0x007FFFFC`
  as its delay slot. That is instruction memory word 1023 with the default
  size, and it should normally be a `NOP`.

A start-up program can then:

- check R31;
- clear one VLMR bit at a time;
- drive that unit's long path and compare the result with the known
  answer;
- set back any bit whose unit gave a wrong result.

`tb_bist` assembles such a program (about 55 words) and runs it on the top:

- It uses a BEQ on two all-ones registers in R16..R31 for the register
  file, `0x7FFFFFFF + 1` for the ALU, and `0xFFFFFFFF x 0xFFFFFFFF` for the
  multiplier.
- In RTL simulation every path meets its cycle, so the expected result is
  a mask of `0000`.
- The testbench checks the mask after every `MTC0` and the one-cycle
  holds of the slow-register branches.

Whether a real chip needs a bit is decided by the silicon, not by the RTL.
Set parameter `BOOT_PRELOAD` to 0 to start plainly at `RESET_PC`.

## Pipeline timing at a glance

- **IF:** asynchronous read of the instruction memory at the PC.
- **ID:**
  - decode, register read and token join;
  - branch and jump decision and target;
  - on a taken branch the PC is loaded with the target, and the delay slot
    (already fetched, or about to be) still goes down the pipe.
- **EXE:** one of the ALU, shifter, PC+8 adder, multiplier, divider,
  HI/LO and COP0 moves. HI and LO live here, so no token is needed for
  them.
- **MEM:** asynchronous data memory access, big-endian byte lanes. A load
  or store waits here while `dmem_wait` is high.
- **WB:** writes the register and sets its token. It never stalls.

| situation | extra cycles |
|---|---|
| independent instructions | 0 (one retires per cycle) |
| value used by the next instruction (any producer) | 3 |
| `MFLO`/`MFHI`/`MUL`/mult/div right after `MULT` with `mul_v1` | 1 |
| ALU or PC+8 long path with its bit set | 1 |
| branch reading R16..R31 with `RF_v1` | 1 |
| divide | 8 (9 cycles in EXE) |
| late data memory | 1 per cycle `dmem_wait` is high |

`tb_pipeline_timing` checks the first three rows cycle by cycle on a
short program that contains:

- a slow multiply with a move behind it;
- load-use pairs;
- a taken branch with its delay slot.

`tb_mips_core` checks the multiply, register file and divide rows, and
`tb_exe_unit` checks the ALU and PC+8 rows.

### What variable latency costs on small kernels

`tb_kernels` runs its four kernels (about 15,000 cycles in all) in each
VLMR setting. The holds per unit were:

| VLMR | mul / PC+8 / ALU / RF holds | cycles | extra |
|---|---|---|---|
| 0000 | 0 / 0 / 0 / 0 | 14831 | — |
| 1111 | 24 / 0 / 1069 / 365 | 16289 | 9.8 % |
| 0001 | 0 / 0 / 0 / 365 | 15196 | 2.5 % |
| 0010 | 0 / 0 / 1069 / 0 | 15900 | 7.2 % |
| 0100 | 0 / 0 / 0 / 0 | 14831 | 0 % |
| 1000 | 24 / 0 / 0 / 0 | 14855 | 0.2 % |

How to read the table:

- **ALU holds dominate.** Loop counters count down by adding `-1`
  (`0xFFFFFFFF`). That makes the carry out of bit 15 flip against a
  neighbouring addition while bits 16..22 all propagate.
- **RF holds are high** only because these kernels deliberately keep their
  loop counters in R16..R19. Software that knows the rule keeps branch
  operands in R0..R15.
- **Each hold costs exactly one cycle** here: the extra cycles equal the
  hold count.
- **Cycle counts depend on the data.** The data is random, so they vary a
  little with the simulator's seed.

## Files

Top and core:

- `mips_pkg`: opcodes, the decoded-instruction struct, the payload structs
  of the four register pairs, the event struct and the VLMR bit numbers.
- `mips_top`: the core plus instruction and data memories (1024 words each
  by default). It also has:
  - a program load port and a data memory load/inspect port;
  - the `dmem_wait` input;
  - the VLMR and per-cycle event flags (`ev`);
  - a write-back trace (`wb_*`).
- `mips_core`: the pipeline. Parameters `BOOT_PRELOAD` (1), `RESET_PC`
  (0) and `DIV_LATENCY` (9).

Protocol:

- `li_relay`: the valid/stop register pair.
- `li_join`: the join of several tokens.

ID stage:

- `decoder`: instruction to control fields.
- `branch_ctrl`: branch decision and target.
- `regfile`: registers, tokens and the slow-half branch read.

EXE stage:

- `exe_unit`: unit select, hold logic, HI/LO registers.
- Units: `alu`, `vl_adder`, `shifter`, `multiplier`, `divider`.
- `cop0_vlmr`: the VL Mask Register.

Memories:

- `imem`, `dmem`: arrays with asynchronous read.

Testbenches in `tb/`:

- One `tb_<module>` per module, each self-checking against independently
  computed values.
- `mips_iss_pkg`: an instruction-set reference model, a small assembler
  (`enc_*`, `li`, `emit`) and a random program generator.
- `tb_mips_top` runs the top at its default sizes:
  - a directed program and twelve random programs, with the data memory
    randomly late;
  - every write-back is compared with the reference model;
  - it counts every hold and stall kind and fails if any one never occurs.
- `tb_pipeline_timing` checks the cycle timing of the multiply, load-use and branch
  cases in two VLMR settings.
- `tb_bist` runs the start-up self-test program described above.
- `tb_kernels` runs four small kernels under six VLMR settings and
  prints the holds per unit. The kernels are a bit-serial CRC-32, a
  string search, a dot product with `MULT`/`MFLO` and an insertion sort.
- `tb_mips_core` runs the core at smaller sizes (divider latency 3, no
  boot preload) and checks write-back spacing for each hazard.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes.
With Verilator 5, for example:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
      rtl/mips_pkg.sv tb/mips_iss_pkg.sv tb/tb_mips_top.sv --top-module tb_mips_top
    ./obj_dir/Vtb_mips_top

The same command with another testbench name runs any other test.

To run your own program:

1. Hold `rst_n` low.
2. Write the words through `prog_we`/`prog_addr`/`prog_wdata` (byte
   addresses), and data through `dm_we`/`dm_addr`/`dm_wdata`.
3. Release reset.
4. Watch `wb_valid`/`wb_pc`/`wb_rd`/`wb_data`.

With the boot preload on, execution starts at 0 after the JAL, and R31
holds `0x00800000`.

## Where this design departs from, or fills in, the original

- **Multiplier hold position.** The original holds the `MULT` itself in
  EXE when a move follows it. Here the following instruction is held for
  one cycle instead. The cost is the same one cycle, and the decision
  needs no look-ahead into ID. The bubble sits one slot later than in the
  original timing diagram.
- **Write-after-write stall.** ID also waits for the destination token.
  The original does not mention write-after-write hazards.
- **Ancillary registers.** The PC has no ancillary register, because it
  simply refetches. The register file has none either, because
  write-back never stalls.
- **Exceptions.** There are no exceptions or interrupts, and no COP0
  registers other than the VLMR. `ADD`/`SUB`/`ADDI` do not trap on
  overflow. `SYSCALL`, `BREAK`, `RFE` and `LWL`/`LWR`/`SWL`/`SWR` execute
  as no-operations.
- **Chosen values and encodings.**
  - Memory sizes (1024 words each), asynchronous memory reads, big-endian
    byte order and the load ports are this design's own.
  - The `MUL` encoding is the MIPS32 `SPECIAL2` one.
  - The boot JAL address `0x007FFFF8` and target 0 were chosen to drive
    the long path.
- **Divide by zero.** The quotient and remainder come straight from the
  divider array (quotient all ones in magnitude, remainder equal to the
  dividend). MIPS leaves this result undefined.
- **Register jumps.** `JR`/`JALR` follow the same slow-register rule as
  branches.
- **Address additions.** Loads and stores compute their address in the ALU
  adder and are subject to its hold.
- **VLMR number.** The VLMR is COP0 register number 16.
- **Timing closure.** The clock frequencies and area the variable-latency
  scheme buys depend on synthesis and timing closure; nothing in this RTL
  measures them. The detectors' conditions are built as described. Whether
  they cover the true critical paths of a particular implementation must be
  checked with static timing analysis.

## Trust

Every module has its own test, and each test was shown to catch a
deliberately broken copy of its module. The full core has been compared
instruction by instruction with an independent reference model on thousands
of random instructions, in every VLMR setting, with random memory delays.
The cycle-level claims above are checked by `tb_mips_core` and `tb_pipeline_timing`.
The design passes Verilator lint and Yosys synthesis with no latches, loops
or multiple drivers.
