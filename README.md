# FPGA peripherals for a multi-axis PMSM motion controller

A low-cost control board for up to four permanent-magnet synchronous motors pairs a general-purpose
ARM Cortex-M3 (LPC1788, 72 MHz) with a small Spartan-6 FPGA (XC6SLX9). The CPU handles communication and the
slow position and speed loops. The FPGA does the work the CPU cannot do for four motors at once.
That work is:

* **The fast current loop (commutation).** It must run at 20 kHz per motor. In this design it runs on
  **Tumbl**, a small 32-bit RISC co-processor inside the FPGA. Its instruction set is derived from
  MicroBlaze.
* **Position capture** from four incremental encoders (IRC). The FPGA has too little logic for four
  32-bit quadrature counters. Each axis therefore gets an 8-bit counter, and a tiny **IRC
  co-processor** extends the counts to 32 bits in a shared block RAM.
* **The power-stage bus ("LX" bus).** It is a clocked serial link (CLK, SYNC, MOSI) to the power-stage
  modules. The **LX Master** repeats a double-buffered list of messages every 20 kHz period, each
  message followed by a CRC-8.

The CPU reaches everything through its asynchronous external-memory bus. A filtering slave
controller in the FPGA turns that bus into single-cycle internal transactions.

All logic runs on one 50 MHz clock with a synchronous, active-high reset.

```
        LPC1788 external memory bus (CS, RD, BLS[3:0], ADDRESS[15:0], DATA[31:0])
                                   |
                          slave_mem_ctrl  (sync + filter -> 1-cycle i_ce)
                                   |
                         master_bus_decoder
        +-----------+--------------+---------------+---------------------+
        |           |              |               |                     |
   Tumbl IMEM   Tumbl DMEM   tumbl_ctrl_regs  delay_meas_regs      external window
   (port B)     (port B)     (rst/int/halt/                            |
        |           |         trace/kick)                         xmem_arbiter <-- Tumbl core
        +--- tumbl -+              |                                   |    (master wins;
        core, GPRF, memories  <----+                              xmem_decoder  Tumbl stalls)
                                                          +------------+-------------+
                                                     irc_coproc                 lx_master
                                                  (4 x irc_quad_counter)   (512x16 RAM, CRC-8)
                                                          |                      |
                                                 A, B, IDX, MARK pins     LX CLK, SYNC, MOSI
```

## Master CPU bus and the slave controller (`slave_mem_ctrl`)

The CPU bus is asynchronous to the FPGA clock. The CPU runs at 72 MHz and the FPGA at 50 MHz. A
cycle starts with chip select low. Address, and data for a write, then appear. Finally RD or
BLS[3:0] (byte-lane write strobes) go low and are held for a programmable number of CPU cycles.

The controller works as follows:

1. **Synchronise.** CS, RD, BLS, ADDRESS and DATA pass through two flip-flops. They are
   compared as one "bus state" vector. DATA is masked to zero during reads, so that the FPGA's own
   read data cannot disturb the comparison.
2. **Filter.** A bus state is accepted only after it has been seen unchanged for `FILTER_CYCLES`
   (default 2) consecutive clocks. This removes samples taken while the CPU's pins are still
   changing.
3. **Issue a transaction.** Each newly accepted read or write state produces exactly one
   single-cycle internal transaction (`i_ce_o` with address, byte enables and data).
   - Keeping RD low and changing only the address gives back-to-back reads, as the CPU's
     fast-read mode expects.
   - Releasing the strobes ends the access immediately, without filtering. Two accesses to the
     same address separated by a short idle time are therefore two transactions.
4. **Return read data.** The addressed peripheral answers one cycle after `i_ce`. Its word is
   registered one cycle later and driven onto DATA while the synchronised CS and RD are low.

**Latency.** Read data is valid 2 + `FILTER_CYCLES` + 3 = **7 clocks (140 ns)** after the bus
settles. Adding one clock of sampling uncertainty, the CPU must hold RD for at least 160 ns, which
is about 12 CPU cycles at 72 MHz. DATA is released 2–3 clocks after RD or CS goes high. The CPU's
bus turnaround time must cover that before it drives DATA again.

**Measuring the timing.** `delay_meas_regs` lets software find the shortest safe timing:

- Two read-only constants, 0xAAAAAAAA and 0x55555555, make every data bit toggle on alternate reads.
- Two read/write registers do the same for writes.

### Master CPU memory map (CPU byte address = 0x8000_0000 + 4 × word)

| Word address | CPU address | Target |
|---|---|---|
| 0x0000–0x01FF | 0x8000_0000–0x8000_07FF | Tumbl instruction memory (512 words) |
| 0x0400–0x07FF | 0x8000_1000–0x8000_1FFF | Tumbl data memory (1024 words) |
| 0x0C00 | 0x8000_3000 | Tumbl control, shown below |
| 0x0C01 | 0x8000_3004 | trace kick: write 1 to step one clock in trace mode, or to resume after HALT |
| 0x0C02 / 0x0C03 | 0x8000_3008 / 0x8000_300C | Tumbl PC (execute stage) / HALT code, read only |
| 0x1FFC–0x1FFF | 0x8000_7FF0–0x8000_7FFC | RD1 = 0xAAAAAAAA, WR1, RD2 = 0x55555555, WR2 |
| 0x8000–0xFFFF | 0x8002_0000–0x8003_FFFF | Tumbl external memory space, shared with Tumbl |

The control register at word 0x0C00 has these bits:

| Bit | Meaning |
|---|---|
| 0 | reset, reset value 1 |
| 1 | interrupt request |
| 2 | external halt |
| 3 | trace mode |
| 4 | halted by the HALT instruction, read only |

Unmapped addresses read as 0.

## Tumbl co-processor (`tumbl`, `tumbl_core` and its stages)

Tumbl is a Harvard machine with a 4-stage pipeline: fetch, decode, execute, and memory/writeback.
It has 32 registers, with R0 hard-wired to zero. It executes one instruction per clock.

- **Program memory:** 512 × 32-bit (`IMEM_ABITS` = 9).
- **Data memory:** 1024 × 32-bit (`DMEM_ABITS` = 10).
- **Memory ports:** both memories are dual-port block RAMs whose second port belongs to the
  master CPU. The CPU can load code and exchange data without stopping the core.
- **Data address space:** data addresses beyond the data memory go out on the external memory
  interface. There they reach the encoder positions and the LX Master RAM.

**Instruction set.** Most of the MicroBlaze integer set:

- add/subtract with carry and keep-carry variants, CMP/CMPU
- logic operations, one-bit shifts, sign extension
- loads and stores of bytes, half-words and words (big-endian lanes)
- IMM prefix for 32-bit constants
- conditional and unconditional branches with and without delay slot, branch-and-link, RTI
- MFS/MTS
- 32-bit multiplier and barrel shifter, which can be switched off by parameters

On top of that, Tumbl has its own additions:

- **IT / ITT / ITE:** compare two operands and turn the next one or two instructions into NOPs
  depending on the condition. Conditions are EQ, NE, LT, LE, GT and GE, with signed and unsigned
  variants. An if/else written this way costs 3 cycles on either path, instead of 6 with branches.
  Control loops therefore have data-independent timing.
- **CLZ:** count leading zeros, used for normalising before a table-based division.
- **HALT:** stop with a 5-bit code that the master CPU can read. The core waits until the master
  writes the trace-kick register.

The core uses the MicroBlaze instruction layout, with bit 0 as the most significant bit.

**Pipeline behaviour** (what is hardest to get right when changing the core):

- **Branches** are resolved in execute.
  - The instruction fetched right after a taken branch is always discarded.
  - The one in decode is kept only if the branch has a delay slot.
  - A taken branch therefore costs 3 cycles, or 2 with a delay slot.
- **Forwarding:** results are forwarded from the memory stage and from the register-file write port.
- **Load-use stall:** a load's value reaches the register file one cycle later than an ALU result.
  An instruction that needs it right after the load stalls for one cycle. During the stall the
  register file re-reads that instruction's operands, so the value written in the stall cycle is
  picked up.
- **Conditional execution:** an IT instruction loads a small counter and a kill mask. A killed
  instruction keeps flowing down the pipeline but writes nothing, branches nowhere and touches no
  memory. An IMM prefix and the instruction it extends count as one.
- **Interrupts:** `int` is a level input, taken when MSR[IE] is set.
  - The instruction in execute must not be in a delay slot, follow an IMM prefix or be under
    IT control.
  - That instruction is replaced by a branch-and-link to 0x10. R14 receives its address and IE is
    cleared.
  - RTI returns and sets IE again.
- **Freezing:** the core is frozen by a clock enable in four cases:
  - external halt
  - after HALT
  - trace mode, where it runs one cycle per kick
  - a collision on the external bus with the master CPU

**External bus sharing (`xmem_arbiter`).** The master CPU always wins the external bus. If Tumbl
accesses it in the same cycle, Tumbl's clock enable drops and the access is retried in the next
cycle. A read returns its data one cycle after the request, and the arbiter holds that word for
the core in case the core is frozen at that moment.

## Encoder inputs (`irc_quad_counter`, `irc_coproc`)

**Per-axis counter.** Each axis synchronises A, B, IDX and MARK with two flip-flops. It then
decodes A/B in 4× mode: every edge counts, and the count goes up when A leads B. It keeps an
**8-bit** count.

- A rising IDX edge captures the count as the index count.
- A and B changing in the same clock means a step was lost. This sets a sticky error bit.

**Sequencer.** The co-processor is a four-instruction sequencer. Its instruction register
`{axis, op}` simply counts every clock and addresses a 16 × 32 "no-change" block RAM:

| op | Action |
|---|---|
| 0 | Q (32-bit position) is on the RAM output: write Q + sign-extend(C − Q[7:0]) |
| 1 | If an index edge happened, write the same formula with the captured index count |
| 2 | Read the next axis' Q |
| 3 | Idle |

So each 32-bit position is refreshed every 4 × AXES = 16 clocks (0.32 µs). The 8-bit difference is
correct as long as an axis moves fewer than 128 steps between refreshes. At 1 MHz encoder edges
that is 127 µs, far longer than 0.32 µs.

Going to 8 axes needs only the `AXES` parameter, which must be a power of two. It doubles the
round to 32 clocks.

## Power-stage bus master (`lx_master`)

The CPU or Tumbl fills a 512 × 16 RAM that holds two buffers of 256 words.

**RAM layout:**

- **Word 0x000** is a register:
  - bit 15 selects the buffer to send
  - bits 7:0 give the length of buffer 0's first message
- **Word 0x100** holds the length of buffer 1's first message.
- **Each message** is its data words followed by a link word. The link word holds the next
  message's address (bits 15:8) and its length (bits 7:0). Length 0 ends the list.

Software can build the next frame in one buffer while the other is being sent, then flip bit 15.

**Sending.** Every `PERIOD` = 2500 clocks (20 kHz), the state machine works through the list:

1. BEGIN, DECIDE and PREINIT read the control word, the length and the first data word, one cycle
   each.
2. INIT ends the list if the length is 0.
3. For each message:
   - READY (1 cycle, SYNC high)
   - XFER: 16 clocks per word, LSB first, with SYNC low
   - CRC: 8 clocks, MSB first, SYNC still low. During these clocks the link word is parsed and the
     next message's first word is read, so messages follow each other with a single idle cycle.

A message of n words costs 16n + 9 clocks, plus 4 clocks per period for setup. For example, one
16-word message uses 269 of the 2500 clocks. The longest single message that fits a period is
155 words.

If the list has not finished when the period ends, `overrun_o` is raised. The next period then
starts right after the list ends.

**CRC and bus outputs.**

- The CRC is CRC-8 with polynomial x⁸ + x² + x + 1 (0x07), initial value 0. It is computed over the
  data bits in the order they are sent.
- LX CLK is the 50 MHz system clock itself. SYNC and MOSI are registered and change on the rising
  edge.

### Tumbl external memory map (Tumbl byte address = 4 × word; CPU = 0x8002_0000 + 4 × word)

| Word | Tumbl address | Contents |
|---|---|---|
| 0x800 + 2i | 0x2000 + 8i | axis i 32-bit position (read/write) |
| 0x801 + 2i | 0x2004 + 8i | axis i index position |
| 0x808 + 2i | 0x2020 + 8i | axis i status: bit 1 decode error (write 1 to clear), bit 0 MARK |
| 0x809 | 0x2024 | IRC reset: bit 0, reset value 1, holds the IRC co-processor in reset |
| 0x900–0xAFF | 0x2400–0x2BFF | LX Master RAM, 16 bits per word |

The word addresses interleave: word 0x809 is axis 0's status word + 1. For AXES = 4, the status
words are 0x808, 0x80A, 0x80C and 0x80E, so word 0x809 is free for the IRC reset.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `fpga_top`, `tumbl` | `IMEM_ABITS` / `DMEM_ABITS` | 9 / 10 | Tumbl memory sizes (words = 2^n) |
| `tumbl` | `USE_HW_MUL`, `USE_BARREL`, `COMPATIBILITY_MODE` | 1, 1, 0 | optional units |
| `fpga_top`, `irc_coproc` | `AXES` | 4 | encoder axes (power of two) |
| `irc_quad_counter` | `CNT_BITS` | 8 | low-level counter width |
| `fpga_top`, `lx_master` | `LX_PERIOD` / `PERIOD` | 2500 | clocks per LX period |
| `lx_master` | `CRC_POLY` | 0x07 | CRC-8 polynomial |
| `fpga_top`, `slave_mem_ctrl` | `FILTER_CYCLES` | 2 | bus filter length |

## Timing budgets

| Workload | Arithmetic | Fits |
|---|---|---|
| Current loop, 4 motors × 20 kHz | 50 MHz / 80 kHz = 625 cycles per motor. A PID core of 60–70 cycles plus current acquisition (at most 100) leaves about 450. | yes |
| Current loop, 8 motors | 312 cycles per motor, about 140 left after the same core | yes |
| Encoders | 16-clock refresh against a 127-step limit of the 8-bit counters | yes, also at 8 axes |
| LX bus | 16n + 13 clocks per single-message period against 2500 | yes up to n = 155; a 255-word message overruns |

## Where this design makes its own choices

The source design fixes the overall structure and several details:

- the memory maps
- the Tumbl pipeline and its timing
- the IT/ITT/ITE, CLZ and HALT additions
- the interrupt vector 0x10
- the 8-bit encoder counters and the sequencer formula
- the LX buffer format, state sequence, LSB-first data and trailing 8-bit CRC
- the 20 kHz period

The following points are decisions of this implementation:

- **Slave controller:** the filtering rule (a settled state held for `FILTER_CYCLES` clocks after a
  2-FF synchroniser), immediate end of an access when the strobes are released, the 7-clock read
  latency, and a single chip-select input (the board wires two chip selects to the FPGA, one of
  which also drives the configuration port).
- **Tumbl core:**
  - Big-endian byte lanes.
  - ADD and RSUB update the carry; the K variants keep it.
  - CMP returns b − a, with the MSB set when a > b.
  - MFS/MTS bit positions: C in bit 2, IE in bit 1.
  - Unknown opcodes execute as NOPs.
  - The two memories share the single clock.
- **Interrupts:** the interrupt is held off after an IMM prefix, in a delay slot and during IT
  blocks.
- **Encoders:** the A/B counting direction and the synchroniser depth.
- **LX bus:**
  - CRC polynomial and initial value
  - MOSI = 0 when idle
  - CLK = system clock
  - the LX Master RAM window spanning all 512 words (0x2400–0x2BFF), although one table of the
    source ends it at 0x25FF
- **Register bits:** the bit layout of the Tumbl control register and the IRC reset register.

Not included, because they are outside the FPGA or not specified as logic:

- the master CPU and its firmware
- the power-stage modules and the slave side of the LX bus
- the FPGA configuration sequence
- the clock source
- the current-loop firmware
- the division look-up table
- the inverse kinematics solver

## Files and simulation

`rtl/` holds one module or package per file:

- `tumbl_pkg.sv` holds the core's types.
- `fpga_top.sv` is the top level.

`tb/` holds one self-checking testbench per block. `tb/tumbl_asm.sv` is a small instruction
encoder used by the Tumbl and top-level testbenches to write their test programs.

Each testbench drives random and directed stimulus and compares against an independent model. It
ends with a line `TB_RESULT checks=N failures=M`.

The top-level testbench `tb_fpga_top` uses default parameters. It models the CPU bus with
72 MHz timing and then:

1. loads a Tumbl program;
2. reads encoder positions while random quadrature signals run;
3. fills the LX buffers and decodes the serial output, checking the CRC;
4. counts that every mechanism occurred: stalls, IT skips, interrupts, bus collisions, LX messages
   and encoder steps.

Run any testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb rtl/tumbl_pkg.sv tb/tumbl_asm.sv tb/tb_fpga_top.sv \
          --top-module tb_fpga_top -o sim
./obj_dir/sim
```

Replace `tb_fpga_top` with any other `tb_*` name. The testbenches give their delays in nanoseconds
(the CPU bus model uses a 13.9 ns cycle), so the 1 ns / 1 ps time scale is required.
