# A 16-bit processor with deadline timers

Some embedded tasks need events placed to the clock cycle: the sync pulses
and pixels of a video signal, or the sample points of a serial line. A timer
interrupt and a scheduler only get to within milliseconds. Padding code with
NOPs gets cycle accuracy, but someone has to count every cycle on every path.

This processor makes the timing part of the instruction set. It has a small
bank of countdown timers and one extra instruction, **deadline** (`dead` and
`deadi`). A deadline waits until its timer has run out, reloads it, and
continues. Put one at the top of a loop and the loop runs with exactly that
period. The code inside only has to be fast enough, and its exact cycle
count no longer matters. Two deadlines on one timer with N in between are
exactly N cycles apart.

The rest of the machine is kept as simple as possible so that its timing is
predictable:

* a 16-bit datapath with sixteen registers, where `$0` always reads zero;
* four 16-bit timers, `$t0` to `$t3`;
* 32-bit instructions;
* separate on-chip instruction and byte-wide data memories;
* every instruction, taken branches and loads included, takes exactly one
  clock cycle, with no pipeline.

I/O goes through two registers:

* Writing `$14` loads an 8-bit video shift register. `$14` also drives the
  sync and blanking outputs and, in other uses, LEDs.
* Reading `$15` returns the serial input line.

With a 25 MHz clock, the processor clock is also the VGA pixel clock. The
testbenches run two programs on it: a complete 640x480 text-mode VGA
controller, and a serial receiver that detects the baud rate by itself.

## The deadline instruction, cycle by cycle

    dead  T, Rs      wait for timer T, then reload it with register Rs
    deadi T, imm16   wait for timer T, then reload it with imm16

Every timer counts down by one each clock and stops at zero.

**When a deadline completes.** A deadline completes in the cycle in which
its timer reaches zero. That is a cycle where the count is 1, and becomes 0
at the clock edge, or where the count is already 0.

**While it waits.** Before that cycle the core stalls:

* the PC holds;
* nothing is written;
* the deadline instruction is evaluated again in the next cycle;
* the `stall` output is high.

**When it completes.** The timer is loaded with the new value at that clock
edge, and the next instruction runs in the following cycle. A deadline whose
timer has already run out costs one cycle, like any other instruction.

Example, with timer `$t0` already expired:

    cycle  instruction        $t0 during the cycle
    -1     deadi $t0, 8       0  -> completes, $t0 <- 8
     0     add   ...          8
     1     deadi $t0, 8       7  stall
     ...                          stall
     7     deadi $t0, 8       1  -> completes, $t0 <- 8
     8     add   ...          8

The two `add`s are exactly 8 cycles apart. The second deadline waits for 7
of them, because the `add` itself used one. This is the rule to remember: **a
deadline with value N sets the length of the block that begins right after
it.** The deadline that closes the block is the one that actually waits.

Two idioms follow from this rule:

* **Block timing.** Place a deadline before each block of code that changes
  an output. Each output change then lands a fixed number of cycles after the
  previous one. In the example video program, timer `$t1` marks off hsync
  (96 cycles), back porch (48), active video (640) and front porch (16) of
  every line.
* **Loop pacing.** Place one deadline inside a loop, and the loop runs with
  that period. In the example video program, `$t0` makes the character loop
  emit one font byte every 8 cycles.

If the code between two deadlines takes longer than the value, the second
deadline simply does not wait. The timing is then late by the overrun, and
nothing else goes wrong. Proving that every deadline is met is still a
worst-case timing question. But a program does not need that proof in order
to work.

`rtp_timers` contains an assertion that a timer is reloaded only once it has
expired.

## Instruction set and encoding

All formats share one layout:

    31      26 25   21 20   16 15   11 10        0
    [ opcode ][  Rd  ][  Rs  ][  Rt  ][   zero    ]   register form
    [ opcode ][  Rd  ][  Rs  ][       imm16       ]   immediate form

Register fields are 5 bits wide, and only their low 4 bits are used. For
`dead`/`deadi`, the low 2 bits of Rd name the timer. Registers and
immediates are both 16 bits, so no extension is needed: adding `0xFFFF` is
subtracting 1.

| opcode | mnemonic | operation |
|---|---|---|
| 0 | `nop` | nothing |
| 1 / 2 | `add` / `addi` | Rd = Rs + Rt / imm |
| 3 / 4 | `sub` / `subi` | Rd = Rs - Rt / imm |
| 5 / 6 | `and` / `andi` | Rd = Rs & Rt / imm |
| 7 / 8 | `or` / `ori` | Rd = Rs \| Rt / imm (`mov`, `movi` are `or`/`ori` with `$0`) |
| 9 / 10 | `nand` / `nandi` | Rd = ~(Rs & Rt / imm) |
| 11 / 12 | `nor` / `nori` | Rd = ~(Rs \| Rt / imm) |
| 13 / 14 | `xor` / `xori` | Rd = Rs ^ Rt / imm |
| 15 / 16 | `xnor` / `xnori` | Rd = ~(Rs ^ Rt / imm) |
| 17 / 18 | `sll` / `slli` | Rd = Rs << (Rt / imm)[3:0] |
| 19 / 20 | `srl` / `srli` | Rd = Rs >> (Rt / imm)[3:0], logical |
| 21 / 22 | `lb` / `lbi` | Rd = zero-extended byte at Rs + Rt / Rs + imm |
| 23 / 24 | `sb` / `sbi` | byte at Rs + Rt / Rs + imm = Rd[7:0] |
| 25 / 26 | `be` / `bne` | if Rd == / != Rs: PC = PC + 1 + imm |
| 27 | `j` | PC = imm |
| 28 / 29 | `dead` / `deadi` | wait for timer Rd[1:0], then reload it with Rs / imm |

Opcodes 30 to 63 execute as `nop`. The decoder flags them as `illegal`, but
nothing uses that flag. There are no condition flags, no calls and no
interrupts. After reset the PC is 0 and all registers and timers are 0.

`tb/rtp_asm_pkg.sv` has encoding functions (`r3`, `ri`, `movi`, `deadi`,
`br`, ...) that the testbenches use as an assembler.

## Registers with side effects

* **`$0`** reads zero. Writes to it are ignored.
* **`$14`** is a normal read/write register, and its value leaves the core.
  * Bits 7..0 go to the video shift register. Any write to `$14` loads the
    byte being written into the shift register at the same clock edge.
    Otherwise the register shifts left one bit per clock, MSB first, with
    zeros shifted in.
  * Bits 8, 9, 10 and 11 drive `hsync`, `hblank`, `vsync` and `vblank`.
  * All 16 bits drive `leds`.

  Because the control bits sit above the pixel byte, `lb $14, ...` (which
  zero-extends) clears sync and blanking while it loads pixels. Every
  output change is visible one clock after the instruction that makes it.
* **`$15`** reads as the serial input copied to all 16 bits, so it is
  `0x0000` or `0xFFFF`. Writes are ignored. The input is used as is:
  synchronise it to the clock outside this design if it comes from a pin.

## Module hierarchy

    rtp_top                    system: core, memories, video shift register, I/O
      rtp_core                 PC, sequencing, deadline stall
        rtp_decode             instruction -> rtp_pkg::ctrl_t
        rtp_regfile            16 x 16 bit, 3 read ports, $0/$14/$15 behaviour
        rtp_alu                add, sub, and, or, nand, nor, xor, xnor, sll, srl
        rtp_timers             4 x 16-bit deadline timers
      rtp_imem                 512 x 32 instruction memory, combinational read
      rtp_dmem                 8192 x 8 data memory, combinational reads
      rtp_video_shifter        8-bit pixel shift register
    rtp_pkg                    opcodes, ALU codes, ctrl_t, $14 bit positions

Reads from both memories are combinational. A single-cycle machine needs
this, because it fetches, loads and writes back in one clock. On an FPGA the
memories therefore map to distributed RAM. To use synchronous block RAM, run
the memories on the opposite clock edge or add a pipeline stage. A pipeline
would have to keep one instruction per cycle visible to the software to
preserve the timing model.

`rtp_top` parameters:

* `IMEM_DEPTH` (default 512 words);
* `DMEM_DEPTH` (default 8192 bytes).

Data addresses are 16 bits wide, and only their low bits are used.

## Loading and running

Hold `rst` high. While it is high:

* write the program through `prog_we`, `prog_addr` and `prog_wdata`;
* write any data (screen, font, tables) through `host_we`, `host_addr` and
  `host_wdata`.

Then release `rst`, and execution starts at instruction 0. `host_rdata`
reads the data memory at `host_addr` at any time. Host writes share the
memory's write port and take priority over `sb`/`sbi`.

## The example programs

**Text-mode VGA (`tb/tb_rtp_top.sv`).** The screen is 80x30 characters of
8x16 pixels, 640x480 visible, with 800 clocks per line and 525 lines per
frame. Each frame has:

* 10 lines of vertical front porch;
* 2 lines of vsync;
* 33 lines of vertical back porch;
* 480 active lines.

Each line is 96 clocks of hsync, 48 of back porch, 640 active and 16 of
front porch. The screen is at address 0. The font is stored line by line at
`0x1000 + 256*scanline + character`. This layout makes the character loop
five instructions long, within its 8-cycle budget:

    load the character code
    deadline $t0, 8
    load the font byte into $14
    increment the pointer
    branch

The first font byte of a line is written five instructions after the
deadline that opens the active region, while the sync writes come one
instruction after their deadlines. So the program uses 44 and 644 for the
back-porch and active deadlines. This keeps the visible intervals at
exactly 48 and 640 clocks, and the last character's eighth pixel ends
exactly when the front porch starts.

**Serial receiver (`tb/tb_rtp_top_uart.sv`).** The receiver takes 8-E-1
frames: a start bit, 8 data bits LSB first, even parity, and a stop bit.

1. It polls `$15` for the falling edge of the start bit.
2. A deadline of half a bit time on `$t1`, followed by full-bit deadlines,
   places each sample in the middle of its bit.
3. It XORs the 10 samples of data, parity and stop. For a good frame the
   result is all ones.
4. On a good frame it puts the byte on `$14`.
5. On a bad frame it measures the next start bit instead. A three-instruction
   loop adds 3 to a counter per pass, which is exact because every
   instruction takes one cycle. The result becomes the new bit time.

This measurement has limits:

* It is only right when the byte's bit 0 is 1.
* The frame it was measured on is not received correctly.
* It is quantised to 3 clocks. Over the ten sampled bits of a frame the
  error can add up to 30 clocks, which must stay well under half a bit, so
  bit times need to be well above 60 clocks. At 25 MHz and 9600 baud a bit
  is 2604 clocks, far above that.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/rtp_pkg.sv tb/rtp_asm_pkg.sv tb/tb_rtp_top.sv --top-module tb_rtp_top
    ./obj_dir/Vtb_rtp_top

Replace `tb_rtp_top` with any other testbench. Each testbench checks its
unit against values worked out independently:

| testbench | what it checks |
|---|---|
| `tb_rtp_alu` | every operation, with random and corner-case operands |
| `tb_rtp_regfile` | reset; 3-port reads against a reference; `$0`, `$15`, `$14` strobe |
| `tb_rtp_timers` | counts and `expired` each cycle against a model; reload period N |
| `tb_rtp_imem`, `tb_rtp_dmem` | random writes and full read-back on all read ports |
| `tb_rtp_decode` | fields and control bits for all 64 opcodes |
| `tb_rtp_video_shifter` | MSB-first pixel order, load timing, zero fill, mid-byte reload |
| `tb_rtp_core` | each instruction class; one cycle per instruction; deadline timing (details below) |
| `tb_rtp_core_random` | random programs, compared cycle by cycle with an instruction-set model (details below) |
| `tb_rtp_top` | default sizes, two whole VGA frames (details below) |
| `tb_rtp_top_uart` | serial receiver with a wrong starting baud rate (details below) |

More detail on the larger testbenches:

* **`tb_rtp_core`** checks the 8-cycle example above, a loop paced at 10
  cycles, a reload from a register, and an overrun deadline that costs one
  cycle.
* **`tb_rtp_core_random`** fills the instruction memory with random
  instructions, including unused opcodes, loads, stores, forward branches
  and deadlines. It runs them for 200,000 cycles with a randomly toggling
  serial input. After every cycle it compares the PC, the stall output, all
  registers, all timers and every store with a model written directly from
  the instruction-set rules above.
* **`tb_rtp_top`** checks, against a model built from the screen and font:
  * line, sync and porch timing;
  * all 307,200 pixels of each of the two frames;
  * that the pixel output is zero outside the active region.
* **`tb_rtp_top_uart`** checks three things:
  * that the receiver detects the error and learns a bit time within 3 of
    160;
  * that the later bytes arrive intact;
  * that every sample falls in the middle half of its bit.

## What is fixed by the original design and what is filled in

These parts follow the original description:

* the 16-bit ALU and datapath;
* sixteen registers with a zero register;
* four 16-bit timers that count down and stop at zero;
* the deadline semantics, including the one-cycle cost when the timer has
  expired and the 8-cycle example;
* one instruction per cycle with no pipeline;
* a Harvard organisation with 32-bit instructions and byte-only loads and
  stores that zero-extend;
* the instruction list, and `mov` as `or` with `$0`;
* the opcode/Rd/Rs/Rt/immediate field layout;
* `$14` feeding an 8-bit video shift register and LEDs;
* `$15` reading the serial line as all zeros or all ones.

These are this design's own choices:

* opcode numbers;
* branch targets relative to PC + 1, and `j` to an absolute address;
* shift distances taken from the low 4 bits;
* which bits of `$14` carry HS, HB, VS and VB;
* MSB-first shifting, and loading the shift register on any `$14` write;
* memory sizes (512 x 32 and 8 KiB) and combinational memory reads;
* the load and host ports;
* reset behaviour;
* the register file having three read ports.

The example programs are new programs that follow the original programs'
structure and timing. The video program uses the line-major font layout and
the adjusted back-porch deadlines described above.

One reading is worth stating. "The timer reaches zero" is taken to mean that
the count becomes zero at the end of the cycle. This is what makes a
deadline value N give a period of exactly N cycles, which the video timing
(96 + 48 + 640 + 16 = 800) and the 8-cycle example both need. If you prefer
that a deadline completes one cycle after the count shows zero, change the
compare in `rtp_timers` to `== 0`. Every period then becomes N + 1.

Not built: running a best-effort thread while a deadline waits, and any
operating-system support for saving timers. Both were only suggested as
future directions for the design.
