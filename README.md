# FPGA Royale: a sprite game engine with its own processor

This design runs a two-player tower-defence game on one FPGA. It avoids
drawing the game pixel by pixel in software. Instead, a small custom
processor keeps every object on the battlefield as a *sprite*: a record of
eight 13-bit attributes. Each video frame, a graphics unit turns the list of
sprites into pixels. The processor and the graphics unit run in parallel,
and the graphics unit is double-buffered. So the processor gets a whole frame
time to describe the next frame, and the picture never tears.

The whole system runs on one 74.25 MHz clock, the pixel clock of 720p at
60 Hz:

```
 PS/2 mouse 0 ─► mouse_interface ─┐                       ┌─► tower_health_display ─► an/seg
 PS/2 mouse 1 ─► mouse_interface ─┤                       │
                                  ▼                       │
 prog_* ─► instr_mem ─► game_processor (reg_file, sprite_file, decoder, ALU,
           data_mem ◄─►             sprite_renderer) ─────┘
                                  │ sprite_valid/ready, x, y, frame   ▲ new_frame
                                  ▼                                   │
                               graphics (video_timing, sprite_rom, 2 × frame_mem,
                                         palette_rom) ─► rgb, hsync, vsync, de
```

The top level is `fpga_royale_top`. It brings out:
- the pixel stream as RGB plus syncs, which an HDMI/TMDS encoder (not included) would take;
- the open-drain PS/2 lines of two mice;
- the 8-digit 7-segment display;
- a port for loading the program.

## Sprites and the sprite file

The processor has two register files:

- **`reg_file`**: 32 general registers of 32 bits. Register 0 is always zero.
  Registers 30 and 31 hold each player's *elixir*, the resource that is drawn on screen.
- **`sprite_file`**: 64 sprites × 8 attributes × 13 bits. 13 bits cover
  every value the game needs (up to 8191).

The hardware gives meaning to only a few attributes:

| attribute | meaning | used by hardware |
|---|---|---|
| 0 | type (0 = dead/unused) | renderer: a sprite is drawn only if this is non-zero |
| 1 | x of the top-left corner | renderer, mice |
| 2 | y of the top-left corner | renderer, mice |
| 3 | spritesheet frame number | renderer |
| 4 | health | tower display (sprites 0, 1, 60, 61) |
| 5 | damage | software only |
| 6 | state | mice write their left button here |
| 7 | team | software only |

Each mouse is wired into a fixed sprite: mouse 0 into sprite 62 and mouse 1
into sprite 63.
- Each time a mouse packet arrives, the mouse writes x, y and the button into its sprite.
- A mouse write wins over a processor write to the same attribute in the same cycle.

The four towers are sprites 0 and 1 (the top player) and 60 and 61 (the
bottom player). Their health is shown on the 7-segment display.

## The processor

### Instruction format

Instructions are 36 bits wide, so that one word can name a register, a
sprite *and* an attribute index:

| bits | field | used as |
|---|---|---|
| 35:33 | `ind` | sprite attribute index |
| 32 | `sp` | sprite-instruction flag |
| 31:26 | opcode | |
| 25:20 | `a` | destination register or sprite; rs1 of branches; data register of SW |
| 19:14 | `b` | rs1, or the first sprite |
| 13:8 | `c` | rs2, or the second sprite |
| 13:0 | `imm14` | signed immediate or offset; branch and jump targets as an *instruction index* |
| 19:0 | `imm20` | LI value (signed), WAIT count (unsigned) |
| 2:0 | `ind2` | second attribute index of ATTACK |

The `sp` flag must be 1 exactly for the sprite opcodes (20–32). If it
disagrees with the opcode, or the opcode is unknown, the instruction does
nothing. This also makes an all-zero word a NOP. `royale_pkg::mk_instr`
builds instruction words and documents the operands of each opcode.

### Instruction set

- **Ordinary (RISC-V-like):** NOP, LI, JMP, JAL, JALR, BEQ, BNE, BLT, BGE,
  LW, SW, ADDI, SUBI, SLLI, SRLI, ADD, SUB, SLL, SRL, and ABS (|rs1 − rs2|).
  - BLT and BGE compare signed values.
  - Shifts use the low 5 bits of the shift amount.
- **Sprite:**
  - SPLI: immediate into an attribute.
  - LISP: attribute into a register.
  - SPLREG: register into an attribute.
  - SPADDI / SPSUBI: a register ± an immediate into an attribute.
  - SPADD / SPSUB: add or subtract a register to an attribute, in place.
  - ADDSP / SUBSP: add or subtract an attribute to a register, in place.
  - SPLW / SPSW: load and store between an attribute and data memory.
  - ATTACK: subtract one sprite's attribute from another's.
  - DST: the Manhattan distance |Δx| + |Δy| between two sprites, into a register.
  - Sprite arithmetic wraps at 13 bits.
- **WAIT n:** stall for n extra cycles. Game code uses it to pace itself to real time.

### Timing

The processor is deliberately *not* pipelined. A state machine walks each
instruction through the stages before fetching the next one:

| state | work | cycles |
|---|---|---|
| FETCH0, FETCH1 | present pc to the instruction BRAM, capture the word | 2 |
| DECODE | read registers and sprites, form operands | 1 |
| EXEC | ALU result, branch decision | 1 |
| MEM | store, write-back, pc update | 1 |
| MEM2 | load data arrives from the data BRAM (loads only) | 1 |
| WAIT | count down the WAIT operand | n |

So most instructions take **5 cycles**, loads take **6**, and `WAIT n` takes **5 + n**.

The pc is a byte address and steps by 4. The instruction BRAM is indexed by
`pc[..:2]`. JAL and JALR link `pc + 4`. Data memory is word-addressed, and
the address is taken modulo its depth.

### The sprite renderer

`sprite_renderer` runs alongside instruction execution, on its own read port
of the sprite file, so it never slows the processor.

On every `new_frame` from the graphics unit, it:
1. walks sprites 0…63 and offers each live one (x, y, frame) to the graphics unit;
2. offers the elixir icons: min(r30, 10) copies of spritesheet frame 23 along
   the top edge, then min(r31, 10) along the bottom edge, 36 pixels apart.

The handshake is valid/ready. Valid and the data stay stable until the sprite
is taken; an assertion checks this. If a new `new_frame` arrives during a
walk, the walk restarts.

## Graphics

### Double buffering

`graphics` owns two frame memories of 4-bit palette indices, one entry per
pixel of a 360 × 720 portrait *canvas*. The canvas sits at the left of the
1280 × 720 screen; everything else is black. The bit `write_mem_1` selects
the roles of the two memories and flips at every `new_frame`.

- **Back buffer.** It receives sprites. For an accepted sprite, a pointer
  starts at `y·360 + x`. For the next 48 × 48 cycles, it copies one
  spritesheet pixel per cycle into the buffer, stepping to the next row after
  every 48 pixels. Pixels are skipped in three cases:
  - palette index 0 (transparent);
  - pixels that fall right of or below the canvas (clipped);
  - sprite frame numbers beyond the sheet.
- **Front buffer.** It is displayed. Each memory is single-ported and
  read-first. In the same cycle that a pixel is read out for display, the
  background index for that position is written back. So when the buffers
  swap, the new back buffer already holds a clean background, without a
  separate clear pass.

The background has three bands, chosen from the raster position:
- grey (palette 15) for the card banners, 96 rows at the top and at the bottom;
- blue (14) for the moat, rows 336–383, except two 48-pixel green bridges;
- green (13) everywhere else.

### Timing

- **Sprite throughput.** A sprite costs exactly 48² = 2304 cycles.
  `sprite_ready` rises in the last pixel cycle, so sprites can follow each
  other back to back. One 1650 × 750-cycle frame therefore fits 537 sprites.
  The game uses at most 64 + 20.
- **Frame swap.** `new_frame` pulses at the first line of vertical blanking
  (hcount = 0, vcount = 720). `sprite_ready` is low in that cycle. A sprite
  still being copied at the swap is dropped.
- **Pixel output.** The pixel output lags the raster counters by 2 cycles:
  one for the frame memory and one for the palette. hsync, vsync and de are
  delayed to match.
- **Video timing.** Standard 720p60: 1280 active pixels, then 110 front
  porch, 40 sync and 220 back porch; 720 active lines, then 5 front porch,
  5 sync and 20 back porch. Syncs are active high.

### The ROMs

- **`sprite_rom`** holds 24 frames of 48 × 48 four-bit indices.
  - It loads a hex file through the `INIT_FILE` / `SPRITE_FILE` parameter.
  - Without one, it holds a computed test pattern: `((row/4) + (col/4) + frame) mod 13`.
    The pattern has transparent pixels and never uses the background colours.
- **`palette_rom`** has 16 colours:
  - entry 0 is white and is treated as transparent;
  - entries 13–15 are the green, blue and grey of the background;
  - entries 1–12 are placeholders for the game art.

## Mouse input

Each `mouse_interface` talks PS/2 to one mouse.

**Start-up.** It sends 0xF4 (enable data reporting) through `ps2_tx`. That
is the host-to-device sequence:
1. hold the clock low for 100 µs;
2. clock out the byte, odd parity and the stop bit;
3. wait for the device's acknowledge.

It then discards bytes until it receives 0xFA, the acknowledge of 0xF4.

**Packets.** `ps2_rx` receives 11-bit frames: start bit, 8 data bits LSB
first, odd parity, stop bit. It samples on falling clock edges, times out
after 1 ms of silence, and is muted while the host is transmitting.

Three frames make one movement packet:
- status byte: buttons, the sign bits, and the overflow bits;
- X delta;
- Y delta.

A first byte without bit 3 set is discarded, to regain packet alignment. A
byte with a framing or parity error drops the rest of its packet.

**Cursor.** The cursor starts at the canvas centre.
- x += dx and y −= dy, because PS/2 Y points up.
- Both are clamped to 0…360 and 0…720.
- An axis with its overflow bit set is ignored.
- `clicked` follows the left button.

## Tower display

`tower_health_display` shows the low 8 bits of the four tower healths as two
hex digits each:
- sprite 0 on the two leftmost digits;
- then sprite 1, sprite 60 and sprite 61.

So the top player is on the left half and the bottom player on the right half.

It multiplexes the 8 digits at 1 ms per digit. `an` is active low, and `seg`
is `{g,f,e,d,c,b,a}`, active low.

## Where this departs from, or fills in, the original design

The original design is documented only at block level. These points are this
implementation's own choices:

- **Encoding.** The instruction encoding and opcode numbers are new. Only the
  36-bit width, the 3-bit attribute index and the sprite flag at the top are
  original. NOP and the invalid-instruction rule are additions.
- **Canvas and background.** The canvas size (360 × 720) was inferred from the
  frame memory budget (32 BRAM36 blocks of 4-bit pixels per buffer). The
  background band positions are invented.
- **Towers and mice.** The original reserves the first two and last two sprites
  for towers, but also gives sprites 62 and 63 to the mice. Here the mice
  keep 62/63, and the bottom towers are 60/61.
- **Attribute and flag choices.** The mouse button goes to attribute 6. A sprite
  counts as alive when its type attribute is non-zero. The elixir icons' count
  (10), frame (23) and placement are assumptions.
- **Semantics.** ATTACK wraps at 13 bits rather than stopping at zero. BLT/BGE
  are signed.
- **Memories.** The instruction memory and data memory hold 1024 words each;
  the original game program has 648 instructions.
- **Mouse start-up.** The initialisation sequence is reduced to 0xF4 and its
  acknowledge.
- **Not included:**
  - the HDMI TMDS encoder and serialiser;
  - the serial program loader (replaced by the `prog_*` port and the `PROG_FILE` parameter);
  - the assembler, the game program and the sprite art.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`.

- `tb_fpga_royale_top` runs the whole system at its full size for a few frames:
  - two modelled PS/2 mice (`tb/ps2_mouse_model.sv`), including a packet with a
    parity error that must be dropped;
  - a game program with towers, a troop, DST/ATTACK, loads, stores, WAITs and elixir;
  - a pixel-by-pixel comparison of a whole displayed frame against a reference
    drawn in the testbench;
  - a decode of the 7-segment output.
- `tb_game_processor` runs random programs against an instruction-set model,
  and checks the cycle counts as well as the results.
- `tb_graphics_capacity` keeps the full-size graphics unit saturated with
  sprites. It confirms hand-overs exactly 2304 cycles apart and 537 complete
  sprites per frame. A 538th sprite starts 251 cycles before the swap and is
  cut off.

With plain Verilator 5, list the package first:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_fpga_royale_top \
  rtl/royale_pkg.sv $(ls rtl/*.sv | grep -v royale_pkg) \
  tb/ps2_mouse_model.sv tb/tb_fpga_royale_top.sv
./obj_dir/Vtb_fpga_royale_top
```

Replace the top module and testbench file for the other testbenches. Only
`tb_mouse_interface` and `tb_fpga_royale_top` need the mouse model. The
full-size run takes several seconds; the others take well under one.

To load a real program, set `PROG_FILE` to a `$readmemh` file of 36-bit words.
Alternatively, hold the system in reset and write words through
`prog_we/prog_addr/prog_data`. Real art goes in through `SPRITE_FILE`: one hex
digit per pixel, frame-major, then row, then column.
