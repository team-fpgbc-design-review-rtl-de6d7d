# A Game Boy Color on an FPGA, drawn without a frame buffer

This is the hardware around the CPU of a Game Boy Color built for an FPGA board: the memory system with its bank switching, the two DMA engines, interrupt delivery, the timer, the LCD status logic, a pixel unit that works out every dot's colour from VRAM and OAM while the monitor is being scanned, and the interfaces to a DVI transmitter, an SNES game pad and a real Game Boy cartridge. Everything runs on one 100 MHz clock.

It follows the design of a university team's FPGA Game Boy Color (the "FPGBC" project). That design used a Game Boy-mode Z80 core (TV80) as its CPU. The core is not part of this RTL: its memory bus, NMI and interrupt-enable flag are ports of the top module, `gbc_top`.

The pixel unit is the least conventional part. Most of this README is about it.

## Blocks and address map

```
 CPU bus ──► gbc_memory ──┬─ cartridge  0000-7FFF, A000-BFFF ──► gbc_cart_if ──► connector pins
 (req/ack)   decoder +    ├─ VRAM       8000-9FFF  (gbc_vram, 2 x 8 KB, bank = VBK FF4F)
             arbiter      ├─ WRAM       C000-DFFF  (gbc_wram, 8 x 4 KB, D000 bank = SVBK FF70)
   ▲  ▲                   ├─ OAM        FE00-FE9F  (40 sprites x 4 bytes)
   │  └ gbc_oam_dma (FF46)├─ I/O        FF00-FF7F  (register bus to the peripherals)
   └─── gbc_hdma (FF51-55)└─ HRAM       FF80-FFFE, IE FFFF
 peripherals on the register bus: gbc_interrupt (IF/IE), gbc_timer (DIV/TIMA/TMA/TAC),
   gbc_joypad (FF00) ◄── gbc_snes_ctrl ◄── pad, gbc_palette_ram (FF68-FF6B),
   gbc_lcd_timing (LY/STAT, via gbc_memory)
 picture: gbc_display ──request dot──► gbc_ppu ──► colour ──► gbc_chrontel_out ──► DVI pins
          (640x480 raster)             ├ gbc_tile_pixel   (shared tile-dot fetch)
                                       ├ gbc_sprite_select (10 sprites per line)
                                       ├ gbc_pixel_mix    (priority)
                                       └ VRAM port B, OAM port, palette ports
```

The package `gbc_pkg` holds the shared types. These are the bus request and response, the register-bus request and response, the tile attribute byte, the OAM entry and the 15-bit colour. It also holds the register addresses and the LCDC bit numbers.

### Clocks and enables

| Rate | Derived from 100 MHz by | Drives |
|---|---|---|
| 100 MHz | — | all logic |
| 25 MHz | pixel enable, one clock in four | the 640x480 raster |
| 4.17 MHz | dot enable, `DOT_DIV` = 24 | LY/STAT timing and the timer |

The dot enable stands in for the console's 4.19 MHz clock.

## The CPU bus

A master raises `valid` with `we`, `addr` and `wdata`. It holds them until a cycle with `ack`, which also carries `rdata`. Internal memories answer two clocks after the request is taken. The cartridge takes as long as the connector interface needs: one setup clock, `CART_CYCLES` clocks of RD or WR strobe, then one clock.

Three masters share the memories. Highest priority first:

1. **VRAM DMA** (general-purpose mode). The CPU is halted for the whole copy, so `cpu_stall` is high and its request waits.
2. **OAM DMA**. It copies `XX00-XX9F` to `FE00-FE9F` at one byte per microsecond, 160 µs in all. Meanwhile the CPU may only use high RAM (FF80-FFFE). Its other reads are answered with FF at the next free bus slot, without waiting for the copy to end, and its other writes are dropped.
3. **CPU**.

Assertions in `gbc_memory` check that a master holds its request until it is acknowledged.

Registers outside the memory block sit on a one-cycle register bus (`io_req`/`io_rsp`). Each peripheral answers the addresses it owns with `hit`. An address nobody claims falls back to a plain 128-byte I/O array, so the sound registers FF10-FF3F read back what was written.

## Interrupts through the NMI

The CPU core's own interrupt handling could not be used. Interrupts are delivered through its NMI and a substituted jump instead:

1. A request sets its IF bit (V-Blank, LCD STAT or timer).
2. If the CPU's interrupt-enable flag (`cpu_ime`) is set and IE allows it, the lowest-numbered pending request is taken. Its IF bit is cleared and its vector `0x40 + 8n` is latched.
3. NMI is raised, and the override is armed.
4. The CPU jumps to 0x0066. While armed, reads of 0x0066, 0x0067 and 0x0068 return `C3 nn 00` (JP 00nn) in place of the ROM bytes.
5. The CPU lands on the vector.

NMI drops once 0x0066 has been fetched. The override is disarmed after 0x0068. Only one interrupt is in flight at a time.

The CPU side is expected to clear its own enable flag when it enters the handler (as the end-to-end testbench does), so nested requests wait.

## Drawing without a frame buffer

Nothing stores the picture. For every Game Boy dot the pixel unit walks the tables in VRAM and OAM and produces the colour shortly before the monitor needs it. It reads memory **sequentially**, one read per 100 MHz clock, rather than with many parallel ports.

### The time budget

The monitor runs 640x480 at 25 MHz, which is 4 system clocks per monitor pixel. Each Game Boy dot is drawn as a 3x3 block, so the 160x144 screen becomes 480x432, centred with a black border (`HOFF` = 80, `VOFF` = 24).

One dot therefore lasts 3 monitor pixels, which is **12 clocks**. The pixel unit needs:

| Case | Clocks |
|---|---|
| Background only | 7 |
| Background plus a sprite | 10 |

Six of those clocks are memory reads:

- map code
- attributes
- 2 background tile bytes
- 2 sprite tile bytes

Each of the 3 rows of a dot block recomputes the dot. That costs nothing, because the unit is otherwise idle, and it saves a line buffer.

`gbc_display` keeps the schedule:

- It requests dot *k* when the raster reaches the block of dot *k-1*.
- It latches the answer and shows it from the start of dot *k*'s block.
- Its output `late` pulses if an answer is missing. The end-to-end test checks that this never happens in a whole frame.

### Steps for one dot (`gbc_ppu`)

1. **Map position.** `(mx, my) = (gx + SCX, gy + SCY)` mod 256. The map entry is at `1800h` or `1C00h` (LCDC bit 3) `+ 32*(my/8) + mx/8`. The tile code is in VRAM bank 0 and the attribute byte at the same offset in bank 1.

2. **Tile dot (`gbc_tile_pixel`).** This shared unit turns (code, attribute, row, column) into two reads of the tile's row bytes and returns the 2-bit colour number. It applies:
   - the vertical and horizontal flips
   - the character bank (attribute bit 3)
   - 8x16 sprites
   - the two tile-data addressing modes of LCDC bit 4: unsigned from 8000h, or signed around 9000h

   Background and sprite use it one after the other.

3. **Sprite.** `gbc_sprite_select` holds the sprites of the current line. Up to 10 are kept, the first 10 in OAM order that cover the line. It reports the lowest-index one that covers column `mx`.
   - A sprite's X/Y are positions in the 256x256 background map, offset by 8 and 16. Sprites therefore scroll with the background. This follows the original design; it is not what the original console does.

4. **Priority (`gbc_pixel_mix`).** Colour 0 is transparent on either layer. When both layers are opaque:
   - the background wins if its attribute bit 7 is set;
   - otherwise the sprite's attribute bit 7 decides.

   When LCDC bit 0 is clear the background loses every contest.

5. **Colour.** The 3-bit palette number from the attribute, with the colour number, indexes the BG or OBJ palette memory. These are 64 bytes each, reached through BCPS/BCPD and OCPS/OCPD with auto-increment. The memory returns `{H, L}` as 15-bit RGB: red in L[4:0], green in {H[1:0], L[7:5]}, blue in H[6:2].

With LCDC bit 7 clear the screen is white.

### Ten sprites per line

`gbc_sprite_select` has a *current* and a *next* buffer.

- At the start of each monitor line in the picture, `gbc_display` pulses `scan_start` with the Game Boy row of the line that follows.
- The selector then reads OAM one entry per clock through a two-stage pipeline: entry fetch, then the Y test and append. The 40 entries take 41 clocks out of the 3200 in a line.
- The 11th and later covering sprites are dropped (`dropped` pulses).
- At the horizontal blank `swap` makes *next* the *current* buffer.

Each Game Boy row is shown on three monitor lines. The scan is simply repeated, so the buffers are always for the row being drawn.

### DVI output

`gbc_vga_sync` makes the 640x480 raster: 800x525 totals, VESA porches, active-high sync. `gbc_chrontel_out` sends each 24-bit pixel to the DVI transmitter as two 12-bit halves, `{G[3:0], B}` then `{R, G[7:4]}`, one per XCLK edge. XCLK and its complement are generated from the 4-clock pixel phase. The 5-bit channels widen to 8 bits by repeating their top bits.

## LCD status, timer, pad and cartridge

**LCD status (`gbc_lcd_timing`).**
- It counts 456 dots per line and 154 lines. The mode runs 2 (80 dots), 3 (172), 0, and is 1 on lines 144-153 or while the LCD is off.
- It raises V-Blank at line 144. The STAT request comes on the rising edge of the enabled conditions: LY=LYC, mode 2, mode 1, mode 0.
- These registers keep the console's timing for software. The picture itself follows the monitor's raster.

**Timer (`gbc_timer`).**
- DIV is the top byte of a 16-bit prescaler counted on the dot enable.
- TIMA counts at the TAC-selected rate (4096, 262144, 65536 or 16384 Hz).
- On overflow it reloads from TMA and requests the timer interrupt.

**Pad.**
- `gbc_snes_ctrl` polls the SNES pad every 16.67 ms.
- A poll is a 12 µs latch pulse, then a 6 µs gap, then 16 falling clock edges 12 µs apart, sampling the data line at each one.
- `gbc_joypad` maps the SNES word to FF00:
  - buttons: A = SNES A, B = SNES B, Select, Start
  - directions: the four directions
- In FF00, bit 5 **set** selects the buttons and bit 4 **set** selects the directions. This is the reverse of the original console and follows the original design. Software written for the console expects 0 to select.

**Cartridge (`gbc_cart_if`).**
- It drives the 16 address pins and the data pins (with an output enable, `cart_doe`).
- RD or WR is low for the strobe. RD and WR are never low together.
- CS is low for A000-BFFF.
- A bank switch is an ordinary write to 2000-3FFF. The cartridge's own controller does the rest.

## Differences from the console and what is not here

Not built:
- **CPU.** It is an external core. The top brings out its bus, `cpu_stall`, `cpu_nmi` and `cpu_ime`.
- **Sound.** The sound registers are only stored. There is no sound generation and no AC'97 link.
- **Window layer.** LCDC bits 5 and 6 are ignored.
- **H-Blank VRAM DMA.** Bit 7 of FF55 is ignored and every transfer runs in general-purpose mode.
- **Double-speed mode.** There is no speed switch; the dot enable always runs at about 4.17 MHz.
- **DMG-compatibility palettes.**
- **Serial and joypad interrupt sources.** Their IF/IE bits exist, but nothing sets them.
- **The transmitter's I²C set-up.**

Behaviour that differs:
- **Mode 2/3 access restrictions** are not enforced. The pixel unit has its own ports, so the CPU may touch VRAM, OAM and palettes at any time.
- **LY and the picture are not in lock-step.** The picture is drawn from live VRAM on the monitor's raster, at about 60 Hz, while LY, counted from the 4.17 MHz dot enable, runs at about 59.3 Hz. Changes to scroll or palettes in the middle of a frame do not land on the line a program intended.
- **Timer overflow.** The timer interrupt comes when TIMA wraps past FF, not when it reaches FF.
- **Echo and unusable areas.** E000-FDFF mirrors C000-DDFF, and FEA0-FEFF reads FF.

Reset values: LCDC resets to 91h. Everything else resets to 0, and VBK to bank 0.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` at the end and stops itself with a watchdog. Behavioural models used by the testbenches:

- `tb_cart_model`: a cartridge with computed ROM contents, a bank register and 8 KB of RAM
- `tb_snes_pad`: the pad's shift register
- `tb_bus_mem`: a bus slave with random latency

With Verilator 5, from the folder that holds `rtl/` and `tb/` (the library paths let Verilator find each module in the file of its name):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/gbc_pkg.sv tb/tb_gbc_top.sv --top-module tb_gbc_top
./obj_dir/Vtb_gbc_top
```

Any other testbench runs the same way with its name in place of `tb_gbc_top`. `-Wno-fatal` only keeps width warnings in the testbenches' reference arithmetic from stopping the build.

### The end-to-end testbench

`tb_gbc_top` runs the whole system at its default parameters, over 9 million clocks of simulated time (several frames), in under fifteen seconds of Verilator run time. It plays the CPU on the bus and acts as a program would:

- loads tile data, a background map and its attributes from cartridge ROM into both VRAM banks with the VRAM DMA, with the CPU halted
- fills both palettes with auto-increment
- builds 40 sprites in WRAM, with 14 on one line, and moves them to OAM with the OAM DMA, checking the HRAM-only rule on the way
- switches VRAM, WRAM and ROM banks
- scrolls the background
- takes V-Blank, LY=LYC and timer interrupts through the NMI and reads the substituted jump
- reads the pad through FF00

It then captures a complete frame from the DVI pins. All 23,040 dots are compared with a reference computed in the testbench from what was written. A second frame is checked the same way after the program switches to:

- the other background map (9C00)
- signed tile numbers (8800 mode)
- 8x16 sprites
- LCDC bit 0 clear
- scroll values that wrap around the map

 The testbench also counts every mechanism and fails if any never occurred:

- the CPU stall
- both DMAs
- NMI deliveries
- sprite dots shown
- sprite dots hidden by priority
- sprites dropped by the 10-per-line limit
- bank switches
- pad polls
- palette auto-increment
- no late dot

### Block testbenches

The block testbenches shorten the slow rates through parameters: microseconds per byte, microseconds per pad poll. Elsewhere they check exact cycle counts:

- the DMA rates
- the cartridge strobe and latency
- the pad's 12 µs / 6 µs / 12 µs timing
- the sync widths
- the pixel unit's 7/10-clock latency

## Parameters worth changing

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `gbc_top` | `DOT_DIV` | 24 | System clocks per console dot. Sets the LY/STAT and timer speed. |
| `gbc_top` | `OAM_BYTE_CYCLES` | 100 | Clocks per OAM DMA byte. |
| `gbc_top` | `HDMA_BYTE_CYCLES` | 50 | Clocks per VRAM DMA byte. |
| `gbc_top` | `CART_CYCLES` | 20 | Cartridge strobe length. Raise it for slow cartridges. |
| `gbc_top` | `SNES_US_CYCLES`, `SNES_IDLE_US` | 100, 16670 | Pad timing. |
| `gbc_display` | `SCALE`, `HOFF`, `VOFF` | 3, 80, 24 | Picture size and position. `SCALE` must leave the pixel unit at least 10 clocks per dot, that is `4*SCALE >= 10`. |
| `gbc_sprite_select` | `NUM_SPRITES`, `MAX_PER_LINE` | 40, 10 | OAM size and the per-line limit. |
