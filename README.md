# DRM65 system logic: a 6502 computer with VGA video and a paging MMU

DRM65 is the glue logic of a small 6502 computer built in an iCE40-class FPGA.
A 6502 core runs at the 25 MHz pixel clock next to a 64K x 16 external
asynchronous SRAM, an 8 KB internal boot RAM, a VGA video generator and a
handful of peripherals. Two ideas shape the design:

* **One memory for the CPU and the video.** The video generator reads its
  frame buffer from the same SRAM as the CPU. It does not share by
  interleaving. It takes one clock cycle out of every 16 (1 bpp mode) or
  every 8 (4 bpp mode), and only in the displayed part of the screen. In that
  cycle the CPU is paused, but only if it also wants the SRAM.
* **A tiny MMU.** The 64 KB CPU space is cut into eight 8 KB pages. Each of
  the lower seven pages can hold any of the sixteen 8 KB blocks of the 128 KB
  SRAM. A 4-bit page register picks the block.

This repository holds synthesizable SystemVerilog for all of the FPGA logic
except the 6502 core. The core's bus is brought out of the top module
`drm65_top`. Any core with synchronous memory timing and a clock enable
can be attached. The core is expected to present an address in cycle N and
take the read data in cycle N+1. Arlet Ottens' core is the usual choice.

## Memory map

| CPU address   | Goes to                                                      |
|---------------|--------------------------------------------------------------|
| `$0000-$DFFF` | external SRAM, through PAGE0..PAGE6 (one per 8 KB page)      |
| `$E000-$E00F` | I/O registers                                                |
| `$E010-$FFFF` | internal boot RAM, 8 KB block with the reset vector at `$FFFC` |

The boot RAM is writable, so a debugger can plant breakpoints in it. Its
bitstream contents come from the optional `INIT_FILE` parameter of
`boot_ram`. No boot program is included.

The physical SRAM byte address is `{PAGEn[3:0], A12..A0}` (17 bits). Even
bytes sit in the low half of a 16-bit SRAM word (BLE) and odd bytes in the
high half (BHE). After reset the pages map one-to-one (PAGEn = n). A
multitasking kernel could, for example, give each task its own page 0, and
with it its own zero page and stack.

## CPU bus timing and the data-in register

The 6502 core expects synchronous memory. The boot RAM is synchronous. The
SRAM and the I/O registers are not. So `cpu_data_mux` captures their read
data in a register at the end of the access cycle. It also delays the mux
select ("boot RAM or register") by one cycle. `cpu_din` is therefore always
valid in the cycle after the address. It is fed by either the RAM output or
that register.

Every register on the CPU side advances only on clock edges with `cpu_ce`
high. This covers the boot RAM, the data register and select, the register
writes and the read side effects. When `cpu_ce` is low the core must hold
its state and repeat its cycle. The core's RDY input is not used.

## Sharing the SRAM: cycle stealing

`video_addr_gen` raises `fetch` at HC[3:0]=0 (1 bpp) or HC[2:0]=0 (4 bpp)
while the display window is active. In that cycle `ext_mem_if`:

* drives the video word address and enables both byte lanes;
* lowers `cpu_ce` if the decoder says the CPU is addressing the SRAM;
* leaves `cpu_ce` high if the CPU is in the boot RAM or the I/O space, so
  both run in parallel.

`cpu_ce` depends combinationally on `cpu_addr`. The core's address output
must therefore not depend on its own clock enable in the same cycle. A core
whose address comes from its registers and registered input data meets this.

The cost is 32 (1 bpp) or 64 (4 bpp) stolen cycles per displayed line. There
are 400 displayed lines out of 525, and 800 clocks per line:

| mode              | stolen per frame | average CPU clock |
|-------------------|------------------|-------------------|
| 512x400, 1 bpp    | 12 800 of 420 000 | 24.24 MHz        |
| 256x200, 4 bpp    | 25 600 of 420 000 | 23.48 MHz        |

The CPU runs at the full 25 MHz in the borders and during retrace. The
end-to-end testbench measures exactly these stall counts.

CPU accesses are always 8 bits wide. A write drives the byte on both halves
of the data bus and enables only its own lane. `sram_we_n` is low only in
the clock-low half of a CPU write cycle, so the address is stable before the
strobe falls and after it rises. On the FPGA this maps to a DDR output
register of the WE pin. The bidirectional data pins are given as
`sram_dq_o` / `sram_dq_oe` / `sram_dq_i`. Connect them to the pad cell
(SB_IO) or to a tristate buffer.

## Video generator

The raster is standard 640x480 @ 60 Hz: 800 clocks x 525 lines at 25 MHz.
The picture is a centred 512x400 window, because a power-of-two width turns
the frame-buffer address into a plain concatenation of counter bits.
`video_timing` counts from the first visible pixel (HC = VC = 0):

| HC        | meaning               | VC        | meaning               |
|-----------|-----------------------|-----------|-----------------------|
| 0-511     | pixels (DV)           | 0-399     | lines (DV)            |
| 512-575   | right border          | 400-439   | bottom border         |
| 576-591   | front porch (BLK)     | 440-449   | front porch (BLK)     |
| 592-687   | HSYNC low (BLK)       | 450-451   | VSYNC low (BLK)       |
| 688-735   | back porch (BLK)      | 452-484   | back porch (BLK)      |
| 736-799   | left border           | 485-524   | top border            |

Both syncs are active low. The border takes a palette entry chosen by the
BORDER register, and retrace is forced to black.

**Addresses.** The word address (VA16..VA1, with VA16 = VA15 = 0) is:

* 1 bpp: `{VC[8:0], HC[8:4]}`.
* 4 bpp: `{VC[8:1], HC[8:3]}`. Dropping VC[0] shows each line twice.

Both modes use 12.5 K words (25 KB, bytes `$0000-$63FF` of the SRAM).

**Shifter.** `video_shifter` has sixteen flip-flops arranged as four 4-bit
shift registers, wired according to the mode. Words are loaded in
mixed-endian order: low byte first, MSB first.

* In 1 bpp mode the four registers form one 16-bit chain that shifts every
  clock. A pixel selects palette entry 0 or 15.
* In 4 bpp mode each register holds one bit plane of the word's four pixels,
  with the high nibble of the low byte first. The registers shift only on
  even clocks, so each pixel lasts two clocks.

**Palette.** `video_palette` is a 16 x 12-bit RAM with separate read and
write ports. Its index is the pixel inside the window, or the BORDER entry
outside it. Its registered output is blanked during retrace.

**Pipeline.** The pipeline runs counters → shifter → palette RAM. The colour
of position HC=k leaves the chip at k+2. DV, BLK and both sync pins are
delayed by two clocks to match.

## I/O registers (`$E000-$E00F`)

| addr  | write                                        | read                                          |
|-------|----------------------------------------------|-----------------------------------------------|
| $E000 | UTXD: queue a byte                           | URXD: last byte (clears DV, OV)               |
| $E001 | BORDER[3:0]                                  | USTAT: THRE DV FTXI FRXI 0 TEND OV FE         |
| $E002 | CTRL1: CHSI CVSI CDLI SDLI EHSI EVSI ETXI ERXI | STAT1: FHSI FVSI HSYN VSYN EHSI EVSI ETXI ERXI |
| $E003 | CTRL2: bit1 EKBI, bit0 VMOD                  | STAT2: FKBI KBDV 0 0 0 0 EKBI VMOD            |
| $E004 | PINOUT (MOSI SCK /SS0 /SS1, 4 spare)         | PINOUT                                        |
| $E005 | PAL0: {green, red} into a holding register   | PININ: MISO J6..J0                            |
| $E006 | PAL1: {index, blue}, writes the palette entry | 0                                            |
| $E007 | PWM level                                    | KBD scan code (read sets it to $FF)           |
| $E008-$E00E | PAGE0..PAGE6 (4 bits)                  | PAGE0..PAGE6                                  |

CTRL1 bits 7:4 are strobes and are not stored. To set a palette entry, write
PAL0 first and then PAL1.

### Interrupts (`irq_ctrl`)

`cpu_irq` is active high. It is the OR of these sources:

* FRXI: DV and ERXI are both set.
* FTXI: THRE and ETXI are both set.
* FKBI: KBDV and EKBI are both set.
* FVSI: a falling VSYNC edge while EVSI is set. It stays until written with CVSI.
* FHSI: a falling HSYNC edge while EHSI is set. It stays until written with CHSI.
* The delayed interrupt. It fires exactly 23 CPU cycles (clock enables) after
  the CTRL1 write that sets SDLI, and stays until CDLI. A debugger uses it to
  single-step: it arms SDLI and returns to the user code, and the interrupt
  comes back after one instruction.

### UART (`uart`)

The UART sends and receives 8N1 at `DIVISOR` clocks per bit. The default is
217, which gives 115 207 bps at 25 MHz. Transmit and receive each have a
one-byte holding register in front of the shift register:

* THRE means another byte may be written.
* TEND means the line is idle.
* DV means a byte is waiting.
* OV means a byte arrived while DV was still set. The new byte wins.
* FE means the stop bit of the last byte was low.

A write while THRE is low is lost. The receiver finds the start edge after a
two-flop synchronizer and samples each bit in its middle.

### PS2 keyboard (`ps2_kbd`)

The receiver is an 11-bit shift register. It starts at all ones and shifts
the data line in on each falling edge of the keyboard clock. When the start
bit (a 0) reaches the eleventh stage, a scan code is complete. KBDV then
rises and shifting stops. Reading KBD returns the code and sets the register
back to all ones. Parity is not checked.

The keyboard clock is slow, has slow edges and is asynchronous. It is
therefore not edge-detected directly. A "deglitcher" flip-flop samples it
only on the rising edges of HC[4], which come every 32 clocks (1.28 µs). The
edge is taken from that sampled copy. The 10-16 kHz keyboard clock is easily
resolved at that rate, and ringing shorter than the sampling period is
ignored.

The 5 V lines reach the 3.3 V pins through series diodes and the pins' pull-ups.
That network is not part of the RTL.

### PWM audio (`pwm_audio`)

The output rises at each HSYNC falling edge (HC=592). It falls when HC equals
2 x PWM. So the high time is 208 + 2 x level clocks of the 800-clock line:
31.25 kHz, 26 % to 90 % duty. Change the level within the 208 clocks after
the HSYNC edge to avoid a glitch.

## Module hierarchy

```
drm65_top
├── addr_decoder      I/O / boot RAM / SRAM select
├── mmu               page registers → 17-bit physical address
├── boot_ram          8 KB synchronous RAM
├── ext_mem_if        SRAM pins, byte lanes, video/CPU arbitration
├── cpu_data_mux      data-in register and delayed select
├── io_regs           register file at $E000-$E00F
│   ├── uart
│   ├── ps2_kbd
│   ├── pwm_audio
│   └── irq_ctrl
└── video_gen
    ├── video_timing
    ├── video_addr_gen
    ├── video_shifter
    └── video_palette
```

`drm65_pkg` holds the register offsets, the raster numbers and the palette
colour type. `drm65_top` has one parameter, `DIVISOR`.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and ends with `$finish`. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_drm65_top rtl/drm65_pkg.sv tb/tb_drm65_top.sv
./obj_dir/Vtb_drm65_top
```

`tb_drm65_top` runs the whole system at its default parameters, in about five
video frames:

* It attaches a 6502 bus model and the SRAM model `tb/sram_64kx16.sv`.
* It loops the UART back and uses a keyboard model.
* It checks every VGA pixel and sync against a reference built from the SRAM
  contents.
* It tests the boot RAM, byte lanes and MMU remapping.
* It runs a full 1 bpp and a full 4 bpp frame with the CPU on the SRAM every
  cycle. The stall counts must be 12 800 and 25 600.
* It runs CPU work in the boot RAM while the video fetches (no stalls).
* It raises the VSYNC, HSYNC, delayed, UART and keyboard interrupts.
* It checks the PWM high time.

It counts each of these mechanisms and fails if one never happened.
Between accesses the bus model rests on a boot RAM read, which has no side
effects.

`tb_ps2_kbd` also sends frames whose clock rings after every edge: there is
a short pulse of the opposite level between two HC[4] samples. The frames
must still decode. The ringing makes a receiver without the deglitcher fail.
`tb_uart` uses a smaller divisor to keep the run short.

## Choices made in this RTL

These points are not fixed by the original description of the system, so this RTL picks:

* **Raster phase.** The counters start at the first visible pixel. The
  borders split evenly: 64 pixels left and right, 40 lines top and bottom.
  The porches and syncs are the VESA ones. The 26 % PWM minimum and the
  208-clock window after HSYNC both follow from this placement.
* **Fetch phase.** Fetches happen at HC[3:0]=0 or HC[2:0]=0. The first pixel
  of a word is shown one clock after its fetch.
* **Sync pins.** They are delayed two clocks to stay aligned with the colour.
  The sync bits in STAT1, the interrupts and the PWM use the undelayed signals.
* **SRAM write strobe.** It is low in the second half of the write cycle.
* **Reset values.** Page registers map one-to-one. PINOUT is `$30`, so both
  SPI selects are high. Everything else is zero, and the palette starts
  black.
* **UART details.** DV and OV clear on reading URXD. FE tracks the last
  frame. A write to a full transmitter is dropped.
* **Keyboard register.** It stops shifting while it holds a code. Its data
  line is synchronized with two flops.
* **Palette size.** The palette is 16 x 12 bits. On the iCE40 it fills one
  256 x 16 block RAM anyway.
* **CPU pause.** It uses a clock enable, not a gated CPU clock.

Outside the RTL are the 6502 core itself, the PLL that makes 25 MHz from the
16 MHz oscillator, the SRAM chip, the resistor-ladder VGA DACs, the keyboard
level-shifting diodes and the SPI configuration flash.
