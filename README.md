# CCD capture through a graphics processor's video timing

A raster display controller already has everything needed to read a
frame-transfer CCD sensor. It produces a line-rate strobe, a pixel-rate
clock gated by blanking, and once per line a transfer between a row of
video RAM and the VRAM's serial shift register. This design puts a TC211
CCD (165 lines × 210 pixels) on a TMS34010 graphics board this way. The
processor's video timing is reprogrammed so that one video "line" is one
CCD line. The CCD clocks are taken from the sync, blank and shift-clock
signals. Digitised pixels are packed into 16-bit words and shifted *into*
the VRAM serial port. The processor's line-end transfer cycle is turned
around, so it writes the serial register into memory instead of loading it
from memory. The processor never touches a pixel during capture; the frame
lands in the frame buffer at video rate. Afterwards the same VRAM is shown
on a monitor through the normal display path.

The RTL covers the digital glue that makes this work:

| Module | Role |
|---|---|
| `imaging_system_top` | Wires the whole system; the processor, VRAMs, A/D converter and sensor connect to its ports |
| `camera_interface_board` | All logic of the camera board (the next seven rows) |
| `cib_addr_decoder` | Turns accesses to four addresses into control strobes |
| `dudate_latch` | The mode bit DUDATE: 1 = capture into VRAM, 0 = display from VRAM |
| `pixclk_divider` | Divides SCLK by 4 into two pixel-clock phases |
| `gray_counter` | Counts the 4 nibbles of a word and makes the word strobe SHIFTclk |
| `data_formatter` | Packs four 4-bit samples into a 16-bit word |
| `ccd_clock_gen` | Makes the CCD clocks SRG, IAG and ABG |
| `write_signal_generator` | Makes the VRAM write strobe for capture and selects it over the processor's own |
| `shift_clock_mux` | Selects the VRAM shift clock: SCLK for display, SHIFTclk for capture |
| `sdb_bus_decode_pal` | The processor board's local-bus decode PAL (memory and I/O selects) |
| `vram_output_mux` | Two 4-bit 2:1 multiplexers between the VRAM serial outputs and the palette |
| `color_palette` | 16 × 12-bit colour lookup, two pixels per multiplexer phase |
| `cib_pkg` | Shared widths, the Gray code and address-slot enums |

Outside the RTL, and modelled only for simulation in `tb/`, are the
TMS34010 video timing (`gsp_video_model`), a VRAM serial port with both
transfer directions (`vram_bank_model`), and the sensor together with its
flash A/D converter (`tc211_adc_model`). Analog parts (clock level shifters,
the video amplifier, the palette DACs) are not modelled.

## The two modes and the DUDATE latch

The board has one state bit, DUDATE ("display update direction"). With
DUDATE = 0 the board is transparent: the VRAMs see the processor's own
shift clock and write strobe, and the display works normally. With
DUDATE = 1:

* the VRAM shift clock comes from the camera board (one edge per packed word);
* the VRAM write strobe comes from the camera board, so the processor's
  line transfer becomes a register-to-memory write;
* the sensor's serial-register clock SRG runs.

The camera board has no chip select of its own. It reuses the USART select
from the bus decode PAL, together with address lines LA20, LA13 and LA12.
Any access inside the window decodes as:

| Address | LA13 LA12 | Strobe | Effect |
|---|---|---|---|
| `0210 0000h` | 0 0 | DUMPclk | One IAG pulse: shifts the whole image area one line (used to clear the sensor) |
| `0210 1000h` | 0 1 | ANTIBMck | One antiblooming pulse on ABG |
| `0210 2000h` | 1 0 | reset | DUDATE ← 0 (display) |
| `0210 3000h` | 1 1 | set | DUDATE ← 1 (capture) |

These accesses also reach the USART's write registers. That is harmless as
long as the serial port is not in use. LA21 is not decoded, so the window
aliases at `0230 xxxxh`. Board reset clears DUDATE, and a reset access wins
over a set access.

## Capture timing on the camera board

This is the part that needs care. During capture the video timing is
programmed for 849 video clocks per line (HTOTAL = 848) and 170 lines per frame. SCLK, the
processor's VRAM shift clock, runs only outside horizontal blanking. The
board's pixel logic runs entirely from SCLK:

```
SCLK      _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
PIXclk1   ‾‾‾‾|_______|‾‾‾‾‾‾‾|_______|‾‾‾‾‾      SCLK/4
PIXclk2   __|‾‾‾‾‾‾‾|_______|‾‾‾‾‾‾‾|_______      one SCLK behind PIXclk1
SRG       ____|‾‾‾‾‾‾‾|_______|‾‾‾‾‾‾‾|_____      = ~PIXclk1 & DUDATE & BLANK'
A/D clock = PIXclk2; a sample is taken while PIXclk2 is high
```

* **Pixel clocks.** A 2-bit Johnson counter gives PIXclk1 and PIXclk2, both
  at SCLK/4, with PIXclk2 one SCLK behind. One sensor pixel takes four SCLKs.
* **Sensor clock.** SRG is PIXclk1 inverted, gated by DUDATE and by
  BLANK'. Each SRG pulse moves the next pixel to the sensor's output. The
  A/D converter is clocked by PIXclk2, so it converts after the pixel has
  settled.
* **Nibble counter.** On each falling edge of PIXclk2 a 2-bit Gray counter
  moves through {Q1,Q0} = 10 → 00 → 01 → 11. The state selects which of the
  four 4-bit registers of the data formatter takes the current A/D value.
  The first sample goes to bits 3:0 and the fourth to bits 15:12. This is
  the packed 4-bit pixel layout the display reads back.
* **Word strobe.** When the fourth nibble is loaded, a word-complete flag
  is set. `SHIFTclk = flag & PIXclk2`, so SHIFTclk rises with the next rising
  edge of PIXclk2, two SCLKs later, while the finished word is stable on
  the VRAM serial inputs. The rising
  edge shifts it in. A 210-pixel line gives about 52 words, far below the
  256-word serial register.
* **Line clock.** IAG, which moves the whole image area down one line into
  the sensor's serial register, is `HSYNC' & ~DUMPclk`. Its rising edge at
  the end of each horizontal sync advances the sensor by one line, in step
  with the video line. A DUMPclk access produces an extra IAG pulse at any
  time, which the software uses to flush the sensor before exposure.
* **Row write.** At the start of horizontal blanking the processor performs
  its transfer cycle (TR'/QE' low at RAS fall). With DUDATE set, the VRAM
  write input is not the processor's W' but `WRITE' = ~(CAS' & ~TR'/QE' & LCLK2)`.
  This strobe is low during the transfer, so the VRAM stores its serial
  register into the addressed row. The processor addresses one row per
  line, so CCD line *n* ends up in VRAM row *n*.

All of this is written as a single clock domain on SCLK with clock enables
(`pix2_fall`, the cycle in which PIXclk2 falls). The board itself clocks
flip-flops from the derived PIXclk2'. The edge order is the same.

### Behaviour to know about

* The nibble counter is not cleared at line ends. A line whose sample count
  is not a multiple of four leaves a part-filled word, and the next line's
  first samples complete it. With the timing above, 838 SCLKs per active
  line give 209 or 210 samples, so words can straddle lines. Each line's
  transfer writes whatever complete words were shifted in during that line.
* With vertical end-of-blank at line 2, SRG is off during video lines 0
  and 1, but IAG still advances the sensor. Sensor lines 0 and 1 are
  therefore lost. The end-to-end simulation stores sensor lines 2..164 in
  VRAM rows 2..164. Moving the end of vertical blanking to 0 would avoid
  this.
* SRG starts with the first active SCLK of a line, so the first A/D
  sample of a line can be taken before the first new pixel reaches the
  sensor output. Such a leading sample is stored in front of the line's
  pixels (the end-to-end test allows one).

## Local bus decode PAL

`sdb_bus_decode_pal` is the processor board's address decoder, rewritten
as SystemVerilog equations. It uses LA26, LA25, LA21 and LA20 with the
bus status signals to generate:

* the DRAM row strobes DMRAS0'/DMRAS1';
* the VRAM row strobe LMRAS';
* the USART select UARTCS';
* the ROM select ROMCS';
* a flag clock;
* RAMOE';
* the column-address steering MRCAB';
* the RAMEN/RAMOFF pair.

During a refresh cycle every row strobe is forced active and no select is
given. Two outputs are held in the PAL by feedback: MRCAB' is set
by its address/clock terms and held until LAL releases it, and RAMEN is
switched off by an access to one address range (LA26 high, LA25 low, LA21
low, LA20 high) and back on by reset. They are written as `always_latch` on
purpose, and synthesis reports them as latches.

## Display path

The VRAM serial outputs SB15..SB0 carry four 4-bit pixels per word. Two
2:1 multiplexers, switched by VCLK (same rate as SCLK, two dot clocks per half), present pixels
0 and 1 (SB3..0, SB7..4) in one half and pixels 2 and 3 (SB11..8,
SB15..12) in the other half. These go to the palette inputs DA and DB. The
palette alternates between DA and DB on successive dot clocks. Each 4-bit
pixel selects one of 16 colour registers, each 12 bits wide (4 bits per
gun). The colour appears one dot clock later on `rgb`. The result is one
pixel per dot clock, from a VRAM shifted at a quarter of that rate.
Colour registers load through a plain write port (`pal_we`, `pal_waddr`,
`pal_wdata`) and have no reset. The analog outputs are not modelled.

## Where this RTL departs from the original board

* **Set address.** One description of the set address reads `0220 3000h`,
  which is the USART's own write range. The latch schematic, the decoder
  equations and the control software all use `0210 3000h`, with LA20.
  This design follows `0210 3000h`.
* **Antiblooming address.** The antiblooming pulse was originally given at
  `0210 0001h`. Bit 0 is not decoded on the board, so this design uses the
  free slot `0210 1000h`. In the original tests the ABG input was tied low.
* **IAG.** It is described as "DUMPclk or HSYNC'". This design reads that
  as an OR of active-low events, `HSYNC' & ~DUMPclk`, so that IAG rises
  when either ends.
* **Single-clock pixel logic.** See above. The DUDATE latch is sampled on
  the processor's local clock instead of being clocked by the decode
  output.
* **A/D bits.** Which four of the converter's six bits are used is not
  stated. The port takes four bits, and the simulation model supplies the
  top four.
* **Multiplexer phase.** Which multiplexer input (A or B) carries the low
  pixels is read from signal labels. It is chosen so that pixels reach the
  screen in packed order.
* **Timing.** No gate delays or set-up times are modelled. The original
  write-strobe path had a worst case of 17 ns.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/cib_pkg.sv rtl/*.sv tb/gsp_video_model.sv tb/vram_bank_model.sv \
  tb/tc211_adc_model.sv tb/tb_imaging_system_top.sv \
  --top-module tb_imaging_system_top -o sim
./obj_dir/sim
```

For a single block, swap in its testbench, for example
`tb/tb_gray_counter.sv --top-module tb_gray_counter`. The models are only
needed by `tb_camera_interface_board` and `tb_imaging_system_top`.

`tb_imaging_system_top` runs the full-size system with the top's default
configuration. The steps are:

1. Program the capture timing.
2. Flush the sensor with 166 DUMPclk accesses.
3. Issue antiblooming pulses.
4. Set DUDATE and read one frame.
5. Reset DUDATE, load the palette, switch to the monitor timing (704 × 480
   active) and display one frame.

It checks the following:

* Every sample comes from the right sensor line and column.
* Every VRAM word holds its four samples in order.
* Each line transfer writes exactly that line's words.
* Each displayed line shows its VRAM row through the palette.

It also counts each mechanism and fails if any never happened: DUDATE
set/reset, DUMPclk, IAG, SRG, ABG, SHIFTclk, both transfer directions, and
palette output. It takes a few seconds. `tb_camera_interface_board` runs
the same flow on an 8 × 24 sensor.

To change the design:

* Widths and the Gray sequence live in `rtl/cib_pkg.sv`.
* The address slots are in the `slot_t` enum.
* The capture frame geometry belongs to the video-timing values given to
  the processor (see the testbench), not to the RTL.
