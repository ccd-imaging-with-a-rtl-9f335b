// imaging_system_top: CCD image capture and display around a TMS34010.
//
// The TMS34010 graphics processor (GSP) already produces everything a
// raster display needs: sync and blank, a VRAM shift clock, and one
// memory-to-shift-register transfer per line.  This design reuses those
// same signals to read a TC211 CCD sensor (165 lines of 210 pixels) into
// the VRAM frame buffer, so the imaging system needs only a small amount of
// glue logic beside the processor board:
//   * sdb_bus_decode_pal    - the processor board's local bus decode PAL;
//                             its USART select also selects the camera
//                             board's registers
//   * camera_interface_board- CCD clocks, A/D clock, pixel packing,
//                             VRAM shift clock and write strobe, and the
//                             display update direction latch DUDATE
//   * vram_output_mux,
//     color_palette         - the display path from the VRAM serial port
//                             to 12-bit colour
// The GSP, VRAMs, A/D converter and CCD are outside; their pins are this
// module's ports.  Capture: software sets DUDATE by an access to 0210 3000h
// and runs the video timing with one line per CCD line; each line the CCD
// pixels are digitised, packed four to a 16-bit word and shifted into the
// VRAM, and the GSP's line transfer writes the word row into memory.
// Display: DUDATE is reset (0210 2000h), the VRAM is shifted out by SCLK and
// the 4-bit pixels go through the multiplexers and palette to the monitor.
// Clocks: lclk1 (GSP local clock, DUDATE latch), sclk (pixel path),
// dotclk (palette).  reset is active high and asynchronous.
module imaging_system_top
  import cib_pkg::*;
(
  input  logic       reset,
  // GSP local bus
  input  logic       lclk1,
  input  logic       lclk2,
  input  logic       refcyc_n,
  input  logic       xfcyc_n,
  input  logic       rasl,
  input  logic       cas_n,
  input  logic       lal,
  input  logic       trqe_n,
  input  logic       w_n,
  input  logic       la26,
  input  logic       la25,
  input  logic       la21,
  input  logic       la20,
  input  logic       la13,
  input  logic       la12,
  // bus decode PAL outputs to the processor board
  output logic       ramoe_n,
  output logic       ramen,
  output logic       ramoff,
  output logic       mrcab_n,
  output logic       uartcs_n,
  output logic       romcs_n,
  output logic       dmras0_n,
  output logic       dmras1_n,
  output logic       lmras_n,
  output logic       flgclk_n,
  // GSP video timing
  input  logic       sclk,
  input  logic       vclk,
  input  logic       dotclk,
  input  logic       hsync_n,
  input  logic       blank_n,
  // CCD camera and A/D converter
  output logic       srg,
  output logic       iag,
  output logic       abg,
  output logic       ad_clk,
  input  logic [3:0] ad_d,
  // VRAM bank
  output logic [15:0] vram_sin,
  output logic       vram_sc,
  output logic       vram_w_n,
  input  logic [15:0] vram_sout,
  // palette colour registers and output
  input  logic       pal_we,
  input  logic [3:0] pal_waddr,
  input  logic [11:0] pal_wdata,
  output logic [11:0] rgb,
  // status
  output logic       dudate,
  output logic       dumpclk,
  output logic       shift_clk
);

  nibble_t da, db;
  logic    pal_phase;

  sdb_bus_decode_pal u_pal (
    .reset, .lclk2, .refcyc_n, .xfcyc_n, .rasl, .lal, .trqe_n,
    .la26, .la25, .la21, .la20,
    .ramoe_n, .ramen, .ramoff, .mrcab_n, .uartcs_n, .romcs_n,
    .dmras0_n, .dmras1_n, .lmras_n, .flgclk_n
  );

  camera_interface_board u_cib (
    .reset, .lclk(lclk1),
    .uartcs_n, .la20, .la13, .la12, .lclk2, .cas_n, .trqe_n, .w_n,
    .sclk, .hsync_n, .blank_n,
    .ad_d, .ad_clk,
    .srg, .iag, .abg,
    .vram_sin, .vram_sc, .vram_w_n,
    .dudate, .dumpclk, .shift_clk
  );

  vram_output_mux u_omux (
    .sb(vram_sout), .vclk, .da, .db
  );

  color_palette u_clut (
    .dotclk, .reset, .da, .db,
    .we(pal_we), .waddr(pal_waddr), .wdata(pal_wdata),
    .rgb, .phase(pal_phase)
  );

  // pal_phase is only an observation point of the palette.
  logic unused_phase;
  assign unused_phase = pal_phase;

endmodule
