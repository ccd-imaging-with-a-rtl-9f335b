// camera_interface_board: the digital logic between a TMS34010 board and a
// TC211 CCD camera.
//
// The GSP's own screen refresh machinery is reused as the camera's timing
// generator.  Its shift clock SCLK is divided by four into PIXclk1/PIXclk2;
// PIXclk1' (gated by DUDATE and BLANK') clocks pixels out of the CCD,
// PIXclk2 clocks the A/D converter, and each fall of PIXclk2 moves one 4-bit
// A/D sample into the data formatter, under control of a 2-bit Gray code
// counter.  Every fourth sample completes a 16-bit packed word, which
// SHIFTclk strobes into the VRAM serial inputs.  HSYNC' moves the next CCD
// line into the sensor's serial register, and the GSP's per-line
// memory-to-shift-register transfer is turned into a shift-register-to-
// memory transfer by the board's own VRAM write strobe.  The display update
// direction latch DUDATE, set and reset by GSP accesses, chooses between
// that acquisition path and normal screen refresh.
//
// Clocks: lclk (GSP local clock) for the latch; sclk for the pixel path,
// which uses clock enables derived from the divider.  The VRAM shift clock,
// write strobe and CCD clocks are combinational outputs.  reset is the board
// RESET, active high.  The block structure follows the document's block
// diagram of the board.
module camera_interface_board
  import cib_pkg::*;
(
  input  logic    reset,
  input  logic    lclk,
  // GSP local bus
  input  logic    uartcs_n,
  input  logic    la20,
  input  logic    la13,
  input  logic    la12,
  input  logic    lclk2,
  input  logic    cas_n,
  input  logic    trqe_n,
  input  logic    w_n,
  // GSP video timing
  input  logic    sclk,
  input  logic    hsync_n,
  input  logic    blank_n,
  // A/D converter
  input  nibble_t ad_d,
  output logic    ad_clk,     // PIXclk2, conversion clock
  // CCD clocks
  output logic    srg,
  output logic    iag,
  output logic    abg,
  // VRAM bank
  output word_t   vram_sin,
  output logic    vram_sc,
  output logic    vram_w_n,
  // status
  output logic    dudate,
  output logic    dumpclk,
  output logic    shift_clk
);

  logic       antibmck, du_set, du_reset;
  logic       pixclk1, pixclk2, pix2_fall;
  logic [3:0] load;

  cib_addr_decoder u_dec (
    .uartcs_n, .la20, .la13, .la12,
    .dumpclk, .antibmck, .du_reset, .du_set
  );

  dudate_latch u_latch (
    .clk(lclk), .reset, .du_set, .du_reset, .dudate
  );

  pixclk_divider u_div (
    .sclk, .reset, .pixclk1, .pixclk2, .pix2_fall
  );

  gray_counter u_gray (
    .sclk, .reset, .adv(pix2_fall), .pixclk2,
    .state(), .load, .shift_clk
  );

  data_formatter u_fmt (
    .sclk, .reset, .adv(pix2_fall), .load, .ad_d, .sin(vram_sin)
  );

  write_signal_generator u_wgen (
    .cas_n, .trqe_n, .lclk2, .w_n, .dudate, .write_n(), .bw_n(vram_w_n)
  );

  shift_clock_mux u_scmux (
    .sclk, .shift_clk, .dudate, .vram_sc
  );

  ccd_clock_gen u_ccd (
    .pixclk1, .dudate, .blank_n, .hsync_n, .dumpclk, .antibmck,
    .srg, .iag, .abg
  );

  assign ad_clk = pixclk2;

endmodule
