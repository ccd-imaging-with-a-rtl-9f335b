// sdb_bus_decode_pal: local bus decode PAL (U11) of the TMS34010 board.
//
// Decodes the GSP local bus into DRAM/VRAM row strobes, ROM and USART
// selects and a shadow-RAM switch.  All outputs are active low and named as
// the PAL's pins (suffix _n), except ramen/ramoff whose level is the PAL's.
//   flgclk_n  low in a display transfer (XFCYC) cycle while RAS is low
//   lmras_n   RAS to the program DRAM: upper address space or refresh
//   dmras0/1  RAS to the two VRAM banks (LA20 picks the bank); all banks
//             during refresh and transfer cycles
//   uartcs_n  USART select, address 02xx xxxxh outside refresh; the camera
//             interface board decodes its own registers inside it
//   romcs_n   ROM select at the top of memory once shadow RAM is off
//   mrcab_n   column-address-bit steering, held while LAL is low
//   ramen     shadow RAM on after RESET, switched off by an access to the
//             shadow-RAM bit at 041x xxxxh; ramoff is its complement gated
//             by RESET
// refcyc_n and xfcyc_n are low in refresh and transfer cycles.  The
// equations are the document's; as in the PAL, mrcab_n and ramen are
// asynchronous feedback terms, so they are written as level-sensitive
// latches - this is intended, they are the PAL's state.  The PAL's LCLK1
// pin enters no equation and is left out.
module sdb_bus_decode_pal (
  input  logic reset,
  input  logic lclk2,
  input  logic refcyc_n,
  input  logic xfcyc_n,
  input  logic rasl,      // RAS, active low
  input  logic lal,
  input  logic trqe_n,
  input  logic la26,
  input  logic la25,
  input  logic la21,
  input  logic la20,
  output logic ramoe_n,
  output logic ramen,
  output logic ramoff,
  output logic mrcab_n,
  output logic uartcs_n,
  output logic romcs_n,
  output logic dmras0_n,
  output logic dmras1_n,
  output logic lmras_n,
  output logic flgclk_n
);

  logic ras, refresh, xfer, upper, vram_sp, shadow_off;
  logic mrcab_set, mrcab_low;

  assign ras     = ~rasl;
  assign refresh = ~refcyc_n;
  assign xfer    = ~xfcyc_n;
  assign upper   = la26 & la25;
  assign vram_sp = ~la26 & ~la25;

  assign flgclk_n = ~(xfer & ras);
  assign lmras_n  = ~(ras & (upper | refresh));
  assign dmras1_n = ~(ras & ((vram_sp & la20) | refresh | xfer));
  assign dmras0_n = ~(ras & ((vram_sp & ~la20) | refresh | xfer));
  assign uartcs_n = ~(ras & ~la26 & la25 & ~refresh);
  assign romcs_n  = ~(upper & la21 & la20 & ~ramen & ~refresh);

  // Shadow-RAM switch: cleared by the decoded access, set again by RESET.
  assign shadow_off = la26 & ~la25 & ~la21 & la20 & ~refresh & ras;
  always_latch begin
    if (shadow_off || reset) ramen = ~shadow_off;
  end
  assign ramoff = ~(reset | ramen);

  // Column-address steering, held low through the LAL-low phase.
  assign mrcab_set = (~la21 & lclk2 & lal) | (la20 & ~lclk2);
  always_latch begin
    if (mrcab_set || lal) mrcab_low = mrcab_set;
  end
  assign mrcab_n = ~mrcab_low;

  // The PAL lists two more RAMOE terms that only add ~LA21 or ~LA20 to this
  // one; they are covered by it.
  assign ramoe_n = ~(upper & ~ramen & ~trqe_n);

endmodule
