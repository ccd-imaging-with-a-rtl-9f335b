// cib_addr_decoder: GSP local address decoder of the camera interface board.
//
// The board has no chip select of its own: it borrows the USART select
// UARTCSL (active low) from the SDB bus decode PAL and qualifies it with
// local address lines LA20, LA13 and LA12.  With LA20 high the access falls
// in the 0210 xxxxh window, and {LA13,LA12} pick one of four strobes:
//   0210 0000h  dumpclk    - clears a line of the CCD before acquisition
//   0210 1000h  antibmck   - antiblooming pulse
//   0210 2000h  du_reset   - resets the display update direction latch
//   0210 3000h  du_set     - sets the display update direction latch
// Purely combinational: each strobe is high for as long as the GSP access
// drives the select and address lines, which is the pulse the document
// describes.  The set/reset terms follow the schematic of the latch; the
// DUMPclk address is the document's; the ANTIBMck slot (0210 1000h) is this
// design's choice, the remaining free slot of the window.
module cib_addr_decoder
  import cib_pkg::*;
(
  input  logic uartcs_n,   // USART chip select from the bus decode PAL
  input  logic la20,
  input  logic la13,
  input  logic la12,
  output logic dumpclk,
  output logic antibmck,
  output logic du_reset,
  output logic du_set
);

  logic  window;
  slot_t slot;

  assign window = ~uartcs_n & la20;
  assign slot   = slot_t'({la13, la12});

  always_comb begin
    dumpclk  = window && slot == SLOT_DUMP;
    antibmck = window && slot == SLOT_ANTIBM;
    du_reset = window && slot == SLOT_DU_RESET;
    du_set   = window && slot == SLOT_DU_SET;
  end

endmodule
