// cib_pkg: types and constants shared by the camera interface board logic.
//
// The camera interface board packs four 4-bit pixels into one 16-bit VRAM
// word (packed-pixel format, first pixel in the least significant nibble).
// A 2-bit Gray code counter names the nibble being loaded; its four states,
// written as {Q1,Q0}, follow the order of the formatter timing diagram:
// 10 -> 00 -> 01 -> 11 -> 10.  The board's registers occupy four 4 Kbyte
// slots of the USART select window, told apart by local address lines LA13
// and LA12.  The pixel and word widths are the document's; the binary codes
// of the address slots follow its addresses 0210 0000h .. 0210 3000h.
package cib_pkg;

  localparam int unsigned NIBBLE_W  = 4;   // bits per pixel kept from the A/D
  localparam int unsigned NIBBLES   = 4;   // pixels per VRAM word
  localparam int unsigned WORD_W    = NIBBLE_W * NIBBLES;  // VRAM bank width
  localparam int unsigned PALETTE_N = 16;  // colour registers of the palette
  localparam int unsigned COLOR_W   = 12;  // 4096 colours

  typedef logic [NIBBLE_W-1:0] nibble_t;
  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [COLOR_W-1:0]  color_t;

  // Gray code counter states, {Q1,Q0}; the name is the nibble loaded next.
  typedef enum logic [1:0] {
    G_NIB0 = 2'b10,
    G_NIB1 = 2'b00,
    G_NIB2 = 2'b01,
    G_NIB3 = 2'b11
  } gray_t;

  // {LA13,LA12} inside the 0210 xxxxh window.
  typedef enum logic [1:0] {
    SLOT_DUMP     = 2'b00,  // 0210 0000h: DUMPclk pulse (IAG)
    SLOT_ANTIBM   = 2'b01,  // 0210 1000h: ANTIBMck pulse (ABG)
    SLOT_DU_RESET = 2'b10,  // 0210 2000h: DUDATE <= 0, screen refresh
    SLOT_DU_SET   = 2'b11   // 0210 3000h: DUDATE <= 1, image acquisition
  } slot_t;

  function automatic gray_t gray_next(gray_t g);
    case (g)
      G_NIB0:  return G_NIB1;
      G_NIB1:  return G_NIB2;
      G_NIB2:  return G_NIB3;
      default: return G_NIB0;
    endcase
  endfunction

  function automatic logic [1:0] gray_index(gray_t g);
    case (g)
      G_NIB0:  return 2'd0;
      G_NIB1:  return 2'd1;
      G_NIB2:  return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

endpackage
