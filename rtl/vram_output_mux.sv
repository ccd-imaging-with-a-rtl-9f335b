// vram_output_mux: the two quad 2-to-1 multiplexers between the VRAM
// serial outputs and the colour palette.
//
// A 16-bit packed word holds four pixels, SB3-SB0 first.  Selected by VCLK
// (twice the VRAM shift rate), the first multiplexer passes SB3-SB0 then
// SB11-SB8 to palette input DA, the second SB7-SB4 then SB15-SB12 to input
// DB.  With the palette alternating DA and DB every dot clock, the pixels
// reach the screen in the order they were packed while the VRAM is shifted
// at a quarter of the dot clock.  Combinational.  The bit groups on each
// multiplexer are the document's; which group is the VCLK-low input is this
// design's reading (the one that keeps pixel order).
module vram_output_mux
  import cib_pkg::*;
(
  input  word_t   sb,    // VRAM serial outputs SB15..SB0
  input  logic    vclk,  // select: low = A inputs
  output nibble_t da,
  output nibble_t db
);

  assign da = vclk ? sb[11:8]  : sb[3:0];
  assign db = vclk ? sb[15:12] : sb[7:4];

endmodule
