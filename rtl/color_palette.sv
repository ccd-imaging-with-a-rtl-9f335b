// color_palette: digital part of the TMS34070 colour palette.
//
// Sixteen colour registers of 12 bits each (4 bits per gun) map a 4-bit
// pixel to one of 4096 colours.  An internal 2-to-1 multiplexer takes input
// DA in one dot clock and DB in the next, so the palette input bus runs at
// half the dot rate.  The output register rgb holds {red, green, blue} one
// dot clock after the pixel is selected; the analog converters that drive
// the monitor are not part of this model.  The register load port
// (we/waddr/wdata, written at a dot clock edge) stands in for the palette's
// own loading mechanism.  The register count, the colour depth and the DA/DB
// alternation are the document's; the load port, the phase flop (cleared by
// reset, so DA goes first) and the output register are this design's.
module color_palette
  import cib_pkg::*;
(
  input  logic        dotclk,
  input  logic        reset,
  input  nibble_t     da,
  input  nibble_t     db,
  input  logic        we,
  input  logic [3:0]  waddr,
  input  color_t      wdata,
  output color_t      rgb,
  output logic        phase   // 0: DA selected this dot clock
);

  color_t  regs [PALETTE_N];
  nibble_t pix;

  always_ff @(posedge dotclk or posedge reset) begin
    if (reset) phase <= 1'b0;
    else       phase <= ~phase;
  end

  always_ff @(posedge dotclk) begin
    if (we) regs[waddr] <= wdata;
  end

  assign pix = phase ? db : da;

  always_ff @(posedge dotclk or posedge reset) begin
    if (reset) rgb <= '0;
    else       rgb <= regs[pix];
  end

endmodule
