// ccd_clock_gen: the TC211 CCD clock gates of the camera interface board.
//
// SRG (serial register gate) is PIXclk1' ANDed with DUDATE and BLANK': the
// CCD shifts out one pixel per four SCLK cycles, only during acquisition
// and only outside blanking; a pixel leaves the sensor on the falling edge
// of SRG.  IAG (image area gate) moves one line into the serial register on
// its rising edge.  It combines DUMPclk, a pulse per GSP access used to
// flush the sensor before exposure, with HSYNC', which gives one IAG edge
// per line during readout: the two are ORed as active-low events, so IAG is
// low while HSYNC' is low or DUMPclk is high and rises when either ends.
// ABG (antiblooming gate) is the ANTIBMck strobe.  Combinational.  The SRG
// terms are the document's; the polarity of the IAG combination is this
// design's reading of "DUMPclk ORed with HSYNC'".
module ccd_clock_gen (
  input  logic pixclk1,
  input  logic dudate,
  input  logic blank_n,
  input  logic hsync_n,
  input  logic dumpclk,
  input  logic antibmck,
  output logic srg,
  output logic iag,
  output logic abg
);

  assign srg = ~pixclk1 & dudate & blank_n;
  assign iag = hsync_n & ~dumpclk;
  assign abg = antibmck;

endmodule
