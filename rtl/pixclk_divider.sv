// pixclk_divider: divides the VRAM shift clock SCLK by four.
//
// Two flip-flops form a 2-bit Johnson counter, so both outputs have a period
// of four SCLK cycles and PIXclk2 lags PIXclk1 by one SCLK period, as in the
// formatter timing diagram (two phases of SCLK/4).  PIXclk1' clocks the
// CCD serial register (SRG), PIXclk2 is the A/D conversion clock, and the
// fall of PIXclk2 (rise of PIXclk2') advances the Gray code counter.
// pix2_fall is high in the SCLK cycle whose closing edge makes PIXclk2 fall;
// the rest of the board uses it as a clock enable, which keeps the whole
// pixel path on SCLK.  Reset (asynchronous, active high) clears both
// flip-flops; the first SCLK edge then raises PIXclk1.
module pixclk_divider (
  input  logic sclk,
  input  logic reset,
  output logic pixclk1,
  output logic pixclk2,
  output logic pix2_fall
);

  always_ff @(posedge sclk or posedge reset) begin
    if (reset) begin
      pixclk1 <= 1'b0;
      pixclk2 <= 1'b0;
    end else begin
      pixclk1 <= ~pixclk2;
      pixclk2 <= pixclk1;
    end
  end

  assign pix2_fall = pixclk2 & ~pixclk1;

endmodule
