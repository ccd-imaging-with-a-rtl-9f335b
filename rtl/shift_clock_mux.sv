// shift_clock_mux: selects the VRAM shift register clock.
//
// With DUDATE reset the VRAM serial port is clocked by SCLK from the SDB
// (screen refresh: words leave the VRAM at SCLK rate).  With DUDATE set it
// is clocked by SHIFTclk from the Gray code counter (image acquisition: one
// edge per packed word of four pixels).  Combinational; follows the
// document.
module shift_clock_mux (
  input  logic sclk,
  input  logic shift_clk,
  input  logic dudate,
  output logic vram_sc
);

  assign vram_sc = dudate ? shift_clk : sclk;

endmodule
