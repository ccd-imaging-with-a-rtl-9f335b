// gsp_video_model: behavioural model of the TMS34010 video timing logic
// (testbench only; the processor itself is not part of this design).
//
// HCOUNT counts the video clock from 0 to HTOTAL, VCOUNT counts lines from
// 0 to VTOTAL.  HSYNC' is low for HCOUNT < HESYNC, VSYNC' for
// VCOUNT < VESYNC; the display is blanked for HCOUNT < HEBLNK or
// HCOUNT >= HSBLNK, and likewise vertically.  SCLK is the video clock gated
// by BLANK' (the gate signal changes on the falling clock edge, so SCLK has
// no short pulses).  line_xfer pulses for one clock at HCOUNT == HSBLNK of
// every line: the moment the processor starts its VRAM transfer cycle.
// While en is low the counters are held at zero, sync is inactive and the
// display blanked ("video disabled").
module gsp_video_model (
  input  logic        gclk,
  input  logic        en,
  input  logic [15:0] hesync, heblnk, hsblnk, htotal,
  input  logic [15:0] vesync, veblnk, vsblnk, vtotal,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        blank_n,
  output logic        sclk,
  output logic [15:0] hcount,
  output logic [15:0] vcount,
  output logic        line_xfer,
  output logic        frame_end
);
  logic blank_q = 1'b0;

  always @(posedge gclk) begin
    if (!en) begin
      hcount <= 0; vcount <= 0;
    end else if (hcount == htotal) begin
      hcount <= 0;
      vcount <= (vcount == vtotal) ? 16'd0 : vcount + 16'd1;
    end else begin
      hcount <= hcount + 16'd1;
    end
  end

  always_comb begin
    hsync_n   = !(en && hcount < hesync);
    vsync_n   = !(en && vcount < vesync);
    blank_n   = en && !(hcount < heblnk || hcount >= hsblnk ||
                        vcount < veblnk || vcount >= vsblnk);
    line_xfer = en && hcount == hsblnk;
    frame_end = en && hcount == htotal && vcount == vtotal;
  end

  always @(negedge gclk) blank_q <= blank_n;
  assign sclk = gclk & blank_q;
endmodule
