// dudate_latch: display update direction latch (DUDATE).
//
// DUDATE low: the GSP's screen refresh drives the VRAMs as usual
// (memory-to-shift-register transfers, SCLK shifts the display out).
// DUDATE high: image acquisition - the board drives the CCD clocks, the
// VRAM shift clock and the VRAM write strobe, so that the GSP's refresh
// transfers become shift-register-to-memory transfers.
// The board's flip-flop is set by a decoded access and cleared by board
// RESET or a decoded reset access.  Here it is a register on the GSP local
// clock: du_set / du_reset are sampled each clock, reset (active high,
// asynchronous) and du_reset win over du_set.  Sampling on the local clock
// instead of clocking the flip-flop with the decoded strobe is this
// design's choice; the set/reset meaning follows the document.
module dudate_latch (
  input  logic clk,       // GSP local clock
  input  logic reset,     // board RESET, active high
  input  logic du_set,
  input  logic du_reset,
  output logic dudate
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)         dudate <= 1'b0;
    else if (du_reset) dudate <= 1'b0;
    else if (du_set)   dudate <= 1'b1;
  end

  // The two strobes decode different addresses and can never coincide.
  a_exclusive: assert property (@(posedge clk) disable iff (reset)
                                !(du_set && du_reset));

endmodule
