// gray_counter: 2-bit Gray code counter of the nibbles of a VRAM word.
//
// Advances on each rise of PIXclk2' (given as the SCLK-cycle enable adv),
// through {Q1,Q0} = 10, 00, 01, 11, then back to 10.  Its decoded state
// is a one-hot load enable for the four quad flip-flops of the data
// formatter.  When the fourth nibble has been loaded the word is complete;
// SHIFTclk then follows PIXclk2 for one pulse, so its rising edge is the
// falling edge of PIXclk2' that the document says strobes the word into
// the VRAM serial inputs, and the word stays stable until the next load.
// The state sequence and reset state come from the timing diagram; making
// SHIFTclk from a word-complete flag gated with PIXclk2 is this design's
// choice.
module gray_counter
  import cib_pkg::*;
(
  input  logic       sclk,
  input  logic       reset,
  input  logic       adv,       // rise of PIXclk2' at the end of this cycle
  input  logic       pixclk2,
  output gray_t      state,
  output logic [3:0] load,      // one-hot: nibble loaded at this advance
  output logic       shift_clk  // SHIFTclk to the VRAM shift-clock mux
);

  logic word_full;

  always_ff @(posedge sclk or posedge reset) begin
    if (reset) begin
      state     <= G_NIB0;
      word_full <= 1'b0;
    end else if (adv) begin
      state     <= gray_next(state);
      word_full <= (state == G_NIB3);
    end
  end

  always_comb begin
    load = '0;
    load[gray_index(state)] = 1'b1;
  end

  assign shift_clk = word_full & pixclk2;

endmodule
