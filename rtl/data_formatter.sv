// data_formatter: packs four A/D samples into one packed-pixel VRAM word.
//
// Four 4-bit registers (the board's four quad D flip-flops) all take the
// same A/D output; at each rise of PIXclk2' (adv) only the one named by the
// Gray code counter's one-hot load bus captures it.  The first pixel of a
// word lands in sin[3:0], the second in sin[7:4], the third in sin[11:8]
// and the fourth in sin[15:12], so that screen refresh later shows the
// pixels in capture order.  sin drives the VRAM serial inputs directly.
// The nibble order is the document's; reset to zero is this design's.
module data_formatter
  import cib_pkg::*;
(
  input  logic       sclk,
  input  logic       reset,
  input  logic       adv,
  input  logic [3:0] load,
  input  nibble_t    ad_d,  // four bits of the A/D output
  output word_t      sin    // Sin15r..Sin0r
);

  for (genvar i = 0; i < NIBBLES; i++) begin : g_nib
    always_ff @(posedge sclk or posedge reset) begin
      if (reset)                sin[i*NIBBLE_W +: NIBBLE_W] <= '0;
      else if (adv && load[i])  sin[i*NIBBLE_W +: NIBBLE_W] <= ad_d;
    end
  end

  a_onehot: assert property (@(posedge sclk) disable iff (reset)
                             adv |-> $onehot(load));

endmodule
