// tb_vram_output_mux: random words; with VCLK low the palette inputs carry
// pixels 0 and 1 of the word, with VCLK high pixels 2 and 3, so DA,DB,DA,DB
// over one VCLK period give the pixels in packed order.
module tb_vram_output_mux;
  import cib_pkg::*;
  word_t sb;
  logic vclk;
  nibble_t da, db;
  int checks = 0, failures = 0;

  vram_output_mux dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      nibble_t seq [4];
      sb = word_t'($urandom);
      vclk = 0; #1; seq[0] = da; seq[1] = db;
      vclk = 1; #1; seq[2] = da; seq[3] = db;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (seq[p] !== sb[p*4 +: 4]) begin
          failures++; $display("FAIL word %h pixel %0d got %h", sb, p, seq[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
