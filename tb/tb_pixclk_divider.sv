// tb_pixclk_divider: checks the SCLK/4 two-phase outputs: period of four
// SCLK cycles, PIXclk2 one SCLK behind PIXclk1, 50% duty, and pix2_fall
// exactly in the cycle before each PIXclk2 fall.
module tb_pixclk_divider;
  logic sclk = 0, reset, pixclk1, pixclk2, pix2_fall;
  int checks = 0, failures = 0;
  logic [3:0] h1, h2;   // history of the two outputs
  logic pf_before = 0;

  pixclk_divider dut (.*);
  always #5 sclk = ~sclk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic prev2;
    reset = 1; #12 reset = 0;
    h1 = '0; h2 = '0;
    for (int i = 0; i < 64; i++) begin
      prev2 = pixclk2;
      @(posedge sclk); #1;
      h1 = {h1[2:0], pixclk1};
      h2 = {h2[2:0], pixclk2};
      if (i == 0) begin
        checks++; if (!(pixclk1 && !pixclk2)) failures++;
      end
      if (i >= 4) begin
        checks += 3;
        if ($countones(h1) != 2) failures++;          // 50% duty over 4
        if (h2[0] !== h1[1]) failures++;              // one SCLK lag
        if (h1[0] === h1[2] || h2[0] === h2[2]) failures++;  // half period is 2 SCLKs
      end
      if (i >= 1) begin
        checks++;
        // pix2_fall seen before this edge must match an actual fall
        if ((prev2 && !pixclk2) !== pf_before) begin
          failures++; $display("FAIL pix2_fall at %0d", i);
        end
      end
      pf_before = pix2_fall;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
