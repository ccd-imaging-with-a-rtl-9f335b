// tb_ccd_clock_gen: exhaustive truth table of the CCD clock gates: SRG only
// while acquiring and not blanking; IAG low while HSYNC' is low or DUMPclk
// is high; ABG follows ANTIBMck.
module tb_ccd_clock_gen;
  logic pixclk1, dudate, blank_n, hsync_n, dumpclk, antibmck;
  logic srg, iag, abg;
  int checks = 0, failures = 0;

  ccd_clock_gen dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {pixclk1, dudate, blank_n, hsync_n, dumpclk, antibmck} = v[5:0];
      #1;
      checks += 3;
      if (srg !== (!pixclk1 && dudate && blank_n)) failures++;
      if (iag !== !(!hsync_n || dumpclk)) failures++;
      if (abg !== antibmck) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
