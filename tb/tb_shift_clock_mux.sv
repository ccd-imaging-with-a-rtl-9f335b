// tb_shift_clock_mux: the VRAM shift clock follows SCLK with DUDATE reset
// and SHIFTclk with DUDATE set; counts edges in both modes.
module tb_shift_clock_mux;
  logic sclk = 0, shift_clk = 0, dudate, vram_sc;
  int checks = 0, failures = 0;

  shift_clock_mux dut (.*);
  always #5 sclk = ~sclk;
  always #20 shift_clk = ~shift_clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int edges;
  always @(posedge vram_sc) edges++;

  initial begin
    dudate = 0; edges = 0;
    for (int i = 0; i < 100; i++) begin
      @(sclk); #1; checks++;
      if (vram_sc !== (dudate ? shift_clk : sclk)) failures++;
      if (i == 50) dudate = 1;
    end
    edges = 0; #400;
    checks++; if (edges < 9 || edges > 11) begin failures++; $display("FAIL acq edges %0d", edges); end
    dudate = 0; #1 edges = 0; #400;
    checks++; if (edges < 39 || edges > 41) begin failures++; $display("FAIL ref edges %0d", edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
