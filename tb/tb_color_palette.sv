// tb_color_palette: loads the 16 colour registers with random colours, then
// streams random DA/DB pairs and checks that the output gives colour[DA]
// then colour[DB], one dot clock after selection; also reloads a register
// mid-stream.
module tb_color_palette;
  import cib_pkg::*;
  logic dotclk = 0, reset, we, phase;
  nibble_t da, db;
  logic [3:0] waddr;
  color_t wdata, rgb;
  color_t ref_regs [16];
  int checks = 0, failures = 0;

  color_palette dut (.*);
  always #5 dotclk = ~dotclk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    reset = 1; we = 0; waddr = 0; wdata = 0; da = 0; db = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge dotclk);
      we = 1; waddr = 4'(i); wdata = color_t'($urandom); ref_regs[i] = wdata;
    end
    @(negedge dotclk); we = 0; reset = 0;
    checks++; if (rgb !== '0) failures++;
    for (int i = 0; i < 300; i++) begin
      nibble_t sel;
      // after reset the palette takes DA first, then DB, alternately
      if (i % 2 == 0) begin da = nibble_t'($urandom); db = nibble_t'($urandom); end
      sel = (i % 2 == 1) ? db : da;
      checks++; if (phase !== 1'(i % 2)) failures++;
      if (i == 150) begin we = 1; waddr = 4'(sel); wdata = 12'hABC; end
      @(posedge dotclk); #1;
      if (we) begin ref_regs[waddr] = wdata; we = 0; end
      checks++;
      if (rgb !== ref_regs[sel] && i != 150) begin
        failures++; $display("FAIL i=%0d rgb %h exp %h", i, rgb, ref_regs[sel]);
      end
      @(negedge dotclk);
    end
    // after reload the new colour is seen
    da = 4'(waddr); db = 4'(waddr);
    @(posedge dotclk); #1; @(posedge dotclk); #1;
    checks++; if (rgb !== 12'hABC) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
