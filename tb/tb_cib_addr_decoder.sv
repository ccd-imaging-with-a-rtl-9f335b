// tb_cib_addr_decoder: exhaustive check of the camera board's address
// decoder against the address table (0210 0000h..0210 3000h inside the USART
// select).  All 32 input combinations are applied.
module tb_cib_addr_decoder;
  logic uartcs_n, la20, la13, la12;
  logic dumpclk, antibmck, du_reset, du_set;
  int checks = 0, failures = 0;

  cib_addr_decoder dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [3:0] e;
      logic [31:0] addr;
      {uartcs_n, la20, la13, la12} = v[3:0];
      #1;
      addr = 32'h0200_0000 | (32'(la20) << 20) | (32'(la13) << 13) | (32'(la12) << 12);
      e = '0;
      if (!uartcs_n) begin
        e[0] = (addr == 32'h0210_0000);
        e[1] = (addr == 32'h0210_1000);
        e[2] = (addr == 32'h0210_2000);
        e[3] = (addr == 32'h0210_3000);
      end
      checks++;
      if ({du_set, du_reset, antibmck, dumpclk} !== e) begin
        failures++;
        $display("FAIL v=%0d addr=%h got=%b exp=%b", v, addr,
                 {du_set, du_reset, antibmck, dumpclk}, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
