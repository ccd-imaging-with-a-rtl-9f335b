// tb_write_signal_generator: exhaustive truth table of the WRITE' gate and
// the DUDATE multiplexer, then a transfer cycle: with DUDATE set the VRAM
// write input must be low when RAS falls (TR'/QE' low, CAS' high, LCLK2
// high), so the VRAM stores its shift register.
module tb_write_signal_generator;
  logic cas_n, trqe_n, lclk2, w_n, dudate, write_n, bw_n;
  int checks = 0, failures = 0;

  write_signal_generator dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic ew, eb;
      {cas_n, trqe_n, lclk2, w_n, dudate} = v[4:0];
      #1;
      ew = !(cas_n == 1 && trqe_n == 0 && lclk2 == 1);
      eb = dudate ? ew : w_n;
      checks += 2;
      if (write_n !== ew) begin failures++; $display("FAIL write_n v=%0d", v); end
      if (bw_n !== eb)    begin failures++; $display("FAIL bw_n v=%0d", v); end
    end
    // transfer cycle in acquisition mode: GSP keeps W' high
    dudate = 1; w_n = 1; cas_n = 1; trqe_n = 1; lclk2 = 0; #5;
    trqe_n = 0; #5; lclk2 = 1; #2;
    checks++; if (bw_n !== 1'b0) failures++;   // RAS falls here
    #3 lclk2 = 0; #1;
    checks++; if (bw_n !== 1'b1) failures++;   // half a local clock only
    // same cycle in refresh mode: W' of the GSP passes
    dudate = 0; lclk2 = 1; #1;
    checks++; if (bw_n !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
