// tb_dudate_latch: random set/reset sequence against a reference model of
// the display update direction latch, including asynchronous reset.
module tb_dudate_latch;
  logic clk = 0, reset, du_set, du_reset, dudate;
  logic ref_q;
  int checks = 0, failures = 0;

  dudate_latch dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    reset = 1; du_set = 0; du_reset = 0; ref_q = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (dudate !== 1'b0) failures++;
    reset = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: begin du_set = 1; du_reset = 0; end
        1: begin du_set = 0; du_reset = 1; end
        default: begin du_set = 0; du_reset = 0; end
      endcase
      @(posedge clk);
      if (du_reset) ref_q = 0; else if (du_set) ref_q = 1;
      #1 checks++;
      if (dudate !== ref_q) begin
        failures++; $display("FAIL i=%0d got %b exp %b", i, dudate, ref_q);
      end
    end
    // asynchronous reset while set
    @(negedge clk); du_set = 1; @(posedge clk); #1 du_set = 0;
    #2 reset = 1; #1 checks++; if (dudate !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
