// tb_gray_counter: drives the counter with its real enable (the SCLK/4
// divider) and checks the Gray sequence 10,00,01,11 of the timing diagram,
// that exactly one bit changes per step, the one-hot load bus, and that
// SHIFTclk rises once per four advances, at a rise of PIXclk2 that follows
// the loading of the fourth nibble.
module tb_gray_counter;
  import cib_pkg::*;
  logic sclk = 0, reset;
  logic pixclk1, pixclk2, pix2_fall;
  gray_t state;
  logic [3:0] load;
  logic shift_clk;
  int checks = 0, failures = 0;

  pixclk_divider u_div (.sclk, .reset, .pixclk1, .pixclk2, .pix2_fall);
  gray_counter dut (.sclk, .reset, .adv(pix2_fall), .pixclk2, .state, .load, .shift_clk);
  always #5 sclk = ~sclk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [1:0] exp_seq [4] = '{2'b10, 2'b00, 2'b01, 2'b11};

  initial begin
    int advs, rises, adv_at_last_rise;
    logic prev_sc;
    gray_t prev;
    reset = 1; #12 reset = 0;
    checks++; if (state !== G_NIB0) failures++;
    advs = 0; rises = 0; prev_sc = 0; adv_at_last_rise = 0;
    for (int c = 0; c < 400; c++) begin
      logic was_adv;
      was_adv = pix2_fall;
      prev = state;
      checks++;
      if (load !== (4'b1 << (advs % 4))) begin
        failures++; $display("FAIL load %b at adv %0d", load, advs);
      end
      @(posedge sclk); #1;
      if (was_adv) begin
        advs++;
        checks += 2;
        if (state !== gray_t'(exp_seq[advs % 4])) begin
          failures++; $display("FAIL state %b after %0d", state, advs);
        end
        if ($countones(state ^ prev) != 1) failures++;
      end else begin
        checks++; if (state !== prev) failures++;
      end
      if (shift_clk && !prev_sc) begin
        rises++;
        checks += 2;
        if (advs % 4 != 0 || advs == 0) begin
          failures++; $display("FAIL SHIFTclk rise after %0d advances", advs);
        end
        if (!pixclk2) failures++;
      end
      prev_sc = shift_clk;
    end
    checks++;
    if (rises != advs / 4 && !(rises == advs / 4 - 1 && advs % 4 == 0)) begin
      failures++; $display("FAIL %0d SHIFTclk rises for %0d advances", rises, advs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
