// tb_data_formatter: feeds random 4-bit samples with the Gray counter's
// load bus and checks that after every fourth sample the word holds the
// four samples in packed-pixel order (first sample in bits 3:0), and that
// no nibble changes except the one being loaded.
module tb_data_formatter;
  import cib_pkg::*;
  logic sclk = 0, reset, adv;
  logic [3:0] load;
  nibble_t ad_d;
  word_t sin;
  int checks = 0, failures = 0;

  data_formatter dut (.*);
  always #5 sclk = ~sclk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    nibble_t samples [4];
    word_t prev_w, expw;
    int k;
    reset = 1; adv = 0; load = 4'b0001; ad_d = '0;
    #12 reset = 0;
    checks++; if (sin !== '0) failures++;
    k = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge sclk);
      adv  = ($urandom_range(0, 2) == 0);
      ad_d = nibble_t'($urandom);
      load = 4'b1 << (k % 4);
      prev_w = sin;
      @(posedge sclk); #1;
      if (adv) begin
        samples[k % 4] = ad_d;
        expw = prev_w;
        expw[(k % 4)*4 +: 4] = ad_d;
        checks++;
        if (sin !== expw) begin failures++; $display("FAIL nibble load %0d", k); end
        k++;
        if (k % 4 == 0) begin
          checks++;
          if (sin !== {samples[3], samples[2], samples[1], samples[0]}) begin
            failures++; $display("FAIL word %h", sin);
          end
        end
      end else begin
        checks++; if (sin !== prev_w) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
