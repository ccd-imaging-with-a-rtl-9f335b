// tb_camera_interface_board: the camera interface board alone, with a small
// sensor (8 lines of 24 pixels) and short video timing (96 active SCLKs per
// line, 24 pixels, 6 words).  The USART select is driven directly.
// Checks: DUDATE set/reset by its addresses; DUMPclk pulses reach IAG; each
// A/D sample of video line v comes from CCD line v in column order; the
// VRAM words are the samples packed four to a word; each acquisition
// transfer stores the 5 to 7 words shifted in during that line (the board's write strobe makes it a
// register-to-memory transfer); with DUDATE reset the transfers read and
// the VRAM shift clock is SCLK again.
module tb_camera_interface_board;
  logic lclk = 0, lclk2 = 0, gclk = 0;
  always #5 lclk = ~lclk;
  always @(lclk) lclk2 <= #3 lclk;
  always #20 gclk = ~gclk;

  logic reset = 1'b0;
  logic uartcs_n = 1, la20 = 0, la13 = 0, la12 = 0;
  logic cas_n = 1, trqe_n = 1, w_n = 1, ras_n = 1;
  logic sclk, hsync_n, vsync_n, blank_n;
  logic [3:0] ad_d;
  logic ad_clk, srg, iag, abg;
  logic [15:0] vram_sin, vram_sout;
  logic vram_sc, vram_w_n, dudate, dumpclk, shift_clk;

  camera_interface_board dut (
    .reset, .lclk, .uartcs_n, .la20, .la13, .la12, .lclk2, .cas_n, .trqe_n, .w_n,
    .sclk, .hsync_n, .blank_n, .ad_d, .ad_clk, .srg, .iag, .abg,
    .vram_sin, .vram_sc, .vram_w_n, .dudate, .dumpclk, .shift_clk
  );

  logic video_en = 0;
  logic [15:0] hcount, vcount;
  logic line_xfer, frame_end;
  gsp_video_model u_gsp (
    .gclk, .en(video_en),
    .hesync(16'd1), .heblnk(16'd2), .hsblnk(16'd98), .htotal(16'd104),
    .vesync(16'd1), .veblnk(16'd1), .vsblnk(16'd9), .vtotal(16'd10),
    .hsync_n, .vsync_n, .blank_n, .sclk, .hcount, .vcount, .line_xfer, .frame_end
  );

  logic [8:0] vram_row = 0;
  vram_bank_model #(.ROWS(16), .COLS(256)) u_vram (
    .ras_n, .trqe_n, .w_n(vram_w_n), .row(vram_row),
    .sc(vram_sc), .sin(vram_sin), .sout(vram_sout)
  );

  logic expose = 0;
  tc211_adc_model #(.ROWS(8), .COLS(24)) u_ccd (
    .iag, .srg, .abg, .expose, .ad_clk, .d(ad_d)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit bus_busy = 0;
  task automatic access(logic [31:0] addr);
    wait (!bus_busy); bus_busy = 1;
    @(posedge lclk);
    {la20, la13, la12} = {addr[20], addr[13], addr[12]};
    uartcs_n = 0;
    repeat (3) @(posedge lclk);
    uartcs_n = 1;
    @(posedge lclk); {la20, la13, la12} = '0;
    bus_busy = 0;
  endtask

  task automatic transfer(logic [8:0] row);
    wait (!bus_busy); bus_busy = 1;
    @(posedge lclk); trqe_n = 0; vram_row = row;
    @(posedge lclk2); #1 ras_n = 0;
    @(posedge lclk); cas_n = 0;
    @(posedge lclk); trqe_n = 1;
    @(posedge lclk); ras_n = 1; cas_n = 1;
    bus_busy = 0;
  endtask

  logic [15:0] words [$];
  int words_at_xfer [$], row_of_xfer [$], line_of_sample [$];
  bit acquiring = 0;
  int n_dump = 0, n_iag = 0, n_sc = 0, n_sclk = 0;
  always @(posedge dumpclk) n_dump++;
  always @(posedge iag) n_iag++;
  always @(posedge vram_sc) begin
    n_sc++;
    if (acquiring && dudate) words.push_back(vram_sin);
  end
  always @(posedge sclk) n_sclk++;
  always @(posedge ad_clk) if (acquiring) line_of_sample.push_back(int'(vcount));
  always @(posedge gclk) if (line_xfer) begin
    if (acquiring) begin words_at_xfer.push_back(words.size()); row_of_xfer.push_back(int'(vcount)); end
    fork automatic logic [8:0] r = vcount[8:0]; transfer(r); join_none
  end

  initial begin
    int s0, i0;
    #1 reset = 1; #32 reset = 0;
    check(dudate == 0, "DUDATE clear after reset");
    i0 = n_iag;
    for (int i = 0; i < 9; i++) access(32'h0210_0000);
    check(n_dump == 9 && n_iag - i0 == 9, $sformatf("dump pulses %0d iag %0d", n_dump, n_iag - i0));
    access(32'h0210_1000);
    check(u_ccd.n_abg == 1, "ABG pulse");
    expose = 1; #10 expose = 0;
    access(32'h0210_3000);
    check(dudate == 1, "DUDATE set");
    s0 = u_ccd.q_d.size();
    acquiring = 1;
    @(negedge gclk) video_en = 1;
    @(posedge gclk); wait (frame_end); @(posedge gclk); wait (!bus_busy);
    acquiring = 0;
    access(32'h0210_2000);
    check(dudate == 0, "DUDATE reset");
    @(negedge gclk) video_en = 0;
    repeat (10) @(posedge lclk);
    begin
      int nsamp, cur, col, lead, per;
      nsamp = u_ccd.q_d.size() - s0;
      cur = -1; col = 0; lead = 0; per = 0;
      for (int k = 0; k < nsamp; k++) begin
        int v, tl, tc;
        v = line_of_sample[k]; tl = u_ccd.q_line[s0 + k]; tc = u_ccd.q_col[s0 + k];
        if (v != cur) begin
          if (cur >= 0 && cur < 8) check(per == 24, $sformatf("line %0d: %0d pixels", cur, per));
          cur = v; col = 0; lead = 0; per = 0;
        end
        if (v < 8) begin
          if (tl < 0 && col == 0 && lead == 0) lead = 1;
          else begin
            check(tl == v && tc == col, $sformatf("line %0d sample from (%0d,%0d)", v, tl, tc));
            col++; per++;
          end
        end
      end
      check(words.size() == nsamp / 4 || words.size() == nsamp / 4 - 1, "word count");
      for (int w = 0; w < words.size(); w++) begin
        logic [15:0] e;
        for (int p = 0; p < 4; p++) e[p*4 +: 4] = u_ccd.q_d[s0 + 4*w + p];
        check(words[w] == e, $sformatf("word %0d %h exp %h", w, words[w], e));
      end
      for (int i = 1; i < words_at_xfer.size(); i++) begin
        int r, first, n;
        r = row_of_xfer[i]; first = words_at_xfer[i-1]; n = words_at_xfer[i] - first;
        if (r >= 1 && r < 8) begin
          // a word may straddle the line end and land in the next row
          check(n >= 5 && n <= 7, $sformatf("row %0d has %0d words", r, n));
          for (int w = 0; w < n; w++)
            check(u_vram.mem[r][w] == words[first + w], $sformatf("row %0d word %0d", r, w));
        end
      end
    end
    check(u_vram.n_write_xfer == 11, $sformatf("%0d write transfers", u_vram.n_write_xfer));
    // screen refresh: VRAM clocked by SCLK, transfers read
    n_sc = 0; n_sclk = 0;
    @(negedge gclk) video_en = 1;
    repeat (3 * 105) @(posedge gclk);
    @(negedge gclk) video_en = 0;
    repeat (10) @(posedge lclk);
    check(n_sc == n_sclk && n_sclk > 150, $sformatf("VRAM shift clock %0d, SCLK %0d", n_sc, n_sclk));
    check(u_vram.n_write_xfer == 11 && u_vram.n_read_xfer >= 3, "read transfers in refresh mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
