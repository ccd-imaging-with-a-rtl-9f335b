// tb_imaging_system_top: end-to-end run of the imaging system at full size.
//
// Models of the processor's video timing, the VRAM bank and the CCD with its
// A/D converter surround the design.  The stimulus follows the capture
// program of the system: program the frame timing (848 video clocks x 170
// lines), dump the sensor with 166 DUMPclk accesses, integrate (with a few
// antiblooming pulses), set DUDATE, run one video frame as the CCD readout,
// reset DUDATE, then program the monitor timing and display one frame.
// Checks, against values computed here and by the models:
//   * every A/D sample of video line v comes from CCD line v, columns in
//     order from 0 (at most one leading sample per line from the cleared
//     serial register);
//   * the words shifted into the VRAM are the A/D samples packed four to a
//     word, first sample in the low nibble;
//   * each acquisition-line transfer writes exactly the words of that line
//     into the VRAM row (shift-register-to-memory transfer);
//   * in display mode the transfers read, and each displayed line shows the
//     nibbles of its VRAM row, in order, through the palette;
//   * the DUDATE latch, DUMPclk/IAG, SRG, ABG, SHIFTclk, both transfer kinds
//     and the palette each happened.
module tb_imaging_system_top;
  // ---------------- clocks -------------------------------------------------
  logic dotclk = 0, lclk1 = 0, lclk2 = 0;
  logic [1:0] cnt = 2'd3;
  logic gclk, vclk;
  always #5 dotclk = ~dotclk;
  always #5 lclk1 = ~lclk1;
  always @(lclk1) lclk2 <= #3 lclk1;
  always @(negedge dotclk) cnt <= cnt + 2'd1;
  assign gclk = (cnt == 2'd0) || (cnt == 2'd1);   // video clock, dot/4
  assign vclk = cnt[1];                            // multiplexer select, dot/4, two dots per half

  // ---------------- design and models -------------------------------------
  logic reset = 1'b0;
  logic refcyc_n = 1, xfcyc_n = 1, rasl = 1, cas_n = 1, lal = 0, trqe_n = 1, w_n = 1;
  logic la26 = 0, la25 = 0, la21 = 0, la20 = 0, la13 = 0, la12 = 0;
  logic ramoe_n, ramen, ramoff, mrcab_n, uartcs_n, romcs_n, dmras0_n, dmras1_n, lmras_n, flgclk_n;
  logic sclk, hsync_n, vsync_n, blank_n;
  logic srg, iag, abg, ad_clk;
  logic [3:0] ad_d;
  logic [15:0] vram_sin, vram_sout;
  logic vram_sc, vram_w_n;
  logic pal_we = 0;
  logic [3:0] pal_waddr = 0;
  logic [11:0] pal_wdata = 0, rgb;
  logic dudate, dumpclk, shift_clk;

  imaging_system_top dut (.*);

  logic video_en = 0;
  logic [15:0] hesync, heblnk, hsblnk, htotal, vesync, veblnk, vsblnk, vtotal;
  logic [15:0] hcount, vcount;
  logic line_xfer, frame_end;
  gsp_video_model u_gsp (
    .gclk, .en(video_en), .hesync, .heblnk, .hsblnk, .htotal,
    .vesync, .veblnk, .vsblnk, .vtotal,
    .hsync_n, .vsync_n, .blank_n, .sclk, .hcount, .vcount, .line_xfer, .frame_end
  );

  logic [8:0] vram_row = 0;
  vram_bank_model u_vram (
    .ras_n(dmras0_n), .trqe_n, .w_n(vram_w_n), .row(vram_row),
    .sc(vram_sc), .sin(vram_sin), .sout(vram_sout)
  );

  logic expose = 0;
  tc211_adc_model #(.ROWS(165), .COLS(210)) u_ccd (
    .iag, .srg, .abg, .expose, .ad_clk, .d(ad_d)
  );

  // ---------------- bookkeeping -------------------------------------------
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #60_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int n_du_set = 0, n_du_reset = 0, n_dump = 0, n_iag = 0, n_srg = 0, n_abg = 0;
  int n_shift = 0, n_wr_xfer = 0, n_rd_xfer = 0, n_pixels = 0;
  always @(posedge dudate) n_du_set++;
  always @(negedge dudate) if (!reset) n_du_reset++;
  always @(posedge dumpclk) n_dump++;
  always @(posedge iag) n_iag++;
  always @(negedge srg) n_srg++;
  always @(posedge abg) n_abg++;
  always @(posedge shift_clk) n_shift++;

  // ---------------- local bus ---------------------------------------------
  bit bus_busy = 0;
  task automatic bus_access(logic [31:0] addr);
    wait (!bus_busy); bus_busy = 1;
    @(posedge lclk1);
    {la26, la25, la21, la20, la13, la12} =
      {addr[26], addr[25], addr[21], addr[20], addr[13], addr[12]};
    rasl = 0;
    repeat (3) @(posedge lclk1);
    rasl = 1;
    @(posedge lclk1);
    {la26, la25, la21, la20, la13, la12} = '0;
    repeat (2) @(posedge lclk1);
    bus_busy = 0;
  endtask

  // VRAM transfer cycle started by the video timing at the end of each line
  task automatic transfer(logic [8:0] row);
    wait (!bus_busy); bus_busy = 1;
    @(posedge lclk1);
    xfcyc_n = 0; trqe_n = 0; vram_row = row;
    @(posedge lclk2); #1 rasl = 0;
    @(posedge lclk1); cas_n = 0;
    @(posedge lclk1); trqe_n = 1;
    @(posedge lclk1); rasl = 1; cas_n = 1; xfcyc_n = 1;
    @(posedge lclk1);
    bus_busy = 0;
  endtask

  // log of what each write transfer stored, and of the words shifted in
  logic [15:0] words [$];           // every word shifted in while acquiring
  int words_at_xfer [$];            // words count when each write xfer began
  int row_of_xfer [$];
  int line_of_sample [$];
  bit acquiring = 0, displaying = 0;

  always @(posedge vram_sc) if (acquiring && dudate) words.push_back(vram_sin);
  always @(posedge ad_clk) if (acquiring) line_of_sample.push_back(int'(vcount));

  always @(posedge gclk) begin
    if (line_xfer) begin
      if (acquiring) begin
        words_at_xfer.push_back(words.size());
        row_of_xfer.push_back(int'(vcount));
      end
      fork
        automatic logic [8:0] r = vcount[8:0];
        transfer(r);
      join_none
    end
  end

  // display: palette colours are unique, so each colour maps back to a pixel
  function automatic logic [11:0] pal_color(int i);
    return {4'(i), 4'(15 - i), 4'hA};
  endfunction
  int disp_pix [$];       // pixels of the line being displayed
  int disp_line = 0;
  int lines_checked = 0;
  always @(posedge dotclk) begin
    #1;
    if (displaying) begin
      int idx;
      idx = -1;
      for (int i = 0; i < 16; i++) if (rgb == pal_color(i)) idx = i;
      disp_pix.push_back(idx);
      if (idx >= 0) n_pixels++;
    end
  end

  // compare a displayed line with the row loaded for it
  task automatic check_display_line(int v);
    int row, n, found;
    int exp_pix [$];
    row = v - 1;            // row v-1 is loaded at the end of line v-1
    if (row < int'(veblnk) || row > 160) return;
    for (int w = 0; w < 48; w++)
      for (int p = 0; p < 4; p++)
        exp_pix.push_back(int'(u_vram.mem[row][w][p*4 +: 4]));
    n = exp_pix.size();
    found = 0;
    for (int s = 0; s + n <= disp_pix.size() && !found; s++) begin
      int ok = 1;
      for (int k = 0; k < n && ok; k++) if (disp_pix[s + k] != exp_pix[k]) ok = 0;
      found = ok;
    end
    lines_checked++;
    check(found == 1, $sformatf("display line %0d shows VRAM row %0d", v, row));
  endtask

  // ---------------- program -----------------------------------------------
  task automatic set_frame_timing();   // image capture
    hesync = 16'h0001; heblnk = 16'h0002; hsblnk = 16'h0348; htotal = 16'h0350;
    vesync = 16'h0001; veblnk = 16'h0002; vsblnk = 16'h00A8; vtotal = 16'h00A9;
  endtask
  task automatic set_display_timing(); // monitor
    hesync = 16'h001C; heblnk = 16'h001A; hsblnk = 16'h00CA; htotal = 16'h00CE;
    vesync = 16'h0003; veblnk = 16'h001B; vsblnk = 16'h01FB; vtotal = 16'h01FD;
  endtask

  initial begin
    int s0, dump_iag0;
    #1 reset = 1;
    set_display_timing();
    // palette registers
    for (int i = 0; i < 16; i++) begin
      @(negedge dotclk);
      pal_we = 1; pal_waddr = 4'(i); pal_wdata = pal_color(i);
    end
    @(negedge dotclk); pal_we = 0;
    // release reset where the dot counter restarts, so the palette's DA/DB
    // phase lines up with the multiplexer select
    @(posedge dotclk iff cnt == 2'd3); #1 reset = 0;
    check(dudate == 0, "DUDATE clear after reset");
    check(ramen == 1, "shadow RAM on after reset");

    // frame timing, then dump the sensor: 166 accesses to 0210 0000h
    set_frame_timing();
    dump_iag0 = n_iag;
    for (int i = 0; i < 166; i++) begin
      bus_access(32'h0210_0000);
      repeat (3) @(posedge lclk1);   // the three NOPs of the loop
    end
    check(n_dump == 166, $sformatf("DUMPclk pulses %0d", n_dump));
    check(n_iag - dump_iag0 >= 165, $sformatf("IAG pulses in dump %0d", n_iag - dump_iag0));
    check(dudate == 0, "DUDATE untouched by dump");

    // integration, with antiblooming pulses at 0210 1000h
    for (int i = 0; i < 4; i++) begin
      bus_access(32'h0210_1000);
      repeat (20) @(posedge lclk1);
    end
    expose = 1; #20 expose = 0;

    // acquisition: set DUDATE, run one frame, reset DUDATE
    bus_access(32'h0210_3000);
    @(posedge lclk1); #1;
    check(dudate == 1, "DUDATE set by 0210 3000h");
    s0 = u_ccd.q_d.size();
    acquiring = 1;
    @(negedge gclk); video_en = 1;
    @(posedge gclk); // leave line 0 start
    wait (frame_end); @(posedge gclk);
    wait (!bus_busy);
    bus_access(32'h0210_2000);
    @(posedge lclk1); #1;
    check(dudate == 0, "DUDATE reset by 0210 2000h");
    acquiring = 0;
    @(negedge gclk); video_en = 0;
    repeat (20) @(posedge lclk1);

    // ---- acquisition checks
    begin
      int nsamp, cur_line, next_col, lead, per_line, lines_with_data;
      nsamp = u_ccd.q_d.size() - s0;
      check(nsamp == line_of_sample.size(), "sample logs agree");
      cur_line = -1; next_col = 0; lead = 0; per_line = 0; lines_with_data = 0;
      for (int k = 0; k < nsamp; k++) begin
        int v, tl, tc;
        v = line_of_sample[k]; tl = u_ccd.q_line[s0 + k]; tc = u_ccd.q_col[s0 + k];
        if (v != cur_line) begin
          if (cur_line >= 0 && cur_line < 165)
            check(per_line >= 208, $sformatf("line %0d: %0d pixels", cur_line, per_line));
          cur_line = v; next_col = 0; lead = 0; per_line = 0;
          if (v < 165) lines_with_data++;
        end
        if (v < 165) begin
          if (tl < 0 && next_col == 0 && lead == 0) begin
            lead = 1;   // one sample of the cleared serial register
          end else begin
            check(tl == v && tc == next_col,
                  $sformatf("sample %0d of line %0d from CCD (%0d,%0d)", per_line, v, tl, tc));
            next_col++; per_line++;
          end
        end
      end
      check(lines_with_data == 163, $sformatf("%0d CCD lines read", lines_with_data));
      // packing: word k = samples 4k..4k+3, first in the low nibble
      check(words.size() == nsamp / 4, $sformatf("%0d words for %0d samples", words.size(), nsamp));
      for (int w = 0; w < words.size() && 4 * w + 3 < nsamp; w++) begin
        logic [15:0] e;
        for (int p = 0; p < 4; p++) e[p*4 +: 4] = u_ccd.q_d[s0 + 4*w + p];
        check(words[w] == e, $sformatf("word %0d = %h, expected %h", w, words[w], e));
      end
      // VRAM rows: transfer i stores the words shifted since transfer i-1
      for (int i = 1; i < words_at_xfer.size(); i++) begin
        int r, first, cnt_w;
        r = row_of_xfer[i]; first = words_at_xfer[i-1]; cnt_w = words_at_xfer[i] - first;
        if (r >= 2 && r < 165) begin
          check(cnt_w >= 51 && cnt_w <= 53, $sformatf("row %0d holds %0d words", r, cnt_w));
          for (int w = 0; w < cnt_w; w++)
            check(u_vram.mem[r][w] == words[first + w],
                  $sformatf("VRAM row %0d word %0d", r, w));
        end
      end
    end
    check(u_vram.n_write_xfer == 170, $sformatf("%0d write transfers", u_vram.n_write_xfer));

    // ---- display one frame with the monitor timing
    set_display_timing();
    @(negedge gclk); video_en = 1;
    displaying = 1;
    while (1) begin
      @(posedge gclk);
      if (hcount == htotal) begin
        check_display_line(int'(vcount));
        disp_pix.delete();
      end
      if (frame_end) break;
    end
    displaying = 0;
    @(negedge gclk); video_en = 0;
    repeat (20) @(posedge lclk1);
    check(u_vram.n_read_xfer >= 510, $sformatf("%0d read transfers", u_vram.n_read_xfer));
    check(u_vram.n_write_xfer == 170, "no write transfer in display mode");
    check(lines_checked > 100, $sformatf("%0d display lines checked", lines_checked));

    // ---- every mechanism happened
    check(n_du_set == 1,   $sformatf("DUDATE set %0d", n_du_set));
    check(n_du_reset == 1, $sformatf("DUDATE reset %0d", n_du_reset));
    check(n_srg > 30000,   $sformatf("SRG pulses %0d", n_srg));
    check(n_abg == 4,      $sformatf("ABG pulses %0d", n_abg));
    check(n_shift > 8000,  $sformatf("SHIFTclk words %0d", n_shift));
    check(n_pixels > 10000, $sformatf("palette pixels %0d", n_pixels));
    $display("mechanisms: dudate_set=%0d dudate_reset=%0d dumpclk=%0d iag=%0d srg=%0d abg=%0d shiftclk=%0d sr_to_mem=%0d mem_to_sr=%0d palette_pixels=%0d",
             n_du_set, n_du_reset, n_dump, n_iag, n_srg, n_abg, n_shift,
             u_vram.n_write_xfer, u_vram.n_read_xfer, n_pixels);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
