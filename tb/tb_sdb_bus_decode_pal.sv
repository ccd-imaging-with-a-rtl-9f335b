// tb_sdb_bus_decode_pal: applies random bus states and compares every
// output of the PAL with a reference that evaluates the PAL's sum-of-products
// equations (active-low outputs, feedback terms kept as state), including the
// shadow-RAM switch being held after its access and restored by RESET.
module tb_sdb_bus_decode_pal;
  logic reset, lclk2, refcyc_n, xfcyc_n, rasl, lal, trqe_n, la26, la25, la21, la20;
  logic ramoe_n, ramen, ramoff, mrcab_n, uartcs_n, romcs_n, dmras0_n, dmras1_n, lmras_n, flgclk_n;
  int checks = 0, failures = 0;
  logic m_ramen, m_mrcab;

  sdb_bus_decode_pal dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string n, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", n, got, exp); end
  endtask

  // reference: iterate the feedback equations until they settle
  task automatic model();
    logic nr, nm;
    for (int k = 0; k < 4; k++) begin
      logic ramoff_m;
      ramoff_m = !(reset | m_ramen);
      nr = !((la26 & !la25 & !la21 & la20 & refcyc_n & !rasl) | ramoff_m);
      nm = !((!la21 & lclk2 & lal) | (la20 & !lclk2) | (!m_mrcab & !lal));
      m_ramen = nr; m_mrcab = nm;
    end
  endtask

  int ram_off_seen, ram_on_seen;

  initial begin
    m_ramen = 1; m_mrcab = 1; ram_off_seen = 0; ram_on_seen = 0;
    {lclk2, refcyc_n, xfcyc_n, rasl, lal, trqe_n, la26, la25, la21, la20} = 10'b0111111000;
    reset = 1; #1 model(); #1;
    for (int i = 0; i < 3000; i++) begin
      logic [10:0] r;
      r = 11'($urandom);
      {lclk2, refcyc_n, xfcyc_n, rasl, lal, trqe_n, la26, la25, la21, la20} = r[9:0];
      reset = (i % 500 == 499);
      #1; model(); #1;
      check("flgclk", flgclk_n, !(!xfcyc_n & !rasl));
      check("lmras",  lmras_n,  !((!rasl & la26 & la25) | (!rasl & !refcyc_n)));
      check("dmras1", dmras1_n, !((!rasl & !la26 & !la25 & la20) | (!rasl & !refcyc_n) | (!rasl & !xfcyc_n)));
      check("dmras0", dmras0_n, !((!rasl & !la26 & !la25 & !la20) | (!rasl & !refcyc_n) | (!rasl & !xfcyc_n)));
      check("uartcs", uartcs_n, !(!rasl & !la26 & la25 & refcyc_n));
      check("ramen",  ramen,  m_ramen);
      check("ramoff", ramoff, !(reset | m_ramen));
      check("mrcab",  mrcab_n, m_mrcab);
      check("romcs",  romcs_n, !(la26 & la25 & la21 & la20 & !m_ramen & refcyc_n));
      check("ramoe",  ramoe_n, !((la26 & la25 & !m_ramen & !trqe_n) |
                                 (la26 & la25 & !la21 & !m_ramen & !trqe_n) |
                                 (la26 & la25 & !la20 & !m_ramen & !trqe_n)));
      if (!ramen) ram_off_seen++; else ram_on_seen++;
    end
    checks++;
    if (ram_off_seen == 0 || ram_on_seen == 0) begin
      failures++; $display("FAIL shadow-RAM switch not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
