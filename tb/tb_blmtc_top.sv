// tb_blmtc_top: end-to-end test of the surface card analysis at its
// default sizes. Every 600 cycles (one "40 us" acquisition) both tunnel
// cards send a frame over both links. A reference model recomputes the
// combined detector data, all twelve running sums of all sixteen channels
// (from prefix sums of the accepted samples) and the expected dump and
// warning flags, and checks them after every acquisition.
// Mechanisms made to happen and counted: primary selected, redundant
// selected after a damaged primary, a missing primary (link timeout), an
// 8b/10b error, a tunnel status error, two links that disagree, a double
// link failure (dump), negative data clamped to zero, a warning, an
// unmaskable and a maskable threshold crossing, a beam-energy change that
// turns a loss from harmless into a dump, and reading an error counter.
module tb_blmtc_top;
  import blm_pkg::*;
  import blm_tb_pkg::*;

  localparam int PERIOD = 600;
  localparam int NFRAMES = 220;
  localparam int WIN [12] = '{1,2,8,16,64,256,2048,8192,32768,131072,524288,2097152};
  localparam int PER [12] = '{1,1,1,1,2,2,64,64,2048,2048,32768,32768};

  logic clk = 0, rst_n = 0;
  logic [1:0] pv, rv;
  logic [1:0][FRAME_ENC_W-1:0] pf, rf;
  logic [4:0] energy;
  logic twe, twsel, mwe, clr;
  logic [4:0] tl; logic [3:0] tc, tr; logic [31:0] td;
  logic [15:0] mask;
  logic um, mk, ldq;
  logic [15:0] dch, wch, rsd;
  rcc_err_t [1:0] elive, esticky;
  logic [5:0] raddr;
  logic [31:0] rdata;
  logic [15:0][11:0][31:0] rs;

  always #5 clk = !clk;

  blmtc_top dut (.clk, .rst_n, .pri_valid_i(pv), .pri_frame_i(pf), .red_valid_i(rv),
    .red_frame_i(rf), .energy_i(energy), .tbl_we_i(twe), .tbl_wsel_i(twsel),
    .tbl_level_i(tl), .tbl_ch_i(tc), .tbl_rs_i(tr), .tbl_data_i(td), .mask_we_i(mwe),
    .mask_i(mask), .clear_i(clr), .unmaskable_o(um), .maskable_o(mk), .dump_ch_o(dch),
    .warn_ch_o(wch), .link_dump_o(ldq), .err_live_o(elive), .err_sticky_o(esticky),
    .err_rd_addr_i(raddr), .err_rd_data_o(rdata), .rs_o(rs), .rs_done_o(rsd));

  int checks = 0, failures = 0;
  // mechanism counters
  int m_sel_a, m_sel_b, m_missing, m_code, m_status, m_differ, m_linkdump,
      m_clamp, m_warn, m_unmask, m_mask, m_energy, m_counter;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] thr_f(int l, int c, int r);
    return (r == 0 && l >= 16) ? 32'd900000 : 32'hFFFF_FFFF;
  endfunction
  function automatic logic [31:0] warn_f(int l, int c, int r);
    return (r == 0) ? 32'd600000 : 32'hFFFF_FFFF;
  endfunction

  longint unsigned pre [16][$];
  int prev_adc [16];
  bit has_prev [16];

  function automatic longint unsigned ref_rs(int ch, int k);
    int n, nr, lo;
    longint unsigned s;
    n = pre[ch].size() - 1;
    nr = (n / PER[k]) * PER[k];
    lo = nr - WIN[k]; if (lo < 0) lo = 0;
    s = pre[ch][nr] - pre[ch][lo];
    return (s > 64'hFFFF_FFFF) ? 64'hFFFF_FFFF : s;
  endfunction

  task automatic accept(int ch, int cnt, int adc);
    int v;
    v = has_prev[ch] ? cnt * 4096 + adc - prev_adc[ch] : cnt * 4096;
    if (v < 0) begin v = 0; m_clamp++; end
    prev_adc[ch] = adc; has_prev[ch] = 1;
    pre[ch].push_back(pre[ch][$] + longint'(v));
  endtask

  initial begin
    logic [15:0] exp_d, exp_w, m;
    bit exp_ld;
    int crc_a_count;
    m_sel_a = 0; m_sel_b = 0; m_missing = 0; m_code = 0; m_status = 0; m_differ = 0;
    m_linkdump = 0; m_clamp = 0; m_warn = 0; m_unmask = 0; m_mask = 0; m_energy = 0;
    m_counter = 0; crc_a_count = 0;
    pv = 0; rv = 0; pf = '0; rf = '0; energy = 5; twe = 0; twsel = 0; mwe = 0; clr = 0;
    tl = 0; tc = 0; tr = 0; td = 0; mask = 0; raddr = 0;
    for (int c = 0; c < 16; c++) begin pre[c].push_back(0); has_prev[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load the tables
    for (int l = 0; l < NLEVEL; l++)
      for (int c = 0; c < NCH; c++)
        for (int r = 0; r < NRS; r++) begin
          twe = 1; tl = 5'(l); tc = 4'(c); tr = 4'(r);
          twsel = 0; td = thr_f(l, c, r); @(negedge clk);
          twsel = 1; td = warn_f(l, c, r); @(negedge clk);
        end
    twe = 0;
    m = 16'hFF00;                 // card 1 channels maskable
    mask = m; mwe = 1; @(negedge clk); mwe = 0;
    exp_d = 0; exp_w = 0; exp_ld = 0;

    for (int n = 0; n < NFRAMES; n++) begin
      logic [1:0][7:0][7:0] cnt;
      logic [1:0][7:0][11:0] adc;
      logic [1:0][FRAME_W-1:0] f;
      logic [1:0] accepted;
      bit clear_now;
      logic [4:0] old_energy;
      old_energy = energy;
      energy = (n < 55) ? 5'd5 : 5'd20;
      clear_now = (n == 50 || n == 70 || n == 90 || n == 152 || n == 162);
      if (clear_now) begin
        clr = 1; @(negedge clk); clr = 0;
        exp_d = 0; exp_w = 0; exp_ld = 0;
        crc_a_count = 0;   // clear also resets the error counters
      end
      for (int c = 0; c < 2; c++) begin
        for (int i = 0; i < 8; i++) begin
          cnt[c][i] = 8'($urandom_range(50));
          adc[c][i] = 12'($urandom);
        end
        // channel 7: no counts and a falling integrator voltage
        cnt[0][7] = 0; adc[0][7] = (n % 2) ? 12'd50 : 12'd100;
        f[c] = build_frame(cnt[c], adc[c], (c == 1 && n % 17 == 9) ? 16'h0004 : 16'h0000, 16'(n));
      end
      // losses: channel 3 at n=40 (low energy) and n=60; channel 12 at n=80
      if (n == 40 || n == 60) begin
        cnt[0][3] = 8'd240;
        f[0] = build_frame(cnt[0], adc[0], 16'h0000, 16'(n));
      end
      if (n == 80) begin
        cnt[1][4] = 8'd240;
        f[1] = build_frame(cnt[1], adc[1], 16'h0000, 16'(n));
      end
      // drive the links
      accepted = 2'b11;
      for (int c = 0; c < 2; c++) begin
        logic [FRAME_W-1:0] bad;
        logic [FRAME_ENC_W-1:0] ep, er;
        bad = f[c]; bad[100 + n % 50] ^= 1'b1;
        ep = encode_frame(f[c]); er = ep;
        if (c == 0 && n % 10 == 3) ep = encode_frame(bad);            // damaged primary
        if (c == 0 && n % 10 == 7) ep[10*(n % 28) + 40 +: 10] = 10'h000; // code error
        if (c == 0 && n == 150) begin ep = encode_frame(bad); er = ep; end
        if (c == 1 && n == 160) er = encode_frame(build_frame(cnt[c], adc[c], 16'h0, 16'(n + 1)));
        if (c == 0 && (n == 150)) accepted[c] = 0;
        if (c == 1 && (n == 160)) accepted[c] = 0;
        pf[c] = ep; rf[c] = er;
      end
      pv = (n % 10 == 5) ? 2'b01 : 2'b11;   // card 1 primary missing
      rv = 2'b11;
      @(negedge clk);
      pv = 0; rv = 0; pf = '0; rf = '0;
      for (int c = 0; c < 2; c++)
        if (accepted[c]) for (int i = 0; i < 8; i++) accept(8*c + i, cnt[c][i], adc[c][i]);
      if (!accepted[0] || !accepted[1]) exp_ld = 1;
      // live link flags arrive a few cycles later
      repeat (4) @(negedge clk);
      if (n % 10 != 5) begin
        check(elive[0].crc_a == (n % 10 == 3 || n % 10 == 7 || n == 150), "card 0 crc_a flag");
        if (!elive[0].crc_a) m_sel_a++;
        else if (!elive[0].crc_b) m_sel_b++;
        if (elive[0].crc_a) crc_a_count++;
        if (elive[0].dec_a) m_code++;
        if (elive[0].crc_a && elive[0].crc_b) m_linkdump++;
        if (elive[1].cmp && !elive[1].crc_a && !elive[1].crc_b) m_differ++;
        if (elive[1].status) m_status++;
      end
      repeat (PERIOD - 5) @(negedge clk);
      if (n % 10 == 5) begin
        check(elive[1].missing_a && !elive[1].crc_b, "card 1 primary missing");
        m_missing++;
      end
      // expected comparator results for the energy of this acquisition
      for (int c = 0; c < 16; c++)
        for (int r = 0; r < 12; r++) begin
          if (ref_rs(c, r) > thr_f(energy, c, r)) exp_d[c] = 1;
          if (ref_rs(c, r) > warn_f(energy, c, r)) exp_w[c] = 1;
        end
      for (int c = 0; c < 16; c++)
        for (int r = 0; r < 12; r++)
          check(64'(rs[c][r]) == ref_rs(c, r),
                $sformatf("n=%0d ch%0d RS%0d got %0d exp %0d", n, c, r, rs[c][r], ref_rs(c, r)));
      check(dch === exp_d, $sformatf("n=%0d dump flags %h exp %h", n, dch, exp_d));
      check(wch === exp_w, $sformatf("n=%0d warn flags %h exp %h", n, wch, exp_w));
      check(ldq === exp_ld, "link dump flag");
      check(um === (|(exp_d & ~m) || exp_ld), "unmaskable output");
      check(mk === |(exp_d & m), "maskable output");
      if (n == 40 && wch[3] && !dch[3]) m_energy++;       // harmless at low energy
      if (n == 60 && dch[3] && um) begin m_energy++; m_unmask++; end
      if (n == 80 && dch[12] && mk && !um) m_mask++;
      if (|wch) m_warn++;
    end
    // read the crc_a counter of card 0 through the register port
    raddr = {1'b0, 1'b1, 4'd4};     // kind 4 = crc_a: bit 4 of rcc_err_t
    @(negedge clk); @(negedge clk);
    check(rdata == 32'(crc_a_count), $sformatf("crc_a counter %0d exp %0d", rdata, crc_a_count));
    if (rdata > 0) m_counter++;

    $display("mechanisms: selA=%0d selB=%0d missing=%0d code=%0d status=%0d differ=%0d linkdump=%0d clamp=%0d warn=%0d unmask=%0d mask=%0d energy=%0d counter=%0d",
             m_sel_a, m_sel_b, m_missing, m_code, m_status, m_differ, m_linkdump, m_clamp,
             m_warn, m_unmask, m_mask, m_energy, m_counter);
    check(m_sel_a > 0, "primary selected");
    check(m_sel_b > 0, "redundant selected");
    check(m_missing > 0, "missing frame");
    check(m_code > 0, "8b/10b error");
    check(m_status > 0, "status error");
    check(m_differ > 0, "links differ");
    check(m_linkdump > 0, "double link failure");
    check(m_clamp > 0, "negative data clamped");
    check(m_warn > 0, "warning");
    check(m_unmask > 0, "unmaskable crossing");
    check(m_mask > 0, "maskable crossing");
    check(m_energy == 2, "energy dependence");
    check(m_counter > 0, "error counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * PERIOD + 50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
