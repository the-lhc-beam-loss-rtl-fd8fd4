// tb_blm_tc: loads random thresholds and warnings for all levels, then
// runs scans with random running sums and beam energy levels, checking the
// per-channel dump and warning results, the split into maskable and
// unmaskable outputs, the scan length (NCH*NRS+1 cycles), a start that
// arrives during a scan, and a link failure.
module tb_blm_tc;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, twe, twsel, mwe, ld, clr;
  logic [4:0] energy, tl;
  logic [3:0] tc, tr;
  logic [31:0] td;
  logic [15:0] mask;
  logic [15:0][11:0][31:0] rs;
  logic um, mk, ldq, busy, done;
  logic [15:0] dch, wch, mq;
  int checks = 0, failures = 0, n_um = 0, n_mk = 0, n_pending = 0;

  always #5 clk = !clk;

  blm_tc dut (.clk, .rst_n, .start_i(start), .energy_i(energy), .rs_i(rs),
    .tbl_we_i(twe), .tbl_wsel_i(twsel), .tbl_level_i(tl), .tbl_ch_i(tc), .tbl_rs_i(tr),
    .tbl_data_i(td), .mask_we_i(mwe), .mask_i(mask), .link_dump_i(ld), .clear_i(clr),
    .unmaskable_o(um), .maskable_o(mk), .dump_ch_o(dch), .warn_ch_o(wch),
    .link_dump_o(ldq), .mask_o(mq), .busy_o(busy), .done_o(done));

  logic [31:0] thr [32][16][12];
  logic [31:0] wrn [32][16][12];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic scan_and_check(input logic [15:0] m);
    logic [15:0] ed, ew;
    int lat;
    ed = 0; ew = 0;
    for (int c = 0; c < 16; c++)
      for (int r = 0; r < 12; r++) begin
        if (rs[c][r] > thr[energy][c][r]) ed[c] = 1;
        if (rs[c][r] > wrn[energy][c][r]) ew[c] = 1;
      end
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 1000) begin @(negedge clk); lat++; end
    check(lat == 16 * 12 + 1, $sformatf("scan length %0d", lat));
    repeat (3) @(negedge clk);
    check(dch === ed, $sformatf("dump flags %h exp %h", dch, ed));
    check(wch === ew, "warning flags");
    check(um === |(ed & ~m), "unmaskable");
    check(mk === |(ed & m), "maskable");
    if (um) n_um++;
    if (mk) n_mk++;
  endtask

  initial begin
    logic [15:0] m;
    start = 0; twe = 0; twsel = 0; mwe = 0; ld = 0; clr = 0; energy = 0;
    tl = 0; tc = 0; tr = 0; td = 0; mask = 0; rs = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 32; l++)
      for (int c = 0; c < 16; c++)
        for (int r = 0; r < 12; r++) begin
          thr[l][c][r] = 32'($urandom_range(2000000, 990000) + l * 1000);
          wrn[l][c][r] = 32'($urandom_range(990000, 900000));
          twe = 1; tl = 5'(l); tc = 4'(c); tr = 4'(r);
          twsel = 0; td = thr[l][c][r]; @(negedge clk);
          twsel = 1; td = wrn[l][c][r]; @(negedge clk);
        end
    twe = 0;
    for (int n = 0; n < 60; n++) begin
      m = 16'($urandom);
      mask = m; mwe = 1; clr = 1;
      @(negedge clk);
      mwe = 0; clr = 0;
      energy = 5'($urandom);
      for (int c = 0; c < 16; c++)
        for (int r = 0; r < 12; r++)
          rs[c][r] = ($urandom_range(40) == 0) ? 32'($urandom_range(2100000, 950000))
                                               : 32'($urandom_range(800000));
      scan_and_check(m);
    end
    check(n_um > 0 && n_mk > 0, "both outputs raised");
    // a start during a scan is served afterwards
    clr = 1; @(negedge clk); clr = 0;
    rs = '0;
    start = 1; @(negedge clk); start = 0;
    repeat (20) @(negedge clk);
    rs[3][7] = 32'hFFFF_FFFF;
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    check(busy === 1'b1, "second scan follows");
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    check(dch === 16'h0008, "pending scan saw new sums");
    // link failure is always unmaskable
    mask = '1; mwe = 1; clr = 1; @(negedge clk); mwe = 0; clr = 0;
    ld = 1; @(negedge clk); ld = 0;
    repeat (2) @(negedge clk);
    check(um === 1 && ldq === 1 && mk === 0, "link failure unmaskable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
