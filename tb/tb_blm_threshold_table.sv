// tb_blm_threshold_table: fills both tables with values computed from the
// address, reads every entry back and checks the one-cycle read latency,
// then overwrites random entries and checks the neighbours are untouched.
module tb_blm_threshold_table;
  import blm_pkg::*;

  logic clk = 0;
  logic we, wsel, re;
  logic [4:0] wl, rl;
  logic [3:0] wc, rc, wr, rr;
  logic [31:0] wd, thr, warn;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  blm_threshold_table dut (.clk, .we_i(we), .wsel_i(wsel), .wlevel_i(wl), .wch_i(wc),
    .wrs_i(wr), .wdata_i(wd), .re_i(re), .rlevel_i(rl), .rch_i(rc), .rrs_i(rr),
    .thr_o(thr), .warn_o(warn));

  function automatic logic [31:0] val(int l, int c, int r, bit w);
    return {w ? 8'hA5 : 8'h3C, 8'(l), 8'(c), 8'(r)} ^ 32'(l * 7919 + c * 104729);
  endfunction

  initial begin
    logic [31:0] over [int];
    we = 0; re = 0; wsel = 0; wl = 0; wc = 0; wr = 0; wd = 0; rl = 0; rc = 0; rr = 0;
    @(negedge clk);
    for (int w = 0; w < 2; w++)
      for (int l = 0; l < NLEVEL; l++)
        for (int c = 0; c < NCH; c++)
          for (int r = 0; r < NRS; r++) begin
            we = 1; wsel = w[0]; wl = 5'(l); wc = 4'(c); wr = 4'(r); wd = val(l, c, r, w[0]);
            @(negedge clk);
          end
    we = 0;
    for (int l = 0; l < NLEVEL; l++)
      for (int c = 0; c < NCH; c++)
        for (int r = 0; r < NRS; r++) begin
          re = 1; rl = 5'(l); rc = 4'(c); rr = 4'(r);
          @(negedge clk);
          re = 0; rl = 5'($urandom); rc = 4'($urandom);
          checks++;
          if (thr !== val(l, c, r, 0) || warn !== val(l, c, r, 1)) begin
            failures++;
            if (failures < 10) $display("FAIL l=%0d c=%0d r=%0d", l, c, r);
          end
          @(negedge clk);
          checks++;
          if (thr !== val(l, c, r, 0)) begin failures++; $display("FAIL hold without re"); end
        end
    // overwrite a threshold, neighbours unchanged
    we = 1; wsel = 0; wl = 5'd17; wc = 4'd9; wr = 4'd11; wd = 32'hDEAD_BEEF;
    @(negedge clk);
    we = 0;
    re = 1; rl = 5'd17; rc = 4'd9; rr = 4'd11;
    @(negedge clk);
    checks++;
    if (thr !== 32'hDEAD_BEEF || warn !== val(17, 9, 11, 1)) begin failures++; $display("FAIL overwrite"); end
    rr = 4'd10;
    @(negedge clk);
    checks++;
    if (thr !== val(17, 9, 10, 0)) begin failures++; $display("FAIL neighbour"); end
    rl = 5'd18; rr = 4'd11;
    @(negedge clk);
    checks++;
    if (thr !== val(18, 9, 11, 0)) begin failures++; $display("FAIL other level"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
