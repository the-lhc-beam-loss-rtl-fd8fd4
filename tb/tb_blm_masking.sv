// tb_blm_masking: random masks and request patterns against a model of
// the held requests and the two outputs; covers clear, link failure,
// warnings and the one-cycle output delay.
module tb_blm_masking;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic mwe, ld, clr;
  logic [15:0] mask, dset, wset, mask_q, dq, wq;
  logic ldq, um, mk;
  int checks = 0, failures = 0, n_um = 0, n_mk = 0;

  always #5 clk = !clk;

  blm_masking dut (.clk, .rst_n, .mask_we_i(mwe), .mask_i(mask), .dump_set_i(dset),
    .warn_set_i(wset), .link_dump_i(ld), .clear_i(clr), .mask_o(mask_q),
    .dump_ch_o(dq), .warn_ch_o(wq), .link_dump_o(ldq), .unmaskable_o(um), .maskable_o(mk));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [15:0] m, hd, hw;
    bit hl;
    mwe = 0; ld = 0; clr = 0; mask = 0; dset = 0; wset = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(um === 0 && mk === 0 && mask_q === 0, "reset state");
    m = 0; hd = 0; hw = 0; hl = 0;
    for (int n = 0; n < 2000; n++) begin
      mwe = ($urandom_range(9) == 0); mask = 16'($urandom);
      dset = ($urandom_range(3) == 0) ? 16'(1 << $urandom_range(15)) : '0;
      wset = ($urandom_range(3) == 0) ? 16'(1 << $urandom_range(15)) : '0;
      ld = ($urandom_range(60) == 0);
      clr = ($urandom_range(20) == 0);
      @(negedge clk);
      if (mwe) m = mask;
      if (clr) begin hd = 0; hw = 0; hl = 0; end
      else begin hd |= dset; hw |= wset; hl |= ld; end
      check(dq === hd && wq === hw && ldq === hl && mask_q === m, "held state");
      mwe = 0; dset = 0; wset = 0; ld = 0; clr = 0;
      @(negedge clk);
      check(um === (|(hd & ~m) || hl), "unmaskable output");
      check(mk === |(hd & m), "maskable output");
      if (um) n_um++;
      if (mk) n_mk++;
    end
    check(n_um > 0 && n_mk > 0, "both outputs exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
