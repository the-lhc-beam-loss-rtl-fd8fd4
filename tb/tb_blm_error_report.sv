// tb_blm_error_report: random error patterns for both tunnel cards; checks
// live flags, sticky flags, every counter through the read port, and clear.
module tb_blm_error_report;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] v;
  rcc_err_t [1:0] e, live, sticky;
  logic clr;
  logic [5:0] addr;
  logic [31:0] rd;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  blm_error_report dut (.clk, .rst_n, .valid_i(v), .err_i(e), .clear_i(clr),
    .live_o(live), .sticky_o(sticky), .rd_addr_i(addr), .rd_data_o(rd));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int cnt [2][NERR];
  logic [NERR-1:0] st [2], lv [2];

  task automatic read_all();
    for (int c = 0; c < 2; c++) begin
      addr = {1'(c), 1'b0, 4'd0};
      @(negedge clk);
      check(rd === 32'(st[c]), "sticky word");
      for (int k = 0; k < NERR; k++) begin
        addr = {1'(c), 1'b1, 4'(k)};
        @(negedge clk);
        check(rd === 32'(cnt[c][k]), $sformatf("counter c%0d k%0d got %0d exp %0d", c, k, rd, cnt[c][k]));
      end
    end
  endtask

  initial begin
    v = 0; e = '0; clr = 0; addr = 0;
    for (int c = 0; c < 2; c++) begin st[c] = 0; lv[c] = 0; for (int k = 0; k < NERR; k++) cnt[c][k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      for (int n = 0; n < 400; n++) begin
        v = 2'($urandom);
        e[0] = NERR'($urandom & $urandom);
        e[1] = NERR'($urandom & $urandom);
        @(negedge clk);
        for (int c = 0; c < 2; c++) if (v[c]) begin
          lv[c] = e[c]; st[c] |= e[c];
          for (int k = 0; k < NERR; k++) if (e[c][k]) cnt[c][k]++;
        end
        check(live[0] === lv[0] && live[1] === lv[1], "live flags");
        check(sticky[0] === st[0] && sticky[1] === st[1], "sticky flags");
      end
      v = 0;
      read_all();
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int c = 0; c < 2; c++) begin st[c] = 0; for (int k = 0; k < NERR; k++) cnt[c][k] = 0; end
      read_all();
    end
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
