// tb_blm_rcc: drives frame pairs built and encoded by the reference models
// through the link checker and covers every row of the decision table,
// 8b/10b errors, a missing frame (timeout), skewed arrival and a tunnel
// status error. Checks selection, row number, error flags, the
// demultiplexed channel data and the latency (2 cycles after the pair is
// complete, TIMEOUT+1 cycles after a lone frame).
module tb_blm_rcc;
  import blm_pkg::*;
  import blm_tb_pkg::*;

  localparam int TO = 256;   // the default TIMEOUT of blm_rcc

  logic clk = 0, rst_n = 0;
  logic av, bv, ov, dump;
  logic [FRAME_ENC_W-1:0] af, bf;
  logic [7:0][7:0] cnt;
  logic [7:0][11:0] adc;
  logic [15:0] status;
  sel_t sel;
  logic [3:0] row;
  rcc_err_t err;
  int checks = 0, failures = 0;
  int rows_seen [9];

  always #5 clk = !clk;

  blm_rcc dut (.clk, .rst_n, .a_valid_i(av), .a_frame_i(af),
    .b_valid_i(bv), .b_frame_i(bf), .out_valid_o(ov), .cnt_o(cnt), .adc_o(adc),
    .status_o(status), .sel_o(sel), .case_o(row), .dump_o(dump), .err_o(err));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // send a pair: da/db are the encoded frames, sa/sb their send cycles
  // (-1 = never sent); exp_* the expected outcome; src the frame whose
  // payload should come out.
  task automatic run(input logic [FRAME_ENC_W-1:0] ea, input logic [FRAME_ENC_W-1:0] eb,
                     input int sa, input int sb, input sel_t exp_sel, input int exp_row,
                     input logic [FRAME_W-1:0] src, input int exp_lat, input string name);
    int t, tlast;
    t = 0; tlast = -1;
    while (!ov && t < 2000) begin
      av = (t == sa); bv = (t == sb);
      af = (t == sa) ? ea : $urandom;
      bf = (t == sb) ? eb : $urandom;
      if (t == sa || t == sb) tlast = t;
      @(negedge clk);
      av = 0; bv = 0;
      t++;
    end
    check(ov === 1'b1, {name, ": output"});
    check(t - 1 - tlast == exp_lat, $sformatf("%s: latency %0d exp %0d", name, t - 1 - tlast, exp_lat));
    check(sel === exp_sel, $sformatf("%s: sel %0d exp %0d", name, sel, exp_sel));
    check(int'(row) == exp_row, $sformatf("%s: row %0d exp %0d", name, row, exp_row));
    check(dump === (exp_sel == SEL_DUMP), {name, ": dump"});
    check(err.sel === (exp_row != 8), {name, ": select error flag"});
    rows_seen[row]++;
    if (exp_sel != SEL_DUMP)
      for (int c = 0; c < 8; c++) begin
        check(cnt[c] === src[FRAME_W-1-8*(2+c) -: 8], {name, ": counter"});
        check(adc[c] === src[FRAME_W-1-80-12*c -: 12], {name, ": adc"});
      end
    @(negedge clk);
    check(ov === 1'b0, {name, ": single pulse"});
    repeat (3) @(negedge clk);
  endtask

  function automatic logic [FRAME_W-1:0] rnd_frame(input logic [15:0] st);
    logic [7:0][7:0] c; logic [7:0][11:0] a;
    for (int i = 0; i < 8; i++) begin c[i] = $urandom; a[i] = $urandom; end
    return build_frame(c, a, st, 16'($urandom));
  endfunction

  initial begin
    logic [FRAME_W-1:0] f, g, fd, fc;
    logic [FRAME_ENC_W-1:0] e, ebad;
    av = 0; bv = 0; af = 0; bf = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20; n++) begin
      f = rnd_frame(16'h0000);
      e = encode_frame(f);
      fd = f; fd[FRAME_W-1-8*(2 + n % 20) - n % 8] ^= 1'b1;   // payload bit
      fc = f; fc[n % 32] ^= 1'b1;                           // CRC field bit
      g = rnd_frame(16'h0000);                              // other valid frame
      ebad = e; ebad[10*(n % 32) +: 10] = 10'h3FF;          // not a code word
      // row 8: both good, same cycle and skewed
      run(e, e, 0, 0, SEL_A, 8, f, 2, "both good");
      run(e, e, 3, 3 + n, SEL_A, 8, f, 2, "both good, skewed");
      // rows 4 and 3: A broken in data / CRC part
      run(encode_frame(fd), e, 0, 0, SEL_B, 4, f, 2, "A data error");
      check(err.crc_a && !err.crc_b && !err.cmp, "A data error flags");
      run(encode_frame(fc), e, 0, 1, SEL_B, 3, f, 2, "A CRC error");
      check(err.crc_a && err.cmp, "A CRC error flags");
      // rows 6 and 5: B broken
      run(e, encode_frame(fd), 0, 0, SEL_A, 6, f, 2, "B data error");
      run(e, encode_frame(fc), 1, 0, SEL_A, 5, f, 2, "B CRC error");
      check(err.crc_b && err.cmp && !err.crc_a, "B CRC error flags");
      // rows 2 and 1: both broken
      run(encode_frame(fd), encode_frame(fd), 0, 0, SEL_DUMP, 2, f, 2, "both data error");
      run(encode_frame(fd), encode_frame(fc), 0, 0, SEL_DUMP, 1, f, 2, "both broken");
      // row 7: both pass their CRC yet differ
      run(e, encode_frame(g), 0, 0, SEL_DUMP, 7, f, 2, "A and B differ");
      check(err.cmp && !err.crc_a && !err.crc_b, "differ flags");
      // 8b/10b error on A
      run(ebad, e, 0, 0, SEL_B, 3 + int'(n % 32 < 4 ? 0 : 1), f, 2, "A code error");
      check(err.dec_a && !err.dec_b, "code error flag");
      // missing frames: lone frame closes after the window
      run(e, e, -1, 0, SEL_B, 3, f, TO + 1, "A missing");
      check(err.missing_a && !err.missing_b, "missing A flag");
      run(e, e, 0, -1, SEL_A, 5, f, TO + 1, "B missing");
      check(err.missing_b, "missing B flag");
      // tunnel status error is reported, data still forwarded
      f = rnd_frame(16'h0040);
      run(encode_frame(f), encode_frame(f), 0, 0, SEL_A, 8, f, 2, "status error");
      check(err.status === 1'b1 && status === 16'h0040, "status flag");
    end
    for (int r = 1; r <= 8; r++) check(rows_seen[r] > 0, $sformatf("row %0d seen", r));
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
