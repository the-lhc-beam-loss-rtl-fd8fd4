// tb_blm_crc_check: checks the frame CRC against a byte-wise reference,
// the published check value of CRC-32/MPEG-2 ("123456789" -> 0x0376E6E7),
// and that corrupted frames or CRC fields are rejected.
module tb_blm_crc_check;
  import blm_pkg::*;
  import blm_tb_pkg::*;

  logic [FRAME_W-1:0] f;
  logic [31:0] rx, calc;
  logic ok;
  int checks = 0, failures = 0;

  blm_crc_check dut (.frame_i(f), .crc_rx_o(rx), .crc_calc_o(calc), .ok_o(ok));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    byte unsigned s[];
    logic [7:0][7:0] cnt; logic [7:0][11:0] adc;
    s = new[9];
    foreach (s[i]) s[i] = 8'h31 + i;
    check(crc_bytes(s, 9) == 32'h0376E6E7, "reference check value");
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 8; i++) begin cnt[i] = $urandom; adc[i] = $urandom; end
      f = build_frame(cnt, adc, 16'($urandom), 16'(n));
      #1;
      check(ok === 1'b1, "good frame accepted");
      check(rx === f[31:0], "received field");
      check(calc === f[31:0], "computed CRC");
      f[$urandom_range(FRAME_W-1)] ^= 1'b1;   // one bit anywhere
      #1;
      check(ok === 1'b0, "single-bit error detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
