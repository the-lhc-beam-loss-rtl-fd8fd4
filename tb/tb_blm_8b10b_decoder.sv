// tb_blm_8b10b_decoder: encodes random frames with the reference encoder
// and checks the decoded bytes; checks every byte value in all positions;
// then injects a non-code symbol, a control character and a symbol sent
// with the wrong disparity, each of which must be flagged.
module tb_blm_8b10b_decoder;
  import blm_pkg::*;
  import blm_tb_pkg::*;

  logic [FRAME_ENC_W-1:0] enc;
  logic [FRAME_W-1:0]     dec;
  logic [31:0]            esym;
  logic                   err;
  int checks = 0, failures = 0;

  blm_8b10b_decoder dut (.frame_i(enc), .data_o(dec), .err_sym_o(esym), .err_o(err));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [FRAME_W-1:0] f;
    // every byte value, 32 per frame, in sequence
    for (int base = 0; base < 256; base += 32) begin
      for (int i = 0; i < 32; i++) f[FRAME_W-1-8*i -: 8] = 8'(base + i);
      enc = encode_frame(f); #1;
      check(dec === f && !err, "all byte values");
    end
    // repeated bytes exercise both disparities of each value
    for (int v = 0; v < 256; v++) begin
      for (int i = 0; i < 32; i++) f[FRAME_W-1-8*i -: 8] = 8'(i % 2 ? v : v ^ 8'h5A);
      enc = encode_frame(f); #1;
      check(dec === f && !err, "alternating values");
    end
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 8; i++) f[FRAME_W-1-32*i -: 32] = $urandom;
      enc = encode_frame(f); #1;
      check(dec === f && err === 1'b0, "random frame");
      // an all-ones symbol is no code word
      enc[FRAME_ENC_W-1-10*5 -: 10] = 10'h3FF; #1;
      check(err === 1'b1 && esym[5] === 1'b1, "invalid symbol flagged");
    end
    // K28.5 (001111 1010) at negative disparity inside a frame
    f = '0;
    enc = encode_frame(f);
    enc[FRAME_ENC_W-1 -: 10] = 10'b0011111010; #1;
    check(err === 1'b1 && esym[0], "control character flagged");
    // D.0.0 sent in its RD+ form while RD- is expected (first symbol)
    enc = encode_frame(f);
    enc[FRAME_ENC_W-1 -: 10] = 10'b0110000100; #1;
    check(err === 1'b1 && esym[0], "disparity error flagged");
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
