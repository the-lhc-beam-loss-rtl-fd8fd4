// blm_tb_pkg: reference models shared by the testbenches: an 8b/10b
// encoder written from the code tables (both disparity columns spelled
// out), a byte-wise CRC-32/MPEG-2, and a builder for the 32-byte frame
// of the tunnel cards. None of it is used by the design itself.
package blm_tb_pkg;
  import blm_pkg::*;

  // 5b/6b: {RD- code, RD+ code}, abcdei
  function automatic logic [11:0] t6(input int d);
    case (d)
      0: return {6'b100111,6'b011000};  1: return {6'b011101,6'b100010};
      2: return {6'b101101,6'b010010};  3: return {6'b110001,6'b110001};
      4: return {6'b110101,6'b001010};  5: return {6'b101001,6'b101001};
      6: return {6'b011001,6'b011001};  7: return {6'b111000,6'b000111};
      8: return {6'b111001,6'b000110};  9: return {6'b100101,6'b100101};
      10: return {6'b010101,6'b010101}; 11: return {6'b110100,6'b110100};
      12: return {6'b001101,6'b001101}; 13: return {6'b101100,6'b101100};
      14: return {6'b011100,6'b011100}; 15: return {6'b010111,6'b101000};
      16: return {6'b011011,6'b100100}; 17: return {6'b100011,6'b100011};
      18: return {6'b010011,6'b010011}; 19: return {6'b110010,6'b110010};
      20: return {6'b001011,6'b001011}; 21: return {6'b101010,6'b101010};
      22: return {6'b011010,6'b011010}; 23: return {6'b111010,6'b000101};
      24: return {6'b110011,6'b001100}; 25: return {6'b100110,6'b100110};
      26: return {6'b010110,6'b010110}; 27: return {6'b110110,6'b001001};
      28: return {6'b001110,6'b001110}; 29: return {6'b101110,6'b010001};
      30: return {6'b011110,6'b100001}; default: return {6'b101011,6'b010100};
    endcase
  endfunction

  // 3b/4b: {RD- code, RD+ code}, fghj; 7 gives the primary form
  function automatic logic [7:0] t4(input int d);
    case (d)
      0: return {4'b1011,4'b0100}; 1: return {4'b1001,4'b1001};
      2: return {4'b0101,4'b0101}; 3: return {4'b1100,4'b0011};
      4: return {4'b1101,4'b0010}; 5: return {4'b1010,4'b1010};
      6: return {4'b0110,4'b0110}; default: return {4'b1110,4'b0001};
    endcase
  endfunction

  // Encode one byte; rd is the running disparity (1 = positive), updated.
  function automatic logic [9:0] enc8b10b(input logic [7:0] b, inout logic rd);
    logic [11:0] e6; logic [7:0] e4; logic [5:0] c6; logic [3:0] c4;
    int x, y;
    x = b[4:0]; y = b[7:5];
    e6 = t6(x);
    c6 = rd ? e6[5:0] : e6[11:6];
    if (c6 != e6[5:0] || c6 != e6[11:6]) begin
      if (x != 7) rd = !rd;       // unbalanced codes flip the disparity
    end
    e4 = t4(y);
    c4 = rd ? e4[3:0] : e4[7:4];
    if (y == 7) begin
      if (!rd && (x == 17 || x == 18 || x == 20)) c4 = 4'b0111;
      if ( rd && (x == 11 || x == 13 || x == 14)) c4 = 4'b1000;
    end
    if (e4[3:0] != e4[7:4] && y != 3) rd = !rd;
    return {c6, c4};
  endfunction

  function automatic logic [FRAME_ENC_W-1:0] encode_frame(input logic [FRAME_W-1:0] f);
    logic rd;
    logic [FRAME_ENC_W-1:0] r;
    rd = 1'b0;
    for (int i = 0; i < FRAME_BYTES; i++)
      r[FRAME_ENC_W-1-10*i -: 10] = enc8b10b(f[FRAME_W-1-8*i -: 8], rd);
    return r;
  endfunction

  // CRC-32/MPEG-2, byte at a time
  function automatic logic [31:0] crc_bytes(input byte unsigned b[], input int n);
    logic [31:0] c;
    c = 32'hFFFFFFFF;
    for (int i = 0; i < n; i++) begin
      c = c ^ {b[i], 24'h0};
      repeat (8) c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
    end
    return c;
  endfunction

  // Assemble a decoded frame with a correct CRC.
  function automatic logic [FRAME_W-1:0] build_frame(
      input logic [7:0][7:0]  cnt,   // cnt[i] = channel i
      input logic [7:0][11:0] adc,
      input logic [15:0]      status,
      input logic [15:0]      fnum);
    byte unsigned b[];
    logic [95:0] adcbits;
    logic [31:0] c;
    logic [FRAME_W-1:0] f;
    b = new[32];
    b[0] = fnum[15:8]; b[1] = fnum[7:0];
    for (int i = 0; i < 8; i++) b[2+i] = cnt[i];
    for (int i = 0; i < 8; i++) adcbits[95-12*i -: 12] = adc[i];
    for (int i = 0; i < 12; i++) b[10+i] = adcbits[95-8*i -: 8];
    b[22] = status[15:8]; b[23] = status[7:0];
    b[24] = 8'hB1; b[25] = 8'h4C; b[26] = 8'h00; b[27] = 8'h01;
    c = crc_bytes(b, 28);
    b[28] = c[31:24]; b[29] = c[23:16]; b[30] = c[15:8]; b[31] = c[7:0];
    for (int i = 0; i < 32; i++) f[FRAME_W-1-8*i -: 8] = b[i];
    return f;
  endfunction

endpackage
