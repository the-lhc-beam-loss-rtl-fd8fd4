// blm_8b10b_decoder: decodes one 320-bit link frame (32 symbols of 10 bits)
// into its 32 data bytes and flags any coding error.
//
// The links use the standard 8b/10b code (5b/6b plus 3b/4b sub-blocks) so the
// receiver can recover the clock and the line stays DC balanced; the
// receiver reverses it here. Each 10-bit symbol "abcdei fghj" (a = bit 9) is
// looked up against the code table of the running disparity in force at that
// point. A 6-bit or 4-bit sub-block that is not a data code word of the
// expected disparity is a code error. K28.x control characters are errors
// inside a frame; K23/K27/K29/K30.7 share their sub-blocks with data
// characters and decode as D.x.7. The running disparity after each
// sub-block follows from its count of ones, so one bad symbol does not make
// the rest of the frame look wrong as well. Each frame is taken to start at negative running
// disparity (this design's convention for the frame boundary).
//
// Purely combinational: frame_i in, data_o/err_o out in the same cycle.
// err_sym_o marks which symbols were bad, for diagnostics.
module blm_8b10b_decoder
  import blm_pkg::*;
#(
  parameter int unsigned NSYM = FRAME_BYTES
) (
  input  logic [10*NSYM-1:0] frame_i,    // symbol 0 in the top 10 bits
  output logic [8*NSYM-1:0]  data_o,     // byte 0 in the top 8 bits
  output logic [NSYM-1:0]    err_sym_o,  // bit s set: symbol s was invalid
  output logic               err_o       // any symbol invalid
);

  // 5b/6b code word abcdei of data value EDCBA at negative running disparity.
  function automatic logic [5:0] code6_neg(input logic [4:0] d);
    case (d)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // At positive disparity an unbalanced word is inverted; the balanced
  // words keep their form, except D.07 whose two forms are 111000/000111.
  function automatic logic [5:0] code6(input logic [4:0] d, input logic rd_pos);
    logic [5:0] n;
    n = code6_neg(d);
    if (rd_pos && ($countones(n) != 3 || d == 5'd7)) return ~n;
    return n;
  endfunction

  // 3b/4b code word fghj of data value HGF at negative disparity (primary
  // form of x.7); positive disparity is handled like code6.
  function automatic logic [3:0] code4(input logic [2:0] d, input logic rd_pos);
    logic [3:0] n;
    case (d)
      3'd0: n = 4'b1011;  3'd1: n = 4'b1001;
      3'd2: n = 4'b0101;  3'd3: n = 4'b1100;
      3'd4: n = 4'b1101;  3'd5: n = 4'b1010;
      3'd6: n = 4'b0110;  default: n = 4'b1110;
    endcase
    if (rd_pos && ($countones(n) != 2 || d == 3'd3)) return ~n;
    return n;
  endfunction

  always_comb begin
    logic       rd_pos;      // running disparity, 1 = positive
    logic [9:0] sym;
    logic [5:0] c6;
    logic [3:0] c4;
    logic [4:0] d5;
    logic [2:0] d3;
    logic       ok6, ok4;
    rd_pos    = 1'b0;
    data_o    = '0;
    err_sym_o = '0;
    for (int s = 0; s < NSYM; s++) begin
      sym = frame_i[10*(NSYM-s)-1 -: 10];
      c6  = sym[9:4];
      c4  = sym[3:0];
      // 6-bit sub-block
      ok6 = 1'b0;
      d5  = '0;
      for (int v = 0; v < 32; v++) begin
        if (code6(5'(v), rd_pos) == c6) begin
          ok6 = 1'b1;
          d5  = 5'(v);
        end
      end
      if ($countones(c6) > 3)      rd_pos = 1'b1;
      else if ($countones(c6) < 3) rd_pos = 1'b0;
      // 4-bit sub-block; x.7 may use its alternate form 0111/1000
      ok4 = 1'b0;
      d3  = '0;
      for (int v = 0; v < 8; v++) begin
        if (code4(3'(v), rd_pos) == c4) begin
          ok4 = 1'b1;
          d3  = 3'(v);
        end
      end
      if (c4 == (rd_pos ? 4'b1000 : 4'b0111)) begin
        ok4 = 1'b1;
        d3  = 3'd7;
      end
      if ($countones(c4) > 2)      rd_pos = 1'b1;
      else if ($countones(c4) < 2) rd_pos = 1'b0;
      data_o[8*(NSYM-s)-1 -: 8] = {d3, d5};
      err_sym_o[s] = !(ok6 && ok4);
    end
  end

  assign err_o = |err_sym_o;

endmodule
