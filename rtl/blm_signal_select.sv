// blm_signal_select: chooses which of the two redundant link signals of a
// tunnel card is passed on, from the CRC checks and the CRC comparison.
//
// Decision table (A = primary, B = redundant):
//   CRC A  CRC B  A==B   result   meaning
//   error  error  any    dump     no usable signal
//   error  ok     any    B        A was damaged (data or CRC part)
//   ok     error  any    A        B was damaged (data or CRC part)
//   ok     ok     differ dump     both pass their CRC yet carry different
//                                 data: one of the tunnel counters is wrong
//   ok     ok     equal  A        both correct
// The table and its outcomes follow the design description. case_o numbers
// the table rows 1..8 in the order CRC A, CRC B, compare (error before ok),
// for error reporting. err_o is set for every outcome except "both correct".
// Combinational.
module blm_signal_select
  import blm_pkg::*;
(
  input  logic       crc_ok_a_i,  // primary passed decoding and CRC
  input  logic       crc_ok_b_i,  // redundant passed decoding and CRC
  input  logic       cmp_ok_i,    // CRC fields of A and B are equal
  output sel_t       sel_o,
  output logic [3:0] case_o,      // row of the table, 1..8
  output logic       err_o
);

  always_comb begin
    case ({crc_ok_a_i, crc_ok_b_i})
      2'b00:   sel_o = SEL_DUMP;
      2'b01:   sel_o = SEL_B;
      2'b10:   sel_o = SEL_A;
      default: sel_o = cmp_ok_i ? SEL_A : SEL_DUMP;
    endcase
    case_o = 4'd1 + {1'b0, crc_ok_a_i, crc_ok_b_i, cmp_ok_i};
    err_o  = !(crc_ok_a_i && crc_ok_b_i && cmp_ok_i);
  end

endmodule
