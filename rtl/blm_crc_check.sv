// blm_crc_check: checks the CRC of one decoded 32-byte link frame.
//
// The tunnel card appends a 4-byte CRC to every frame. This block
// recomputes the CRC over the 28 payload bytes and compares it with the
// received CRC field. The received field is also passed out: the link
// checker compares the CRC fields of the primary and redundant signals to
// find out whether the two carry the same data, since the CRC is a compact
// signature of the whole payload.
//
// The 4-byte CRC and its two uses follow the design description; the
// polynomial 0x04C11DB7 with all-ones start value, MSB first, no reflection
// and no final inversion (CRC-32/MPEG-2) is this design's choice.
// Combinational.
module blm_crc_check
  import blm_pkg::*;
(
  input  logic [FRAME_W-1:0] frame_i,   // decoded frame, byte 0 on top
  output logic [31:0]        crc_rx_o,  // CRC field as received
  output logic [31:0]        crc_calc_o,// CRC computed over bytes 0..27
  output logic               ok_o       // received CRC matches
);

  assign crc_rx_o   = frame_i[CRC_MSB -: 32];
  assign crc_calc_o = frame_crc(frame_i);
  assign ok_o       = (crc_calc_o == crc_rx_o);

endmodule
