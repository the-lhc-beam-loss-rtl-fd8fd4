// blm_pkg: sizes, frame layout, types and shared functions of the BLM surface
// analysis FPGA (BLMTC).
//
// The analysis card serves two tunnel cards of eight detector channels each.
// Every tunnel card sends the same 40 us acquisition frame over a primary and
// a redundant optical link. A frame is 32 bytes, 8b/10b coded into 320 bits.
// The 8-bit counter and 12-bit ADC widths, the 20-bit detector data, the
// twelve running sums, the 32-bit running-sum and threshold width, the 32
// beam energy levels (5-bit energy) and the 4-byte CRC follow the design
// description. The byte layout of the 32-byte frame, the CRC polynomial and
// the running-sum internal widths are this design's own choices:
//
//   byte  0..1   frame number (not checked)
//   byte  2..9   counter of channel 0..7, 8 bits each
//   byte 10..21  ADC of channel 0..7, 12 bits each, channel 0 first, MSB first
//   byte 22..23  tunnel card status word, a set bit is an error flag
//   byte 24..27  card identifier (not checked)
//   byte 28..31  CRC-32 over bytes 0..27
//
// Byte 0 is sent first. In the 256-bit decoded frame vector byte 0 sits in
// bits [255:248]; in the 320-bit coded vector symbol 0 sits in [319:310].
package blm_pkg;

  // ---- channel organisation ------------------------------------------------
  localparam int unsigned NCARD      = 2;    // tunnel cards per analysis card
  localparam int unsigned CH_PER_CARD = 8;   // detectors per tunnel card
  localparam int unsigned NCH        = NCARD * CH_PER_CARD;  // 16

  // ---- acquisition data ----------------------------------------------------
  localparam int unsigned CNT_W  = 8;    // CFC counter per 40 us
  localparam int unsigned ADC_W  = 12;   // integrator voltage ADC
  localparam int unsigned DATA_W = CNT_W + ADC_W;  // combined detector data, 20

  // ---- link frame ----------------------------------------------------------
  localparam int unsigned FRAME_BYTES = 32;
  localparam int unsigned FRAME_W     = 8 * FRAME_BYTES;   // 256 decoded
  localparam int unsigned FRAME_ENC_W = 10 * FRAME_BYTES;  // 320 coded
  localparam int unsigned CRC_BYTES   = 4;
  localparam int unsigned STATUS_W    = 16;
  localparam logic [31:0] CRC_POLY    = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_INIT    = 32'hFFFF_FFFF;

  // bit positions in the 256-bit decoded frame (byte b at [255-8b -: 8])
  localparam int unsigned CNT_MSB    = FRAME_W - 1 - 8 * 2;   // byte 2
  localparam int unsigned ADC_MSB    = FRAME_W - 1 - 8 * 10;  // byte 10
  localparam int unsigned STATUS_MSB = FRAME_W - 1 - 8 * 22;  // byte 22
  localparam int unsigned CRC_MSB    = FRAME_W - 1 - 8 * 28;  // byte 28

  // ---- running sums --------------------------------------------------------
  localparam int unsigned NRS  = 12;  // RS0..RS11 per channel
  localparam int unsigned RS_W = 32;  // width delivered to the comparators

  // ---- threshold comparator ------------------------------------------------
  localparam int unsigned ENERGY_W = 5;
  localparam int unsigned NLEVEL   = 2 ** ENERGY_W;   // 32 beam energy levels
  localparam int unsigned THR_W    = RS_W;

  // ---- link checking -------------------------------------------------------
  // Outcome of the signal selection (the decision table).
  typedef enum logic [1:0] {
    SEL_A    = 2'd0,   // forward the primary signal
    SEL_B    = 2'd1,   // forward the redundant signal
    SEL_DUMP = 2'd2    // no trustworthy signal: request a beam dump
  } sel_t;

  // Error flags produced for one tunnel card per processed frame.
  typedef struct packed {
    logic missing_a;  // primary frame did not arrive in time
    logic missing_b;  // redundant frame did not arrive in time
    logic dec_a;      // 8b/10b code or disparity error on primary
    logic dec_b;      // 8b/10b code or disparity error on redundant
    logic crc_a;      // CRC check failed on primary (includes dec/missing)
    logic crc_b;      // CRC check failed on redundant (includes dec/missing)
    logic cmp;        // the CRC fields of the two signals differ
    logic sel;        // signal selection had to leave the A/A-both-good case
    logic status;     // tunnel card reported an error in its status word
  } rcc_err_t;
  localparam int unsigned NERR = $bits(rcc_err_t);  // 9

  // CRC over the first 28 bytes of a decoded frame, MSB first, no
  // reflection, no final inversion (the CRC-32/MPEG-2 variant).
  function automatic logic [31:0] frame_crc(input logic [FRAME_W-1:0] f);
    logic [31:0] c;
    c = CRC_INIT;
    for (int i = FRAME_W - 1; i >= 8 * CRC_BYTES; i--) begin
      if (c[31] ^ f[i]) c = (c << 1) ^ CRC_POLY;
      else              c = c << 1;
    end
    return c;
  endfunction

endpackage
