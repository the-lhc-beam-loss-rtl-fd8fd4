// blmtc_top: the data analysis of one BLM surface card (BLMTC).
//
// The card receives the acquisitions of two tunnel cards, eight ionisation
// chambers each, every 40 us over a primary and a redundant optical link
// per tunnel card, and decides whether the beam must be dumped:
//
//   links -> blm_rcc (x2)                pair, decode, CRC check, select A/B
//         -> blm_data_combining (x16)    counter + ADC difference -> 20 bits
//         -> blm_successive_running_sums (x16)   RS0..RS11 per channel
//         -> blm_tc                      compare with energy-dependent
//                                         thresholds, mask, dump outputs
//   blm_rcc -> blm_error_report          sticky flags / counters for software
//
// This chain and its blocks follow the design description. The optical
// receivers, deserialisers and frame alignment come before link_*_i, and
// the VME interface, the non-volatile table memory and the acquisition
// memories are outside this module: their signals are the ports below.
// A link pair whose signals cannot be trusted yields no sample for that
// 40 us (the running sums skip it) and raises the held link failure, which
// drives the unmaskable output.
//
// Timing: a sample reaches the running sums 3 cycles after the second
// frame of a pair, the sums are final 6 cycles later, and the comparator
// scan then takes NCH*NRS+1 cycles; the dump outputs follow 2 cycles after
// the comparison that raised them.
module blmtc_top
  import blm_pkg::*;
#(
  parameter int unsigned LINK_TIMEOUT = 256
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // optical links, one primary and one redundant per tunnel card
  input  logic [NCARD-1:0]                  pri_valid_i,
  input  logic [NCARD-1:0][FRAME_ENC_W-1:0] pri_frame_i,
  input  logic [NCARD-1:0]                  red_valid_i,
  input  logic [NCARD-1:0][FRAME_ENC_W-1:0] red_frame_i,
  // beam energy level
  input  logic [ENERGY_W-1:0]               energy_i,
  // threshold / masking table loading
  input  logic                              tbl_we_i,
  input  logic                              tbl_wsel_i,
  input  logic [ENERGY_W-1:0]               tbl_level_i,
  input  logic [$clog2(NCH)-1:0]            tbl_ch_i,
  input  logic [$clog2(NRS)-1:0]            tbl_rs_i,
  input  logic [THR_W-1:0]                  tbl_data_i,
  input  logic                              mask_we_i,
  input  logic [NCH-1:0]                    mask_i,
  input  logic                              clear_i,
  // dump requests towards the combiner card
  output logic                              unmaskable_o,
  output logic                              maskable_o,
  output logic [NCH-1:0]                    dump_ch_o,
  output logic [NCH-1:0]                    warn_ch_o,
  output logic                              link_dump_o,
  // error reporting
  output rcc_err_t [NCARD-1:0]              err_live_o,
  output rcc_err_t [NCARD-1:0]              err_sticky_o,
  input  logic [$clog2(NCARD)+4:0]          err_rd_addr_i,
  output logic [31:0]                       err_rd_data_o,
  // running sums and sample strobe for logging
  output logic [NCH-1:0][NRS-1:0][RS_W-1:0] rs_o,
  output logic [NCH-1:0]                    rs_done_o
);

  logic [NCARD-1:0]                            rcc_valid, rcc_dump;
  logic [NCARD-1:0][CH_PER_CARD-1:0][CNT_W-1:0] rcc_cnt;
  logic [NCARD-1:0][CH_PER_CARD-1:0][ADC_W-1:0] rcc_adc;
  rcc_err_t [NCARD-1:0]                        rcc_err;
  logic [NCH-1:0]                              comb_valid;
  logic [NCH-1:0][DATA_W-1:0]                  comb_data;

  for (genvar c = 0; c < NCARD; c++) begin : g_card
    blm_rcc #(.TIMEOUT(LINK_TIMEOUT)) u_rcc (
      .clk, .rst_n,
      .a_valid_i(pri_valid_i[c]), .a_frame_i(pri_frame_i[c]),
      .b_valid_i(red_valid_i[c]), .b_frame_i(red_frame_i[c]),
      .out_valid_o(rcc_valid[c]), .cnt_o(rcc_cnt[c]), .adc_o(rcc_adc[c]),
      .status_o(), .sel_o(), .case_o(), .dump_o(rcc_dump[c]), .err_o(rcc_err[c])
    );
    for (genvar i = 0; i < CH_PER_CARD; i++) begin : g_ch
      localparam int unsigned K = c * CH_PER_CARD + i;
      blm_data_combining u_comb (
        .clk, .rst_n,
        .valid_i(rcc_valid[c] && !rcc_dump[c]),
        .cnt_i(rcc_cnt[c][i]), .adc_i(rcc_adc[c][i]),
        .valid_o(comb_valid[K]), .data_o(comb_data[K])
      );
      blm_successive_running_sums u_srs (
        .clk, .rst_n,
        .valid_i(comb_valid[K]), .data_i(comb_data[K]),
        .rs_o(rs_o[K]), .done_o(rs_done_o[K])
      );
    end
  end

  blm_tc u_tc (
    .clk, .rst_n,
    .start_i(|rs_done_o), .energy_i,
    .rs_i(rs_o),
    .tbl_we_i, .tbl_wsel_i, .tbl_level_i, .tbl_ch_i, .tbl_rs_i,
    .tbl_data_i(tbl_data_i),
    .mask_we_i, .mask_i,
    .link_dump_i(|(rcc_valid & rcc_dump)), .clear_i,
    .unmaskable_o, .maskable_o, .dump_ch_o, .warn_ch_o, .link_dump_o,
    .mask_o(), .busy_o(), .done_o()
  );

  blm_error_report u_err (
    .clk, .rst_n,
    .valid_i(rcc_valid), .err_i(rcc_err), .clear_i,
    .live_o(err_live_o), .sticky_o(err_sticky_o),
    .rd_addr_i(err_rd_addr_i), .rd_data_o(err_rd_data_o)
  );

endmodule
