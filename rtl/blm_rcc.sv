// blm_rcc: transmission check for one tunnel card (primary + redundant link).
//
// Every 40 us a tunnel card sends the same frame over two optical links.
// This block pairs the two frames, decodes both (8b/10b), checks the CRC of
// each, compares the two CRC fields, and lets the signal selection decide
// from these results whether to forward the primary, the redundant signal,
// or to request a beam dump. The forwarded frame's status word is checked
// for tunnel card errors, the redundant bits (frame number, card
// identifier, CRC) are dropped and the payload is split into the eight
// channels' counter and ADC values. Every check's outcome goes to the error
// reporting.
//
// Pairing (this design's choice): the two frames may arrive in different
// cycles. The first arrival opens a window of TIMEOUT cycles; the pair is
// processed when both are in or when the window closes. A frame that did
// not arrive counts as a failed CRC check of that link, and so does an
// 8b/10b error, so the decision table covers lost links too. With one frame
// missing there is nothing to compare, and the comparison counts as failed.
//
// Timing: out_valid_o pulses 2 cycles after the pair is complete (one
// register after decoding/CRC, one after selection). dump_o is valid with
// out_valid_o; when it is set the channel outputs must not be used.
module blm_rcc
  import blm_pkg::*;
#(
  parameter int unsigned TIMEOUT = 256  // cycles to wait for the second frame
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          a_valid_i,  // primary frame strobe
  input  logic [FRAME_ENC_W-1:0]        a_frame_i,
  input  logic                          b_valid_i,  // redundant frame strobe
  input  logic [FRAME_ENC_W-1:0]        b_frame_i,
  output logic                          out_valid_o,
  output logic [CH_PER_CARD-1:0][CNT_W-1:0] cnt_o,
  output logic [CH_PER_CARD-1:0][ADC_W-1:0] adc_o,
  output logic [STATUS_W-1:0]           status_o,
  output sel_t                          sel_o,
  output logic [3:0]                    case_o,     // decision table row
  output logic                          dump_o,
  output rcc_err_t                      err_o
);

  // ---- pairing -------------------------------------------------------------
  logic [FRAME_ENC_W-1:0] fa_q, fb_q;
  logic                   have_a, have_b;
  logic [$clog2(TIMEOUT+1)-1:0] timer;
  logic                   go;

  assign go = (have_a && have_b) ||
              ((have_a || have_b) && timer == ($bits(timer))'(TIMEOUT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_a <= 1'b0;
      have_b <= 1'b0;
      timer  <= '0;
    end else begin
      have_a <= (have_a && !go) || a_valid_i;
      have_b <= (have_b && !go) || b_valid_i;
      if (go || !(have_a || have_b)) timer <= '0;
      else                           timer <= timer + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (a_valid_i) fa_q <= a_frame_i;
    if (b_valid_i) fb_q <= b_frame_i;
  end

  // ---- stage 1: decode and check both signals ------------------------------
  logic [FRAME_W-1:0] da, db;
  logic               dec_err_a, dec_err_b;
  logic [31:0]        crc_rx_a, crc_rx_b;
  logic               crc_ok_a, crc_ok_b;

  blm_8b10b_decoder u_dec_a (.frame_i(fa_q), .data_o(da), .err_sym_o(), .err_o(dec_err_a));
  blm_8b10b_decoder u_dec_b (.frame_i(fb_q), .data_o(db), .err_sym_o(), .err_o(dec_err_b));
  blm_crc_check     u_crc_a (.frame_i(da), .crc_rx_o(crc_rx_a), .crc_calc_o(), .ok_o(crc_ok_a));
  blm_crc_check     u_crc_b (.frame_i(db), .crc_rx_o(crc_rx_b), .crc_calc_o(), .ok_o(crc_ok_b));

  logic               s1_valid;
  logic [FRAME_W-1:0] s1_da, s1_db;
  logic               s1_ok_a, s1_ok_b, s1_cmp_ok;
  logic               s1_miss_a, s1_miss_b, s1_dec_a, s1_dec_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= go;
  end

  always_ff @(posedge clk) begin
    if (go) begin
      s1_da     <= da;
      s1_db     <= db;
      s1_miss_a <= !have_a;
      s1_miss_b <= !have_b;
      s1_dec_a  <= have_a && dec_err_a;
      s1_dec_b  <= have_b && dec_err_b;
      s1_ok_a   <= have_a && !dec_err_a && crc_ok_a;
      s1_ok_b   <= have_b && !dec_err_b && crc_ok_b;
      s1_cmp_ok <= have_a && have_b && (crc_rx_a == crc_rx_b);
    end
  end

  // ---- stage 2: select, check tunnel status, truncate and split ------------
  sel_t               sel;
  logic [3:0]         sel_case;
  logic               sel_err;
  logic [FRAME_W-1:0] fsel;
  logic [STATUS_W-1:0] status;

  blm_signal_select u_sel (
    .crc_ok_a_i(s1_ok_a), .crc_ok_b_i(s1_ok_b), .cmp_ok_i(s1_cmp_ok),
    .sel_o(sel), .case_o(sel_case), .err_o(sel_err)
  );

  assign fsel   = (sel == SEL_B) ? s1_db : s1_da;
  assign status = fsel[STATUS_MSB -: STATUS_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid_o <= 1'b0;
    else        out_valid_o <= s1_valid;
  end

  always_ff @(posedge clk) begin
    if (s1_valid) begin
      for (int c = 0; c < CH_PER_CARD; c++) begin
        cnt_o[c] <= fsel[CNT_MSB - CNT_W*c -: CNT_W];
        adc_o[c] <= fsel[ADC_MSB - ADC_W*c -: ADC_W];
      end
      status_o <= status;
      sel_o    <= sel;
      case_o   <= sel_case;
      dump_o   <= (sel == SEL_DUMP);
      err_o    <= '{missing_a: s1_miss_a, missing_b: s1_miss_b,
                    dec_a: s1_dec_a, dec_b: s1_dec_b,
                    crc_a: !s1_ok_a, crc_b: !s1_ok_b,
                    cmp: !s1_cmp_ok, sel: sel_err,
                    status: (sel != SEL_DUMP) && (status != '0)};
    end
  end

endmodule
