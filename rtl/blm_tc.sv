// blm_tc: threshold comparator. Compares every running sum of every
// channel with the limit chosen by the present beam energy, and turns the
// results into the maskable and unmaskable dump requests.
//
// After each new set of running sums (start_i) the block samples the beam
// energy level and scans the NCH x NRS sums one per cycle: it reads the
// threshold and warning of (level, channel, sum) from the threshold table
// and, one cycle later, compares. A sum higher than its threshold raises
// the channel's dump request, a sum higher than its warning level its
// warning; the masking block holds these and drives the two outputs.
// One comparator serves all sums in turn (this design's choice, since a
// scan of 192 cycles is far shorter than the 40 us sample period). A start
// that arrives during a scan is remembered and served right after it.
//
// Timing: a scan takes NCH*NRS+1 cycles after start_i; done_o pulses with
// the last comparison; the outputs follow two cycles later.
module blm_tc
  import blm_pkg::*;
#(
  parameter int unsigned NCH_P = NCH
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start_i,
  input  logic [ENERGY_W-1:0]             energy_i,
  input  logic [NCH_P-1:0][NRS-1:0][RS_W-1:0] rs_i,
  // table loading
  input  logic                            tbl_we_i,
  input  logic                            tbl_wsel_i,  // 0 threshold, 1 warning
  input  logic [ENERGY_W-1:0]             tbl_level_i,
  input  logic [$clog2(NCH_P)-1:0]        tbl_ch_i,
  input  logic [$clog2(NRS)-1:0]          tbl_rs_i,
  input  logic [THR_W-1:0]                tbl_data_i,
  input  logic                            mask_we_i,
  input  logic [NCH_P-1:0]                mask_i,
  // link failures and operator clear
  input  logic                            link_dump_i,
  input  logic                            clear_i,
  // results
  output logic                            unmaskable_o,
  output logic                            maskable_o,
  output logic [NCH_P-1:0]                dump_ch_o,
  output logic [NCH_P-1:0]                warn_ch_o,
  output logic                            link_dump_o,
  output logic [NCH_P-1:0]                mask_o,
  output logic                            busy_o,
  output logic                            done_o
);

  localparam int unsigned CW = $clog2(NCH_P);
  localparam int unsigned RW = $clog2(NRS);

  logic                busy, pending;
  logic [ENERGY_W-1:0] level;
  logic [CW-1:0]       ch;
  logic [RW-1:0]       rs;
  logic                last;
  // comparison stage
  logic                c_valid, c_last;
  logic [CW-1:0]       c_ch;
  logic [RW-1:0]       c_rs;
  logic [THR_W-1:0]    thr, warn;

  assign last = (ch == CW'(NCH_P - 1)) && (rs == RW'(NRS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      pending <= 1'b0;
      level   <= '0;
      ch      <= '0;
      rs      <= '0;
      c_valid <= 1'b0;
      c_last  <= 1'b0;
      c_ch    <= '0;
      c_rs    <= '0;
    end else begin
      c_valid <= busy;
      c_last  <= busy && last;
      c_ch    <= ch;
      c_rs    <= rs;
      if (!busy) begin
        if (start_i || pending) begin
          busy    <= 1'b1;
          pending <= 1'b0;
          level   <= energy_i;
          ch      <= '0;
          rs      <= '0;
        end
      end else begin
        if (start_i) pending <= 1'b1;
        if (last) begin
          busy <= 1'b0;
        end else if (rs == RW'(NRS - 1)) begin
          rs <= '0;
          ch <= ch + 1'b1;
        end else begin
          rs <= rs + 1'b1;
        end
      end
    end
  end

  blm_threshold_table #(.NCH_P(NCH_P)) u_table (
    .clk,
    .we_i(tbl_we_i), .wsel_i(tbl_wsel_i), .wlevel_i(tbl_level_i),
    .wch_i(tbl_ch_i), .wrs_i(tbl_rs_i), .wdata_i(tbl_data_i),
    .re_i(busy), .rlevel_i(level), .rch_i(ch), .rrs_i(rs),
    .thr_o(thr), .warn_o(warn)
  );

  // the comparators
  logic [RS_W-1:0]  cur;
  logic [NCH_P-1:0] dump_set, warn_set;
  assign cur = rs_i[c_ch][c_rs];
  always_comb begin
    dump_set = '0;
    warn_set = '0;
    if (c_valid) begin
      dump_set[c_ch] = (cur > thr);
      warn_set[c_ch] = (cur > warn);
    end
  end

  blm_masking #(.NCH_P(NCH_P)) u_mask (
    .clk, .rst_n,
    .mask_we_i, .mask_i,
    .dump_set_i(dump_set), .warn_set_i(warn_set),
    .link_dump_i, .clear_i,
    .mask_o, .dump_ch_o, .warn_ch_o, .link_dump_o,
    .unmaskable_o, .maskable_o
  );

  assign busy_o = busy;
  assign done_o = c_last;

endmodule
