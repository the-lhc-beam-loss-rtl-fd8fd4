// blm_threshold_table: threshold and warning levels for every channel,
// running sum and beam energy level.
//
// Quench and damage limits depend on the loss duration and on the beam
// energy, so each of the NCH x NRS running sums has its own limit for each
// of the NLEVEL energy levels, and a lower warning level beside it. The
// tables are kept in the non-volatile memory of the mezzanine card and
// copied into this on-chip memory; the copy arrives through the write port
// (from the non-volatile memory, the front panel or the VME host: which
// source drives it is decided outside). The organisation (32 levels, each
// with thresholds and warnings, 32-bit values) follows the design
// description; the address layout is this design's:
//     index = (level * NCH + channel) * NRS + running_sum
//
// Two simple dual-port memories of NLEVEL*NCH*NRS words. Reads are
// synchronous: thr_o/warn_o hold the entry addressed in the previous cycle
// with re_i set. The memories are not reset; they must be loaded before use.
module blm_threshold_table
  import blm_pkg::*;
#(
  parameter int unsigned NCH_P = NCH
) (
  input  logic                        clk,
  // load port
  input  logic                        we_i,
  input  logic                        wsel_i,   // 0: threshold, 1: warning
  input  logic [ENERGY_W-1:0]         wlevel_i,
  input  logic [$clog2(NCH_P)-1:0]    wch_i,
  input  logic [$clog2(NRS)-1:0]      wrs_i,
  input  logic [THR_W-1:0]            wdata_i,
  // lookup port
  input  logic                        re_i,
  input  logic [ENERGY_W-1:0]         rlevel_i,
  input  logic [$clog2(NCH_P)-1:0]    rch_i,
  input  logic [$clog2(NRS)-1:0]      rrs_i,
  output logic [THR_W-1:0]            thr_o,
  output logic [THR_W-1:0]            warn_o
);

  localparam int unsigned DEPTH = NLEVEL * NCH_P * NRS;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [THR_W-1:0] thr_mem  [DEPTH];
  logic [THR_W-1:0] warn_mem [DEPTH];

  function automatic logic [AW-1:0] index(input logic [ENERGY_W-1:0] lv,
                                          input logic [$clog2(NCH_P)-1:0] ch,
                                          input logic [$clog2(NRS)-1:0] rs);
    return AW'((AW'(lv) * AW'(NCH_P) + AW'(ch)) * AW'(NRS) + AW'(rs));
  endfunction

  logic [AW-1:0] waddr, raddr;
  assign waddr = index(wlevel_i, wch_i, wrs_i);
  assign raddr = index(rlevel_i, rch_i, rrs_i);

  always_ff @(posedge clk) begin
    if (we_i && !wsel_i) thr_mem[waddr]  <= wdata_i;
    if (we_i &&  wsel_i) warn_mem[waddr] <= wdata_i;
    if (re_i) begin
      thr_o  <= thr_mem[raddr];
      warn_o <= warn_mem[raddr];
    end
  end

endmodule
