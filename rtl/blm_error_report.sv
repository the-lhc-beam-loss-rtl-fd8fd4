// blm_error_report: collects the outcome of every link check of the tunnel
// cards and presents it to software and as live signals.
//
// For each tunnel card and each error kind (see rcc_err_t: missing frame,
// 8b/10b error and CRC error per link, CRC mismatch between the links,
// signal selection leaving the normal case, tunnel status error) the block
// keeps a sticky flag and a saturating event counter. The live outputs
// (for front-panel TTL signals) show, per card, the flags of the frame
// pair checked last. Software reads a flag word or a counter through a
// small register port; clear_i resets flags and counters. That the link
// checks report their errors, for software or TTL outputs, follows the
// design description; the flags, counters and register map are this
// design's choice:
//   rd_addr_i = {card, 1'b0, 4'd0}    sticky flags of that card (NERR bits)
//   rd_addr_i = {card, 1'b1, kind}    event counter of that kind
// Read data appear one cycle after the address.
module blm_error_report
  import blm_pkg::*;
#(
  parameter int unsigned CNT_BITS = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NCARD-1:0]             valid_i,   // a frame pair was checked
  input  rcc_err_t [NCARD-1:0]         err_i,
  input  logic                         clear_i,
  output rcc_err_t [NCARD-1:0]         live_o,
  output rcc_err_t [NCARD-1:0]         sticky_o,
  input  logic [$clog2(NCARD)+4:0]     rd_addr_i,
  output logic [31:0]                  rd_data_o
);

  logic [CNT_BITS-1:0] cnt [NCARD][NERR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      live_o   <= '0;
      sticky_o <= '0;
      for (int c = 0; c < NCARD; c++)
        for (int k = 0; k < NERR; k++) cnt[c][k] <= '0;
    end else begin
      for (int c = 0; c < NCARD; c++) begin
        if (valid_i[c]) live_o[c] <= err_i[c];
        if (clear_i) begin
          sticky_o[c] <= '0;
          for (int k = 0; k < NERR; k++) cnt[c][k] <= '0;
        end else if (valid_i[c]) begin
          sticky_o[c] <= sticky_o[c] | err_i[c];
          for (int k = 0; k < NERR; k++)
            if (err_i[c][k] && cnt[c][k] != '1) cnt[c][k] <= cnt[c][k] + 1'b1;
        end
      end
    end
  end

  logic [$clog2(NCARD)-1:0] rcard;
  logic                     rsel;
  logic [3:0]               rkind;
  assign {rcard, rsel, rkind} = rd_addr_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_data_o <= '0;
    else if (!rsel)                       rd_data_o <= 32'(sticky_o[rcard]);
    else if (rkind < 4'(NERR))            rd_data_o <= 32'(cnt[rcard][rkind]);
    else                                  rd_data_o <= '0;
  end

endmodule
