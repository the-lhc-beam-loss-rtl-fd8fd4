// blm_masking: gathers the dump requests of all channels and splits them
// into the "unmaskable" and "maskable" outputs.
//
// Each channel is marked maskable or unmaskable in the masking table (one
// bit per channel, set = maskable). A dump request from a comparator is
// held per channel until clear_i, and drives the maskable output if the
// channel is maskable, the unmaskable output otherwise. A failed link pair
// (no trustworthy data from a tunnel card) always drives the unmaskable
// output. Warnings are held per channel in the same way but reach neither
// output.
//
// The two outputs, the masking table and its per-channel content follow the
// design description. This design's choices: requests are latched until
// cleared, the outputs are active-high dump requests, the table resets to
// "all unmaskable", and a link failure is treated as unmaskable.
// Outputs are registered: they follow a request by one cycle.
module blm_masking
  import blm_pkg::*;
#(
  parameter int unsigned NCH_P = NCH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mask_we_i,
  input  logic [NCH_P-1:0] mask_i,        // 1 = channel maskable
  input  logic [NCH_P-1:0] dump_set_i,    // comparator requests (pulses)
  input  logic [NCH_P-1:0] warn_set_i,
  input  logic             link_dump_i,   // link pair failure (pulse)
  input  logic             clear_i,       // operator reset of held requests
  output logic [NCH_P-1:0] mask_o,
  output logic [NCH_P-1:0] dump_ch_o,     // held requests per channel
  output logic [NCH_P-1:0] warn_ch_o,
  output logic             link_dump_o,   // held link failure
  output logic             unmaskable_o,
  output logic             maskable_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_o       <= '0;
      dump_ch_o    <= '0;
      warn_ch_o    <= '0;
      link_dump_o  <= 1'b0;
      unmaskable_o <= 1'b0;
      maskable_o   <= 1'b0;
    end else begin
      if (mask_we_i) mask_o <= mask_i;
      if (clear_i) begin
        dump_ch_o   <= '0;
        warn_ch_o   <= '0;
        link_dump_o <= 1'b0;
      end else begin
        dump_ch_o   <= dump_ch_o | dump_set_i;
        warn_ch_o   <= warn_ch_o | warn_set_i;
        link_dump_o <= link_dump_o | link_dump_i;
      end
      unmaskable_o <= |(dump_ch_o & ~mask_o) || link_dump_o;
      maskable_o   <= |(dump_ch_o & mask_o);
    end
  end

endmodule
