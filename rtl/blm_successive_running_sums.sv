// blm_successive_running_sums: the twelve running sums RS0..RS11 of one
// detector channel, covering 40 us up to 83.9 s of loss history.
//
// Keeping a 2^21-sample history per channel is far beyond the FPGA's
// memory. Instead five short shift-register stages are chained: the first
// holds raw samples, and each later stage stores, at a reduced rate, a sum
// already formed by the stage before it. Windows and refresh periods, in
// 40 us samples, are those of the design description:
//
//   stage  input (period)       sums (window, refresh)
//   SR1    data      (1)        RS0 1, RS1 2, RS2 8, RS3 16       refresh 1
//   SR2    RS1       (2)        RS4 64, RS5 256                   refresh 2
//   SR3    RS4       (64)       RS6 2048, RS7 8192                refresh 64
//   SR4    RS6       (2048)     RS8 32768, RS9 131072             refresh 2048
//   SR5    RS8       (32768)    RS10 524288, RS11 2097152         refresh 32768
//
// A sum refreshed every P samples covers the W samples ending at the last
// multiple of P, so the long sums lag the present by up to 1.31 s. Sums are
// exact internally (20 + log2(window) bits); this design's choice is to
// clamp them to RS_W = 32 bits at the output, the width the comparators
// use. The buffers hold 16+128+128+64+64 = 400 values per channel.
//
// Timing: a sample on valid_i ripples through one stage per cycle; rs_o
// holds the updated sums and done_o pulses 6 cycles after valid_i.
module blm_successive_running_sums
  import blm_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      valid_i,
  input  logic [DATA_W-1:0]         data_i,
  output logic [NRS-1:0][RS_W-1:0]  rs_o,
  output logic                      done_o
);

  // exact widths of the sums fed forward and of each stage's sums
  localparam int unsigned W1 = DATA_W;       // samples
  localparam int unsigned W2 = DATA_W + 1;   // RS1, 2 samples
  localparam int unsigned W3 = DATA_W + 6;   // RS4, 64 samples
  localparam int unsigned W4 = DATA_W + 11;  // RS6, 2048 samples
  localparam int unsigned W5 = DATA_W + 15;  // RS8, 32768 samples
  localparam int unsigned A1 = W1 + 4;
  localparam int unsigned A2 = W2 + 7;
  localparam int unsigned A3 = W3 + 7;
  localparam int unsigned A4 = W4 + 6;
  localparam int unsigned A5 = W5 + 6;

  logic [3:0][A1-1:0] s1;
  logic [1:0][A2-1:0] s2;
  logic [1:0][A3-1:0] s3;
  logic [1:0][A4-1:0] s4;
  logic [1:0][A5-1:0] s5;
  logic [A1-1:0] f1;  logic v1;
  logic [A2-1:0] f2;  logic v2;
  logic [A3-1:0] f3;  logic v3;
  logic [A4-1:0] f4;  logic v4;

  blm_running_sum_stage #(.IN_W(W1), .NTAP(4), .DEPTH(16),
    .TAP_LEN('{1, 2, 8, 16}), .DECIM(1), .FWD(1)) u_sr1 (
    .clk, .rst_n, .in_valid_i(valid_i), .in_data_i(data_i),
    .sums_o(s1), .upd_o(), .fwd_valid_o(v1), .fwd_data_o(f1));

  blm_running_sum_stage #(.IN_W(W2), .NTAP(2), .DEPTH(128),
    .TAP_LEN('{32, 128, 0, 0}), .DECIM(2), .FWD(0)) u_sr2 (
    .clk, .rst_n, .in_valid_i(v1), .in_data_i(W2'(f1)),
    .sums_o(s2), .upd_o(), .fwd_valid_o(v2), .fwd_data_o(f2));

  blm_running_sum_stage #(.IN_W(W3), .NTAP(2), .DEPTH(128),
    .TAP_LEN('{32, 128, 0, 0}), .DECIM(32), .FWD(0)) u_sr3 (
    .clk, .rst_n, .in_valid_i(v2), .in_data_i(W3'(f2)),
    .sums_o(s3), .upd_o(), .fwd_valid_o(v3), .fwd_data_o(f3));

  blm_running_sum_stage #(.IN_W(W4), .NTAP(2), .DEPTH(64),
    .TAP_LEN('{16, 64, 0, 0}), .DECIM(32), .FWD(0)) u_sr4 (
    .clk, .rst_n, .in_valid_i(v3), .in_data_i(W4'(f3)),
    .sums_o(s4), .upd_o(), .fwd_valid_o(v4), .fwd_data_o(f4));

  blm_running_sum_stage #(.IN_W(W5), .NTAP(2), .DEPTH(64),
    .TAP_LEN('{16, 64, 0, 0}), .DECIM(16), .FWD(0)) u_sr5 (
    .clk, .rst_n, .in_valid_i(v4), .in_data_i(W5'(f4)),
    .sums_o(s5), .upd_o(), .fwd_valid_o(), .fwd_data_o());

  function automatic logic [RS_W-1:0] clamp(input logic [63:0] v);
    return ((v >> RS_W) != '0) ? '1 : RS_W'(v);
  endfunction

  logic [5:0] dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs_o <= '0;
      dly  <= '0;
    end else begin
      dly <= {dly[4:0], valid_i};
      for (int i = 0; i < 4; i++) rs_o[i] <= clamp(64'(s1[i]));
      for (int i = 0; i < 2; i++) begin
        rs_o[4+i]  <= clamp(64'(s2[i]));
        rs_o[6+i]  <= clamp(64'(s3[i]));
        rs_o[8+i]  <= clamp(64'(s4[i]));
        rs_o[10+i] <= clamp(64'(s5[i]));
      end
    end
  end

  assign done_o = dly[5];

endmodule
