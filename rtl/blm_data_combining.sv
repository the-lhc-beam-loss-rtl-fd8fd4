// blm_data_combining: merges the counter and ADC readings of one detector
// into a single 20-bit loss value per 40 us.
//
// The tunnel card digitises the chamber current with a current-to-frequency
// converter: the counter gives the number of integrator resets in the last
// 40 us, and the ADC gives the integrator voltage at readout time, i.e. the
// fraction of a count still inside the integrator. The change of that
// fraction between two readouts belongs to the last 40 us, so
//     data = (counter << 12) + (adc_now - adc_previous)
// One count equals 4096 ADC steps. The delay register, the A-B difference,
// appending 12 LSBs to the counter and the signed addition follow the
// design description. This design's choices: the difference is formed with
// 13 bits so that no pair of 12-bit readings wraps; the sum is clamped at
// zero, so the output is an unsigned 20-bit value whose largest possible
// result (255 counts, +4095 steps) is exactly 2^20-1; the first sample after
// reset takes a difference of zero.
//
// Timing: data_o is registered, valid_o pulses one cycle after valid_i.
module blm_data_combining
  import blm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [CNT_W-1:0]  cnt_i,
  input  logic [ADC_W-1:0]  adc_i,
  output logic              valid_o,
  output logic [DATA_W-1:0] data_o
);

  logic [ADC_W-1:0]       adc_prev;   // the delay element
  logic                   have_prev;
  logic signed [ADC_W:0]  diff;       // A - B, 13 bits
  logic signed [DATA_W:0] sum;        // one guard bit for the sign

  assign diff = have_prev ? $signed({1'b0, adc_i}) - $signed({1'b0, adc_prev})
                          : '0;
  assign sum  = $signed({1'b0, cnt_i, {ADC_W{1'b0}}}) + (DATA_W+1)'(diff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_prev <= 1'b0;
      adc_prev  <= '0;
      valid_o   <= 1'b0;
      data_o    <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        adc_prev  <= adc_i;
        have_prev <= 1'b1;
        data_o    <= sum[DATA_W] ? '0 : sum[DATA_W-1:0];
      end
    end
  end

endmodule
