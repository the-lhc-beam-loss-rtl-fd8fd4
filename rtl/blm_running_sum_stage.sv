// blm_running_sum_stage: one shift register with several running sums
// taken from it, the building block of the successive running sums.
//
// A running sum over the last L inputs is kept by adding, on every new
// input, the difference between the new value and the value that entered L
// inputs earlier. All sums of the stage share one shift register with a
// tap per sum (a multi-point shift register), built here as a circular
// buffer of DEPTH entries (DEPTH = the longest window) with one read port
// per tap. Instead of clearing the buffer after reset, the stage counts
// how many values it has stored; a tap that reaches further back than that
// reads zero, so the sums start exactly from an empty history.
//
// Only every DECIM-th input strobe is taken in, which lets a stage fed
// with the sums of the previous stage extend the time range without a long
// register (the successive scheme). On each accepted input the stage
// updates its sums and, one cycle later, offers the new value of tap FWD
// to the next stage (fwd_valid_o, fwd_data_o).
//
// Widths: ACC_W = IN_W + log2(DEPTH) holds the sum of DEPTH full-scale
// inputs exactly, as long as DEPTH is a power of two. sums_o is updated in
// the cycle after in_valid_i is accepted.
module blm_running_sum_stage #(
  parameter int unsigned IN_W  = 20,
  parameter int unsigned NTAP  = 2,              // 1..4 sums
  parameter int unsigned DEPTH = 128,            // longest window, 2^n
  parameter int unsigned TAP_LEN [4] = '{64, 128, 0, 0}, // first NTAP used
  parameter int unsigned DECIM = 1,              // accept every DECIM-th input
  parameter int unsigned FWD   = 0,              // tap offered to the next stage
  parameter int unsigned ACC_W = IN_W + $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid_i,
  input  logic [IN_W-1:0]            in_data_i,
  output logic [NTAP-1:0][ACC_W-1:0] sums_o,
  output logic                       upd_o,       // sums_o just changed
  output logic                       fwd_valid_o,
  output logic [ACC_W-1:0]           fwd_data_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [IN_W-1:0]  mem [DEPTH];
  logic [AW-1:0]    wp;
  logic [AW:0]      fill;     // stored values, saturates at DEPTH
  logic [$clog2(DECIM+1)-1:0] dcnt;
  logic             take;

  assign take = in_valid_i && (dcnt == ($bits(dcnt))'(DECIM - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcnt <= '0;
    end else if (in_valid_i) begin
      dcnt <= take ? '0 : dcnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (take) mem[wp] <= in_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp     <= '0;
      fill   <= '0;
      sums_o <= '0;
      upd_o  <= 1'b0;
    end else begin
      upd_o <= take;
      if (take) begin
        wp <= wp + 1'b1;
        if (fill != (AW+1)'(DEPTH)) fill <= fill + 1'b1;
        for (int t = 0; t < NTAP; t++) begin
          logic [IN_W-1:0] old;
          old = (fill >= (AW+1)'(TAP_LEN[t])) ? mem[wp - AW'(TAP_LEN[t])] : '0;
          sums_o[t] <= sums_o[t] + ACC_W'(in_data_i) - ACC_W'(old);
        end
      end
    end
  end

  assign fwd_valid_o = upd_o;
  assign fwd_data_o  = sums_o[FWD];

  // Tap lengths must fit the buffer, and the buffer must be a power of two.
  initial begin
    assert (DEPTH == 2 ** AW) else $error("DEPTH must be a power of two");
    for (int t = 0; t < NTAP; t++)
      assert (TAP_LEN[t] >= 1 && TAP_LEN[t] <= DEPTH) else $error("bad tap length");
  end

endmodule
