// tb_blm_successive_running_sums: feeds 2^21 + 70000 samples, one per
// cycle, and at regular pauses compares all twelve sums with sums formed
// from a prefix-sum array of every sample: RS with window W and refresh P
// must equal the sum of the W samples ending at the last multiple of P,
// clamped to 32 bits. Small and near-full-scale data phases make both the
// exact and the clamped range appear. Also checks the 6-cycle latency.
module tb_blm_successive_running_sums;
  import blm_pkg::*;

  localparam int NS = 2**21 + 70000;
  localparam int WIN [12] = '{1,2,8,16,64,256,2048,8192,32768,131072,524288,2097152};
  localparam int PER [12] = '{1,1,1,1,2,2,64,64,2048,2048,32768,32768};

  logic clk = 0, rst_n = 0;
  logic vi, done;
  logic [19:0] d;
  logic [11:0][31:0] rs;
  longint unsigned pre [];
  int checks = 0, failures = 0, sat = 0;

  always #5 clk = !clk;

  blm_successive_running_sums dut (.clk, .rst_n, .valid_i(vi), .data_i(d),
                                   .rs_o(rs), .done_o(done));

  function automatic longint unsigned ref_rs(int k, int n);
    int nr, lo;
    longint unsigned s;
    nr = (n / PER[k]) * PER[k];
    lo = nr - WIN[k]; if (lo < 0) lo = 0;
    s = pre[nr] - pre[lo];
    return (s > 64'hFFFF_FFFF) ? 64'hFFFF_FFFF : s;
  endfunction

  task automatic compare(int n);
    for (int k = 0; k < 12; k++) begin
      checks++;
      if (64'(rs[k]) != ref_rs(k, n)) begin
        failures++;
        if (failures < 20) $display("FAIL n=%0d RS%0d got %0d exp %0d", n, k, rs[k], ref_rs(k, n));
      end
      if (rs[k] == 32'hFFFF_FFFF) sat++;
    end
  endtask

  initial begin
    int lat;
    pre = new[NS + 1];
    pre[0] = 0;
    vi = 0; d = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (8) @(negedge clk);
    // latency of an isolated sample (value 0, so the sums stay exact)
    vi = 1; d = 0;
    @(negedge clk);
    vi = 0;
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 6) begin failures++; $display("FAIL latency %0d", lat); end
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 1; n <= NS; n++) begin
      if (n < 2**20 || n > 2**21) d = 20'($urandom_range(2000));
      else d = 20'($urandom_range(20'hFFFFF, 20'hF0000));
      pre[n] = pre[n-1] + d;
      vi = 1;
      @(negedge clk);
      if (n % 9973 == 0 || n % 32768 == 0 || n == NS) begin
        vi = 0;
        repeat (8) @(negedge clk);
        compare(n);
      end
    end
    checks++;
    if (sat == 0) begin failures++; $display("FAIL clamp never reached"); end
    $display("saturated readings: %0d", sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 2) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
