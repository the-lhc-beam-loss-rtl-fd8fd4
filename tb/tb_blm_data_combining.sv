// tb_blm_data_combining: random counter/ADC sequences, including ADC
// drops that would make the sum negative and full-scale values, against
// count*4096 + adc - previous adc (clamped at 0); checks the one-cycle
// latency and that the first sample takes no difference.
module tb_blm_data_combining;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic vi, vo;
  logic [7:0] cnt;
  logic [11:0] adc;
  logic [19:0] data;
  int checks = 0, failures = 0;
  int clamps = 0, negdiffs = 0;

  always #5 clk = !clk;

  blm_data_combining dut (.clk, .rst_n, .valid_i(vi), .cnt_i(cnt), .adc_i(adc),
                          .valid_o(vo), .data_o(data));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int prev, exp;
    bit first;
    vi = 0; cnt = 0; adc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    first = 1;
    prev = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      vi = 1;
      case (n % 4)
        0: begin cnt = $urandom; adc = $urandom; end
        1: begin cnt = 0; adc = $urandom_range(100); end      // may go negative
        2: begin cnt = 8'hFF; adc = 12'hFFF; end
        default: begin cnt = $urandom_range(3); adc = $urandom; end
      endcase
      exp = first ? int'(cnt) * 4096 : int'(cnt) * 4096 + int'(adc) - prev;
      if (!first && int'(adc) < prev) negdiffs++;
      if (exp < 0) begin exp = 0; clamps++; end
      prev = adc;
      first = 0;
      @(negedge clk);
      vi = 0;
      check(vo === 1'b1, "valid after one cycle");
      check(data === 20'(exp), $sformatf("data %0d expected %0d", data, exp));
      @(negedge clk);
      check(vo === 1'b0, "single valid pulse");
    end
    check(clamps > 0 && negdiffs > 0, "negative cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
