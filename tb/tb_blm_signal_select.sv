// tb_blm_signal_select: all eight rows of the decision table, with the
// expected outcome written out per row.
module tb_blm_signal_select;
  import blm_pkg::*;

  logic a, b, c;
  sel_t sel;
  logic [3:0] row;
  logic err;
  int checks = 0, failures = 0;

  blm_signal_select dut (.crc_ok_a_i(a), .crc_ok_b_i(b), .cmp_ok_i(c),
                         .sel_o(sel), .case_o(row), .err_o(err));

  // {crc A ok, crc B ok, compare ok, expected}
  typedef struct { bit a, b, c; sel_t exp; } row_t;
  row_t tbl [8] = '{
    '{0,0,0,SEL_DUMP}, '{0,0,1,SEL_DUMP}, '{0,1,0,SEL_B}, '{0,1,1,SEL_B},
    '{1,0,0,SEL_A},    '{1,0,1,SEL_A},    '{1,1,0,SEL_DUMP}, '{1,1,1,SEL_A}};

  initial begin
    for (int r = 0; r < 8; r++) begin
      a = tbl[r].a; b = tbl[r].b; c = tbl[r].c; #1;
      checks++;
      if (sel !== tbl[r].exp) begin failures++; $display("FAIL row %0d sel %0d", r+1, sel); end
      checks++;
      if (row !== 4'(r + 1)) begin failures++; $display("FAIL row number %0d", row); end
      checks++;
      if (err !== (r != 7)) begin failures++; $display("FAIL err row %0d", r+1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
