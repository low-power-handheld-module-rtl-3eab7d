// tb_bcd7seg: checks the seven-segment decoder for every 4-bit code, with and
// without blanking.  The expected pattern is built from the list of lit
// segment letters of each numeral, independently of the decoder's table.
module tb_bcd7seg;
  logic [3:0] bcd;
  logic       blank;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  bcd7seg dut (.bcd, .blank, .seg_n);

  function automatic logic [6:0] expect_n(input int d, input bit blk);
    string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                        "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    logic [6:0] on = '0;
    if (!blk && d < 10)
      for (int i = 0; i < lit[d].len(); i++) on[lit[d][i] - "a"] = 1'b1;
    return ~on;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int d = 0; d < 16; d++) begin
        bcd = 4'(d); blank = b[0];
        #1;
        checks++;
        if (seg_n !== expect_n(d, b[0])) begin
          failures++;
          $display("FAIL bcd=%0d blank=%0d seg_n=%b expected %b", d, b, seg_n, expect_n(d, b[0]));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
