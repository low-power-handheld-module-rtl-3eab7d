// tb_work_reg: checks the two working-register levels.  Random numbers of
// pulses are counted while MESURE_C is high, and the BCD digits, read through
// the digit multiplexer after a load, must equal the decimal digits of the
// pulse count modulo 10000, with the overload flag set for counts above 9999.
// Also checks that pulses outside MESURE_C are ignored, that MESURE_CE
// clears, and that `hold` keeps the previous result.
module tb_work_reg;
  import mb2_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cnt_evt = 0, mesure_c = 0, mesure_ce = 0, load = 0, hold = 0;
  logic [1:0] digit_sel = 0;
  logic [3:0] reg_q [DIGITS];
  logic       ovl;
  logic [3:0] bcd_out;
  int checks = 0, failures = 0;

  work_reg dut (.clk, .rst_n, .cnt_evt, .mesure_c, .mesure_ce, .load, .hold,
                .digit_sel, .reg_q, .ovl, .bcd_out);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic measure(input int n, input bit hold_it, input int shown);
    // clear
    @(negedge clk) mesure_ce = 1;
    @(negedge clk) mesure_ce = 0;
    // pulses outside the counting window are not counted
    repeat (3) begin @(negedge clk) cnt_evt = 1; end
    @(negedge clk) cnt_evt = 0; mesure_c = 1;
    for (int i = 0; i < n; i++) begin
      @(negedge clk) cnt_evt = 1;
      if ($urandom_range(0, 3) == 0) begin @(negedge clk) cnt_evt = 0; end
    end
    @(negedge clk) cnt_evt = 0; mesure_c = 0;
    @(negedge clk) cnt_evt = 1; hold = hold_it; load = 1;
    @(negedge clk) cnt_evt = 0; load = 0; hold = 0;
    for (int d = 0; d < DIGITS; d++) begin
      int p = 1;
      for (int k = 0; k < d; k++) p *= 10;
      digit_sel = 2'(d);
      #1 chk(bcd_out == 4'((shown / p) % 10),
             $sformatf("count %0d digit %0d = %0d", n, d, bcd_out));
    end
    chk(ovl == (hold_it ? ovl : (n > 9999)), $sformatf("overload for %0d", n));
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, last;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    measure(0, 0, 0);
    measure(9999, 0, 9999);
    chk(!ovl, "no overload at 9999");
    measure(10000, 0, 0);
    chk(ovl, "overload at 10000");
    measure(12345, 0, 2345);
    last = 2345;
    measure(77, 1, last);          // Memory: display keeps 2345
    for (int t = 0; t < 20; t++) begin
      n = $urandom_range(0, 10500);
      measure(n, 0, n % 10000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
