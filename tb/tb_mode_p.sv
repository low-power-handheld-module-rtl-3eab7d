// tb_mode_p: checks the mode register and the per-mode routing.  The mode
// is stepped through all five values and back to the first; in each mode
// random strobes are applied and cnt_evt, fsm_step and div_src must follow
// the routing table of the instrument: frequency and calibrator count
// INPUT_A over the gate; period counts the reference over the divided
// INPUT_A; phase counts INPUT_A over the divided INPUT_B; chronometer counts
// the reference between INT presses.
module tb_mode_p;
  import mb2_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mode_press = 0, a_rise = 0, b_rise = 0, ref_tick = 0, gate_tick = 0,
        div_tick = 0, int_press = 0;
  mode_e mode;
  logic div_src, cnt_evt, fsm_step, changed;
  int checks = 0, failures = 0;

  mode_p dut (.clk, .rst_n, .mode_press, .a_rise, .b_rise, .ref_tick, .gate_tick,
              .div_tick, .int_press, .mode, .div_src, .cnt_evt, .fsm_step, .changed);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected codes in stepping order: freq, period, phase, chrono, calib
    int order [6] = '{0, 1, 2, 3, 4, 0};
    logic exp_cnt, exp_step, exp_div;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int m = 0; m < 6; m++) begin
      chk(int'(mode) == order[m], $sformatf("mode %0d expected %0d", mode, order[m]));
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        {a_rise, b_rise, ref_tick, gate_tick, div_tick, int_press} = 6'($urandom);
        #1;
        unique case (order[m])
          1: begin exp_cnt = ref_tick; exp_step = div_tick;  exp_div = a_rise; end
          2: begin exp_cnt = a_rise;   exp_step = div_tick;  exp_div = b_rise; end
          3: begin exp_cnt = ref_tick; exp_step = int_press; exp_div = a_rise; end
          default: begin exp_cnt = a_rise; exp_step = gate_tick; exp_div = a_rise; end
        endcase
        chk(cnt_evt == exp_cnt, $sformatf("cnt_evt in mode %0d", order[m]));
        chk(fsm_step == exp_step, $sformatf("fsm_step in mode %0d", order[m]));
        chk(div_src == exp_div, $sformatf("div_src in mode %0d", order[m]));
      end
      @(negedge clk) mode_press = 1;
      #1 chk(changed, "changed on press");
      @(negedge clk) mode_press = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
