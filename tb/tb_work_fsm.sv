// tb_work_fsm: checks the main FSM.  After reset it must sit in S3 (clear);
// every step strobe moves it S3 -> S1 -> S2 -> S3, with MESURE_C high only
// in S1 and MESURE_CE high only in S3; without a step it stays put; a
// restart forces S3 from any state.  The expected state comes from a
// reference sequence kept by the testbench.
module tb_work_fsm;
  import mb2_pkg::*;
  logic clk = 0, rst_n = 0;
  logic step = 0, restart = 0;
  fsm_state_e state;
  logic mesure_c, mesure_ce;
  int checks = 0, failures = 0;
  int model;           // 1, 2 or 3

  work_fsm dut (.clk, .rst_n, .step, .restart, .state, .mesure_c, .mesure_ce);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_outputs();
    chk(mesure_c == (model == 1), $sformatf("MESURE_C=%0d in S%0d", mesure_c, model));
    chk(mesure_ce == (model == 3), $sformatf("MESURE_CE=%0d in S%0d", mesure_ce, model));
    chk((state == ST_S1 && model == 1) || (state == ST_S2 && model == 2) ||
        (state == ST_S3 && model == 3), $sformatf("state %s, expected S%0d", state.name(), model));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    model = 3;
    check_outputs();
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      step    = ($urandom_range(0, 3) == 0);
      restart = ($urandom_range(0, 40) == 0);
      @(negedge clk);
      if (restart) model = 3;
      else if (step) model = (model == 3) ? 1 : model + 1;
      step = 0; restart = 0;
      check_outputs();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
