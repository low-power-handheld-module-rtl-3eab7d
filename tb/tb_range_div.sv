// tb_range_div: checks the result-range logic.  The range is stepped
// Hz -> kHz -> MHz -> Hz; in each range and for a frequency mode and a
// time mode, random strobes are applied and the gate strobe, the
// digitization strobe, the range LEDs and the decimal point are compared
// with the range table of the instrument.
module tb_range_div;
  import mb2_pkg::*;
  logic clk = 0, rst_n = 0;
  logic range_press = 0;
  mode_e mode = MODE_FREQ;
  logic t_mhz = 0, t_khz = 0, t_100 = 0, t_1 = 0;
  res_range_e res_range;
  logic [2:0] led_range;
  logic gate_tick, ref_tick, pt_en, changed;
  logic [1:0] pt_pos;
  int checks = 0, failures = 0;

  range_div dut (.clk, .rst_n, .range_press, .mode, .tick_1mhz(t_mhz), .tick_1khz(t_khz),
                 .tick_100hz(t_100), .tick_1hz(t_1), .res_range, .led_range, .gate_tick,
                 .ref_tick, .pt_en, .pt_pos, .changed);

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
    mode_e modes [5] = '{MODE_FREQ, MODE_PERIOD, MODE_PHASE, MODE_CHRONO, MODE_CALIB};
    logic exp_gate, exp_ref;
    int   exp_pt;   // -1: no point
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      int rr;
      rr = r % 3;
      chk(led_range == 3'(1 << rr), $sformatf("LEDs %b in range %0d", led_range, rr));
      foreach (modes[k]) begin
        mode = modes[k];
        for (int i = 0; i < 50; i++) begin
          @(negedge clk);
          {t_mhz, t_khz, t_100, t_1} = 4'($urandom);
          #1;
          exp_gate = (rr == 0) ? t_1 : (rr == 1) ? t_100 : t_khz;
          exp_ref  = (rr == 0) ? t_1 : (rr == 1) ? t_khz : t_mhz;
          exp_pt   = (mode inside {MODE_FREQ, MODE_CALIB}) ? ((rr == 0) ? -1 : (rr == 1) ? 1 : 3) : -1;
          chk(gate_tick == exp_gate, $sformatf("gate in range %0d", rr));
          chk(ref_tick == exp_ref, $sformatf("ref in range %0d", rr));
          chk(pt_en == (exp_pt >= 0) && (exp_pt < 0 || int'(pt_pos) == exp_pt),
              $sformatf("point in range %0d mode %0d", rr, mode));
        end
      end
      @(negedge clk) range_press = 1;
      #1 chk(changed, "changed on press");
      @(negedge clk) range_press = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
