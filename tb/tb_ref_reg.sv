// tb_ref_reg: checks the reference divider.  With PRESCALE reduced to 4 it
// measures the spacing of every strobe (it must be exactly
// PRESCALE * 10**k cycles), that each strobe is one cycle long, and that
// the slow strobes coincide with the fast ones.
module tb_ref_reg;
  localparam int unsigned PRESCALE = 4;
  logic clk = 0, rst_n = 0;
  logic t_mhz, t_khz, t_100, t_1;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint last [4];
  int     seen [4];
  longint period [4] = '{PRESCALE, PRESCALE * 1000, PRESCALE * 10000, PRESCALE * 1000000};

  ref_reg #(.PRESCALE(PRESCALE)) dut (.clk, .rst_n, .tick_1mhz(t_mhz), .tick_1khz(t_khz),
                                      .tick_100hz(t_100), .tick_1hz(t_1));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (13_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    logic [3:0] t;
    t = {t_1, t_100, t_khz, t_mhz};
    cyc++;
    for (int k = 0; k < 4; k++) if (t[k]) begin
      if (seen[k] > 0) chk(cyc - last[k] == period[k], $sformatf("strobe %0d spacing %0d", k, cyc - last[k]));
      else chk(cyc == period[k], $sformatf("strobe %0d first at %0d", k, cyc));
      last[k] = cyc;
      seen[k]++;
    end
    if (t_1)   chk(t_100 && t_khz && t_mhz, "1 Hz aligned");
    if (t_100) chk(t_khz && t_mhz, "100 Hz aligned");
    if (t_khz) chk(t_mhz, "1 kHz aligned");
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2 * PRESCALE * 1000000 + 10) @(posedge clk);
    chk(seen[3] == 2, $sformatf("1 Hz strobes %0d", seen[3]));
    chk(seen[0] inside {[2 * 1000000 + 1 : 2 * 1000000 + 3]}, $sformatf("1 MHz strobes %0d", seen[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
