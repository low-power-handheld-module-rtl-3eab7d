// tb_mb2_top: end-to-end test of the measurement module at a reduced time
// base (PRESCALE = 2, so "1 s" is 2,000,000 clock cycles and every rate is
// ten times faster than on the instrument).  It drives INPUT_A / INPUT_B
// from counters locked to the clock, presses the buttons, and reads the
// result the way a user and a PC would: from the multiplexed display
// (segments decoded back to digits, decimal point position, LEDs) and from
// the frames on TxD.  Every operating mode is run once and its reading is
// compared with the count worked out from the input periods; the test also
// changes both ranges, forces an overload, holds a value with PAUSE and
// counts how often each of these mechanisms happened.
module tb_mb2_top;
  localparam int PRESCALE = 2;
  localparam int UART_HALF = 100;          // CLK_UART half period, cycles
  localparam int BIT = 2 * UART_HALF;

  logic clk = 0, rst_n = 0;
  logic input_a = 0, input_b = 0, int_btn = 0, in_mode = 0, input_range = 0,
        clk_range = 0, pause = 0, clk_uart = 0;
  logic led_ovl, led_hz, led_khz, led_mhz, led_x1, led_x10, led_x100, led_x1000, pt;
  logic en0, en1, en2, en3, sa, sb, sc, sd, se, sf, sg, txd;
  int checks = 0, failures = 0;
  longint cyc = 0;

  mb2_top #(.PRESCALE(PRESCALE)) dut (
    .in20m(clk), .reset_n(rst_n), .input_a, .input_b, .int_btn, .in_mode, .input_range,
    .clk_range, .pause, .clk_uart, .led_ovl, .led_hz, .led_khz, .led_mhz, .led_x1, .led_x10,
    .led_x100, .led_x1000, .pt, .en_disp0(en0), .en_disp1(en1), .en_disp2(en2), .en_disp3(en3),
    .seg_a(sa), .seg_b(sb), .seg_c(sc), .seg_d(sd), .seg_e(se), .seg_f(sf), .seg_g(sg), .txd);

  always #25 clk = ~clk;   // 20 MHz

  // ---------------------------------------------------------------- stimuli
  int pa = 10, pb = 400;   // input periods in clock cycles
  int ca = 0, cb = 0, cu = 0;
  always @(posedge clk) begin
    cyc++;
    ca = (ca + 1 >= pa) ? 0 : ca + 1;
    cb = (cb + 1 >= pb) ? 0 : cb + 1;
    cu = (cu + 1 >= BIT) ? 0 : cu + 1;
    input_a  <= (ca < pa / 2);
    input_b  <= (cb < pb / 2);
    clk_uart <= (cu < UART_HALF);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic press(ref logic btn);
    @(negedge clk) btn = 1;
    repeat (5) @(negedge clk);
    btn = 0;
    repeat (5) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- display
  function automatic int seg_to_digit(input logic [6:0] on);   // {g..a} active high
    string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                        "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    for (int d = 0; d < 10; d++) begin
      logic [6:0] p = '0;
      for (int i = 0; i < lit[d].len(); i++) p[3'(lit[d][i] - "a")] = 1'b1;
      if (p == on) return d;
    end
    return -1;
  endfunction

  int  shown [4];
  bit  seen [4];
  int  pt_digit;
  always @(posedge clk) if (rst_n) begin
    logic [3:0] en;
    en = {en3, en2, en1, en0};
    if ($onehot(en)) begin
      int k;
      k = $clog2(en);
      shown[k] = seg_to_digit(~{sg, sf, se, sd, sc, sb, sa});
      seen[k]  = 1;
      if (!pt) pt_digit = k;
    end else if (en != 0) chk(0, "two digits lit at once");
  end

  // ---------------------------------------------------------------- serial
  int uart_digit [4];
  int frames = 0;
  initial begin
    logic [11:0] f;
    forever begin
      @(negedge txd);
      repeat (BIT / 2) @(posedge clk);
      for (int b = 0; b < 12; b++) begin
        f[b] = txd;
        if (b < 11) repeat (BIT) @(posedge clk);
      end
      chk(f[0] == 0 && f[11:10] == 2'b11 && ^f[9:1] == 0, $sformatf("TxD frame %b", f));
      chk(f[8:7] == 2'b00 && f[4:1] <= 9, $sformatf("TxD byte %h", f[8:1]));
      uart_digit[f[6:5]] = int'(f[4:1]);
      frames++;
    end
  end

  // ---------------------------------------------------------------- reading
  // Wait for a complete measurement (a fresh S1 then S2), then for a full
  // display scan and serial refresh, and return the value shown.
  task automatic read_value(output int value);
    wait (dut.u_work_fsm.state == mb2_pkg::ST_S1);
    wait (dut.u_work_fsm.state == mb2_pkg::ST_S2);
    repeat (10) @(posedge clk);
    seen = '{0, 0, 0, 0};
    pt_digit = -1;
    repeat (PRESCALE * 1000 * 8 * 2 + 10) @(posedge clk);
    value = 0;
    for (int k = 3; k >= 0; k--) begin
      chk(seen[k] && shown[k] >= 0, $sformatf("digit %0d shown", k));
      chk(uart_digit[k] == shown[k], $sformatf("TxD digit %0d = %0d, display %0d", k, uart_digit[k], shown[k]));
      value = value * 10 + shown[k];
    end
  endtask

  int n_freq = 0, n_period = 0, n_phase = 0, n_chrono = 0, n_calib = 0,
      n_clk_range = 0, n_in_range = 0, n_ovl = 0, n_memory = 0, n_restart = 0;
  always @(posedge clk) if (rst_n && dut.u_work_fsm.restart) n_restart++;

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, t0;
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (10) @(posedge clk);
    chk(led_hz && !led_khz && !led_mhz && led_x1 && !led_x10, "reset LEDs");

    // Frequency, kHz range: gate 10 ms = 20000 cycles, INPUT_A every 10 cycles
    press(clk_range); n_clk_range++;
    pa = 10;
    read_value(v);
    chk(led_khz && !led_hz, "kHz LED");
    chk(v == 2000 && pt_digit == 1, $sformatf("frequency kHz: %0d pt %0d, expected 200.0", v, pt_digit));
    chk(!led_ovl, "no overload");
    n_freq++;

    // Frequency, MHz range: gate 1 ms = 2000 cycles
    press(clk_range); n_clk_range++;
    read_value(v);
    chk(led_mhz, "MHz LED");
    chk(v == 200 && pt_digit == 3, $sformatf("frequency MHz: %0d pt %0d, expected 0.200", v, pt_digit));
    n_freq++;

    // Period, MHz digitization (1 us = 2 cycles), divider x10, INPUT_A every 100 cycles
    press(in_mode);
    press(input_range); n_in_range++;
    chk(led_x10 && !led_x1, "x10 LED");
    pa = 100;
    read_value(v);
    chk(v == 500 && pt_digit == -1, $sformatf("period: %0d, expected 500", v));
    n_period++;

    // Phase: count INPUT_A (every 100) while INPUT_B (every 400) / 10 enables
    press(in_mode);
    read_value(v);
    chk(v == 40, $sformatf("phase: %0d, expected 40", v));
    n_phase++;

    // Chronometer: INT starts, INT 3000 cycles later stops (1500 us)
    press(in_mode);
    wait (dut.u_work_fsm.state == mb2_pkg::ST_S3);
    repeat (100) @(posedge clk);
    @(negedge clk) int_btn = 1;
    @(negedge clk) int_btn = 0;
    repeat (2999) @(negedge clk);
    int_btn = 1;
    @(negedge clk) int_btn = 0;
    read_value(v);
    chk(v >= 1499 && v <= 1501, $sformatf("chronometer: %0d, expected 1500", v));
    n_chrono++;
    press(int_btn);                                    // clear
    chk(dut.u_work_fsm.state == mb2_pkg::ST_S3, "chronometer cleared");

    // Calibrator: like the frequency meter, MHz range, INPUT_A every 10 cycles
    press(in_mode);
    pa = 10;
    read_value(v);
    chk(v == 200 && pt_digit == 3, $sformatf("calibrator: %0d, expected 0.200", v));
    n_calib++;

    // Memory: with PAUSE held the display keeps 0.200 while INPUT_A halves
    @(negedge clk) pause = 1;
    pa = 20;
    read_value(v);
    chk(v == 200, $sformatf("memory: %0d, expected held 0.200", v));
    n_memory += (v == 200);
    @(negedge clk) pause = 0;
    read_value(v);
    chk(v == 100, $sformatf("after memory: %0d, expected 0.100", v));

    // Overload: frequency meter, Hz range (1 s gate) with INPUT_A every 4 cycles
    press(in_mode);
    press(clk_range); n_clk_range++;
    pa = 4;
    read_value(v);
    chk(led_ovl, "overload LED");
    chk(v == (2000000 / 4) % 10000, $sformatf("overload value %0d", v));
    n_ovl += led_ovl;

    $display("mechanisms: freq=%0d period=%0d phase=%0d chrono=%0d calib=%0d clk_range=%0d in_range=%0d ovl=%0d memory=%0d restart=%0d frames=%0d",
             n_freq, n_period, n_phase, n_chrono, n_calib, n_clk_range, n_in_range, n_ovl, n_memory, n_restart, frames);
    chk(n_freq > 0 && n_period > 0 && n_phase > 0 && n_chrono > 0 && n_calib > 0, "every mode ran");
    chk(n_clk_range > 0 && n_in_range > 0 && n_ovl > 0 && n_memory > 0 && n_restart > 0 && frames > 0,
        "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
