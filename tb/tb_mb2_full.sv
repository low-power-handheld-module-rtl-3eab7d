// tb_mb2_full: one complete frequency measurement on the module with every
// parameter at its default, i.e. the real 20 MHz time base: Hz range, 1 s
// gate.  INPUT_A is a 5 kHz square wave (4000 clock cycles per period) and
// CLK_UART runs at about 9600 Hz (2084 cycles).  After reset the FSM clears
// for one second, counts for one second and then holds; the display must
// read 5000 with LED_Hz lit, no decimal point and no overload, the
// measurement must take exactly one 1 s gate (20,000,000 cycles), and the
// serial line must carry the same four digits.
module tb_mb2_full;
  localparam int UART_HALF = 1042;
  localparam int BIT = 2 * UART_HALF;
  localparam int PA = 4000;

  logic clk = 0, rst_n = 0;
  logic input_a = 0, clk_uart = 0;
  logic led_ovl, led_hz, led_khz, led_mhz, led_x1, led_x10, led_x100, led_x1000, pt;
  logic en0, en1, en2, en3, sa, sb, sc, sd, se, sf, sg, txd;
  int checks = 0, failures = 0;
  longint cyc = 0;

  mb2_top dut (
    .in20m(clk), .reset_n(rst_n), .input_a, .input_b(1'b0), .int_btn(1'b0), .in_mode(1'b0),
    .input_range(1'b0), .clk_range(1'b0), .pause(1'b0), .clk_uart, .led_ovl, .led_hz, .led_khz,
    .led_mhz, .led_x1, .led_x10, .led_x100, .led_x1000, .pt, .en_disp0(en0), .en_disp1(en1),
    .en_disp2(en2), .en_disp3(en3), .seg_a(sa), .seg_b(sb), .seg_c(sc), .seg_d(sd), .seg_e(se),
    .seg_f(sf), .seg_g(sg), .txd);

  always #25 clk = ~clk;   // 20 MHz

  int ca = 0, cu = 0;
  always @(posedge clk) begin
    cyc++;
    ca = (ca + 1 >= PA) ? 0 : ca + 1;
    cu = (cu + 1 >= BIT) ? 0 : cu + 1;
    input_a  <= (ca < PA / 2);
    clk_uart <= (cu < UART_HALF);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

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

  int shown [4];
  bit seen [4];
  bit pt_seen = 0;
  always @(posedge clk) if (rst_n) begin
    logic [3:0] en;
    en = {en3, en2, en1, en0};
    if ($onehot(en)) begin
      shown[$clog2(en)] = seg_to_digit(~{sg, sf, se, sd, sc, sb, sa});
      seen[$clog2(en)]  = 1;
      if (!pt) pt_seen = 1;
    end
  end

  int uart_digit [4] = '{-1, -1, -1, -1};
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
      uart_digit[f[6:5]] = int'(f[4:1]);
    end
  end

  initial begin
    repeat (70_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t1, t2;
    int v;
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (dut.u_work_fsm.state == mb2_pkg::ST_S1);
    t1 = cyc;
    wait (dut.u_work_fsm.state == mb2_pkg::ST_S2);
    t2 = cyc;
    chk(t2 - t1 == 20_000_000, $sformatf("gate lasted %0d cycles", t2 - t1));
    repeat (10) @(posedge clk);
    seen = '{0, 0, 0, 0};
    repeat (20_000 * 8 * 2) @(posedge clk);
    v = 0;
    for (int k = 3; k >= 0; k--) begin
      chk(seen[k], $sformatf("digit %0d shown", k));
      chk(uart_digit[k] == shown[k], $sformatf("TxD digit %0d = %0d, display %0d", k, uart_digit[k], shown[k]));
      v = v * 10 + shown[k];
    end
    chk(v == 5000, $sformatf("frequency %0d Hz, expected 5000", v));
    chk(led_hz && !led_khz && !led_mhz && !led_ovl && !pt_seen && led_x1, "LEDs and point");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
