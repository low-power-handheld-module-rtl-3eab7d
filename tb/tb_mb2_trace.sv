// tb_mb2_trace: replays the two reference traces of the instrument, the
// measurement process and the data output, on the top level with a reduced
// time base (PRESCALE = 2, MHz range: 2000-cycle gate).  INPUT_A has a
// period of 500 cycles, so exactly four edges fall in each gate.  Checked:
//   - during S1 the digit-0 counter steps 1, 2, 3, 4 and MESURE_C is high,
//     MESURE_CE is high only in S3 and the counter is 0 there;
//   - the result register then reads 0004 and is held through S2 and S3;
//   - on the display digit 0 shows '4' (segments A, D, E dark, G lit) and
//     digits 1-3 show '0' (G dark, A, D, E lit), one digit at a time;
//   - TxD carries the bytes 0x04, 0x10, 0x20, 0x30 (digit index, BCD).
module tb_mb2_trace;
  localparam int PRESCALE = 2;
  localparam int UART_HALF = 100;
  localparam int BIT = 2 * UART_HALF;
  localparam int PA = 500;

  logic clk = 0, rst_n = 0, clk_range = 0, input_a = 0, clk_uart = 0;
  logic led_ovl, led_hz, led_khz, led_mhz, led_x1, led_x10, led_x100, led_x1000, pt;
  logic en0, en1, en2, en3, sa, sb, sc, sd, se, sf, sg, txd;
  int checks = 0, failures = 0;

  mb2_top #(.PRESCALE(PRESCALE)) dut (
    .in20m(clk), .reset_n(rst_n), .input_a, .input_b(1'b0), .int_btn(1'b0), .in_mode(1'b0),
    .input_range(1'b0), .clk_range, .pause(1'b0), .clk_uart, .led_ovl, .led_hz, .led_khz,
    .led_mhz, .led_x1, .led_x10, .led_x100, .led_x1000, .pt, .en_disp0(en0), .en_disp1(en1),
    .en_disp2(en2), .en_disp3(en3), .seg_a(sa), .seg_b(sb), .seg_c(sc), .seg_d(sd), .seg_e(se),
    .seg_f(sf), .seg_g(sg), .txd);

  always #25 clk = ~clk;

  int ca = 0, cu = 0;
  always @(posedge clk) begin
    ca = (ca + 1 >= PA) ? 0 : ca + 1;
    cu = (cu + 1 >= BIT) ? 0 : cu + 1;
    input_a  <= (ca < PA / 2);
    clk_uart <= (cu < UART_HALF);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // counter trace during S1
  int steps [$];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_work_fsm.state == mb2_pkg::ST_S1 && dut.u_work_reg.carry[0])
      steps.push_back(int'(dut.u_work_reg.buf_q[0]) + 1);
    if (dut.u_work_fsm.state == mb2_pkg::ST_S3) begin
      if (!dut.u_work_fsm.mesure_ce || dut.u_work_fsm.mesure_c) begin
        failures++; $display("FAIL S3 outputs");
      end
    end
  end

  // display segments per digit
  logic [6:0] seg_of [4];
  always @(posedge clk) if (rst_n && $onehot({en3, en2, en1, en0}))
    seg_of[$clog2({en3, en2, en1, en0})] = {sg, sf, se, sd, sc, sb, sa};

  // serial bytes
  logic [7:0] bytes [$];
  initial begin
    logic [11:0] f;
    forever begin
      @(negedge txd);
      repeat (BIT / 2) @(posedge clk);
      for (int b = 0; b < 12; b++) begin
        f[b] = txd;
        if (b < 11) repeat (BIT) @(posedge clk);
      end
      chk(f[0] == 0 && f[11:10] == 2'b11 && ^f[9:1] == 0, "frame");
      bytes.push_back(f[8:1]);
    end
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Hz -> kHz -> MHz
    repeat (2) begin
      @(negedge clk) clk_range = 1;
      repeat (5) @(negedge clk);
      clk_range = 0;
      repeat (5) @(negedge clk);
    end
    chk(led_mhz, "MHz range");
    repeat (2) begin
      wait (dut.u_work_fsm.state == mb2_pkg::ST_S1);
      steps.delete();
      wait (dut.u_work_fsm.state == mb2_pkg::ST_S2);
      chk(steps.size() == 4 && steps[0] == 1 && steps[1] == 2 && steps[2] == 3 && steps[3] == 4,
          $sformatf("BUF0 sequence has %0d steps", steps.size()));
      @(posedge clk); @(posedge clk);
      chk(dut.u_work_reg.reg_q[0] == 4 && dut.u_work_reg.reg_q[1] == 0 &&
          dut.u_work_reg.reg_q[2] == 0 && dut.u_work_reg.reg_q[3] == 0, "REG = 0004");
      wait (dut.u_work_fsm.state == mb2_pkg::ST_S3);
      @(posedge clk); @(posedge clk);
      chk(dut.u_work_reg.buf_q[0] == 0, "BUF0 cleared in S3");
      chk(dut.u_work_reg.reg_q[0] == 4, "REG held in S3");
    end
    bytes.delete();
    repeat (PRESCALE * 1000 * 8 * 2) @(posedge clk);
    // '4': A, D, E dark ('1'); G lit ('0').  '0': G dark, A, D, E lit.
    chk(seg_of[0] == 7'b001_1001, $sformatf("digit 0 segments %b", seg_of[0]));
    for (int k = 1; k < 4; k++) chk(seg_of[k] == 7'b100_0000, $sformatf("digit %0d segments %b", k, seg_of[k]));
    chk(bytes.size() >= 4, "bytes received");
    foreach (bytes[i]) chk(bytes[i] inside {8'h04, 8'h10, 8'h20, 8'h30}, $sformatf("byte %h", bytes[i]));
    for (int k = 0; k < 4; k++) chk(8'(k * 16 + (k == 0 ? 4 : 0)) inside {bytes}, $sformatf("digit %0d sent", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
