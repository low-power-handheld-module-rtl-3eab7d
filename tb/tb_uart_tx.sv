// tb_uart_tx: checks the serial transmitter.  A receiver model samples TxD
// in the middle of every bit period and decodes start bit, eight data bits
// LSB first, even parity and two stop bits.  Bytes are written as soon as
// the holding register is free, so the double buffering must let frames
// follow one another with no idle bit in between; every byte must arrive
// in order with a correct frame.  Each frame must last 12 bit periods.
module tb_uart_tx;
  localparam int BIT = 16;   // clock cycles per bit
  logic clk = 0, rst_n = 0;
  logic bit_tick = 0, wr = 0;
  logic [7:0] wdata = 0;
  logic thr_empty, busy, txd;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  int received = 0;
  longint cyc = 0;

  uart_tx dut (.clk, .rst_n, .bit_tick, .wr, .wdata, .thr_empty, .busy, .txd);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    bit_tick <= (cyc % BIT == 0);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver
  initial begin
    logic [11:0] f;
    longint t0, t1, prev_t0;
    forever begin
      @(negedge txd);
      t0 = cyc;
      repeat (BIT / 2) @(posedge clk);
      for (int b = 0; b < 12; b++) begin
        f[b] = txd;
        if (b < 11) repeat (BIT) @(posedge clk);
      end
      chk(f[0] == 1'b0, "start bit");
      chk(f[11:10] == 2'b11, "two stop bits");
      chk(^f[9:1] == 1'b0, "even parity");
      if (sent.size() > 0) begin
        chk(f[8:1] == sent[0], $sformatf("data %h expected %h", f[8:1], sent[0]));
        void'(sent.pop_front());
      end else chk(0, "unexpected frame");
      received++;
      // next start bit must follow the stop bits directly while data is waiting
      t1 = cyc;
      chk(t1 - t0 inside {[11 * BIT + BIT / 2 - 1 : 11 * BIT + BIT / 2 + 1]}, $sformatf("frame length %0d", t1 - t0));
      // while bytes keep coming, a frame starts right after the one before
      if (received >= 2 && received <= 20)
        chk(t0 - prev_t0 == 12 * BIT, $sformatf("frame spacing %0d", t0 - prev_t0));
      prev_t0 = t0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(txd == 1'b1, "idle marker");
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      while (!thr_empty) @(negedge clk);
      wdata = 8'($urandom);
      wr = 1;
      sent.push_back(wdata);
      @(negedge clk) wr = 0;
      if (i == 20) repeat (30 * BIT) @(negedge clk);  // let the line go idle
    end
    while (sent.size() > 0) @(negedge clk);
    repeat (2 * BIT) @(negedge clk);
    chk(txd == 1'b1 && received == 40, $sformatf("received %0d", received));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
