// tb_ind_driver: checks the display scan.  With a scan strobe every 7
// cycles it follows the slots and checks that digits 0..3 are lit one at a
// time in order with a dark slot between them, that each digit is lit once
// every eight strobes (125 Hz per digit with the 1 kHz strobe), that
// slot_start marks each lit slot once, and that the decimal point appears
// only with the selected digit.
module tb_ind_driver;
  logic clk = 0, rst_n = 0;
  logic scan_tick = 0, pt_en = 0;
  logic [1:0] pt_pos = 0;
  logic [3:0] en_disp;
  logic [1:0] digit_sel;
  logic blank, slot_start, pt_n;
  int checks = 0, failures = 0;

  ind_driver dut (.clk, .rst_n, .scan_tick, .pt_en, .pt_pos, .en_disp, .digit_sel,
                  .blank, .slot_start, .pt_n);

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
    int slot = 7, starts = 0, lit_count [4] = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 160; t++) begin
      pt_en  = (t / 40) % 2 == 1;
      pt_pos = 2'(t / 10);
      for (int c = 0; c < 7; c++) begin
        @(negedge clk);
        scan_tick = (c == 6);
        #1;
        if (c == 0) begin
          int d;
          bit dark;
          d    = slot / 2;
          dark = slot[0];
          chk(en_disp == (dark ? 4'b0 : 4'(1 << d)), $sformatf("en_disp=%b slot %0d", en_disp, slot));
          chk(blank == dark, "blank");
          chk(dark || digit_sel == 2'(d), "digit_sel");
          chk(pt_n == !(pt_en && !dark && pt_pos == 2'(d)), "point");
          if (!dark && slot_start) lit_count[d]++;
        end
        if (slot_start) starts++;
      end
      slot = (slot + 1) % 8;
    end
    @(negedge clk) scan_tick = 0;
    chk(starts == 80, $sformatf("slot starts %0d", starts));
    for (int d = 0; d < 4; d++) chk(lit_count[d] == 20, $sformatf("digit %0d lit %0d times in 160 strobes", d, lit_count[d]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
