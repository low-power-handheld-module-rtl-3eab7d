// tb_in_div: checks the input divider.  For each of the four factors
// (stepped with range_press) it sends a random train of edge strobes and
// checks that div_tick comes with exactly every N-th edge, that the LED
// indication follows the factor and that a press restarts the count.
module tb_in_div;
  import mb2_pkg::*;
  logic clk = 0, rst_n = 0;
  logic range_press = 0, edge_in = 0;
  logic div_tick, changed;
  in_range_e in_range;
  logic [3:0] led_x;
  int checks = 0, failures = 0;

  in_div dut (.clk, .rst_n, .range_press, .edge_in, .div_tick, .in_range, .led_x, .changed);

  always #5 clk = ~clk;

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

  initial begin
    int n, edges, ticks;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      n = 1;
      for (int k = 0; k < r % 4; k++) n *= 10;
      @(negedge clk);
      chk(led_x == 4'(1 << (r % 4)), $sformatf("led_x=%b for factor %0d", led_x, n));
      edges = 0; ticks = 0;
      for (int i = 0; i < 2500; i++) begin
        @(negedge clk);
        edge_in = ($urandom_range(0, 2) == 0);
        #1;
        if (edge_in) begin
          edges++;
          chk(div_tick == (edges % n == 0), $sformatf("edge %0d factor %0d tick=%0d", edges, n, div_tick));
        end else chk(!div_tick, "tick without edge");
      end
      // a few edges into the next count, then change the factor
      @(negedge clk) edge_in = 0;
      @(negedge clk) range_press = 1;
      #1 chk(changed, "changed on press");
      @(negedge clk) range_press = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
