// in_div: input signal divider.  Divides the pulses of the measured signal
// by 1, 10, 100 or 1000 and keeps the divider setting chosen with the
// INPUT_RANGE button.
//
// `edge_in` is a one-cycle strobe per rising edge of the signal to divide
// (INPUT_A, or INPUT_B in the phase mode).  `div_tick` is a one-cycle strobe
// in the same cycle as every N-th input edge, N = 10**in_range, so the time
// between two div_ticks is N periods of the input.  Each press of the
// INPUT_RANGE button (`range_press`) steps the factor x1 -> x10 -> x100 ->
// x1000 -> x1, restarts the count and pulses `changed` so that a measurement
// in progress is discarded.  led_x[k] lights the LED_x(10**k) indicator.
// The four factors are the document's; the button stepping, the restart and
// the strobe form are this design's choices.
module in_div
  import mb2_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      range_press,
  input  logic      edge_in,
  output logic      div_tick,
  output in_range_e in_range,
  output logic [3:0] led_x,     // {x1000, x100, x10, x1}
  output logic      changed
);
  logic [9:0] cnt;
  logic [9:0] last;             // N - 1

  always_comb begin
    unique case (in_range)
      DIV_X1:    last = 10'd0;
      DIV_X10:   last = 10'd9;
      DIV_X100:  last = 10'd99;
      default:   last = 10'd999;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_range <= DIV_X1;
      cnt      <= '0;
    end else if (range_press) begin
      in_range <= in_range_e'(in_range + 2'd1);
      cnt      <= '0;
    end else if (edge_in) begin
      cnt <= (cnt == last) ? 10'd0 : cnt + 10'd1;
    end
  end

  assign div_tick = edge_in && !range_press && (cnt == last);
  assign changed  = range_press;

  always_comb begin
    led_x = '0;
    led_x[in_range] = 1'b1;
  end
endmodule
