// ref_reg: reference divider.  Turns the 20 MHz crystal clock into the time
// base of the instrument: one-cycle enable strobes at 1 MHz, 1 kHz, 100 Hz
// and 1 Hz.
//
// A prescaler divides by PRESCALE (20 for a 20 MHz crystal) to give the
// 1 MHz strobe; a chain of decade counters, each advanced by the strobe of
// the stage before it, gives 100 kHz, 10 kHz, 1 kHz, 100 Hz, 10 Hz and 1 Hz.
// Every strobe is high for exactly one IN20M cycle, so the period of the
// 10**-k strobe is exactly PRESCALE * 10**k cycles and all strobes are
// aligned: a 1 Hz strobe coincides with a 1 kHz and a 1 MHz strobe.
// The document gives the crystal frequency and that this block derives the
// internal clocks; the set of rates and the strobe form are this design's.
module ref_reg #(
  parameter int unsigned PRESCALE = 20   // IN20M cycles per 1 MHz strobe
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick_1mhz,
  output logic tick_1khz,
  output logic tick_100hz,
  output logic tick_1hz
);
  localparam int unsigned PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [PW-1:0] pre;
  logic [6:0]    stage_tick;   // [0]=1 MHz, [1]=100 kHz, ... [6]=1 Hz
  logic [3:0]    dec [1:6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pre <= '0;
    else if (pre == PW'(PRESCALE - 1)) pre <= '0;
    else pre <= pre + 1'b1;
  end
  assign stage_tick[0] = (pre == PW'(PRESCALE - 1));

  for (genvar i = 1; i <= 6; i++) begin : g_decade
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dec[i] <= '0;
      else if (stage_tick[i-1]) dec[i] <= (dec[i] == 4'd9) ? 4'd0 : dec[i] + 4'd1;
    end
    assign stage_tick[i] = stage_tick[i-1] && (dec[i] == 4'd9);
  end

  assign tick_1mhz  = stage_tick[0];
  assign tick_1khz  = stage_tick[3];
  assign tick_100hz = stage_tick[4];
  assign tick_1hz   = stage_tick[6];
endmodule
