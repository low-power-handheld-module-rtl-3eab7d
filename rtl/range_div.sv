// range_div: result-range logic.  Holds the range chosen with the CLK_RANGE
// button, lights LED_Hz / LED_kHz / LED_MHz, and from the ref_reg strobes
// picks the gate time and the digitization frequency and places the
// decimal point.
//
// Each CLK_RANGE press (`range_press`) steps Hz -> kHz -> MHz -> Hz and
// pulses `changed`.  With four decimal digits:
//   range  gate time (frequency modes)     display        digitization
//   Hz     1 s   (gate_tick = 1 Hz)        NNNN  Hz       1 Hz
//   kHz    10 ms (gate_tick = 100 Hz)      NNN.N kHz      1 kHz
//   MHz    1 ms  (gate_tick = 1 kHz)       N.NNN MHz      1 MHz
// The gate strobe paces the FSM in the frequency and calibrator modes; the
// digitization strobe (`ref_tick`) is what the period meter and the
// chronometer count, so there the LEDs name its frequency and no point is
// lit.  pt_en / pt_pos say which digit carries the decimal point.
// The document gives the three range LEDs, the point output and that the
// range is set by button; the gate times, digitization rates and point
// positions are this design's choice.
module range_div
  import mb2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       range_press,
  input  mode_e      mode,
  input  logic       tick_1mhz,
  input  logic       tick_1khz,
  input  logic       tick_100hz,
  input  logic       tick_1hz,
  output res_range_e res_range,
  output logic [2:0] led_range,   // {MHz, kHz, Hz}
  output logic       gate_tick,
  output logic       ref_tick,
  output logic       pt_en,
  output logic [1:0] pt_pos,
  output logic       changed
);
  logic freq_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_range <= RNG_HZ;
    else if (range_press)
      res_range <= (res_range == RNG_MHZ) ? RNG_HZ : res_range_e'(res_range + 2'd1);
  end

  assign changed   = range_press;
  assign freq_mode = (mode == MODE_FREQ) || (mode == MODE_CALIB);

  always_comb begin
    unique case (res_range)
      RNG_KHZ: begin gate_tick = tick_100hz; ref_tick = tick_1khz; pt_pos = 2'd1; end
      RNG_MHZ: begin gate_tick = tick_1khz;  ref_tick = tick_1mhz; pt_pos = 2'd3; end
      default: begin gate_tick = tick_1hz;   ref_tick = tick_1hz;  pt_pos = 2'd0; end
    endcase
    pt_en = freq_mode && (res_range != RNG_HZ);
  end

  always_comb begin
    led_range = '0;
    led_range[res_range] = 1'b1;
  end
endmodule
