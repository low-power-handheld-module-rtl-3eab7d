// ind_driver: dynamic drive of the four-digit LED display.
//
// On every `scan_tick` strobe the driver advances through eight slots:
// digit 0 lit, dark, digit 1 lit, dark, digit 2, dark, digit 3, dark.  The
// dark slots keep neighbouring digits from bleeding into one another.
// With the 1 kHz strobe of ref_reg each digit is lit for 1 ms every 8 ms,
// a refresh of 125 Hz per digit.  en_disp[k] (EN_DISPk, active high) lights
// digit k, digit 0 being the least significant.  `digit_sel` tells the
// working register which digit to put on the BCD bus, `blank` darkens the
// segment decoder in the dark slots, and `slot_start` pulses for one cycle
// when a digit is switched on, which the serial transmitter uses to pick up
// the digit.  `pt_n` (PT, active low like the segments) lights the decimal
// point while digit pt_pos is lit, if pt_en.
// The dark gaps and a refresh above 100 Hz per digit are the document's;
// the slot pattern, the scan order and the active levels are this design's.
module ind_driver
  import mb2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan_tick,
  input  logic       pt_en,
  input  logic [1:0] pt_pos,
  output logic [3:0] en_disp,
  output logic [1:0] digit_sel,
  output logic       blank,
  output logic       slot_start,
  output logic       pt_n
);
  logic [2:0] slot;   // {digit, dark}
  logic       fresh;  // first cycle of a slot

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot  <= 3'd7;
      fresh <= 1'b0;
    end else begin
      fresh <= scan_tick;
      if (scan_tick) slot <= slot + 3'd1;
    end
  end

  assign digit_sel  = slot[2:1];
  assign blank      = slot[0];
  assign slot_start = fresh && !slot[0];
  assign pt_n       = !(pt_en && !blank && (digit_sel == pt_pos));

  always_comb begin
    en_disp = '0;
    if (!blank) en_disp[digit_sel] = 1'b1;
  end

  a_one_digit: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(en_disp));
endmodule
