// bcd7seg: BCD to seven-segment code converter for the LED display.
//
// Purely combinational.  seg_n[0] drives segment A, seg_n[1] B, ... seg_n[6] G,
// with the usual layout (A top, B upper right, C lower right, D bottom,
// E lower left, F upper left, G middle).  Segments are active low, as the
// instrument's SEG_A..SEG_G outputs are ('0' lights a segment).  `blank`
// turns every segment off; the display driver uses it for the dark gaps
// between digits.  Codes 10..15 are not BCD and are shown dark, which is
// this design's choice.
module bcd7seg (
  input  logic [3:0] bcd,
  input  logic       blank,
  output logic [6:0] seg_n   // {G,F,E,D,C,B,A}, active low
);
  logic [6:0] seg_on;        // active-high pattern {G,F,E,D,C,B,A}

  always_comb begin
    unique case (bcd)
      4'd0:    seg_on = 7'b011_1111;
      4'd1:    seg_on = 7'b000_0110;
      4'd2:    seg_on = 7'b101_1011;
      4'd3:    seg_on = 7'b100_1111;
      4'd4:    seg_on = 7'b110_0110;
      4'd5:    seg_on = 7'b110_1101;
      4'd6:    seg_on = 7'b111_1101;
      4'd7:    seg_on = 7'b000_0111;
      4'd8:    seg_on = 7'b111_1111;
      4'd9:    seg_on = 7'b110_1111;
      default: seg_on = 7'b000_0000;
    endcase
    seg_n = blank ? 7'b111_1111 : ~seg_on;
  end
endmodule
