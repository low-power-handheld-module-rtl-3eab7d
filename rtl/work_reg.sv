// work_reg: the two-level working registers.
//
// Level one is a four-decade BCD counter (buf_q, digit 0 least significant).
// While MESURE_C is '1' it adds one for every `cnt_evt` strobe; while
// MESURE_CE is '1' it is set to zero.  A carry out of the top decade
// (9999 -> 0000) sets the overload flag, which MESURE_CE clears.
// Level two (reg_q and ovl) is loaded from level one in every cycle that
// `load` is '1' (the FSM's hold state) and `hold` is '0'; with `hold` = '1'
// (the Memory / PAUSE function) it keeps the last measured value.
// `bcd_out` is the level-two digit chosen by `digit_sel`, read by the
// display and the serial transmitter.
// Both levels and the MESURE_C / MESURE_CE roles follow the document; BCD
// counting follows its simulation trace, where a 4-bit digit BUF0 counts
// 0001, 0010, 0011, 0100.  The overload rule is this design's.
module work_reg
  import mb2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cnt_evt,     // one pulse to count
  input  logic       mesure_c,    // enable level one
  input  logic       mesure_ce,   // clear level one
  input  logic       load,        // copy level one to level two
  input  logic       hold,        // Memory: freeze level two
  input  logic [1:0] digit_sel,
  output logic [3:0] reg_q [DIGITS],
  output logic       ovl,
  output logic [3:0] bcd_out
);
  logic [3:0] buf_q [DIGITS];
  logic       buf_ovl;
  logic [DIGITS:0] carry;

  // carry[i] is the increment into decade i.
  assign carry[0] = mesure_c && cnt_evt;
  for (genvar i = 0; i < DIGITS; i++) begin : g_carry
    assign carry[i+1] = carry[i] && (buf_q[i] == 4'd9);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIGITS; i++) buf_q[i] <= '0;
      buf_ovl <= 1'b0;
    end else if (mesure_ce) begin
      for (int i = 0; i < DIGITS; i++) buf_q[i] <= '0;
      buf_ovl <= 1'b0;
    end else begin
      for (int i = 0; i < DIGITS; i++)
        if (carry[i]) buf_q[i] <= (buf_q[i] == 4'd9) ? 4'd0 : buf_q[i] + 4'd1;
      if (carry[DIGITS]) buf_ovl <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIGITS; i++) reg_q[i] <= '0;
      ovl <= 1'b0;
    end else if (load && !hold) begin
      for (int i = 0; i < DIGITS; i++) reg_q[i] <= buf_q[i];
      ovl <= buf_ovl;
    end
  end

  assign bcd_out = reg_q[digit_sel];
endmodule
