// work_fsm: main finite state machine that paces every measurement.
//
// Three states, visited in the order S1 -> S2 -> S3 -> S1, one step per
// `step` strobe:
//   S1  counting:  MESURE_C = '1', MESURE_CE = '0'
//   S2  holding:   MESURE_C = '0', MESURE_CE = '0' (result register loads)
//   S3  clearing:  MESURE_C = '0', MESURE_CE = '1'
// The outputs are decoded from the current state (Moore).  Because every
// state lasts one step interval, the result stays on the display through S2
// and S3, twice the counting time: T_disp = 2 * T_measure.
// The states and their MESURE_C / MESURE_CE values follow the document's
// state diagram and simulation trace; the step source (gate strobe, divided
// input or INT button) is chosen outside, in mode_p.  Reset and `restart`
// (a change of mode or range) put the FSM in S3, so the next step starts a
// full counting interval from zero: that is this design's choice.
module work_fsm
  import mb2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  input  logic       restart,
  output fsm_state_e state,
  output logic       mesure_c,
  output logic       mesure_ce
);
  fsm_state_e nxt;

  always_comb begin
    nxt = state;
    if (restart) nxt = ST_S3;
    else if (step) begin
      unique case (state)
        ST_S1:   nxt = ST_S2;
        ST_S2:   nxt = ST_S3;
        default: nxt = ST_S1;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_S3;
    else        state <= nxt;
  end

  assign mesure_c  = (state == ST_S1);
  assign mesure_ce = (state == ST_S3);

  // The counter is never enabled and cleared at once, and the state is legal.
  a_c_ce_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(mesure_c && mesure_ce));
  a_state_legal: assert property (@(posedge clk) disable iff (!rst_n)
    state inside {ST_S1, ST_S2, ST_S3});
endmodule
