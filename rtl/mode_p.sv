// mode_p: working-mode register and the mode-dependent routing around the
// counter.
//
// Each IN_MODE press (`mode_press`, a one-cycle strobe) steps the mode
// frequency -> period -> phase -> chronometer -> calibrator -> frequency and
// pulses `changed`.  The routing is combinational:
//   mode        counted pulses (cnt_evt)   FSM step          divider input
//   frequency   INPUT_A edges              gate strobe        INPUT_A
//   calibrator  INPUT_A edges              gate strobe        INPUT_A
//   period      reference strobe           divided INPUT_A    INPUT_A
//   phase       INPUT_A edges              divided INPUT_B    INPUT_B
//   chronometer reference strobe           INT press          INPUT_A
// The five modes and what each one counts and for how long follow the
// document; the calibrator is given there only as the frequency-meter block
// scheme, so it shares that routing.  The mode order and the stepping
// button behaviour are this design's.
module mode_p
  import mb2_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mode_press,
  input  logic  a_rise,      // INPUT_A rising edge strobe
  input  logic  b_rise,      // INPUT_B rising edge strobe
  input  logic  ref_tick,    // digitization strobe from range_div
  input  logic  gate_tick,   // gate-time strobe from range_div
  input  logic  div_tick,    // divided-input strobe from in_div
  input  logic  int_press,   // INT button strobe
  output mode_e mode,
  output logic  div_src,     // edge strobe fed to in_div
  output logic  cnt_evt,     // pulse to be counted by work_reg
  output logic  fsm_step,    // step strobe for work_fsm
  output logic  changed
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode <= MODE_FREQ;
    else if (mode_press)
      mode <= (mode == MODE_CALIB) ? MODE_FREQ : mode_e'(mode + 3'd1);
  end

  assign changed = mode_press;

  always_comb begin
    div_src  = a_rise;
    cnt_evt  = a_rise;
    fsm_step = gate_tick;
    unique case (mode)
      MODE_PERIOD: begin cnt_evt = ref_tick; fsm_step = div_tick;  end
      MODE_PHASE:  begin div_src = b_rise;   fsm_step = div_tick;  end
      MODE_CHRONO: begin cnt_evt = ref_tick; fsm_step = int_press; end
      default: ;   // frequency meter and calibrator
    endcase
  end
endmodule
