// mb2_pkg: types and constants shared by the blocks of the handheld
// measurement module.
//
// The five operating modes and the three states of the main FSM come from
// the description of the instrument; their binary codes are this design's
// choice (the FSM-side mode bus is three bits wide, as in the synthesised
// FSM of the original, which names it inmod_reg[2:0]).
package mb2_pkg;

  // Operating modes, in the order the instrument lists them.
  typedef enum logic [2:0] {
    MODE_FREQ   = 3'd0,  // frequency meter (count INPUT_A during a gate time)
    MODE_PERIOD = 3'd1,  // period meter (count reference pulses during N input periods)
    MODE_PHASE  = 3'd2,  // phase difference (count INPUT_A while divided INPUT_B enables)
    MODE_CHRONO = 3'd3,  // chronometer (count reference pulses between INT presses)
    MODE_CALIB  = 3'd4   // calibrator (same data path as the frequency meter)
  } mode_e;

  // States of the main FSM.  S1 counts (MESURE_C='1'), S2 holds the count
  // and hands it to the result register, S3 clears the counter (MESURE_CE='1').
  typedef enum logic [1:0] {
    ST_S1 = 2'd0,
    ST_S2 = 2'd1,
    ST_S3 = 2'd2
  } fsm_state_e;

  // Result range selected by CLK_RANGE, shown on LED_Hz / LED_kHz / LED_MHz.
  typedef enum logic [1:0] {
    RNG_HZ  = 2'd0,
    RNG_KHZ = 2'd1,
    RNG_MHZ = 2'd2
  } res_range_e;

  // Input divider factor selected by INPUT_RANGE: 10**code.
  typedef enum logic [1:0] {
    DIV_X1    = 2'd0,
    DIV_X10   = 2'd1,
    DIV_X100  = 2'd2,
    DIV_X1000 = 2'd3
  } in_range_e;

  // Number of display digits / BCD decades.
  localparam int unsigned DIGITS = 4;

endpackage
