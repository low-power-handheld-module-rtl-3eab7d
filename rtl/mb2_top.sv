// mb2_top: handheld measurement module MB-2, a counter-based instrument that
// measures frequency, period, phase difference and time intervals, and
// checks an external generator (calibrator), showing the result on a
// four-digit multiplexed LED display and sending it over a serial line.
//
// Everything runs on the IN20M crystal clock (20 MHz).  The asynchronous
// inputs (INPUT_A, INPUT_B, the buttons, CLK_UART) are resynchronised and
// turned into one-cycle edge strobes.  ref_reg divides the crystal into
// 1 MHz / 1 kHz / 100 Hz / 1 Hz strobes; range_div picks from them the gate
// time and digitization frequency of the range set with CLK_RANGE; in_div
// divides INPUT_A (INPUT_B in the phase mode) by 1/10/100/1000; mode_p routes,
// per mode, which pulses are counted and what paces the main FSM.  work_fsm
// cycles S1 (count) -> S2 (hold, result register loads) -> S3 (clear) once
// per pacing strobe, so a result is shown for twice the counting time.
// work_reg counts in BCD and keeps the last result; PAUSE (the Memory
// function) freezes it.  ind_driver scans the digits with dark gaps, bcd7seg
// decodes the digit for the active-low segments, and uart_tx sends every
// digit that is switched on as one byte {2'b00, digit index, BCD}, 8 data
// bits, even parity and two stop bits at the CLK_UART bit rate.
// Buttons (IN_MODE, INPUT_RANGE, CLK_RANGE, INT) act on their rising edge;
// PAUSE acts while high.  RESET_N is active low and asynchronous.
// The block structure, signal names, the FSM and the frame come from the
// document; rates, encodings, button behaviour and the byte format are this
// design's choices, described in each block.
module mb2_top
  import mb2_pkg::*;
#(
  parameter int unsigned PRESCALE   = 20,   // IN20M cycles per microsecond
  parameter int unsigned STOP_BITS  = 2,
  parameter bit          ODD_PARITY = 1'b0
) (
  input  logic in20m,
  input  logic reset_n,
  input  logic input_a,
  input  logic input_b,
  input  logic int_btn,       // INT: chronometer start / stop / clear
  input  logic in_mode,
  input  logic input_range,
  input  logic clk_range,
  input  logic pause,         // Memory function: hold the displayed value
  input  logic clk_uart,      // 9600 Hz bit clock from the external generator
  output logic led_ovl,
  output logic led_hz,
  output logic led_khz,
  output logic led_mhz,
  output logic led_x1,
  output logic led_x10,
  output logic led_x100,
  output logic led_x1000,
  output logic pt,            // decimal point, active low
  output logic en_disp0,
  output logic en_disp1,
  output logic en_disp2,
  output logic en_disp3,
  output logic seg_a,         // segments, active low
  output logic seg_b,
  output logic seg_c,
  output logic seg_d,
  output logic seg_e,
  output logic seg_f,
  output logic seg_g,
  output logic txd
);
  logic clk, rst_n;
  assign clk   = in20m;
  assign rst_n = reset_n;

  // Input synchronisation.
  logic a_rise, b_rise, int_press, mode_press, inr_press, clkr_press;
  logic uart_tick, pause_lvl;
  logic unused_lvl_a, unused_lvl_b, unused_lvl_i, unused_lvl_m, unused_lvl_r,
        unused_lvl_c, unused_lvl_u, unused_rise_p;

  sync_edge u_sync_a    (.clk, .rst_n, .d(input_a),     .level(unused_lvl_a), .rise(a_rise));
  sync_edge u_sync_b    (.clk, .rst_n, .d(input_b),     .level(unused_lvl_b), .rise(b_rise));
  sync_edge u_sync_int  (.clk, .rst_n, .d(int_btn),     .level(unused_lvl_i), .rise(int_press));
  sync_edge u_sync_mode (.clk, .rst_n, .d(in_mode),     .level(unused_lvl_m), .rise(mode_press));
  sync_edge u_sync_inr  (.clk, .rst_n, .d(input_range), .level(unused_lvl_r), .rise(inr_press));
  sync_edge u_sync_clkr (.clk, .rst_n, .d(clk_range),   .level(unused_lvl_c), .rise(clkr_press));
  sync_edge u_sync_uart (.clk, .rst_n, .d(clk_uart),    .level(unused_lvl_u), .rise(uart_tick));
  sync_edge u_sync_pause(.clk, .rst_n, .d(pause),       .level(pause_lvl),    .rise(unused_rise_p));

  // Time base.
  logic tick_1mhz, tick_1khz, tick_100hz, tick_1hz;
  ref_reg #(.PRESCALE(PRESCALE)) u_ref_reg (
    .clk, .rst_n, .tick_1mhz, .tick_1khz, .tick_100hz, .tick_1hz);

  // Mode and ranges.
  mode_e      mode;
  res_range_e res_range;
  in_range_e  in_range;
  logic [2:0] led_range;
  logic [3:0] led_x;
  logic gate_tick, ref_tick, pt_en, rng_changed, div_changed, mode_changed;
  logic [1:0] pt_pos;
  logic div_src, div_tick, cnt_evt, fsm_step;

  range_div u_range_div (
    .clk, .rst_n, .range_press(clkr_press), .mode,
    .tick_1mhz, .tick_1khz, .tick_100hz, .tick_1hz,
    .res_range, .led_range, .gate_tick, .ref_tick, .pt_en, .pt_pos,
    .changed(rng_changed));

  mode_p u_mode_p (
    .clk, .rst_n, .mode_press, .a_rise, .b_rise, .ref_tick, .gate_tick,
    .div_tick, .int_press, .mode, .div_src, .cnt_evt, .fsm_step,
    .changed(mode_changed));

  in_div u_in_div (
    .clk, .rst_n, .range_press(inr_press), .edge_in(div_src), .div_tick,
    .in_range, .led_x, .changed(div_changed));

  // Measurement.
  fsm_state_e state;
  logic mesure_c, mesure_ce;
  work_fsm u_work_fsm (
    .clk, .rst_n, .step(fsm_step),
    .restart(mode_changed || rng_changed || div_changed),
    .state, .mesure_c, .mesure_ce);

  logic [3:0] reg_q [DIGITS];
  logic [3:0] bcd_out;
  logic [1:0] digit_sel;
  logic       ovl;
  work_reg u_work_reg (
    .clk, .rst_n, .cnt_evt, .mesure_c, .mesure_ce,
    .load(state == ST_S2), .hold(pause_lvl), .digit_sel,
    .reg_q, .ovl, .bcd_out);

  // Display.
  logic [3:0] en_disp;
  logic       blank, slot_start;
  logic [6:0] seg_n;
  ind_driver u_ind_driver (
    .clk, .rst_n, .scan_tick(tick_1khz), .pt_en, .pt_pos,
    .en_disp, .digit_sel, .blank, .slot_start, .pt_n(pt));

  bcd7seg u_bcd7seg (.bcd(bcd_out), .blank, .seg_n);

  // Serial output of the displayed digits.
  logic thr_empty, tx_busy;
  uart_tx #(.STOP_BITS(STOP_BITS), .ODD_PARITY(ODD_PARITY)) u_uart_tx (
    .clk, .rst_n, .bit_tick(uart_tick),
    .wr(slot_start && thr_empty), .wdata({2'b00, digit_sel, bcd_out}),
    .thr_empty, .busy(tx_busy), .txd);

  assign {seg_g, seg_f, seg_e, seg_d, seg_c, seg_b, seg_a} = seg_n;
  assign {en_disp3, en_disp2, en_disp1, en_disp0} = en_disp;
  assign {led_mhz, led_khz, led_hz} = led_range;
  assign {led_x1000, led_x100, led_x10, led_x1} = led_x;
  assign led_ovl = ovl;
endmodule
