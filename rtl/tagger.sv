// tagger: the programmable-logic part of the RF tagging module.
//
// Input is the h=128 RF clock (128 f_rev, TTL). The revolution tag is sent
// on that clock by pulse-width modulation: every pulse is half a period
// wide except pulse 1 of each revolution, which is a quarter period wide.
// A receiver that counts clock periods finds the revolution boundary by
// measuring pulse width, so all receivers lock to the same phase.
//
// Outputs (all from the module spec; how they are produced is this
// design's own):
//   tagged_ck    TAGGED_CK, short pulse every HARMONIC_P periods
//   test_tag_det TEST_TAG_DET, short pulse every TEST_PERIOD_P periods; fed
//                to a synthesiser it must raise that unit's tag-error flag
//   frev         f_rev square wave, rising with the tagged pulse
//   rf_in_copy   the RF input as received (TEST_RF_IN)
//   rf_present   RF IN LED drive
//
// Structure: tag_counter (counter and tag windows) -> two pwm_gate
// instances; rf_detect watches frev on the local ref_clk.
// rf_ck_q must be rf_ck delayed by a quarter period (see quarter_delay).
// Timing: tag windows change on the falling edge of rf_ck; the outputs
// follow rf_ck and rf_ck_q combinationally.
module tagger
  import rf_tag_pkg::*;
#(
  parameter int unsigned HARMONIC_P    = HARMONIC,
  parameter int unsigned TEST_PERIOD_P = TEST_PERIOD,
  parameter int unsigned LED_TIMEOUT   = 256
) (
  input  logic rf_ck,
  input  logic rf_ck_q,
  input  logic ref_clk,
  input  logic rst_n,
  output logic tagged_ck,
  output logic test_tag_det,
  output logic frev,
  output logic rf_in_copy,
  output logic rf_present
);
  timeunit 1ps;
  timeprecision 1ps;

  logic tag_win, test_win;
  logic [$clog2(TEST_PERIOD_P)-1:0] count;

  tag_counter #(.HARMONIC_P(HARMONIC_P), .TEST_PERIOD_P(TEST_PERIOD_P)) u_cnt (
    .rf_ck, .rst_n, .tag_win, .test_win, .frev, .count
  );

  pwm_gate u_tag  (.rf_ck, .rf_ck_q, .win(tag_win),  .ck_out(tagged_ck));
  pwm_gate u_test (.rf_ck, .rf_ck_q, .win(test_win), .ck_out(test_tag_det));

  rf_detect #(.TIMEOUT(LED_TIMEOUT)) u_led (
    .ref_clk, .rst_n, .activity(frev), .present(rf_present)
  );

  assign rf_in_copy = rf_ck;
endmodule
