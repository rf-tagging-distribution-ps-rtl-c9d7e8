// rf_tagging_top: digital core of the RF tagging and distribution module.
//
// The module takes the RF clock at 128 times the revolution frequency
// (53.2-61.2 MHz) and produces one clock that also carries the revolution
// tag: pulse 1 of every 128 is a quarter period wide instead of half a
// period. That clock is fanned out to 14 differential ECL outputs feeding
// RF synthesisers, which use the tag to lock to the same revolution phase.
//
// Inside: quarter_delay (behavioural delay element, T/4) -> tagger (counter,
// pulse-width modulation, test tag, LED) -> st3_jumper (normal or test
// signal). The input receiver, the TTL/ECL converter, the two 1:9 ECL
// clock drivers and the test-output buffers are analog and sit outside:
// rf_ck comes from the receiver; ecl_drive goes to the converter and
// drivers; test_* and rf_in_led go to the buffers and the LED.
//
// ref_clk is a free-running local clock used only for the LED (assumed,
// 10 MHz nominal); rst_n is a power-on reset (assumed). st3_test is the
// jumper position (0 = normal). Timing: the outputs follow rf_ck with the
// gate delays only; see tagger for the waveform.
module rf_tagging_top
  import rf_tag_pkg::*;
#(
  parameter int unsigned QUARTER_DELAY_PS = 4370,  // T/4 at 57.2 MHz
  parameter int unsigned LED_TIMEOUT      = 256    // ref_clk cycles
) (
  input  logic rf_ck,
  input  logic ref_clk,
  input  logic rst_n,
  input  logic st3_test,
  output logic ecl_drive,
  output logic test_tagd_ck,
  output logic test_rf_in,
  output logic test_frev,
  output logic rf_in_led
);
  timeunit 1ps;
  timeprecision 1ps;

  logic rf_ck_q, tagged_ck, test_tag_det;

  quarter_delay #(.DELAY_PS(QUARTER_DELAY_PS)) u_dly (.a(rf_ck), .y(rf_ck_q));

  tagger #(.LED_TIMEOUT(LED_TIMEOUT)) u_tagger (
    .rf_ck, .rf_ck_q, .ref_clk, .rst_n,
    .tagged_ck, .test_tag_det,
    .frev(test_frev), .rf_in_copy(test_rf_in), .rf_present(rf_in_led)
  );

  st3_jumper u_st3 (.tagged_ck, .test_tag_det, .sel_test(st3_test), .out(ecl_drive));

  assign test_tagd_ck = tagged_ck;
endmodule
