// pwm_gate: pulse-width modulator that writes the tag into the clock.
//
// The tag travels on the clock itself: every clock pulse is normally half a
// period wide, and the tagged pulse is cut to a quarter period. This gate
// forms that waveform from the RF clock and a copy of it delayed by a
// quarter period (rf_ck_q):
//
//   ck_out = rf_ck & ~(win & rf_ck_q)
//
// While win is low the clock passes unchanged (high for T/2). While win is
// high the pulse ends when rf_ck_q rises, T/4 after rf_ck, giving a T/4
// pulse. win must only change while rf_ck is low (tag_counter registers it
// on the falling edge), so ck_out has no glitches. The T/2 and T/4 widths
// follow the module's timing diagram; the gating itself is this design's
// own choice. Purely combinational.
module pwm_gate (
  input  logic rf_ck,
  input  logic rf_ck_q,
  input  logic win,
  output logic ck_out
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb ck_out = rf_ck & ~(win & rf_ck_q);
endmodule
