// quarter_delay: behavioural model (not synthesizable) of the delay element
// that gives the RF clock shifted by a quarter period.
//
// The tag pulse is a quarter period wide, so the tagger needs a copy of the
// RF clock delayed by T/4. The means is not specified for the module; this
// model is a fixed transport delay. DELAY_PS = 4370 ps is T/4 at 57.2 MHz,
// the middle of the 53.2-61.2 MHz operating range; at the ends of that range
// the tag pulse is 0.23 T to 0.27 T wide. In hardware this would be a delay
// line or a chain of gates; replace this model with the real part.
module quarter_delay #(
  parameter int unsigned DELAY_PS = 4370  // delay in picoseconds
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  initial y = 1'b0;
  always @(a) y <= #(DELAY_PS) a;
endmodule
