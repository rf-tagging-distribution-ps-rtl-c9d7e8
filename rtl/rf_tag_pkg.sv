// rf_tag_pkg: constants shared by the RF tagging logic.
//
// The tagged clock runs at harmonic HARMONIC of the revolution frequency,
// so one revolution lasts HARMONIC clock periods and carries one tag. The
// test signal used to provoke a tag error in the receiving synthesisers
// carries a tag every TEST_PERIOD clock periods instead. NUM_OUTPUTS is the
// number of differential ECL outputs the tagged clock is fanned out to by
// the (analog) clock drivers; it is recorded here for reference only.
package rf_tag_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned HARMONIC    = 128;  // h = 128, from the module spec
  localparam int unsigned TEST_PERIOD = 256;  // tag spacing of the test signal
  localparam int unsigned NUM_OUTPUTS = 14;   // TAG'D CK outputs 1..14

endpackage
