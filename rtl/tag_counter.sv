// tag_counter: revolution counter of the RF tagger.
//
// A free-running counter advances on every rising edge of the h=128 RF
// clock. Its low 7 bits divide by 128 and mark one revolution; an eighth
// bit extends the count to 256 periods for the test tag. The module spec
// names the 7-bit counter; the extra bit and the exact window timing are
// this design's choices.
//
// Timing: count takes value 0 at the rising edge that starts the tagged
// pulse ("pulse 1" of a revolution). tag_win and test_win are registered on
// the FALLING edge of rf_ck during the preceding pulse, so they are high for
// exactly one clock period centred on the whole high phase of pulse 1 and
// never change while rf_ck is high; the pulse shaper can then gate the clock
// with them without glitches. frev is the counter MSB, inverted: a 50 %
// square wave at f_rev that rises at the start of each tagged pulse.
// rst_n clears everything asynchronously (power-on reset, assumed).
module tag_counter
  import rf_tag_pkg::*;
#(
  parameter int unsigned HARMONIC_P    = HARMONIC,     // periods per revolution
  parameter int unsigned TEST_PERIOD_P = TEST_PERIOD   // periods per test tag
) (
  input  logic                              rf_ck,
  input  logic                              rst_n,
  output logic                              tag_win,
  output logic                              test_win,
  output logic                              frev,
  output logic [$clog2(TEST_PERIOD_P)-1:0]  count
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W  = $clog2(TEST_PERIOD_P);
  localparam int unsigned HW = $clog2(HARMONIC_P);

  // Power-of-two periods keep the counter a plain binary counter.
  initial begin
    assert (HARMONIC_P >= 4 && (1 << HW) == HARMONIC_P)
      else $error("HARMONIC_P must be a power of two >= 4");
    assert (TEST_PERIOD_P >= HARMONIC_P && (1 << W) == TEST_PERIOD_P)
      else $error("TEST_PERIOD_P must be a power of two >= HARMONIC_P");
  end

  // Rising edge: count periods.
  always_ff @(posedge rf_ck or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

  // Falling edge: open the window for the next pulse when the next count is 0.
  always_ff @(negedge rf_ck or negedge rst_n) begin
    if (!rst_n) begin
      tag_win  <= 1'b0;
      test_win <= 1'b0;
    end else begin
      tag_win  <= (count[HW-1:0] == HW'(HARMONIC_P - 1));
      test_win <= (count == W'(TEST_PERIOD_P - 1));
    end
  end

  assign frev = ~count[HW-1];
endmodule
