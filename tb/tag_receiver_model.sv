// tag_receiver_model: behavioural model (simulation only) of the tag
// decoder in an RF synthesiser that receives the tagged clock.
//
// It counts rising edges of clk_in modulo HARMONIC and measures the width
// of every pulse. A pulse shorter than 3/8 of the nominal period is a tag:
// the first tag sets the phase counter to 0 and declares lock; a later tag
// must arrive exactly when the counter is back to 0, and HARMONIC pulses
// without a tag are also an error. Either case sets tag_error (sticky until
// clear_err). phase is the pulse number within the revolution (0 = tagged
// pulse), valid once locked. The synthesiser itself is outside this design;
// this model only exists so testbenches can decode the distributed clock
// the way a receiver would.
module tag_receiver_model #(
  parameter int unsigned HARMONIC  = 128,
  parameter int unsigned PERIOD_PS = 17482   // nominal clock period
) (
  input  logic       clk_in,
  input  logic       clear_err,
  output logic       locked,
  output logic       tag_error,
  output int unsigned phase
);
  timeunit 1ps;
  timeprecision 1ps;

  realtime t_rise;
  bit seen_rise = 1'b0;
  int unsigned since_tag = 0;

  initial begin
    locked = 1'b0;
    tag_error = 1'b0;
    phase = 0;
  end

  always @(posedge clear_err) tag_error = 1'b0;

  always @(posedge clk_in) begin
    t_rise = $realtime;
    seen_rise = 1'b1;
    phase = (phase + 1) % HARMONIC;
    since_tag++;
    if (locked && since_tag > HARMONIC) begin
      tag_error = 1'b1;                // a whole revolution without tag
      since_tag = 1;
    end
  end

  always @(negedge clk_in) if (seen_rise) begin
    if ($realtime - t_rise < PERIOD_PS * 3.0 / 8.0) begin
      if (locked && phase != 0) tag_error = 1'b1;
      phase = 0;
      since_tag = 0;
      locked = 1'b1;
    end
  end
endmodule
