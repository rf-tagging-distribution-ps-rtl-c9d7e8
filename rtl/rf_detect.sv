// rf_detect: drives the front-panel "RF IN" LED while the RF clock runs.
//
// Presence of the input clock cannot be judged from that clock alone, so
// the detector runs on a separate free-running local clock (ref_clk). It
// watches a slow signal derived from the RF clock (the f_rev square wave),
// brings it into the ref_clk domain through a two-flop synchroniser, and
// reloads a down-counter with TIMEOUT on every edge it sees. The LED is on
// while that counter is non-zero, i.e. for TIMEOUT ref_clk cycles after the
// last edge. With a 10 MHz ref_clk the default of 256 cycles is 25.6 us,
// about ten revolutions at the lowest operating frequency, so the LED is
// steady while RF is present and goes off within 25.6 us of its loss.
// The LED itself is from the module spec; the local clock and the timeout
// scheme are this design's choices.
//
// Timing: an edge on activity turns present on 3 to 4 ref_clk cycles later.
// rst_n: asynchronous, active low; the LED starts off, and the level of
// activity found right after reset is not taken as an edge.
module rf_detect #(
  parameter int unsigned TIMEOUT = 256  // ref_clk cycles without an edge before the LED goes off
) (
  input  logic ref_clk,
  input  logic rst_n,
  input  logic activity,  // asynchronous to ref_clk
  output logic present
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic [2:0]    sync;   // [0],[1]: synchroniser, [2]: previous value
  logic [2:0]    vld;    // sync stage holds a sampled value (not the reset value)
  logic [TW-1:0] timer;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= '0;
      vld   <= '0;
      timer <= '0;
    end else begin
      sync <= {sync[1:0], activity};
      vld  <= {vld[1:0], 1'b1};
      if (vld[2] && sync[2] != sync[1])  timer <= TW'(TIMEOUT);
      else if (timer != '0)    timer <= timer - 1'b1;
    end
  end

  assign present = (timer != '0);
endmodule
