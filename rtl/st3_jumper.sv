// st3_jumper: model of jumper ST3, which chooses what is distributed.
//
// The common contact of ST3 feeds the TTL/ECL converter and the clock
// drivers. In the normal position (pins 1 and 2 joined, sel_test = 0) it
// carries the tagged clock TAGGED_CK; in the test position (pins 2 and 3
// joined, sel_test = 1) it carries TEST_TAG_DET, whose tag comes every 256
// periods and must make the receiving synthesiser flag a tag error. The
// jumper is a static 2:1 selection; combinational.
module st3_jumper (
  input  logic tagged_ck,     // normal tagged clock
  input  logic test_tag_det,  // test signal, tag every 256 periods
  input  logic sel_test,      // jumper position: 1 = test position
  output logic out            // common contact, to the TTL/ECL converter
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb out = sel_test ? test_tag_det : tagged_ck;
endmodule
