// tb_tagger: self-checking test of the tagger (counter, pulse shapers, LED).
//
// Drives a 57.2 MHz RF clock, its quarter-period delayed copy and a 10 MHz
// local clock. For each of the two tagged outputs it measures every pulse:
// normal pulses must be half a period wide, tag pulses a quarter period,
// and tags must come exactly every 128 pulses on tagged_ck and every 256 on
// test_tag_det. Each frev rising edge must coincide with the start of a tag
// pulse. rf_in_copy must follow the RF clock. The LED must come on while RF
// runs, and go off between 256 and 256+40 local cycles after RF stops.
module tb_tagger;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int HALF = 8741;
  localparam int Q = 4370;
  localparam int REF_T = 100000;
  localparam int N = 1100;                  // RF periods

  logic rf_ck = 1'b0, rf_ck_q = 1'b0, ref_clk = 1'b0, rst_n = 1'b1;
  logic tagged_ck, test_tag_det, frev, rf_in_copy, rf_present;
  int checks = 0, failures = 0;

  tagger dut (.rf_ck, .rf_ck_q, .ref_clk, .rst_n, .tagged_ck, .test_tag_det,
              .frev, .rf_in_copy, .rf_present);

  always @(rf_ck) rf_ck_q <= #(Q) rf_ck;
  always #(REF_T / 2) ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // pulse measurement on tagged_ck
  realtime rise_a, rise_b, frev_rise = -1;
  int gap_a = 0, gap_b = 0, tags_a = 0, tags_b = 0, seen_a = 0, seen_b = 0;
  always @(posedge tagged_ck) rise_a = $realtime;
  always @(posedge test_tag_det) rise_b = $realtime;
  always @(posedge frev) frev_rise = $realtime;

  always @(negedge tagged_ck) begin
    realtime w;
    w = $realtime - rise_a;
    gap_a++;
    if (w < HALF * 0.75) begin
      check(w > Q - 2 && w < Q + 2, $sformatf("tag width %0t", w));
      if (seen_a > 0) check(gap_a == 128, $sformatf("tag spacing %0d", gap_a));
      check(frev_rise == rise_a, "frev not aligned with tag");
      seen_a++; tags_a++; gap_a = 0;
    end else begin
      check(w > HALF - 2 && w < HALF + 2, $sformatf("pulse width %0t", w));
    end
  end

  always @(negedge test_tag_det) begin
    realtime w;
    w = $realtime - rise_b;
    gap_b++;
    if (w < HALF * 0.75) begin
      check(w > Q - 2 && w < Q + 2, $sformatf("test tag width %0t", w));
      if (seen_b > 0) check(gap_b == 256, $sformatf("test tag spacing %0d", gap_b));
      seen_b++; tags_b++; gap_b = 0;
    end else begin
      check(w > HALF - 2 && w < HALF + 2, $sformatf("test pulse width %0t", w));
    end
  end

  initial begin
    #10 rst_n = 1'b0;           // power-on reset pulse
    #(5 * HALF) rst_n = 1'b1;
    #(HALF);
    check(rf_present == 1'b0, "LED on before RF");
    repeat (N) begin
      rf_ck = 1'b1;
      #1 check(rf_in_copy == 1'b1, "rf copy high");
      #(HALF - 1) rf_ck = 1'b0;
      #1 check(rf_in_copy == 1'b0, "rf copy low");
      #(HALF - 1);
    end
    check(rf_present == 1'b1, "LED off while RF runs");
    check(tags_a == N / 128, $sformatf("%0d tags", tags_a));
    check(tags_b == N / 256, $sformatf("%0d test tags", tags_b));
    // RF stops
    #(REF_T * 240);
    check(rf_present == 1'b1, "LED off before timeout");
    #(REF_T * 30);
    check(rf_present == 1'b0, "LED still on after RF stopped");
    $display("tags=%0d test_tags=%0d", tags_a, tags_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF * N + REF_T * 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
