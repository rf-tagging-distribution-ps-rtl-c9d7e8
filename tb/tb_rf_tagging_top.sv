// tb_rf_tagging_top: end-to-end test of the RF tagging module at its
// default parameters.
//
// Stimulus: power-on reset; RF clock at 57.2 MHz with ST3 in the normal
// position; ST3 moved to the test position and back; RF frequency stepped to
// both ends of the 53.2-61.2 MHz range; RF removed long enough for the LED
// to go off; RF restored. A 10 MHz local clock runs throughout.
//
// Checks, with expected values derived from the clock period alone:
//  - every pulse on the distributed output (ecl_drive) and on the
//    TAG'D CK test output is T/2 wide, or 4370 ps wide for a tag;
//  - tags on TAG'D CK come exactly every 128 pulses; on the distributed
//    output every 128 pulses in the normal position and every 256 in the
//    test position (counted from the first tag after each jumper move);
//  - every tag on TAG'D CK starts together with a rising edge of TEST_Frev,
//    and TEST_Frev rises only there;
//  - TEST_RF_IN follows the RF clock;
//  - the LED is off before RF, on while RF runs, off 256 local cycles
//    (within the f_rev edge spacing) after RF stops, and on again after.
// Each mechanism (normal tag, test tag, jumper move, frequency step, LED
// on, LED off) is counted; one that never happened counts as a failure.
module tb_rf_tagging_top;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int Q = 4370;              // tag width = delay element, ps
  localparam int REF_T = 100000;        // 10 MHz local clock

  logic rf_ck = 1'b0, ref_clk = 1'b0, rst_n = 1'b1, st3_test = 1'b0;
  logic ecl_drive, test_tagd_ck, test_rf_in, test_frev, rf_in_led;
  int checks = 0, failures = 0;
  int half = 8741;                      // current RF half period, ps
  bit rf_on = 1'b0;
  bit por_done = 1'b0;                  // power-on reset has been applied

  rf_tagging_top dut (.rf_ck, .ref_clk, .rst_n, .st3_test, .ecl_drive,
                      .test_tagd_ck, .test_rf_in, .test_frev, .rf_in_led);

  always #(REF_T / 2) ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // RF clock generator
  initial forever begin
    if (rf_on) begin
      rf_ck = 1'b1;
      #1 check(test_rf_in == 1'b1, "TEST_RF_IN high");
      #(half - 1) rf_ck = 1'b0;
      #1 check(test_rf_in == 1'b0, "TEST_RF_IN low");
      #(half - 1);
    end else begin
      #1000;
    end
  end

  // ---- distributed output ----
  int n_normal_tags = 0, n_test_tags = 0, n_switch = 0, n_freq = 0;
  int n_led_on = 0, n_led_off = 0;
  realtime rise_d;
  int gap_d = 0;
  bit have_tag_d = 1'b0, started_d = 1'b0;
  always @(posedge ecl_drive) begin
    rise_d = $realtime;
    started_d = 1'b1;
  end
  always @(negedge ecl_drive) if (started_d) begin
    realtime w;
    w = $realtime - rise_d;
    gap_d++;
    if (w < half * 0.75) begin
      check(w > Q - 2 && w < Q + 2, $sformatf("tag width %0t", w));
      if (have_tag_d)
        check(gap_d == (st3_test ? 256 : 128), $sformatf("tag spacing %0d (st3=%0b)", gap_d, st3_test));
      if (st3_test) n_test_tags++; else n_normal_tags++;
      have_tag_d = 1'b1;
      gap_d = 0;
    end else begin
      check(w > half - 2 && w < half + 2, $sformatf("pulse width %0t", w));
    end
  end

  // ---- TAG'D CK test output and TEST_Frev ----
  realtime rise_t, frev_rise = -1;
  int gap_t = 0, frev_rises = 0, tags_t = 0;
  bit have_tag_t = 1'b0, started_t = 1'b0;
  always @(posedge test_tagd_ck) begin
    rise_t = $realtime;
    started_t = 1'b1;
  end
  always @(posedge test_frev) begin
    frev_rise = $realtime;
    if (por_done) frev_rises++;
  end
  always @(negedge test_tagd_ck) if (started_t) begin
    realtime w;
    w = $realtime - rise_t;
    gap_t++;
    if (w < half * 0.75) begin
      check(w > Q - 2 && w < Q + 2, $sformatf("TAG'D CK tag width %0t", w));
      if (have_tag_t) check(gap_t == 128, $sformatf("TAG'D CK tag spacing %0d", gap_t));
      check(frev_rise == rise_t, "Frev not aligned with tag");
      tags_t++;
      have_tag_t = 1'b1;
      gap_t = 0;
    end else begin
      check(w > half - 2 && w < half + 2, $sformatf("TAG'D CK pulse width %0t", w));
    end
  end

  always @(posedge rf_in_led) n_led_on++;
  always @(negedge rf_in_led) if (por_done) n_led_off++;

  task automatic run_periods(input int n);
    repeat (n) @(negedge rf_ck);
  endtask

  // jumper moved while the clock is low
  task automatic set_st3(input bit v);
    @(negedge rf_ck);
    #2 st3_test = v;
    have_tag_d = 1'b0;
    n_switch++;
  endtask

  task automatic set_freq(input int new_half);
    @(negedge rf_ck);
    #2 half = new_half;
    n_freq++;
  endtask

  initial begin
    #10 rst_n = 1'b0;                  // power-on reset pulse
    #(REF_T * 3) rst_n = 1'b1;
    por_done = 1'b1;
    #(REF_T * 5);
    check(rf_in_led == 1'b0, "LED on without RF");
    rf_on = 1'b1;
    run_periods(700);
    check(rf_in_led == 1'b1, "LED off with RF present");
    set_st3(1'b1);
    run_periods(1100);
    set_st3(1'b0);
    run_periods(300);
    set_freq(9398);                    // 53.2 MHz
    run_periods(400);
    set_freq(8170);                    // 61.2 MHz
    run_periods(400);
    check(rf_in_led == 1'b1, "LED off with RF present");
    // RF lost
    @(negedge rf_ck) rf_on = 1'b0;
    #(REF_T * 240);
    check(rf_in_led == 1'b1, "LED off before timeout");
    #(REF_T * 30);
    check(rf_in_led == 1'b0, "LED on after RF lost");
    // RF back
    half = 8741;                       // back at 57.2 MHz
    n_freq++;
    rf_on = 1'b1;
    run_periods(300);
    check(rf_in_led == 1'b1, "LED not back on");
    check(frev_rises == tags_t, $sformatf("Frev rises %0d, tags %0d", frev_rises, tags_t));
    $display("normal_tags=%0d test_tags=%0d jumper_moves=%0d freq_steps=%0d led_on=%0d led_off=%0d tagd_ck_tags=%0d",
             n_normal_tags, n_test_tags, n_switch, n_freq, n_led_on, n_led_off, tags_t);
    check(n_normal_tags > 0, "no normal tag");
    check(n_test_tags > 0, "no test tag");
    check(n_switch > 0, "no jumper move");
    check(n_freq > 0, "no frequency step");
    check(n_led_on > 0, "LED never on");
    check(n_led_off > 0, "LED never off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd1_000_000_000);              // 1 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
