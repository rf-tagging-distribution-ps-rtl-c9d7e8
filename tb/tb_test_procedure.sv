// tb_test_procedure: the module's acceptance test, run on the top level at
// its default parameters with 14 receivers on the distributed clock.
//
// Each of the 14 outputs feeds a tag_receiver_model (the tag decoder of a
// synthesiser). The receivers are plugged in one by one at random moments,
// so each starts counting at a different pulse. The test then follows the
// acceptance procedure of the module:
//  1. no RF: the RF IN LED is off;
//  2. RF applied (57.2 MHz): the LED comes on; every receiver locks and, from
//     then on, all 14 agree on the pulse number within the revolution, which
//     is 0 exactly when TEST_Frev rises; no receiver reports a tag error;
//  3. the same at both ends of the range, 53.2 and 61.2 MHz;
//  4. jumper ST3 in the test position: every receiver reports a tag error;
//  5. jumper back to normal: after one revolution, no more tag errors.
// Checks are counted; a watchdog ends a stuck run as a failure.
module tb_test_procedure;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int NRX = rf_tag_pkg::NUM_OUTPUTS;   // 14 outputs
  localparam int REF_T = 100000;

  logic rf_ck = 1'b0, ref_clk = 1'b0, rst_n = 1'b1, st3_test = 1'b0;
  logic ecl_drive, test_tagd_ck, test_rf_in, test_frev, rf_in_led;
  logic [NRX-1:0] plugged = '0, rx_clk, locked, tag_error;
  logic clear_err = 1'b0;
  int unsigned phase [NRX];
  int checks = 0, failures = 0;
  int half = 8741;
  bit rf_on = 1'b0;

  rf_tagging_top dut (.rf_ck, .ref_clk, .rst_n, .st3_test, .ecl_drive,
                      .test_tagd_ck, .test_rf_in, .test_frev, .rf_in_led);

  for (genvar i = 0; i < NRX; i++) begin : g_rx
    assign rx_clk[i] = ecl_drive & plugged[i];
    tag_receiver_model u_rx (.clk_in(rx_clk[i]), .clear_err, .locked(locked[i]),
                             .tag_error(tag_error[i]), .phase(phase[i]));
  end

  always #(REF_T / 2) ref_clk = ~ref_clk;

  initial forever begin
    if (rf_on) begin
      rf_ck = 1'b1;
      #(half) rf_ck = 1'b0;
      #(half);
    end else begin
      #1000;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // After every falling edge, once all receivers are locked, compare phases.
  bit compare_on = 1'b0;
  int frev_checks = 0;
  always @(negedge rf_ck) if (compare_on) begin
    #1;
    for (int i = 1; i < NRX; i++)
      check(phase[i] == phase[0], $sformatf("receiver %0d phase %0d, receiver 0 phase %0d", i, phase[i], phase[0]));
  end
  always @(posedge test_frev) if (compare_on) begin
    #1;
    check(phase[0] == 0, $sformatf("Frev rises at receiver phase %0d", phase[0]));
    frev_checks++;
  end

  task automatic run_periods(input int n);
    repeat (n) @(negedge rf_ck);
  endtask

  task automatic clear_errors();
    @(negedge rf_ck) clear_err = 1'b1;
    #10 clear_err = 1'b0;
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #(REF_T * 3) rst_n = 1'b1;
    // 1. no RF
    #(REF_T * 20);
    check(rf_in_led == 1'b0, "LED on without RF");
    // 2. RF applied; receivers plugged in one at a time during low phases
    rf_on = 1'b1;
    for (int i = 0; i < NRX; i++) begin
      run_periods($urandom_range(1, 60));
      #2 plugged[i] = 1'b1;
    end
    run_periods(300);
    check(rf_in_led == 1'b1, "LED off with RF");
    check(&locked, $sformatf("not all locked: %b", locked));
    clear_errors();
    compare_on = 1'b1;
    run_periods(600);
    check(tag_error == '0, $sformatf("tag error in normal mode at 57.2 MHz: %b", tag_error));
    // 3. ends of the frequency range
    @(negedge rf_ck) #2 half = 9398;    // 53.2 MHz
    run_periods(600);
    check(tag_error == '0, $sformatf("tag error at 53.2 MHz: %b", tag_error));
    @(negedge rf_ck) #2 half = 8170;    // 61.2 MHz
    run_periods(600);
    check(tag_error == '0, $sformatf("tag error at 61.2 MHz: %b", tag_error));
    @(negedge rf_ck) #2 half = 8741;
    // 4. ST3 in the test position
    @(negedge rf_ck) #2 st3_test = 1'b1;
    run_periods(600);
    check(&tag_error, $sformatf("tag error not detected by all receivers: %b", tag_error));
    // 5. back to normal
    @(negedge rf_ck) #2 st3_test = 1'b0;
    run_periods(300);
    clear_errors();
    run_periods(600);
    check(tag_error == '0, $sformatf("tag error after return to normal: %b", tag_error));
    check(&locked, "receivers lost lock");
    check(frev_checks >= 20, $sformatf("only %0d Frev edges compared", frev_checks));
    $display("receivers=%0d frev_checks=%0d", NRX, frev_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
