// tb_tag_counter: self-checking test of the revolution counter.
//
// Drives a 57.2 MHz clock for 1000 periods after reset and compares, after
// every rising edge and again just before every falling edge, the count,
// the f_rev square wave and the two tag windows against values computed from
// the number of rising edges seen since reset: the window is high during the
// pulse whose number is a multiple of 128 (test window: of 256), and frev
// is high for the 64 pulses starting at the tagged one. A watchdog ends the
// run with a failure if it does not finish.
module tb_tag_counter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int HALF = 8741;          // half period of 57.2 MHz, ps
  localparam int N_PERIODS = 1000;

  logic rf_ck = 1'b0, rst_n = 1'b1;
  logic tag_win, test_win, frev;
  logic [7:0] count;
  int checks = 0, failures = 0;
  int n = 0;                           // rising edges since reset
  int tags = 0, test_tags = 0;

  tag_counter dut (.rf_ck, .rst_n, .tag_win, .test_win, .frev, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at pulse %0d: %s", n, what);
    end
  endtask

  task automatic check_state();
    check(count == 8'(n % 256), $sformatf("count %0d", count));
    check(frev == ((n % 128) < 64), "frev");
    check(tag_win == (n > 0 && n % 128 == 0), "tag_win");
    check(test_win == (n > 0 && n % 256 == 0), "test_win");
  endtask

  initial begin
    #10 rst_n = 1'b0;           // power-on reset pulse
    #(3 * HALF) rst_n = 1'b1;
    #(HALF);
    // after reset: no edge yet
    check_state();
    repeat (N_PERIODS) begin
      #(HALF) rf_ck = 1'b1;
      n++;
      #1 check_state();
      if (tag_win) tags++;
      if (test_win) test_tags++;
      #(HALF - 2) check_state();      // whole high phase is stable
      #1 rf_ck = 1'b0;
    end
    check(tags == N_PERIODS / 128, $sformatf("tag count %0d", tags));
    check(test_tags == N_PERIODS / 256, $sformatf("test tag count %0d", test_tags));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF * (N_PERIODS + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
