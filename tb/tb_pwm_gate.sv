// tb_pwm_gate: self-checking test of the pulse-width modulator.
//
// Generates a 57.2 MHz clock and its quarter-period delayed copy, picks a
// random window value for each period (changed while the clock is low), and
// measures the width of every output pulse: it must be half a period with
// the window low and a quarter period with it high, and start with the
// rising clock edge. The output must also be
// low through the whole low phase. Watchdog included.
module tb_pwm_gate;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int PERIOD = 17482;       // 57.2 MHz
  localparam int Q = PERIOD / 4;
  localparam int N = 400;

  logic rf_ck = 1'b0, rf_ck_q = 1'b0, win = 1'b0, ck_out;
  int checks = 0, failures = 0;
  realtime t_rise;
  bit cur_win;
  int shorts = 0;

  pwm_gate dut (.rf_ck, .rf_ck_q, .win, .ck_out);

  always @(rf_ck) rf_ck_q <= #(Q) rf_ck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  bit started = 1'b0;
  realtime t_rf_rise;
  always @(posedge rf_ck) t_rf_rise = $realtime;
  always @(posedge ck_out) begin
    t_rise = $realtime;
    if (started) check(t_rise == t_rf_rise, "pulse does not start with the clock edge");
    started = 1'b1;
  end
  always @(negedge ck_out) if (started) begin
    realtime w;
    w = $realtime - t_rise;
    if (cur_win) begin
      check(w > Q - 2 && w < Q + 2, $sformatf("tag pulse width %0t", w));
      shorts++;
    end else begin
      check(w > PERIOD / 2 - 2 && w < PERIOD / 2 + 2, $sformatf("pulse width %0t", w));
    end
  end

  initial begin
    #(PERIOD);
    repeat (N) begin
      cur_win = 1'($urandom_range(0, 3) == 0);
      #(PERIOD / 8) win = cur_win;               // change during low phase
      #(PERIOD / 2 - PERIOD / 8) rf_ck = 1'b1;
      #(PERIOD / 2) rf_ck = 1'b0;
      #(PERIOD / 8) check(ck_out == 1'b0, "low during low phase");
      #(PERIOD / 4) check(ck_out == 1'b0, "low during low phase");
      #(PERIOD / 8);
    end
    #(PERIOD);
    check(shorts > N / 8, $sformatf("too few tag pulses %0d", shorts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 2 * (N + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
