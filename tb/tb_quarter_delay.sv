// tb_quarter_delay: self-checking test of the delay element model.
//
// Applies a clock and random-width pulses (all wider than the delay) and
// checks that the output matches the input DELAY_PS earlier: just before
// that time the old value, just after it the new one.
module tb_quarter_delay;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int D = 4370;

  logic a = 1'b0, y;
  int checks = 0, failures = 0;

  quarter_delay dut (.a, .y);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    #(2 * D);
    check(y == 1'b0, "initial value");
    repeat (300) begin
      int w;
      w = $urandom_range(D + 10, 4 * D);
      a = ~a;
      #(D - 1) check(y == ~a, "changed too early");
      #2       check(y == a, "not changed after delay");
      #(w - D - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(D * 4 * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
