// tb_rf_detect: self-checking test of the RF presence (LED) detector.
//
// Runs the local clock at 10 MHz with TIMEOUT = 16. Phases: no activity
// (LED must stay off); activity toggling every 12 cycles, as the f_rev
// signal does (LED must come on exactly 3 cycles after the first edge and
// stay on); activity stopped (LED must stay on for exactly TIMEOUT cycles
// counted from 3 cycles after the last edge, then go off and stay off).
module tb_rf_detect;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 100000;           // 10 MHz
  localparam int TO = 16;

  logic ref_clk = 1'b0, rst_n = 1'b1, activity = 1'b0, present;
  int checks = 0, failures = 0;

  rf_detect #(.TIMEOUT(TO)) dut (.ref_clk, .rst_n, .activity, .present);

  always #(T / 2) ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // k-th rising edge after the current falling edge, then a little later
  task automatic after_edges(input int k);
    repeat (k) @(posedge ref_clk);
    #1;
  endtask

  initial begin
    #10 rst_n = 1'b0;           // power-on reset pulse
    repeat (3) @(negedge ref_clk);
    rst_n = 1'b1;
    repeat (40) begin
      @(negedge ref_clk);
      check(present == 1'b0, "LED on without activity");
    end
    // first edge: LED on after exactly 3 rising edges
    @(negedge ref_clk) activity = 1'b1;
    after_edges(2); check(present == 1'b0, "LED on too early");
    after_edges(1); check(present == 1'b1, "LED not on after 3 cycles");
    // keep toggling: LED stays on
    repeat (20) begin
      for (int i = 0; i < 12; i++) begin
        @(negedge ref_clk);
        check(present == 1'b1, "LED dropped while active");
      end
      activity = ~activity;
    end
    // last edge was just applied; LED on for cycles 3 .. 3+TO-1, off from 3+TO
    after_edges(3);
    for (int i = 0; i < TO - 1; i++) begin
      check(present == 1'b1, $sformatf("LED off early, cycle %0d", i));
      after_edges(1);
    end
    check(present == 1'b1, "LED off one cycle early");
    after_edges(1); check(present == 1'b0, "LED not off after timeout");
    repeat (50) begin
      @(negedge ref_clk);
      check(present == 1'b0, "LED came back on");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
