// tb_st3_jumper: exhaustive check of the jumper selection, each input
// combination applied several times in random order.
module tb_st3_jumper;
  timeunit 1ps;
  timeprecision 1ps;

  logic tagged_ck, test_tag_det, sel_test, out;
  int checks = 0, failures = 0;

  st3_jumper dut (.tagged_ck, .test_tag_det, .sel_test, .out);

  initial begin
    repeat (64) begin
      logic exp;
      {tagged_ck, test_tag_det, sel_test} = 3'($urandom_range(0, 7));
      exp = (sel_test == 1'b0) ? tagged_ck : test_tag_det;
      #10;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL: tagged=%b test=%b sel=%b out=%b", tagged_ck, test_tag_det, sel_test, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
