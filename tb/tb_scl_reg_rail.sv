// tb_scl_reg_rail: self-checking test of one SCL register rail.
//
// Checks that sleep holds the output low whatever the input, that an input
// pulse while awake sets the output, that the output stays set after the
// input falls (the latch property of the SCL register), and that only sleep
// clears it. A random sequence is then compared with a reference model.
module tb_scl_reg_rail;

  int checks = 0, failures = 0;
  logic d, sleep, q;
  logic ref_q;

  scl_reg_rail dut (.d(d), .sleep(sleep), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s d=%b sleep=%b q=%b exp=%b", what, d, sleep, q, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sleep = 1; d = 0; #1; check(0, "asleep, input low");
    d = 1;            #1; check(0, "asleep, input high");
    sleep = 0;        #1; check(1, "wake with input high");
    d = 0;            #1; check(1, "input falls, output held");
    d = 1;            #1; check(1, "input again");
    d = 0;            #1; check(1, "held again");
    sleep = 1;        #1; check(0, "sleep clears");
    sleep = 0;        #1; check(0, "awake, no input");
    d = 1;            #1; check(1, "set while awake");
    sleep = 1;        #1; check(0, "sleep dominates input");
    ref_q = 0;
    for (int n = 0; n < 500; n++) begin
      d     = 1'($urandom);
      sleep = ($urandom % 4) == 0;
      #1;
      if (sleep) ref_q = 0;
      else if (d) ref_q = 1;
      check(ref_q, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
