// tb_scl_c_element: self-checking test of the resettable completion
// C-element with inverted output.
//
// Checks the reset state (ko = 1), that ko falls only when both inputs are
// high and rises only when both are low (hysteresis otherwise), and that the
// output moves DELAY time units after the inputs, not earlier. A random
// sequence is then compared with a reference model.
module tb_scl_c_element;

  localparam int unsigned DELAY = 1;

  int checks = 0, failures = 0;
  logic a, b, rst, ko;
  logic ref_c;

  scl_c_element #(.DELAY(DELAY)) dut (.a(a), .b(b), .rst(rst), .ko(ko));

  task automatic check(input logic exp, input string what);
    checks++;
    if (ko !== exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b rst=%b ko=%b exp=%b", what, a, b, rst, ko, exp);
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
    rst = 1; a = 1; b = 1; #3; check(1, "reset holds ko high");
    rst = 0;               #3; check(0, "both high after reset -> ko low");
    a = 0;                 #3; check(0, "one low: hold");
    a = 1; b = 0;          #3; check(0, "other low: hold");
    a = 0;                 #0.5; check(0, "before delay: old value");
    #2.5;                  check(1, "both low -> ko high");
    b = 1;                 #3; check(1, "one high: hold");
    a = 1;                 #0.5; check(1, "before delay: old value");
    #2.5;                  check(0, "both high -> ko low");
    rst = 1;               #3; check(1, "reset forces ko high");
    rst = 0; a = 0; b = 0; #3;
    ref_c = 0;
    for (int n = 0; n < 500; n++) begin
      a = 1'($urandom);
      b = 1'($urandom);
      #3;
      if (a == b) ref_c = a;
      check(~ref_c, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
