// tb_scl_th: self-checking test of the SCL threshold gate.
//
// Five gate types used by the pipeline (TH11, TH12, TH23, TH34w2, TH44) are
// driven through every input combination, with sleep low and high. The
// expected output is computed here from the gate definition: high when awake
// and the weighted count of asserted inputs reaches the threshold.
module tb_scl_th;

  int checks = 0, failures = 0;

  logic [3:0] in;
  logic       sleep;
  logic       o11, o12, o23, o34w2, o44;

  scl_th #(.N(1), .M(1))                         u11   (.in(in[0:0]), .sleep(sleep), .out(o11));
  scl_th #(.N(2), .M(1))                         u12   (.in(in[1:0]), .sleep(sleep), .out(o12));
  scl_th #(.N(3), .M(2))                         u23   (.in(in[2:0]), .sleep(sleep), .out(o23));
  scl_th #(.N(4), .M(3), .WEIGHTS(32'h0000_1112)) u34w2 (.in(in),      .sleep(sleep), .out(o34w2));
  scl_th #(.N(4), .M(4))                         u44   (.in(in),      .sleep(sleep), .out(o44));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%b sleep=%b got=%b exp=%b", what, in, sleep, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int v = 0; v < 16; v++) begin
        int ones3, ones4, w34;
        in    = 4'(v);
        sleep = s[0];
        #1;
        ones3 = int'(in[0]) + int'(in[1]) + int'(in[2]);
        ones4 = ones3 + int'(in[3]);
        w34   = 2 * int'(in[0]) + int'(in[1]) + int'(in[2]) + int'(in[3]);
        check(o11,   !sleep && in[0],          "TH11");
        check(o12,   !sleep && (in[1] | in[0]), "TH12");
        check(o23,   !sleep && ones3 >= 2,      "TH23");
        check(o34w2, !sleep && w34 >= 3,        "TH34w2");
        check(o44,   !sleep && ones4 == 4,      "TH44");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
