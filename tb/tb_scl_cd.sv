// tb_scl_cd: self-checking test of the SCL completion detector.
//
// Two detectors are tested: W = 7 (one level of TH44 gates, then a TH22) and
// W = 18 (three levels of THnn gates). Random dual-rail words with a random
// number of NULL bits are applied; the expected output, computed here, is
// high only when the detector is awake and every bit holds DATA. Then it
// checks that raising sleep clears a detector that reported completion.
module tb_scl_cd;
  import scl_pkg::*;

  int checks = 0, failures = 0;

  dual_rail_t [6:0]  d7;
  dual_rail_t [17:0] d18;
  logic sleep, done7, done18;

  scl_cd #(.W(7))  u7  (.d(d7),  .sleep(sleep), .done(done7));
  scl_cd #(.W(18)) u18 (.d(d18), .sleep(sleep), .done(done18));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b sleep=%b", what, got, exp, sleep);
    end
  endtask

  function automatic dual_rail_t rnd_bit(input int null_pct);
    if (($urandom % 100) < null_pct) return DR_NULL;
    return dr_encode(1'($urandom));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_complete = 0;
    for (int n = 0; n < 2000; n++) begin
      logic all7, all18;
      int pct;
      pct   = (n % 3 == 0) ? 0 : (n % 3 == 1 ? 3 : 30);
      sleep = ($urandom % 5) == 0;
      all7  = 1;
      all18 = 1;
      for (int i = 0; i < 7; i++) begin
        d7[i] = rnd_bit(pct);
        if (d7[i] == DR_NULL) all7 = 0;
      end
      for (int i = 0; i < 18; i++) begin
        d18[i] = rnd_bit(pct);
        if (d18[i] == DR_NULL) all18 = 0;
      end
      #1;
      if (all7 && !sleep) n_complete++;
      check(done7,  all7  && !sleep, "W=7");
      check(done18, all18 && !sleep, "W=18");
    end
    // Completion reported, then cleared by sleep with the data still present.
    sleep = 0;
    for (int i = 0; i < 18; i++) d18[i] = DR_DATA1;
    #1; check(done18, 1'b1, "all DATA1");
    sleep = 1;
    #1; check(done18, 1'b0, "cleared by sleep");
    checks++;
    if (n_complete == 0) begin
      failures++;
      $display("FAIL no complete word was ever applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
