// tb_scl_scan_cell: self-checking test of the SCL scan cell.
//
// Normal mode (M = 0): the cell must act as an SCL register rail (set by Din
// while awake, held, cleared by S). Test mode (M = 1): S must have no effect,
// CL0 must load Sin into the first latch without changing Dout, CL1 must move
// it to Dout, and L followed by CL1 must capture Din. A random sequence of
// legal operations in both modes is then compared with a reference model.
module tb_scl_scan_cell;

  int checks = 0, failures = 0;
  logic din, sin, s, m, l, cl0, cl1, dout;
  logic ref_func, ref_master, ref_slave;

  scl_scan_cell dut (.din(din), .sin(sin), .s(s), .m(m), .l(l),
                     .cl0(cl0), .cl1(cl1), .dout(dout));

  task automatic check(input logic exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s dout=%b exp=%b (m=%b s=%b din=%b sin=%b)", what, dout, exp, m, s, din, sin);
    end
  endtask

  task automatic pulse(ref logic sig);
    #1 sig = 1;
    #1 sig = 0;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {din, sin, l, cl0, cl1} = '0;
    m = 0; s = 1; #1; check(0, "normal: asleep");
    din = 1;      #1; check(0, "normal: asleep with input");
    s = 0;        #1; check(1, "normal: set");
    din = 0;      #1; check(1, "normal: held");
    s = 1;        #1; check(0, "normal: cleared by sleep");
    // test mode: shift a 1 into the cell
    m = 1; sin = 1;
    pulse(cl1);            // make the slave known (master is unknown: skip check)
    pulse(cl0);            // master <= 1
    pulse(cl1);       check(1, "test: shifted 1");
    sin = 0;
    pulse(cl0);       check(1, "test: CL0 alone leaves Dout");
    pulse(cl1);       check(0, "test: shifted 0");
    s = 1; #1;        check(0, "test: sleep ignored (0)");
    din = 1;
    pulse(l);         check(0, "test: L alone leaves Dout");
    pulse(cl1);       check(1, "test: captured Din");
    s = 1; #1;        check(1, "test: sleep ignored (1)");
    din = 0; #1;      check(1, "test: Din ignored without L");
    // random mix of legal operations
    m = 0; s = 1; #1;
    ref_func = 0; ref_master = 0; ref_slave = 1;
    for (int n = 0; n < 1000; n++) begin
      int op;
      din = 1'($urandom);
      sin = 1'($urandom);
      op  = int'($urandom % 6);
      case (op)
        0: begin m = ~m; #1; end
        1: begin if (!m) s = ~s; #1; end
        2: begin if (m) begin pulse(cl0); ref_master = sin; end else #1; end
        3: begin if (m) begin pulse(cl1); ref_slave = ref_master; end else #1; end
        4: begin if (m) begin pulse(l); ref_master = din; end else #1; end
        default: #1;
      endcase
      // the SCL register rail keeps following Din and S in test mode too
      if (s) ref_func = 0;
      else if (din) ref_func = 1;
      check(m ? ref_slave : ref_func, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
