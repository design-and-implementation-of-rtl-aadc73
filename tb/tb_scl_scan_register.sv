// tb_scl_scan_register: self-checking test of a 4-bit dual-rail SCL register
// made of scan cells.
//
// Normal mode: sleep gives NULL on every bit; DATA is latched when sleep
// falls and held when the input returns to NULL. Test mode: random 8-bit
// patterns are shifted in with CL0/CL1 and must appear on the rails in chain
// order (bit 0 rail f first); a random response is captured with L, CL1 and
// shifted out on sout, which must return it bit by bit.
module tb_scl_scan_register;
  import scl_pkg::*;

  localparam int W = 4;

  int checks = 0, failures = 0;
  dual_rail_t [W-1:0] d, q;
  logic s, m, l, cl0, cl1, sin, sout;

  scl_scan_register #(.W(W)) dut (.d(d), .q(q), .s(s), .m(m), .l(l),
                                  .cl0(cl0), .cl1(cl1), .sin(sin), .sout(sout));

  task automatic check(input logic [2*W-1:0] got, input logic [2*W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  // Rails in chain order: cell 2i is bit i rail f, cell 2i+1 is bit i rail t.
  function automatic logic [2*W-1:0] cells(input dual_rail_t [W-1:0] v);
    logic [2*W-1:0] r;
    for (int i = 0; i < W; i++) begin
      r[2*i]   = v[i].f;
      r[2*i+1] = v[i].t;
    end
    return r;
  endfunction

  task automatic shift_one(input logic b);
    sin = b;
    #1 cl0 = 1; #1 cl0 = 0;
    #1 cl1 = 1; #1 cl1 = 0;
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
    {l, cl0, cl1, sin} = '0;
    m = 0; s = 1; d = '0;
    #1; check(cells(q), '0, "asleep: NULL");
    for (int n = 0; n < 20; n++) begin
      dual_rail_t [W-1:0] v;
      for (int i = 0; i < W; i++) v[i] = dr_encode(1'($urandom));
      d = v;    #1; check(cells(q), '0, "DATA waits for wake-up");
      s = 0;    #1; check(cells(q), cells(v), "DATA latched");
      d = '0;   #1; check(cells(q), cells(v), "held through input NULL");
      s = 1;    #1; check(cells(q), '0, "sleep returns NULL");
    end
    m = 1;
    for (int n = 0; n < 20; n++) begin
      logic [2*W-1:0] pat, resp, got;
      pat = (2*W)'($urandom);
      // the first bit shifted in travels to the last cell
      for (int j = 2*W-1; j >= 0; j--) shift_one(pat[j]);
      check(cells(q), pat, "shift in");
      resp = (2*W)'($urandom);
      for (int i = 0; i < W; i++) begin
        d[i].f = resp[2*i];
        d[i].t = resp[2*i+1];
      end
      #1 l = 1; #1 l = 0; #1;
      check(cells(q), pat, "L alone does not change outputs");
      #1 cl1 = 1; #1 cl1 = 0; #1;
      check(cells(q), resp, "capture");
      for (int j = 2*W-1; j >= 0; j--) begin
        got[j] = sout;
        shift_one(1'b0);
      end
      check(got, resp, "shift out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
