// tb_scl_adder_slice: self-checking test of the three adder slices F_1..F_3
// of a 3-stage pipeline.
//
// For each slice, random operand bits, carry and earlier sum bits are placed
// in the documented input layout as DATA; the outputs must hold the right sum
// and carry (computed here with integer addition) and pass the other bits on.
// NULL input must give NULL output, and sleep must force NULL whatever the
// input. With rails driven independently (scan test mode) each output rail
// is compared with the Boolean majority/parity function it should compute.
module tb_scl_adder_slice;
  import scl_pkg::*;

  localparam int N = 3;

  int checks = 0, failures = 0;
  logic sleep;

  dual_rail_t [stage_width(1, N)-1:0] x1;
  dual_rail_t [stage_width(2, N)-1:0] y1, x2;
  dual_rail_t [stage_width(3, N)-1:0] y2, x3;
  dual_rail_t [stage_width(4, N)-1:0] y3;

  scl_adder_slice #(.K(1), .N(N)) u1 (.x(x1), .sleep(sleep), .y(y1));
  scl_adder_slice #(.K(2), .N(N)) u2 (.x(x2), .sleep(sleep), .y(y2));
  scl_adder_slice #(.K(3), .N(N)) u3 (.x(x3), .sleep(sleep), .y(y3));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Build the input of stage k from Boolean values (layout of scl_adder_slice).
  function automatic dual_rail_t [2*N:0] pack_in(input int k, input logic [N-1:0] a,
      input logic [N-1:0] b, input logic c, input logic [N-1:0] s);
    dual_rail_t [2*N:0] v;
    v = '0;
    for (int p = 0; p < k - 1; p++) v[p] = dr_encode(s[p]);
    v[k-1] = dr_encode(c);
    for (int j = k - 1; j < N; j++) begin
      v[k + 2*(j-k+1)]     = dr_encode(a[j]);
      v[k + 1 + 2*(j-k+1)] = dr_encode(b[j]);
    end
    return v;
  endfunction

  function automatic logic maj(input logic p, input logic q, input logic r);
    return (p & q) | (p & r) | (q & r);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sleep = 0;
    for (int n = 0; n < 300; n++) begin
      logic [N-1:0] a, b, s;
      logic c;
      int total;
      a = N'($urandom); b = N'($urandom); s = N'($urandom); c = 1'($urandom);
      x1 = pack_in(1, a, b, c, s);
      x2 = pack_in(2, a, b, c, s);
      x3 = pack_in(3, a, b, c, s);
      sleep = 0;
      #1;
      for (int k = 1; k <= N; k++) begin
        dual_rail_t [2*N:0] exp, got;
        total = int'(a[k-1]) + int'(b[k-1]) + int'(c);
        exp = '0;
        for (int p = 0; p < k - 1; p++) exp[p] = dr_encode(s[p]);
        exp[k-1] = dr_encode(total[0]);
        exp[k]   = dr_encode(total[1]);
        for (int j = k; j < N; j++) begin
          exp[k + 1 + 2*(j-k)] = dr_encode(a[j]);
          exp[k + 2 + 2*(j-k)] = dr_encode(b[j]);
        end
        got = '0;
        if (k == 1) got[stage_width(2, N)-1:0] = y1;
        if (k == 2) got[stage_width(3, N)-1:0] = y2;
        if (k == 3) got[stage_width(4, N)-1:0] = y3;
        check(got == exp, $sformatf("DATA stage %0d a=%b b=%b c=%b", k, a, b, c));
      end
      sleep = 1;
      #1;
      check(y1 == '0 && y2 == '0 && y3 == '0, "sleep forces NULL");
    end
    sleep = 0;
    x1 = '0; x2 = '0; x3 = '0;
    #1;
    check(y1 == '0 && y2 == '0 && y3 == '0, "NULL in, NULL out");
    // Boolean mode: rails independent, compare slice 2 rail functions.
    for (int n = 0; n < 300; n++) begin
      dual_rail_t cc, aa, bb, co, so;
      for (int i = 0; i < stage_width(2, N); i++) x2[i] = dual_rail_t'($urandom);
      #1;
      cc = x2[1]; aa = x2[2]; bb = x2[3];
      co = y2[2]; so = y2[1];
      check(co.t == maj(aa.t, bb.t, cc.t) && co.f == maj(aa.f, bb.f, cc.f), "Boolean carry");
      // TH34w2 with the opposite-rail carry on the weight-2 input: all three
      // inputs of this rail high, or the opposite carry high and any one high.
      check(so.t == ((aa.t & bb.t & cc.t) | (maj(aa.f, bb.f, cc.f) & (aa.t | bb.t | cc.t))),
            "Boolean sum.t");
      check(so.f == ((aa.f & bb.f & cc.f) | (maj(aa.t, bb.t, cc.t) & (aa.f | bb.f | cc.f))),
            "Boolean sum.f");
      check(y2[0] == x2[0] && y2[3] == x2[4] && y2[4] == x2[5], "Boolean pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
