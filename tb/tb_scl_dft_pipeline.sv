// tb_scl_dft_pipeline: end-to-end test of the SCL pipeline with scan DFT, at
// the default size (three stages, 3-bit adder).
//
// The testbench plays the sender, the receiver and the tester:
//  1. Normal mode: random additions flow through the pipeline under the
//     DATA/NULL handshake, with a fast and then a slow receiver. Every sum
//     must arrive, in order, and x_o must never carry an illegal code.
//     Counted: tokens delivered, moments with two or more tokens in flight
//     (pipelining), sender stalls caused by a slow receiver (back-pressure),
//     registers holding DATA after their input returned to NULL (the SCL
//     register latch), and idle periods in which every stage sleeps.
//  2. Test mode: random patterns are shifted into the 36-cell scan chain, the
//     response of F_3 is read on x_o, the responses of F_1 and F_2 and the
//     value on x_i are captured with load/cl1 and shifted out. Expected
//     values come from a Boolean model of each adder slice kept here.
//  3. Back to normal mode after reset: tokens flow again (mode switch).
//  4. Fault analysis: stuck-at-0 and stuck-at-1 are forced in turn on the
//     completion-detector input and the output of every completion
//     C-element; a single {DATA, NULL} pair must then fail to complete
//     (stall or wrong result). A stuck-at-1 on the sleep fork into register
//     R_2 must stall the first pair; a stuck-at-0 there must be caught by a
//     second pair with different DATA. In stage 2, a completion-detector
//     gate stuck-at-0 must deadlock, a stuck-at-1 on the detector's sleep
//     fork must be caught, while stuck-at-0 on the sleep forks into the
//     detector and into F_2 must stay invisible (redundant / untestable, as
//     the fault analysis predicts). With no fault both pairs complete.
// Each mechanism that never happened counts as a failure.
module tb_scl_dft_pipeline;
  import scl_pkg::*;

  localparam int N    = 3;
  localparam int WIN  = stage_width(1, N);
  localparam int WOUT = stage_width(N + 1, N);
  localparam int CHAIN = 2 * (stage_width(1, N) + stage_width(2, N) + stage_width(3, N));

  int checks = 0, failures = 0;

  logic rst, s_i, k_o, k_i, test_mode, load, cl0, cl1, scan_in, scan_out;
  dual_rail_t [WIN-1:0]  x_i;
  dual_rail_t [WOUT-1:0] x_o;

  scl_dft_pipeline dut (
    .rst, .x_i, .s_i, .k_o, .x_o, .k_i,
    .test_mode, .load, .cl0, .cl1, .scan_in, .scan_out);

  // mechanism counters
  int n_tokens, n_inflight2, n_stall, n_reg_hold, n_idle_sleep;
  int n_shift, n_capture, n_mode_switch, n_fault_cd, n_fault_sleep, n_fault_other;
  int sent, received, receiver_delay;
  logic [WOUT-1:0] expect_q [$];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- helpers
  function automatic logic complete(input dual_rail_t [WOUT-1:0] v);
    for (int i = 0; i < WOUT; i++) if (v[i] == DR_NULL) return 0;
    return 1;
  endfunction

  function automatic logic [WOUT-1:0] decode(input dual_rail_t [WOUT-1:0] v);
    logic [WOUT-1:0] r;
    for (int i = 0; i < WOUT; i++) r[i] = v[i].t;
    return r;
  endfunction

  function automatic logic maj(input logic p, input logic q, input logic r);
    return (p & q) | (p & r) | (q & r);
  endfunction

  // Boolean model of slice k on independent rails (input layout of the RTL).
  function automatic dual_rail_t [WIN-1:0] f_ref(input int k, input dual_rail_t [WIN-1:0] x);
    dual_rail_t [WIN-1:0] y;
    dual_rail_t c, a, b;
    int wo;
    wo = stage_width(k + 1, N);
    y = '0;
    c = x[k-1]; a = x[k]; b = x[k+1];
    for (int p = 0; p < wo; p++) begin
      if (p < k - 1) y[p] = x[p];
      else if (p > k) y[p] = x[p+1];
    end
    y[k].t   = maj(a.t, b.t, c.t);
    y[k].f   = maj(a.f, b.f, c.f);
    y[k-1].t = (a.t & b.t & c.t) | (maj(a.f, b.f, c.f) & (a.t | b.t | c.t));
    y[k-1].f = (a.f & b.f & c.f) | (maj(a.t, b.t, c.t) & (a.f | b.f | c.f));
    return y;
  endfunction

  task automatic do_reset();
    rst = 1; s_i = 1; k_i = 1; x_i = '0;
    #10 rst = 0;
    #10;
  endtask

  logic xo_complete;
  assign xo_complete = complete(x_o);

  // --------------------------------------------------------- normal traffic
  task automatic sender(input int count, input int max_gap);
    for (int n = 0; n < count; n++) begin
      logic [N-1:0] a, b;
      logic c;
      int waited;
      a = N'($urandom); b = N'($urandom); c = 1'($urandom);
      waited = 0;
      while (k_o !== 1'b1) begin #1; waited++; end
      if (waited > 15) n_stall++;
      #($urandom % (max_gap + 1));
      x_i[0] = dr_encode(c);
      for (int j = 0; j < N; j++) begin
        x_i[1 + 2*j] = dr_encode(a[j]);
        x_i[2 + 2*j] = dr_encode(b[j]);
      end
      s_i = 0;
      expect_q.push_back(WOUT'(a) + WOUT'(b) + WOUT'(c));
      sent++;
      wait (k_o == 1'b0);
      #($urandom % (max_gap + 1));
      x_i = '0;
      s_i = 1;
    end
  endtask

  task automatic receiver(input int count);
    for (int n = 0; n < count; n++) begin
      logic [WOUT-1:0] exp;
      k_i = 1;
      wait (xo_complete);
      #(receiver_delay + $urandom % 3);
      check(expect_q.size() > 0, "token without a sender");
      exp = expect_q.pop_front();
      check(decode(x_o) == exp, $sformatf("sum got %b exp %b", decode(x_o), exp));
      received++;
      n_tokens++;
      k_i = 0;
      wait (x_o == '0);
      #($urandom % 3);
    end
    k_i = 1;
  endtask

  // monitors (normal mode only)
  // An illegal code (both rails high) is a failure in a fault-free pipeline;
  // with a fault forced it is one of the symptoms the fault tests expect.
  logic fault_active = 0;
  int   n_illegal_under_fault = 0;
  always @(x_o) begin
    if (!test_mode && !rst)
      for (int i = 0; i < WOUT; i++)
        if (x_o[i].t && x_o[i].f) begin
          if (fault_active) n_illegal_under_fault++;
          else begin
            failures++;
            $display("FAIL illegal code on x_o bit %0d (t=%0t)", i, $time);
          end
        end
  end

  always @(sent or received) if (sent - received >= 2) n_inflight2++;

  always @(x_i) begin
    if (!test_mode && x_i == '0 && dut.g_stage[1].r_q != '0) n_reg_hold++;
  end

  task automatic check_idle();
    #20;
    check(k_o == 1'b1 && x_o == '0, "idle: pipeline asleep and NULL");
    check(dut.sleep[N:1] == '1, "idle: every stage sleeps");
    check(dut.g_stage[1].r_q == '0 && dut.g_stage[2].r_q == '0 &&
          dut.g_stage[3].r_q == '0, "idle: registers NULL");
    n_idle_sleep++;
  endtask

  task automatic run_traffic(input int count, input int rdelay, input int max_gap);
    receiver_delay = rdelay;
    fork
      sender(count, max_gap);
      receiver(count);
    join
    check(expect_q.size() == 0, "every token delivered");
  endtask

  // ------------------------------------------------------------ scan test
  task automatic scan_shift(input logic b);
    scan_in = b;
    #1 cl0 = 1; #1 cl0 = 0;
    #1 cl1 = 1; #1 cl1 = 0;
    #1;
    n_shift++;
  endtask

  // chain cell g -> dual-rail value of the register it belongs to
  function automatic dual_rail_t [WIN-1:0] reg_of(input logic [CHAIN-1:0] ch, input int k);
    dual_rail_t [WIN-1:0] v;
    int base;
    base = 0;
    for (int s = 1; s < k; s++) base += 2 * stage_width(s, N);
    v = '0;
    for (int i = 0; i < stage_width(k, N); i++) begin
      v[i].f = ch[base + 2*i];
      v[i].t = ch[base + 2*i + 1];
    end
    return v;
  endfunction

  function automatic logic [CHAIN-1:0] chain_of(input dual_rail_t [WIN-1:0] r1,
      input dual_rail_t [WIN-1:0] r2, input dual_rail_t [WIN-1:0] r3);
    logic [CHAIN-1:0] ch;
    int g;
    g = 0;
    for (int i = 0; i < stage_width(1, N); i++) begin ch[g] = r1[i].f; ch[g+1] = r1[i].t; g += 2; end
    for (int i = 0; i < stage_width(2, N); i++) begin ch[g] = r2[i].f; ch[g+1] = r2[i].t; g += 2; end
    for (int i = 0; i < stage_width(3, N); i++) begin ch[g] = r3[i].f; ch[g+1] = r3[i].t; g += 2; end
    return ch;
  endfunction

  task automatic scan_test(input int patterns);
    test_mode = 1;
    n_mode_switch++;
    #2;
    for (int p = 0; p < patterns; p++) begin
      logic [CHAIN-1:0] pat, got, exp;
      dual_rail_t [WIN-1:0] xin, y3;
      for (int w = 0; w < CHAIN; w += 32) pat[w +: 32] = $urandom;
      for (int g = CHAIN - 1; g >= 0; g--) scan_shift(pat[g]);
      check(dut.g_stage[1].r_q == reg_of(pat, 1)[stage_width(1, N)-1:0], "scan-in R1");
      check(dut.g_stage[3].r_q == reg_of(pat, 3)[stage_width(3, N)-1:0], "scan-in R3");
      for (int i = 0; i < WIN; i++) xin[i] = dual_rail_t'($urandom);
      x_i = xin;
      #5;
      y3 = f_ref(3, reg_of(pat, 3));
      check(x_o == y3[WOUT-1:0], "F3 response on x_o");
      #1 load = 1; #1 load = 0;
      #1 cl1 = 1; #1 cl1 = 0; #1;
      n_capture++;
      exp = chain_of(xin, f_ref(1, reg_of(pat, 1)), f_ref(2, reg_of(pat, 2)));
      for (int g = CHAIN - 1; g >= 0; g--) begin
        got[g] = scan_out;
        scan_shift(1'($urandom));
      end
      check(got == exp, "captured responses of x_i, F1, F2");
    end
    test_mode = 0;
    x_i = '0;
    n_mode_switch++;
  endtask

  // ------------------------------------------------------------ fault runs
  // One complete {DATA, NULL} pair through the pipeline: the sender offers
  // DATA, returns to NULL once k_o falls and waits for k_o to rise again; the
  // receiver takes the DATA, acknowledges and waits for NULL. pair_passed is
  // set only if both sides finish within the time limit and the sum is right.
  logic pair_passed;
  task automatic one_pair(input logic [N-1:0] a, input logic [N-1:0] b);
    logic tx_done, rx_done, rx_ok;
    {tx_done, rx_done, rx_ok} = '0;
    k_i = 1;
    x_i[0] = DR_DATA0;
    for (int j = 0; j < N; j++) begin
      x_i[1 + 2*j] = dr_encode(a[j]);
      x_i[2 + 2*j] = dr_encode(b[j]);
    end
    s_i = 0;
    fork
      begin
        fork
          begin
            wait (xo_complete);
            rx_ok = (decode(x_o) == WOUT'(a) + WOUT'(b));
            #2 k_i = 0;
            wait (x_o == '0);
            #2 k_i = 1;
            rx_done = 1;
          end
          begin
            wait (k_o == 1'b0);
            #2 x_i = '0;
            s_i = 1;
            wait (k_o == 1'b1);
            tx_done = 1;
          end
        join
      end
      #300;
    join_any
    disable fork;
    #20;
    pair_passed = tx_done && rx_done && rx_ok && x_o == '0;
    x_i = '0;
    s_i = 1;
    k_i = 1;
    #20;
  endtask

  // Pair test of one (possibly faulty) pipeline: reset, then two pairs with
  // different data. first_failed: the first pair failed; any_failed: either.
  task automatic pair_test(input string name, output logic first_failed, output logic any_failed);
    do_reset();
    one_pair(3'b101, 3'b001);
    first_failed = !pair_passed;
    one_pair(3'b010, 3'b110);
    any_failed = first_failed || !pair_passed;
    $display("fault %-28s first pair %s, second pair %s", name,
             first_failed ? "FAILED" : "passed", pair_passed ? "passed" : "FAILED");
  endtask

  initial begin
    {n_tokens, n_inflight2, n_stall, n_reg_hold, n_idle_sleep} = '0;
    {n_shift, n_capture, n_mode_switch, n_fault_cd, n_fault_sleep, n_fault_other} = '0;
    {sent, received} = '0;
    {test_mode, load, cl0, cl1, scan_in} = '0;
    do_reset();
    check_idle();

    run_traffic(200, 0, 4);      // fast receiver
    check_idle();
    run_traffic(100, 40, 2);     // slow receiver: back-pressure
    check_idle();

    scan_test(20);
    do_reset();
    check_idle();
    run_traffic(50, 0, 3);
    check_idle();

    // fault-free reference: the pair test must pass
    begin
      logic f1, fa;
      pair_test("none", f1, fa);
      check(!fa, "fault-free pipeline passes the pair test");
    end
    // stuck-at faults on the completion C-element pins: inputs from the
    // completion detectors (cd_done) and outputs (sleep, which is also the
    // second input of the previous C-element)
    fault_active = 1;
    for (int st = 1; st <= N; st++) begin
      for (int v = 0; v < 2; v++) begin
        logic f1, fa;
        case (st)
          1: if (v == 0) force dut.cd_done[1] = 1'b0; else force dut.cd_done[1] = 1'b1;
          2: if (v == 0) force dut.cd_done[2] = 1'b0; else force dut.cd_done[2] = 1'b1;
          default: if (v == 0) force dut.cd_done[3] = 1'b0; else force dut.cd_done[3] = 1'b1;
        endcase
        pair_test($sformatf("C%0d input a stuck-at-%0d", st, v), f1, fa);
        check(f1, $sformatf("C%0d input a stuck-at-%0d caught by one pair", st, v));
        if (f1) n_fault_cd++;
        case (st)
          1: release dut.cd_done[1];
          2: release dut.cd_done[2];
          default: release dut.cd_done[3];
        endcase
        case (st)
          1: if (v == 0) force dut.sleep[1] = 1'b0; else force dut.sleep[1] = 1'b1;
          2: if (v == 0) force dut.sleep[2] = 1'b0; else force dut.sleep[2] = 1'b1;
          default: if (v == 0) force dut.sleep[3] = 1'b0; else force dut.sleep[3] = 1'b1;
        endcase
        pair_test($sformatf("C%0d output stuck-at-%0d", st, v), f1, fa);
        check(f1, $sformatf("C%0d output stuck-at-%0d caught by one pair", st, v));
        if (f1) n_fault_cd++;
        case (st)
          1: release dut.sleep[1];
          2: release dut.sleep[2];
          default: release dut.sleep[3];
        endcase
      end
    end

    // sleep fork into register R_2: stuck-at-1 stalls the pipeline; stuck-at-0
    // leaves old DATA in the register, seen once different DATA follows
    begin
      logic f1, fa;
      force dut.g_stage[2].u_r.s = 1'b1;
      pair_test("R2 sleep fork stuck-at-1", f1, fa);
      check(f1, "R2 sleep fork stuck-at-1 caught by one pair");
      if (f1) n_fault_sleep++;
      release dut.g_stage[2].u_r.s;
      force dut.g_stage[2].u_r.s = 1'b0;
      pair_test("R2 sleep fork stuck-at-0", f1, fa);
      check(fa, "R2 sleep fork stuck-at-0 caught by two different pairs");
      if (fa) n_fault_sleep++;
      release dut.g_stage[2].u_r.s;
      // completion detector of stage 2: a first-level gate stuck-at-0 must
      // deadlock the pipeline
      force dut.g_stage[2].u_cd.bit_done[0] = 1'b0;
      pair_test("CD2 TH12 output stuck-at-0", f1, fa);
      check(f1, "CD2 internal stuck-at-0 deadlocks the first pair");
      if (f1) n_fault_other++;
      release dut.g_stage[2].u_cd.bit_done[0];
      // sleep fork into CD_2: stuck-at-1 is caught with the C-elements,
      // stuck-at-0 is redundant (the pair still completes)
      force dut.g_stage[2].u_cd.sleep = 1'b1;
      pair_test("CD2 sleep fork stuck-at-1", f1, fa);
      check(f1, "CD2 sleep fork stuck-at-1 caught by one pair");
      if (f1) n_fault_other++;
      release dut.g_stage[2].u_cd.sleep;
      force dut.g_stage[2].u_cd.sleep = 1'b0;
      pair_test("CD2 sleep fork stuck-at-0", f1, fa);
      check(!fa, "CD2 sleep fork stuck-at-0 is redundant (pairs complete)");
      if (!fa) n_fault_other++;
      release dut.g_stage[2].u_cd.sleep;
      // sleep fork into F_2 stuck-at-0: untestable by DATA/NULL pairs
      force dut.g_stage[2].f_sleep = 1'b0;
      pair_test("F2 sleep fork stuck-at-0", f1, fa);
      check(!fa, "F2 sleep fork stuck-at-0 not visible to pairs");
      if (!fa) n_fault_other++;
      release dut.g_stage[2].f_sleep;
      fault_active = 0;
      pair_test("none (after release)", f1, fa);
      check(!fa, "pipeline passes again after release");
    end

    $display("tokens=%0d inflight>=2=%0d stalls=%0d reg_hold=%0d idle_sleep=%0d",
             n_tokens, n_inflight2, n_stall, n_reg_hold, n_idle_sleep);
    $display("shifts=%0d captures=%0d mode_switches=%0d fault_cd=%0d fault_sleep=%0d illegal_under_fault=%0d",
             n_shift, n_capture, n_mode_switch, n_fault_cd, n_fault_sleep, n_illegal_under_fault);
    check(n_tokens > 0,      "mechanism: DATA/NULL token delivery");
    check(n_inflight2 > 0,   "mechanism: pipelining (two tokens in flight)");
    check(n_stall > 0,       "mechanism: back-pressure stall");
    check(n_reg_hold > 0,    "mechanism: register holds DATA after input NULL");
    check(n_idle_sleep > 0,  "mechanism: idle pipeline asleep");
    check(n_shift > 0,       "mechanism: scan shift");
    check(n_capture > 0,     "mechanism: scan capture");
    check(n_mode_switch > 1, "mechanism: test/normal mode switch");
    check(n_fault_cd > 0,    "mechanism: C-element fault detected by DATA/NULL pair");
    check(n_fault_sleep == 2, "mechanism: both register sleep-fork faults detected");
    check(n_fault_cd == 4 * N, "mechanism: every C-element pin fault detected by one pair");
    check(n_fault_other == 4, "mechanism: detector and sleep-fork fault classes behave as analysed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
