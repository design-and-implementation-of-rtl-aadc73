// tb_scl_dft_pipeline_wide: the SCL scan pipeline built with STAGES = 6 (a
// 6-bit adder over six stages), to show that the structure scales.
//
// Normal mode: 300 random additions with a receiver of random speed; every
// sum must arrive in order, and at some point at least three tokens must be
// in flight. Test mode: the scan chain, whose length is the sum of twice
// each stage width, must return a random bit stream exactly that many shifts
// after it was entered. The pipeline must be asleep and NULL when idle.
module tb_scl_dft_pipeline_wide;
  import scl_pkg::*;

  localparam int N    = 6;
  localparam int WIN  = stage_width(1, N);
  localparam int WOUT = stage_width(N + 1, N);

  function automatic int chain_len();
    int c = 0;
    for (int k = 1; k <= N; k++) c += 2 * stage_width(k, N);
    return c;
  endfunction
  localparam int CHAIN = chain_len();

  int checks = 0, failures = 0;
  logic rst, s_i, k_o, k_i, test_mode, load, cl0, cl1, scan_in, scan_out;
  dual_rail_t [WIN-1:0]  x_i;
  dual_rail_t [WOUT-1:0] x_o;
  logic [WOUT-1:0] expect_q [$];
  int sent = 0, received = 0, max_inflight = 0;

  scl_dft_pipeline #(.STAGES(N)) dut (
    .rst, .x_i, .s_i, .k_o, .x_o, .k_i,
    .test_mode, .load, .cl0, .cl1, .scan_in, .scan_out);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic complete(input dual_rail_t [WOUT-1:0] v);
    for (int i = 0; i < WOUT; i++) if (v[i] == DR_NULL) return 0;
    return 1;
  endfunction

  logic xo_complete;
  assign xo_complete = complete(x_o);

  always @(sent or received)
    if (sent - received > max_inflight) max_inflight = sent - received;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sender(input int count);
    for (int n = 0; n < count; n++) begin
      logic [N-1:0] a, b;
      logic c;
      a = N'($urandom); b = N'($urandom); c = 1'($urandom);
      wait (k_o == 1'b1);
      #($urandom % 3);
      x_i[0] = dr_encode(c);
      for (int j = 0; j < N; j++) begin
        x_i[1 + 2*j] = dr_encode(a[j]);
        x_i[2 + 2*j] = dr_encode(b[j]);
      end
      s_i = 0;
      expect_q.push_back(WOUT'(a) + WOUT'(b) + WOUT'(c));
      sent++;
      wait (k_o == 1'b0);
      #($urandom % 3);
      x_i = '0;
      s_i = 1;
    end
  endtask

  task automatic receiver(input int count);
    for (int n = 0; n < count; n++) begin
      logic [WOUT-1:0] got, exp;
      k_i = 1;
      wait (xo_complete);
      #($urandom % 30);
      for (int i = 0; i < WOUT; i++) got[i] = x_o[i].t;
      exp = expect_q.pop_front();
      check(got == exp, $sformatf("sum got %b exp %b", got, exp));
      received++;
      k_i = 0;
      wait (x_o == '0);
      #($urandom % 3);
    end
    k_i = 1;
  endtask

  initial begin
    logic [CHAIN-1:0] pat, got;
    {test_mode, load, cl0, cl1, scan_in} = '0;
    rst = 1; s_i = 1; k_i = 1; x_i = '0;
    #10 rst = 0;
    #10;
    fork
      sender(300);
      receiver(300);
    join
    #20;
    check(expect_q.size() == 0, "all tokens delivered");
    check(max_inflight >= 3, $sformatf("at least three tokens in flight (max %0d)", max_inflight));
    check(k_o && x_o == '0 && dut.sleep[N:1] == '1, "idle pipeline asleep");
    // scan chain length
    test_mode = 1;
    for (int w = 0; w < CHAIN; w += 32) pat[w +: 32] = $urandom;
    for (int g = 0; g < 2 * CHAIN; g++) begin
      if (g >= CHAIN) got[g - CHAIN] = scan_out;
      scan_in = (g < CHAIN) ? pat[g] : 1'b0;
      #1 cl0 = 1; #1 cl0 = 0;
      #1 cl1 = 1; #1 cl1 = 0;
      #1;
    end
    check(got == pat, $sformatf("scan stream returns after %0d shifts", CHAIN));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
