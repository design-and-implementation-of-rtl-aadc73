// scl_adder_slice: combinational block F_K of stage K of an SCL pipeline that
// adds two N-bit operands, one bit position per stage (ripple carry).
//
// Input bits (dual rail, WI = stage_width(K, N)): [0 .. K-2] sum bits already
// produced, [K-1] the carry into position K-1, then operand pairs
// a[j] at K+2(j-K+1), b[j] at K+1+2(j-K+1) for j = K-1 .. N-1.
// Output bits (WO = WI-1): [0 .. K-2] the sum bits passed on, [K-1] the new
// sum bit, [K] the carry out, then the operand pairs still to be added, each
// moved down by one index. In the last stage the output is {carry, sum}.
//
// The full adder uses only threshold gates and no inversion (unate logic):
//   carry.t = TH23(a.t, b.t, c.t)        carry.f = TH23(a.f, b.f, c.f)
//   sum.t   = TH34w2(carry.f, a.t, b.t, c.t)
//   sum.f   = TH34w2(carry.t, a.f, b.f, c.f)
// and every bit passed on goes through a TH11 buffer, so that the whole block
// returns to NULL when its sleep input rises. With sleep held low (scan test
// mode) the block is a plain Boolean circuit on each rail.
//
// Interface: x[WI-1:0] in, y[WO-1:0] out, sleep. Timing: combinational.
// The document says only that each F_i is a unate block of SCL threshold
// gates; the adder function and the gate choice above are this design's own.
module scl_adder_slice
  import scl_pkg::*;
#(
  parameter int unsigned K = 1,  // stage number, 1..N
  parameter int unsigned N = 3,  // operand width = number of stages
  localparam int unsigned WI = stage_width(K, N),
  localparam int unsigned WO = stage_width(K + 1, N)
) (
  input  dual_rail_t [WI-1:0] x,
  input  logic                sleep,
  output dual_rail_t [WO-1:0] y
);

  localparam logic [31:0] W_TH34W2 = 32'h0000_1112;  // first input weight 2

  dual_rail_t cin, a, b, cout, sum;
  assign cin = x[K-1];
  assign a   = x[K];
  assign b   = x[K+1];

  scl_th #(.N(3), .M(2)) u_c_t (.in({cin.t, b.t, a.t}), .sleep(sleep), .out(cout.t));
  scl_th #(.N(3), .M(2)) u_c_f (.in({cin.f, b.f, a.f}), .sleep(sleep), .out(cout.f));
  scl_th #(.N(4), .M(3), .WEIGHTS(W_TH34W2)) u_s_t (
    .in({cin.t, b.t, a.t, cout.f}), .sleep(sleep), .out(sum.t));
  scl_th #(.N(4), .M(3), .WEIGHTS(W_TH34W2)) u_s_f (
    .in({cin.f, b.f, a.f, cout.t}), .sleep(sleep), .out(sum.f));

  // TH11 buffers for the finished sum bits and the operands passed on.
  for (genvar p = 0; p < int'(WO); p++) begin : g_out
    if (p == K - 1) begin : g_sum
      assign y[p] = sum;
    end else if (p == K) begin : g_carry
      assign y[p] = cout;
    end else begin : g_pass
      localparam int unsigned SRC = (p < K - 1) ? p : p + 1;
      scl_th #(.N(1), .M(1)) u_buf_t (.in(x[SRC].t), .sleep(sleep), .out(y[p].t));
      scl_th #(.N(1), .M(1)) u_buf_f (.in(x[SRC].f), .sleep(sleep), .out(y[p].f));
    end
  end

endmodule
