// scl_th: SCL threshold gate TH_mn with input weights and a sleep input.
//
// The output rises when the weighted count of asserted inputs reaches the
// threshold M (TH_mnW_w1..wn in the usual notation: n inputs, threshold m,
// weights w). An SCL gate has only a set block and a hold0 block, no
// hysteresis: because the sleep signal S forces every gate of a block low,
// the gate does not have to wait for all inputs to return to NULL. So the
// gate is combinational: out = !S && (sum_k W_k * in_k >= M).
//
// Interface: in[N-1:0], sleep, out. WEIGHTS packs one 4-bit weight per input,
// input k in bits [4k+3:4k]; the default gives every input weight 1.
// Timing: purely combinational, no internal state.
//
// The gate function and the forced-low sleep behaviour follow the SCL
// description; the packing of the weights is this design's own.
module scl_th #(
  parameter int unsigned N       = 2,            // number of inputs (1..8)
  parameter int unsigned M       = 1,            // threshold
  parameter logic [31:0] WEIGHTS = 32'h1111_1111 // 4-bit weight per input
) (
  input  logic [N-1:0] in,
  input  logic         sleep,
  output logic         out
);

  initial begin
    assert (N >= 1 && N <= 8) else $error("scl_th: N must be 1..8");
    assert (M >= 1) else $error("scl_th: threshold must be at least 1");
  end

  always_comb begin
    int unsigned sum;
    sum = 0;
    for (int k = 0; k < int'(N); k++)
      if (in[k]) sum += int'(WEIGHTS[4*k +: 4]);
    out = !sleep && (sum >= M);
  end

endmodule
