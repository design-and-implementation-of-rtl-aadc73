// scl_and_tree: tree of SCL THnn gates (n = 2..4) that asserts its output only
// when all N inputs are asserted. Used by the completion detector.
//
// Inputs are taken in groups of four from bit 0 upward; each group feeds one
// THnn gate (n = group size, a TH11 buffer for a group of one), and the group
// outputs feed the next level, built by instantiating this module again until
// one gate remains. Every gate shares the sleep input, so the whole tree is
// cleared at once when sleep rises.
//
// Interface: in[N-1:0], sleep, out. Timing: combinational.
// The THnn levels with n <= 4 follow the SCL completion detector; the
// grouping order is this design's own.
module scl_and_tree #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] in,
  input  logic         sleep,
  output logic         out
);

  if (N <= 4) begin : g_leaf
    scl_th #(.N(N), .M(N)) u_thnn (.in(in), .sleep(sleep), .out(out));
  end else begin : g_node
    localparam int unsigned G = (N + 3) / 4;
    logic [G-1:0] grp;
    for (genvar g = 0; g < int'(G); g++) begin : g_grp
      localparam int unsigned GW = (N - 4 * g >= 4) ? 4 : (N - 4 * g);
      scl_th #(.N(GW), .M(GW)) u_thnn (
        .in(in[4*g +: GW]), .sleep(sleep), .out(grp[g]));
    end
    scl_and_tree #(.N(G)) u_next (.in(grp), .sleep(sleep), .out(out));
  end

endmodule
