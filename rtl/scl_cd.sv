// scl_cd: SCL completion detector for a W-bit dual-rail signal.
//
// The first level is one TH12 gate per dual-rail bit (an OR of its two rails),
// which rises when that bit holds DATA. The following levels are THnn gates
// (2 <= n <= 4, Boolean ANDs) that merge the per-bit results, so the output
// rises only when the whole signal holds DATA. Like every SCL gate the
// detector is not cleared by a NULL wavefront but by its sleep input: the
// output falls as soon as sleep rises.
//
// Interface: d[W-1:0] (dual-rail signal watched), sleep, done.
// Timing: combinational.
// Structure follows the document's completion detector; grouping of the
// THnn tree is this design's own.
module scl_cd
  import scl_pkg::*;
#(
  parameter int unsigned W = 7
) (
  input  dual_rail_t [W-1:0] d,
  input  logic               sleep,
  output logic               done
);

  logic [W-1:0] bit_done;

  for (genvar i = 0; i < int'(W); i++) begin : g_th12
    scl_th #(.N(2), .M(1)) u_th12 (
      .in({d[i].t, d[i].f}), .sleep(sleep), .out(bit_done[i]));
  end

  scl_and_tree #(.N(W)) u_tree (.in(bit_done), .sleep(sleep), .out(done));

endmodule
