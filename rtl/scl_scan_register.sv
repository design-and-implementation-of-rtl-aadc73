// scl_scan_register: W-bit dual-rail SCL register built from scan cells.
//
// Each dual-rail bit uses two scan cells, one per rail. In normal mode the
// register behaves as an SCL register: the sleep input clears it to NULL and
// arriving DATA is latched until the next sleep. In test mode the 2*W cells
// form one segment of an LSSD scan chain, entered at sin and left at sout, in
// the order bit 0 rail f, bit 0 rail t, bit 1 rail f, ... bit W-1 rail t.
//
// Interface: d[W-1:0] and q[W-1:0] dual rail; s (sleep), m (test mode),
// l (load), cl0/cl1 (non-overlapping shift clocks), sin, sout.
// Timing: see scl_scan_cell.
// Two cells per bit follow the document; the chain order is this design's own.
module scl_scan_register
  import scl_pkg::*;
#(
  parameter int unsigned W = 7
) (
  input  dual_rail_t [W-1:0] d,
  output dual_rail_t [W-1:0] q,
  input  logic               s,
  input  logic               m,
  input  logic               l,
  input  logic               cl0,
  input  logic               cl1,
  input  logic               sin,
  output logic               sout
);

  logic [2*W:0] chain;  // chain[j] is the scan input of cell j
  assign chain[0] = sin;

  for (genvar i = 0; i < int'(W); i++) begin : g_bit
    scl_scan_cell u_f (
      .din(d[i].f), .sin(chain[2*i]), .s(s), .m(m), .l(l),
      .cl0(cl0), .cl1(cl1), .dout(chain[2*i+1]));
    scl_scan_cell u_t (
      .din(d[i].t), .sin(chain[2*i+1]), .s(s), .m(m), .l(l),
      .cl0(cl0), .cl1(cl1), .dout(chain[2*i+2]));
    assign q[i].f = chain[2*i+1];
    assign q[i].t = chain[2*i+2];
  end

  assign sout = chain[2*W];

endmodule
