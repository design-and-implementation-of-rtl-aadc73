// scl_reg_rail: one rail of a dual-rail SCL register.
//
// The transistor-level cell is two inverters with a feedback path. While the
// sleep signal is high the output is held low (NULL on this rail). When sleep
// is low, an asserted input sets the output, and the output then stays set
// even after the input falls again: only sleep can clear it. The register of
// a dual-rail bit is two of these cells, one per rail, sharing sleep.
//
// Interface: d (rail input), sleep, q (rail output). Timing: level sensitive,
// no clock; modelled as a set/clear latch (sleep dominates).
//
// The behaviour is the one described for the SCL register; reset is by sleep
// only, as in the cell itself.
module scl_reg_rail (
  input  logic d,
  input  logic sleep,
  output logic q
);

  always_latch begin
    if (sleep)  q = 1'b0;
    else if (d) q = 1'b1;
  end

endmodule
