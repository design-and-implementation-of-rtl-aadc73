// scl_pkg: types and constants shared by the Sleep Convention Logic (SCL)
// pipeline with scan-based design for test.
//
// A dual-rail signal carries one bit on two wires. Rail f (the "0" rail) high
// means DATA0, rail t (the "1" rail) high means DATA1, both low is the NULL
// spacer that separates two DATA wavefronts. Both high is illegal in normal
// operation; in scan test mode the rails are driven independently and the
// combinational blocks then behave as plain Boolean logic on each rail.
//
// The example datapath is a ripple-carry adder cut into one bit slice per
// pipeline stage. stage_width() gives the number of dual-rail bits entering
// stage k (1-based) of an n-stage pipeline: k-1 finished sum bits, the carry,
// and the two operand bits still to be added for each of the n-k+1 remaining
// positions. stage_width(n+1, n) is the pipeline output: n sum bits + carry.
//
// The dual-rail code is the one SCL uses; the rail names, the struct and the
// adder layout are this design's own.
package scl_pkg;

  typedef struct packed {
    logic t;  // rail 1: asserted for DATA1
    logic f;  // rail 0: asserted for DATA0
  } dual_rail_t;

  localparam dual_rail_t DR_NULL  = '{t: 1'b0, f: 1'b0};
  localparam dual_rail_t DR_DATA0 = '{t: 1'b0, f: 1'b1};
  localparam dual_rail_t DR_DATA1 = '{t: 1'b1, f: 1'b0};

  // Dual-rail code of a Boolean value.
  function automatic dual_rail_t dr_encode(input logic b);
    return b ? DR_DATA1 : DR_DATA0;
  endfunction

  // Number of dual-rail bits entering stage k of an n-stage adder pipeline.
  function automatic int stage_width(input int k, input int n);
    return (k - 1) + 1 + 2 * (n - k + 1);
  endfunction

endpackage
