// scl_scan_cell: scan cell that replaces one rail of an SCL register.
//
// Normal mode (M = 0): the cell is the SCL register rail. Din sets Dout while
// the sleep input S is low, Dout holds, and only S clears it.
// Test mode (M = 1): the cell is an LSSD-type pair of level-sensitive latches.
// The first (master) latch is open to the scan input Sin while CL0 is high and
// to the functional input Din while L is high; the second (slave) latch copies
// the master while CL1 is high. Pulsing CL0 then CL1 shifts the chain by one
// cell; pulsing L then CL1 captures the combinational response on Din. CL0,
// CL1 and L must never be high together. S has no effect in test mode.
//
// Interface: din, sin, s, m, l, cl0, cl1 in; dout out (also the scan output).
// Timing: level sensitive, no free-running clock.
//
// Ports and the behaviour of each mode follow the document's scan cell. How
// the cell is built (an SCL register rail, an LSSD latch pair and an output
// multiplexer on M) and which latch L loads are this design's choices.
module scl_scan_cell (
  input  logic din,
  input  logic sin,
  input  logic s,
  input  logic m,
  input  logic l,
  input  logic cl0,
  input  logic cl1,
  output logic dout
);

  logic q_func;    // SCL register rail (normal mode)
  logic q_master;  // LSSD L1 latch
  logic q_slave;   // LSSD L2 latch

  scl_reg_rail u_rail (.d(din), .sleep(s), .q(q_func));

  always_latch begin
    if (m && cl0)    q_master = sin;
    else if (m && l) q_master = din;
  end

  always_latch begin
    if (m && cl1) q_slave = q_master;
  end

  assign dout = m ? q_slave : q_func;

endmodule
