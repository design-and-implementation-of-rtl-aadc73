// scl_c_element: resettable completion C-element with inverted output.
//
// A C-element raises its state when all inputs are high and lowers it when all
// are low; otherwise it holds (hysteresis). In SCL the output is inverted and
// drives the stage's sleep signal: ko = 1 means the stage sleeps (its register,
// combinational block and the next completion detector are forced to NULL) and
// requests new DATA from the previous stage; ko = 0 means the stage is awake,
// holds DATA and requests NULL. These are the only gates of the pipeline that
// never sleep.
//
// Interface: a = output of the stage's completion detector, b = ko of the next
// stage (or the environment's acknowledge), rst = asynchronous reset to
// state 0 (ko = 1, every stage asleep).
//
// Timing: the output follows the state after DELAY time units. The SCL stage
// relies on its register latching DATA faster than the handshake loop through
// the previous stage's C-element can remove that DATA; the delay gives a zero-
// delay simulation that same ordering and is ignored by synthesis. The delay
// and the reset polarity are this design's choices.
module scl_c_element #(
  parameter int unsigned DELAY = 1
) (
  input  logic a,
  input  logic b,
  input  logic rst,
  output logic ko
);

  logic state;

  always_latch begin
    if (rst)         state = 1'b0;
    else if (a == b) state = a;
  end

  assign #(DELAY) ko = ~state;

endmodule
