// scl_dft_pipeline: self-timed Sleep Convention Logic (SCL) pipeline with a
// scan-based design-for-test structure.
//
// Each of the STAGES stages has a register R_i, a combinational block F_i, a
// completion detector CD_i and a completion C-element C_i. Data are dual rail
// and travel as DATA wavefronts separated by NULL. CD_i watches the input of
// R_i (early completion) and is put to sleep by the previous stage's sleep
// signal. C_i combines CD_i with the next stage's sleep signal; its inverted
// output s_i is stage i's sleep signal and goes to R_i, F_i, CD_{i+1} and
// C_{i-1}. When CD_i reports complete DATA and stage i+1 sleeps (ready for
// DATA), s_i falls: R_i latches the DATA and F_i evaluates. When CD_i has been
// cleared and stage i+1 has woken up, s_i rises: R_i, F_i and CD_{i+1} are
// forced to NULL at once, with no NULL wavefront. s_1 is the acknowledge k_o
// to the sender; k_i from the receiver closes the last C-element.
//
// For test, every register is made of scan cells (two per dual-rail bit) and
// the cells form one LSSD scan chain from scan_in through R_1, R_2, ... to
// scan_out. With test_mode high the registers ignore sleep, the sleep inputs
// of the combinational blocks are held low so that each F_i is plain Boolean
// logic, patterns are shifted with the non-overlapping clocks cl0/cl1, and the
// responses of F_1..F_{STAGES-1} are captured with load followed by cl1. The
// response of F_STAGES is seen directly on x_o, and x_i feeds R_1 on load.
//
// Example datapath: an STAGES-bit ripple-carry adder, one bit per stage.
// x_i[0] is the carry in, x_i[1+2j] = a[j], x_i[2+2j] = b[j]; x_o[STAGES-1:0]
// is the sum and x_o[STAGES] the carry out (see scl_adder_slice).
//
// Handshake with the sender: present DATA on x_i with s_i low while k_o is
// high; after k_o falls, return x_i to NULL with s_i high; wait for k_o to
// rise. With the receiver: hold k_i high to request DATA; once x_o is complete
// DATA, drive k_i low; x_o then returns to NULL and k_i may rise again.
// rst puts every C-element in the sleep state (whole pipeline NULL).
//
// Following the document: the stage structure, the sleep forks, the early
// completion detector, the two scan cells per bit and the LSSD test mode.
// This design's own choices: the adder datapath, the chain order, gating the
// combinational blocks' sleep with test_mode, and the C-element delay used to
// give simulation the SCL timing assumption (see scl_c_element).
// The design has no clock: its state is in level-sensitive latches, and the
// loops between neighbouring C-elements are the intended handshake rings.
module scl_dft_pipeline
  import scl_pkg::*;
#(
  parameter int unsigned STAGES = 3,
  localparam int unsigned WIN  = stage_width(1, STAGES),
  localparam int unsigned WOUT = stage_width(STAGES + 1, STAGES)
) (
  input  logic                  rst,
  // sender side
  input  dual_rail_t [WIN-1:0]  x_i,
  input  logic                  s_i,
  output logic                  k_o,
  // receiver side
  output dual_rail_t [WOUT-1:0] x_o,
  input  logic                  k_i,
  // scan test
  input  logic                  test_mode,
  input  logic                  load,
  input  logic                  cl0,
  input  logic                  cl1,
  input  logic                  scan_in,
  output logic                  scan_out
);

  // xs[i]: input of R_i (i = 1..STAGES), xs[STAGES+1]: output of F_STAGES.
  dual_rail_t [WIN-1:0] xs [STAGES+2];
  // sleep[i]: sleep of stage i; sleep[0] the sender's, sleep[STAGES+1] = k_i.
  logic [STAGES+1:0] sleep;
  logic [STAGES:0]   scan;
  logic [STAGES:1]   cd_done;

  assign xs[0]               = '0;
  assign xs[1]               = x_i;
  assign sleep[0]            = s_i;
  assign sleep[STAGES+1]     = k_i;
  assign scan[0]             = scan_in;

  for (genvar i = 1; i <= int'(STAGES); i++) begin : g_stage
    localparam int unsigned WI = stage_width(i, STAGES);
    localparam int unsigned WO = stage_width(i + 1, STAGES);

    dual_rail_t [WI-1:0] r_q;
    dual_rail_t [WO-1:0] f_y;
    logic                f_sleep;

    scl_cd #(.W(WI)) u_cd (
      .d(xs[i][WI-1:0]), .sleep(sleep[i-1]), .done(cd_done[i]));

    scl_c_element u_c (
      .a(cd_done[i]), .b(sleep[i+1]), .rst(rst), .ko(sleep[i]));

    scl_scan_register #(.W(WI)) u_r (
      .d(xs[i][WI-1:0]), .q(r_q), .s(sleep[i]), .m(test_mode), .l(load),
      .cl0(cl0), .cl1(cl1), .sin(scan[i-1]), .sout(scan[i]));

    assign f_sleep = sleep[i] & ~test_mode;

    scl_adder_slice #(.K(i), .N(STAGES)) u_f (
      .x(r_q), .sleep(f_sleep), .y(f_y));

    if (WO < WIN) begin : g_pad
      assign xs[i+1] = {{(WIN-WO){DR_NULL}}, f_y};
    end else begin : g_full
      assign xs[i+1] = f_y;
    end
  end

  assign k_o      = sleep[1];
  assign x_o      = xs[STAGES+1][WOUT-1:0];
  assign scan_out = scan[STAGES];

endmodule
