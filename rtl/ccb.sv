// ccb -- one-bit asynchronous Clock Controller Block.
//
// A CCB decides whether the local clock of one sub-FSM runs. It is an
// asynchronous (unclocked) state machine, so a passive CCB draws no clock
// power at all. The state is (s0, dis_ck); dis_ck is also the output and
// enables the local clock gate when it is 1.
//
// Behaviour (see gcfsm_pkg for the full transition map):
//   * IDLE (s0=0, dis_ck=0): the sub-FSM sits in its reset state
//     (in_reset=1) and its clock is gated.
//   * go rises (the predecessor sub-FSM hands over): dis_ck rises at once,
//     state WAKE (0,1). The local clock now runs.
//   * go and in_reset fall together (the predecessor left and this sub-FSM
//     left its reset state on the same clock edge): state RUN (1,1). This is
//     the only multiple-input change the CCB has to tolerate; the map makes
//     both orders of arrival end in RUN.
//   * in_reset rises (this sub-FSM handed over and went back to reset):
//     dis_ck falls, through the transient (1,0), back to IDLE.
//
// Timing: go and in_reset come from flip-flops clocked by the rising edge of
// the global clock, so dis_ck changes while the global clock is high, when
// the NAND clock gate holds its output at 1. The clock period must exceed the
// settling time of this loop, and go must be hazard-free.
//
// Implementation: the two state variables are combinational feedback, as
// in the asynchronous circuit itself; the combinational loop that tools
// report on s0/dis_ck is therefore intended. The map settles in at most two
// steps for every input combination and never oscillates. rst forces the
// state (RUN when INIT_ACTIVE, else IDLE); the published circuit has no reset,
// so this input is an addition of this implementation.
module ccb
  import gcfsm_pkg::*;
#(
  parameter bit INIT_ACTIVE = 1'b0  // state forced by rst: 1 = RUN, 0 = IDLE
) (
  input  logic rst,       // asynchronous reset, active high
  input  logic go,        // hand-over request from the predecessor sub-FSM
  input  logic in_reset,  // the own sub-FSM is in its reset state
  output logic dis_ck     // 1 = local clock enabled
);

  localparam ccb_state_t INIT = INIT_ACTIVE ? CCB_RUN : CCB_IDLE;

  ccb_state_t q;

  assign q      = rst ? INIT : ccb_next(q, go, in_reset);
  assign dis_ck = q.dis_ck;

  // Environment rule: a hand-over is only requested of a sub-FSM that is in
  // its reset state (go rises only while in_reset is 1).
  always @(posedge go) begin
    if (!rst) a_go_needs_reset: assert (in_reset);
  end

endmodule
