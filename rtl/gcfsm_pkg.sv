// Shared types and the next-state function of the asynchronous Clock
// Controller Block (CCB).
//
// The CCB is an asynchronous state machine with one state variable (s0) and
// one output (dis_ck) that is fed back as a second state variable. Its
// behaviour is a transition map indexed by (s0, dis_ck) and the inputs
// (go, in_reset). The map cells that are specified are:
//
//   (s0,dis_ck) \ (go,in_reset)   00    01    11    10
//        00                       --   [00]   01    --
//        01                       11    11   [01]   11
//        11                      [11]   00    --    --
//        10                       --    00    --    --
//   ([..] = stable, -- = never reached in normal operation)
//
// The unspecified cells are filled so that the logic is small and so that
// 00 stays stable with go=0 (an unused input of a multi-input CCB while the
// partition runs):
//   s0+     = dis_ck & (~in_reset | (~s0 & ~go))
//   dis_ck+ = (go & in_reset) | (dis_ck & (~s0 | ~in_reset))
// ccb closes this function into a feedback loop (an asynchronous state
// machine), so tools report a combinational loop through it by design.
// The map and its stable states follow the published design; the filling
// of the don't-care cells is this implementation's choice.
package gcfsm_pkg;

  // State of a one-bit CCB. dis_ck = 1 lets the local clock through.
  typedef struct packed {
    logic s0;
    logic dis_ck;
  } ccb_state_t;

  // Named stable states of the map (the others are WAKE = 01, the
  // hand-over in progress, and the transient 10 on the way to IDLE).
  localparam ccb_state_t CCB_IDLE    = '{s0: 1'b0, dis_ck: 1'b0}; // clock gated
  localparam ccb_state_t CCB_RUN     = '{s0: 1'b1, dis_ck: 1'b1}; // sub-FSM running

  function automatic ccb_state_t ccb_next(ccb_state_t q, logic go, logic in_reset);
    ccb_state_t n;
    n.s0     = q.dis_ck & (~in_reset | (~q.s0 & ~go));
    n.dis_ck = (go & in_reset) | (q.dis_ck & (~q.s0 | ~in_reset));
    return n;
  endfunction

endpackage
