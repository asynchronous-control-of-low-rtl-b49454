// ccb_multi -- multi-input asynchronous Clock Controller Block.
//
// Used when a sub-FSM can be activated by any of N_IN other sub-FSMs. Each
// go input gets its own one-bit CCB; all of them share the in_reset of the
// sub-FSM they control, and their dis_ck outputs are ORed. Only the CCB whose
// go input pulsed leaves IDLE, so the OR is 1 exactly while that one is awake
// or running; when the sub-FSM returns to its reset state all of them are
// back in IDLE. Structure as published; timing as for ccb (the OR adds one
// gate delay to the settling time). With N_IN = 1 it is a plain ccb.
//
// rst puts the one-bit CCB of input 0 into RUN when INIT_ACTIVE is set and
// all others into IDLE.
module ccb_multi #(
  parameter int unsigned N_IN        = 2,     // number of go inputs
  parameter bit          INIT_ACTIVE = 1'b0   // sub-FSM is active after reset
) (
  input  logic            rst,
  input  logic [N_IN-1:0] go,        // hand-over requests, one per predecessor
  input  logic            in_reset,  // the controlled sub-FSM is in reset
  output logic            dis_ck     // 1 = local clock enabled
);

  logic [N_IN-1:0] dis_ck_i;

  for (genvar i = 0; i < N_IN; i++) begin : g_bit
    ccb #(.INIT_ACTIVE(INIT_ACTIVE && i == 0)) u_ccb (
      .rst      (rst),
      .go       (go[i]),
      .in_reset (in_reset),
      .dis_ck   (dis_ck_i[i])
    );
  end

  assign dis_ck = |dis_ck_i;

endmodule
