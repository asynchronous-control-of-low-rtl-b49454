// gated_counter -- low-power binary counter built as a de-composed,
// gated-clock FSM with asynchronous clock control.
//
// The N_STATES-state counter is split into N_PART sub-FSMs (sub_fsm). Only
// one of them counts at a time, and only that one receives clock edges. Each
// sub-FSM k has
//   * an asynchronous Clock Controller Block (ccb_multi with one go input,
//     the go of sub-FSM k-1, wrapping from the last to the first),
//   * a NAND clock gate (ck_gate) fed by the inverted global clock and the
//     CCB output dis_ck.
// One inverter on the global clock serves all gates.
//
// Hand-over from sub-FSM k to k+1 (global clock edges E0, E1):
//   E0: k enters its last count and raises go_k. CCB k+1 raises dis_ck at
//       once, while the global clock is still high, so clock k+1 starts with
//       the next falling edge without a glitch.
//   E1: both partitions are clocked. k returns to its reset state (in_reset_k
//       = 1, go_k = 0); k+1 leaves its reset state with its first count
//       (in_reset_{k+1} = 0). CCB k sees in_reset rise and gates clock k off;
//       CCB k+1 sees go and in_reset fall together and settles in RUN.
// So the count advances by one on every global clock edge, and two local
// clocks run only in the hand-over cycle.
//
// Interface: rst is an asynchronous reset (count 0, partition 0 running);
// release it while global_ck is high. count is the counter value; dis_ck
// and in_reset expose the clock enables and reset flags of all partitions.
//
// The only combinational loops are the intended feedback loops inside the
// asynchronous CCBs (see ccb).
//
// Structure and hand-over follow the published design; the reset, the
// count output and the default of 8 partitions (the partitioning with the
// lowest total power reported for asynchronous control) are this
// implementation's choices.
module gated_counter #(
  parameter int unsigned N_STATES = 256,
  parameter int unsigned N_PART   = 8,
  localparam int unsigned W = $clog2(N_STATES)
) (
  input  logic              rst,
  input  logic              global_ck,
  output logic [W-1:0]      count,
  output logic [N_PART-1:0] dis_ck,
  output logic [N_PART-1:0] in_reset
);

  logic              global_ck_n;
  logic [N_PART-1:0] ck;
  logic [N_PART-1:0] go;
  logic [W-1:0]      part_count [N_PART];

  assign global_ck_n = ~global_ck;

  for (genvar k = 0; k < N_PART; k++) begin : g_part
    localparam int unsigned PREV = (k + N_PART - 1) % N_PART;

    ccb_multi #(.N_IN(1), .INIT_ACTIVE(k == 0)) u_ccb (
      .rst      (rst),
      .go       (go[PREV]),
      .in_reset (in_reset[k]),
      .dis_ck   (dis_ck[k])
    );

    ck_gate u_gate (
      .global_ck_n (global_ck_n),
      .dis_ck      (dis_ck[k]),
      .ck          (ck[k])
    );

    sub_fsm #(.N_STATES(N_STATES), .N_PART(N_PART), .INDEX(k)) u_fsm (
      .ck       (ck[k]),
      .rst      (rst),
      .go       (go[k]),
      .in_reset (in_reset[k]),
      .count    (part_count[k])
    );
  end

  always_comb begin
    count = '0;
    for (int k = 0; k < N_PART; k++) count |= part_count[k];
  end

  // Protocol rules, sampled on the global clock: at most two partitions out
  // of reset-state-gating at once (only during a hand-over), and a go pulse
  // is only ever seen by a successor that is still in its reset state.
  for (genvar k = 0; k < N_PART; k++) begin : g_chk
    a_go_to_idle: assert property (@(posedge global_ck) disable iff (rst)
      go[k] |-> in_reset[(k + 1) % N_PART]);
  end
  a_two_active: assert property (@(posedge global_ck) disable iff (rst)
    $countones(dis_ck) inside {1, 2});

endmodule
