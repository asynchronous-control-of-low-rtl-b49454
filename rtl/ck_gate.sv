// ck_gate -- local clock gate of one sub-FSM.
//
// A two-input NAND of the inverted global clock and the CCB output dis_ck:
//   ck = ~(global_ck_n & dis_ck)
// With dis_ck = 1 the local clock follows the global clock; with dis_ck = 0
// it is held at 1, so the sub-FSM sees no rising edge. Because the CCB only
// changes dis_ck while the global clock is high (global_ck_n = 0), the NAND
// output stays at 1 across every change of dis_ck and never glitches. The
// gate and its placement behind a single shared inverter follow the
// published structure.
module ck_gate (
  input  logic global_ck_n,  // inverted global clock (shared inverter)
  input  logic dis_ck,       // 1 = clock enabled
  output logic ck            // gated local clock
);

  assign ck = ~(global_ck_n & dis_ck);

endmodule
