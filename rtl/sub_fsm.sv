// sub_fsm -- one partition of the de-composed binary counter.
//
// The N_STATES-state binary counter is split into N_PART sub-FSMs of equal
// size. Partition INDEX owns the counts INDEX*S .. INDEX*S+S-1 (S =
// N_STATES/N_PART) and has one extra state, its reset state, in which it
// waits while another partition counts.
//
// Operation (all on the rising edge of the gated clock ck, which only runs
// while this partition is active or being handed to):
//   * reset state: the first clock edge it receives moves it to its first
//     count; in_reset falls.
//   * counting: the local count increments. In the last count, go is 1 for
//     exactly one cycle: this is the hand-over request to the next partition.
//   * after the last count it returns to its reset state; in_reset rises,
//     which makes its CCB gate the clock off.
// go and in_reset are flip-flop outputs, so they are hazard-free as the CCB
// requires. count is this partition's counter value while it counts and 0 in
// its reset state, so the counter value is the OR over all partitions.
//
// Partition sizes, the reset state and the go/in_reset interface follow the
// published design. The encoding (a reset flag plus a local binary count),
// the registered go and the asynchronous global reset (partition 0 starts at
// count 0, the others in their reset state) are this implementation's
// choices.
module sub_fsm #(
  parameter int unsigned N_STATES = 256,  // states of the whole counter
  parameter int unsigned N_PART   = 8,    // number of partitions
  parameter int unsigned INDEX    = 0,    // this partition's position
  localparam int unsigned W  = $clog2(N_STATES),
  localparam int unsigned S  = N_STATES / N_PART,
  localparam int unsigned LW = (S > 1) ? $clog2(S) : 1
) (
  input  logic         ck,        // gated local clock
  input  logic         rst,       // asynchronous reset, active high
  output logic         go,        // hand-over request (one cycle, last count)
  output logic         in_reset,  // 1 while in the reset state
  output logic [W-1:0] count      // counter value, 0 in the reset state
);

  localparam logic [LW-1:0] LAST = LW'(S - 1);
  localparam logic [W-1:0]  BASE = W'(INDEX * S);

  logic [LW-1:0] loc;

  always_ff @(posedge ck or posedge rst) begin
    if (rst) begin
      in_reset <= (INDEX != 0);
      loc      <= '0;
      go       <= (INDEX == 0) && (S == 1);
    end else if (in_reset) begin
      in_reset <= 1'b0;
      loc      <= '0;
      go       <= (S == 1);
    end else if (loc == LAST) begin
      in_reset <= 1'b1;
      loc      <= '0;
      go       <= 1'b0;
    end else begin
      loc      <= loc + 1'b1;
      go       <= (loc + 1'b1 == LAST);
    end
  end

  assign count = in_reset ? '0 : BASE + W'(loc);

  initial begin
    assert (N_PART >= 2 && N_STATES % N_PART == 0 && INDEX < N_PART)
      else $error("sub_fsm: N_PART must be >= 2 and divide N_STATES");
  end

endmodule
