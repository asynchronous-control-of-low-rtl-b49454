// gc_monitor -- checker for a gated_counter, shared by the counter tests.
//
// Samples the counter in the middle of each global clock cycle (falling
// edge of global_ck) and checks, against the previous sample:
//   * the count advanced by exactly one (modulo N_STATES);
//   * each partition received exactly the local clock edges it should: one
//     for the partition that was counting, one more for its successor in a
//     hand-over cycle (go high), none for every other partition;
//   * the clock enable of each partition equals "out of reset, or its
//     predecessor's go is high";
//   * at most one go is high at a time.
// It also counts how often each mechanism occurred: hand-overs per
// partition, wrap-around hand-overs (last partition back to the first),
// simultaneous falls of go and in_reset at a CCB, cycles with two local
// clocks, local clock edges suppressed by gating, resets, and the cycles
// each CCB spends in its three operating modes (hand-over, enable, disable).
module gc_monitor #(
  parameter int unsigned N_STATES = 256,
  parameter int unsigned N_PART   = 8,
  localparam int unsigned W = $clog2(N_STATES)
) (
  input logic              global_ck,
  input logic              rst,
  input logic [W-1:0]      count,
  input logic [N_PART-1:0] dis_ck,
  input logic [N_PART-1:0] in_reset,
  input logic [N_PART-1:0] ck,
  input logic [N_PART-1:0] go
);

  int checks = 0;
  int failures = 0;
  int handovers [N_PART] = '{default: 0};
  int wraps = 0;
  int mic_events = 0;
  int two_clock_cycles = 0;
  int gated_edges = 0;
  int resets = 0;
  // CCB-cycles in each operating mode of a CCB: hand-over (an input of the
  // CCB changed in this cycle), enable (clock running), disable (gated).
  int mode_handover = 0;
  int mode_enable = 0;
  int mode_disable = 0;
  int samples = 0;

  int edges [N_PART] = '{default: 0};
  int edges_prev [N_PART] = '{default: 0};

  for (genvar k = 0; k < N_PART; k++) begin : g_edge
    always @(posedge ck[k]) edges[k]++;
  end

  bit                have_prev = 1'b0;
  logic [W-1:0]      count_prev;
  logic [N_PART-1:0] go_prev;
  logic [N_PART-1:0] ir_prev;

  function automatic int prev_of(int k);
    return (k + N_PART - 1) % N_PART;
  endfunction

  always @(negedge global_ck) begin
    if (rst) begin
      if (have_prev) resets++;
      have_prev = 1'b0;
    end else begin
      if (have_prev) begin
        int total;
        int exp_edges;
        samples++;
        checks++;
        if (int'(count) != (int'(count_prev) + 1) % N_STATES) begin
          failures++;
          $display("FAIL N_PART=%0d: count %0d after %0d", N_PART, count, count_prev);
        end
        total = 0;
        for (int k = 0; k < N_PART; k++) begin
          int d;
          d = edges[k] - edges_prev[k];
          total += d;
          exp_edges = (!ir_prev[k] || go_prev[prev_of(k)]) ? 1 : 0;
          checks++;
          if (d != exp_edges) begin
            failures++;
            $display("FAIL N_PART=%0d: partition %0d got %0d clock edges, expected %0d",
                     N_PART, k, d, exp_edges);
          end
          if (go_prev[prev_of(k)] != go[prev_of(k)] || ir_prev[k] != in_reset[k])
            mode_handover++;
          else if (dis_ck[k])
            mode_enable++;
          else
            mode_disable++;
          if (go_prev[k] && !go[k]) begin
            handovers[k]++;
            if (k == N_PART - 1) wraps++;
          end
          if (go_prev[prev_of(k)] && ir_prev[k] && !go[prev_of(k)] && !in_reset[k]) begin
            mic_events++;
            checks++;
            if (!dis_ck[k]) begin
              failures++;
              $display("FAIL N_PART=%0d: partition %0d gated after hand-over", N_PART, k);
            end
          end
        end
        if (total == 2) two_clock_cycles++;
        gated_edges += N_PART - total;
      end
      for (int k = 0; k < N_PART; k++) begin
        checks++;
        if (dis_ck[k] !== (!in_reset[k] || go[prev_of(k)])) begin
          failures++;
          $display("FAIL N_PART=%0d: dis_ck[%0d]=%0d with in_reset=%0d go_prev=%0d",
                   N_PART, k, dis_ck[k], in_reset[k], go[prev_of(k)]);
        end
      end
      checks++;
      if ($countones(go) > 1) begin
        failures++;
        $display("FAIL N_PART=%0d: several go signals high: %b", N_PART, go);
      end
      have_prev = 1'b1;
      count_prev = count;
      go_prev = go;
      ir_prev = in_reset;
      edges_prev = edges;
    end
  end

  // Number of mechanisms that never occurred (one per partition without a
  // hand-over, plus wrap, MIC, two-clock cycle, gating, reset and any of the
  // three CCB operating modes).
  function automatic int missing_mechanisms(bit want_reset);
    int m;
    m = 0;
    for (int k = 0; k < N_PART; k++) if (handovers[k] == 0) m++;
    if (wraps == 0) m++;
    if (mic_events == 0) m++;
    if (two_clock_cycles == 0) m++;
    if (gated_edges == 0) m++;
    if (want_reset && resets == 0) m++;
    if (mode_handover == 0 || mode_enable == 0 || mode_disable == 0) m++;
    return m;
  endfunction

  function automatic void report();
    $display("N_PART=%0d: %0d cycles, %0d hand-overs of partition 0, %0d wraps, %0d MIC events, %0d two-clock cycles, %0d gated edges, %0d resets",
             N_PART, samples, handovers[0], wraps, mic_events, two_clock_cycles, gated_edges, resets);
    $display("N_PART=%0d: CCB-cycles in hand-over %0d, enable %0d, disable %0d",
             N_PART, mode_handover, mode_enable, mode_disable);
  endfunction

endmodule
