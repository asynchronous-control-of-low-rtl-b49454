// tb_gated_counter_sweep -- the 256-state counter in every partitioning
// evaluated for the design: 2, 4, 8, 16, 32, 64 and 128 sub-FSMs of equal
// size.
//
// All seven counters run side by side from one global clock for two full
// periods plus a margin; the shared checker (gc_monitor) verifies each one
// cycle by cycle and counts its mechanisms. A partitioning in which some
// partition never handed over, the count never wrapped, or the CCBs never
// saw the simultaneous fall of go and in_reset counts as a failure.
module tb_gated_counter_sweep;

  localparam int unsigned N_STATES = 256;
  localparam int N_CFG = 7;
  localparam int unsigned PARTS [N_CFG] = '{2, 4, 8, 16, 32, 64, 128};

  logic global_ck = 1'b0;
  logic rst;
  int   cycles = 0;
  int   checks = 0;
  int   failures = 0;
  int   mon_checks [N_CFG];
  int   mon_failures [N_CFG];
  int   mon_missing [N_CFG];

  always #5 global_ck = ~global_ck;
  always @(posedge global_ck) cycles++;

  for (genvar i = 0; i < N_CFG; i++) begin : g_cfg
    localparam int unsigned NP = PARTS[i];
    logic [7:0]    count;
    logic [NP-1:0] dis_ck;
    logic [NP-1:0] in_reset;

    gated_counter #(.N_STATES(N_STATES), .N_PART(NP)) dut (
      .rst(rst), .global_ck(global_ck), .count(count),
      .dis_ck(dis_ck), .in_reset(in_reset));

    gc_monitor #(.N_STATES(N_STATES), .N_PART(NP)) mon (
      .global_ck(global_ck), .rst(rst), .count(count), .dis_ck(dis_ck),
      .in_reset(in_reset), .ck(dut.ck), .go(dut.go));

    always @(negedge global_ck) begin
      mon_checks[i]   = mon.checks;
      mon_failures[i] = mon.failures;
      mon_missing[i]  = mon.missing_mechanisms(1'b0);
    end

    final mon.report();
  end

  function automatic void summary();
    int c, f;
    c = checks;
    f = failures;
    for (int i = 0; i < N_CFG; i++) begin
      c += mon_checks[i];
      f += mon_failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endfunction

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog");
    summary();
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (2) @(posedge global_ck);
    #1;
    rst = 1'b0;
    repeat (2 * N_STATES + 50) @(posedge global_ck);
    @(negedge global_ck);
    #2;
    for (int i = 0; i < N_CFG; i++) begin
      checks++;
      if (mon_missing[i] != 0) begin
        failures++;
        $display("FAIL partitioning %0d: %0d mechanisms never occurred", PARTS[i], mon_missing[i]);
      end
    end
    summary();
    $finish;
  end

endmodule
