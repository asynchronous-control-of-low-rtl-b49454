// tb_gated_counter -- end-to-end test of the gated-clock counter at its
// default size (256 states, 8 partitions).
//
// Runs the counter through three full periods, applies an asynchronous
// reset in the middle of the fourth and runs one more full period. The
// shared checker (gc_monitor) verifies the count, the local clock edges of
// every partition in every cycle, the clock enables and the go pulses, and
// counts each mechanism: every partition hands over at least once, the
// last partition wraps to the first, the CCBs see go and in_reset fall
// together, hand-over cycles clock two partitions, passive partitions are
// gated, and the reset restarts the count. A mechanism that never occurred
// counts as a failure. The count rate is one per global clock cycle, so the
// 256-state period is checked by the count itself.
module tb_gated_counter;

  localparam int unsigned N_STATES = 256;
  localparam int unsigned N_PART   = 8;

  logic                 global_ck = 1'b0;
  logic                 rst;
  logic [7:0]           count;
  logic [N_PART-1:0]    dis_ck;
  logic [N_PART-1:0]    in_reset;

  int cycles = 0;
  int checks = 0;
  int failures = 0;

  gated_counter dut (
    .rst(rst), .global_ck(global_ck), .count(count),
    .dis_ck(dis_ck), .in_reset(in_reset));

  gc_monitor #(.N_STATES(N_STATES), .N_PART(N_PART)) mon (
    .global_ck(global_ck), .rst(rst), .count(count), .dis_ck(dis_ck),
    .in_reset(in_reset), .ck(dut.ck), .go(dut.go));

  always #5 global_ck = ~global_ck;
  always @(posedge global_ck) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + mon.checks, failures + mon.failures);
    $finish;
  end

  task automatic reset_pulse();
    @(posedge global_ck);
    #1;
    rst = 1'b1;
    repeat (2) @(posedge global_ck);
    #1;
    checks++;
    if (count !== 8'd0 || dis_ck !== N_PART'(1) || in_reset !== ~N_PART'(1)) begin
      failures++;
      $display("FAIL reset state: count=%0d dis_ck=%b in_reset=%b", count, dis_ck, in_reset);
    end
    rst = 1'b0;
  endtask

  initial begin
    rst = 1'b0;
    #1;
    rst = 1'b1;
    #2;
    reset_pulse();
    repeat (3 * N_STATES + 100) @(posedge global_ck);
    reset_pulse();
    repeat (N_STATES + 20) @(posedge global_ck);
    @(negedge global_ck);
    #1;
    mon.report();
    checks++;
    if (mon.missing_mechanisms(1'b1) != 0) begin
      failures++;
      $display("FAIL %0d mechanisms never occurred", mon.missing_mechanisms(1'b1));
    end
    checks++;
    if (mon.samples < 4 * N_STATES) begin
      failures++;
      $display("FAIL only %0d cycles checked", mon.samples);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + mon.checks, failures + mon.failures);
    $finish;
  end

endmodule
