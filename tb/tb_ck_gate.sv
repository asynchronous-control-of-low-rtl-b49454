// tb_ck_gate -- self-checking test of the NAND local clock gate.
//
// Checks the truth table (ck = global_ck whenever dis_ck = 1, ck = 1
// whenever dis_ck = 0) and that changing dis_ck while the global clock is
// high produces no edge on ck: with dis_ck toggled every few cycles during
// the high phase, the number of rising edges on ck must equal the number of
// global clock rising edges that occur while dis_ck is 1.
module tb_ck_gate;

  logic global_ck = 1'b0;
  logic dis_ck;
  logic ck;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int ck_edges = 0;
  int ck_falls = 0;
  int expected_edges = 0;

  ck_gate u_dut (.global_ck_n(~global_ck), .dis_ck(dis_ck), .ck(ck));

  always #5 global_ck = ~global_ck;

  always @(posedge global_ck) cycles++;
  always @(posedge ck) ck_edges++;
  always @(negedge ck) ck_falls++;

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dis_ck = 1'b0;
    // Truth table, combinational.
    for (int g = 0; g < 2; g++) begin
      for (int d = 0; d < 2; d++) begin
        force global_ck = g[0];
        dis_ck = d[0];
        #1;
        checks++;
        if (ck !== (d[0] ? g[0] : 1'b1)) begin
          failures++;
          $display("FAIL truth table gck=%0d dis=%0d ck=%0d", g, d, ck);
        end
      end
    end
    release global_ck;
    global_ck = 1'b0;
    dis_ck = 1'b0;
    ck_edges = 0;
    ck_falls = 0;
    // Gating run: change dis_ck 1 time unit after each rising edge.
    for (int i = 0; i < 200; i++) begin
      @(posedge global_ck);
      #1;
      dis_ck = ($urandom_range(0, 2) != 0);
      checks++;
      if (ck !== 1'b1) begin
        failures++;
        $display("FAIL ck not held high during the high phase");
      end
      if (dis_ck) expected_edges++;  // the next rising edge passes
    end
    @(posedge global_ck);
    #1;
    checks++;
    if (ck_edges != expected_edges) begin
      failures++;
      $display("FAIL %0d gated edges, expected %0d", ck_edges, expected_edges);
    end
    checks++;
    if (ck_falls != expected_edges) begin
      failures++;
      $display("FAIL %0d gated falling edges, expected %0d", ck_falls, expected_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
