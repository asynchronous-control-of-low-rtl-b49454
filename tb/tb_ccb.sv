// tb_ccb -- self-checking test of the one-bit asynchronous CCB.
//
// The expected next state comes from a table of the specified cells of the
// CCB transition map, iterated until it is stable. Input changes lead only
// into specified cells, except the transient that one arrival order of the
// simultaneous fall of go and in_reset passes through; there the test only
// checks the final state, RUN. Two instances are tested: one that
// resets to IDLE and one that resets to RUN. Both the output dis_ck and the
// internal state variable s0 are compared.
module tb_ccb;

  logic rst;
  logic go_a, ir_a, go_b, ir_b;
  logic dis_a, dis_b;

  int checks = 0;
  int failures = 0;

  ccb #(.INIT_ACTIVE(1'b0)) u_idle (.rst(rst), .go(go_a), .in_reset(ir_a), .dis_ck(dis_a));
  ccb #(.INIT_ACTIVE(1'b1)) u_run  (.rst(rst), .go(go_b), .in_reset(ir_b), .dis_ck(dis_b));

  // Specified cells of the map: index {s0, dis_ck, go, in_reset}.
  // Bits 1:0 are the next (s0, dis_ck); bit 2 marks a cell left open.
  function automatic logic [2:0] map_cell(logic [1:0] q, logic go, logic ir);
    case ({q, go, ir})
      4'b00_01: return 3'b0_00;
      4'b00_11: return 3'b0_01;
      4'b01_00: return 3'b0_11;
      4'b01_01: return 3'b0_11;
      4'b01_11: return 3'b0_01;
      4'b01_10: return 3'b0_11;
      4'b11_00: return 3'b0_11;
      4'b11_01: return 3'b0_00;
      4'b10_01: return 3'b0_00;
      default:  return 3'b1_00;
    endcase
  endfunction

  // Settle the reference from state q under inputs (go, ir).
  function automatic logic [1:0] settle(logic [1:0] q, logic go, logic ir);
    logic [2:0] c;
    for (int i = 0; i < 4; i++) begin
      c = map_cell(q, go, ir);
      if (c[2]) return q;  // open cell: hold (only reached as a transient)
      if (c[1:0] == q) return q;
      q = c[1:0];
    end
    return q;
  endfunction

  logic [1:0] ref_a, ref_b;

  task automatic check(string what);
    logic [1:0] st_a, st_b;
    st_a = {u_idle.q.s0, dis_a};
    st_b = {u_run.q.s0, dis_b};
    checks++;
    if (st_a !== ref_a) begin
      failures++;
      $display("FAIL %s: idle-reset CCB state %b, expected %b", what, st_a, ref_a);
    end
    checks++;
    if (st_b !== ref_b) begin
      failures++;
      $display("FAIL %s: run-reset CCB state %b, expected %b", what, st_b, ref_b);
    end
  endtask

  // Apply new inputs to both instances and advance the references.
  task automatic apply(logic ga, logic ia, logic gb, logic ib, string what);
    go_a = ga; ir_a = ia; go_b = gb; ir_b = ib;
    #1;
    ref_a = settle(ref_a, ga, ia);
    ref_b = settle(ref_b, gb, ib);
    check(what);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    go_a = 1'b0; ir_a = 1'b1;   // inactive sub-FSM in reset
    go_b = 1'b0; ir_b = 1'b0;   // active sub-FSM counting
    #1;
    ref_a = 2'b00;
    ref_b = 2'b11;
    check("reset");
    rst = 1'b0;
    #1;
    check("after reset release");

    for (int rep = 0; rep < 3; rep++) begin
      // A: woken by go; B: its sub-FSM hands over and returns to reset.
      apply(1, 1, 0, 0, "go rises / other keeps running");
      apply(1, 1, 0, 1, "awake / own in_reset rises");
      // A: go and in_reset fall together (hand-over edge).
      apply(0, 0, 0, 1, "go and in_reset fall together");
      checks++;
      if (!(dis_a && u_idle.q.s0)) begin
        failures++;
        $display("FAIL A not in RUN after hand-over");
      end
      // A: own sub-FSM finishes, goes to reset. B: woken by go.
      apply(0, 1, 1, 1, "in_reset rises / go rises");
      checks++;
      if (dis_a) begin failures++; $display("FAIL A clock not gated"); end
      // B: in_reset falls first, go later (other input order).
      apply(0, 1, 1, 0, "in_reset falls before go");
      apply(0, 1, 0, 0, "go falls after in_reset");
      checks++;
      if (!(dis_b && u_run.q.s0)) begin
        failures++;
        $display("FAIL B not in RUN after split hand-over");
      end
      // A: woken, but go falls while the sub-FSM stays in reset: the map
      // sends it back to IDLE through 11 and 10.
      apply(1, 1, 0, 1, "A woken / B to reset");
      apply(0, 1, 0, 1, "A go falls alone");
      checks++;
      if (dis_a) begin failures++; $display("FAIL A should return to IDLE"); end
      // Restore B to RUN through a regular hand-over for the next round.
      apply(0, 1, 1, 1, "B woken");
      apply(0, 1, 0, 0, "B go and in_reset fall");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
