// tb_ccb_multi -- self-checking test of the multi-input asynchronous CCB.
//
// A three-input CCB controls a sub-FSM that can be activated by any of three
// predecessors. The test plays hand-overs from randomly chosen predecessors:
// go_i rises (clock must be enabled), go_i and in_reset fall together (clock
// stays enabled), later in_reset rises again (clock must be gated). After
// each step it also checks that only the one-bit CCB of the chosen input has
// left IDLE. A second instance, reset to the active state, checks that only
// its input-0 CCB starts in RUN.
module tb_ccb_multi;

  localparam int N = 3;

  logic         rst;
  logic [N-1:0] go;
  logic         in_reset;
  logic         dis_ck;
  logic [N-1:0] go_b;
  logic         in_reset_b;
  logic         dis_ck_b;

  int checks = 0;
  int failures = 0;
  int handovers [N] = '{default: 0};

  ccb_multi #(.N_IN(N), .INIT_ACTIVE(1'b0)) u_dut (
    .rst(rst), .go(go), .in_reset(in_reset), .dis_ck(dis_ck));
  ccb_multi #(.N_IN(N), .INIT_ACTIVE(1'b1)) u_act (
    .rst(rst), .go(go_b), .in_reset(in_reset_b), .dis_ck(dis_ck_b));

  // Expected dis_ck of each one-bit CCB inside u_dut.
  logic [N-1:0] exp_bits;

  task automatic expect_out(logic exp, string what);
    checks++;
    if (dis_ck !== exp) begin
      failures++;
      $display("FAIL %s: dis_ck=%0d expected %0d", what, dis_ck, exp);
    end
    checks++;
    if (u_dut.dis_ck_i !== exp_bits) begin
      failures++;
      $display("FAIL %s: per-input dis_ck %b expected %b", what, u_dut.dis_ck_i, exp_bits);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel;
    rst = 1'b1;
    go = '0;
    in_reset = 1'b1;
    go_b = '0;
    in_reset_b = 1'b0;
    #1;
    exp_bits = '0;
    expect_out(1'b0, "reset");
    checks++;
    if (dis_ck_b !== 1'b1 || u_act.dis_ck_i !== 3'b001) begin
      failures++;
      $display("FAIL active instance after reset: %b", u_act.dis_ck_i);
    end
    rst = 1'b0;
    #1;
    // The active instance's sub-FSM goes to reset: clock must be gated.
    in_reset_b = 1'b1;
    #1;
    checks++;
    if (dis_ck_b !== 1'b0) begin
      failures++;
      $display("FAIL active instance not gated on in_reset");
    end

    for (int i = 0; i < 60; i++) begin
      sel = $urandom_range(0, N - 1);
      go[sel] = 1'b1;
      #1;
      exp_bits = '0;
      exp_bits[sel] = 1'b1;
      expect_out(1'b1, "go rises");
      go[sel] = 1'b0;
      in_reset = 1'b0;
      #1;
      expect_out(1'b1, "go and in_reset fall");
      handovers[sel]++;
      #3;
      expect_out(1'b1, "running");
      in_reset = 1'b1;
      #1;
      exp_bits = '0;
      expect_out(1'b0, "in_reset rises");
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (handovers[i] == 0) begin
        failures++;
        $display("FAIL input %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
