// tb_sub_fsm -- self-checking test of one counter partition.
//
// Three partitions are clocked directly (no clock gating): partition 0 and
// partition 3 of a 256-state counter in 8 parts (32 counts each) and
// partition 1 of a counter in 128 parts (2 counts each). A reference model
// written from the partition's specification predicts, edge by edge, the
// count value, the in_reset flag and the one-cycle go pulse in the last
// count. The test also checks the cycle timing: a partition out of reset
// counts for exactly S cycles, raises go in the S-th, and is back in reset
// one cycle later.
module tb_sub_fsm;

  logic ck = 1'b0;
  logic rst;

  logic       go0, go3, go1s;
  logic       ir0, ir3, ir1s;
  logic [7:0] c0, c3, c1s;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int go_pulses = 0;

  sub_fsm #(.N_STATES(256), .N_PART(8), .INDEX(0)) u_p0 (
    .ck(ck), .rst(rst), .go(go0), .in_reset(ir0), .count(c0));
  sub_fsm #(.N_STATES(256), .N_PART(8), .INDEX(3)) u_p3 (
    .ck(ck), .rst(rst), .go(go3), .in_reset(ir3), .count(c3));
  sub_fsm #(.N_STATES(256), .N_PART(128), .INDEX(1)) u_s1 (
    .ck(ck), .rst(rst), .go(go1s), .in_reset(ir1s), .count(c1s));

  // Reference: position p counts 0..S-1, p = S means the reset state.
  typedef struct {
    int s;
    int base;
    int p;
  } ref_t;

  ref_t r0, r3, r1s;

  function automatic ref_t ref_step(ref_t r);
    r.p = (r.p == r.s) ? 0 : r.p + 1;
    return r;
  endfunction

  task automatic compare(ref_t r, logic go, logic ir, logic [7:0] c, string name);
    logic       e_ir;
    logic       e_go;
    logic [7:0] e_c;
    e_ir = (r.p == r.s);
    e_go = (r.p == r.s - 1);
    e_c  = e_ir ? 8'd0 : 8'(r.base + r.p);
    checks++;
    if (ir !== e_ir || go !== e_go || c !== e_c) begin
      failures++;
      $display("FAIL %s cycle %0d: ir=%0d go=%0d count=%0d, expected %0d %0d %0d",
               name, cycles, ir, go, c, e_ir, e_go, e_c);
    end
  endtask

  always #5 ck = ~ck;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_out, t_go;
    rst = 1'b1;
    r0  = '{s: 32, base: 0,  p: 0};
    r3  = '{s: 32, base: 96, p: 32};
    r1s = '{s: 2,  base: 2,  p: 2};
    #7;
    compare(r0, go0, ir0, c0, "p0");
    compare(r3, go3, ir3, c3, "p3");
    compare(r1s, go1s, ir1s, c1s, "s1");
    rst = 1'b0;
    t_out = -1;
    t_go = -1;
    for (int i = 0; i < 300; i++) begin
      @(posedge ck);
      cycles++;
      #1;
      r0  = ref_step(r0);
      r3  = ref_step(r3);
      r1s = ref_step(r1s);
      compare(r0, go0, ir0, c0, "p0");
      compare(r3, go3, ir3, c3, "p3");
      compare(r1s, go1s, ir1s, c1s, "s1");
      if (go3) go_pulses++;
      // Cycle timing of partition 3: leave reset, go after 32 counts.
      if (!ir3 && t_out < 0) t_out = cycles;
      if (go3 && t_go < 0) begin
        t_go = cycles;
        checks++;
        if (t_go - t_out != 31) begin
          failures++;
          $display("FAIL go after %0d cycles in count, expected 31", t_go - t_out);
        end
      end
    end
    checks++;
    if (go_pulses != 300 / 33) begin
      failures++;
      $display("FAIL %0d go pulses, expected %0d", go_pulses, 300 / 33);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
