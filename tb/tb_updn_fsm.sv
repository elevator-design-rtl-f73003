// tb_updn_fsm: self-checking test of the motion state machine.
//
// The reference is a second, independent description of the same machine:
// the minimized next-state and output equations of the hand-encoded design,
// written as sums of products over the state bits (s1, s0 = motion phase,
// upd = direction). The test drives random keep_going/start/stop_here/
// nr_flr/at_flr every cycle, steps the reference in lockstep with the
// design, and compares the state and all five outputs after each clock edge.
// It also counts each of the fourteen transitions of the state diagram and
// counts a failure for any that never occurred.
`timescale 1ns/1ps
module tb_updn_fsm;
  import elevator_pkg::*;

  logic clk = 1'b0, rst;
  logic keep_going, start, stop_here, nr_flr, at_flr;
  motion_t mo;

  int checks = 0, failures = 0;

  updn_fsm dut (.*);

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference state.
  logic s1, s0, upd;

  // Transition coverage: index = {from, to}.
  int unsigned tcount [64];

  function automatic int tr(state_t a, state_t b);
    return int'({a, b});
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic n1, n0, nu;
    state_t prev;
    rst = 1'b0;
    #1 rst = 1'b1; keep_going = 0; start = 0; stop_here = 0; nr_flr = 0; at_flr = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    s1 = 0; s0 = 0; upd = 0;   // STOP_DN after reset
    check(dut.state == STOP_DN, "reset state");
    for (int i = 0; i < 12000; i++) begin
      @(negedge clk);
      keep_going = 1'($urandom);
      start      = ($urandom % 3) == 0;
      stop_here  = 1'($urandom);
      nr_flr     = ($urandom % 4) != 0 ? nr_flr : ~nr_flr;
      at_flr     = ($urandom % 3) == 0;
      // Sum-of-products next state.
      n1 = (!s0 & keep_going & start) | (s1 & keep_going & !stop_here)
         | (s1 & !nr_flr) | (s1 & !s0);
      n0 = (!s1 & s0 & !at_flr) | (s1 & s0 & stop_here) | (s1 & s0 & !keep_going)
         | (s1 & !nr_flr);
      nu = (!s1 & !s0 & !keep_going & start & !upd) | (!start & upd)
         | (keep_going & upd) | (s0 & upd) | (s1 & upd);
      prev = dut.state;
      @(posedge clk);
      s1 = n1; s0 = n0; upd = nu;
      #1;
      if (prev != dut.state) tcount[tr(prev, dut.state)]++;
      check(dut.state == state_t'({upd, s1, s0}), "state");
      check(mo.up == upd && mo.dn == !upd, "up/dn");
      check(mo.run == (s1 | s0), "run");
      check(mo.slow == (!s1 & s0), "slow");
      check(mo.brake == (!s1 & !s0), "brake");
    end
    // Every arrow of the state diagram must have been taken.
    begin
      static int arcs [12] = '{tr(UP_FULL, UP_SLOW), tr(UP_FULL, CONT_UP), tr(CONT_UP, UP_FULL),
                        tr(UP_SLOW, STOP_UP), tr(STOP_UP, CONT_UP), tr(STOP_UP, STOP_DN),
                        tr(STOP_DN, STOP_UP), tr(STOP_DN, CONT_DN), tr(CONT_DN, DN_FULL),
                        tr(DN_FULL, CONT_DN), tr(DN_FULL, DN_SLOW), tr(DN_SLOW, STOP_DN)};
      for (int k = 0; k < 12; k++) begin
        check(tcount[arcs[k]] > 0, "transition never taken");
        $display("transition %s -> %s taken %0d times",
                 state_t'(arcs[k][5:3]), state_t'(arcs[k][2:0]), tcount[arcs[k]]);
      end
      // Only the twelve arcs above exist: nothing else may ever occur.
      for (int k = 0; k < 64; k++) begin
        automatic bit listed = 0;
        for (int j = 0; j < 12; j++) if (arcs[j] == k) listed = 1;
        if (!listed) check(tcount[k] == 0, "unexpected transition");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
