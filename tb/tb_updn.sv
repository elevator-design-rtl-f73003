// tb_updn: end-to-end test of the elevator main controller at its default
// size (five-bit floor bus), with a small model of the building around it.
//
// The model is the part of the elevator the controller does not contain:
//   * a car whose position p moves one unit per clock at full speed and one
//     unit every SLOW_DIV clocks at slow speed, up or down as the controller
//     says, and not at all while the brake is on;
//   * shaft sensors: floors sit UNIT units apart; within ZONE units of a
//     floor f carries that floor's number (all ones elsewhere), stb pulses
//     low for two positions as the car enters that window from the side it
//     is travelling from, and here is high exactly level with the floor;
//   * call logic: car calls and up/down hall calls. Travelling in one
//     direction, stop_here means a car call or a same-direction hall call
//     at the floor in flr, and keep_going means any call beyond that floor;
//   * a car controller that, while the car is stopped, cancels the calls it
//     is serving, holds the doors DOOR clocks and then pulses start.
// The test runs a scripted sequence (idle alternation, a run up past two
// floors, a stop for a down call above all others that turns the car round,
// a run down) and then random calls, and checks that the car stops only level
// with a floor that was called, that flr names that floor, that the brake
// comes exactly two clocks after here during a slow approach, that the car
// never leaves the shaft, and that every call is served. It counts each
// mechanism of the controller and counts a failure for any that never ran.
`timescale 1ns/1ps
module tb_updn;
  import elevator_pkg::*;

  localparam int NF       = 8;    // floors in the model building
  localparam int UNIT     = 16;   // position units between floors
  localparam int ZONE     = 5;    // floor-code window, units either side
  localparam int SLOW_DIV = 8;    // clocks per unit at slow speed
  localparam int DOOR     = 6;    // clocks the car controller waits at a stop

  logic clk = 1'b0, rst;
  logic keep_going, start, stop_here;
  logic [4:0] f, flr;
  logic here, stb;
  logic brake, dn, run, slow, up;

  int checks = 0, failures = 0;
  longint cyc = 0;

  updn dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d (p=%0d flr=%0d)", what, cyc, p, flr);
    end
  endtask

  // ---------------- car and shaft sensors ----------------
  int p = 0, slow_cnt = 0;
  int near_k, d;

  always_comb begin
    near_k = (p + UNIT / 2) / UNIT;
    d      = p - near_k * UNIT;
    f      = (d <= ZONE && d >= -ZONE) ? 5'(near_k) : 5'h1F;
    here   = (d == 0);
    stb    = !((up && (d == -4 || d == -3)) || (!up && (d == 4 || d == 3)));
  end

  always @(posedge clk) begin
    if (rst) begin
      p <= 0; slow_cnt <= 0;
    end else if (run && !slow) begin
      p <= up ? p + 1 : p - 1; slow_cnt <= 0;
    end else if (run && slow) begin
      if (slow_cnt == SLOW_DIV - 1) begin
        p <= up ? p + 1 : p - 1; slow_cnt <= 0;
      end else slow_cnt <= slow_cnt + 1;
    end
  end

  // ---------------- call logic ----------------
  bit car_call [NF], hall_up [NF], hall_dn [NF];

  function automatic bit any_call(int k);
    return car_call[k] | hall_up[k] | hall_dn[k];
  endfunction

  function automatic bit calls_pending();
    for (int k = 0; k < NF; k++) if (any_call(k)) return 1;
    return 0;
  endfunction

  always_comb begin
    int cf;
    cf = int'(flr);
    keep_going = 1'b0;
    stop_here  = 1'b0;
    if (cf < NF) begin
      stop_here = car_call[cf[2:0]] | (up ? hall_up[cf[2:0]] : hall_dn[cf[2:0]]);
      for (int k = 0; k < NF; k++)
        if (any_call(k) && (up ? k > cf : k < cf)) keep_going = 1'b1;
    end
  end

  // ---------------- car controller ----------------
  int door_cnt = 0;
  state_t st_q;
  always @(posedge clk) begin
    start <= 1'b0;
    if (rst) door_cnt <= 0;
    else if (brake) begin
      if (int'(flr) < NF) begin
        car_call[flr[2:0]] <= 1'b0;
        if (up) hall_up[flr[2:0]] <= 1'b0; else hall_dn[flr[2:0]] <= 1'b0;
      end
      if (dut.u_fsm.state != st_q) door_cnt <= 0;
      else if (door_cnt == DOOR) begin
        start <= 1'b1; door_cnt <= 0;
      end else door_cnt <= door_cnt + 1;
    end else door_cnt <= 0;
  end

  // ---------------- monitors ----------------
  int n_pass_up, n_pass_dn, n_stop_called, n_stop_turn, n_idle_flip;
  int n_leave_up, n_leave_dn, n_strobe, n_turn_at_stop;
  longint here_cyc;
  bit approach_called;
  logic here_q;

  always @(posedge clk) begin
    state_t s;
    s = dut.u_fsm.state;
    here_q <= here;
    if (here && !here_q) here_cyc = cyc;
    st_q <= s;
    if (!rst && s != st_q) begin
      // entering a slow approach: note whether the floor was called, and why
      if ((s == UP_SLOW || s == DN_SLOW) && int'(flr) < NF) begin
        approach_called = any_call(int'(flr));
        if (stop_here) n_stop_called++; else n_stop_turn++;
      end
      if (s == CONT_UP && st_q == UP_FULL) n_pass_up++;
      if (s == CONT_DN && st_q == DN_FULL) n_pass_dn++;
      if (s == CONT_UP && st_q == STOP_UP) n_leave_up++;
      if (s == CONT_DN && st_q == STOP_DN) n_leave_dn++;
      if ((s == STOP_UP && st_q == STOP_DN) || (s == STOP_DN && st_q == STOP_UP)) begin
        if (calls_pending()) n_turn_at_stop++; else n_idle_flip++;
      end
      if ((s == STOP_UP && st_q == UP_SLOW) || (s == STOP_DN && st_q == DN_SLOW)) begin
        check(p == int'(flr) * UNIT, "stopped level with the floor in flr");
        check(approach_called, "stopped at a called floor");
        check(cyc - here_cyc == 2, "brake two clocks after here");
      end
    end
  end

  always @(negedge stb) n_strobe++;

  always @(negedge clk) if (!rst) begin
    check(up != dn, "exactly one direction");
    check(!(brake && run), "brake and run exclusive");
    check(p >= 0 && p <= (NF - 1) * UNIT, "car inside the shaft");
    if (brake) check(p % UNIT == 0, "brake only level with a floor");
  end

  task automatic wait_idle(int limit);
    int n = 0;
    while ((calls_pending() || !brake) && n < limit) begin
      @(posedge clk); n++;
    end
    check(n < limit, "calls served in time");
  endtask

  initial begin
    rst = 1'b0;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(brake && dn && flr == 0, "reset: stopped at floor 0");

    // No calls: the controller alternates between the two stop states.
    repeat (60) @(posedge clk);
    // A car call three floors up: passes floors 1 and 2 at speed.
    @(negedge clk) car_call[3] = 1'b1;
    wait_idle(2000);
    check(flr == 3 && p == 3 * UNIT, "served car call at floor 3");
    // A down call at floor 5 with nothing above it: the car slows for it
    // although stop_here is low, stops, and turns round.
    @(negedge clk) hall_dn[5] = 1'b1;
    wait_idle(2000);
    check(flr == 5 && p == 5 * UNIT, "served down call at floor 5");
    // A car call down to floor 1: passes 4, 3 and 2 at speed.
    @(negedge clk) car_call[1] = 1'b1;
    wait_idle(2000);
    check(flr == 1 && p == UNIT, "served car call at floor 1");

    // Random traffic.
    for (int i = 0; i < 120; i++) begin
      int k, kind;
      repeat (20 + $urandom % 200) @(negedge clk);
      k = $urandom % NF; kind = $urandom % 3;
      if (kind == 0) car_call[k] = 1'b1;
      else if (kind == 1 && k < NF - 1) hall_up[k] = 1'b1;
      else if (kind == 2 && k > 0) hall_dn[k] = 1'b1;
      else car_call[k] = 1'b1;
    end
    wait_idle(5000);
    check(!calls_pending(), "all calls served");

    $display("strobes %0d, passes up %0d, passes down %0d", n_strobe, n_pass_up, n_pass_dn);
    $display("stops for stop_here %0d, stops to turn round %0d", n_stop_called, n_stop_turn);
    $display("departures up %0d, down %0d, turns at a stop %0d, idle flips %0d",
             n_leave_up, n_leave_dn, n_turn_at_stop, n_idle_flip);
    check(n_strobe > 0, "floor strobe seen");
    check(n_pass_up > 0, "pass a floor going up");
    check(n_pass_dn > 0, "pass a floor going down");
    check(n_stop_called > 0, "stop for stop_here");
    check(n_stop_turn > 0, "stop to turn round");
    check(n_leave_up > 0 && n_leave_dn > 0, "start and keep going both ways");
    check(n_turn_at_stop > 0, "turn round at a stop for waiting calls");
    check(n_idle_flip > 1, "idle alternation between STOP_UP and STOP_DN");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
